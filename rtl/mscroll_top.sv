// mscroll_top: reconfigurable PWL multiscroll chaos generator (3 to 7 scrolls).
//
// One Euler step of the Chua-type multiscroll system is computed per clock.
// The main Chua system (main_chua) holds x, y, z and sends x_n to three
// transfer-function blocks: tf_34 (3 or 4 scrolls), tf_56 (5 or 6) and tf_7.
// The control block activates one of them according to the switches and
// tells a shared block which parameter set to use; the active block returns
// h(x_n) in the same cycle. Inactive blocks output zero, so their outputs are
// ORed onto one return bus. The control block also scales x, y, z and h to
// 8 bits and drives the two DAC ports with the pair the switches choose
// (for example x and y for the attractor, x and h for the PWL curve).
// The block structure follows the design's FPGA scheme; the OR-ed return
// bus and the state outputs for observation are this implementation's.
//
// Ports: sw_scroll (3..7), sw_dac_a/sw_dac_b (0 x, 1 y, 2 z, 3 h) come from
// board switches and may be asynchronous. dac_a/dac_b are offset-binary
// codes for two external 8-bit DACs. x_n, y_n, z_n, h_n are the Q8.24
// values of the current step. Timing: the state advances every clock; a new
// scroll count takes effect three edges after the switch change, restarting
// the trajectory from (0.1, 0, 0).
module mscroll_top
  import mscroll_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [2:0]  sw_scroll,
  input  logic [1:0]  sw_dac_a,
  input  logic [1:0]  sw_dac_b,
  output logic [7:0]  dac_a,
  output logic [7:0]  dac_b,
  output logic [2:0]  scroll,     // scroll count in use
  output logic [31:0] x_n,
  output logic [31:0] y_n,
  output logic [31:0] z_n,
  output logic [31:0] h_n
);

  fix_t    x, y, z, h;
  fix_t    h_34, h_56, h_7;
  logic    en_34, en_56, en_7, set_hi, restart;
  scroll_t scroll_q;

  main_chua u_main (
    .clk    (clk),
    .rst_n  (rst_n),
    .restart(restart),
    .h      (h),
    .x      (x),
    .y      (y),
    .z      (z)
  );

  tf_34 u_tf_34 (.en(en_34), .set_hi(set_hi), .x(x), .h(h_34));
  tf_56 u_tf_56 (.en(en_56), .set_hi(set_hi), .x(x), .h(h_56));
  tf_7  u_tf_7  (.en(en_7),                   .x(x), .h(h_7));

  // Return bus: only the active block drives a non-zero value.
  assign h = h_34 | h_56 | h_7;

  control_block #(.DAC_BITS(8)) u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .sw_scroll(sw_scroll),
    .sw_dac_a (sig_sel_t'(sw_dac_a)),
    .sw_dac_b (sig_sel_t'(sw_dac_b)),
    .x        (x),
    .y        (y),
    .z        (z),
    .h        (h),
    .scroll   (scroll_q),
    .en_34    (en_34),
    .en_56    (en_56),
    .en_7     (en_7),
    .set_hi   (set_hi),
    .restart  (restart),
    .dac_a    (dac_a),
    .dac_b    (dac_b)
  );

  // Only one transfer-function block may be active at a time.
  always_comb assert ($countones({en_34, en_56, en_7}) == 1 || !rst_n)
    else $error("mscroll_top: %0d transfer-function blocks active",
                $countones({en_34, en_56, en_7}));

  assign scroll = scroll_q;
  assign x_n    = x;
  assign y_n    = y;
  assign z_n    = z;
  assign h_n    = h;

endmodule
