// control_block: switch decoding, transfer-function selection and DAC output.
//
// The control block organises the generator:
//  * It reads the board switches through a two-flop synchroniser. sw_scroll
//    gives the scroll count (3..7); other codes are ignored and the current
//    count is kept.
//  * From the registered scroll count it activates exactly one
//    transfer-function block (en_34, en_56 or en_7) and tells a shared block
//    which parameter set to use (set_hi: 4- or 6-scroll).
//  * When the scroll count changes it raises restart for one cycle, so the
//    main Chua system starts the new attractor from its start point.
//  * It scales x_n, y_n, z_n and h(x_n) to 8 bits and sends the two chosen by
//    sw_dac_a and sw_dac_b (0: x, 1: y, 2: z, 3: h) to the two DACs.
//
// Activation, parameter-set signalling, 8-bit scaling and choosing two of
// the four signals follow the design. The synchroniser, the restart on a
// change of scroll count and the scaling rule are this implementation's
// choices: a value v is arithmetically shifted right so that the full DAC
// range covers +-8 (3 scrolls), +-16 (4 and 5), +-32 (7) or +-64 (6), which
// spans each attractor; it is saturated to -128..127 and sent offset-binary
// (code = value + 128) for a unipolar DAC.
//
// Timing: a switch change reaches the scroll-count register after three
// clock edges; restart and the enables follow that register combinationally.
// The DAC codes are registered: they show the state of the previous cycle.
module control_block
  import mscroll_pkg::*;
#(
  parameter int DAC_BITS = 8   // resolution of the DACs
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [2:0]          sw_scroll,  // requested scroll count, 3..7
  input  sig_sel_t            sw_dac_a,   // signal for DAC A
  input  sig_sel_t            sw_dac_b,   // signal for DAC B
  input  fix_t                x,
  input  fix_t                y,
  input  fix_t                z,
  input  fix_t                h,
  output scroll_t             scroll,     // scroll count in use
  output logic                en_34,      // activate the 3-4 scroll block
  output logic                en_56,      // activate the 5-6 scroll block
  output logic                en_7,       // activate the 7 scroll block
  output logic                set_hi,     // shared block: use 4-/6-scroll set
  output logic                restart,    // reload the start point
  output logic [DAC_BITS-1:0] dac_a,      // DAC A code, offset binary
  output logic [DAC_BITS-1:0] dac_b       // DAC B code, offset binary
);

  // ---- switch synchroniser ----
  typedef struct packed {
    logic [2:0] scroll;
    sig_sel_t   dac_a;
    sig_sel_t   dac_b;
  } sw_t;

  sw_t sw_m, sw_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sw_m <= '{scroll: 3'd5, dac_a: SIG_X, dac_b: SIG_Y};
      sw_s <= '{scroll: 3'd5, dac_a: SIG_X, dac_b: SIG_Y};
    end else begin
      sw_m <= '{scroll: sw_scroll, dac_a: sw_dac_a, dac_b: sw_dac_b};
      sw_s <= sw_m;
    end
  end

  // ---- scroll count ----
  logic sw_valid;
  assign sw_valid = (sw_s.scroll >= 3'd3);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        scroll <= SCROLL_5;
    else if (sw_valid) scroll <= scroll_t'(sw_s.scroll);
  end

  assign restart = sw_valid && (sw_s.scroll != scroll);

  always_comb begin
    en_34  = (scroll == SCROLL_3) || (scroll == SCROLL_4);
    en_56  = (scroll == SCROLL_5) || (scroll == SCROLL_6);
    en_7   = (scroll == SCROLL_7);
    set_hi = (scroll == SCROLL_4) || (scroll == SCROLL_6);
  end

  // ---- scaling to DAC codes ----
  // Right shift that maps the chosen full-scale range onto DAC_BITS bits.
  function automatic int dac_shift(scroll_t s);
    case (s)
      SCROLL_3: return FRAC - (DAC_BITS - 1) + 3;  // +-8
      SCROLL_6: return FRAC - (DAC_BITS - 1) + 6;  // +-64
      SCROLL_7: return FRAC - (DAC_BITS - 1) + 5;  // +-32
      default:  return FRAC - (DAC_BITS - 1) + 4;  // +-16
    endcase
  endfunction

  localparam fix_t SAT_HI = fix_t'((1 <<< (DAC_BITS - 1)) - 1);
  localparam fix_t SAT_LO = -fix_t'(1 <<< (DAC_BITS - 1));

  function automatic logic [DAC_BITS-1:0] to_dac(fix_t v, scroll_t s);
    fix_t q;
    q = v >>> dac_shift(s);
    if (q > SAT_HI) q = SAT_HI;
    if (q < SAT_LO) q = SAT_LO;
    return {~q[DAC_BITS-1], q[DAC_BITS-2:0]};   // two's complement -> offset binary
  endfunction

  function automatic fix_t pick(sig_sel_t sel, fix_t vx, fix_t vy, fix_t vz, fix_t vh);
    case (sel)
      SIG_X:   return vx;
      SIG_Y:   return vy;
      SIG_Z:   return vz;
      default: return vh;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dac_a <= DAC_BITS'(1 << (DAC_BITS - 1));
      dac_b <= DAC_BITS'(1 << (DAC_BITS - 1));
    end else begin
      dac_a <= to_dac(pick(sw_s.dac_a, x, y, z, h), scroll);
      dac_b <= to_dac(pick(sw_s.dac_b, x, y, z, h), scroll);
    end
  end

endmodule
