// tf_7: transfer-function block of the 7-scroll system.
//
// One PWL datapath with 7 breakpoints (see pwl_tf) and a single parameter
// set. The control block raises en when seven scrolls are chosen. h is
// combinational: it is returned to the main Chua system within the clock
// cycle in which x is presented, and is zero while en is low.
module tf_7
  import mscroll_pkg::*;
(
  input  logic en,  // block activated
  input  fix_t x,   // x_n
  output fix_t h    // h(x_n), zero while not enabled
);

  pwl_tf #(.N_LO(7), .N_HI(7)) u_pwl (
    .en    (en),
    .set_hi(1'b0),
    .x     (x),
    .h     (h)
  );

endmodule
