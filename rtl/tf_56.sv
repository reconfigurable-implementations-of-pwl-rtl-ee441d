// tf_56: transfer-function block shared by the 5-scroll and 6-scroll systems.
//
// One PWL datapath with 5 breakpoints (see pwl_tf) whose operands come from
// either the 5-scroll or the 6-scroll parameter set. The control block raises
// en when one of these two scroll counts is chosen and drives set_hi to pick
// the set (0: 5-scroll, 1: 6-scroll). The two systems need the same number of
// operations, so they share the adders and multipliers, as the design
// intends. h is combinational: it is returned to the main Chua system within
// the clock cycle in which x is presented, and is zero while en is low.
module tf_56
  import mscroll_pkg::*;
(
  input  logic en,      // block activated
  input  logic set_hi,  // 0: 5-scroll parameters, 1: 6-scroll parameters
  input  fix_t x,       // x_n
  output fix_t h        // h(x_n), zero while not enabled
);

  pwl_tf #(.N_LO(5), .N_HI(6)) u_pwl (
    .en    (en),
    .set_hi(set_hi),
    .x     (x),
    .h     (h)
  );

endmodule
