// tf_34: transfer-function block shared by the 3-scroll and 4-scroll systems.
//
// One PWL datapath with 3 breakpoints (see pwl_tf) whose operands come from
// either the 3-scroll or the 4-scroll parameter set. The control block raises
// en when one of these two scroll counts is chosen and drives set_hi to pick
// the set (0: 3-scroll, 1: 4-scroll). The two systems need the same number of
// operations, so they share the adders and multipliers, as the design
// intends. h is combinational: it is returned to the main Chua system within
// the clock cycle in which x is presented, and is zero while en is low.
module tf_34
  import mscroll_pkg::*;
(
  input  logic en,      // block activated
  input  logic set_hi,  // 0: 3-scroll parameters, 1: 4-scroll parameters
  input  fix_t x,       // x_n
  output fix_t h        // h(x_n), zero while not enabled
);

  pwl_tf #(.N_LO(3), .N_HI(4)) u_pwl (
    .en    (en),
    .set_hi(set_hi),
    .x     (x),
    .h     (h)
  );

endmodule
