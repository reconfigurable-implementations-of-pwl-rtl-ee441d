// pwl_tf: shared datapath of the piecewise-linear transfer-function blocks.
//
// Computes, in one combinational pass,
//   h(x) = m_last*x + sum_{i=1..NB} k_i * (|x + c_i| - |x - c_i|)
// which is the multiscroll PWL nonlinearity with k_i = (m_{i-1} - m_i)/2.
// The block serves up to two scroll counts, N_LO and N_HI, that share the
// breakpoint count NB; set_hi chooses which coefficient set feeds the
// operators. Switching sets changes only operands, never the hardware: the
// block always has NB+1 multipliers, 2*NB absolute-value units and the adders
// around them. Coefficients are computed at elaboration from the slope and
// breakpoint lists in mscroll_pkg.
//
// Interface: en activates the block; while en is low h is forced to zero so
// that the outputs of all transfer-function blocks can be ORed onto one
// return bus towards the main Chua system. There is no register: h is valid
// in the same clock cycle as x. Sharing one datapath between two scroll
// counts follows the design; the enable-gated output is this
// implementation's way of joining the blocks' outputs.
module pwl_tf
  import mscroll_pkg::*;
#(
  parameter int N_LO = 3,            // scroll count of coefficient set 0
  parameter int N_HI = 4,            // scroll count of coefficient set 1
  parameter int NB   = nbreak(N_LO)  // breakpoints 2q-1 (same for both sets)
) (
  input  logic en,      // block activated by the control block
  input  logic set_hi,  // 0: N_LO coefficients, 1: N_HI coefficients
  input  fix_t x,       // x_n from the main Chua system
  output fix_t h        // h(x_n), zero while not enabled
);

  function automatic fix_t fabs(fix_t v);
    return (v < 0) ? -v : v;
  endfunction

  // Coefficient tables, one row per set (constants after elaboration).
  fix_t mlast_tab [2];
  fix_t k_tab     [2][NB];
  fix_t c_tab     [2][NB];

  assign mlast_tab[0] = coef_mlast(N_LO);
  assign mlast_tab[1] = coef_mlast(N_HI);

  for (genvar i = 0; i < NB; i++) begin : g_coef
    assign k_tab[0][i] = coef_k(N_LO, i);
    assign k_tab[1][i] = coef_k(N_HI, i);
    assign c_tab[0][i] = coef_c(N_LO, i);
    assign c_tab[1][i] = coef_c(N_HI, i);
  end

  // Operand selection: the only thing that changes between the two sets.
  fix_t mlast_s;
  fix_t k_s [NB];
  fix_t c_s [NB];

  always_comb begin
    mlast_s = mlast_tab[set_hi];
    for (int i = 0; i < NB; i++) begin
      k_s[i] = k_tab[set_hi][i];
      c_s[i] = c_tab[set_hi][i];
    end
  end

  fix_t acc;

  always_comb begin
    acc = fmul(mlast_s, x);
    for (int i = 0; i < NB; i++) begin
      acc = acc + fmul(k_s[i], fabs(x + c_s[i]) - fabs(x - c_s[i]));
    end
  end

  assign h = en ? acc : '0;

endmodule
