// main_chua: the Euler-discretised Chua system without its nonlinearity.
//
// Holds the state (x, y, z) and advances it by one Euler step of dk = 0.01
// on every clock edge:
//   x' = x + (alpha*dk)*(y - h)
//   y' = y + dk*(x - y + z)
//   z' = z - (beta*dk)*y
// where h = h(x_n) comes back combinationally from the active
// transfer-function block in the same cycle. The step equations, alpha = 9,
// dk = 0.01 and the 32-bit fixed-point words follow the design; the Q8.24
// format, beta = 14.87 and the start point (0.1, 0, 0) are this
// implementation's reading/choice (see mscroll_pkg). Three multipliers with
// constant operands are used.
//
// Interface: rst_n (asynchronous, active low) and restart (synchronous,
// active high) both load the start point. While restart is high the state
// holds the start point; the first Euler step is taken on the first edge
// after restart falls. Outputs are the registered state x_n, y_n, z_n.
module main_chua
  import mscroll_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic restart,  // reload the start point (scroll count changed)
  input  fix_t h,        // h(x_n) from the active transfer-function block
  output fix_t x,        // x_n
  output fix_t y,        // y_n
  output fix_t z         // z_n
);

  fix_t x_nx, y_nx, z_nx;

  always_comb begin
    x_nx = x + fmul(K_ADK, y - h);
    y_nx = y + fmul(K_DK, x - y + z);
    z_nx = z - fmul(K_BDK, y);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= X0;
      y <= Y0;
      z <= Z0;
    end else if (restart) begin
      x <= X0;
      y <= Y0;
      z <= Z0;
    end else begin
      x <= x_nx;
      y <= y_nx;
      z <= z_nx;
    end
  end

endmodule
