// tb_main_chua: self-checking testbench of the main Chua system.
//
// The testbench closes the loop with a floating-point 5-scroll
// nonlinearity (mscroll_ref_pkg::h_ref, quantised to Q8.24). Before every
// clock edge it records x, y, z and h; after the edge it checks the new
// state against one floating-point Euler step from the recorded values
// (tolerance 1e-6). This checks one step per clock, i.e. a latency of one
// cycle from h to the state. It also checks the start point after reset and
// after restart pulses given at random times, that the state holds the start
// point while restart is high, and that the free-running trajectory crosses
// x = 0 (leaves the middle scroll) and stays bounded.
`timescale 1ns/1ps
module tb_main_chua;
  import mscroll_ref_pkg::*;

  localparam int  STEPS = 30000;
  localparam real TOL   = 1.0e-6;

  logic               clk = 1'b0;
  logic               rst_n;
  logic               restart;
  logic signed [31:0] h, x, y, z;
  int                 checks   = 0;
  int                 failures = 0;
  int                 cycles   = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  main_chua dut (.clk(clk), .rst_n(rst_n), .restart(restart), .h(h), .x(x), .y(y), .z(z));

  always_comb h = $rtoi(h_ref(5, fx2r(x)) * SCALE);

  task automatic check(string what, real got, real exp_v);
    checks++;
    if ((got - exp_v > TOL) || (exp_v - got > TOL)) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %f expected %f", what, got, exp_v);
    end
  endtask

  task automatic check_start(string what);
    check({what, " x"}, fx2r(x), 0.1);
    check({what, " y"}, fx2r(y), 0.0);
    check({what, " z"}, fx2r(z), 0.0);
  endtask

  initial begin
    #((STEPS + 100) * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real xr, yr, zr, hr, xe, ye, ze, xmax;
    int  crossings, restarts;
    logic prev_neg;
    rst_n = 1'b0;
    restart = 1'b0;
    #12;
    check_start("reset");
    @(negedge clk);
    rst_n = 1'b1;
    crossings = 0;
    restarts = 0;
    xmax = 0.0;
    prev_neg = 1'b0;
    for (int k = 0; k < STEPS; k++) begin
      if (k > 0 && k % 7919 == 0) begin
        restart = 1'b1;
        @(negedge clk);
        check_start("restart");
        @(negedge clk);
        check_start("restart hold");
        restart = 1'b0;
        restarts++;
      end
      xr = fx2r(x); yr = fx2r(y); zr = fx2r(z); hr = fx2r(h);
      step_ref(xr, yr, zr, hr, xe, ye, ze);
      @(negedge clk);
      check("x", fx2r(x), xe);
      check("y", fx2r(y), ye);
      check("z", fx2r(z), ze);
      if ((x < 0) != prev_neg) crossings++;
      prev_neg = (x < 0);
      if (fx2r(x) > xmax) xmax = fx2r(x);
      if (-fx2r(x) > xmax) xmax = -fx2r(x);
    end
    checks++;
    if (crossings < 2) begin
      failures++;
      $display("FAIL trajectory never left one half plane");
    end
    checks++;
    if (xmax > 12.0 || xmax < 1.0) begin
      failures++;
      $display("FAIL |x| peaked at %f", xmax);
    end
    $display("sign changes of x: %0d, max |x| %f, restarts %0d", crossings, xmax, restarts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
