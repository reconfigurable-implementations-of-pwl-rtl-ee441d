// tb_mscroll_top: end-to-end testbench of the multiscroll generator.
//
// Runs the complete generator (default configuration) through every scroll
// count 5, 3, 4, 6, 7, an invalid switch code and back to 5. For each count it
// * checks the switch-to-restart latency (three clock edges) and that the
//   trajectory restarts from (0.1, 0, 0);
// * checks every Euler step (one per clock) against a floating-point step
//   from the recorded state, with h from the segment-walk reference, and
//   checks h(x_n) itself;
// * changes the DAC channel selections every 2000 steps and checks both
//   8-bit DAC codes one clock after the values they show;
// * checks that the trajectory spreads over several scrolls (x spans more
//   than 1.5 times the second-to-last breakpoint) and stays bounded.
// It counts how often each mechanism happened (scroll-count switch, restart,
// use of the second parameter set of a shared block, each DAC selection,
// ignored switch code) and fails if one never happened.
`timescale 1ns/1ps
module tb_mscroll_top;
  import mscroll_ref_pkg::*;

  localparam int  STEPS  = 50000;       // Euler steps per scroll count
  localparam real TOL_X  = 1.0e-5;
  localparam real TOL_H  = 5.0e-5;

  logic               clk = 1'b0;
  logic               rst_n;
  logic [2:0]         sw_scroll;
  logic [1:0]         sw_dac_a, sw_dac_b;
  logic [7:0]         dac_a, dac_b;
  logic [2:0]         scroll;
  logic signed [31:0] x_n, y_n, z_n, h_n;

  int checks   = 0;
  int failures = 0;
  int cycles   = 0;

  // Mechanism counters.
  int n_switch [8];
  int n_restart     = 0;
  int n_set_hi      = 0;
  int n_ignored     = 0;
  int n_sel_a [4];
  int n_sel_b [4];
  int n_spread      = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  mscroll_top dut (.*);

  task automatic check_real(string what, real got, real exp_v, real tol);
    checks++;
    if ((got - exp_v > tol) || (exp_v - got > tol)) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %f expected %f (cycle %0d)", what, got, exp_v, cycles);
    end
  endtask

  task automatic check_int(string what, int got, int exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d (cycle %0d)", what, got, exp_v, cycles);
    end
  endtask

  function automatic real pick(logic [1:0] s, real vx, real vy, real vz, real vh);
    case (s)
      2'd0:    return vx;
      2'd1:    return vy;
      2'd2:    return vz;
      default: return vh;
    endcase
  endfunction

  // Set the scroll switches and check the latency and the restart.
  task automatic switch_to(int n);
    int old_n, c0;
    old_n = int'(scroll);
    @(negedge clk);
    sw_scroll = 3'(n);
    c0 = cycles;
    if (n < 3 || n == old_n) begin
      repeat (4) @(negedge clk);
      check_int("scroll kept", int'(scroll), old_n);
      n_ignored++;
      return;
    end
    while (int'(scroll) == old_n && cycles - c0 < 10) @(negedge clk);
    check_int("switch latency", cycles - c0, 3);
    check_int("scroll", int'(scroll), n);
    check_real("restart x", fx2r(x_n), 0.1, 1.0e-7);
    check_real("restart y", fx2r(y_n), 0.0, 0.0);
    check_real("restart z", fx2r(z_n), 0.0, 0.0);
    n_switch[n]++;
    n_restart++;
  endtask

  // Run the current scroll count and check every step.
  task automatic run(int n);
    real xr, yr, zr, hr, xe, ye, ze, lo, hi, spread_min;
    int  stable;
    lo = 0.0; hi = 0.0;
    stable = 0;
    for (int k = 0; k < STEPS; k++) begin
      if (k % 2000 == 0) begin
        sw_dac_a = 2'($urandom);
        sw_dac_b = 2'($urandom);
        stable = 0;
      end
      xr = fx2r(x_n); yr = fx2r(y_n); zr = fx2r(z_n); hr = fx2r(h_n);
      check_real("h", hr, h_ref(n, xr), TOL_H);
      step_ref(xr, yr, zr, h_ref(n, xr), xe, ye, ze);
      @(negedge clk);
      stable++;
      check_real("x", fx2r(x_n), xe, TOL_X);
      check_real("y", fx2r(y_n), ye, TOL_X);
      check_real("z", fx2r(z_n), ze, TOL_X);
      if (stable > 3) begin
        check_int("dac_a", int'(dac_a), dac_ref(n, pick(sw_dac_a, xr, yr, zr, hr)));
        check_int("dac_b", int'(dac_b), dac_ref(n, pick(sw_dac_b, xr, yr, zr, hr)));
        n_sel_a[sw_dac_a]++;
        n_sel_b[sw_dac_b]++;
      end
      if (xr < lo) lo = xr;
      if (xr > hi) hi = xr;
    end
    if (n == 4 || n == 6) n_set_hi++;
    spread_min = 1.5 * c_ref(n, nbp(n) - 2);
    checks++;
    if (hi - lo < spread_min || hi - lo > 4.0 * c_ref(n, nbp(n) - 1) + 40.0) begin
      failures++;
      $display("FAIL %0d-scroll: x spans %f .. %f", n, lo, hi);
    end else n_spread++;
    $display("%0d-scroll: x spans %f .. %f over %0d steps", n, lo, hi, STEPS);
  endtask

  task automatic need(string what, int count);
    checks++;
    $display("  %-34s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    #(64'd10 * (8 * STEPS + 1000));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (n_switch[i]) n_switch[i] = 0;
    foreach (n_sel_a[i]) begin
      n_sel_a[i] = 0;
      n_sel_b[i] = 0;
    end
    rst_n = 1'b0;
    sw_scroll = 3'd5;
    sw_dac_a = 2'd0;
    sw_dac_b = 2'd1;
    #12;
    check_int("reset scroll", int'(scroll), 5);
    check_real("reset x", fx2r(x_n), 0.1, 1.0e-7);
    @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    // Reset lands on the start point, three steps have already been taken.
    run(5);
    switch_to(3); run(3);
    switch_to(4); run(4);
    switch_to(6); run(6);
    switch_to(7); run(7);
    switch_to(1);               // invalid code: ignored
    run(7);
    switch_to(5); run(5);

    $display("mechanisms:");
    for (int n = 3; n <= 7; n++) need($sformatf("switch to %0d scrolls", n), n_switch[n]);
    need("restart of the trajectory", n_restart);
    need("second parameter set of a shared block", n_set_hi);
    need("invalid switch code ignored", n_ignored);
    for (int s = 0; s < 4; s++) need($sformatf("DAC A shows signal %0d", s), n_sel_a[s]);
    for (int s = 0; s < 4; s++) need($sformatf("DAC B shows signal %0d", s), n_sel_b[s]);
    need("attractor spread over scrolls", n_spread);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
