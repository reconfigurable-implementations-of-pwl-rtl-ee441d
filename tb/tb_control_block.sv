// tb_control_block: self-checking testbench of the control block.
//
// Checks the reset state, the switch-to-scroll-count latency (restart one
// cycle after two synchroniser edges, the new count on the third edge), the
// one-hot block enables and the parameter-set bit for every scroll count,
// that invalid switch codes are ignored, and the 8-bit DAC codes for every
// channel selection and scroll count, including saturation, against
// mscroll_ref_pkg::dac_ref. DAC codes are expected one clock after the
// values are applied.
`timescale 1ns/1ps
module tb_control_block;
  import mscroll_pkg::*;
  import mscroll_ref_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n;
  logic [2:0] sw_scroll;
  sig_sel_t   sw_dac_a, sw_dac_b;
  fix_t       x, y, z, h;
  scroll_t    scroll;
  logic       en_34, en_56, en_7, set_hi, restart;
  logic [7:0] dac_a, dac_b;
  int         checks   = 0;
  int         failures = 0;

  always #5 clk = ~clk;

  control_block dut (.*);

  task automatic expect_eq(string what, int got, int exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp_v);
    end
  endtask

  task automatic check_mode(int n);
    expect_eq("scroll", int'(scroll), n);
    expect_eq("en_34", int'(en_34), int'(n == 3 || n == 4));
    expect_eq("en_56", int'(en_56), int'(n == 5 || n == 6));
    expect_eq("en_7", int'(en_7), int'(n == 7));
    expect_eq("set_hi", int'(set_hi), int'(n == 4 || n == 6));
  endtask

  function automatic fix_t rnd_val(int n);
    real r;
    r = (real'($urandom % 100000) / 50000.0 - 1.0) * dac_fs(n) * 1.5;
    return fix_t'($rtoi(r * SCALE));
  endfunction

  function automatic fix_t pick(sig_sel_t s);
    case (s)
      SIG_X:   return x;
      SIG_Y:   return y;
      SIG_Z:   return z;
      default: return h;
    endcase
  endfunction

  task automatic switch_to(int n);
    int cur;
    cur = int'(scroll);
    @(negedge clk);
    sw_scroll = 3'(n);
    @(negedge clk);                          // edge 1: first flop
    expect_eq("restart early", int'(restart), 0);
    @(negedge clk);                          // edge 2: second flop
    expect_eq("restart", int'(restart), int'(n >= 3 && n != cur));
    check_mode(cur);
    @(negedge clk);                          // edge 3: scroll count register
    expect_eq("restart after", int'(restart), 0);
    check_mode((n >= 3) ? n : cur);
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    sw_scroll = 3'd5;
    sw_dac_a = SIG_X;
    sw_dac_b = SIG_Y;
    x = '0; y = '0; z = '0; h = '0;
    #12;
    check_mode(5);
    expect_eq("dac_a reset", int'(dac_a), 128);
    expect_eq("dac_b reset", int'(dac_b), 128);
    rst_n = 1'b1;

    // Mode switching, including invalid codes.
    switch_to(3);
    switch_to(4);
    switch_to(0);
    switch_to(6);
    switch_to(6);
    switch_to(7);
    switch_to(2);
    switch_to(5);

    // DAC scaling and routing for every scroll count and selection.
    for (int n = 3; n <= 7; n++) begin
      switch_to(n);
      for (int sa = 0; sa < 4; sa++) begin
        sw_dac_a = sig_sel_t'(sa);
        sw_dac_b = sig_sel_t'(3 - sa);
        @(negedge clk);
        @(negedge clk);
        for (int k = 0; k < 200; k++) begin
          x = rnd_val(n); y = rnd_val(n); z = rnd_val(n); h = rnd_val(n);
          @(negedge clk);
          expect_eq("dac_a", int'(dac_a), dac_ref(n, fx2r(pick(sw_dac_a))));
          expect_eq("dac_b", int'(dac_b), dac_ref(n, fx2r(pick(sw_dac_b))));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
