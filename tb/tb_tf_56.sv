// tb_tf_56: self-checking testbench of the 5/6-scroll transfer-function block.
//
// For every parameter set it applies x = 0, every breakpoint +-c_i and its
// neighbours, and random values over the whole state range, and compares
// h(x) with the segment-walk reference of mscroll_ref_pkg within 5e-5
// (fixed-point rounding of the coefficients and products). It also checks
// that the block outputs zero while not enabled. The block is
// combinational, so each result is checked after a 1 ns settle time.
`timescale 1ns/1ps
module tb_tf_56;
  import mscroll_ref_pkg::*;

  localparam int  NSETS = 2;
  localparam real TOL   = 5.0e-5;

  logic               en;
  logic               set_hi;
  logic signed [31:0] x;
  logic signed [31:0] h;
  int                 checks   = 0;
  int                 failures = 0;

  tf_56 dut (.en(en), .set_hi(set_hi), .x(x), .h(h));

  task automatic try(int n, real xr);
    real exp_h, got;
    x = $rtoi(xr * SCALE);
    #1;
    exp_h = h_ref(n, fx2r(x));
    got   = fx2r(h);
    checks++;
    if ((got - exp_h > TOL) || (exp_h - got > TOL)) begin
      failures++;
      if (failures < 10)
        $display("FAIL n=%0d x=%f h=%f expected %f", n, fx2r(x), got, exp_h);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    real lim;
    en = 1'b1;
    set_hi = 1'b0;
    x = '0;
    for (int s = 0; s < NSETS; s++) begin
      set_hi = s[0];
      n = (s == 0) ? 5 : 6;
      lim = c_ref(n, nbp(n) - 1) + 8.0;
      try(n, 0.0);
      for (int j = 0; j < nbp(n); j++) begin
        try(n,  c_ref(n, j));
        try(n, -c_ref(n, j));
        try(n,  c_ref(n, j) + 0.001);
        try(n, -c_ref(n, j) - 0.001);
      end
      for (int k = 0; k < 2000; k++)
        try(n, (real'($urandom % 100000) / 50000.0 - 1.0) * lim);
    end
    // Disabled block: output forced to zero.
    en = 1'b0;
    for (int k = 0; k < 50; k++) begin
      x = $urandom;
      set_hi = k[0];
      #1;
      checks++;
      if (h !== '0) begin
        failures++;
        $display("FAIL disabled block drives h=%h", h);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
