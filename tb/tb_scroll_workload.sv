// tb_scroll_workload: checks that each scroll setting really yields that many scrolls.
//
// For n = 3..7 the testbench first locates, with the floating-point
// reference h(x), the zeros of h: zeros where h rises are the equilibria the
// trajectory spirals around (scroll centres), and zeros where h falls
// separate neighbouring scrolls. It then runs the complete generator
// (default configuration) for STEPS Euler steps at that setting and records
// which regions between separators x visits. The check passes when the
// number of centres is n and the trajectory has visited exactly the n
// regions that contain a centre (every scroll, and nothing beyond the outer
// ones). The testbench also reports the step at which the last scroll was
// first reached and the DAC code range of x, i.e. how wide the attractor
// is drawn on the oscilloscope.
`timescale 1ns/1ps
module tb_scroll_workload;
  import mscroll_ref_pkg::*;

  localparam int STEPS = 400000;   // Euler steps per scroll count
  localparam int MAXZ  = 16;

  logic               clk = 1'b0;
  logic               rst_n;
  logic [2:0]         sw_scroll;
  logic [1:0]         sw_dac_a, sw_dac_b;
  logic [7:0]         dac_a, dac_b;
  logic [2:0]         scroll;
  logic signed [31:0] x_n, y_n, z_n, h_n;

  int checks   = 0;
  int failures = 0;

  always #5 clk = ~clk;

  mscroll_top dut (.*);

  initial begin
    #(64'd10 * (5 * STEPS + 1000));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real sep [MAXZ];
    real cen [MAXZ];
    bit  visited [MAXZ + 1];
    bit  has_cen [MAXZ + 1];
    int  nsep, ncen, nvis, r, last_new, dmin, dmax;
    real xs, hp, hc, xr;

    rst_n = 1'b0;
    sw_scroll = 3'd5;
    sw_dac_a = 2'd0;   // DAC A shows x
    sw_dac_b = 2'd3;   // DAC B shows h
    #12;
    rst_n = 1'b1;

    for (int n = 3; n <= 7; n++) begin
      // Zeros of h on a 0.001 grid over +-60.
      nsep = 0; ncen = 0;
      hp = h_ref(n, -60.0);
      for (int i = -59999; i <= 60000; i++) begin
        xs = real'(i) * 0.001;
        hc = h_ref(n, xs);
        if ((hp < 0.0) != (hc < 0.0)) begin
          if (hc > hp) begin
            if (ncen < MAXZ) cen[ncen] = xs;
            ncen++;
          end else begin
            if (nsep < MAXZ) sep[nsep] = xs;
            nsep++;
          end
        end
        hp = hc;
      end
      checks++;
      if (ncen != n) begin
        failures++;
        $display("FAIL %0d-scroll: h has %0d rising zeros", n, ncen);
      end
      foreach (visited[i]) begin
        visited[i] = 1'b0;
        has_cen[i] = 1'b0;
      end
      for (int c = 0; c < ncen && c < MAXZ; c++) begin
        r = 0;
        for (int s = 0; s < nsep && s < MAXZ; s++) if (cen[c] > sep[s]) r++;
        has_cen[r] = 1'b1;
      end

      // Select the scroll count; the change restarts the trajectory.
      @(negedge clk);
      sw_scroll = 3'(n);
      repeat (4) @(negedge clk);
      checks++;
      if (int'(scroll) != n) begin
        failures++;
        $display("FAIL scroll count %0d not taken", n);
      end

      nvis = 0; last_new = 0; dmin = 255; dmax = 0;
      for (int k = 0; k < STEPS; k++) begin
        @(negedge clk);
        xr = fx2r(x_n);
        r = 0;
        for (int s = 0; s < nsep && s < MAXZ; s++) if (xr > sep[s]) r++;
        if (!visited[r]) begin
          visited[r] = 1'b1;
          nvis++;
          last_new = k;
        end
        if (int'(dac_a) < dmin) dmin = int'(dac_a);
        if (int'(dac_a) > dmax) dmax = int'(dac_a);
      end

      for (int i = 0; i <= MAXZ; i++) begin
        if (visited[i] != has_cen[i]) begin
          checks++;
          failures++;
          $display("FAIL %0d-scroll: region %0d visited=%0d, holds a centre=%0d",
                   n, i, visited[i], has_cen[i]);
        end
      end
      checks++;
      if (nvis != n) failures++;
      $display("%0d-scroll: %0d scrolls visited (last reached at step %0d), x on DAC codes %0d..%0d",
               n, nvis, last_new, dmin, dmax);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
