// mscroll_ref_pkg: floating-point reference model for the multiscroll testbenches.
//
// Works in real arithmetic, independently of the fixed-point RTL. The PWL
// nonlinearity is evaluated by walking its segments (h is odd; for x >= 0 it
// accumulates slope m_j times the part of x that lies in segment j) rather
// than by the |x+c|-|x-c| sum the RTL uses, so both formulations check each
// other. Also gives one Euler step of the system and the DAC code rule.
package mscroll_ref_pkg;

  localparam real SCALE = 16777216.0;  // 2^24, Q8.24

  function automatic real fx2r(logic signed [31:0] v);
    return real'(v) / SCALE;
  endfunction

  function automatic int nbp(int n);
    return (n <= 4) ? 3 : (n <= 6) ? 5 : 7;
  endfunction

  function automatic real m_ref(int n, int j);
    real t [8];
    case (n)
      3:       t = '{0.9, -3.0, 3.5, -2.4, 0.0, 0.0, 0.0, 0.0};
      4:       t = '{-1.0, 2.0, -4.0, 2.0, 0.0, 0.0, 0.0, 0.0};
      5:       t = '{0.9, -3.0, 3.5, -2.7, 4.0, -2.4, 0.0, 0.0};
      6:       t = '{-1.0, 2.0, -4.0, 2.0, -4.0, 2.0, 0.0, 0.0};
      default: t = '{0.9, -3.0, 3.5, -2.4, 2.52, -1.68, 2.52, -1.68};
    endcase
    return t[j] / 7.0;
  endfunction

  function automatic real c_ref(int n, int j);
    real t [7];
    case (n)
      3:       t = '{1.0, 2.15, 4.0, 0.0, 0.0, 0.0, 0.0};
      4:       t = '{1.0, 2.15, 3.6, 0.0, 0.0, 0.0, 0.0};
      5:       t = '{1.0, 2.15, 3.6, 6.2, 9.0, 0.0, 0.0};
      6:       t = '{1.0, 2.15, 3.6, 8.2, 13.0, 0.0, 0.0};
      default: t = '{1.0, 2.15, 3.6, 6.2, 9.0, 14.0, 23.0};
    endcase
    return t[j];
  endfunction

  // h(x) by segment walk.
  function automatic real h_ref(int n, real x);
    real ax, acc, lo, hi;
    ax  = (x < 0.0) ? -x : x;
    acc = 0.0;
    lo  = 0.0;
    for (int j = 0; j <= nbp(n); j++) begin
      hi = (j < nbp(n)) ? c_ref(n, j) : 1.0e9;
      if (ax > lo) acc += m_ref(n, j) * (((ax < hi) ? ax : hi) - lo);
      lo = hi;
    end
    return (x < 0.0) ? -acc : acc;
  endfunction

  localparam real ALPHA = 9.0;
  localparam real BETA  = 14.87;
  localparam real DK    = 0.01;

  // One Euler step.
  function automatic void step_ref(real x, real y, real z, real h,
                                   output real xn, output real yn, output real zn);
    xn = x + ALPHA * (y - h) * DK;
    yn = y + (x - y + z) * DK;
    zn = z - BETA * y * DK;
  endfunction

  // Full-scale magnitude of the DAC for a scroll count.
  function automatic real dac_fs(int n);
    case (n)
      3:       return 8.0;
      6:       return 64.0;
      7:       return 32.0;
      default: return 16.0;
    endcase
  endfunction

  // Offset-binary 8-bit code of value v.
  function automatic int dac_ref(int n, real v);
    real q;
    int  k;
    q = v * 128.0 / dac_fs(n);
    k = $rtoi(q);
    if (real'(k) > q) k = k - 1;   // floor
    if (k > 127)  k = 127;
    if (k < -128) k = -128;
    return k + 128;
  endfunction

endpackage
