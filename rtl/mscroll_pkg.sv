// mscroll_pkg: number format, system constants and PWL parameter sets shared
// by the multiscroll chaos generator.
//
// All state variables and coefficients are 32-bit two's-complement fixed-point
// numbers (the 32-bit word length is the design's; the split into 8 integer
// bits and 24 fraction bits is this implementation's choice, wide enough for
// the largest state swing, about |z| = 42 in the 6-scroll system).
// Constants are written as real numbers and converted to fixed point at
// elaboration by to_fix(), so no hand-converted tables are needed.
//
// System (Euler form, step dk = 0.01):
//   x' = x + alpha*dk*(y - h(x)),  y' = y + dk*(x - y + z),  z' = z - beta*dk*y
// with alpha = 9 and beta = 14.87, and the PWL nonlinearity
//   h(x) = m_last*x + sum_i k_i*(|x + c_i| - |x - c_i|),  k_i = (m_{i-1} - m_i)/2
// whose slopes m and breakpoints c per scroll count are those of the
// reference parameter table (Suykens/Huang/Chua type generator).
package mscroll_pkg;

  localparam int WIDTH = 32;          // word length of every datapath value
  localparam int FRAC  = 24;          // fraction bits (Q8.24)

  typedef logic signed [WIDTH-1:0] fix_t;

  // Round a real number to the nearest fixed-point value.
  function automatic fix_t to_fix(real r);
    real s;
    s = r * (2.0 ** FRAC);
    if (s >= 0.0) return fix_t'($rtoi(s + 0.5));
    else          return fix_t'($rtoi(s - 0.5));
  endfunction

  // Fixed-point product, truncated towards minus infinity.
  function automatic fix_t fmul(fix_t a, fix_t b);
    logic signed [2*WIDTH-1:0] p;
    p = a * b;
    return fix_t'(p >>> FRAC);
  endfunction

  // Euler step and system parameters.
  localparam real DK    = 0.01;
  localparam real ALPHA = 9.0;
  localparam real BETA  = 14.87;

  localparam fix_t K_ADK = to_fix(ALPHA * DK);   // alpha*dk
  localparam fix_t K_DK  = to_fix(DK);           // dk
  localparam fix_t K_BDK = to_fix(BETA * DK);    // beta*dk

  // Start point loaded at reset and on every change of scroll count.
  localparam fix_t X0 = to_fix(0.1);
  localparam fix_t Y0 = '0;
  localparam fix_t Z0 = '0;

  // Scroll count as set on the switches.
  typedef enum logic [2:0] {
    SCROLL_3 = 3'd3,
    SCROLL_4 = 3'd4,
    SCROLL_5 = 3'd5,
    SCROLL_6 = 3'd6,
    SCROLL_7 = 3'd7
  } scroll_t;

  // Signal routed to a DAC channel.
  typedef enum logic [1:0] {
    SIG_X = 2'd0,
    SIG_Y = 2'd1,
    SIG_Z = 2'd2,
    SIG_H = 2'd3
  } sig_sel_t;

  // ---- Parameter sets (slopes m_0..m_{2q-1} in units of 1/7) ----
  //   3-scroll: m = [0.9 -3 3.5 -2.4]/7,                       c = [1 2.15 4]
  //   4-scroll: m = [-1 2 -4 2]/7,                             c = [1 2.15 3.6]
  //   5-scroll: m = [0.9 -3 3.5 -2.7 4 -2.4]/7,                c = [1 2.15 3.6 6.2 9]
  //   6-scroll: m = [-1 2 -4 2 -4 2]/7,                        c = [1 2.15 3.6 8.2 13]
  //   7-scroll: m = [0.9 -3 3.5 -2.4 2.52 -1.68 2.52 -1.68]/7, c = [1 2.15 3.6 6.2 9 14 23]

  // Number of breakpoints 2q-1 of an n-scroll set.
  function automatic int nbreak(int n);
    case (n)
      3, 4:    return 3;
      5, 6:    return 5;
      default: return 7;
    endcase
  endfunction

  // Slope m_i of the n-scroll set, times 7.
  function automatic real slope7(int n, int i);
    real t [8];
    case (n)
      3:       t = '{0.9, -3.0, 3.5, -2.4, 0.0, 0.0, 0.0, 0.0};
      4:       t = '{-1.0, 2.0, -4.0, 2.0, 0.0, 0.0, 0.0, 0.0};
      5:       t = '{0.9, -3.0, 3.5, -2.7, 4.0, -2.4, 0.0, 0.0};
      6:       t = '{-1.0, 2.0, -4.0, 2.0, -4.0, 2.0, 0.0, 0.0};
      default: t = '{0.9, -3.0, 3.5, -2.4, 2.52, -1.68, 2.52, -1.68};
    endcase
    return t[i];
  endfunction

  // Breakpoint c_{i+1} of the n-scroll set (i counts from 0).
  function automatic real bpoint(int n, int i);
    real t [7];
    case (n)
      3:       t = '{1.0, 2.15, 4.0, 0.0, 0.0, 0.0, 0.0};
      4:       t = '{1.0, 2.15, 3.6, 0.0, 0.0, 0.0, 0.0};
      5:       t = '{1.0, 2.15, 3.6, 6.2, 9.0, 0.0, 0.0};
      6:       t = '{1.0, 2.15, 3.6, 8.2, 13.0, 0.0, 0.0};
      default: t = '{1.0, 2.15, 3.6, 6.2, 9.0, 14.0, 23.0};
    endcase
    return t[i];
  endfunction

  // Outer slope m_{2q-1} of the n-scroll set in fixed point.
  function automatic fix_t coef_mlast(int n);
    return to_fix(slope7(n, nbreak(n)) / 7.0);
  endfunction

  // Weight k_{i+1} = (m_i - m_{i+1})/2 of the n-scroll set in fixed point.
  function automatic fix_t coef_k(int n, int i);
    return to_fix((slope7(n, i) - slope7(n, i + 1)) / 14.0);
  endfunction

  // Breakpoint c_{i+1} of the n-scroll set in fixed point.
  function automatic fix_t coef_c(int n, int i);
    return to_fix(bpoint(n, i));
  endfunction

endpackage
