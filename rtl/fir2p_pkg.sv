// fir2p_pkg: shared constants, types and coefficient tables of the
// two-parallel FIR filter.
//
// The filter is a 24-tap symmetric low-pass FIR (8-bit input samples,
// 24-bit output samples) computed two samples per clock with the fast FIR
// algorithm (FFA) in its "modified" form:
//   Y0 = 1/2[(H0+H1)(X0+X1) + (H0-H1)(X0-X1)] - H1X1 + z^-2 H1X1
//   Y1 = 1/2[(H0+H1)(X0+X1) - (H0-H1)(X0-X1)]
// H0 holds the even taps h(0), h(2), ... h(22) and H1 the odd taps h(1),
// h(3), ... h(23). Because h(k) = h(23-k), H0+H1 is symmetric and H0-H1 is
// antisymmetric, so those two sub-filters need only half of their
// multipliers.
//
// The twelve distinct real coefficients h(0)..h(11) are those of the
// reference low-pass design (Fs 48 kHz, Fpass 960 Hz, Fstop 1200 Hz). They
// are quantized here by rounding to COEF_FRAC fractional bits:
//   q(k) = round(h(k) * 2^COEF_FRAC),  q(23-k) = q(k).
// The sub-filter coefficients are then formed from the quantized taps
// (a(i) = q(2i)+q(2i+1), b(i) = q(2i)-q(2i+1), c(i) = q(2i+1)), which keeps
// the FFA identity exact in integer arithmetic: A+B and A-B are always even,
// so the halving is a lossless arithmetic shift.
//
// Choices of this design, not taken from the reference: rounding as the
// quantizer, COEF_FRAC = 13, two's-complement samples, and the internal
// word width ACC_W.
package fir2p_pkg;

  localparam int NTAPS     = 24;          // filter length N
  localparam int L         = 2;           // parallelism
  localparam int SUB_TAPS  = NTAPS / L;   // taps per sub-filter
  localparam int IN_W      = 8;           // input sample width
  localparam int OUT_W     = 24;          // output sample width
  localparam int COEF_FRAC = 13;          // fractional bits of q(k)
  localparam int COEF_W    = 16;          // bits scanned by a DA multiplier
  localparam int ACC_W     = 26;          // internal sub-filter word width

  typedef int signed coef_full_t [NTAPS];
  typedef int signed coef_sub_t  [SUB_TAPS];
  typedef real       coef_real_t [NTAPS/2];

  // Distinct coefficients h(0)..h(11); h(23-k) = h(k).
  localparam coef_real_t H_REAL = '{
    0.156394, 0.07832,  0.043769, 0.090583, 0.041809, 0.043890,
    0.364409, 0.004082, 0.077261, 0.410924, 0.49934,  0.05092
  };

  // Quantized full impulse response q(0)..q(23).
  function automatic coef_full_t quant_taps();
    coef_full_t q;
    for (int k = 0; k < NTAPS / 2; k++) begin
      q[k]             = int'(H_REAL[k] * real'(1 << COEF_FRAC));
      q[NTAPS - 1 - k] = q[k];
    end
    return q;
  endfunction

  localparam coef_full_t H_Q = quant_taps();

  // Coefficients of the three sub-filters.
  function automatic coef_sub_t sub_sum();   // H0 + H1
    coef_sub_t c;
    for (int i = 0; i < SUB_TAPS; i++) c[i] = H_Q[2*i] + H_Q[2*i+1];
    return c;
  endfunction

  function automatic coef_sub_t sub_dif();   // H0 - H1
    coef_sub_t c;
    for (int i = 0; i < SUB_TAPS; i++) c[i] = H_Q[2*i] - H_Q[2*i+1];
    return c;
  endfunction

  function automatic coef_sub_t sub_odd();   // H1
    coef_sub_t c;
    for (int i = 0; i < SUB_TAPS; i++) c[i] = H_Q[2*i+1];
    return c;
  endfunction

  localparam coef_sub_t H_SUM = sub_sum();
  localparam coef_sub_t H_DIF = sub_dif();
  localparam coef_sub_t H_ODD = sub_odd();

  // Sum of |q(k)|: bounds the size of every internal word.
  function automatic int abs_sum();
    int s = 0;
    for (int k = 0; k < NTAPS; k++) s += (H_Q[k] < 0) ? -H_Q[k] : H_Q[k];
    return s;
  endfunction

  localparam int H_ABS_SUM = abs_sum();

  // Coefficient symmetry used by a sub-filter.
  typedef enum logic [1:0] {
    SYM_EVEN = 2'd0,   // c(M-1-i) =  c(i)
    SYM_ODD  = 2'd1    // c(M-1-i) = -c(i)
  } symmetry_e;

  // One block of two consecutive samples, x(2k) and x(2k+1).
  typedef struct packed {
    logic signed [IN_W-1:0] x1;   // x(2k+1)
    logic signed [IN_W-1:0] x0;   // x(2k)
  } in_pair_t;

  typedef struct packed {
    logic signed [OUT_W-1:0] y1;  // y(2k+1)
    logic signed [OUT_W-1:0] y0;  // y(2k)
  } out_pair_t;

endpackage
