// tfa_pkg: shared sizes, types and constant tables of the multicycle
// signal-dependent S-method (SM) processor.
//
// The processor computes, for every time instant n and every frequency bin k,
//   SM(n,k) = SM_R(n,k) + SM_I(n,k),
//   SM_R(n,k) = Re{F(n,k)}^2 + 2 * sum_{i=1..L(n,k)} Re{F(n,k+i)} Re{F(n,k-i)}
// (SM_I likewise with the imaginary parts), where F is the short-time Fourier
// transform and the window half-width L(n,k) ends at the first i for which
// |F(n,k+i)|^2 or |F(n,k-i)|^2 falls below a reference level.
//
// The 16-bit data width follows the 16-bit multipliers and adders the
// architecture is costed with. The transform length (64), the maximal window
// half-width (31), the sample width (9 bits), the twiddle format (Q1.14),
// the accumulator width (40 bits) and the reference-level divisor (Q = 5)
// are this design's own choices.
//
// twiddle_re/twiddle_im return round(2^TWF * cos/sin(2*pi*k/N)), the rotation
// factor exp(+j*2*pi*k/N) used by the recursive STFT; they are evaluated at
// elaboration time only.
package tfa_pkg;

  // Transform length N = 2^M (number of channels).
  localparam int unsigned N_DEF    = 64;
  // Maximal convolution window half-width, limited by the N/2-input muxes.
  localparam int unsigned LMAX_DEF = N_DEF / 2 - 1;
  // STFT value width (real and imaginary part each).
  localparam int unsigned DW_DEF   = 16;
  // Input sample width: N * 2^(XW-1) must stay inside DW bits.
  localparam int unsigned XW_DEF   = 9;
  // Twiddle fraction bits.
  localparam int unsigned TWF_DEF  = 14;
  // Accumulator (Real, Imag, SMStore) width.
  localparam int unsigned AW_DEF   = 40;
  // Reference level R^2 = max_k S(n,k) / Q^2.
  localparam int unsigned Q_DEF    = 5;

  // Distribution code driving the control unit.
  typedef enum logic [0:0] {
    TFD_SPEC = 1'b0,   // spectrogram only: window width forced to zero
    TFD_SDSM = 1'b1    // signal-dependent S-method
  } tfd_code_e;

  // Control unit states (one clock cycle each).
  typedef enum logic [1:0] {
    ST_STFT = 2'd0,    // step 1: new sample, STFT update, x_i set
    ST_SPEC = 2'd1,    // step 2: spectrogram term, SignDep forced to 1
    ST_SM   = 2'd2,    // steps 3..: i-th correlation term
    ST_HOLD = 2'd3     // spectrogram mode: idle until the instant ends
  } ctrl_state_e;

  localparam real PI = 3.14159265358979323846;

  function automatic int twiddle_re(int unsigned k, int unsigned n, int unsigned twf);
    return $rtoi($floor((2.0 ** twf) * $cos(2.0 * PI * k / n) + 0.5));
  endfunction

  function automatic int twiddle_im(int unsigned k, int unsigned n, int unsigned twf);
    return $rtoi($floor((2.0 ** twf) * $sin(2.0 * PI * k / n) + 0.5));
  endfunction

endpackage
