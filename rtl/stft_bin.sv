// stft_bin: one frequency bin of the recursive short-time Fourier transform.
//
// It keeps F(n,k) for a rectangular window of the last N samples and updates
// it once per time instant with
//   F(n,k) = exp(+j*2*pi*K/N) * ( F(n-1,k) + x(n) - x(n-N) ),
// which needs one real addition and one complex multiplication per update.
// The caller supplies the difference x(n) - x(n-N) as 'delta'. The twiddle
// factor is a constant of the bin (Q1.TWF, rounded), the products are
// rounded to nearest (ties towards +infinity) and truncated to DW bits.
// The recursion itself is the standard recursive STFT the architecture may
// use as its first block; the fixed-point format is this design's choice.
//
// Timing: 'en' high for one clock stores the new F(n,k); f_re/f_im are the
// registered values and stay constant until the next 'en'. Reset clears F.
module stft_bin
  import tfa_pkg::*;
#(
  parameter int unsigned N   = N_DEF,
  parameter int unsigned K   = 0,
  parameter int unsigned DW  = DW_DEF,
  parameter int unsigned XW  = XW_DEF,
  parameter int unsigned TWF = TWF_DEF
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [XW:0]   delta,   // x(n) - x(n-N)
  output logic signed [DW-1:0] f_re,
  output logic signed [DW-1:0] f_im
);

  localparam int PW = DW + TWF + 4;
  localparam logic signed [TWF+1:0] C = (TWF+2)'(twiddle_re(K, N, TWF));
  localparam logic signed [TWF+1:0] S = (TWF+2)'(twiddle_im(K, N, TWF));
  localparam logic signed [PW-1:0] HALF = PW'(1) <<< (TWF - 1);

  logic signed [PW-1:0] s_re, s_im, r_re, r_im;

  always_comb begin
    s_re = PW'(f_re) + PW'(delta);
    s_im = PW'(f_im);
    r_re = (s_re * PW'(C) - s_im * PW'(S) + HALF) >>> TWF;
    r_im = (s_re * PW'(S) + s_im * PW'(C) + HALF) >>> TWF;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_re <= '0;
      f_im <= '0;
    end else if (en) begin
      f_re <= r_re[DW-1:0];
      f_im <= r_im[DW-1:0];
    end
  end

endmodule
