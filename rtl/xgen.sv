// xgen: the circuit that sets the signals x_k of the signal-dependent window.
//
// For the current time instant it forms the spectrogram S(n,k) = |F(n,k)|^2
// of every bin, its maximum over k, and the reference level
//   R_n^2 = max_k S(n,k) / Q^2,
// and raises x_k when S(n,k) > R_n^2. The rule and the reference level follow
// the signal-dependent S-method; building it as one squared-magnitude unit
// per bin, a linear maximum search and an integer division by the constant
// Q^2 is this design's choice.
//
// Timing: the squared magnitudes, the maximum and R_n^2 are combinational
// from the registered STFT outputs and settle during the spectrogram step
// (step 2). The flags are registered at the end of that step (x_load high),
// because the first step that uses them is step 3: in step 2 SignDep is
// forced to 1. This keeps the long squaring/maximum/compare path out of the
// cycle of the SM datapath; registering them here rather than in step 1 is
// this design's choice. A bin with S(n,k) = 0 never has x_k = 1, so an
// all-zero spectrum gives all flags zero. Reset clears the flags.
module xgen
  import tfa_pkg::*;
#(
  parameter int unsigned N  = N_DEF,
  parameter int unsigned DW = DW_DEF,
  parameter int unsigned Q  = Q_DEF
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 x_load,
  input  logic signed [DW-1:0] f_re [N],
  input  logic signed [DW-1:0] f_im [N],
  output logic [N-1:0]         x,
  output logic [2*DW:0]        spec_max,   // max_k S(n,k)
  output logic [2*DW:0]        ref_level   // R_n^2
);

  localparam int unsigned SW = 2 * DW + 1;
  localparam logic [SW-1:0] Q2 = SW'(Q * Q);

  logic [SW-1:0] mag2 [N];
  logic [N-1:0]  x_d;
  logic signed [SW-1:0] sq_re, sq_im;

  always_comb begin
    for (int k = 0; k < N; k++) begin
      sq_re   = SW'(f_re[k]) * SW'(f_re[k]);
      sq_im   = SW'(f_im[k]) * SW'(f_im[k]);
      mag2[k] = unsigned'(sq_re) + unsigned'(sq_im);
    end
    spec_max = '0;
    for (int k = 0; k < N; k++) begin
      if (mag2[k] > spec_max) spec_max = mag2[k];
    end
    ref_level = spec_max / Q2;
    for (int k = 0; k < N; k++) begin
      x_d[k] = mag2[k] > ref_level;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      x <= '0;
    else if (x_load) x <= x_d;
  end

endmodule
