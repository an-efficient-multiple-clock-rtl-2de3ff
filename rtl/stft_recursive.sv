// stft_recursive: the STFT block, first of the two blocks of the processor.
//
// On every SignLoad pulse it takes one new sample x(n) and updates all N
// bins F(n,k), k = 0..N-1, of a rectangular-window STFT in the same clock
// cycle (step 1 of a time instant). The last N samples are kept in a circular
// sample buffer: the word at the write pointer is x(n-N), which leaves the
// window, and is overwritten by x(n). Each bin is an stft_bin instance that
// applies F(n,k) = exp(j*2*pi*k/N) * (F(n-1,k) + x(n) - x(n-N)).
//
// That the STFT block may be built from the recursive algorithm is stated by
// the architecture; the circular buffer, the rectangular window and the
// number formats are this design's choices.
//
// Interface: x_in is a signed XW-bit sample, sampled when sign_load is high.
// f_re[k]/f_im[k] are registered, valid from the clock after sign_load and
// held until the next one. Reset clears the buffer and all bins.
module stft_recursive
  import tfa_pkg::*;
#(
  parameter int unsigned N   = N_DEF,
  parameter int unsigned DW  = DW_DEF,
  parameter int unsigned XW  = XW_DEF,
  parameter int unsigned TWF = TWF_DEF
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 sign_load,
  input  logic signed [XW-1:0] x_in,
  output logic signed [DW-1:0] f_re [N],
  output logic signed [DW-1:0] f_im [N]
);

  localparam int unsigned M = $clog2(N);

  logic signed [XW-1:0] buf_q [N];
  logic [M-1:0]         wptr;
  logic signed [XW:0]   delta;

  assign delta = (XW+1)'(x_in) - (XW+1)'(buf_q[wptr]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) buf_q[i] <= '0;
      wptr <= '0;
    end else if (sign_load) begin
      buf_q[wptr] <= x_in;
      wptr        <= wptr + 1'b1;
    end
  end

  for (genvar k = 0; k < N; k++) begin : g_bin
    stft_bin #(.N(N), .K(k), .DW(DW), .XW(XW), .TWF(TWF)) u_bin (
      .clk   (clk),
      .rst_n (rst_n),
      .en    (sign_load),
      .delta (delta),
      .f_re  (f_re[k]),
      .f_im  (f_im[k])
    );
  end

endmodule
