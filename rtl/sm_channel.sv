// sm_channel: the k-th channel (k = K) of the S-method block.
//
// Two sm_subchannel instances accumulate SM_R(n,K) and SM_I(n,K); a third
// adder forms SM(n,K) = SM_R + SM_I, which is stored in the SMStore register.
// Two one-bit N/2-input multiplexors, steered by the same SelSTFT = i, pick
// x_{K+i} and x_{K-i}; their first input is tied to 1 instead of x_K, so that
// SignDep = x_{K+i} & x_{K-i} is 1 in the spectrogram step (i = 0).
// SMStore, Real and Imag are written when SMWriteCond & SignDep.
//
// The summation of the signal-dependent method runs until the first i for
// which x_{K+i} or x_{K-i} is zero. A one-bit 'win_open' register keeps that
// state: it is set in the spectrogram step and cleared by the first step
// whose SignDep is 0, after which no further terms are added in this time
// instant even if SignDep rises again (the terms of two separate components
// would otherwise form a cross-term). A point with x_K = 0 carries no signal
// and keeps the spectrogram value: its window width is zero. The register
// and the x_K gate are this design's way of realising these two rules.
//
// Timing: control inputs are those of the current step; SMStore changes at
// the end of a step that writes. The final SM(n,K) is in SMStore after the
// last step of the time instant, and the spectrogram value after step 2.
//
// The concurrent assertions at the end use rst_n in 'disable iff'; lint tools
// may therefore report rst_n as used both as an asynchronous reset and as a
// synchronous signal. The synthesised logic uses it only as the reset.
module sm_channel
  import tfa_pkg::*;
#(
  parameter int unsigned N  = N_DEF,
  parameter int unsigned K  = 0,
  parameter int unsigned DW = DW_DEF,
  parameter int unsigned AW = AW_DEF
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic signed [DW-1:0]       f_re [N],
  input  logic signed [DW-1:0]       f_im [N],
  input  logic [N-1:0]               x,
  input  logic [$clog2(N/2)-1:0]     sel_stft,
  input  logic                       spec_or_sm,
  input  logic                       sm_write_cond,
  output logic                       sign_dep,     // SignDep of this step
  output logic                       win_open,     // window still growing
  output logic signed [AW-1:0]       sm_store
);

  localparam int unsigned NH = N / 2;

  logic [0:0] xin_p [NH];
  logic [0:0] xin_m [NH];
  logic [0:0] xp, xm;
  logic       dep_eff, wr_en;
  logic signed [AW-1:0] sum_re, sum_im;

  assign xin_p[0] = 1'b1;
  assign xin_m[0] = 1'b1;
  for (genvar i = 1; i < NH; i++) begin : g_x
    assign xin_p[i] = x[(K + i) % N];
    assign xin_m[i] = x[(K + N - i) % N];
  end

  mux_nhalf #(.NIN(NH), .W(1)) u_xmux_p (.din(xin_p), .sel(sel_stft), .dout(xp));
  mux_nhalf #(.NIN(NH), .W(1)) u_xmux_m (.din(xin_m), .sel(sel_stft), .dout(xm));

  assign sign_dep = xp[0] & xm[0];
  // In the spectrogram step the term is always written. From step 3 on a
  // term is added only if the point itself carries signal (x_K = 1) and
  // every earlier step has had SignDep = 1.
  assign dep_eff  = sign_dep & (~spec_or_sm | (win_open & x[K]));
  assign wr_en    = sm_write_cond & dep_eff;

  sm_subchannel #(.N(N), .K(K), .DW(DW), .AW(AW)) u_re (
    .clk(clk), .rst_n(rst_n), .f(f_re), .sel_stft(sel_stft),
    .spec_or_sm(spec_or_sm), .wr_en(wr_en), .sum(sum_re), .acc());

  sm_subchannel #(.N(N), .K(K), .DW(DW), .AW(AW)) u_im (
    .clk(clk), .rst_n(rst_n), .f(f_im), .sel_stft(sel_stft),
    .spec_or_sm(spec_or_sm), .wr_en(wr_en), .sum(sum_im), .acc());

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sm_store <= '0;
      win_open <= 1'b0;
    end else begin
      if (sm_write_cond) win_open <= dep_eff;
      if (wr_en)         sm_store <= sum_re + sum_im;
    end
  end

  // The spectrogram step always writes; a write needs SMWriteCond.
  a_spec_writes: assert property (@(posedge clk) disable iff (!rst_n)
    (sm_write_cond && !spec_or_sm) |-> wr_en);
  a_write_cond: assert property (@(posedge clk) disable iff (!rst_n)
    wr_en |-> sm_write_cond);

endmodule
