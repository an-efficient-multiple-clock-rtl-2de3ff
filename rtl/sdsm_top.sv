// sdsm_top: multicycle real-time processor for the signal-dependent S-method
// (SM) of time-frequency analysis.
//
// For each time instant n it produces all N values SM(n,k), k = 0..N-1,
//   SM(n,k) = |F(n,k)|^2 + 2 * sum_{i=1..L(n,k)} Re{F(n,k+i) F*(n,k-i)}
// (computed as separate real and imaginary sums), where the window
// half-width L(n,k) <= LMAX ends at the first i at which |F(n,k+i)|^2 or
// |F(n,k-i)|^2 is not above R_n^2 = max_k |F(n,k)|^2 / Q^2.
//
// Two blocks: the STFT block (stft_recursive) and the SM block of N channels
// (sm_channel). Instead of one large single-cycle adder/multiplier tree per
// channel, each channel has two multipliers, two shift-by-one units and three
// adders that are reused over LMAX+2 clock cycles, steered by one shared
// Control FSM (sm_control). The x_k flags that decide how far each window
// grows come from xgen.
//
// Interface:
//   sign_load  out  1 in the STFT step: x_in is sampled at that clock edge
//                   (it is the sampling strobe for the converter of f(t)).
//   x_in       in   signed XW-bit sample.
//   tfd_code   in   TFD_SDSM for the S-method, TFD_SPEC for the spectrogram.
//   tfd_valid  out  1 for one clock (the STFT step) while sm_out[k] holds the
//                   finished SM of the previous time instant.
//   sm_out[k]  out  SMStore register of channel k.
//   x_flags    out  x_k of the current instant (registered at the end of the
//                   spectrogram step, used from step 3 on).
//   state, sign_dep[k], win_open[k], spec_max, ref_level
//              out  observation of the control state, of each channel's
//                   SignDep and window-open bit, of max_k |F|^2 and R_n^2.
// Timing: one time instant every LMAX+2 clocks; the result of instant n is
// offered in the STFT step in which sample n+1 is taken.
//
// The block structure, control signals and step sequence follow the
// architecture; sizes, number formats and the window-stop register are this
// design's choices (see tfa_pkg and the sub-modules).
module sdsm_top
  import tfa_pkg::*;
#(
  parameter int unsigned N    = N_DEF,
  parameter int unsigned LMAX = LMAX_DEF,
  parameter int unsigned DW   = DW_DEF,
  parameter int unsigned XW   = XW_DEF,
  parameter int unsigned TWF  = TWF_DEF,
  parameter int unsigned AW   = AW_DEF,
  parameter int unsigned Q    = Q_DEF
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  tfd_code_e            tfd_code,
  input  logic signed [XW-1:0] x_in,
  output logic                 sign_load,
  output logic                 tfd_valid,
  output logic signed [AW-1:0] sm_out [N],
  output logic [N-1:0]         x_flags,
  output ctrl_state_e          state,
  output logic [N-1:0]         sign_dep,
  output logic [N-1:0]         win_open,
  output logic [2*DW:0]        spec_max,
  output logic [2*DW:0]        ref_level
);

  logic signed [DW-1:0]   f_re [N];
  logic signed [DW-1:0]   f_im [N];
  logic [$clog2(N/2)-1:0] sel_stft;
  logic                   spec_or_sm, sm_write_cond, x_load;

  sm_control #(.N(N), .LMAX(LMAX)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .tfd_code(tfd_code), .state(state),
    .sel_stft(sel_stft), .spec_or_sm(spec_or_sm), .sign_load(sign_load),
    .sm_write_cond(sm_write_cond), .x_load(x_load), .tfd_valid(tfd_valid));

  stft_recursive #(.N(N), .DW(DW), .XW(XW), .TWF(TWF)) u_stft (
    .clk(clk), .rst_n(rst_n), .sign_load(sign_load), .x_in(x_in),
    .f_re(f_re), .f_im(f_im));

  xgen #(.N(N), .DW(DW), .Q(Q)) u_xgen (
    .clk(clk), .rst_n(rst_n), .x_load(x_load), .f_re(f_re), .f_im(f_im), .x(x_flags),
    .spec_max(spec_max), .ref_level(ref_level));

  for (genvar k = 0; k < N; k++) begin : g_ch
    sm_channel #(.N(N), .K(k), .DW(DW), .AW(AW)) u_ch (
      .clk(clk), .rst_n(rst_n), .f_re(f_re), .f_im(f_im), .x(x_flags),
      .sel_stft(sel_stft), .spec_or_sm(spec_or_sm),
      .sm_write_cond(sm_write_cond), .sign_dep(sign_dep[k]),
      .win_open(win_open[k]), .sm_store(sm_out[k]));
  end

endmodule
