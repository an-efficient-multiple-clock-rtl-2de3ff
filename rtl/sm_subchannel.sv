// sm_subchannel: one of the two identical sub-channels of an SM channel.
//
// The Re sub-channel of channel K evaluates eq. SM_R(n,K) one term per clock
// (the Im sub-channel is the same circuit fed with imaginary parts):
//   step 2 (spec_or_sm = 0): acc <= F(n,K)^2
//   step i+2 (spec_or_sm = 1): acc <= acc + 2 * F(n,K+i) * F(n,K-i)
// It holds exactly one multiplier, one shift-left-by-one unit and one adder,
// shared over all steps. Two N/2-input multiplexors, steered by SelSTFT = i,
// pick F(n,K+i) and F(n,K-i); bin indices wrap modulo N. SPECorSM enables the
// doubling and switches the adder's second input between 0 and the
// accumulator register (the Real or Imag register of the architecture).
//
// The structure follows the architecture. This design's choices: the shift is
// a combinational doubling in the multiplier-adder path, the accumulator is
// AW bits wide so that no sum overflows, indices wrap around modulo N.
//
// Timing: 'sum' is combinational from the current inputs and the register;
// 'acc' loads 'sum' at the clock edge when wr_en is high.
module sm_subchannel
  import tfa_pkg::*;
#(
  parameter int unsigned N  = N_DEF,
  parameter int unsigned K  = 0,
  parameter int unsigned DW = DW_DEF,
  parameter int unsigned AW = AW_DEF
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic signed [DW-1:0]       f [N],        // F_Re or F_Im of all bins
  input  logic [$clog2(N/2)-1:0]     sel_stft,
  input  logic                       spec_or_sm,
  input  logic                       wr_en,
  output logic signed [AW-1:0]       sum,
  output logic signed [AW-1:0]       acc
);

  localparam int unsigned NH = N / 2;

  logic [DW-1:0] din_p [NH];
  logic [DW-1:0] din_m [NH];
  logic [DW-1:0] a_u, b_u;
  logic signed [2*DW-1:0] prod;
  logic signed [AW-1:0]   shifted;

  for (genvar i = 0; i < NH; i++) begin : g_in
    assign din_p[i] = f[(K + i) % N];
    assign din_m[i] = f[(K + N - i) % N];
  end

  mux_nhalf #(.NIN(NH), .W(DW)) u_mux_p (.din(din_p), .sel(sel_stft), .dout(a_u));
  mux_nhalf #(.NIN(NH), .W(DW)) u_mux_m (.din(din_m), .sel(sel_stft), .dout(b_u));

  always_comb begin
    prod    = signed'(a_u) * signed'(b_u);
    shifted = spec_or_sm ? (AW'(prod) <<< 1) : AW'(prod);
    sum     = (spec_or_sm ? acc : '0) + shifted;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     acc <= '0;
    else if (wr_en) acc <= sum;
  end

endmodule
