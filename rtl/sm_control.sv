// sm_control: the Control logic, a Moore finite state machine that walks the
// processor through the steps of one time instant, one clock per step:
//
//   ST_STFT            SignLoad = 1: a new sample enters, the STFT block
//                      updates all bins and the x_i flags settle.
//   ST_SPEC            SelSTFT = 0, SPECorSM = 0, SMWriteCond = 1: spectrogram
//                      term F^2 (SignDep is forced to 1 by the channels).
//   ST_SM, i=1..LMAX   SelSTFT = i, SPECorSM = 1, SMWriteCond = 1: the i-th
//                      term 2*F(k+i)*F(k-i), kept by a channel only while its
//                      SignDep = x_{k+i} & x_{k-i} is 1.
//   ST_HOLD            (spectrogram code) nothing is written for LMAX steps.
//
// Every time instant therefore takes LMAX + 2 clock cycles whatever the
// signal, and the sample rate is one sample per LMAX + 2 cycles. The step
// sequence, the control signals and their meaning follow the architecture;
// the HOLD state for the spectrogram code, the step counter encoding, the
// x_load strobe (flag register load at the end of the spectrogram step) and
// the tfd_valid output are this design's choices. All outputs are decoded from
// the state and the step counter only (Moore); outputs not named in a state
// are 0.
//
// tfd_valid is 1 during ST_STFT once a time instant has been completed: the
// channels' SMStore registers then hold the finished distribution of the
// previous instant (they keep it until the end of the next ST_SPEC).
// tfd_code is read when leaving ST_SPEC.
//
// The concurrent assertions at the end use rst_n in 'disable iff'; lint tools
// may therefore report rst_n as used both as an asynchronous reset and as a
// synchronous signal. The synthesised logic uses it only as the reset.
module sm_control
  import tfa_pkg::*;
#(
  parameter int unsigned N    = N_DEF,
  parameter int unsigned LMAX = LMAX_DEF
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  tfd_code_e              tfd_code,
  output ctrl_state_e            state,
  output logic [$clog2(N/2)-1:0] sel_stft,
  output logic                   spec_or_sm,
  output logic                   sign_load,
  output logic                   sm_write_cond,
  output logic                   x_load,
  output logic                   tfd_valid
);

  localparam int unsigned SELW = $clog2(N / 2);

  if (LMAX > N / 2 - 1) begin : g_bad_lmax
    $error("LMAX must not exceed N/2-1, the last input of the N/2-input multiplexors");
  end

  logic [SELW-1:0] step;
  logic            have_result;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= ST_STFT;
      step        <= '0;
      have_result <= 1'b0;
    end else begin
      unique case (state)
        ST_STFT: begin
          state <= ST_SPEC;
          step  <= '0;
        end
        ST_SPEC: begin
          step <= SELW'(1);
          if (LMAX == 0)                state <= ST_STFT;
          else if (tfd_code == TFD_SDSM) state <= ST_SM;
          else                          state <= ST_HOLD;
          if (LMAX == 0) have_result <= 1'b1;
        end
        ST_SM, ST_HOLD: begin
          if (step == SELW'(LMAX)) begin
            state       <= ST_STFT;
            have_result <= 1'b1;
          end
          step <= step + 1'b1;
        end
        default: state <= ST_STFT;
      endcase
    end
  end

  // A step either loads a sample or writes results, never both, and the
  // step index never passes LMAX.
  a_load_xor_write: assert property (@(posedge clk) disable iff (!rst_n)
    !(sign_load && sm_write_cond));
  a_step_range: assert property (@(posedge clk) disable iff (!rst_n)
    int'(sel_stft) <= int'(LMAX));
  a_load_period: assert property (@(posedge clk) disable iff (!rst_n)
    sign_load |=> !sign_load [*LMAX+1] ##1 sign_load);

  always_comb begin
    sel_stft      = '0;
    spec_or_sm    = 1'b0;
    sign_load     = 1'b0;
    sm_write_cond = 1'b0;
    x_load        = 1'b0;
    tfd_valid     = 1'b0;
    unique case (state)
      ST_STFT: begin
        sign_load = 1'b1;
        tfd_valid = have_result;
      end
      ST_SPEC: begin
        sm_write_cond = 1'b1;
        x_load        = 1'b1;
      end
      ST_SM: begin
        sel_stft      = step;
        spec_or_sm    = 1'b1;
        sm_write_cond = 1'b1;
      end
      ST_HOLD: ;
      default: ;
    endcase
  end

endmodule
