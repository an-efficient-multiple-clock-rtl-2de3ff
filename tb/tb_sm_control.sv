// tb_sm_control: checks the Control FSM at its defaults (N = 64, LMAX = 31)
// over ten time instants with the S-method code and the spectrogram code
// alternating. Every clock the outputs are compared with the expected step
// table: STFT step (SignLoad), spectrogram step (SMWriteCond and x_load), LMAX
// steps with SelSTFT = i, SPECorSM = 1 and SMWriteCond = 1 for the S-method
// code, or LMAX idle steps for the spectrogram code. Also checked: one
// instant lasts LMAX + 2 clocks, and tfd_valid only appears once an instant
// has been completed.
module tb_sm_control;
  import tfa_pkg::*;
  localparam int unsigned N    = N_DEF;
  localparam int unsigned LMAX = LMAX_DEF;

  logic clk = 0, rst_n = 0;
  tfd_code_e code = TFD_SDSM;
  ctrl_state_e state;
  logic [$clog2(N/2)-1:0] sel;
  logic spec_or_sm, sign_load, wcond, xload, valid;
  int checks = 0, failures = 0;

  sm_control #(.N(N), .LMAX(LMAX)) dut (
    .clk(clk), .rst_n(rst_n), .tfd_code(code), .state(state), .sel_stft(sel),
    .spec_or_sm(spec_or_sm), .sign_load(sign_load), .sm_write_cond(wcond),
    .x_load(xload), .tfd_valid(valid));

  always #5 clk = ~clk;

  task automatic expect_out(input string what, input int esel, input bit ess,
                            input bit esl, input bit ew, input bit ev);
    checks++;
    if (int'(sel) != esel || spec_or_sm != ess || sign_load != esl ||
        wcond != ew || valid != ev || xload != (state == ST_SPEC)) begin
      failures++;
      $display("FAIL: %s: sel=%0d specorsm=%0d signload=%0d wcond=%0d valid=%0d, expected %0d %0d %0d %0d %0d",
               what, sel, spec_or_sm, sign_load, wcond, valid, esel, ess, esl, ew, ev);
    end
  endtask

  initial begin
    int cyc;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 10; n++) begin
      code = (n % 3 == 2) ? TFD_SPEC : TFD_SDSM;
      cyc = 0;
      expect_out("STFT step", 0, 0, 1, 0, n > 0);
      @(negedge clk); cyc++;
      expect_out("SPEC step", 0, 0, 0, 1, 0);
      for (int i = 1; i <= int'(LMAX); i++) begin
        @(negedge clk); cyc++;
        if (code == TFD_SDSM) expect_out($sformatf("SM step %0d", i), i, 1, 0, 1, 0);
        else                  expect_out($sformatf("hold step %0d", i), 0, 0, 0, 0, 0);
      end
      @(negedge clk); cyc++;
      checks++;
      if (cyc != int'(LMAX) + 2 || !sign_load) begin
        failures++; $display("FAIL: instant %0d did not last LMAX+2 clocks", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
