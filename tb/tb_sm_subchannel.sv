// tb_sm_subchannel: checks one sub-channel at N = 16 for bins K = 0 and
// K = 13 (so that k+i and k-i wrap around). Each round loads random STFT
// parts, runs the spectrogram step (SPECorSM = 0) and then steps i = 1..7
// with SPECorSM = 1 and a random write enable. The accumulator is compared
// after every step with acc = F(K)^2 + sum of 2*F(K+i)*F(K-i) over the
// written steps, and the combinational sum output is checked in every step.
module tb_sm_subchannel;
  import tfa_pkg::*;
  localparam int unsigned N  = 16;
  localparam int unsigned DW = DW_DEF;
  localparam int unsigned AW = AW_DEF;

  logic clk = 0, rst_n = 0;
  logic signed [DW-1:0] f [N];
  logic [2:0] sel = '0;
  logic spec_or_sm = 0, wr_en = 0;
  logic signed [AW-1:0] sum0, acc0, sum1, acc1;
  int checks = 0, failures = 0;

  sm_subchannel #(.N(N), .K(0),  .DW(DW), .AW(AW)) dut0 (
    .clk(clk), .rst_n(rst_n), .f(f), .sel_stft(sel), .spec_or_sm(spec_or_sm),
    .wr_en(wr_en), .sum(sum0), .acc(acc0));
  sm_subchannel #(.N(N), .K(13), .DW(DW), .AW(AW)) dut1 (
    .clk(clk), .rst_n(rst_n), .f(f), .sel_stft(sel), .spec_or_sm(spec_or_sm),
    .wr_en(wr_en), .sum(sum1), .acc(acc1));

  always #5 clk = ~clk;

  longint e0, e1;

  function automatic longint term(int k, int i);
    longint a, b;
    a = longint'(f[(k + i) % N]);
    b = longint'(f[(k + N - i) % N]);
    return (i == 0) ? a * b : 2 * a * b;
  endfunction

  task automatic step(input int i, input bit we);
    longint s0, s1;
    sel = 3'(i);
    spec_or_sm = (i != 0);
    wr_en = we;
    #1;
    s0 = ((i == 0) ? 0 : e0) + term(0, i);
    s1 = ((i == 0) ? 0 : e1) + term(13, i);
    checks += 2;
    if (longint'(sum0) != s0 || longint'(sum1) != s1) begin
      failures++;
      $display("FAIL: step %0d sum (%0d,%0d) expected (%0d,%0d)", i, sum0, sum1, s0, s1);
    end
    @(negedge clk);
    if (we) begin e0 = s0; e1 = s1; end
    if (longint'(acc0) != e0 || longint'(acc1) != e1) begin
      failures++;
      $display("FAIL: step %0d acc (%0d,%0d) expected (%0d,%0d)", i, acc0, acc1, e0, e1);
    end
  endtask

  initial begin
    e0 = 0; e1 = 0;
    for (int k = 0; k < N; k++) f[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 100; r++) begin
      for (int k = 0; k < N; k++) f[k] = DW'($urandom);
      step(0, 1'b1);
      for (int i = 1; i < 8; i++) step(i, ($urandom_range(3) != 0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
