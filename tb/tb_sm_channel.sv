// tb_sm_channel: checks one complete SM channel at N = 16, LMAX = 7, for bins
// K = 2 and K = 9. Each round loads random STFT values and random x flags
// (biased so that windows of every length occur), then drives the control
// sequence of one time instant: spectrogram step, steps i = 1..7, and a
// final idle step. SignDep is compared with x_{K+i} & x_{K-i} (forced to 1 at
// i = 0) and SMStore with a model that adds terms until the first SignDep of
// 0 and ignores SignDep afterwards; where x_K = 0 it keeps the spectrogram
// value. Rounds with SMWriteCond low in the SM
// steps (spectrogram code) are mixed in.
module tb_sm_channel;
  import tfa_pkg::*;
  localparam int unsigned N    = 16;
  localparam int unsigned LMAX = 7;
  localparam int unsigned DW   = DW_DEF;
  localparam int unsigned AW   = AW_DEF;
  localparam int KS [2] = '{2, 9};

  logic clk = 0, rst_n = 0;
  logic signed [DW-1:0] f_re [N], f_im [N];
  logic [N-1:0] x = '0;
  logic [2:0] sel = '0;
  logic spec_or_sm = 0, wcond = 0;
  logic [1:0] sign_dep, win_open;
  logic signed [AW-1:0] sm [2];
  int checks = 0, failures = 0;
  int n_stop = 0, n_full = 0, n_rerise = 0, n_nosig = 0;

  for (genvar c = 0; c < 2; c++) begin : g_dut
    sm_channel #(.N(N), .K(KS[c]), .DW(DW), .AW(AW)) dut (
      .clk(clk), .rst_n(rst_n), .f_re(f_re), .f_im(f_im), .x(x),
      .sel_stft(sel), .spec_or_sm(spec_or_sm), .sm_write_cond(wcond),
      .sign_dep(sign_dep[c]), .win_open(win_open[c]), .sm_store(sm[c]));
  end

  always #5 clk = ~clk;

  function automatic longint prod(int a, int b);
    return longint'(f_re[a]) * longint'(f_re[b]) + longint'(f_im[a]) * longint'(f_im[b]);
  endfunction

  initial begin
    longint e [2];
    bit open [2];
    bit spec_code, dep;
    int kp, km;
    e = '{0, 0};
    for (int k = 0; k < N; k++) begin f_re[k] = '0; f_im[k] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 300; r++) begin
      spec_code = ($urandom_range(5) == 0);
      for (int k = 0; k < N; k++) begin
        f_re[k] = DW'($urandom);
        f_im[k] = DW'($urandom);
        x[k] = ($urandom_range(9) != 0);
      end
      for (int i = 0; i <= int'(LMAX); i++) begin
        sel = 3'(i);
        spec_or_sm = (i != 0);
        wcond = (i == 0) || !spec_code;
        #1;
        for (int c = 0; c < 2; c++) begin
          kp = (KS[c] + i) % N;
          km = (KS[c] + N - i) % N;
          dep = (i == 0) ? 1'b1 : (x[kp] & x[km]);
          checks++;
          if (sign_dep[c] != dep) begin
            failures++; $display("FAIL: round %0d step %0d ch %0d SignDep %0d expected %0d",
                                 r, i, c, sign_dep[c], dep);
          end
          if (wcond) begin
            if (i == 0) begin
              e[c] = prod(KS[c], KS[c]);
              open[c] = 1;
            end else if (open[c] && dep && x[KS[c]]) begin
              e[c] += 2 * prod(kp, km);
              if (i == int'(LMAX)) n_full++;
            end else if (open[c]) begin
              open[c] = 0;
              if (x[KS[c]]) n_stop++; else n_nosig++;
            end else if (dep) begin
              n_rerise++;
            end
          end
        end
        @(negedge clk);
        for (int c = 0; c < 2; c++) begin
          checks++;
          if (longint'(sm[c]) != e[c]) begin
            failures++; $display("FAIL: round %0d step %0d ch %0d SMStore %0d expected %0d",
                                 r, i, c, sm[c], e[c]);
          end
        end
      end
      wcond = 0; spec_or_sm = 0; sel = '0;
      @(negedge clk);
      for (int c = 0; c < 2; c++) begin
        checks++;
        if (longint'(sm[c]) != e[c]) begin
          failures++; $display("FAIL: round %0d hold ch %0d SMStore changed", r, c);
        end
      end
    end
    checks++;
    if (n_stop == 0 || n_full == 0 || n_rerise == 0 || n_nosig == 0) begin
      failures++; $display("FAIL: stop %0d full %0d rerise %0d nosig %0d",
                           n_stop, n_full, n_rerise, n_nosig);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
