// tb_stft_recursive: checks the STFT block at its default size (N = 64).
// Random samples are loaded with random gaps between sign_load pulses. After
// every load all N bins are compared with a bit-exact model of the
// recursion (same twiddle rounding and product rounding), and every 16 loads
// the model is compared with a directly computed DFT of the last N samples,
// with a small tolerance for accumulated rounding. Bins must not change
// while sign_load is low.
module tb_stft_recursive;
  import tfa_pkg::*;
  localparam int unsigned N   = N_DEF;
  localparam int unsigned DW  = DW_DEF;
  localparam int unsigned XW  = XW_DEF;
  localparam int unsigned TWF = TWF_DEF;

  logic clk = 0, rst_n = 0, sign_load = 0;
  logic signed [XW-1:0] x_in = '0;
  logic signed [DW-1:0] f_re [N], f_im [N];
  int checks = 0, failures = 0;

  stft_recursive #(.N(N), .DW(DW), .XW(XW), .TWF(TWF)) dut (
    .clk(clk), .rst_n(rst_n), .sign_load(sign_load), .x_in(x_in),
    .f_re(f_re), .f_im(f_im));

  always #5 clk = ~clk;

  longint fr [N], fi [N], hist [N], tc [N], ts [N];
  longint xs [$];
  int hp = 0;

  function automatic longint wrap(longint v);
    logic signed [DW-1:0] t;
    t = DW'(v);
    return longint'(t);
  endfunction

  task automatic model(input longint x);
    longint d, sr, si;
    d = x - hist[hp];
    hist[hp] = x;
    hp = (hp + 1) % N;
    xs.push_back(x);
    for (int k = 0; k < N; k++) begin
      sr = fr[k] + d;
      si = fi[k];
      fr[k] = wrap((sr * tc[k] - si * ts[k] + (1 <<< (TWF - 1))) >>> TWF);
      fi[k] = wrap((sr * ts[k] + si * tc[k] + (1 <<< (TWF - 1))) >>> TWF);
    end
  endtask

  task automatic compare(input string when);
    for (int k = 0; k < N; k++) begin
      checks++;
      if (longint'(f_re[k]) != fr[k] || longint'(f_im[k]) != fi[k]) begin
        failures++;
        if (failures < 10)
          $display("FAIL (%s): bin %0d = (%0d,%0d) expected (%0d,%0d)",
                   when, k, f_re[k], f_im[k], fr[k], fi[k]);
      end
    end
  endtask

  task automatic dft_compare();
    real re, im, e, emax;
    int base;
    base = xs.size() - int'(N);
    emax = 0.0;
    for (int k = 0; k < N; k++) begin
      re = 0.0; im = 0.0;
      for (int m = 0; m < N; m++) begin
        if (base + m >= 0) begin
          re += real'(xs[base + m]) * $cos(-2.0 * PI * k * m / N);
          im += real'(xs[base + m]) * $sin(-2.0 * PI * k * m / N);
        end
      end
      e = re - real'(f_re[k]); if (e < 0) e = -e; if (e > emax) emax = e;
      e = im - real'(f_im[k]); if (e < 0) e = -e; if (e > emax) emax = e;
    end
    checks++;
    if (emax > 16.0) begin
      failures++; $display("FAIL: STFT differs from DFT by %f", emax);
    end
  endtask

  initial begin
    for (int k = 0; k < N; k++) begin
      fr[k] = 0; fi[k] = 0; hist[k] = 0;
      tc[k] = longint'($rtoi($floor((2.0 ** TWF) * $cos(2.0 * PI * k / N) + 0.5)));
      ts[k] = longint'($rtoi($floor((2.0 ** TWF) * $sin(2.0 * PI * k / N) + 0.5)));
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      x_in = XW'(int'($urandom_range(2 ** XW - 1)) - int'(2 ** (XW - 1)));
      if (n % 50 == 49) x_in = XW'(-(2 ** (XW - 1)));
      sign_load = 1;
      model(longint'(x_in));
      @(negedge clk);
      sign_load = 0;
      compare("after load");
      repeat ($urandom_range(2)) @(negedge clk);
      compare("idle");
      if (n % 16 == 15) dft_compare();
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
