// tb_sdsm_top: end-to-end test of the signal-dependent S-method processor at
// its default sizes (N = 64 bins, LMAX = 31).
//
// A stream of real samples (two components: a steady tone and a linear chirp,
// plus a little pseudo-random noise) is fed at the processor's own sampling
// strobe. An independent reference model in this file repeats the recursive
// STFT with the same fixed-point rounding, forms the flags
// x_k = |F|^2 > max|F|^2 / Q^2, and sums the S-method terms until the first
// step whose SignDep is 0 (none at all where x_k = 0). Every finished time instant is compared bin by bin
// with the sm_out registers. The model's STFT is also held against a
// directly computed DFT of the last N samples, within a small tolerance.
//
// Checked as well: the sampling strobe and the result strobe repeat every
// LMAX + 2 clocks, and the x_flags output in every step after step 2. The test switches to the
// spectrogram code for a stretch of instants and back. It counts the
// mechanisms of the design and fails if one never occurred: a window stopped
// early, a window reaching LMAX, SignDep rising again after a stop (ignored),
// a bin with x_k = 0 (pure spectrogram value), such a bin whose neighbours
// are both set (its window must still stay at zero), and both codes.
module tb_sdsm_top;
  import tfa_pkg::*;

  localparam int unsigned N    = N_DEF;
  localparam int unsigned LMAX = LMAX_DEF;
  localparam int unsigned XW   = XW_DEF;
  localparam int unsigned TWF  = TWF_DEF;
  localparam int unsigned AW   = AW_DEF;
  localparam int unsigned DW   = DW_DEF;
  localparam int unsigned Q    = Q_DEF;
  localparam int unsigned NINST = 200;
  localparam int unsigned PERIOD = LMAX + 2;

  logic                 clk = 1'b0;
  logic                 rst_n = 1'b0;
  tfd_code_e            tfd_code = TFD_SDSM;
  logic signed [XW-1:0] x_in = '0;
  logic                 sign_load, tfd_valid;
  logic signed [AW-1:0] sm_out [N];
  logic [N-1:0]         x_flags, sign_dep, win_open;
  ctrl_state_e          state;
  logic [2*DW:0]        spec_max, ref_level;

  sdsm_top dut (
    .clk(clk), .rst_n(rst_n), .tfd_code(tfd_code), .x_in(x_in),
    .sign_load(sign_load), .tfd_valid(tfd_valid), .sm_out(sm_out),
    .x_flags(x_flags), .state(state), .sign_dep(sign_dep),
    .win_open(win_open), .spec_max(spec_max), .ref_level(ref_level));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;

  // ---------------- reference model ----------------
  longint fr [N], fi [N];        // model STFT
  longint hist [N];              // last N samples, circular
  int     hptr = 0;
  longint all_x [$];             // every sample, for the DFT check
  bit     mx [N];                // model flags
  longint exp_sm [N];
  bit     have_exp = 0;
  longint tw_c [N], tw_s [N];

  // mechanism counters
  int n_stop_early = 0, n_full_window = 0, n_rerise = 0, n_spec_only_bins = 0;
  int n_mode_spec = 0, n_mode_sdsm = 0, n_noise_kept = 0;
  int n_dut_stop = 0, n_dut_rerise = 0;

  function automatic longint rnd_shift(longint v, int sh);
    return (v + (longint'(1) <<< (sh - 1))) >>> sh;
  endfunction

  function automatic longint wrap16(longint v);
    logic signed [DW-1:0] t;
    t = DW'(v);
    return longint'(t);
  endfunction

  task automatic model_ingest(input longint xs, input tfd_code_e code);
    longint d, sr, si, mag [N], mmax, r2, s;
    int i, kp, km;
    bit stopped;
    d = xs - hist[hptr];
    hist[hptr] = xs;
    hptr = (hptr + 1) % N;
    all_x.push_back(xs);
    for (int k = 0; k < N; k++) begin
      sr = fr[k] + d;
      si = fi[k];
      fr[k] = wrap16(rnd_shift(sr * tw_c[k] - si * tw_s[k], TWF));
      fi[k] = wrap16(rnd_shift(sr * tw_s[k] + si * tw_c[k], TWF));
    end
    mmax = 0;
    for (int k = 0; k < N; k++) begin
      mag[k] = fr[k] * fr[k] + fi[k] * fi[k];
      if (mag[k] > mmax) mmax = mag[k];
    end
    r2 = mmax / longint'(Q * Q);
    for (int k = 0; k < N; k++) mx[k] = mag[k] > r2;
    if (code == TFD_SDSM) n_mode_sdsm++; else n_mode_spec++;
    for (int k = 0; k < N; k++) begin
      s = fr[k] * fr[k] + fi[k] * fi[k];
      // a point without signal keeps its spectrogram value
      stopped = !mx[k];
      if (!mx[k]) n_spec_only_bins++;
      if (!mx[k] && mx[(k + 1) % N] && mx[(k + N - 1) % N] && code == TFD_SDSM)
        n_noise_kept++;
      if (code == TFD_SDSM) begin
        for (i = 1; i <= int'(LMAX); i++) begin
          kp = (k + i) % N;
          km = (k + N - i) % N;
          if (!(mx[kp] && mx[km])) begin
            if (!stopped) n_stop_early++;
            stopped = 1;
          end else if (stopped && mx[k]) begin
            n_rerise++;
          end
          if (!stopped) s += 2 * (fr[kp] * fr[km] + fi[kp] * fi[km]);
        end
        if (!stopped) n_full_window++;
      end
      exp_sm[k] = s;
    end
  endtask

  // Direct DFT of the last N samples, compared with the model STFT.
  task automatic dft_check();
    real re, im, ang, err, maxerr;
    int base;
    base = all_x.size() - int'(N);
    maxerr = 0.0;
    for (int k = 0; k < N; k++) begin
      re = 0.0; im = 0.0;
      for (int m = 0; m < N; m++) begin
        ang = -2.0 * PI * k * m / N;
        if (base + m >= 0) begin
          re += real'(all_x[base + m]) * $cos(ang);
          im += real'(all_x[base + m]) * $sin(ang);
        end
      end
      err = (re - real'(fr[k])) < 0 ? real'(fr[k]) - re : re - real'(fr[k]);
      if (err > maxerr) maxerr = err;
      err = (im - real'(fi[k])) < 0 ? real'(fi[k]) - im : im - real'(fi[k]);
      if (err > maxerr) maxerr = err;
    end
    checks++;
    if (maxerr > 16.0) begin
      failures++;
      $display("FAIL: STFT model differs from DFT by %f", maxerr);
    end
  endtask

  // ---------------- stimulus ----------------
  function automatic longint sample_at(int n);
    real v;
    v = 100.0 * $cos(2.0 * PI * 9.0 * n / N)
      + 90.0 * $cos(2.0 * PI * (3.0 * n + 0.045 * n * n) / N);
    return longint'($rtoi(v)) + longint'($urandom_range(6)) - 3;
  endfunction

  int n_inst = 0;          // samples taken
  int last_load = -1, last_valid = -1;

  always @(negedge clk) begin
    if (rst_n) begin
      cycle++;
      // result of the previous instant
      if (tfd_valid) begin
        checks++;
        if (!have_exp) begin
          failures++;
          $display("FAIL: tfd_valid before any instant was processed");
        end else begin
          for (int k = 0; k < N; k++) begin
            checks++;
            if (longint'(sm_out[k]) != exp_sm[k]) begin
              failures++;
              if (failures < 10)
                $display("FAIL: instant %0d bin %0d: sm=%0d expected %0d",
                         n_inst - 1, k, sm_out[k], exp_sm[k]);
            end
          end
        end
        if (last_valid >= 0) begin
          checks++;
          if (cycle - last_valid != int'(PERIOD)) begin
            failures++;
            $display("FAIL: result period %0d, expected %0d", cycle - last_valid, PERIOD);
          end
        end
        last_valid = cycle;
      end
      if (sign_load) begin
        if (last_load >= 0) begin
          checks++;
          if (cycle - last_load != int'(PERIOD)) begin
            failures++;
            $display("FAIL: sample period %0d, expected %0d", cycle - last_load, PERIOD);
          end
        end
        last_load = cycle;
        if (n_inst < int'(NINST)) begin
          // distribution code: spectrogram for instants 80..119
          tfd_code = (n_inst >= 80 && n_inst < 120) ? TFD_SPEC : TFD_SDSM;
          x_in = XW'(sample_at(n_inst));
          model_ingest(longint'(x_in), tfd_code);
          have_exp = 1;
          if (n_inst % 25 == 24) dft_check();
        end
        n_inst++;
      end
      // flags and observed SignDep behaviour
      if (state == ST_SM || state == ST_HOLD) begin
        for (int k = 0; k < N; k++) begin
          checks++;
          if (x_flags[k] != mx[k]) begin
            failures++;
            if (failures < 10) $display("FAIL: x_flags[%0d]=%0d expected %0d", k, x_flags[k], mx[k]);
          end
        end
      end
      if (state == ST_SM) begin
        for (int k = 0; k < N; k++) begin
          if (win_open[k] && !sign_dep[k]) n_dut_stop++;
          if (!win_open[k] && sign_dep[k]) n_dut_rerise++;
        end
      end
      if (state == ST_SPEC) begin
        checks++;
        if (longint'(ref_level) != longint'(spec_max) / (Q * Q)) begin
          failures++; $display("FAIL: ref_level %0d for spec_max %0d", ref_level, spec_max);
        end
      end
      if (n_inst > int'(NINST)) begin
        report_and_finish();
      end
    end
  end

  task automatic need(input string what, input int cnt);
    checks++;
    if (cnt == 0) begin
      failures++;
      $display("FAIL: mechanism never exercised: %s", what);
    end else begin
      $display("  %s: %0d", what, cnt);
    end
  endtask

  task automatic report_and_finish();
    need("window stopped before LMAX", n_stop_early);
    need("window reached LMAX", n_full_window);
    need("SignDep high again after a stop (ignored)", n_rerise);
    need("bin with x_k = 0 (spectrogram value)", n_spec_only_bins);
    need("x_k = 0 with both neighbours set (window kept at zero)", n_noise_kept);
    need("spectrogram code instants", n_mode_spec);
    need("S-method code instants", n_mode_sdsm);
    need("stops seen at the channel ports", n_dut_stop);
    need("re-rises seen at the channel ports", n_dut_rerise);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    for (int k = 0; k < N; k++) begin
      fr[k] = 0; fi[k] = 0; hist[k] = 0;
      tw_c[k] = longint'($rtoi($floor(16384.0 * $cos(2.0 * PI * k / N) + 0.5)));
      tw_s[k] = longint'($rtoi($floor(16384.0 * $sin(2.0 * PI * k / N) + 0.5)));
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
  end

  // watchdog
  initial begin
    repeat ((NINST + 4) * PERIOD + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
