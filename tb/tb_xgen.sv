// tb_xgen: checks the x_k flag circuit at N = 64. Random STFT vectors are
// applied (uniform values, vectors with a few strong bins over weak noise,
// extreme values -32768/32767, and the all-zero spectrum); the reference
// computes |F|^2, its maximum, R^2 = max / Q^2 and the flags independently.
// The flags must hold while x_load is low and update on an x_load clock.
module tb_xgen;
  import tfa_pkg::*;
  localparam int unsigned N  = N_DEF;
  localparam int unsigned DW = DW_DEF;
  localparam int unsigned Q  = Q_DEF;

  logic clk = 0, rst_n = 0, x_load = 0;
  logic signed [DW-1:0] f_re [N], f_im [N];
  logic [N-1:0]         x;
  logic [2*DW:0]        spec_max, ref_level;
  int checks = 0, failures = 0;
  int n_set = 0, n_clear = 0;

  always #5 clk = ~clk;

  xgen #(.N(N), .DW(DW), .Q(Q)) dut (.clk(clk), .rst_n(rst_n), .x_load(x_load), .f_re(f_re), .f_im(f_im), .x(x),
                                     .spec_max(spec_max), .ref_level(ref_level));

  task automatic check_vec();
    longint m [N], mmax, r2;
    logic [N-1:0] x_before;
    #1;
    x_before = x;
    mmax = 0;
    for (int k = 0; k < N; k++) begin
      m[k] = longint'(f_re[k]) * longint'(f_re[k]) + longint'(f_im[k]) * longint'(f_im[k]);
      if (m[k] > mmax) mmax = m[k];
    end
    r2 = mmax / (Q * Q);
    checks += 2;
    if (longint'(spec_max) != mmax) begin
      failures++; $display("FAIL: spec_max %0d expected %0d", spec_max, mmax);
    end
    if (longint'(ref_level) != r2) begin
      failures++; $display("FAIL: ref_level %0d expected %0d", ref_level, r2);
    end
    // flags hold until x_load, then take the new values
    checks++;
    if (x != x_before) begin
      failures++; $display("FAIL: flags changed without x_load");
    end
    x_load = 1;
    @(negedge clk);
    x_load = 0;
    for (int k = 0; k < N; k++) begin
      checks++;
      if (x[k] != (m[k] > r2)) begin
        failures++; $display("FAIL: x[%0d]=%0d for |F|^2=%0d R^2=%0d", k, x[k], m[k], r2);
      end
      if (x[k]) n_set++; else n_clear++;
    end
  endtask

  initial begin
    for (int k = 0; k < N; k++) begin f_re[k] = '0; f_im[k] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 200; rep++) begin
      for (int k = 0; k < N; k++) begin
        case (rep % 4)
          0: begin f_re[k] = DW'($urandom); f_im[k] = DW'($urandom); end
          1: begin
               f_re[k] = DW'(int'($urandom_range(400)) - 200);
               f_im[k] = DW'(int'($urandom_range(400)) - 200);
               if ($urandom_range(7) == 0) begin
                 f_re[k] = DW'(int'($urandom_range(4000)) - 2000);
               end
             end
          2: begin
               f_re[k] = ($urandom_range(1) != 0) ? 16'sh8000 : 16'sh7fff;
               f_im[k] = ($urandom_range(1) != 0) ? 16'sh8000 : DW'(int'($urandom_range(20)));
             end
          default: begin f_re[k] = '0; f_im[k] = '0; end
        endcase
      end
      check_vec();
    end
    checks++;
    if (n_set == 0 || n_clear == 0) begin
      failures++; $display("FAIL: flags never both set and clear");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
