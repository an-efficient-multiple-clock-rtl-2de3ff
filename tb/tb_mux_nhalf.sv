// tb_mux_nhalf: checks the N/2-input multiplexor at 32 inputs of 16 bits and
// at 32 inputs of 1 bit (the SignDep multiplexor width). For several random
// input sets every select code is applied and the output is compared with
// the addressed input.
module tb_mux_nhalf;
  localparam int unsigned NIN = 32;

  logic [15:0] din [NIN];
  logic [0:0]  din1 [NIN];
  logic [4:0]  sel;
  logic [15:0] dout;
  logic [0:0]  dout1;
  int checks = 0, failures = 0;

  mux_nhalf #(.NIN(NIN), .W(16)) dut  (.din(din),  .sel(sel), .dout(dout));
  mux_nhalf #(.NIN(NIN), .W(1))  dut1 (.din(din1), .sel(sel), .dout(dout1));

  initial begin
    for (int rep = 0; rep < 20; rep++) begin
      for (int i = 0; i < NIN; i++) begin
        din[i]  = 16'($urandom);
        din1[i] = 1'($urandom);
      end
      for (int s = 0; s < NIN; s++) begin
        sel = 5'(s);
        #1;
        checks += 2;
        if (dout != din[s]) begin
          failures++;
          $display("FAIL: sel=%0d dout=%h expected %h", s, dout, din[s]);
        end
        if (dout1 != din1[s]) begin
          failures++;
          $display("FAIL: sel=%0d dout1=%b expected %b", s, dout1, din1[s]);
        end
      end
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
