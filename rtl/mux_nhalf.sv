// mux_nhalf: an N/2-input multiplexor steered by the (m-1)-bit SelSTFT code.
//
// Each SM sub-channel uses two of them to pick F(n,k+i) and F(n,k-i) for the
// i-th step, and each channel two more (one bit wide) to pick x_{+i} and
// x_{-i} for the SignDep signal. Input i is passed to the output when
// sel == i. The count and the select code follow the architecture; the
// element width W is a parameter.
//
// Timing: combinational.
module mux_nhalf #(
  parameter int unsigned NIN = 32,
  parameter int unsigned W   = 16
) (
  input  logic [W-1:0]             din [NIN],
  input  logic [$clog2(NIN)-1:0]   sel,
  output logic [W-1:0]             dout
);

  assign dout = din[sel];

endmodule
