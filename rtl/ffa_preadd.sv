// ffa_preadd: pre-processing adders of the two-parallel fast FIR structure.
//
// From one block of two input samples, X0 = x(2k) and X1 = x(2k+1), it forms
// the two sub-filter inputs X0+X1 (feeding the H0+H1 sub-filter) and X0-X1
// (feeding the H0-H1 sub-filter). X1 itself feeds the H1 sub-filter
// directly. The two results are one bit wider than the inputs, so nothing
// overflows.
//
// The two adders follow the reference design; the widening by one bit is a
// choice of this design.
//
// Interface: x0, x1 (IN_W-bit two's complement) in; sum, dif (IN_W+1 bits) out.
// Timing: purely combinational.
module ffa_preadd #(
  parameter int IN_W = 8
) (
  input  logic signed [IN_W-1:0] x0,
  input  logic signed [IN_W-1:0] x1,
  output logic signed [IN_W:0]   sum,
  output logic signed [IN_W:0]   dif
);

  always_comb begin
    sum = (IN_W+1)'(x0) + (IN_W+1)'(x1);
    dif = (IN_W+1)'(x0) - (IN_W+1)'(x1);
  end

endmodule
