// ffa_postadd: post-processing of the two-parallel fast FIR structure.
//
// Takes the three sub-filter outputs of one block,
//   A = (H0+H1)(X0+X1),  B = (H0-H1)(X0-X1),  C = H1 X1,
// and forms
//   Y0 = (A+B)/2 - C + C(k-1)     (z^-2 at the sample rate is one block)
//   Y1 = (A-B)/2
// with four adders (A+B, A-B, -C, +C(k-1)), a halving shift and one
// block-delay register for C. With integer coefficients derived from the
// quantized taps, A+B = 2(H0X0 + H1X1) and A-B = 2(H0X1 + H1X0) are even,
// so the arithmetic shift right by one is exact.
//
// The equations and the four adders follow the reference design; building
// the 1/2 as a shift, the output register and the enable are choices of this
// design.
//
// Interface: a, b, c (ACC_W bits) and en in; y0, y1 (OUT_W bits) and valid
// out. Outputs are truncated to OUT_W bits, which holds every output of a
// filter whose ACC_W/OUT_W have been sized for it.
// Timing: y0, y1 and valid are registered: one clock after an enabled
// input block. The C delay register advances only when en is high;
// asynchronous active-low reset clears all registers.
module ffa_postadd #(
  parameter int ACC_W = 26,
  parameter int OUT_W = 24
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic signed [ACC_W-1:0] a,
  input  logic signed [ACC_W-1:0] b,
  input  logic signed [ACC_W-1:0] c,
  output logic signed [OUT_W-1:0] y0,
  output logic signed [OUT_W-1:0] y1,
  output logic                    valid
);

  logic signed [ACC_W-1:0] c_d;        // H1X1 of the previous block
  logic signed [ACC_W:0]   apb, amb;   // A+B, A-B
  logic signed [ACC_W+1:0] y0_full;
  logic signed [ACC_W:0]   y1_full;

  always_comb begin
    apb     = (ACC_W+1)'(a) + (ACC_W+1)'(b);
    amb     = (ACC_W+1)'(a) - (ACC_W+1)'(b);
    y0_full = (ACC_W+2)'(apb >>> 1) - (ACC_W+2)'(c) + (ACC_W+2)'(c_d);
    y1_full = amb >>> 1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_d   <= '0;
      y0    <= '0;
      y1    <= '0;
      valid <= 1'b0;
    end else begin
      valid <= en;
      if (en) begin
        c_d <= c;
        y0  <= OUT_W'(y0_full);
        y1  <= OUT_W'(y1_full);
      end
    end
  end

endmodule
