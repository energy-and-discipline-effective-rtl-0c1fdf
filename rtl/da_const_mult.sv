// da_const_mult: multiplier-free product of a sample and a constant
// coefficient (LUT-less distributed arithmetic).
//
// Since the coefficient is known at design time, the positions of its one
// bits are known too, and the product is the sum of the sample shifted left
// by each of those positions: for a coefficient 0b1010, p = (x << 3) +
// (x << 1). No multiplier and no look-up table are built; synthesis keeps
// one adder per set bit beyond the first. A negative coefficient is handled
// as its magnitude followed by a negation, which costs one more adder
// (a design choice; the reference describes positive bit patterns only).
//
// Interface: x (IN_W-bit two's complement) in, p (OUT_W-bit) out.
// Timing: purely combinational, no clock.
module da_const_mult #(
  parameter int IN_W   = 9,
  parameter int COEF   = 4508,   // integer coefficient q, scaled by 2^COEF_FRAC
  parameter int COEF_W = 16,     // magnitude bits of COEF that are scanned
  parameter int OUT_W  = 26
) (
  input  logic signed [IN_W-1:0]  x,
  output logic signed [OUT_W-1:0] p
);

  localparam logic              NEG = (COEF < 0);
  localparam logic [COEF_W-1:0] MAG = COEF_W'(NEG ? -COEF : COEF);

  if ((NEG ? -COEF : COEF) >= (1 << COEF_W)) begin : g_coef_too_wide
    $error("da_const_mult: |COEF| does not fit in COEF_W bits");
  end

  logic signed [OUT_W-1:0] x_ext;
  logic signed [OUT_W-1:0] mag_sum;

  assign x_ext = OUT_W'(x);

  // Shift-and-add over the set bits of |COEF|.
  always_comb begin
    mag_sum = '0;
    for (int b = 0; b < COEF_W; b++) begin
      if (MAG[b]) mag_sum = mag_sum + (x_ext <<< b);
    end
  end

  assign p = NEG ? -mag_sum : mag_sum;

endmodule
