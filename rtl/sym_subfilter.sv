// sym_subfilter: TAPS-tap sub-filter with symmetric or antisymmetric
// coefficients, in transposed direct form, with multiplier-free products.
//
// Only the first ceil(TAPS/2) coefficients get a constant multiplier
// (da_const_mult, shift-and-add). Each product drives two taps of the
// transposed delay line: tap i and tap TAPS-1-i. For SYM = SYM_ODD
// (antisymmetric, c(TAPS-1-i) = -c(i)) the mirrored tap subtracts the product
// instead of adding it. This halves the multipliers of the sub-filter.
//
// Transposed form: y(n) = c(0)x(n) + s1, and on every enabled clock
//   s(i) <= c(i)x(n) + s(i+1),   s(TAPS-1) <= c(TAPS-1)x(n).
// The symmetry of COEFS is checked at elaboration.
//
// The transposed form and the sharing of one product between mirrored taps
// follow the reference design; the enable, the reset and the zero-latency
// output are choices of this design.
//
// Interface: x (IN_W bits) and en (sample strobe) in, y (ACC_W bits) out;
// clk, active-low asynchronous rst_n clears the delay line.
// Timing: y is combinational in x and the state (zero latency); the state
// advances only on clock edges with en high. ACC_W must hold the largest
// output; this is the instantiating design's responsibility.
module sym_subfilter #(
  parameter int        IN_W   = 9,
  parameter int        ACC_W  = 26,
  parameter int        TAPS   = 12,
  parameter int        COEF_W = 16,
  parameter fir2p_pkg::symmetry_e SYM    = fir2p_pkg::SYM_EVEN,
  parameter int signed COEFS [TAPS] = fir2p_pkg::H_SUM
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic signed [IN_W-1:0]  x,
  output logic signed [ACC_W-1:0] y
);

  localparam int NPROD = (TAPS + 1) / 2;

  // Elaboration check of the coefficient symmetry.
  for (genvar i = 0; i < TAPS; i++) begin : g_chk
    if ((SYM == fir2p_pkg::SYM_EVEN && COEFS[TAPS-1-i] != COEFS[i]) ||
        (SYM == fir2p_pkg::SYM_ODD  && COEFS[TAPS-1-i] != -COEFS[i])) begin : g_bad
      $error("sym_subfilter: COEFS do not have the requested symmetry");
    end
  end

  // Shared products, one per coefficient pair.
  logic signed [ACC_W-1:0] prod [NPROD];

  for (genvar j = 0; j < NPROD; j++) begin : g_mult
    da_const_mult #(
      .IN_W  (IN_W),
      .COEF  (COEFS[j]),
      .COEF_W(COEF_W),
      .OUT_W (ACC_W)
    ) u_mult (
      .x(x),
      .p(prod[j])
    );
  end

  // Contribution of each tap: the shared product, negated on the mirrored
  // half of an antisymmetric filter.
  logic signed [ACC_W-1:0] tap [TAPS];

  for (genvar i = 0; i < TAPS; i++) begin : g_tap
    if (i < NPROD) begin : g_direct
      assign tap[i] = prod[i];
    end else if (SYM == fir2p_pkg::SYM_ODD) begin : g_neg
      assign tap[i] = -prod[TAPS-1-i];
    end else begin : g_pos
      assign tap[i] = prod[TAPS-1-i];
    end
  end

  // Transposed delay line.
  logic signed [ACC_W-1:0] s [1:TAPS-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i < TAPS; i++) s[i] <= '0;
    end else if (en) begin
      for (int i = 1; i < TAPS - 1; i++) s[i] <= tap[i] + s[i+1];
      s[TAPS-1] <= tap[TAPS-1];
    end
  end

  assign y = tap[0] + s[1];

endmodule
