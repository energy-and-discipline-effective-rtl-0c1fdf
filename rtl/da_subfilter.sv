// da_subfilter: general TAPS-tap sub-filter in transposed direct form with
// multiplier-free (shift-and-add) products.
//
// Used for the H1 sub-filter (odd taps h(1), h(3), ... h(23)), whose
// coefficients have no symmetry of their own, so every tap has its own
// da_const_mult.
//
// Transposed form: y(n) = c(0)x(n) + s1, and on every enabled clock
//   s(i) <= c(i)x(n) + s(i+1),   s(TAPS-1) <= c(TAPS-1)x(n).
//
// The reference design gives this sub-filter's role, not its inside; using
// the same transposed form and shift-and-add products as the symmetric
// sub-filters is a choice of this design, as are the enable and the reset.
//
// Interface: x (IN_W bits) and en (sample strobe) in, y (ACC_W bits) out;
// clk, active-low asynchronous rst_n clears the delay line.
// Timing: y is combinational in x and the state (zero latency); the state
// advances only on clock edges with en high.
module da_subfilter #(
  parameter int        IN_W   = 8,
  parameter int        ACC_W  = 26,
  parameter int        TAPS   = 12,
  parameter int        COEF_W = 16,
  parameter int signed COEFS [TAPS] = fir2p_pkg::H_ODD
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic signed [IN_W-1:0]  x,
  output logic signed [ACC_W-1:0] y
);

  logic signed [ACC_W-1:0] tap [TAPS];

  for (genvar i = 0; i < TAPS; i++) begin : g_mult
    da_const_mult #(
      .IN_W  (IN_W),
      .COEF  (COEFS[i]),
      .COEF_W(COEF_W),
      .OUT_W (ACC_W)
    ) u_mult (
      .x(x),
      .p(tap[i])
    );
  end

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
