// fir2p_da_top: 24-tap two-parallel FIR filter built from the modified fast
// FIR algorithm (FFA) and LUT-less distributed-arithmetic sub-filters.
//
// Every clock with in_valid high takes one block of two input samples,
// x(2k) and x(2k+1), and one clock later delivers y(2k) and y(2k+1) of
//   y(n) = sum_{k=0}^{23} q(k) x(n-k),
// where q(k) are the quantized, symmetric coefficients of fir2p_pkg.
//
// Structure (modified FFA):
//   ffa_preadd      X0+X1, X0-X1                       (2 adders)
//   sym_subfilter   A = (H0+H1)(X0+X1), symmetric       (6 DA multipliers)
//   sym_subfilter   B = (H0-H1)(X0-X1), antisymmetric   (6 DA multipliers)
//   da_subfilter    C = H1 X1                           (12 DA multipliers)
//   ffa_postadd     Y0 = (A+B)/2 - C + z^-1 C, Y1 = (A-B)/2  (4 adders)
// Each DA multiplier is a shift-and-add network over the set bits of its
// constant. The three sub-filters are transposed direct-form delay lines.
//
// Interface: in_valid with x_in (in_pair_t: x0 = x(2k), x1 = x(2k+1));
// out_valid with y_out (out_pair_t: y0 = y(2k), y1 = y(2k+1)). A block is
// accepted on each rising clock edge with in_valid high; cycles with
// in_valid low leave the filter state untouched, so gaps in the input stream
// do not disturb the result. rst_n is active-low and asynchronous and
// clears the filter memory (all past samples read as zero).
// Timing: one block per clock, latency one clock (out_valid follows in_valid
// by one cycle). The valid/enable handshake, the reset and the output
// register are choices of this design.
module fir2p_da_top
  import fir2p_pkg::*;
#(
  parameter int IN_WIDTH  = IN_W,
  parameter int OUT_WIDTH = OUT_W,
  parameter int ACC_WIDTH = ACC_W
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  in_pair_t  x_in,
  output logic      out_valid,
  output out_pair_t y_out
);

  // The package types fix the port widths to IN_W/OUT_W.
  if (IN_WIDTH != IN_W || OUT_WIDTH != OUT_W) begin : g_bad_width
    $error("fir2p_da_top: port widths are fixed by fir2p_pkg");
  end

  // Largest internal magnitude: (IN_W+1)-bit pre-added input times the
  // sum of |q|, doubled for A+B; the true output is bounded by
  // 2^(IN_W-1) * sum|q| and must fit OUT_W.
  if ((longint'(1) << IN_WIDTH) * H_ABS_SUM >= (longint'(1) << (ACC_WIDTH - 1))) begin : g_acc_small
    $error("fir2p_da_top: ACC_WIDTH too small for the coefficients");
  end
  if ((longint'(1) << (IN_WIDTH - 1)) * H_ABS_SUM >= (longint'(1) << (OUT_WIDTH - 1))) begin : g_out_small
    $error("fir2p_da_top: OUT_WIDTH too small for the coefficients");
  end

  logic signed [IN_WIDTH:0]    x_sum, x_dif;
  logic signed [ACC_WIDTH-1:0] a, b, c;

  ffa_preadd #(.IN_W(IN_WIDTH)) u_pre (
    .x0 (x_in.x0),
    .x1 (x_in.x1),
    .sum(x_sum),
    .dif(x_dif)
  );

  sym_subfilter #(
    .IN_W  (IN_WIDTH + 1),
    .ACC_W (ACC_WIDTH),
    .TAPS  (SUB_TAPS),
    .COEF_W(COEF_W),
    .SYM   (SYM_EVEN),
    .COEFS (H_SUM)
  ) u_sub_sum (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (in_valid),
    .x    (x_sum),
    .y    (a)
  );

  sym_subfilter #(
    .IN_W  (IN_WIDTH + 1),
    .ACC_W (ACC_WIDTH),
    .TAPS  (SUB_TAPS),
    .COEF_W(COEF_W),
    .SYM   (SYM_ODD),
    .COEFS (H_DIF)
  ) u_sub_dif (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (in_valid),
    .x    (x_dif),
    .y    (b)
  );

  da_subfilter #(
    .IN_W  (IN_WIDTH),
    .ACC_W (ACC_WIDTH),
    .TAPS  (SUB_TAPS),
    .COEF_W(COEF_W),
    .COEFS (H_ODD)
  ) u_sub_odd (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (in_valid),
    .x    (x_in.x1),
    .y    (c)
  );

  ffa_postadd #(
    .ACC_W(ACC_WIDTH),
    .OUT_W(OUT_WIDTH)
  ) u_post (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (in_valid),
    .a    (a),
    .b    (b),
    .c    (c),
    .y0   (y_out.y0),
    .y1   (y_out.y1),
    .valid(out_valid)
  );

endmodule
