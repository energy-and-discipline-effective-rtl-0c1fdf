// fir2p_mult_ref: behavioural reference of the same two-parallel filter
// built the conventional way, with ordinary multipliers.
//
// It evaluates the modified fast-FIR equations
//   Y0 = 1/2[(H0+H1)(X0+X1) + (H0-H1)(X0-X1)] - H1X1 + z^-2 H1X1
//   Y1 = 1/2[(H0+H1)(X0+X1) - (H0-H1)(X0-X1)]
// directly on stored input histories with '*' products, so it shares no
// structure with the shift-and-add, transposed-form implementation. It is a
// simulation model for testbenches only. Interface and timing match
// fir2p_da_top: one block per enabled clock, outputs one clock later.
module fir2p_mult_ref #(
  parameter int M = 12   // taps per sub-filter
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  fir2p_pkg::in_pair_t      x_in,
  output logic                     out_valid,
  output fir2p_pkg::out_pair_t     y_out
);

  int signed hx0 [M];   // past X0 samples, hx0[0] = current block
  int signed hx1 [M];
  longint    c_prev;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      foreach (hx0[i]) begin hx0[i] = 0; hx1[i] = 0; end
      c_prev    = 0;
      out_valid <= 1'b0;
      y_out     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        longint fa, fb, fc;
        for (int i = M - 1; i > 0; i--) begin
          hx0[i] = hx0[i-1];
          hx1[i] = hx1[i-1];
        end
        hx0[0] = int'(x_in.x0);
        hx1[0] = int'(x_in.x1);
        fa = 0; fb = 0; fc = 0;
        for (int i = 0; i < M; i++) begin
          longint he, ho, xe, xo;
          he = longint'(fir2p_pkg::H_Q[2*i]);
          ho = longint'(fir2p_pkg::H_Q[2*i+1]);
          xe = longint'(hx0[i]);
          xo = longint'(hx1[i]);
          fa += (he + ho) * (xe + xo);
          fb += (he - ho) * (xe - xo);
          fc += ho * xo;
        end
        y_out.y0 <= 24'((fa + fb) / 2 - fc + c_prev);
        y_out.y1 <= 24'((fa - fb) / 2);
        c_prev = fc;
      end
    end
  end

endmodule
