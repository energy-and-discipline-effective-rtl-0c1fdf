// da_const_mult_tb: checks the shift-and-add constant multiplier against the
// ordinary product x * COEF for positive, negative, small and full-width
// coefficients, over every 9-bit input value.
module da_const_mult_tb;

  localparam int IN_W  = 9;
  localparam int OUT_W = 26;
  localparam int NC    = 5;
  localparam int COEFS [NC] = '{4508, -3333, 10, 1, 65535};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [IN_W-1:0]  x;
  logic signed [OUT_W-1:0] p [NC];

  for (genvar g = 0; g < NC; g++) begin : g_dut
    da_const_mult #(.IN_W(IN_W), .COEF(COEFS[g]), .COEF_W(16), .OUT_W(OUT_W)) u_dut (
      .x(x),
      .p(p[g])
    );
  end

  int checks = 0, failures = 0;

  initial begin
    for (int v = -(1 << (IN_W-1)); v < (1 << (IN_W-1)); v++) begin
      x = IN_W'(v);
      @(posedge clk);
      for (int g = 0; g < NC; g++) begin
        longint exp_p;
        exp_p = longint'(v) * longint'(COEFS[g]);
        checks++;
        if (longint'(p[g]) != exp_p) begin
          failures++;
          if (failures < 10)
            $display("FAIL coef=%0d x=%0d got=%0d exp=%0d", COEFS[g], v, p[g], exp_p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
