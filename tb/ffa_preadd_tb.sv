// ffa_preadd_tb: exhaustive check of the pre-processing adders over all
// pairs of 8-bit input samples.
module ffa_preadd_tb;

  localparam int IN_W = 8;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [IN_W-1:0] x0, x1;
  logic signed [IN_W:0]   sum, dif;

  ffa_preadd #(.IN_W(IN_W)) u_dut (.x0(x0), .x1(x1), .sum(sum), .dif(dif));

  int checks = 0, failures = 0;

  initial begin
    for (int a = -128; a < 128; a++) begin
      for (int b = -128; b < 128; b++) begin
        x0 = IN_W'(a);
        x1 = IN_W'(b);
        #1;
        checks += 2;
        if (int'(sum) != a + b) failures++;
        if (int'(dif) != a - b) failures++;
        if (failures == 1 && (int'(sum) != a + b || int'(dif) != a - b))
          $display("FAIL x0=%0d x1=%0d sum=%0d dif=%0d", a, b, sum, dif);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
