// ffa_postadd_tb: checks the post-processing adders, the halving and the
// one-block delay of C against a model of
//   Y0 = (A+B)/2 - C + C(k-1),  Y1 = (A-B)/2,
// with outputs and valid registered one clock after an enabled block.
// A and B are drawn with equal parity, as the sub-filters guarantee. The
// stream has random gaps (en low), and the delayed C must skip them.
module ffa_postadd_tb;

  localparam int ACC_W = 26;
  localparam int OUT_W = 24;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, en, valid;
  logic signed [ACC_W-1:0] a, b, c;
  logic signed [OUT_W-1:0] y0, y1;

  ffa_postadd #(.ACC_W(ACC_W), .OUT_W(OUT_W)) u_dut (
    .clk(clk), .rst_n(rst_n), .en(en), .a(a), .b(b), .c(c),
    .y0(y0), .y1(y1), .valid(valid)
  );

  int checks = 0, failures = 0, n_gap = 0;
  longint c_prev;
  longint exp_y0, exp_y1;
  logic   exp_valid;

  function automatic int rnd(int lim);   // uniform in [-lim, lim]
    return int'($urandom_range(0, 2 * lim)) - lim;
  endfunction

  initial begin
    rst_n = 1'b0; en = 1'b0; a = '0; b = '0; c = '0;
    c_prev = 0; exp_y0 = 0; exp_y1 = 0; exp_valid = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    for (int cyc = 0; cyc < 4000; cyc++) begin
      int av, bv, cv;
      @(negedge clk);
      // Outputs registered at the last edge.
      checks += 3;
      if (valid !== exp_valid) failures++;
      if (exp_valid && longint'(y0) != exp_y0) begin
        failures++;
        if (failures < 10) $display("FAIL y0 got=%0d exp=%0d", y0, exp_y0);
      end
      if (exp_valid && longint'(y1) != exp_y1) begin
        failures++;
        if (failures < 10) $display("FAIL y1 got=%0d exp=%0d", y1, exp_y1);
      end
      // Next block.
      av = rnd(4000000);
      bv = rnd(4000000);
      if (((av ^ bv) & 1) != 0) bv = bv + 1;
      cv = rnd(2000000);
      en = ($urandom_range(0, 3) != 0);
      if (!en) n_gap++;
      a = ACC_W'(av); b = ACC_W'(bv); c = ACC_W'(cv);
      exp_valid = en;
      if (en) begin
        exp_y0 = (longint'(av) + bv) / 2 - cv + c_prev;
        exp_y1 = (longint'(av) - bv) / 2;
        c_prev = cv;
      end
    end
    if (n_gap == 0) failures++;
    $display("gaps=%0d", n_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
