// sym_subfilter_tb: checks the symmetric/antisymmetric transposed-form
// sub-filter against a direct convolution computed in the testbench.
//
// Four instances share one input stream: the 12-tap symmetric H0+H1 and
// antisymmetric H0-H1 sub-filters of the 24-tap design, and 5-tap symmetric
// and antisymmetric filters (odd length, middle tap shared or zero). The
// stream has random gaps (en low), full-scale stretches and a reset in the
// middle. Every cycle y must equal sum c(i) x(n-i) over the accepted samples.
module sym_subfilter_tb;
  import fir2p_pkg::*;

  localparam int IN_W  = 9;
  localparam int ACC_W = 26;
  localparam int NDUT  = 4;
  localparam int MAXT  = 12;

  localparam int signed C5E [5] = '{3, -7, 100, -7, 3};
  localparam int signed C5O [5] = '{5, -9, 0, 9, -5};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, en;
  logic signed [IN_W-1:0]  x;
  logic signed [ACC_W-1:0] y [NDUT];

  sym_subfilter #(.IN_W(IN_W), .ACC_W(ACC_W), .TAPS(12), .SYM(SYM_EVEN), .COEFS(H_SUM))
    u_sum (.clk(clk), .rst_n(rst_n), .en(en), .x(x), .y(y[0]));
  sym_subfilter #(.IN_W(IN_W), .ACC_W(ACC_W), .TAPS(12), .SYM(SYM_ODD), .COEFS(H_DIF))
    u_dif (.clk(clk), .rst_n(rst_n), .en(en), .x(x), .y(y[1]));
  sym_subfilter #(.IN_W(IN_W), .ACC_W(ACC_W), .TAPS(5), .SYM(SYM_EVEN), .COEFS(C5E))
    u_e5 (.clk(clk), .rst_n(rst_n), .en(en), .x(x), .y(y[2]));
  sym_subfilter #(.IN_W(IN_W), .ACC_W(ACC_W), .TAPS(5), .SYM(SYM_ODD), .COEFS(C5O))
    u_o5 (.clk(clk), .rst_n(rst_n), .en(en), .x(x), .y(y[3]));

  // Reference coefficients, written out from the tap values q(k) =
  // round(h(k) * 2^13) of the 24-tap design: a(i) = q(2i) + q(2i+1),
  // b(i) = q(2i) - q(2i+1).
  localparam int signed Q [24] = '{1281, 642, 359, 742, 342, 360, 2985, 33, 633, 3366, 4091, 417,
                                   417, 4091, 3366, 633, 33, 2985, 360, 342, 742, 359, 642, 1281};
  int signed coef [NDUT][MAXT];
  int        taps [NDUT];

  int signed hist [MAXT];   // hist[0] = newest accepted sample
  int checks = 0, failures = 0;
  int n_gap = 0, n_reset = 0, n_full = 0;

  function automatic longint expected(int d, int xv);
    longint acc = longint'(coef[d][0]) * xv;
    for (int i = 1; i < taps[d]; i++) acc += longint'(coef[d][i]) * hist[i-1];
    return acc;
  endfunction

  task automatic check_all(int xv);
    for (int d = 0; d < NDUT; d++) begin
      checks++;
      if (longint'(y[d]) != expected(d, xv)) begin
        failures++;
        if (failures < 10) $display("FAIL dut=%0d t=%0t got=%0d exp=%0d", d, $time, y[d], expected(d, xv));
      end
    end
  endtask

  initial begin
    for (int i = 0; i < 12; i++) begin
      coef[0][i] = Q[2*i] + Q[2*i+1];
      coef[1][i] = Q[2*i] - Q[2*i+1];
    end
    for (int i = 0; i < 5; i++) begin
      coef[2][i] = C5E[i];
      coef[3][i] = C5O[i];
    end
    taps = '{12, 12, 5, 5};
    foreach (hist[i]) hist[i] = 0;

    rst_n = 1'b0; en = 1'b0; x = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    for (int cyc = 0; cyc < 3000; cyc++) begin
      int xv;
      @(negedge clk);
      if (cyc == 1500) begin
        rst_n = 1'b0;
        #1;
        rst_n = 1'b1;
        foreach (hist[i]) hist[i] = 0;
        n_reset++;
      end
      en = ($urandom_range(0, 3) != 0);
      if (cyc >= 400 && cyc < 440)
        xv = 255;                      // full-scale positive stretch
      else if (cyc >= 440 && cyc < 480)
        xv = -256;                     // full-scale negative stretch
      else
        xv = int'($urandom_range(0, 511)) - 256;
      if (xv == 255 || xv == -256) n_full++;
      if (!en) n_gap++;
      x = IN_W'(xv);
      #1;
      check_all(xv);
      if (en) begin
        for (int i = MAXT - 1; i > 0; i--) hist[i] = hist[i-1];
        hist[0] = xv;
      end
    end
    if (n_gap == 0 || n_reset == 0 || n_full == 0) failures++;
    $display("gaps=%0d resets=%0d full_scale=%0d", n_gap, n_reset, n_full);
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
