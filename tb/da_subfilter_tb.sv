// da_subfilter_tb: checks the general transposed-form sub-filter against a
// direct convolution computed in the testbench.
//
// Two instances share one 8-bit input stream: the 12-tap H1 sub-filter of
// the 24-tap design (odd taps q(1), q(3), ... q(23)) and a 7-tap filter with
// mixed-sign coefficients. The stream has random gaps (en low), full-scale
// stretches and a reset in the middle.
module da_subfilter_tb;
  import fir2p_pkg::*;

  localparam int IN_W  = 8;
  localparam int ACC_W = 26;
  localparam int NDUT  = 2;
  localparam int MAXT  = 12;

  localparam int signed C7 [7] = '{-1000, 1, 0, 32767, -2, 77, 4096};

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n, en;
  logic signed [IN_W-1:0]  x;
  logic signed [ACC_W-1:0] y [NDUT];

  da_subfilter #(.IN_W(IN_W), .ACC_W(ACC_W), .TAPS(12), .COEFS(H_ODD))
    u_odd (.clk(clk), .rst_n(rst_n), .en(en), .x(x), .y(y[0]));
  da_subfilter #(.IN_W(IN_W), .ACC_W(ACC_W), .TAPS(7), .COEFS(C7))
    u_c7 (.clk(clk), .rst_n(rst_n), .en(en), .x(x), .y(y[1]));

  // Odd taps of q(k) = round(h(k) * 2^13), written out independently.
  localparam int signed QODD [12] = '{642, 742, 360, 33, 3366, 417, 4091, 633, 2985, 342, 359, 1281};
  int signed coef [NDUT][MAXT];
  int        taps [NDUT];

  int signed hist [MAXT];
  int checks = 0, failures = 0;
  int n_gap = 0, n_reset = 0, n_full = 0;

  function automatic longint expected(int d, int xv);
    longint acc = longint'(coef[d][0]) * xv;
    for (int i = 1; i < taps[d]; i++) acc += longint'(coef[d][i]) * hist[i-1];
    return acc;
  endfunction

  initial begin
    for (int i = 0; i < 12; i++) coef[0][i] = QODD[i];
    for (int i = 0; i < 7; i++)  coef[1][i] = C7[i];
    taps = '{12, 7};
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
      if (cyc >= 300 && cyc < 330)      xv = 127;
      else if (cyc >= 330 && cyc < 360) xv = -128;
      else                              xv = int'($urandom_range(0, 255)) - 128;
      if (xv == 127 || xv == -128) n_full++;
      if (!en) n_gap++;
      x = IN_W'(xv);
      #1;
      for (int d = 0; d < NDUT; d++) begin
        checks++;
        if (longint'(y[d]) != expected(d, xv)) begin
          failures++;
          if (failures < 10) $display("FAIL dut=%0d t=%0t got=%0d exp=%0d", d, $time, y[d], expected(d, xv));
        end
      end
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
