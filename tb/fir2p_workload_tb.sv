// fir2p_workload_tb: runs the 24-tap filter on the signals it was specified
// for (48 kHz sampling, pass-band edge 960 Hz, stop-band edge 1200 Hz) and
// compares it, sample by sample, with fir2p_mult_ref, the same filter built
// from ordinary multipliers. The two must agree exactly.
//
// Test tones of 240 Hz, 960 Hz, 1200 Hz, 4800 Hz and 12 kHz at 8-bit full
// scale, x(n) = round(127 sin(2 pi f n / 48000)), are played one after the
// other for 2400 samples (1200 blocks) each, with random gaps in the input
// stream. The steady-state peak output of each tone is printed, relative to
// the DC gain, as a record of the filter's response.
module fir2p_workload_tb;
  import fir2p_pkg::*;

  localparam int  NTONE  = 5;
  localparam real FS     = 48000.0;
  localparam real PI     = 3.14159265358979;
  localparam real FREQ [NTONE] = '{240.0, 960.0, 1200.0, 4800.0, 12000.0};
  localparam int  BLOCKS = 1200;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic      rst_n, in_valid;
  in_pair_t  x_in;
  logic      v_dut, v_ref;
  out_pair_t y_dut, y_ref;

  fir2p_da_top u_dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(x_in),
    .out_valid(v_dut), .y_out(y_dut)
  );

  fir2p_mult_ref u_ref (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(x_in),
    .out_valid(v_ref), .y_out(y_ref)
  );

  int checks = 0, failures = 0, n_gap = 0;

  function automatic int sample(real f, int n);
    return $rtoi(127.0 * $sin(2.0 * PI * f * real'(n) / FS) + 128.5) - 128;
  endfunction

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; x_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < NTONE; t++) begin
      int  n, blk;
      real peak;
      n = 0; blk = 0; peak = 0.0;
      while (blk < BLOCKS) begin
        @(negedge clk);
        // Compare outputs of the previous edge.
        checks++;
        if (v_dut !== v_ref || (v_dut && y_dut !== y_ref)) begin
          failures++;
          if (failures < 10)
            $display("FAIL t=%0t dut=%0d,%0d ref=%0d,%0d", $time, y_dut.y0, y_dut.y1, y_ref.y0, y_ref.y1);
        end
        if (v_dut && blk > BLOCKS / 2) begin
          real a0, a1;
          a0 = $itor(y_dut.y0); a1 = $itor(y_dut.y1);
          if (a0 < 0.0) a0 = -a0;
          if (a1 < 0.0) a1 = -a1;
          if (a0 > peak) peak = a0;
          if (a1 > peak) peak = a1;
        end
        in_valid = ($urandom_range(0, 7) != 0);
        if (in_valid) begin
          x_in.x0 = 8'(sample(FREQ[t], n));
          x_in.x1 = 8'(sample(FREQ[t], n + 1));
          n += 2;
          blk++;
        end else begin
          x_in = in_pair_t'($urandom());
          n_gap++;
        end
      end
      $display("tone %0.0f Hz: peak |y| = %0.0f, gain relative to DC = %0.4f",
               FREQ[t], peak, peak / (127.0 * real'(H_ABS_SUM)));
    end
    @(negedge clk);
    if (n_gap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NTONE * BLOCKS * 2 + 100) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
