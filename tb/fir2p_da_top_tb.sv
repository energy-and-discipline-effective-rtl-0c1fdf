// fir2p_da_top_tb: end-to-end check of the two-parallel FIR filter at its
// default size (24 taps, 8-bit in, 24-bit out).
//
// The testbench feeds blocks of two samples and compares every output pair
// with a direct-form 24-tap convolution of the sample stream, using tap
// values q(k) = round(h(k) * 2^13) written out here independently of the
// design's package. It also checks the timing (one block per clock, outputs
// exactly one clock after the input block) and counts each mechanism of the
// design: gaps in the input stream, a reset in the middle of a stream,
// full-scale inputs reaching the largest possible output magnitude, and the
// block delay of the H1X1 term (outputs depending on the previous block).
module fir2p_da_top_tb;
  import fir2p_pkg::*;

  localparam int NT = 24;
  localparam int signed Q [NT] = '{1281, 642, 359, 742, 342, 360, 2985, 33, 633, 3366, 4091, 417,
                                   417, 4091, 3366, 633, 33, 2985, 360, 342, 742, 359, 642, 1281};
  localparam int NBLK = 4000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic      rst_n, in_valid, out_valid;
  in_pair_t  x_in;
  out_pair_t y_out;

  fir2p_da_top u_dut (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .x_in     (x_in),
    .out_valid(out_valid),
    .y_out    (y_out)
  );

  int signed hist [NT];        // hist[0] = newest accepted sample x(n)
  int checks = 0, failures = 0;
  int n_gap = 0, n_reset = 0, n_peak = 0, n_blocks = 0, n_cross = 0;
  longint exp_y0, exp_y1;
  logic   exp_valid;
  longint sum_abs;

  function automatic longint conv();
    longint acc = 0;
    for (int k = 0; k < NT; k++) acc += longint'(Q[k]) * hist[k];
    return acc;
  endfunction

  function automatic void push(int xv);
    for (int k = NT - 1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = xv;
  endfunction

  initial begin
    sum_abs = 0;
    foreach (Q[k]) sum_abs += longint'((Q[k] < 0) ? -Q[k] : Q[k]);
    foreach (hist[k]) hist[k] = 0;
    rst_n = 1'b0; in_valid = 1'b0; x_in = '0;
    exp_valid = 1'b0; exp_y0 = 0; exp_y1 = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    for (int cyc = 0; cyc < NBLK; cyc++) begin
      int x0v, x1v;
      @(negedge clk);
      // Check what was registered at the last edge.
      checks++;
      if (out_valid !== exp_valid) begin
        failures++;
        $display("FAIL latency: out_valid=%0b expected %0b at t=%0t", out_valid, exp_valid, $time);
      end
      if (exp_valid) begin
        checks += 2;
        if (longint'(y_out.y0) != exp_y0 || longint'(y_out.y1) != exp_y1) begin
          failures++;
          if (failures < 10)
            $display("FAIL t=%0t y0=%0d/%0d y1=%0d/%0d", $time, y_out.y0, exp_y0, y_out.y1, exp_y1);
        end
        if (exp_y0 == -128 * sum_abs || exp_y1 == -128 * sum_abs) n_peak++;
      end
      if (cyc == NBLK / 2) begin
        rst_n = 1'b0;
        #1;
        rst_n = 1'b1;
        foreach (hist[k]) hist[k] = 0;
        n_reset++;
      end
      // Next block.
      in_valid = ($urandom_range(0, 4) != 0);
      if (cyc >= 500 && cyc < 540) begin
        x0v = 127;  x1v = 127;          // full-scale positive
      end else if (cyc >= 540 && cyc < 580) begin
        x0v = -128; x1v = -128;         // full-scale negative
      end else begin
        x0v = int'($urandom_range(0, 255)) - 128;
        x1v = int'($urandom_range(0, 255)) - 128;
      end
      x_in.x0 = 8'(x0v);
      x_in.x1 = 8'(x1v);
      exp_valid = in_valid;
      if (in_valid) begin
        // An odd sample of the previous block reaches y(2k) only through
        // the delayed H1X1 term.
        if (hist[0] != 0) n_cross++;
        push(x0v);
        exp_y0 = conv();
        push(x1v);
        exp_y1 = conv();
        n_blocks++;
      end else begin
        n_gap++;
      end
    end
    @(negedge clk);
    if (exp_valid) begin
      checks += 2;
      if (longint'(y_out.y0) != exp_y0 || longint'(y_out.y1) != exp_y1) failures++;
    end

    $display("blocks=%0d gaps=%0d resets=%0d peak_outputs=%0d delayed_term_blocks=%0d",
             n_blocks, n_gap, n_reset, n_peak, n_cross);
    if (n_gap == 0)   begin failures++; $display("FAIL no input gap exercised"); end
    if (n_reset == 0) begin failures++; $display("FAIL no reset exercised"); end
    if (n_peak == 0)  begin failures++; $display("FAIL full-scale output never reached"); end
    if (n_cross == 0) begin failures++; $display("FAIL delayed term never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NBLK + 100) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
