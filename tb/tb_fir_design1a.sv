// tb_fir_design1a: self-checking test of the 3-tap Design-1A FIR array.
//
// A reference model keeps the last NTAPS accepted samples and computes
// y(n) = sum_j w(j) x(n-j). The test checks y_out in the same cycle as each
// sample (latency 0), holds x_valid low for random gaps (the delays must
// hold), reloads the weights, and uses clr to restart with zero history.
// It also repeats the small example of the published space-time diagram,
// five samples x0..x4 giving y0..y4.
module tb_fir_design1a;
  localparam int unsigned NTAPS  = 3;
  localparam int unsigned DATA_W = 16;
  localparam int unsigned ACC_W  = systolic_pkg::acc_width(DATA_W, NTAPS);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic w_load = 1'b0, clr = 1'b0, x_valid = 1'b0;
  logic signed [DATA_W-1:0] w_in [NTAPS];
  logic signed [DATA_W-1:0] x_in = '0;
  logic signed [ACC_W-1:0]  y_out;
  int checks = 0, failures = 0;
  int gaps = 0;
  int skip = 0;            // samples not to check after a reload without clr

  longint w_ref [NTAPS];
  longint hist  [NTAPS];   // hist[j] = x(n-j) once the current sample is in

  fir_design1a #(.NTAPS(NTAPS), .DATA_W(DATA_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_weights(input longint w [NTAPS]);
    @(negedge clk);
    for (int j = 0; j < NTAPS; j++) begin
      w_in[j]  = DATA_W'(w[j]);
      w_ref[j] = w[j];
    end
    w_load  = 1'b1;
    x_valid = 1'b0;
    @(negedge clk);
    w_load = 1'b0;
  endtask

  task automatic clear();
    @(negedge clk);
    clr     = 1'b1;
    x_valid = 1'b0;
    @(negedge clk);
    clr = 1'b0;
    for (int j = 0; j < NTAPS; j++) hist[j] = 0;
  endtask

  // Present one sample at a negedge and check y_out before the next edge.
  task automatic sample(input longint x);
    longint expect_v;
    @(negedge clk);
    for (int j = NTAPS - 1; j > 0; j--) hist[j] = hist[j-1];
    hist[0] = x;
    x_in    = DATA_W'(x);
    x_valid = 1'b1;
    expect_v = 0;
    for (int j = 0; j < NTAPS; j++) expect_v += w_ref[j] * hist[j];
    #1;
    if (skip > 0) begin
      skip--;
      return;
    end
    checks++;
    if (y_out !== ACC_W'(expect_v)) begin
      failures++;
      $display("FAIL x=%0d got %0d expected %0d", x, y_out, expect_v);
    end
  endtask

  task automatic idle(input int cycles);
    for (int c = 0; c < cycles; c++) begin
      @(negedge clk);
      x_valid = 1'b0;
      x_in    = DATA_W'($urandom);        // must be ignored
      gaps++;
    end
  endtask

  initial begin
    longint w [NTAPS];
    longint expect_y [5];
    for (int j = 0; j < NTAPS; j++) begin
      w_in[j] = '0;
      hist[j] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // Small worked example: w = (1,2,3), x = 1..5.
    // y0 = 1, y1 = 2+2 = 4, y2 = 3+4+3 = 10, y3 = 4+6+6 = 16, y4 = 5+8+9 = 22
    w = '{1, 2, 3};
    expect_y = '{1, 4, 10, 16, 22};
    load_weights(w);
    for (int n = 0; n < 5; n++) begin
      sample(longint'(n) + 1);
      checks++;
      if (y_out !== ACC_W'(expect_y[n])) begin
        failures++;
        $display("FAIL example y%0d got %0d expected %0d", n, y_out, expect_y[n]);
      end
    end

    // Random streams with gaps, reloads and clears.
    for (int blk = 0; blk < 8; blk++) begin
      for (int j = 0; j < NTAPS; j++) w[j] = longint'($signed(16'($urandom)));
      if (blk == 1) w = '{-32768, -32768, -32768};
      load_weights(w);
      // Partial sums already in the delays were formed with the old
      // weights, so without a clear the next NTAPS-1 results mix both sets.
      if (blk % 2 == 0) clear();
      else skip = NTAPS - 1;
      for (int n = 0; n < 50; n++) begin
        longint x;
        x = longint'($signed(16'($urandom)));
        if (blk == 1) x = -32768;
        sample(x);
        if ($urandom_range(3) == 0) idle($urandom_range(1, 3));
      end
    end
    @(negedge clk);
    x_valid = 1'b0;
    checks++;
    if (gaps == 0) begin
      failures++;
      $display("FAIL no gaps between samples were exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
