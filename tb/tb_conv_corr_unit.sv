// tb_conv_corr_unit: self-checking test of convolution and correlation on the
// Design-1A array.
//
// Sequences x of random length (1..24 samples) are streamed with random gaps;
// h is reloaded with a random operation before most sequences, and some
// sequences follow each other with the same h and no reload. The expected
// results are computed here directly from the definitions:
//   convolution  y(n) = sum_k h(k) x(n-k),   n = 0 .. N+NTAPS-2
//   correlation  r(l) = sum_m h(m) x(m+l),   l = -(NTAPS-1) .. N-1
// The monitor compares every result, its position of y_last, the result
// count, that x_ready is low for exactly NTAPS-1 cycles after x_last, and
// that y_last comes NTAPS cycles after the edge that accepted x_last.
module tb_conv_corr_unit;
  import systolic_pkg::*;
  localparam int unsigned NTAPS  = 3;
  localparam int unsigned DATA_W = 16;
  localparam int unsigned ACC_W  = acc_width(DATA_W, NTAPS);
  localparam int          NSEQ   = 40;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic h_load = 1'b0;
  seq_op_e op = OP_CONV;
  logic signed [DATA_W-1:0] h_in [NTAPS];
  logic x_valid = 1'b0, x_last = 1'b0;
  logic signed [DATA_W-1:0] x_data = '0;
  logic x_ready, y_valid, y_last;
  logic signed [ACC_W-1:0] y_data;

  int checks = 0, failures = 0;
  int n_conv = 0, n_corr = 0, n_flush_stall = 0, n_reuse = 0, seq_done = 0;
  longint exp_q [$];       // expected results, in order
  bit     exp_last_q [$];  // expected y_last for each
  int     cycle = 0;
  int     last_accept_cycle = 0;

  conv_corr_unit #(.NTAPS(NTAPS), .DATA_W(DATA_W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  task automatic expect_results(input seq_op_e o, input longint h [NTAPS],
                                input longint x [$]);
    int nx = x.size();
    for (int n = 0; n < nx + NTAPS - 1; n++) begin
      longint acc = 0;
      if (o == OP_CONV) begin
        for (int k = 0; k < NTAPS; k++)
          if (n - k >= 0 && n - k < nx) acc += h[k] * x[n-k];
      end else begin
        int l = n - (NTAPS - 1);
        for (int m = 0; m < NTAPS; m++)
          if (m + l >= 0 && m + l < nx) acc += h[m] * x[m+l];
      end
      exp_q.push_back(acc);
      exp_last_q.push_back(n == nx + NTAPS - 2);
    end
  endtask

  // Monitor: compare every result as it comes out.
  always @(negedge clk) begin : monitor
    longint e;
    bit     el;
    if (rst_n && y_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected result %0d", y_data);
      end else begin
        e  = exp_q.pop_front();
        el = exp_last_q.pop_front();
        if (y_data !== ACC_W'(e) || y_last !== el) begin
          failures++;
          $display("FAIL result got %0d last %0b expected %0d last %0b",
                   y_data, y_last, e, el);
        end
        if (el) begin
          seq_done++;
          checks++;
          // y_last is registered: last accepted edge + NTAPS-1 flush edges
          // + the output register = NTAPS edges later, seen here after the
          // edge of cycle last_accept_cycle + NTAPS - 1.
          if (cycle - last_accept_cycle != NTAPS) begin
            failures++;
            $display("FAIL y_last %0d cycles after x_last, expected %0d",
                     cycle - last_accept_cycle, NTAPS);
          end
        end
      end
    end
  end

  initial begin
    longint h [NTAPS];
    seq_op_e o;
    for (int j = 0; j < NTAPS; j++) begin
      h_in[j] = '0;
      h[j]    = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // First sequence: the small example h = (1,2,3), x = (1,1,1,1)
    // convolution gives 1,3,6,6,5,3 (checked through the generic model).
    for (int s = 0; s < NSEQ; s++) begin
      longint x [$];
      int nx;
      nx = (s == 0) ? 4 : $urandom_range(1, 24);
      x.delete();
      for (int n = 0; n < nx; n++)
        x.push_back((s == 0) ? 1 : longint'($signed(DATA_W'($urandom))));
      if (s == 0 || s == 1 || $urandom_range(3) != 0) begin
        o = (s == 0) ? OP_CONV : (s == 1) ? OP_CORR : seq_op_e'($urandom_range(1));
        for (int j = 0; j < NTAPS; j++)
          h[j] = (s == 0) ? longint'(j) + 1 : longint'($signed(DATA_W'($urandom)));
        @(negedge clk);
        x_valid = 1'b0;
        for (int j = 0; j < NTAPS; j++) h_in[j] = DATA_W'(h[j]);
        op     = o;
        h_load = 1'b1;
        @(negedge clk);
        h_load = 1'b0;
        op     = seq_op_e'($urandom_range(1));   // must not matter now
      end else begin
        n_reuse++;
      end
      if (o == OP_CONV) n_conv++; else n_corr++;
      expect_results(o, h, x);
      for (int n = 0; n < nx; n++) begin
        @(negedge clk);
        x_valid = 1'b0;
        if ($urandom_range(2) == 0) repeat ($urandom_range(1, 3)) @(negedge clk);
        x_valid = 1'b1;
        x_data  = DATA_W'(x[n]);
        x_last  = (n == nx - 1);
        // wait for acceptance
        forever begin
          @(posedge clk);
          if (x_ready) break;
          @(negedge clk);
        end
        if (n == nx - 1) last_accept_cycle = cycle;
      end
      @(negedge clk);
      x_valid = 1'b0;
      x_last  = 1'b0;
      // The unit flushes for NTAPS-1 cycles: x_ready must be low exactly then.
      for (int c = 0; c < NTAPS - 1; c++) begin
        checks++;
        if (x_ready) begin
          failures++;
          $display("FAIL x_ready high during flush");
        end else n_flush_stall++;
        @(negedge clk);
      end
      checks++;
      if (!x_ready) begin
        failures++;
        $display("FAIL x_ready low after flush");
      end
      // Sometimes offer the next sequence immediately, otherwise wait for
      // the tail of the results.
      if ($urandom_range(1) == 0) repeat (2) @(negedge clk);
    end
    repeat (NTAPS + 2) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || seq_done != NSEQ) begin
      failures++;
      $display("FAIL %0d results missing, %0d sequences completed",
               exp_q.size(), seq_done);
    end
    // Every mechanism must have happened.
    checks++;
    if (n_conv == 0 || n_corr == 0 || (NTAPS > 1 && n_flush_stall == 0) || n_reuse == 0) begin
      failures++;
      $display("FAIL coverage conv=%0d corr=%0d flush=%0d reuse=%0d",
               n_conv, n_corr, n_flush_stall, n_reuse);
    end
    $display("coverage: conv=%0d corr=%0d flush_stall_cycles=%0d reuse_h=%0d",
             n_conv, n_corr, n_flush_stall, n_reuse);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
