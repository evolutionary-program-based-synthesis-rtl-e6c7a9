// tb_systolic_top: end-to-end test of the whole design at its default sizes
// (3-tap arrays, 2 x 2 matrices, 16-bit data), all three parts running at
// the same time.
//
//   FIR      : random samples with gaps (x_valid low, delays hold), weight
//              reloads and clears; y(n) checked in the cycle of x(n).
//   conv/corr: sequences alternating between convolution and correlation,
//              each result checked, flush stalls counted, y_last position
//              checked.
//   matrix   : repeated 2 x 2 products, done timing (3N-2 edges) and C
//              checked, with starts poked while busy.
// Every mechanism is counted and a failure is counted for one that never
// happened.
module tb_systolic_top;
  import systolic_pkg::*;
  localparam int unsigned NTAPS  = 3;
  localparam int unsigned N      = 2;
  localparam int unsigned DATA_W = DEFAULT_DATA_W;
  localparam int unsigned FIR_W  = acc_width(DATA_W, NTAPS);
  localparam int unsigned MM_W   = acc_width(DATA_W, N);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic fir_w_load = 1'b0, fir_clr = 1'b0, fir_x_valid = 1'b0;
  logic signed [DATA_W-1:0] fir_w_in [NTAPS];
  logic signed [DATA_W-1:0] fir_x_in = '0;
  logic signed [FIR_W-1:0]  fir_y_out;
  logic cc_h_load = 1'b0;
  seq_op_e cc_op = OP_CONV;
  logic signed [DATA_W-1:0] cc_h_in [NTAPS];
  logic cc_x_valid = 1'b0, cc_x_last = 1'b0, cc_x_ready, cc_y_valid, cc_y_last;
  logic signed [DATA_W-1:0] cc_x_data = '0;
  logic signed [FIR_W-1:0]  cc_y_data;
  logic mm_start = 1'b0, mm_busy, mm_done;
  logic signed [DATA_W-1:0] mm_a_mat [N][N];
  logic signed [DATA_W-1:0] mm_b_mat [N][N];
  logic signed [MM_W-1:0]   mm_c_mat [N][N];

  int checks = 0, failures = 0;
  // mechanism counters
  int cnt_fir_sample = 0, cnt_fir_gap = 0, cnt_fir_clr = 0, cnt_fir_reload = 0;
  int cnt_conv = 0, cnt_corr = 0, cnt_flush = 0, cnt_mm = 0, cnt_mm_ignored = 0;
  bit fir_done = 0, cc_done = 0, mm_all_done = 0;

  systolic_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  // ---------------------------------------------------------------- FIR
  initial begin : fir_driver
    longint w [NTAPS];
    longint hist [NTAPS];
    longint e;
    int skip;
    for (int j = 0; j < NTAPS; j++) begin
      fir_w_in[j] = '0;
      hist[j] = 0;
    end
    skip = 0;
    @(posedge rst_n);
    for (int blk = 0; blk < 6; blk++) begin
      @(negedge clk);
      fir_x_valid = 1'b0;
      for (int j = 0; j < NTAPS; j++) begin
        w[j] = longint'($signed(DATA_W'($urandom)));
        fir_w_in[j] = DATA_W'(w[j]);
      end
      fir_w_load = 1'b1;
      fir_clr    = (blk % 2 == 0);
      cnt_fir_reload++;
      if (fir_clr) begin
        cnt_fir_clr++;
        for (int j = 0; j < NTAPS; j++) hist[j] = 0;
      end else skip = NTAPS - 1;   // old partial sums still in flight
      @(negedge clk);
      fir_w_load = 1'b0;
      fir_clr    = 1'b0;
      for (int n = 0; n < 40; n++) begin
        if ($urandom_range(3) == 0) begin
          fir_x_valid = 1'b0;
          fir_x_in    = DATA_W'($urandom);
          cnt_fir_gap++;
          @(negedge clk);
        end
        for (int j = NTAPS - 1; j > 0; j--) hist[j] = hist[j-1];
        hist[0] = longint'($signed(DATA_W'($urandom)));
        fir_x_in    = DATA_W'(hist[0]);
        fir_x_valid = 1'b1;
        e = 0;
        for (int j = 0; j < NTAPS; j++) e += w[j] * hist[j];
        #1;
        cnt_fir_sample++;
        if (skip > 0) skip--;
        else begin
          checks++;
          if (fir_y_out !== FIR_W'(e)) fail($sformatf("fir y=%0d expected %0d", fir_y_out, e));
        end
        @(negedge clk);
      end
    end
    fir_x_valid = 1'b0;
    fir_done = 1;
  end

  // ------------------------------------------------- convolution / correlation
  longint cc_exp_q [$];
  bit     cc_last_q [$];
  int     cc_seq_done = 0;

  always @(negedge clk) begin : cc_monitor
    longint e;
    bit el;
    if (rst_n && cc_y_valid) begin
      checks++;
      if (cc_exp_q.size() == 0) fail("cc unexpected result");
      else begin
        e  = cc_exp_q.pop_front();
        el = cc_last_q.pop_front();
        if (cc_y_data !== FIR_W'(e) || cc_y_last !== el)
          fail($sformatf("cc y=%0d last=%0b expected %0d last=%0b", cc_y_data, cc_y_last, e, el));
        if (el) cc_seq_done++;
      end
    end
  end

  initial begin : cc_driver
    longint h [NTAPS];
    longint x [$];
    seq_op_e o;
    int nx;
    for (int j = 0; j < NTAPS; j++) cc_h_in[j] = '0;
    @(posedge rst_n);
    for (int s = 0; s < 12; s++) begin
      o = (s % 2 == 0) ? OP_CONV : OP_CORR;
      nx = $urandom_range(1, 16);
      x.delete();
      for (int n = 0; n < nx; n++) x.push_back(longint'($signed(DATA_W'($urandom))));
      for (int j = 0; j < NTAPS; j++) h[j] = longint'($signed(DATA_W'($urandom)));
      @(negedge clk);
      cc_x_valid = 1'b0;
      for (int j = 0; j < NTAPS; j++) cc_h_in[j] = DATA_W'(h[j]);
      cc_op     = o;
      cc_h_load = 1'b1;
      @(negedge clk);
      cc_h_load = 1'b0;
      if (o == OP_CONV) cnt_conv++; else cnt_corr++;
      for (int n = 0; n < nx + NTAPS - 1; n++) begin
        longint acc;
        acc = 0;
        for (int k = 0; k < NTAPS; k++) begin
          int idx;
          idx = (o == OP_CONV) ? n - k : k + n - (NTAPS - 1);
          if (idx >= 0 && idx < nx) acc += h[k] * x[idx];
        end
        cc_exp_q.push_back(acc);
        cc_last_q.push_back(n == nx + NTAPS - 2);
      end
      for (int n = 0; n < nx; n++) begin
        cc_x_valid = 1'b1;
        cc_x_data  = DATA_W'(x[n]);
        cc_x_last  = (n == nx - 1);
        @(posedge clk);
        while (!cc_x_ready) @(posedge clk);
        @(negedge clk);
      end
      // count the flush cycles, in which the unit refuses samples
      cc_x_valid = 1'b0;
      cc_x_last  = 1'b0;
      while (!cc_x_ready) begin
        cnt_flush++;
        @(negedge clk);
      end
      repeat (2) @(negedge clk);
    end
    repeat (NTAPS + 2) @(negedge clk);
    checks++;
    if (cc_exp_q.size() != 0 || cc_seq_done != 12)
      fail($sformatf("cc %0d results missing, %0d sequences done", cc_exp_q.size(), cc_seq_done));
    cc_done = 1;
  end

  // ------------------------------------------------------------ matrix
  initial begin : mm_driver
    longint a [N][N];
    longint b [N][N];
    longint e;
    int edges;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        mm_a_mat[i][j] = '0;
        mm_b_mat[i][j] = '0;
      end
    @(posedge rst_n);
    for (int t = 0; t < 30; t++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          a[i][j] = longint'($signed(DATA_W'($urandom)));
          b[i][j] = longint'($signed(DATA_W'($urandom)));
          mm_a_mat[i][j] = DATA_W'(a[i][j]);
          mm_b_mat[i][j] = DATA_W'(b[i][j]);
        end
      mm_start = 1'b1;
      @(negedge clk);
      edges = 0;
      while (!mm_done && edges < 20) begin
        mm_start = (t % 3 == 0);   // ignored while busy
        if (mm_start && mm_busy) cnt_mm_ignored++;
        @(negedge clk);
        edges++;
      end
      mm_start = 1'b0;
      cnt_mm++;
      checks++;
      // edges counts the clock edges after the one that sampled start
      if (edges != 3 * N - 2) fail($sformatf("mm done after %0d edges", edges));
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          e = 0;
          for (int k = 0; k < N; k++) e += a[i][k] * b[k][j];
          checks++;
          if (mm_c_mat[i][j] !== MM_W'(e))
            fail($sformatf("mm c[%0d][%0d]=%0d expected %0d", i, j, mm_c_mat[i][j], e));
        end
    end
    mm_all_done = 1;
  end

  // ------------------------------------------------------------ end
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (fir_done && cc_done && mm_all_done);
    @(negedge clk);
    $display("mechanisms: fir_samples=%0d fir_gaps=%0d fir_clears=%0d fir_reloads=%0d",
             cnt_fir_sample, cnt_fir_gap, cnt_fir_clr, cnt_fir_reload);
    $display("mechanisms: conv=%0d corr=%0d flush_stall_cycles=%0d mm_products=%0d mm_ignored_starts=%0d",
             cnt_conv, cnt_corr, cnt_flush, cnt_mm, cnt_mm_ignored);
    checks++;
    if (cnt_fir_sample == 0 || cnt_fir_gap == 0 || cnt_fir_clr == 0 || cnt_fir_reload == 0 ||
        cnt_conv == 0 || cnt_corr == 0 || cnt_flush == 0 || cnt_mm == 0 || cnt_mm_ignored == 0)
      fail("a mechanism never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
