// tb_matmul_array: self-checking test of the N x N matrix-product array.
//
// Runs the product (2 x 2 by default, as in the published equations) with
// small numbers, extreme values and random matrices, compares C with a
// product computed here, checks that done comes exactly 3N-2 clock edges after the edge that
// sampled start, that busy covers those edges, and that a start while busy
// is ignored.
module tb_matmul_array;
  import systolic_pkg::*;
  localparam int unsigned N      = 2;
  localparam int unsigned DATA_W = 16;
  localparam int unsigned ACC_W  = acc_width(DATA_W, N);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic signed [DATA_W-1:0] a_mat [N][N];
  logic signed [DATA_W-1:0] b_mat [N][N];
  logic busy, done;
  logic signed [ACC_W-1:0]  c_mat [N][N];
  int checks = 0, failures = 0, ignored_starts = 0;

  matmul_array #(.N(N), .DATA_W(DATA_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input longint a [N][N], input longint b [N][N], input bit poke);
    int edges;
    @(negedge clk);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        a_mat[i][j] = DATA_W'(a[i][j]);
        b_mat[i][j] = DATA_W'(b[i][j]);
      end
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    edges = 1;                           // the edge that sampled start
    checks++;
    if (!busy) begin
      failures++;
      $display("FAIL busy low after start");
    end
    // Change the inputs and poke start while busy: neither may matter.
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        a_mat[i][j] = DATA_W'($urandom);
        b_mat[i][j] = DATA_W'($urandom);
      end
    while (!done) begin
      start = poke && busy;
      if (poke && busy) ignored_starts++;
      @(negedge clk);
      edges++;
      if (edges > 10 * N) break;
    end
    start = 1'b0;
    checks++;
    if (edges - 1 != 3 * N - 2) begin
      failures++;
      $display("FAIL done after %0d edges, expected %0d", edges - 1, 3 * N - 2);
    end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        longint e = 0;
        for (int k = 0; k < N; k++) e += a[i][k] * b[k][j];
        checks++;
        if (c_mat[i][j] !== ACC_W'(e)) begin
          failures++;
          $display("FAIL c[%0d][%0d] got %0d expected %0d", i, j, c_mat[i][j], e);
        end
      end
    @(negedge clk);
    checks++;
    if (done || busy) begin
      failures++;
      $display("FAIL done or busy stays high");
    end
  endtask

  initial begin
    longint a [N][N];
    longint b [N][N];
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        a_mat[i][j] = '0;
        b_mat[i][j] = '0;
      end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // A = [1 2; 3 4], B = [5 6; 7 8] -> C = [19 22; 43 50]
    // Counting matrices: for N = 2, A = [1 2; 3 4], B = [5 6; 7 8].
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        a[i][j] = longint'(i) * N + longint'(j) + 1;
        b[i][j] = longint'(N) * N + longint'(i) * N + longint'(j) + 1;
      end
    run(a, b, 1'b0);
    if (N == 2) begin
      checks++;
      if (c_mat[0][0] !== 19 || c_mat[0][1] !== 22 || c_mat[1][0] !== 43 || c_mat[1][1] !== 50) begin
        failures++;
        $display("FAIL worked example");
      end
    end
    // Extreme values: most negative everywhere but one largest positive.
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        a[i][j] = (i == N - 1 && j == N - 1) ? 32767 : -32768;
        b[i][j] = (i == 0 && j == N - 1) ? 32767 : -32768;
      end
    run(a, b, 1'b1);
    for (int t = 0; t < 60; t++) begin
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          a[i][j] = longint'($signed(DATA_W'($urandom)));
          b[i][j] = longint'($signed(DATA_W'($urandom)));
        end
      run(a, b, t % 2 == 1);
      if ($urandom_range(1) == 0) repeat ($urandom_range(1, 3)) @(negedge clk);
    end
    checks++;
    if (ignored_starts == 0) begin
      failures++;
      $display("FAIL no start while busy was exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
