// tb_fir_pe: self-checking test of one Design-1A processor.
//
// Loads random weights, drives random samples and partial results, and
// compares psum_out with psum_in + w*x computed here. Also checks that the
// weight stays unchanged while w_load is low, and that reset clears it.
module tb_fir_pe;
  localparam int unsigned DATA_W = 16;
  localparam int unsigned ACC_W  = 34;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic w_load;
  logic signed [DATA_W-1:0] w_in, x_in;
  logic signed [ACC_W-1:0]  psum_in, psum_out;
  int checks = 0, failures = 0;

  fir_pe #(.DATA_W(DATA_W), .ACC_W(ACC_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic signed [DATA_W-1:0] w);
    logic signed [ACC_W-1:0] expect_v;
    expect_v = psum_in + ACC_W'(longint'(w) * longint'(x_in));
    checks++;
    if (psum_out !== expect_v) begin
      failures++;
      $display("FAIL w=%0d x=%0d psum_in=%0d got %0d expected %0d",
               w, x_in, psum_in, psum_out, expect_v);
    end
  endtask

  initial begin
    logic signed [DATA_W-1:0] w_ref;
    w_load = 1'b0; w_in = '0; x_in = 16'sd7; psum_in = 34'sd5;
    repeat (2) @(posedge clk);
    #1 check(16'sd0);                       // reset leaves weight 0
    rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      if (n % 10 == 0) begin
        w_ref  = DATA_W'($urandom);
        if (n == 0)  w_ref = 16'sh8000;     // most negative weight
        if (n == 10) w_ref = 16'sh7fff;
        w_in   = w_ref;
        w_load = 1'b1;
        @(negedge clk);
        w_load = 1'b0;
      end
      w_in    = DATA_W'($urandom);          // ignored while w_load is low
      x_in    = DATA_W'($urandom);
      if (n < 20) x_in = (n % 2 == 0) ? 16'sh8000 : 16'sh7fff;
      psum_in = ACC_W'($signed(64'($urandom)) <<< 1);
      #1 check(w_ref);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
