// tb_mm_pe: self-checking test of the matrix-array processor.
//
// Drives random a, b, en and clr and compares a_out, b_out (one-cycle pass
// registers) and the accumulator c_out with a model kept here.
module tb_mm_pe;
  localparam int unsigned DATA_W = 16;
  localparam int unsigned ACC_W  = 33;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clr = 1'b0, en = 1'b0;
  logic signed [DATA_W-1:0] a_in = '0, b_in = '0, a_out, b_out;
  logic signed [ACC_W-1:0]  c_out;
  int checks = 0, failures = 0;

  mm_pe #(.DATA_W(DATA_W), .ACC_W(ACC_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint c_ref, a_ref, b_ref;
    c_ref = 0; a_ref = 0; b_ref = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      a_in = DATA_W'($urandom);
      b_in = DATA_W'($urandom);
      if (n < 4) begin
        a_in = 16'sh8000;
        b_in = 16'sh8000;
      end
      en  = ($urandom_range(3) != 0);
      clr = (n % 37 == 36);
      @(posedge clk);
      if (clr) begin
        c_ref = 0; a_ref = 0; b_ref = 0;
      end else if (en) begin
        c_ref += longint'(a_in) * longint'(b_in);
        a_ref = longint'(a_in);
        b_ref = longint'(b_in);
      end
      #1;
      checks++;
      if (c_out !== ACC_W'(c_ref) || a_out !== DATA_W'(a_ref) || b_out !== DATA_W'(b_ref)) begin
        failures++;
        $display("FAIL n=%0d c=%0d/%0d a=%0d/%0d b=%0d/%0d", n, c_out, c_ref,
                 a_out, a_ref, b_out, b_ref);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
