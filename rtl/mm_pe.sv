// mm_pe: processor of the matrix-product systolic array (matmul_array).
//
// It implements one node line of the regular iterative algorithm
//   a(i,j,k) = a(i,j-1,k);  b(i,j,k) = b(i-1,j,k);
//   c(i,j,k) = c(i,j,k-1) + a(i,j,k) * b(i,j,k)
// after projection along k: c(i,j) stays in the processor as an accumulator,
// a is passed on to the right-hand neighbour and b to the neighbour below,
// each through one register. The recurrence is the published one; the
// projection (d = (0,0,1)) and everything about the ports is this design's
// own choice.
//
// Interface and timing (all registered, one time step per cycle with en):
//   clr   : synchronous, clears the accumulator and both pass registers;
//           takes priority over en.
//   en    : a_out <= a_in, b_out <= b_in, c_out <= c_out + a_in*b_in.
module mm_pe #(
  parameter int unsigned DATA_W = systolic_pkg::DEFAULT_DATA_W,
  parameter int unsigned ACC_W  = 2 * DATA_W + 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clr,
  input  logic                     en,
  input  logic signed [DATA_W-1:0] a_in,
  input  logic signed [DATA_W-1:0] b_in,
  output logic signed [DATA_W-1:0] a_out,
  output logic signed [DATA_W-1:0] b_out,
  output logic signed [ACC_W-1:0]  c_out
);

  logic signed [2*DATA_W-1:0] product;

  assign product = a_in * b_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_out <= '0;
      b_out <= '0;
      c_out <= '0;
    end else if (clr) begin
      a_out <= '0;
      b_out <= '0;
      c_out <= '0;
    end else if (en) begin
      a_out <= a_in;
      b_out <= b_in;
      c_out <= c_out + ACC_W'(product);
    end
  end

endmodule
