// fir_pe: one processor of the 3-tap FIR systolic array "Design-1A"
// (input broadcast, weights stay, results move).
//
// The processor holds its coefficient in a register that feeds back on
// itself, so the weight stays in place for as long as the filter runs. Each
// cycle it multiplies the weight by the broadcast input sample and adds the
// product to the partial result that arrives from its right-hand neighbour.
// The processor structure (weight register with self-loop, multiplier, adder
// on the result line) follows the published low-level diagram of Design-1A;
// the w_load port used to change the weight is this design's own addition.
//
// Interface and timing:
//   w_load/w_in : w_in is written into the weight register at the clock edge
//                 when w_load is high; otherwise the weight is held.
//   x_in        : broadcast input sample.
//   psum_in     : partial result from the neighbour (already delayed there).
//   psum_out    : psum_in + w * x_in, combinational (no register inside);
//                 the delay between processors lives in fir_design1a.
module fir_pe #(
  parameter int unsigned DATA_W = systolic_pkg::DEFAULT_DATA_W,
  parameter int unsigned ACC_W  = 2 * DATA_W + 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     w_load,
  input  logic signed [DATA_W-1:0] w_in,
  input  logic signed [DATA_W-1:0] x_in,
  input  logic signed [ACC_W-1:0]  psum_in,
  output logic signed [ACC_W-1:0]  psum_out
);

  logic signed [DATA_W-1:0]   weight_q;
  logic signed [2*DATA_W-1:0] product;

  // Weight register: loads on w_load, otherwise loops back on itself.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      weight_q <= '0;
    else if (w_load) weight_q <= w_in;
  end

  always_comb begin
    product  = weight_q * x_in;
    psum_out = psum_in + ACC_W'(product);
  end

endmodule
