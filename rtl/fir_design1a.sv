// fir_design1a: NTAPS-tap FIR filter as a linear systolic array, "Design-1A":
// input broadcast, weights stay, results move.
//
//   y(n) = w0*x(n) + w1*x(n-1) + ... + w(NTAPS-1)*x(n-NTAPS+1)
//
// The dependence graph of the filter (node (i,j) multiplies x(i-j) by w(j)) is
// projected along d = (1,0) with processor vector P^T = (0,1) and schedule
// s^T = (1,0): processor j holds weight w(j) for ever, every processor sees
// the same sample x(n) in the same cycle (the input edge gets zero delays),
// and the result edge (1,-1) becomes a link from processor j to processor j-1
// with one delay register. The result line starts with a constant 0 at the
// last processor and leaves at processor 0 with no register after it, so
// y(n) appears in the same cycle as x(n): latency 0 cycles, one result per
// sample, hardware utilisation 1. This structure follows the published
// design; the clock enable, the clear and the weight-load port are this
// design's own choices.
//
// Interface and timing:
//   w_load/w_in : all NTAPS weights are written at the clock edge (w_in[j]
//                 is w(j)).
//   x_valid     : x_in is a new sample; y_out is y(n) for it in the same
//                 cycle, and at the clock edge the result delays advance.
//                 With x_valid low the delays hold (samples may arrive at any
//                 rate).
//   clr         : synchronous; empties the result delays (zero history).
//                 Takes priority over x_valid.
module fir_design1a #(
  parameter int unsigned NTAPS  = 3,
  parameter int unsigned DATA_W = systolic_pkg::DEFAULT_DATA_W,
  parameter int unsigned ACC_W  = systolic_pkg::acc_width(DATA_W, NTAPS)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     w_load,
  input  logic signed [DATA_W-1:0] w_in [NTAPS],
  input  logic                     clr,
  input  logic                     x_valid,
  input  logic signed [DATA_W-1:0] x_in,
  output logic signed [ACC_W-1:0]  y_out
);

  // psum_in / psum_out of every processor; dly[j] sits between processor j+1
  // and processor j.
  logic signed [ACC_W-1:0]  psum_in  [NTAPS];
  logic signed [ACC_W-1:0]  psum_out [NTAPS];

  for (genvar j = 0; j < NTAPS; j++) begin : g_pe
    fir_pe #(.DATA_W(DATA_W), .ACC_W(ACC_W)) u_pe (
      .clk     (clk),
      .rst_n   (rst_n),
      .w_load  (w_load),
      .w_in    (w_in[j]),
      .x_in    (x_in),
      .psum_in (psum_in[j]),
      .psum_out(psum_out[j])
    );
  end

  // The last processor starts the result line with 0.
  assign psum_in[NTAPS-1] = '0;

  if (NTAPS > 1) begin : g_dly
    logic signed [ACC_W-1:0] dly_q [NTAPS-1];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int j = 0; j < NTAPS - 1; j++) dly_q[j] <= '0;
      end else if (clr) begin
        for (int j = 0; j < NTAPS - 1; j++) dly_q[j] <= '0;
      end else if (x_valid) begin
        for (int j = 0; j < NTAPS - 1; j++) dly_q[j] <= psum_out[j+1];
      end
    end

    for (genvar j = 0; j < NTAPS - 1; j++) begin : g_link
      assign psum_in[j] = dly_q[j];
    end
  end

  assign y_out = psum_out[0];

endmodule
