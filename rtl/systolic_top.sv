// systolic_top: the systolic designs side by side, sharing only clock and
// reset.
//
//   fir_* : NTAPS-tap FIR filter, Design-1A (input broadcast, weights stay,
//           results move), fir_design1a.
//   cc_*  : convolution / correlation of two sequences on a second Design-1A
//           array, conv_corr_unit.
//   mm_*  : N x N matrix product on an N x N output-stationary array,
//           matmul_array.
// The three are independent examples of the same mapping method (dependence
// graph, projection, schedule); their ports are brought out unchanged, with
// the timing described in each module.
module systolic_top
  import systolic_pkg::*;
#(
  parameter int unsigned NTAPS  = 3,
  parameter int unsigned N      = 2,
  parameter int unsigned DATA_W = DEFAULT_DATA_W,
  parameter int unsigned FIR_W  = acc_width(DATA_W, NTAPS),
  parameter int unsigned MM_W   = acc_width(DATA_W, N)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // FIR filter
  input  logic                     fir_w_load,
  input  logic signed [DATA_W-1:0] fir_w_in [NTAPS],
  input  logic                     fir_clr,
  input  logic                     fir_x_valid,
  input  logic signed [DATA_W-1:0] fir_x_in,
  output logic signed [FIR_W-1:0]  fir_y_out,
  // Convolution / correlation
  input  logic                     cc_h_load,
  input  seq_op_e                  cc_op,
  input  logic signed [DATA_W-1:0] cc_h_in [NTAPS],
  input  logic                     cc_x_valid,
  output logic                     cc_x_ready,
  input  logic signed [DATA_W-1:0] cc_x_data,
  input  logic                     cc_x_last,
  output logic                     cc_y_valid,
  output logic signed [FIR_W-1:0]  cc_y_data,
  output logic                     cc_y_last,
  // Matrix product
  input  logic                     mm_start,
  input  logic signed [DATA_W-1:0] mm_a_mat [N][N],
  input  logic signed [DATA_W-1:0] mm_b_mat [N][N],
  output logic                     mm_busy,
  output logic                     mm_done,
  output logic signed [MM_W-1:0]   mm_c_mat [N][N]
);

  fir_design1a #(.NTAPS(NTAPS), .DATA_W(DATA_W), .ACC_W(FIR_W)) u_fir (
    .clk    (clk),
    .rst_n  (rst_n),
    .w_load (fir_w_load),
    .w_in   (fir_w_in),
    .clr    (fir_clr),
    .x_valid(fir_x_valid),
    .x_in   (fir_x_in),
    .y_out  (fir_y_out)
  );

  conv_corr_unit #(.NTAPS(NTAPS), .DATA_W(DATA_W), .ACC_W(FIR_W)) u_conv_corr (
    .clk    (clk),
    .rst_n  (rst_n),
    .h_load (cc_h_load),
    .op     (cc_op),
    .h_in   (cc_h_in),
    .x_valid(cc_x_valid),
    .x_ready(cc_x_ready),
    .x_data (cc_x_data),
    .x_last (cc_x_last),
    .y_valid(cc_y_valid),
    .y_data (cc_y_data),
    .y_last (cc_y_last)
  );

  matmul_array #(.N(N), .DATA_W(DATA_W), .ACC_W(MM_W)) u_matmul (
    .clk  (clk),
    .rst_n(rst_n),
    .start(mm_start),
    .a_mat(mm_a_mat),
    .b_mat(mm_b_mat),
    .busy (mm_busy),
    .done (mm_done),
    .c_mat(mm_c_mat)
  );

endmodule
