// conv_corr_unit: convolution or cross-correlation of two discrete sequences
// on the Design-1A FIR systolic array (fir_design1a).
//
// The short sequence h (NTAPS samples) becomes the weights of the array and
// the long sequence x (any length N) is streamed through it:
//   convolution  (OP_CONV): h is loaded as it is, w(j) = h(j), giving
//                y(n) = sum_k h(k) x(n-k),           n = 0 .. N+NTAPS-2
//   correlation  (OP_CORR): h is loaded reversed, w(j) = h(NTAPS-1-j), giving
//                r(l) = sum_m h(m) x(m+l),           l = -(NTAPS-1) .. N-1
//                in ascending order of the lag l.
// After the last x sample the unit feeds NTAPS-1 zeros into the array itself
// (the flush), so the full-length result comes out and the array's delay
// registers end empty, ready for the next sequence with no clear. Reusing
// the FIR array for these two operations follows the published design; the
// control around it (handshake, flush, output register) is this design's own.
//
// Interface and timing:
//   h_load : loads h_in and op, and clears the array; must not coincide with
//            x_valid (checked by an assertion). Aborts a sequence in flight.
//   x_*    : valid/ready stream with a last flag. x_ready is low only during
//            the NTAPS-1 flush cycles that follow an accepted x_last.
//   y_*    : result stream, registered: each accepted sample or flush step
//            gives one result one cycle later; y_last marks the final one.
//            N samples give N+NTAPS-1 results. No back-pressure on y.
module conv_corr_unit
  import systolic_pkg::*;
#(
  parameter int unsigned NTAPS  = 3,
  parameter int unsigned DATA_W = DEFAULT_DATA_W,
  parameter int unsigned ACC_W  = acc_width(DATA_W, NTAPS)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     h_load,
  input  seq_op_e                  op,
  input  logic signed [DATA_W-1:0] h_in [NTAPS],
  input  logic                     x_valid,
  output logic                     x_ready,
  input  logic signed [DATA_W-1:0] x_data,
  input  logic                     x_last,
  output logic                     y_valid,
  output logic signed [ACC_W-1:0]  y_data,
  output logic                     y_last
);

  localparam int unsigned CNT_W = (NTAPS > 1) ? $clog2(NTAPS) : 1;

  logic                     flushing;
  logic [CNT_W-1:0]         flush_cnt_q;   // flush steps still to do
  logic                     x_fire;
  logic                     arr_valid;
  logic signed [DATA_W-1:0] arr_x;
  logic signed [DATA_W-1:0] w_sel [NTAPS];
  logic signed [ACC_W-1:0]  arr_y;
  logic                     last_step;

  assign flushing = (flush_cnt_q != '0);
  assign x_ready  = !flushing;
  assign x_fire   = x_valid && x_ready;

  // Weights: h as given for convolution, reversed for correlation.
  always_comb begin
    for (int j = 0; j < NTAPS; j++) begin
      w_sel[j] = (op == OP_CORR) ? h_in[NTAPS-1-j] : h_in[j];
    end
  end

  // Array input: x while streaming, zeros while flushing.
  assign arr_valid = flushing || x_fire;
  assign arr_x     = flushing ? '0 : x_data;

  // The step that produces the final result: the last flush step, or the
  // last sample itself when there is nothing to flush.
  assign last_step = flushing ? (flush_cnt_q == CNT_W'(1))
                              : (x_fire && x_last && NTAPS == 1);

  fir_design1a #(.NTAPS(NTAPS), .DATA_W(DATA_W), .ACC_W(ACC_W)) u_array (
    .clk    (clk),
    .rst_n  (rst_n),
    .w_load (h_load),
    .w_in   (w_sel),
    .clr    (h_load),
    .x_valid(arr_valid),
    .x_in   (arr_x),
    .y_out  (arr_y)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flush_cnt_q <= '0;
      y_valid     <= 1'b0;
      y_data      <= '0;
      y_last      <= 1'b0;
    end else if (h_load) begin
      flush_cnt_q <= '0;
      y_valid     <= 1'b0;
      y_last      <= 1'b0;
    end else begin
      if (flushing)                  flush_cnt_q <= flush_cnt_q - 1'b1;
      else if (x_fire && x_last)     flush_cnt_q <= CNT_W'(NTAPS - 1);
      y_valid <= arr_valid;
      y_last  <= last_step;
      if (arr_valid) y_data <= arr_y;
    end
  end

  // A new h may only be loaded between samples.
  a_no_load_with_sample : assert property (@(posedge clk) disable iff (!rst_n)
    !(h_load && x_valid))
    else $error("conv_corr_unit: h_load together with x_valid");

endmodule
