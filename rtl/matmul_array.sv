// matmul_array: N x N matrix product C = A * B on an N x N systolic array of
// mm_pe processors (N = 2 by default).
//
// Space-time mapping: the 3-D dependence graph with nodes (i,j,k) is projected
// along d = (0,0,1) onto processors (i,j) and scheduled with s^T = (1,1,1),
// so node (i,j,k) runs at step i+j+k. A enters from the left: row i receives
// a(i,k) at step i+k. B enters from the top: column j receives b(k,j) at step
// j+k. Each processor passes a to the right and b downwards with one register
// each, so a(i,k) and b(k,j) meet in processor (i,j) at step i+j+k, where
// c(i,j) accumulates. The whole product takes 3N-2 steps with every
// processor used on N of them. The recurrence and the matrix size follow the
// published design; the projection and schedule vectors, the operand
// registers and the sequencer are this design's own choices.
//
// Interface and timing:
//   start : sampled when not busy; captures a_mat and b_mat and clears the
//           processors. The 3N-2 steps run on the next 3N-2 clock edges.
//   done  : one-cycle pulse after the edge of the last step, i.e. 3N-2 edges
//           after the edge that sampled start (4 for N = 2). c_mat is then
//           valid and stays so until the next start.
//   busy  : high from the edge after start until the edge of the last step.
module matmul_array
  import systolic_pkg::*;
#(
  parameter int unsigned N      = 2,
  parameter int unsigned DATA_W = DEFAULT_DATA_W,
  parameter int unsigned ACC_W  = acc_width(DATA_W, N)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic signed [DATA_W-1:0] a_mat [N][N],
  input  logic signed [DATA_W-1:0] b_mat [N][N],
  output logic                     busy,
  output logic                     done,
  output logic signed [ACC_W-1:0]  c_mat [N][N]
);

  localparam int unsigned STEPS = 3 * N - 2;
  localparam int unsigned T_W   = $clog2(STEPS + 1);

  logic signed [DATA_W-1:0] a_q [N][N];
  logic signed [DATA_W-1:0] b_q [N][N];
  logic [T_W-1:0]           step_q;
  logic                     launch;
  logic                     last_step;

  // Operands entering at the array edges in the current step.
  logic signed [DATA_W-1:0] a_edge [N];
  logic signed [DATA_W-1:0] b_edge [N];

  // Links between processors: a_lnk[i][j] enters processor (i,j) from the
  // left, b_lnk[i][j] enters it from above.
  logic signed [DATA_W-1:0] a_lnk [N][N+1];
  logic signed [DATA_W-1:0] b_lnk [N+1][N];

  assign launch    = start && !busy;
  assign last_step = busy && (step_q == T_W'(STEPS - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      step_q <= '0;
      for (int i = 0; i < N; i++) begin
        for (int j = 0; j < N; j++) begin
          a_q[i][j] <= '0;
          b_q[i][j] <= '0;
        end
      end
    end else begin
      done <= last_step;
      if (launch) begin
        busy   <= 1'b1;
        step_q <= '0;
        a_q    <= a_mat;
        b_q    <= b_mat;
      end else if (busy) begin
        step_q <= step_q + 1'b1;
        if (last_step) busy <= 1'b0;
      end
    end
  end

  // Skewed feed: row i gets a(i, t-i), column j gets b(t-j, j), else zero.
  always_comb begin
    for (int r = 0; r < N; r++) begin
      a_edge[r] = '0;
      b_edge[r] = '0;
      for (int k = 0; k < N; k++) begin
        if (int'(step_q) == r + k) begin
          a_edge[r] = a_q[r][k];
          b_edge[r] = b_q[k][r];
        end
      end
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_row
    assign a_lnk[i][0] = a_edge[i];
    assign b_lnk[0][i] = b_edge[i];
    for (genvar j = 0; j < N; j++) begin : g_col
      mm_pe #(.DATA_W(DATA_W), .ACC_W(ACC_W)) u_pe (
        .clk  (clk),
        .rst_n(rst_n),
        .clr  (launch),
        .en   (busy),
        .a_in (a_lnk[i][j]),
        .b_in (b_lnk[i][j]),
        .a_out(a_lnk[i][j+1]),
        .b_out(b_lnk[i+1][j]),
        .c_out(c_mat[i][j])
      );
    end
  end

  a_done_after_busy : assert property (@(posedge clk) disable iff (!rst_n)
    done |-> !busy)
    else $error("matmul_array: done while busy");

endmodule
