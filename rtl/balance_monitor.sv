// balance_monitor: the workload imbalance counter of the balance steering
// schemes.
//
// One signed counter estimates how much more work the FP cluster has than
// the INT cluster (positive: FP cluster more loaded). Two metrics feed it:
//  * I2, the instant imbalance in ready instructions. A cycle counts as
//    imbalanced only when one cluster has more ready instructions than its
//    issue width and the other has fewer; I2 is then ready_fp - ready_int,
//    else 0. The last N samples are kept in a window and their average
//    (sum / N, rounded toward minus infinity) is added to the counter every
//    cycle.
//  * I1, the difference in instructions steered to each cluster. The
//    steering logic passes the net count of the current dispatch group
//    (+1 per instruction sent to FP, -1 per instruction sent to INT) as
//    i1_delta. It applies the same per-instruction steps inside the group
//    itself, so each instruction of a group sees its own counter value.
// N = 16 and the 4-wide issue follow the document. The counter width, its
// saturation, the rounding of the average and the sign convention are this
// design's own choices.
//
// Timing: cnt_o is the registered counter; the update from the ready counts
// and i1_delta of cycle t is visible in cycle t+1.
module balance_monitor #(
  parameter int unsigned N        = 16,  // I2 averaging window (cycles), power of two
  parameter int unsigned ISSUE_W  = 4,   // issue width of each cluster
  parameter int unsigned READY_W  = 7,   // width of the ready counts (queue of 64)
  parameter int unsigned CNT_W    = 8,   // imbalance counter width, signed
  parameter int unsigned DELTA_W  = 5    // width of the signed I1 delta
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [READY_W-1:0]         ready_int_i,
  input  logic [READY_W-1:0]         ready_fp_i,
  input  logic signed [DELTA_W-1:0]  i1_delta_i,
  output logic signed [CNT_W-1:0]    cnt_o,
  output logic signed [READY_W:0]    i2_avg_o,   // current window average
  output logic                       i2_imbal_o  // this cycle counts as imbalanced
);

  localparam int unsigned LOGN  = $clog2(N);
  localparam int unsigned SUM_W = READY_W + 1 + LOGN;

  typedef logic signed [READY_W:0] sample_t;

  sample_t                  win_q [N];
  logic signed [SUM_W-1:0]  sum_q;
  logic signed [CNT_W-1:0]  cnt_q;
  sample_t                  i2;
  logic                     over_int, over_fp, under_int, under_fp;

  always_comb begin
    over_int  = ready_int_i > READY_W'(ISSUE_W);
    over_fp   = ready_fp_i  > READY_W'(ISSUE_W);
    under_int = ready_int_i < READY_W'(ISSUE_W);
    under_fp  = ready_fp_i  < READY_W'(ISSUE_W);
    i2_imbal_o = (over_int && under_fp) || (over_fp && under_int);
    i2 = i2_imbal_o ? (sample_t'({1'b0, ready_fp_i}) - sample_t'({1'b0, ready_int_i}))
                    : '0;
  end

  // Arithmetic shift divides by N, rounding toward minus infinity.
  logic signed [SUM_W-1:0] avg_full;
  assign avg_full = sum_q >>> LOGN;
  assign i2_avg_o = avg_full[READY_W:0];

  // Saturating counter update.
  localparam int signed CMAX = (1 <<< (CNT_W - 1)) - 1;
  localparam int signed CMIN = -(1 <<< (CNT_W - 1));
  logic signed [31:0] next_wide;
  always_comb begin
    next_wide = 32'(cnt_q) + 32'(i2_avg_o) + 32'(i1_delta_i);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N); i++) win_q[i] <= '0;
      sum_q <= '0;
      cnt_q <= '0;
    end else begin
      for (int i = int'(N) - 1; i > 0; i--) win_q[i] <= win_q[i-1];
      win_q[0] <= i2;
      sum_q    <= sum_q + SUM_W'(i2) - SUM_W'(win_q[N-1]);
      if (next_wide > CMAX)      cnt_q <= CNT_W'(CMAX);
      else if (next_wide < CMIN) cnt_q <= CNT_W'(CMIN);
      else                       cnt_q <= CNT_W'(next_wide);
    end
  end

  assign cnt_o = cnt_q;

endmodule
