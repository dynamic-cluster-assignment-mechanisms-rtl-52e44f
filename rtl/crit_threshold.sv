// crit_threshold: adaptive criticality threshold of the priority slice
// balance steering.
//
// A slice is critical when the miss/mispredict count of its defining
// instruction exceeds this threshold. The threshold is tuned so that about
// half of the instructions belong to critical slices: a 13-bit cycle counter
// marks periods of 8192 cycles; during a period the instructions steered as
// members of a critical slice and the other instructions are counted in two
// saturating 16-bit counters. At the end of the period, if the critical
// count is above half of the total, the threshold is incremented,
// otherwise decremented (both saturate), and the counters restart.
// The period, the counter widths and the rule follow the document; counting
// at dispatch, the threshold width and its reset value (0) are this
// design's choices.
//
// Timing: the threshold changes at the clock edge that ends a period; the
// counts given in that last cycle belong to the period that ends.
module crit_threshold #(
  parameter int unsigned W        = 8,   // decode width
  parameter int unsigned PERIOD_W = 13,  // period = 2**PERIOD_W cycles
  parameter int unsigned ACC_W    = 16,  // instruction counters
  parameter int unsigned THR_W    = 8,   // threshold register
  localparam int unsigned NW      = $clog2(W + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NW-1:0]    n_crit_i,     // critical-slice instructions this cycle
  input  logic [NW-1:0]    n_noncrit_i,  // other instructions this cycle
  output logic [THR_W-1:0] thresh_o,
  output logic             period_end_o  // high in the last cycle of a period
);

  logic [PERIOD_W-1:0] cyc_q;
  logic [ACC_W-1:0]    crit_q, non_q;
  logic [THR_W-1:0]    thr_q;
  logic [ACC_W:0]      crit_sum, non_sum;
  logic [ACC_W-1:0]    crit_fin, non_fin;
  logic [ACC_W:0]      total;

  function automatic logic [ACC_W-1:0] sat(logic [ACC_W:0] v);
    return v[ACC_W] ? '1 : v[ACC_W-1:0];
  endfunction

  always_comb begin
    crit_sum = {1'b0, crit_q} + (ACC_W+1)'(n_crit_i);
    non_sum  = {1'b0, non_q}  + (ACC_W+1)'(n_noncrit_i);
    crit_fin = sat(crit_sum);
    non_fin  = sat(non_sum);
    total    = {1'b0, crit_fin} + {1'b0, non_fin};
    period_end_o = (cyc_q == '1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc_q  <= '0;
      crit_q <= '0;
      non_q  <= '0;
      thr_q  <= '0;
    end else begin
      cyc_q <= cyc_q + 1'b1;
      if (period_end_o) begin
        crit_q <= '0;
        non_q  <= '0;
        if ((ACC_W+1)'(crit_fin) > (total >> 1)) begin
          if (thr_q != '1) thr_q <= thr_q + 1'b1;
        end else begin
          if (thr_q != '0) thr_q <= thr_q - 1'b1;
        end
      end else begin
        crit_q <= crit_fin;
        non_q  <= non_fin;
      end
    end
  end

  assign thresh_o = thr_q;

endmodule
