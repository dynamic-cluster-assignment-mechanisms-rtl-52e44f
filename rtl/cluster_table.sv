// cluster_table: per-slice state of the slice balance schemes.
//
// Indexed by slice ID (the table index of the slice's defining instruction).
// Each entry holds:
//  * cl   - the cluster the slice is currently mapped to (reset: INT),
//  * cnt  - a saturating count of the cache misses (LdSt slices) or branch
//           mispredictions (Br slices) of the defining instruction,
//  * crit - the slice is critical.
// The cluster field and the count/flag extension follow the document. The
// count width, the reset mapping and the moment the flag is evaluated are
// this design's choices: crit is recomputed whenever a miss/mispredict event
// updates the count, as (new count > threshold).
//
// Ports: W combinational read ports, W remap write ports (move a slice to a
// cluster) and NEV event ports carrying the PC of the instruction that
// missed or mispredicted. All writes take effect at the clock edge; among
// remaps of one entry in the same cycle the higher-numbered port wins.
// Events to one entry in the same cycle count once.
module cluster_table
  import dcs_pkg::*;
#(
  parameter int unsigned W       = 8,
  parameter int unsigned NEV     = 2,     // miss/mispredict event ports
  parameter int unsigned ENTRIES = 1024,  // same as the slice table
  parameter int unsigned CNT_W   = 8,     // miss/mispredict counter width
  localparam int unsigned IDX_W  = $clog2(ENTRIES)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [IDX_W-1:0] rd_id_i   [W],
  output cluster_e         rd_cl_o   [W],
  output logic             rd_crit_o [W],
  input  logic             rm_v_i    [W],
  input  logic [IDX_W-1:0] rm_id_i   [W],
  input  cluster_e         rm_cl_i   [W],
  input  logic             ev_v_i    [NEV],
  input  pc_t              ev_pc_i   [NEV],
  input  logic [CNT_W-1:0] thresh_i
);

  // The fields are plain memories without reset. Two flip-flop vectors with
  // reset tell which entries have been remapped (cl_set) or have seen an
  // event (ev_set); an untouched entry reads as INT / count 0 / not critical.
  cluster_e           cl_q   [ENTRIES];
  logic [CNT_W-1:0]   cnt_q  [ENTRIES];
  logic               crit_q [ENTRIES];
  logic [ENTRIES-1:0] cl_set, ev_set, cl_mask, ev_mask;

  always_comb begin
    for (int j = 0; j < int'(W); j++) begin
      rd_cl_o[j]   = cl_set[rd_id_i[j]] ? cl_q[rd_id_i[j]] : CL_INT;
      rd_crit_o[j] = ev_set[rd_id_i[j]] && crit_q[rd_id_i[j]];
    end
  end

  logic [IDX_W-1:0] ev_idx [NEV];
  logic [CNT_W-1:0] ev_old [NEV];
  logic [CNT_W-1:0] ev_new [NEV];
  always_comb begin
    cl_mask = '0;
    ev_mask = '0;
    for (int j = 0; j < int'(W); j++)
      if (rm_v_i[j]) cl_mask[rm_id_i[j]] = 1'b1;
    for (int e = 0; e < int'(NEV); e++) begin
      ev_idx[e] = ev_pc_i[e][IDX_W+1:2];
      ev_old[e] = ev_set[ev_idx[e]] ? cnt_q[ev_idx[e]] : '0;
      ev_new[e] = (ev_old[e] == '1) ? ev_old[e] : ev_old[e] + 1'b1;
      if (ev_v_i[e]) ev_mask[ev_idx[e]] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cl_set <= '0;
      ev_set <= '0;
    end else begin
      cl_set <= cl_set | cl_mask;
      ev_set <= ev_set | ev_mask;
    end
  end

  always_ff @(posedge clk) begin
    for (int j = 0; j < int'(W); j++)
      if (rm_v_i[j]) cl_q[rm_id_i[j]] <= rm_cl_i[j];
    for (int e = 0; e < int'(NEV); e++)
      if (ev_v_i[e]) begin
        cnt_q[ev_idx[e]]  <= ev_new[e];
        crit_q[ev_idx[e]] <= ev_new[e] > thresh_i;
      end
  end

endmodule
