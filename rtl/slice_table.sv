// slice_table: PC-indexed table that records which backward slice each
// static instruction belongs to.
//
// A slice is named by the instruction that defines it (a load/store address
// calculation or a branch); its ID is that instruction's table index. An
// entry holds a valid bit and the slice ID. At reset no instruction belongs
// to any slice. The LdSt/Br slice steering schemes only need the valid bit
// (the one-bit "in slice" flag); the slice balance schemes use the ID too.
//
// The table is direct mapped and untagged, indexed by PC bits
// [IDX_W+1:2] (4-byte instructions). Its size and the lack of tags are this
// design's choices: the document gives no size. Aliasing between
// instructions that share an index only changes steering, never
// correctness.
//
// Ports: W combinational read ports (one per decode slot) and NWR write
// ports. Writes take effect at the clock edge; when two ports write the
// same entry in one cycle, the higher-numbered port wins.
module slice_table
  import dcs_pkg::*;
#(
  parameter int unsigned W       = 8,     // read ports (decode width)
  parameter int unsigned NWR     = 24,    // write ports (3 per decode slot)
  parameter int unsigned ENTRIES = 1024,  // table entries, power of two
  localparam int unsigned IDX_W  = $clog2(ENTRIES)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  pc_t              rd_pc_i [W],
  output logic             rd_v_o  [W],
  output logic [IDX_W-1:0] rd_id_o [W],
  input  logic             wr_v_i  [NWR],
  input  pc_t              wr_pc_i [NWR],
  input  logic [IDX_W-1:0] wr_id_i [NWR]
);

  // Valid bits are flip-flops with reset; the IDs form a plain memory that
  // needs no reset because an entry is only read once its valid bit is set.
  logic [ENTRIES-1:0] v_q, set_mask;
  logic [IDX_W-1:0]   id_q [ENTRIES];

  always_comb begin
    for (int j = 0; j < int'(W); j++) begin
      rd_v_o[j]  = v_q[rd_pc_i[j][IDX_W+1:2]];
      rd_id_o[j] = id_q[rd_pc_i[j][IDX_W+1:2]];
    end
    set_mask = '0;
    for (int p = 0; p < int'(NWR); p++)
      if (wr_v_i[p]) set_mask[wr_pc_i[p][IDX_W+1:2]] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_q <= '0;
    else        v_q <= v_q | set_mask;
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < int'(NWR); p++)
      if (wr_v_i[p]) id_q[wr_pc_i[p][IDX_W+1:2]] <= wr_id_i[p];
  end

endmodule
