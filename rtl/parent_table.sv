// parent_table: for each logical register, the PC of the last decoded
// instruction that writes it.
//
// The slice steering schemes use it to find the parents of an instruction in
// the register dependence graph: the parent of a source operand is the last
// decoded instruction that named that register as its destination. The table
// and its contents follow the document.
//
// The table serves a whole decode group of W instructions at once. Each
// instruction's sources are looked up with in-group forwarding: if an
// earlier instruction of the same group writes the register, its PC is
// returned instead of the table entry. When we_i is high the group's
// destinations are written (the last writer in the group wins), visible
// from the next cycle. An entry that was never written reports no parent.
module parent_table
  import dcs_pkg::*;
#(
  parameter int unsigned W = 8  // decode width
) (
  input  logic      clk,
  input  logic      rst_n,
  input  dec_inst_t dec_i   [W],
  input  logic      we_i,            // commit the group's destinations
  output logic      par1_v_o [W],    // src1 has a known parent
  output pc_t       par1_o   [W],
  output logic      par2_v_o [W],
  output pc_t       par2_o   [W]
);

  logic v_q  [N_LOG];
  pc_t  pc_q [N_LOG];

  always_comb begin
    for (int j = 0; j < int'(W); j++) begin
      par1_v_o[j] = dec_i[j].src1_v && v_q[dec_i[j].src1];
      par1_o[j]   = pc_q[dec_i[j].src1];
      par2_v_o[j] = dec_i[j].src2_v && v_q[dec_i[j].src2];
      par2_o[j]   = pc_q[dec_i[j].src2];
      for (int k = 0; k < j; k++) begin
        if (dec_i[k].valid && dec_i[k].dst_v) begin
          if (dec_i[j].src1_v && dec_i[k].dst == dec_i[j].src1) begin
            par1_v_o[j] = 1'b1;
            par1_o[j]   = dec_i[k].pc;
          end
          if (dec_i[j].src2_v && dec_i[k].dst == dec_i[j].src2) begin
            par2_v_o[j] = 1'b1;
            par2_o[j]   = dec_i[k].pc;
          end
        end
      end
      if (!dec_i[j].valid) begin
        par1_v_o[j] = 1'b0;
        par2_v_o[j] = 1'b0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < int'(N_LOG); r++) begin
        v_q[r]  <= 1'b0;
        pc_q[r] <= '0;
      end
    end else if (we_i) begin
      for (int j = 0; j < int'(W); j++) begin
        if (dec_i[j].valid && dec_i[j].dst_v) begin
          v_q[dec_i[j].dst]  <= 1'b1;
          pc_q[dec_i[j].dst] <= dec_i[j].pc;
        end
      end
    end
  end

endmodule
