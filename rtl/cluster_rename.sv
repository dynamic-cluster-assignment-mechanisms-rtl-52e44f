// cluster_rename: register renaming for two clusters with one map table.
//
// Each cluster has its own physical register file, so the map entry of a
// logical register has one field per cluster (valid bit + physical
// register). An integer register may be mapped in both clusters at once
// (a replica); an FP register only ever lives in the FP cluster.
//
// For each instruction of the group, in program order, given the cluster
// chosen by the steering logic:
//  * a source mapped in the chosen cluster is read from there;
//  * a source mapped only in the other cluster gets a new physical register
//    in the chosen cluster and a copy instruction is emitted (cp1/cp2) that
//    moves the value across; the map entry then shows both fields valid, so
//    later readers in that cluster share the replica;
//  * the destination gets a new physical register in the chosen cluster and
//    its map entry keeps only that field. The previous mappings of both
//    fields are returned (old_int/old_fp) and released when the
//    instruction commits (free_i).
// Earlier instructions of the same group are seen by later ones.
//
// The two-field map and copy insertion follow the document. The reset
// mapping (integer register r in INT register r, FP register 32+r in FP
// register r), stalling the whole group when any cluster runs out of
// registers, and the absence of branch recovery (not described) are this
// design's choices.
//
// Timing: ready_o and ren_o are combinational from dec_i and cl_i. When
// fire (ready_o and a valid slot) the map table and free lists update at the
// clock edge. loc_o shows, per logical register, which clusters hold a
// mapping (bit c set for cluster c), for the steering logic.
module cluster_rename
  import dcs_pkg::*;
#(
  parameter int unsigned W      = 8,   // decode/rename width
  parameter int unsigned RET_W  = 8,   // retire width (release ports)
  parameter int unsigned N_PHYS = 96   // physical registers per cluster
) (
  input  logic        clk,
  input  logic        rst_n,
  input  dec_inst_t   dec_i   [W],
  input  cluster_e    cl_i    [W],
  input  logic        disp_ready_i,  // issue queues can take the group
  output logic        ready_o,       // group is accepted this cycle
  output logic        fire_o,        // ready_o and at least one valid slot
  output ren_inst_t   ren_o   [W],
  output logic [1:0]  loc_o   [N_LOG],
  input  free_req_t   free_i  [RET_W],
  output logic [PREG_W:0] n_free_int_o,
  output logic [PREG_W:0] n_free_fp_o
);

  // Map table: valid bit and physical register per cluster.
  logic [1:0] v_q [N_LOG];
  preg_t      p_q [N_LOG][2];

  logic [N_PHYS-1:0] free_v [2];
  logic [N_PHYS-1:0] alloc  [2];
  logic              rel_v  [2][RET_W];
  preg_t             rel_p  [2][RET_W];

  always_comb begin
    for (int r = 0; r < int'(RET_W); r++) begin
      rel_v[CL_INT][r] = free_i[r].int_v;
      rel_p[CL_INT][r] = free_i[r].int_p;
      rel_v[CL_FP][r]  = free_i[r].fp_v;
      rel_p[CL_FP][r]  = free_i[r].fp_p;
    end
  end

  free_list #(.N_PHYS(N_PHYS), .N_USED(N_INT_LOG), .NREL(RET_W)) u_free_int (
    .clk, .rst_n, .free_o(free_v[CL_INT]), .alloc_i(fire_o ? alloc[CL_INT] : '0),
    .rel_v_i(rel_v[CL_INT]), .rel_p_i(rel_p[CL_INT]), .n_free_o(n_free_int_o)
  );

  free_list #(.N_PHYS(N_PHYS), .N_USED(N_LOG - N_INT_LOG), .NREL(RET_W)) u_free_fp (
    .clk, .rst_n, .free_o(free_v[CL_FP]), .alloc_i(fire_o ? alloc[CL_FP] : '0),
    .rel_v_i(rel_v[CL_FP]), .rel_p_i(rel_p[CL_FP]), .n_free_o(n_free_fp_o)
  );

  // Local working copies, updated slot by slot.
  logic [1:0]        v_l [N_LOG];
  preg_t             p_l [N_LOG][2];
  logic [N_PHYS-1:0] fr_l [2];
  logic              ok, any_v;

  // Lowest free register in a free vector: {found, index}.
  function automatic logic [PREG_W:0] pick(logic [N_PHYS-1:0] fr);
    logic [PREG_W:0] r = '0;
    for (int i = int'(N_PHYS) - 1; i >= 0; i--)
      if (fr[i]) r = {1'b1, PREG_W'(i)};
    return r;
  endfunction

  always_comb begin
    v_l    = v_q;
    p_l    = p_q;
    fr_l   = free_v;
    alloc[0] = '0;
    alloc[1] = '0;
    ok     = 1'b1;
    any_v  = 1'b0;
    for (int j = 0; j < int'(W); j++) begin
      automatic cluster_e c = cl_i[j];
      automatic cluster_e o = cluster_e'(~cl_i[j]);
      automatic preg_t    np;
      automatic logic     got;
      ren_o[j] = '0;
      if (dec_i[j].valid) begin
        any_v = 1'b1;
        ren_o[j].valid = 1'b1;
        ren_o[j].cl    = c;
        // source 1
        if (dec_i[j].src1_v) begin
          ren_o[j].ps1_v = 1'b1;
          if (!v_l[dec_i[j].src1][c]) begin
            {got, np} = pick(fr_l[c]);
            if (got) begin
              fr_l[c][np]  = 1'b0;
              alloc[c][np] = 1'b1;
            end else ok = 1'b0;
            ren_o[j].cp1_v = 1'b1;
            ren_o[j].cp1   = '{dst_cl: c, src_p: p_l[dec_i[j].src1][o], dst_p: np};
            v_l[dec_i[j].src1][c] = 1'b1;
            p_l[dec_i[j].src1][c] = np;
          end
          ren_o[j].ps1 = p_l[dec_i[j].src1][c];
        end
        // source 2
        if (dec_i[j].src2_v) begin
          ren_o[j].ps2_v = 1'b1;
          if (!v_l[dec_i[j].src2][c]) begin
            {got, np} = pick(fr_l[c]);
            if (got) begin
              fr_l[c][np]  = 1'b0;
              alloc[c][np] = 1'b1;
            end else ok = 1'b0;
            ren_o[j].cp2_v = 1'b1;
            ren_o[j].cp2   = '{dst_cl: c, src_p: p_l[dec_i[j].src2][o], dst_p: np};
            v_l[dec_i[j].src2][c] = 1'b1;
            p_l[dec_i[j].src2][c] = np;
          end
          ren_o[j].ps2 = p_l[dec_i[j].src2][c];
        end
        // destination
        if (dec_i[j].dst_v) begin
          ren_o[j].old_int_v = v_l[dec_i[j].dst][CL_INT];
          ren_o[j].old_int   = p_l[dec_i[j].dst][CL_INT];
          ren_o[j].old_fp_v  = v_l[dec_i[j].dst][CL_FP];
          ren_o[j].old_fp    = p_l[dec_i[j].dst][CL_FP];
          {got, np} = pick(fr_l[c]);
          if (got) begin
            fr_l[c][np]  = 1'b0;
            alloc[c][np] = 1'b1;
          end else ok = 1'b0;
          ren_o[j].pd_v = 1'b1;
          ren_o[j].pd   = np;
          v_l[dec_i[j].dst]    = '0;
          v_l[dec_i[j].dst][c] = 1'b1;
          p_l[dec_i[j].dst][c] = np;
        end
      end
    end
    ready_o = ok && disp_ready_i;
    fire_o  = ready_o && any_v;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < int'(N_LOG); r++) begin
        if (r < int'(N_INT_LOG)) begin
          v_q[r]         <= 2'b01;
          p_q[r][CL_INT] <= PREG_W'(r);
          p_q[r][CL_FP]  <= '0;
        end else begin
          v_q[r]         <= 2'b10;
          p_q[r][CL_INT] <= '0;
          p_q[r][CL_FP]  <= PREG_W'(r - int'(N_INT_LOG));
        end
      end
    end else if (fire_o) begin
      v_q <= v_l;
      p_q <= p_l;
    end
  end

  always_comb
    for (int r = 0; r < int'(N_LOG); r++) loc_o[r] = v_q[r];

  // Every logical register always has at least one mapping.
  always_ff @(posedge clk)
    if (rst_n)
      for (int r = 0; r < int'(N_LOG); r++)
        assert (v_q[r] != 2'b00) else $error("cluster_rename: register %0d unmapped", r);

endmodule
