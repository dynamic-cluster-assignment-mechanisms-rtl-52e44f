// steering_logic: decides, for each instruction of a decode group, which of
// the two clusters executes it.
//
// Rules common to all schemes: an instruction that is an FP operation or
// names an FP register goes to the FP cluster; an integer multiply/divide
// goes to the INT cluster. Every other instruction may go to either, and
// the selected scheme decides:
//
//  * general balance (SCH_GENERAL_BAL, the default): send it to the least
//    loaded cluster when the imbalance is strong or when both clusters hold
//    the same number of its source operands; otherwise to the cluster that
//    holds more of them.
//  * slice (SCH_SLICE): instructions of the LdSt (or Br) slice go to INT,
//    the rest to FP.
//  * non-slice balance (SCH_NONSLICE_BAL): slice instructions go to INT,
//    the rest follow the general balance rule.
//  * slice balance (SCH_SLICE_BAL): a slice instruction goes to the cluster
//    the cluster table maps its slice to. If the imbalance is strong and that
//    cluster is the more loaded one, the whole slice is remapped to the other
//    cluster and the instruction follows it. Other instructions follow the
//    general balance rule.
//  * priority slice balance (SCH_PRIO_SLICE_BAL): as slice balance, but only
//    slices flagged critical are treated as slices.
//
// Slice detection: a load/store address calculation (kind LDST) or a branch
// (kind BR) always belongs to its own slice. Any other instruction belongs
// to the slice the slice table records for its PC. An instruction in a slice
// writes that slice's ID into the slice table entries of its parents (for a
// load or store only through the address operand), found through the parent
// table. This propagation runs at decode.
//
// The imbalance counter comes from balance_monitor. Inside a group each
// instruction sees the counter moved by one step per earlier instruction
// (+1 to FP, -1 to INT), and the operand locations updated by the earlier
// instructions' destinations and copies. A strong imbalance is
// |counter| > BAL_THRESH; the least loaded cluster is INT when the counter
// is positive, FP otherwise.
//
// The rules and the constants N = 16 and threshold 8 follow the document.
// The tie-breaks, decode-time propagation and the INT reset mapping of
// slices are this design's choices.
//
// Interface: decisions (info_o) are combinational from dec_i, loc_i and the
// table state. Every state update (tables, counter, threshold counts) is
// made only when fire_i is high, i.e. when the group is accepted.
module steering_logic
  import dcs_pkg::*;
#(
  parameter int unsigned W           = 8,    // decode width
  parameter int unsigned BAL_N       = 16,   // I2 averaging window
  parameter int unsigned BAL_THRESH  = 8,    // strong imbalance threshold
  parameter int unsigned BAL_CNT_W   = 8,    // imbalance counter width
  parameter int unsigned ISSUE_W     = 4,    // issue width per cluster
  parameter int unsigned READY_W     = 7,    // ready count width
  parameter int unsigned ENTRIES     = 1024, // slice / cluster table entries
  parameter int unsigned NEV         = 2,    // miss/mispredict event ports
  parameter int unsigned MISS_W      = 8,    // miss counter / threshold width
  parameter int unsigned PERIOD_W    = 13,   // threshold period 2**13 cycles
  parameter int unsigned ACC_W       = 16    // critical instruction counters
) (
  input  logic              clk,
  input  logic              rst_n,
  input  scheme_e           scheme_i,
  input  slice_kind_e       kind_i,
  input  dec_inst_t         dec_i    [W],
  input  logic [1:0]        loc_i    [N_LOG],  // bit c: logical reg mapped in cluster c
  input  logic              fire_i,
  input  logic [READY_W-1:0] ready_int_i,
  input  logic [READY_W-1:0] ready_fp_i,
  input  logic              ev_v_i   [NEV],
  input  pc_t               ev_pc_i  [NEV],
  output steer_info_t       info_o   [W],
  output logic signed [BAL_CNT_W-1:0] bal_cnt_o,
  output logic [MISS_W-1:0] thresh_o,
  output logic              i2_imbal_o,
  output logic              period_end_o
);

  localparam int unsigned IDX_W = $clog2(ENTRIES);
  localparam int unsigned NW    = $clog2(W + 1);
  localparam int unsigned NWR   = 3 * W;
  localparam int unsigned DW    = NW + 1;  // signed I1 delta of a group

  // ---------------------------------------------------------------- tables
  logic             par1_v [W], par2_v [W];
  pc_t              par1 [W], par2 [W];
  pc_t              st_rd_pc [W];
  logic             st_rd_v [W];
  logic [IDX_W-1:0] st_rd_id [W];
  logic             st_wr_v [NWR];
  pc_t              st_wr_pc [NWR];
  logic [IDX_W-1:0] st_wr_id [NWR];
  logic [IDX_W-1:0] ct_rd_id [W];
  cluster_e         ct_rd_cl [W];
  logic             ct_rd_crit [W];
  logic             rm_v [W], rm_hit [W];
  logic [IDX_W-1:0] rm_id [W];
  cluster_e         rm_cl [W];
  logic signed [DW-1:0] i1_delta;
  logic [NW-1:0]    n_crit, n_noncrit;

  parent_table #(.W(W)) u_parent (
    .clk, .rst_n, .dec_i, .we_i(fire_i),
    .par1_v_o(par1_v), .par1_o(par1), .par2_v_o(par2_v), .par2_o(par2)
  );

  slice_table #(.W(W), .NWR(NWR), .ENTRIES(ENTRIES)) u_slice (
    .clk, .rst_n, .rd_pc_i(st_rd_pc), .rd_v_o(st_rd_v), .rd_id_o(st_rd_id),
    .wr_v_i(st_wr_v), .wr_pc_i(st_wr_pc), .wr_id_i(st_wr_id)
  );

  cluster_table #(.W(W), .NEV(NEV), .ENTRIES(ENTRIES), .CNT_W(MISS_W)) u_cluster (
    .clk, .rst_n, .rd_id_i(ct_rd_id), .rd_cl_o(ct_rd_cl), .rd_crit_o(ct_rd_crit),
    .rm_v_i(rm_v), .rm_id_i(rm_id), .rm_cl_i(rm_cl),
    .ev_v_i, .ev_pc_i, .thresh_i(thresh_o)
  );

  balance_monitor #(.N(BAL_N), .ISSUE_W(ISSUE_W), .READY_W(READY_W),
                    .CNT_W(BAL_CNT_W), .DELTA_W(DW)) u_balance (
    .clk, .rst_n, .ready_int_i, .ready_fp_i, .i1_delta_i(i1_delta),
    .cnt_o(bal_cnt_o), .i2_avg_o(), .i2_imbal_o
  );

  crit_threshold #(.W(W), .PERIOD_W(PERIOD_W), .ACC_W(ACC_W), .THR_W(MISS_W)) u_thresh (
    .clk, .rst_n, .n_crit_i(n_crit), .n_noncrit_i(n_noncrit),
    .thresh_o, .period_end_o
  );

  // ------------------------------------------------------ per-slot decision
  logic             is_def   [W];
  logic             in_slice [W];
  logic [IDX_W-1:0] sl_id    [W];

  always_comb begin
    for (int j = 0; j < int'(W); j++) begin
      st_rd_pc[j] = dec_i[j].pc;
      is_def[j] = (kind_i == SLICE_LDST) ? (dec_i[j].op == OP_LOAD || dec_i[j].op == OP_STORE)
                                         : (dec_i[j].op == OP_BRANCH);
      in_slice[j] = is_def[j] || st_rd_v[j];
      sl_id[j]    = is_def[j] ? dec_i[j].pc[IDX_W+1:2] : st_rd_id[j];
      ct_rd_id[j] = sl_id[j];
    end
  end

  logic [1:0] loc_l [N_LOG];
  int         cnt_l;
  int         n_in_int, n_in_fp, d_sum, c_crit, c_non;
  cluster_e   least, ns_cl, slice_cl, cl;
  logic       strong_imb, treat;

  always_comb begin
    loc_l = loc_i;
    cnt_l = int'(bal_cnt_o);
    d_sum = 0;
    c_crit = 0;
    c_non  = 0;
    for (int j = 0; j < int'(W); j++) begin
      info_o[j] = '0;
      rm_hit[j] = 1'b0;
      rm_id[j]  = sl_id[j];
      rm_cl[j]  = CL_INT;
      // operand locations
      n_in_int = 0;
      n_in_fp  = 0;
      if (dec_i[j].src1_v) begin
        n_in_int += int'(loc_l[dec_i[j].src1][CL_INT]);
        n_in_fp  += int'(loc_l[dec_i[j].src1][CL_FP]);
      end
      if (dec_i[j].src2_v) begin
        n_in_int += int'(loc_l[dec_i[j].src2][CL_INT]);
        n_in_fp  += int'(loc_l[dec_i[j].src2][CL_FP]);
      end
      strong_imb = (cnt_l > int'(BAL_THRESH)) || (cnt_l < -int'(BAL_THRESH));
      least  = (cnt_l > 0) ? CL_INT : CL_FP;
      // general balance rule, also used for non-slice instructions
      if (strong_imb || n_in_int == n_in_fp) ns_cl = least;
      else                               ns_cl = (n_in_int > n_in_fp) ? CL_INT : CL_FP;
      // current mapping of this slice, including remaps earlier in the group
      slice_cl = ct_rd_cl[j];
      for (int k = 0; k < j; k++)
        if (rm_hit[k] && rm_id[k] == sl_id[j]) slice_cl = rm_cl[k];
      treat = in_slice[j] && ((scheme_i == SCH_SLICE_BAL) ||
                              (scheme_i == SCH_PRIO_SLICE_BAL && ct_rd_crit[j]));
      cl = ns_cl;
      unique case (scheme_i)
        SCH_SLICE:        cl = in_slice[j] ? CL_INT : CL_FP;
        SCH_NONSLICE_BAL: cl = in_slice[j] ? CL_INT : ns_cl;
        SCH_SLICE_BAL, SCH_PRIO_SLICE_BAL: begin
          if (treat) begin
            cl = slice_cl;
            if (strong_imb && slice_cl != least) begin
              cl = least;
              info_o[j].remap = dec_i[j].valid && !needs_fp(dec_i[j]) &&
                                dec_i[j].op != OP_COMPLEX;
            end
          end
        end
        default:          cl = ns_cl;
      endcase
      info_o[j].forced = 1'b1;
      if (needs_fp(dec_i[j]))            cl = CL_FP;
      else if (dec_i[j].op == OP_COMPLEX) cl = CL_INT;
      else                               info_o[j].forced = 1'b0;

      info_o[j].cl       = cl;
      info_o[j].in_slice = in_slice[j];
      info_o[j].as_slice = treat || (in_slice[j] &&
                           (scheme_i == SCH_SLICE || scheme_i == SCH_NONSLICE_BAL));
      info_o[j].strong_imb = strong_imb;
      rm_hit[j] = info_o[j].remap;
      rm_cl[j] = cl;

      if (dec_i[j].valid) begin
        // I1 step for the following instructions of the group
        cnt_l += (cl == CL_FP) ? 1 : -1;
        d_sum += (cl == CL_FP) ? 1 : -1;
        if (in_slice[j] && ct_rd_crit[j]) c_crit++;
        else                              c_non++;
        // operand locations seen by the following instructions
        if (dec_i[j].src1_v) loc_l[dec_i[j].src1][cl] = 1'b1;
        if (dec_i[j].src2_v) loc_l[dec_i[j].src2][cl] = 1'b1;
        if (dec_i[j].dst_v) begin
          loc_l[dec_i[j].dst]     = '0;
          loc_l[dec_i[j].dst][cl] = 1'b1;
        end
      end
    end
  end

  // State updates only for an accepted group.
  always_comb begin
    i1_delta  = fire_i ? DW'(d_sum) : '0;
    n_crit    = fire_i ? NW'(c_crit) : '0;
    n_noncrit = fire_i ? NW'(c_non) : '0;
    for (int j = 0; j < int'(W); j++) rm_v[j] = rm_hit[j] && fire_i;
  end

  // ------------------------------------------------- slice table updates
  always_comb begin
    for (int j = 0; j < int'(W); j++) begin
      st_wr_v[3*j]    = fire_i && dec_i[j].valid && is_def[j];
      st_wr_pc[3*j]   = dec_i[j].pc;
      st_wr_id[3*j]   = sl_id[j];
      st_wr_v[3*j+1]  = fire_i && dec_i[j].valid && in_slice[j] && par1_v[j];
      st_wr_pc[3*j+1] = par1[j];
      st_wr_id[3*j+1] = sl_id[j];
      st_wr_v[3*j+2]  = fire_i && dec_i[j].valid && in_slice[j] && par2_v[j] &&
                        dec_i[j].op != OP_LOAD && dec_i[j].op != OP_STORE;
      st_wr_pc[3*j+2] = par2[j];
      st_wr_id[3*j+2] = sl_id[j];
    end
  end

endmodule
