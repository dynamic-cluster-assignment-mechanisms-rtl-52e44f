// dcs_dispatch: dispatch stage of a two-cluster superscalar processor with
// dynamic cluster assignment.
//
// Decoded instructions arrive in groups of W. For each one the steering
// logic picks a cluster (INT or FP) under the selected partitioning scheme;
// the renamer then maps its registers onto that cluster's physical register
// file and inserts copy instructions for operands that live only in the
// other cluster. The renamed group, with its copies, goes to the two
// clusters' instruction queues, which sit outside this block together with
// the register files, functional units, caches and commit logic.
//
//   dec_i --> steering_logic --cl--> cluster_rename --> ren_o (+ copies)
//                ^    ^                  |
//                |    +---- loc (which cluster holds each register)
//                +-- ready counts of both queues, miss/mispredict events
//
// Interface and timing:
//  * dec_i is held by the sender until dec_ready_o is high; a group is taken
//    in the cycle dec_ready_o is high (all or nothing). dec_ready_o drops
//    when the queues are full (disp_ready_i low) or a cluster lacks free
//    physical registers.
//  * ren_o/info_o are combinational and valid in the cycle the group is
//    taken.
//  * free_i returns the old mappings of committing instructions.
//  * ready_int_i/ready_fp_i are the ready-instruction counts of the two
//    queues this cycle; ev_v_i/ev_pc_i report the PCs of loads that missed
//    in the cache (LdSt slices) or branches that were mispredicted (Br
//    slices).
// Defaults follow the machine the design is built for: 8-wide decode and
// retire, 4-wide issue per cluster, 64-entry queues, 96 physical registers
// per cluster.
module dcs_dispatch
  import dcs_pkg::*;
#(
  parameter int unsigned W          = 8,
  parameter int unsigned RET_W      = 8,
  parameter int unsigned N_PHYS     = 96,
  parameter int unsigned ISSUE_W    = 4,
  parameter int unsigned READY_W    = 7,
  parameter int unsigned BAL_N      = 16,
  parameter int unsigned BAL_THRESH = 8,
  parameter int unsigned BAL_CNT_W  = 8,
  parameter int unsigned ENTRIES    = 1024,
  parameter int unsigned NEV        = 2,
  parameter int unsigned MISS_W     = 8,
  parameter int unsigned PERIOD_W   = 13,
  parameter int unsigned ACC_W      = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  scheme_e            scheme_i,
  input  slice_kind_e        kind_i,
  input  dec_inst_t          dec_i   [W],
  output logic               dec_ready_o,
  input  logic               disp_ready_i,
  output ren_inst_t          ren_o   [W],
  output steer_info_t        info_o  [W],
  output logic               fire_o,
  input  logic [READY_W-1:0] ready_int_i,
  input  logic [READY_W-1:0] ready_fp_i,
  input  logic               ev_v_i  [NEV],
  input  pc_t                ev_pc_i [NEV],
  input  free_req_t          free_i  [RET_W],
  output logic signed [BAL_CNT_W-1:0] bal_cnt_o,
  output logic [MISS_W-1:0]  thresh_o,
  output logic               i2_imbal_o,
  output logic               period_end_o,
  output logic [PREG_W:0]    n_free_int_o,
  output logic [PREG_W:0]    n_free_fp_o
);

  logic [1:0] loc [N_LOG];
  cluster_e   cl  [W];

  steering_logic #(
    .W(W), .BAL_N(BAL_N), .BAL_THRESH(BAL_THRESH), .BAL_CNT_W(BAL_CNT_W),
    .ISSUE_W(ISSUE_W), .READY_W(READY_W), .ENTRIES(ENTRIES), .NEV(NEV),
    .MISS_W(MISS_W), .PERIOD_W(PERIOD_W), .ACC_W(ACC_W)
  ) u_steer (
    .clk, .rst_n, .scheme_i, .kind_i, .dec_i, .loc_i(loc), .fire_i(fire_o),
    .ready_int_i, .ready_fp_i, .ev_v_i, .ev_pc_i, .info_o,
    .bal_cnt_o, .thresh_o, .i2_imbal_o, .period_end_o
  );

  always_comb
    for (int j = 0; j < int'(W); j++) cl[j] = info_o[j].cl;

  cluster_rename #(.W(W), .RET_W(RET_W), .N_PHYS(N_PHYS)) u_rename (
    .clk, .rst_n, .dec_i, .cl_i(cl), .disp_ready_i, .ready_o(dec_ready_o),
    .fire_o, .ren_o, .loc_o(loc), .free_i, .n_free_int_o, .n_free_fp_o
  );

endmodule
