// dcs_pkg: types and constants shared by the dynamic cluster steering
// dispatch stage.
//
// The machine has two clusters. Cluster INT holds the simple integer units
// plus the multiplier/divider. Cluster FP holds the floating-point units plus
// simple integer units. Simple integer work (ALU ops, address calculation of
// loads and stores, integer branches) may run in either cluster. The
// steering logic picks the cluster for each instruction at decode.
//
// Logical registers follow an Alpha-like split: 0..31 are integer and 32..63
// are floating point. FP registers live only in the FP cluster. Each
// cluster has 96 physical registers, as in the machine this design follows.
// The register split and the encodings below are this design's own choices.
package dcs_pkg;

  localparam int unsigned PC_W    = 32;  // instruction address width
  localparam int unsigned N_LOG   = 64;  // logical registers (32 int + 32 fp)
  localparam int unsigned LREG_W  = 6;
  localparam int unsigned N_INT_LOG = 32; // logical regs below this are integer
  localparam int unsigned PREG_W  = 7;   // enough for 96 physical regs per cluster

  typedef logic [PC_W-1:0]   pc_t;
  typedef logic [LREG_W-1:0] lreg_t;
  typedef logic [PREG_W-1:0] preg_t;

  // Cluster number. The value doubles as the index of the cluster's field
  // in the rename map and in location vectors.
  typedef enum logic {
    CL_INT = 1'b0,
    CL_FP  = 1'b1
  } cluster_e;

  // Instruction class, supplied by the decoder.
  typedef enum logic [2:0] {
    OP_SIMPLE  = 3'd0,  // simple integer/logic: either cluster
    OP_COMPLEX = 3'd1,  // integer multiply/divide: INT cluster only
    OP_FP      = 3'd2,  // floating point: FP cluster only
    OP_LOAD    = 3'd3,  // address calculation part of a load
    OP_STORE   = 3'd4,  // address calculation part of a store
    OP_BRANCH  = 3'd5   // integer conditional branch
  } opclass_e;

  // Partitioning scheme, selectable at run time.
  typedef enum logic [2:0] {
    SCH_GENERAL_BAL    = 3'd0,  // general balance steering (default)
    SCH_SLICE          = 3'd1,  // LdSt / Br slice steering
    SCH_NONSLICE_BAL   = 3'd2,  // non-slice balance steering
    SCH_SLICE_BAL      = 3'd3,  // slice balance steering
    SCH_PRIO_SLICE_BAL = 3'd4   // priority slice balance steering
  } scheme_e;

  // Which instructions define a slice.
  typedef enum logic {
    SLICE_LDST = 1'b0,  // backward slices of load/store address calculations
    SLICE_BR   = 1'b1   // backward slices of branches
  } slice_kind_e;

  // One decoded instruction entering the dispatch stage. For loads and
  // stores src1 is the address base register; src2 of a store is the data.
  typedef struct packed {
    logic     valid;
    pc_t      pc;
    opclass_e op;
    logic     src1_v;
    lreg_t    src1;
    logic     src2_v;
    lreg_t    src2;
    logic     dst_v;
    lreg_t    dst;
  } dec_inst_t;

  // Copy instruction inserted by the dispatch logic: moves a value from the
  // other cluster's physical register src_p into dst_p of cluster dst_cl.
  typedef struct packed {
    cluster_e dst_cl;
    preg_t    src_p;
    preg_t    dst_p;
  } copy_t;

  // One renamed instruction leaving the dispatch stage.
  typedef struct packed {
    logic     valid;
    cluster_e cl;       // cluster it executes in
    logic     ps1_v;
    preg_t    ps1;      // physical sources, in cluster cl
    logic     ps2_v;
    preg_t    ps2;
    logic     pd_v;
    preg_t    pd;       // physical destination, in cluster cl
    logic     cp1_v;    // copy needed ahead of this instruction for src1
    copy_t    cp1;
    logic     cp2_v;    // copy needed for src2
    copy_t    cp2;
    logic     old_int_v; // previous mappings of the destination, freed
    preg_t    old_int;   // when this instruction commits
    logic     old_fp_v;
    preg_t    old_fp;
  } ren_inst_t;

  // Registers released by one committing instruction.
  typedef struct packed {
    logic  int_v;
    preg_t int_p;
    logic  fp_v;
    preg_t fp_p;
  } free_req_t;

  // Per-instruction steering result, also exported for statistics.
  typedef struct packed {
    cluster_e cl;
    logic     in_slice;  // belongs to a slice (by the table or as a definer)
    logic     as_slice;  // steered by the slice rule (critical slice in priority mode)
    logic     strong_imb; // strong imbalance seen by this instruction
    logic     remap;     // this instruction moved its slice to the other cluster
    logic     forced;    // cluster fixed by the instruction type
  } steer_info_t;

  function automatic logic is_fp_reg(lreg_t r);
    return r >= lreg_t'(N_INT_LOG);
  endfunction

  // True when an instruction must run in the FP cluster: an FP operation or
  // any instruction that names an FP register.
  function automatic logic needs_fp(dec_inst_t d);
    return (d.op == OP_FP) ||
           (d.src1_v && is_fp_reg(d.src1)) ||
           (d.src2_v && is_fp_reg(d.src2)) ||
           (d.dst_v  && is_fp_reg(d.dst));
  endfunction

endpackage
