// tb_dcs_dispatch: end-to-end run of the dispatch stage at its default
// parameters (8-wide, 96 registers per cluster, 1024-entry tables,
// 8192-cycle threshold period).
//
// The testbench closes the loop around the block with a small machine
// model: a looping random program of 128 static instructions, two 64-entry
// issue queues that issue up to 4 instructions per cycle each, copies
// queued in the cluster that sends the value, a 64-entry in-order commit
// window that returns the old register mappings, and cache-miss /
// mispredict events for a subset of loads and branches. Every scheme is run
// with both slice kinds, then a stress phase with a larger commit window
// exhausts the physical registers.
//
// Checks: value tracking through both register files (each source must see
// the token of the last write to its logical register, moved by the copies
// the block inserts); FP-register instructions in the FP cluster and
// multiplies in the INT cluster; slice-steering placing slice members in
// INT; no register allocated twice. The number of times each mechanism
// occurs is counted (copies, replica reuse, in-group dependences, strong
// imbalance, slice remaps, critical slices, threshold changes, queue and
// register stalls) and one that never occurs counts as a failure. Per phase
// it prints the copies per instruction and the mean ready imbalance.
module tb_dcs_dispatch;
  import dcs_pkg::*;
  localparam int W = 8, RET_W = 8, N_PHYS = 96, NEV = 2, IQ = 64, PHASE = 12000;

  logic clk = 0, rst_n = 0;
  scheme_e scheme;
  slice_kind_e kind;
  dec_inst_t dec [W];
  logic dec_ready, disp_ready, fire;
  ren_inst_t ren [W];
  steer_info_t info [W];
  logic [6:0] rdy_int, rdy_fp;
  logic ev_v [NEV];
  pc_t ev_pc [NEV];
  free_req_t fr [RET_W];
  logic signed [7:0] bal;
  logic [7:0] thr;
  logic imbal, pend;
  logic [PREG_W:0] nfi, nff;
  int checks = 0, failures = 0;

  dcs_dispatch dut (.clk, .rst_n, .scheme_i(scheme), .kind_i(kind), .dec_i(dec),
    .dec_ready_o(dec_ready), .disp_ready_i(disp_ready), .ren_o(ren), .info_o(info), .fire_o(fire),
    .ready_int_i(rdy_int), .ready_fp_i(rdy_fp), .ev_v_i(ev_v), .ev_pc_i(ev_pc), .free_i(fr),
    .bal_cnt_o(bal), .thresh_o(thr), .i2_imbal_o(imbal), .period_end_o(pend),
    .n_free_int_o(nfi), .n_free_fp_o(nff));

  always #5 clk = ~clk;

  // mechanism counters
  int c_copy = 0, c_replica = 0, c_ingroup = 0, c_strong = 0, c_remap = 0, c_crit = 0;
  int c_thr_up = 0, c_thr_down = 0, c_qstall = 0, c_rstall = 0, c_forced_fp = 0, c_forced_int = 0;
  int c_i2 = 0, c_slice = 0;

  task automatic fail(string msg);
    failures++;
    if (failures < 15) $display("FAIL t=%0t %s", $time, msg);
  endtask

  // ---------------------------------------------------------------- program
  dec_inst_t prog [128];
  bit        hot  [128];  // loads that miss / branches that mispredict often

  function automatic lreg_t ireg();
    return lreg_t'($urandom_range(0, 15));
  endfunction

  task automatic make_program();
    for (int i = 0; i < 128; i++) begin
      automatic int k = $urandom_range(0, 99);
      dec_inst_t d = '0;
      d.valid = 1'b1;
      d.pc = pc_t'(32'h10000 + 4 * i);
      if (k < 30)      begin d.op = OP_LOAD;  d.src1_v = 1; d.src1 = ireg(); d.dst_v = 1; d.dst = ireg(); end
      else if (k < 34) begin d.op = OP_STORE; d.src1_v = 1; d.src1 = ireg(); d.src2_v = 1; d.src2 = ireg(); end
      else if (k < 42) begin d.op = OP_BRANCH; d.src1_v = 1; d.src1 = ireg(); d.src2_v = $urandom_range(0, 1); d.src2 = ireg(); end
      else if (k < 46) begin d.op = OP_COMPLEX; d.src1_v = 1; d.src1 = ireg(); d.src2_v = 1; d.src2 = ireg(); d.dst_v = 1; d.dst = ireg(); end
      else if (k < 50) begin d.op = OP_FP; d.src1_v = 1; d.src1 = lreg_t'($urandom_range(32, 43)); d.src2_v = 1; d.src2 = lreg_t'($urandom_range(32, 43)); d.dst_v = 1; d.dst = lreg_t'($urandom_range(32, 43)); end
      else if (k < 52) begin d.op = OP_LOAD; d.src1_v = 1; d.src1 = ireg(); d.dst_v = 1; d.dst = lreg_t'($urandom_range(32, 43)); end
      else             begin d.op = OP_SIMPLE; d.src1_v = 1; d.src1 = ireg(); d.src2_v = $urandom_range(0, 1); d.src2 = ireg(); d.dst_v = 1; d.dst = ireg(); end
      prog[i] = d;
      // most loads miss often; few branches mispredict often
      hot[i] = (d.op == OP_LOAD) ? 1'b1 : ($urandom_range(0, 7) == 0);
    end
  endtask

  // ------------------------------------------------------------ machine model
  int prf [2][N_PHYS];
  bit busy [2][N_PHYS];
  int gold [N_LOG];
  bit in_c [N_LOG][2];
  int tok = 100000;
  int q_occ [2];
  free_req_t rob_f [$];
  int        rob_t [$];
  pc_t       evq [$];
  int rob_max = 64;

  task automatic take_reg(int c, preg_t p);
    checks++;
    if (busy[c][p]) fail($sformatf("register %0d of cluster %0d allocated while live", p, c));
    busy[c][p] = 1'b1;
  endtask

  task automatic do_commit(int t);
    for (int r = 0; r < RET_W; r++) begin
      fr[r] = '0;
      if (rob_f.size() > 0 && rob_t[0] <= t) begin
        fr[r] = rob_f.pop_front();
        void'(rob_t.pop_front());
        if (fr[r].int_v) busy[CL_INT][fr[r].int_p] = 1'b0;
        if (fr[r].fp_v)  busy[CL_FP][fr[r].fp_p]   = 1'b0;
      end
    end
  endtask

  task automatic process_group(int t);
    for (int j = 0; j < W; j++) begin
      automatic dec_inst_t d = dec[j];
      automatic int c = int'(ren[j].cl);
      automatic int o = 1 - c;
      automatic free_req_t f = '0;
      automatic int lat = $urandom_range(1, 12);
      if (!d.valid) continue;
      checks++;
      if (!ren[j].valid || ren[j].cl != info[j].cl) fail("renamed cluster differs from steering");
      checks++;
      if (needs_fp(d) && c != CL_FP) fail("FP instruction outside the FP cluster");
      if (needs_fp(d)) c_forced_fp++;
      checks++;
      if (d.op == OP_COMPLEX && c != CL_INT) fail("multiply/divide outside the INT cluster");
      if (d.op == OP_COMPLEX) c_forced_int++;
      if (scheme == SCH_SLICE && info[j].in_slice && !info[j].forced) begin
        checks++;
        if (c != CL_INT) fail("slice member not in the INT cluster under slice steering");
      end
      if (info[j].strong_imb) c_strong++;
      if (info[j].remap) c_remap++;
      if (info[j].in_slice) c_slice++;
      if (scheme == SCH_PRIO_SLICE_BAL && info[j].as_slice) c_crit++;
      for (int k = 0; k < j; k++)
        if (dec[k].valid && dec[k].dst_v && ((d.src1_v && d.src1 == dec[k].dst) || (d.src2_v && d.src2 == dec[k].dst)))
          c_ingroup++;
      for (int s = 0; s < 2; s++) begin
        automatic bit sv = s ? d.src2_v : d.src1_v;
        automatic lreg_t sr = s ? d.src2 : d.src1;
        automatic bit cv = s ? ren[j].cp2_v : ren[j].cp1_v;
        automatic copy_t cp = s ? ren[j].cp2 : ren[j].cp1;
        automatic preg_t ps = s ? ren[j].ps2 : ren[j].ps1;
        if (!sv) continue;
        checks++;
        if (cv != !in_c[sr][c]) fail($sformatf("copy flag wrong for r%0d", sr));
        if (cv) begin
          c_copy++;
          take_reg(c, cp.dst_p);
          checks++;
          if (prf[o][cp.src_p] != gold[sr]) fail($sformatf("copy of r%0d reads a stale value", sr));
          prf[c][cp.dst_p] = prf[o][cp.src_p];
          in_c[sr][c] = 1'b1;
          q_occ[o]++;
        end else if (in_c[sr][o]) c_replica++;
        checks++;
        if (prf[c][ps] != gold[sr])
          fail($sformatf("slot %0d reads r%0d: token %0d expected %0d", j, sr, prf[c][ps], gold[sr]));
      end
      if (d.dst_v) begin
        take_reg(c, ren[j].pd);
        prf[c][ren[j].pd] = tok;
        gold[d.dst] = tok;
        tok++;
        f.int_v = ren[j].old_int_v; f.int_p = ren[j].old_int;
        f.fp_v  = ren[j].old_fp_v;  f.fp_p  = ren[j].old_fp;
        checks++;
        if (f.int_v != in_c[d.dst][CL_INT] || f.fp_v != in_c[d.dst][CL_FP]) fail("old mappings wrong");
        in_c[d.dst][0] = (c == 0);
        in_c[d.dst][1] = (c == 1);
      end
      q_occ[c]++;
      // a hot load misses (LdSt) / a hot branch mispredicts (Br)
      if (hot[(d.pc - 32'h10000) >> 2] && ((kind == SLICE_LDST && d.op == OP_LOAD) ||
                                             (kind == SLICE_BR && d.op == OP_BRANCH))) begin
        evq.push_back(d.pc);
        lat += 20;
      end
      rob_f.push_back(f);
      rob_t.push_back((rob_t.size() > 0 && rob_t[$] > t + lat) ? rob_t[$] : t + lat);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pcix = 0, t = 0;
    make_program();
    for (int c = 0; c < 2; c++) begin
      q_occ[c] = 0;
      for (int p = 0; p < N_PHYS; p++) begin prf[c][p] = -1; busy[c][p] = 0; end
    end
    for (int r = 0; r < N_LOG; r++) begin
      gold[r] = 1000 + r;
      in_c[r][0] = (r < 32); in_c[r][1] = (r >= 32);
      if (r < 32) begin prf[0][r] = gold[r]; busy[0][r] = 1; end
      else        begin prf[1][r-32] = gold[r]; busy[1][r-32] = 1; end
    end
    for (int r = 0; r < RET_W; r++) fr[r] = '0;
    for (int e = 0; e < NEV; e++) begin ev_v[e] = 0; ev_pc[e] = '0; end
    for (int j = 0; j < W; j++) dec[j] = '0;
    scheme = SCH_GENERAL_BAL; kind = SLICE_LDST;
    disp_ready = 0; rdy_int = 0; rdy_fp = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int ph = 0; ph < 11; ph++) begin
      automatic int n_ins = 0, n_cp0 = c_copy, sum_imb = 0;
      scheme = (ph < 10) ? scheme_e'(ph % 5) : SCH_GENERAL_BAL;
      kind = slice_kind_e'((ph / 5) % 2);
      rob_max = (ph < 10) ? 64 : 400;  // stress phase: commit window beyond the registers
      for (int k = 0; k < PHASE; k++, t++) begin
        int thr_before;
        do_commit(ph < 10 ? t : t - 30);
        // issue: up to 4 per cluster out of the ready part of each queue
        begin
          automatic int ri = (q_occ[0] * $urandom_range(20, 100)) / 100;
          automatic int rf = (q_occ[1] * $urandom_range(20, 100)) / 100;
          rdy_int = 7'(ri); rdy_fp = 7'(rf);
          sum_imb += (rf > ri) ? rf - ri : ri - rf;
          q_occ[0] -= (ri < 4) ? ri : 4;
          q_occ[1] -= (rf < 4) ? rf : 4;
        end
        for (int e = 0; e < NEV; e++) begin
          ev_v[e] = evq.size() > 0;
          ev_pc[e] = ev_v[e] ? evq.pop_front() : '0;
        end
        disp_ready = (q_occ[0] <= IQ - 3 * W) && (q_occ[1] <= IQ - 3 * W) && (rob_f.size() <= rob_max - W);
        for (int j = 0; j < W; j++) dec[j] = prog[(pcix + j) % 128];
        #1;
        if (!disp_ready) c_qstall++;
        else if (!dec_ready) c_rstall++;
        checks++;
        if (!disp_ready && (dec_ready || fire)) fail("group taken while the queues are full");
        if (imbal) c_i2++;
        if (fire) begin
          process_group(t);
          pcix = (pcix + W) % 128;
          n_ins += W;
        end
        thr_before = int'(thr);
        @(negedge clk);
        if (int'(thr) > thr_before) c_thr_up++;
        if (int'(thr) < thr_before) c_thr_down++;
      end
      $display("phase %0d scheme=%0d kind=%0d: instructions=%0d copies/instr=%0.3f mean|ready diff|=%0.2f",
               ph, scheme, kind, n_ins, real'(c_copy - n_cp0) / real'(n_ins), real'(sum_imb) / real'(PHASE));
    end
    $display("copies=%0d replica=%0d ingroup=%0d strong=%0d remap=%0d crit=%0d thr_up=%0d thr_down=%0d qstall=%0d rstall=%0d fp=%0d mul=%0d i2=%0d slice=%0d",
             c_copy, c_replica, c_ingroup, c_strong, c_remap, c_crit, c_thr_up, c_thr_down, c_qstall, c_rstall,
             c_forced_fp, c_forced_int, c_i2, c_slice);
    checks++;
    if (c_copy == 0 || c_replica == 0 || c_ingroup == 0 || c_strong == 0 || c_remap == 0 || c_crit == 0 ||
        c_thr_up == 0 || c_thr_down == 0 || c_qstall == 0 || c_rstall == 0 || c_forced_fp == 0 ||
        c_forced_int == 0 || c_i2 == 0 || c_slice == 0)
      fail("a mechanism never occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
