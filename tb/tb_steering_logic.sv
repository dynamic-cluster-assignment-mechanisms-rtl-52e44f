// tb_steering_logic: the steering decisions of every scheme against a
// reference model written from the scheme rules.
//
// A random static program of 64 instructions (loads, stores, branches,
// simple/complex integer and FP operations over a few registers) is run
// in a loop, eight instructions per group, so that backward slices build up
// in the tables. The testbench models the parent, slice and cluster tables,
// the imbalance counter, the criticality threshold and the operand
// locations, predicts cluster, slice membership and remap for every slot,
// and compares. Ready counts are driven in phases that overload one
// cluster or the other, miss/mispredict events arrive at random, and the
// group is sometimes held back (fire low), which must change no state.
// Each scheme runs with both slice kinds.
module tb_steering_logic;
  import dcs_pkg::*;
  localparam int W = 8, ENTRIES = 1024, IDX_W = 10, NEV = 2, PERIOD_W = 5;
  localparam int TH = 8, NWIN = 16, ISSUE_W = 4;

  logic clk = 0, rst_n = 0;
  scheme_e scheme;
  slice_kind_e kind;
  dec_inst_t dec [W];
  logic [1:0] loc [N_LOG];
  logic fire;
  logic [6:0] rdy_int, rdy_fp;
  logic ev_v [NEV];
  pc_t ev_pc [NEV];
  steer_info_t info [W];
  logic signed [7:0] bal;
  logic [7:0] thr;
  logic imbal, pend;
  int checks = 0, failures = 0;
  int n_remap = 0, n_strong = 0, n_slice = 0, n_forced = 0, n_crit = 0, n_thr_change = 0, n_held = 0;
  int n_to_fp = 0, n_to_int = 0;

  steering_logic #(.W(W), .ENTRIES(ENTRIES), .NEV(NEV), .PERIOD_W(PERIOD_W)) dut (
    .clk, .rst_n, .scheme_i(scheme), .kind_i(kind), .dec_i(dec), .loc_i(loc), .fire_i(fire),
    .ready_int_i(rdy_int), .ready_fp_i(rdy_fp), .ev_v_i(ev_v), .ev_pc_i(ev_pc), .info_o(info),
    .bal_cnt_o(bal), .thresh_o(thr), .i2_imbal_o(imbal), .period_end_o(pend));

  always #5 clk = ~clk;

  // ---------------------------------------------------------------- program
  dec_inst_t prog [64];

  function automatic lreg_t ireg();
    return lreg_t'($urandom_range(0, 11));
  endfunction

  task automatic make_program();
    for (int i = 0; i < 64; i++) begin
      automatic int k = $urandom_range(0, 99);
      dec_inst_t d = '0;
      d.valid = 1'b1;
      d.pc = pc_t'(32'h4000 + 4 * i);
      if (k < 20)      begin d.op = OP_LOAD;  d.src1_v = 1; d.src1 = ireg(); d.dst_v = 1; d.dst = ireg(); end
      else if (k < 28) begin d.op = OP_STORE; d.src1_v = 1; d.src1 = ireg(); d.src2_v = 1; d.src2 = ireg(); end
      else if (k < 42) begin d.op = OP_BRANCH; d.src1_v = 1; d.src1 = ireg(); d.src2_v = $urandom_range(0, 1); d.src2 = ireg(); end
      else if (k < 47) begin d.op = OP_COMPLEX; d.src1_v = 1; d.src1 = ireg(); d.src2_v = 1; d.src2 = ireg(); d.dst_v = 1; d.dst = ireg(); end
      else if (k < 55) begin d.op = OP_FP; d.src1_v = 1; d.src1 = lreg_t'($urandom_range(32, 39)); d.dst_v = 1; d.dst = lreg_t'($urandom_range(32, 39)); end
      else             begin d.op = OP_SIMPLE; d.src1_v = 1; d.src1 = ireg(); d.src2_v = $urandom_range(0, 1); d.src2 = ireg(); d.dst_v = 1; d.dst = ireg(); end
      prog[i] = d;
    end
  endtask

  // ------------------------------------------------------------------ model
  logic m_pv [N_LOG];
  pc_t  m_ppc [N_LOG];
  int   m_st [int];        // slice table: index -> slice id
  int   m_cl [int];        // cluster table: id -> cluster (absent = INT)
  int   m_cnt [int];       // miss counters
  bit   m_crit [int];
  int   m_bal, m_thr, m_cyc, m_acc_c, m_acc_n;
  int   m_win [NWIN];
  logic [1:0] m_loc [N_LOG];

  function automatic int idx_of(pc_t pc);
    return int'(pc[IDX_W+1:2]);
  endfunction

  // expected results for the current group
  int e_cl [W];
  bit e_in [W], e_rm [W];
  int e_id [W];

  task automatic predict();
    int cnt = m_bal;
    logic [1:0] l [N_LOG];
    int rm_id [W];
    int rm_cl [W];
    bit rm_v [W];
    l = m_loc;
    for (int j = 0; j < W; j++) begin
      automatic dec_inst_t d = dec[j];
      automatic bit isdef = (kind == SLICE_LDST) ? (d.op == OP_LOAD || d.op == OP_STORE) : (d.op == OP_BRANCH);
      automatic int id = isdef ? idx_of(d.pc) : (m_st.exists(idx_of(d.pc)) ? m_st[idx_of(d.pc)] : -1);
      automatic bit in = isdef || m_st.exists(idx_of(d.pc));
      automatic int ni = 0, nf = 0;
      automatic bit str = (cnt > TH) || (cnt < -TH);
      automatic int least = (cnt > 0) ? 0 : 1;
      automatic int nscl, scl, c;
      automatic bit crit = in && m_crit.exists(id) && m_crit[id];
      automatic bit treat;
      rm_v[j] = 0;
      if (d.src1_v) begin ni += l[d.src1][0]; nf += l[d.src1][1]; end
      if (d.src2_v) begin ni += l[d.src2][0]; nf += l[d.src2][1]; end
      nscl = (str || ni == nf) ? least : ((ni > nf) ? 0 : 1);
      scl = (in && m_cl.exists(id)) ? m_cl[id] : 0;
      for (int k = 0; k < j; k++) if (rm_v[k] && rm_id[k] == id) scl = rm_cl[k];
      treat = in && (scheme == SCH_SLICE_BAL || (scheme == SCH_PRIO_SLICE_BAL && crit));
      e_rm[j] = 0;
      case (scheme)
        SCH_SLICE:        c = in ? 0 : 1;
        SCH_NONSLICE_BAL: c = in ? 0 : nscl;
        SCH_SLICE_BAL, SCH_PRIO_SLICE_BAL: begin
          c = nscl;
          if (treat) begin
            c = scl;
            if (str && scl != least) begin c = least; e_rm[j] = 1; end
          end
        end
        default: c = nscl;
      endcase
      if (needs_fp(d)) begin c = 1; e_rm[j] = 0; end
      else if (d.op == OP_COMPLEX) begin c = 0; e_rm[j] = 0; end
      if (!d.valid) e_rm[j] = 0;
      rm_v[j] = e_rm[j]; rm_id[j] = id; rm_cl[j] = c;
      e_cl[j] = c; e_in[j] = in; e_id[j] = id;
      if (d.valid) begin
        cnt += (c == 1) ? 1 : -1;
        if (d.src1_v) l[d.src1][c] = 1'b1;
        if (d.src2_v) l[d.src2][c] = 1'b1;
        if (d.dst_v) begin l[d.dst] = '0; l[d.dst][c] = 1'b1; end
      end
    end
  endtask

  // state update at the clock edge
  task automatic update(bit f);
    int d = 0, nc = 0, nn = 0, sum = 0, nxt;
    // parent lookup must use the table before this group's writes
    logic pv [N_LOG];
    pc_t ppc [N_LOG];
    pv = m_pv; ppc = m_ppc;
    if (f) begin
      for (int j = 0; j < W; j++) begin
        automatic dec_inst_t x = dec[j];
        automatic bit isdef;
        if (!x.valid) continue;
        isdef = (kind == SLICE_LDST) ? (x.op == OP_LOAD || x.op == OP_STORE) : (x.op == OP_BRANCH);
        d += (e_cl[j] == 1) ? 1 : -1;
        if (e_in[j] && m_crit.exists(e_id[j]) && m_crit[e_id[j]]) nc++; else nn++;
        if (e_cl[j] == 1) n_to_fp++; else n_to_int++;
        if (isdef) m_st[idx_of(x.pc)] = e_id[j];
        if (e_in[j]) begin
          // parents: table state plus earlier slots of this group
          for (int s = 0; s < 2; s++) begin
            automatic bit sv = (s == 0) ? x.src1_v : x.src2_v;
            automatic lreg_t sr = (s == 0) ? x.src1 : x.src2;
            automatic bit hv = 0;
            automatic pc_t hpc = '0;
            if (!sv) continue;
            if (s == 1 && (x.op == OP_LOAD || x.op == OP_STORE)) continue;
            if (pv[sr]) begin hv = 1; hpc = ppc[sr]; end
            for (int k = 0; k < j; k++)
              if (dec[k].valid && dec[k].dst_v && dec[k].dst == sr) begin hv = 1; hpc = dec[k].pc; end
            if (hv) m_st[idx_of(hpc)] = e_id[j];
          end
        end
        if (e_rm[j]) m_cl[e_id[j]] = e_cl[j];
        if (x.src1_v) m_loc[x.src1][e_cl[j]] = 1'b1;
        if (x.src2_v) m_loc[x.src2][e_cl[j]] = 1'b1;
        if (x.dst_v) begin m_loc[x.dst] = '0; m_loc[x.dst][e_cl[j]] = 1'b1; end
      end
      for (int j = 0; j < W; j++)
        if (dec[j].valid && dec[j].dst_v) begin m_pv[dec[j].dst] = 1; m_ppc[dec[j].dst] = dec[j].pc; end
    end
    // events
    begin
      int nv [NEV];
      int ix [NEV];
      for (int e = 0; e < NEV; e++) begin
        ix[e] = idx_of(ev_pc[e]);
        nv[e] = m_cnt.exists(ix[e]) ? m_cnt[ix[e]] : 0;
        nv[e] = (nv[e] == 255) ? 255 : nv[e] + 1;
      end
      for (int e = 0; e < NEV; e++)
        if (ev_v[e]) begin m_cnt[ix[e]] = nv[e]; m_crit[ix[e]] = (nv[e] > m_thr); end
    end
    // threshold
    m_acc_c += nc; m_acc_n += nn;
    if (m_acc_c > 65535) m_acc_c = 65535;
    if (m_acc_n > 65535) m_acc_n = 65535;
    if (m_cyc == (1 << PERIOD_W) - 1) begin
      if (m_acc_c > (m_acc_c + m_acc_n) / 2) begin if (m_thr < 255) m_thr++; end
      else begin if (m_thr > 0) m_thr--; end
      m_acc_c = 0; m_acc_n = 0;
    end
    m_cyc = (m_cyc + 1) % (1 << PERIOD_W);
    // balance counter
    for (int k = 0; k < NWIN; k++) sum += m_win[k];
    begin
      int q = sum / NWIN;
      if (sum % NWIN != 0 && sum < 0) q--;
      nxt = m_bal + q + d;
    end
    if (nxt > 127) nxt = 127;
    if (nxt < -128) nxt = -128;
    m_bal = nxt;
    for (int k = NWIN - 1; k > 0; k--) m_win[k] = m_win[k-1];
    begin
      int ri = int'(rdy_int), rf = int'(rdy_fp);
      m_win[0] = (((ri > ISSUE_W) && (rf < ISSUE_W)) || ((rf > ISSUE_W) && (ri < ISSUE_W))) ? rf - ri : 0;
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int pcix = 0;
  int prev_thr = 0;

  initial begin
    make_program();
    for (int r = 0; r < N_LOG; r++) begin
      m_pv[r] = 0; m_ppc[r] = '0;
      m_loc[r] = (r < 32) ? 2'b01 : 2'b10;
    end
    for (int k = 0; k < NWIN; k++) m_win[k] = 0;
    m_bal = 0; m_thr = 0; m_cyc = 0; m_acc_c = 0; m_acc_n = 0;
    scheme = SCH_GENERAL_BAL; kind = SLICE_LDST;
    for (int j = 0; j < W; j++) dec[j] = '0;
    for (int e = 0; e < NEV; e++) begin ev_v[e] = 0; ev_pc[e] = '0; end
    rdy_int = 0; rdy_fp = 0; fire = 0;
    loc = m_loc;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 10 * 1500; t++) begin
      automatic int ph = t / 1500;
      scheme = scheme_e'(ph % 5);
      kind = slice_kind_e'(ph / 5);
      // group: next 8 program instructions, occasional bubbles
      for (int j = 0; j < W; j++) begin
        dec[j] = prog[(pcix + j) % 64];
        if ($urandom_range(0, 15) == 0) dec[j].valid = 1'b0;
      end
      // ready counts: phases overloading one side or the other
      case ((t / 100) % 4)
        0: begin rdy_int = 7'($urandom_range(0, 3));  rdy_fp = 7'($urandom_range(5, 40)); end
        1: begin rdy_int = 7'($urandom_range(5, 40)); rdy_fp = 7'($urandom_range(0, 3));  end
        default: begin rdy_int = 7'($urandom_range(0, 12)); rdy_fp = 7'($urandom_range(0, 12)); end
      endcase
      for (int e = 0; e < NEV; e++) begin
        ev_v[e]  = 1'b1;
        ev_pc[e] = prog[(e == 0) ? $urandom_range(0, 63) : $urandom_range(0, 7)].pc;  // port 1 favours a few PCs
      end
      fire = $urandom_range(0, 7) != 0;
      loc = m_loc;
      #1;
      predict();
      checks++;
      if (int'(bal) != m_bal) begin failures++; if (failures < 15) $display("t=%0d counter %0d vs %0d", t, bal, m_bal); end
      checks++;
      if (int'(thr) != m_thr) begin failures++; if (failures < 15) $display("t=%0d threshold %0d vs %0d", t, thr, m_thr); end
      for (int j = 0; j < W; j++) begin
        checks++;
        if (int'(info[j].cl) != e_cl[j] || info[j].in_slice != e_in[j] ||
            (dec[j].valid && info[j].remap != e_rm[j])) begin
          failures++;
          if (failures < 15)
            $display("t=%0d sch=%0d kind=%0d slot %0d pc=%h: cl %0d/%0d in %0b/%0b remap %0b/%0b (cnt %0d)", t, scheme, kind, j,
                     dec[j].pc, info[j].cl, e_cl[j], info[j].in_slice, e_in[j], info[j].remap, e_rm[j], m_bal);
        end
        if (dec[j].valid && fire) begin
          if (e_rm[j]) n_remap++;
          if (info[j].strong_imb) n_strong++;
          if (e_in[j] && !info[j].forced) n_slice++;
          if (info[j].forced) n_forced++;
          if (scheme == SCH_PRIO_SLICE_BAL && info[j].as_slice) n_crit++;
        end
      end
      if (!fire) n_held++;
      @(posedge clk);
      update(fire);
      if (fire) pcix = (pcix + W) % 64;
      @(negedge clk);
      if (int'(thr) != prev_thr) n_thr_change++;
      prev_thr = int'(thr);
    end
    $display("to_int=%0d to_fp=%0d remap=%0d strong=%0d slice=%0d forced=%0d crit=%0d thr_changes=%0d held=%0d",
             n_to_int, n_to_fp, n_remap, n_strong, n_slice, n_forced, n_crit, n_thr_change, n_held);
    checks++;
    if (n_remap == 0 || n_strong == 0 || n_slice == 0 || n_forced == 0 || n_crit == 0 ||
        n_thr_change == 0 || n_held == 0) begin
      failures++; $display("mechanism not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
