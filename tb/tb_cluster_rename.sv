// tb_cluster_rename: checks renaming and copy insertion by value tracking.
//
// The testbench keeps its own model of both physical register files and of
// the architectural value of every logical register. Every renamed
// instruction writes a fresh token into its destination register; a copy
// moves the token from the other cluster. Each source operand must then
// find, in its own cluster, the token the program-order semantics expect.
// Registers handed out must not be live, and old mappings are returned
// in order with a random commit delay. Clusters are chosen at random
// (FP-register instructions always go to FP), so remote operands, copies,
// replicas, in-group dependences and free-list exhaustion stalls all occur
// and are counted.
module tb_cluster_rename;
  import dcs_pkg::*;
  localparam int W = 8, RET_W = 8, N_PHYS = 96;

  logic clk = 0, rst_n = 0;
  dec_inst_t dec [W];
  cluster_e  cl  [W];
  logic disp_ready, ready, fire;
  ren_inst_t ren [W];
  logic [1:0] loc [N_LOG];
  free_req_t fr [RET_W];
  logic [PREG_W:0] nfi, nff;
  int checks = 0, failures = 0;
  int n_copies = 0, n_replica_reads = 0, n_ingroup = 0, n_stall_regs = 0, n_groups = 0;

  cluster_rename #(.W(W), .RET_W(RET_W), .N_PHYS(N_PHYS)) dut (.clk, .rst_n,
    .dec_i(dec), .cl_i(cl), .disp_ready_i(disp_ready), .ready_o(ready), .fire_o(fire),
    .ren_o(ren), .loc_o(loc), .free_i(fr), .n_free_int_o(nfi), .n_free_fp_o(nff));

  always #5 clk = ~clk;

  int prf [2][N_PHYS];
  logic busy [2][N_PHYS];
  int gold [N_LOG];
  int in_int [N_LOG], in_fp [N_LOG];  // model: which clusters hold the current value
  int next_tok = 5000;
  free_req_t cq [$];   // commit queue
  int        cq_t [$]; // dispatch time

  task automatic fail(string msg);
    failures++;
    if (failures < 15) $display("FAIL t=%0t %s", $time, msg);
  endtask

  task automatic new_group(int t);
    for (int j = 0; j < W; j++) begin
      automatic bit fp = ($urandom_range(0, 7) == 0);
      dec[j] = '0;
      dec[j].valid  = $urandom_range(0, 7) != 0;
      dec[j].pc     = pc_t'(32'h1000 + 4 * (8 * t + j));
      dec[j].op     = fp ? OP_FP : OP_SIMPLE;
      dec[j].src1_v = $urandom_range(0, 3) != 0;
      dec[j].src1   = lreg_t'(fp ? $urandom_range(32, 47) : $urandom_range(0, 11));
      dec[j].src2_v = $urandom_range(0, 1);
      dec[j].src2   = lreg_t'(fp ? $urandom_range(32, 47) : $urandom_range(0, 11));
      dec[j].dst_v  = $urandom_range(0, 4) != 0;
      dec[j].dst    = lreg_t'(fp ? $urandom_range(32, 47) : $urandom_range(0, 11));
      cl[j] = fp ? CL_FP : cluster_e'($urandom_range(0, 1));
    end
  endtask

  task automatic take_reg(cluster_e c, preg_t p);
    checks++;
    if (busy[c][p]) fail($sformatf("allocated live register %0d in cluster %0d", p, c));
    busy[c][p] = 1'b1;
  endtask

  task automatic check_src(int j, lreg_t r, preg_t p, cluster_e c);
    checks++;
    if (prf[c][p] != gold[r])
      fail($sformatf("slot %0d reads r%0d from p%0d/c%0d: token %0d, expected %0d", j, r, p, c, prf[c][p], gold[r]));
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 2; c++) for (int p = 0; p < N_PHYS; p++) begin prf[c][p] = -1; busy[c][p] = 0; end
    for (int r = 0; r < N_LOG; r++) begin
      gold[r] = 1000 + r;
      if (r < 32) begin prf[CL_INT][r] = gold[r]; busy[CL_INT][r] = 1; in_int[r] = 1; in_fp[r] = 0; end
      else        begin prf[CL_FP][r-32] = gold[r]; busy[CL_FP][r-32] = 1; in_int[r] = 0; in_fp[r] = 1; end
    end
    for (int r = 0; r < RET_W; r++) fr[r] = '0;
    disp_ready = 0;
    new_group(0);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 6000; t++) begin
      // commit: in order, up to RET_W entries that are old enough
      automatic int delay = (t % 1000 < 500) ? 40 : 3;
      for (int r = 0; r < RET_W; r++) begin
        fr[r] = '0;
        if (cq.size() > 0 && (t - cq_t[0]) > delay && $urandom_range(0, 3) != 0) begin
          fr[r] = cq.pop_front();
          void'(cq_t.pop_front());
          if (fr[r].int_v) busy[CL_INT][fr[r].int_p] = 1'b0;
          if (fr[r].fp_v)  busy[CL_FP][fr[r].fp_p]   = 1'b0;
        end
      end
      disp_ready = $urandom_range(0, 9) != 0;
      #1;
      // location vector matches the model
      for (int r = 0; r < N_LOG; r++) begin
        checks++;
        if (loc[r][CL_INT] != in_int[r][0] || loc[r][CL_FP] != in_fp[r][0])
          fail($sformatf("location of r%0d: %b", r, loc[r]));
      end
      if (disp_ready && !ready) n_stall_regs++;
      if (fire) begin
        n_groups++;
        for (int j = 0; j < W; j++) begin
          automatic cluster_e c = cl[j];
          automatic cluster_e o = cluster_e'(~cl[j]);
          automatic free_req_t f = '0;
          if (!dec[j].valid) begin
            checks++;
            if (ren[j].valid) fail("invalid slot renamed");
            continue;
          end
          checks++;
          if (!ren[j].valid || ren[j].cl != c) fail("slot not renamed in its cluster");
          for (int k = 0; k < j; k++)
            if (dec[k].valid && dec[k].dst_v &&
                ((dec[j].src1_v && dec[j].src1 == dec[k].dst) || (dec[j].src2_v && dec[j].src2 == dec[k].dst)))
              n_ingroup++;
          // copies: needed exactly when the value is not in the chosen cluster
          if (dec[j].src1_v) begin
            automatic bit need = (c == CL_INT) ? !in_int[dec[j].src1][0] : !in_fp[dec[j].src1][0];
            checks++;
            if (ren[j].cp1_v != need) fail($sformatf("slot %0d copy1 flag %0b expected %0b", j, ren[j].cp1_v, need));
            if (ren[j].cp1_v) begin
              n_copies++;
              take_reg(c, ren[j].cp1.dst_p);
              checks++;
              if (ren[j].cp1.dst_cl != c || prf[o][ren[j].cp1.src_p] != gold[dec[j].src1])
                fail($sformatf("slot %0d copy1 reads the wrong value", j));
              prf[c][ren[j].cp1.dst_p] = prf[o][ren[j].cp1.src_p];
              if (c == CL_INT) in_int[dec[j].src1] = 1; else in_fp[dec[j].src1] = 1;
            end else if (in_int[dec[j].src1] && in_fp[dec[j].src1]) n_replica_reads++;
            check_src(j, dec[j].src1, ren[j].ps1, c);
          end
          if (dec[j].src2_v) begin
            automatic bit need = (c == CL_INT) ? !in_int[dec[j].src2][0] : !in_fp[dec[j].src2][0];
            checks++;
            if (ren[j].cp2_v != need) fail($sformatf("slot %0d copy2 flag %0b expected %0b", j, ren[j].cp2_v, need));
            if (ren[j].cp2_v) begin
              n_copies++;
              take_reg(c, ren[j].cp2.dst_p);
              checks++;
              if (ren[j].cp2.dst_cl != c || prf[o][ren[j].cp2.src_p] != gold[dec[j].src2])
                fail($sformatf("slot %0d copy2 reads the wrong value", j));
              prf[c][ren[j].cp2.dst_p] = prf[o][ren[j].cp2.src_p];
              if (c == CL_INT) in_int[dec[j].src2] = 1; else in_fp[dec[j].src2] = 1;
            end
            check_src(j, dec[j].src2, ren[j].ps2, c);
          end
          if (dec[j].dst_v) begin
            checks++;
            if (!ren[j].pd_v) fail("no destination register");
            take_reg(c, ren[j].pd);
            prf[c][ren[j].pd] = next_tok;
            gold[dec[j].dst] = next_tok;
            next_tok++;
            f.int_v = ren[j].old_int_v; f.int_p = ren[j].old_int;
            f.fp_v  = ren[j].old_fp_v;  f.fp_p  = ren[j].old_fp;
            checks++;
            if (f.int_v != in_int[dec[j].dst][0] || f.fp_v != in_fp[dec[j].dst][0])
              fail("old mapping flags do not match the replicas");
            in_int[dec[j].dst] = (c == CL_INT);
            in_fp[dec[j].dst]  = (c == CL_FP);
            cq.push_back(f);
            cq_t.push_back(t);
          end
        end
      end
      @(negedge clk);
      if (fire || !disp_ready || $urandom_range(0, 20) == 0) begin
        if (fire || $urandom_range(0, 1)) new_group(t + 1);
      end
    end
    $display("groups=%0d copies=%0d replica_reads=%0d ingroup=%0d regstalls=%0d",
             n_groups, n_copies, n_replica_reads, n_ingroup, n_stall_regs);
    checks++;
    if (n_copies == 0 || n_replica_reads == 0 || n_ingroup == 0 || n_stall_regs == 0) fail("mechanism not exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
