// tb_cluster_table: remaps, miss/mispredict events and the criticality
// flag against a reference model. The reference keeps a cluster bit, a
// saturating 8-bit count and a flag per entry; on an event the count is
// incremented (saturating) and the flag becomes (new count > threshold).
// Events hammer a few entries so that counters saturate.
module tb_cluster_table;
  import dcs_pkg::*;
  localparam int W = 8, NEV = 2, ENTRIES = 1024, IDX_W = 10, CNT_W = 8;

  logic clk = 0, rst_n = 0;
  logic [IDX_W-1:0] rd_id [W];
  cluster_e rd_cl [W];
  logic rd_crit [W];
  logic rm_v [W];
  logic [IDX_W-1:0] rm_id [W];
  cluster_e rm_cl [W];
  logic ev_v [NEV];
  pc_t ev_pc [NEV];
  logic [CNT_W-1:0] thr;
  int checks = 0, failures = 0, sat_seen = 0, crit_seen = 0, remaps = 0;

  cluster_table #(.W(W), .NEV(NEV), .ENTRIES(ENTRIES), .CNT_W(CNT_W)) dut (.clk, .rst_n,
    .rd_id_i(rd_id), .rd_cl_o(rd_cl), .rd_crit_o(rd_crit), .rm_v_i(rm_v), .rm_id_i(rm_id),
    .rm_cl_i(rm_cl), .ev_v_i(ev_v), .ev_pc_i(ev_pc), .thresh_i(thr));

  always #5 clk = ~clk;

  cluster_e ref_cl [ENTRIES];
  int ref_cnt [ENTRIES];
  logic ref_crit [ENTRIES];

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < ENTRIES; e++) begin ref_cl[e] = CL_INT; ref_cnt[e] = 0; ref_crit[e] = 0; end
    for (int j = 0; j < W; j++) begin rd_id[j] = '0; rm_v[j] = 0; rm_id[j] = '0; rm_cl[j] = CL_INT; end
    for (int e = 0; e < NEV; e++) begin ev_v[e] = 0; ev_pc[e] = '0; end
    thr = 8'd3;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      if (t % 500 == 0) thr = CNT_W'($urandom_range(0, 20));
      for (int j = 0; j < W; j++) begin
        rd_id[j] = IDX_W'($urandom_range(0, 31));
        rm_v[j]  = $urandom_range(0, 5) == 0;
        rm_id[j] = IDX_W'($urandom_range(0, 31));
        rm_cl[j] = cluster_e'($urandom_range(0, 1));
      end
      ev_v[0]  = $urandom_range(0, 1);
      ev_pc[0] = pc_t'({$urandom_range(0, 3), 2'b00});        // hot entries 0..3
      ev_v[1]  = $urandom_range(0, 2) == 0;
      ev_pc[1] = pc_t'({$urandom_range(0, 31) + 32'h400, 2'b00}); // aliases entries 0..31
      #1;
      for (int j = 0; j < W; j++) begin
        checks++;
        if (rd_cl[j] !== ref_cl[rd_id[j]] || rd_crit[j] !== ref_crit[rd_id[j]]) begin
          failures++;
          if (failures < 10) $display("entry %0d: got %0d/%0b exp %0d/%0b", rd_id[j], rd_cl[j],
                                      rd_crit[j], ref_cl[rd_id[j]], ref_crit[rd_id[j]]);
        end
        if (ref_crit[rd_id[j]]) crit_seen++;
      end
      for (int j = 0; j < W; j++) if (rm_v[j]) begin ref_cl[rm_id[j]] = rm_cl[j]; remaps++; end
      begin
        int idx [NEV];
        int nv [NEV];
        for (int e = 0; e < NEV; e++) begin
          idx[e] = int'(ev_pc[e][IDX_W+1:2]);
          nv[e] = (ref_cnt[idx[e]] == 255) ? 255 : ref_cnt[idx[e]] + 1;
        end
        for (int e = 0; e < NEV; e++) if (ev_v[e]) begin
          ref_cnt[idx[e]] = nv[e];
          ref_crit[idx[e]] = (nv[e] > int'(thr));
          if (nv[e] == 255) sat_seen++;
        end
      end
    end
    checks++;
    if (sat_seen == 0 || crit_seen == 0 || remaps == 0) begin
      failures++; $display("not exercised sat=%0d crit=%0d remap=%0d", sat_seen, crit_seen, remaps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
