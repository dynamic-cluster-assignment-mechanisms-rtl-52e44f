// tb_free_list: random allocations (subsets of the free registers) and
// releases (subsets of the allocated ones) against a reference bit vector;
// checks the free vector and the free count every cycle, including the
// reset state (registers 0..31 in use) and full exhaustion of the pool.
module tb_free_list;
  import dcs_pkg::*;
  localparam int N_PHYS = 96, N_USED = 32, NREL = 8;

  logic clk = 0, rst_n = 0;
  logic [N_PHYS-1:0] free_v, alloc;
  logic rel_v [NREL];
  preg_t rel_p [NREL];
  logic [PREG_W:0] nfree;
  int checks = 0, failures = 0, empty_seen = 0;

  free_list #(.N_PHYS(N_PHYS), .N_USED(N_USED), .NREL(NREL)) dut (.clk, .rst_n,
    .free_o(free_v), .alloc_i(alloc), .rel_v_i(rel_v), .rel_p_i(rel_p), .n_free_o(nfree));

  always #5 clk = ~clk;

  logic [N_PHYS-1:0] model;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alloc = '0;
    for (int r = 0; r < NREL; r++) begin rel_v[r] = 0; rel_p[r] = '0; end
    for (int i = 0; i < N_PHYS; i++) model[i] = (i >= N_USED);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int cnt, pa;
      logic [N_PHYS-1:0] used, relm;
      cnt = 0;
      pa = (t % 400 < 200) ? 2 : 8;  // phases of heavy allocation / heavy release
      checks++;
      if (free_v !== model) begin failures++; if (failures < 10) $display("free vector mismatch at %0d", t); end
      for (int i = 0; i < N_PHYS; i++) cnt += int'(model[i]);
      checks++;
      if (int'(nfree) != cnt) begin failures++; if (failures < 10) $display("count %0d vs %0d", nfree, cnt); end
      if (cnt == 0) empty_seen++;
      alloc = '0;
      for (int i = 0; i < N_PHYS; i++) if (model[i] && $urandom_range(0, pa) == 0) alloc[i] = 1'b1;
      used = ~model;
      relm = '0;
      for (int r = 0; r < NREL; r++) begin
        automatic int p = $urandom_range(0, N_PHYS - 1);
        rel_v[r] = used[p] && !relm[p] && ($urandom_range(0, 10 - pa) == 0);
        rel_p[r] = preg_t'(p);
        if (rel_v[r]) relm[p] = 1'b1;
      end
      @(negedge clk);
      model = (model & ~alloc) | relm;
    end
    checks++;
    if (empty_seen == 0) begin failures++; $display("pool never exhausted"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
