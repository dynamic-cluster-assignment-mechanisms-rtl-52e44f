// tb_slice_table: random reads and multi-port writes against a reference
// table. Many writes per cycle target a small PC range so that same-entry
// conflicts occur; the reference applies them in port order, so the
// highest-numbered port must win.
module tb_slice_table;
  import dcs_pkg::*;
  localparam int W = 8, NWR = 24, ENTRIES = 1024, IDX_W = 10;

  logic clk = 0, rst_n = 0;
  pc_t rd_pc [W];
  logic rd_v [W];
  logic [IDX_W-1:0] rd_id [W];
  logic wr_v [NWR];
  pc_t  wr_pc [NWR];
  logic [IDX_W-1:0] wr_id [NWR];
  int checks = 0, failures = 0, conflicts = 0;

  slice_table #(.W(W), .NWR(NWR), .ENTRIES(ENTRIES)) dut (.clk, .rst_n,
    .rd_pc_i(rd_pc), .rd_v_o(rd_v), .rd_id_o(rd_id), .wr_v_i(wr_v), .wr_pc_i(wr_pc), .wr_id_i(wr_id));

  always #5 clk = ~clk;

  logic ref_v [ENTRIES];
  logic [IDX_W-1:0] ref_id [ENTRIES];

  function automatic pc_t rnd_pc();
    // small range so writes collide and reads hit written entries
    return pc_t'({$urandom_range(0, 3), 8'h00, 2'b00}) | pc_t'({$urandom_range(0, 63), 2'b00});
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < ENTRIES; e++) begin ref_v[e] = 0; ref_id[e] = '0; end
    for (int p = 0; p < NWR; p++) begin wr_v[p] = 0; wr_pc[p] = '0; wr_id[p] = '0; end
    for (int j = 0; j < W; j++) rd_pc[j] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      for (int j = 0; j < W; j++) rd_pc[j] = rnd_pc();
      for (int p = 0; p < NWR; p++) begin
        wr_v[p]  = (t > 5) && ($urandom_range(0, 7) == 0);
        wr_pc[p] = rnd_pc();
        wr_id[p] = IDX_W'($urandom);
      end
      #1;
      for (int j = 0; j < W; j++) begin
        automatic int e = int'(rd_pc[j][IDX_W+1:2]);
        checks++;
        if (rd_v[j] !== ref_v[e] || (ref_v[e] && rd_id[j] !== ref_id[e])) begin
          failures++;
          if (failures < 10) $display("entry %0d: got %0b/%0d exp %0b/%0d", e, rd_v[j], rd_id[j], ref_v[e], ref_id[e]);
        end
      end
      for (int p = 0; p < NWR; p++)
        if (wr_v[p]) begin
          automatic int e = int'(wr_pc[p][IDX_W+1:2]);
          for (int q = p + 1; q < NWR; q++)
            if (wr_v[q] && wr_pc[q][IDX_W+1:2] == wr_pc[p][IDX_W+1:2]) conflicts++;
          ref_v[e] = 1'b1; ref_id[e] = wr_id[p];
        end
    end
    checks++;
    if (conflicts == 0) begin failures++; $display("no write conflict exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
