// tb_parent_table: random decode groups against a reference array of
// "last writer PC" per logical register. The expected parent of each source
// is the PC of the latest earlier slot of the same group writing that
// register, else the reference entry. Groups are written only when the
// write enable is high, so held-back groups must leave the table unchanged.
module tb_parent_table;
  import dcs_pkg::*;
  localparam int W = 8;

  logic clk = 0, rst_n = 0;
  dec_inst_t dec [W];
  logic we;
  logic p1v [W], p2v [W];
  pc_t  p1 [W], p2 [W];
  int checks = 0, failures = 0, fwd_hits = 0;

  parent_table #(.W(W)) dut (.clk, .rst_n, .dec_i(dec), .we_i(we),
    .par1_v_o(p1v), .par1_o(p1), .par2_v_o(p2v), .par2_o(p2));

  always #5 clk = ~clk;

  logic ref_v [N_LOG];
  pc_t  ref_pc [N_LOG];

  task automatic expect_parent(int j, lreg_t r, logic v, pc_t pc, logic gv, pc_t gpc);
    logic ev = 1'b0;
    pc_t epc = '0;
    if (ref_v[r]) begin ev = 1'b1; epc = ref_pc[r]; end
    for (int k = 0; k < j; k++)
      if (dec[k].valid && dec[k].dst_v && dec[k].dst == r) begin
        ev = 1'b1; epc = dec[k].pc;
        if (k >= 0) fwd_hits++;
      end
    if (!v || !dec[j].valid) ev = 1'b0;
    checks++;
    if (gv !== ev || (ev && gpc !== epc)) begin
      failures++;
      if (failures < 10) $display("slot %0d reg %0d: got %0b/%h exp %0b/%h", j, r, gv, gpc, ev, epc);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < N_LOG; r++) begin ref_v[r] = 0; ref_pc[r] = '0; end
    for (int j = 0; j < W; j++) dec[j] = '0;
    we = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      for (int j = 0; j < W; j++) begin
        dec[j].valid  = ($urandom_range(0, 9) != 0);
        dec[j].pc     = pc_t'({$urandom_range(0, 32'h3fff), 2'b00});
        dec[j].op     = OP_SIMPLE;
        dec[j].src1_v = $urandom_range(0, 3) != 0;
        dec[j].src1   = lreg_t'($urandom_range(0, 15));
        dec[j].src2_v = $urandom_range(0, 1);
        dec[j].src2   = lreg_t'($urandom_range(0, 15));
        dec[j].dst_v  = $urandom_range(0, 3) != 0;
        dec[j].dst    = lreg_t'($urandom_range(0, 15));
      end
      we = $urandom_range(0, 3) != 0;
      #1;
      for (int j = 0; j < W; j++) begin
        expect_parent(j, dec[j].src1, dec[j].src1_v, dec[j].pc, p1v[j], p1[j]);
        expect_parent(j, dec[j].src2, dec[j].src2_v, dec[j].pc, p2v[j], p2[j]);
      end
      if (we)
        for (int j = 0; j < W; j++)
          if (dec[j].valid && dec[j].dst_v) begin
            ref_v[dec[j].dst] = 1'b1; ref_pc[dec[j].dst] = dec[j].pc;
          end
    end
    checks++;
    if (fwd_hits == 0) begin failures++; $display("in-group forwarding never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
