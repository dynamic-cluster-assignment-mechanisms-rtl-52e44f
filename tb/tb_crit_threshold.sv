// tb_crit_threshold: the adaptive threshold against a reference model, with
// a short period (64 cycles), 8-bit instruction counters (so they saturate)
// and a 4-bit threshold (so it saturates at both ends). Phases with mostly
// critical, mostly non-critical and random traffic; the model increments
// the threshold when the critical count is above half of the total at the
// end of each period, decrements it otherwise, and checks the period
// length by counting cycles between period ends.
module tb_crit_threshold;
  localparam int W = 8, PERIOD_W = 6, ACC_W = 8, THR_W = 4, NW = 4;

  logic clk = 0, rst_n = 0;
  logic [NW-1:0] nc, nn;
  logic [THR_W-1:0] thr;
  logic pend;
  int checks = 0, failures = 0, ups = 0, downs = 0, hit_max = 0, hit_min = 0, acc_sat = 0;

  crit_threshold #(.W(W), .PERIOD_W(PERIOD_W), .ACC_W(ACC_W), .THR_W(THR_W)) dut (
    .clk, .rst_n, .n_crit_i(nc), .n_noncrit_i(nn), .thresh_o(thr), .period_end_o(pend));

  always #5 clk = ~clk;

  int m_cyc, m_crit, m_non, m_thr, last_end;

  task automatic step(int c, int n);
    nc = NW'(c); nn = NW'(n);
    #1;
    checks++;
    if (pend !== (m_cyc == (1 << PERIOD_W) - 1)) begin failures++; $display("period_end mismatch at %0d", m_cyc); end
    m_crit += c; m_non += n;
    if (m_crit > 255) begin m_crit = 255; acc_sat++; end
    if (m_non > 255) begin m_non = 255; acc_sat++; end
    if (m_cyc == (1 << PERIOD_W) - 1) begin
      if (m_crit > (m_crit + m_non) / 2) begin
        if (m_thr < 15) m_thr++; else hit_max++;
        ups++;
      end else begin
        if (m_thr > 0) m_thr--; else hit_min++;
        downs++;
      end
      m_crit = 0; m_non = 0;
    end
    m_cyc = (m_cyc + 1) % (1 << PERIOD_W);
    @(negedge clk);
    checks++;
    if (int'(thr) != m_thr) begin
      failures++;
      if (failures < 10) $display("threshold: dut=%0d model=%0d", thr, m_thr);
    end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    nc = 0; nn = 0; m_cyc = 0; m_crit = 0; m_non = 0; m_thr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // non-critical majority: threshold pinned at 0
    for (int t = 0; t < 200; t++) step($urandom_range(0, 2), $urandom_range(3, 6));
    // critical majority, with counter saturation: threshold climbs to 15
    for (int t = 0; t < 64 * 20; t++) step($urandom_range(5, 8), $urandom_range(0, 3));
    // random
    for (int t = 0; t < 64 * 60; t++) begin
      automatic int c = $urandom_range(0, 8);
      step(c, $urandom_range(0, 8 - c));
    end
    checks++;
    if (ups == 0 || downs == 0 || hit_max == 0 || hit_min == 0 || acc_sat == 0) begin
      failures++;
      $display("not exercised ups=%0d downs=%0d max=%0d min=%0d sat=%0d", ups, downs, hit_max, hit_min, acc_sat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
