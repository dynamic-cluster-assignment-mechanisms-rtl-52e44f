// tb_balance_monitor: checks the imbalance counter against a reference model
// kept in the testbench: a 16-sample window of I2 (ready FP - ready INT,
// counted only when one cluster is above and the other below its 4-wide
// issue width), its average added every cycle, the I1 delta added, the
// result saturated to 8 bits signed. Random ready counts and deltas are
// applied for several thousand cycles, with directed phases that drive the
// counter into both saturation limits.
module tb_balance_monitor;
  localparam int N = 16, ISSUE_W = 4, READY_W = 7, CNT_W = 8, DELTA_W = 5;

  logic clk = 0, rst_n = 0;
  logic [READY_W-1:0] ready_int, ready_fp;
  logic signed [DELTA_W-1:0] delta;
  logic signed [CNT_W-1:0] cnt;
  logic signed [READY_W:0] avg;
  logic imbal;
  int checks = 0, failures = 0;

  balance_monitor #(.N(N), .ISSUE_W(ISSUE_W), .READY_W(READY_W), .CNT_W(CNT_W),
                    .DELTA_W(DELTA_W)) dut (
    .clk, .rst_n, .ready_int_i(ready_int), .ready_fp_i(ready_fp), .i1_delta_i(delta),
    .cnt_o(cnt), .i2_avg_o(avg), .i2_imbal_o(imbal));

  always #5 clk = ~clk;

  int win[N];
  int model_cnt;
  int sat_hi = 0, sat_lo = 0, imb_seen = 0;

  function automatic int floordiv(int a, int b);
    int q = a / b;
    if ((a % b != 0) && (a < 0)) q--;
    return q;
  endfunction

  task automatic step(int ri, int rf, int d);
    int i2, sum, nxt;
    ready_int = READY_W'(ri);
    ready_fp  = READY_W'(rf);
    delta     = DELTA_W'(d);
    #1;
    i2 = (((ri > ISSUE_W) && (rf < ISSUE_W)) || ((rf > ISSUE_W) && (ri < ISSUE_W))) ? rf - ri : 0;
    checks++;
    if (imbal !== (i2 != 0 || ((ri > ISSUE_W && rf < ISSUE_W) || (rf > ISSUE_W && ri < ISSUE_W)))) begin
      failures++; $display("imbal flag mismatch ri=%0d rf=%0d", ri, rf);
    end
    if (imbal) imb_seen++;
    sum = 0;
    for (int k = 0; k < N; k++) sum += win[k];
    nxt = model_cnt + floordiv(sum, N) + d;
    if (nxt > 127) nxt = 127;
    if (nxt < -128) nxt = -128;
    @(posedge clk);
    for (int k = N - 1; k > 0; k--) win[k] = win[k-1];
    win[0] = i2;
    model_cnt = nxt;
    #1;
    checks++;
    if (int'(cnt) != model_cnt) begin
      failures++;
      if (failures < 10) $display("cnt mismatch: dut=%0d model=%0d", cnt, model_cnt);
    end
    if (model_cnt == 127) sat_hi++;
    if (model_cnt == -128) sat_lo++;
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ready_int = 0; ready_fp = 0; delta = 0;
    for (int k = 0; k < N; k++) win[k] = 0;
    model_cnt = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // FP cluster flooded: counter climbs to +127
    for (int t = 0; t < 100; t++) step(1, 40, 2);
    // INT cluster flooded: counter falls to -128
    for (int t = 0; t < 200; t++) step(30, 0, -3);
    // random traffic
    for (int t = 0; t < 3000; t++)
      step($urandom_range(0, 64), $urandom_range(0, 64), int'($urandom_range(0, 16)) - 8);
    // both clusters busy: balanced, only I1 moves the counter
    for (int t = 0; t < 40; t++) step(10, 12, 1);
    checks++;
    if (sat_hi == 0 || sat_lo == 0 || imb_seen == 0) begin
      failures++; $display("mechanism not exercised hi=%0d lo=%0d imb=%0d", sat_hi, sat_lo, imb_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
