// Testbench of control_unit. For several network sizes and Na it runs a
// state update and a learning pass and checks the clock counts against
// n_net*(12 + Na) and n_net*(24 + learn_len), the number of weight loads,
// counting clocks, write-backs and latches, that the broadcast index walks
// 0 .. n_net-1 in order, that u_latch comes on the last counting clock, and
// that the asynchronous selection is passed on.
module tb_control_unit;
  import neuro_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cmd_valid, cmd_ready, async_en, busy, done;
  cmd_e cmd;
  logic [9:0] n_net, na, learn_len, async_idx, src_idx, w_addr, async_idx_q;
  logic src_valid, w_load, w_we, acc_en, learn_en, cnt_clear, u_latch, async_q;
  int checks = 0, failures = 0;

  control_unit #(.SETUP_CYCLES(12)) dut (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd, .n_net, .na, .learn_len,
    .async_en, .async_idx, .busy, .done, .src_idx, .src_valid, .w_addr,
    .w_load, .w_we, .acc_en, .learn_en, .cnt_clear, .u_latch, .async_q, .async_idx_q
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run(cmd_e c, int n, int a, int len, bit as, int ai);
    int cycles = 0, loads = 0, accs = 0, learns = 0, wes = 0, latches = 0, clears = 0;
    int last_src = -1, order_bad = 0, latch_bad = 0, acc_run = 0;
    @(negedge clk);
    cmd = c; n_net = 10'(n); na = 10'(a); learn_len = 10'(len);
    async_en = as; async_idx = 10'(ai); cmd_valid = 1;
    @(negedge clk);
    cmd_valid = 0;
    while (!done) begin
      cycles++;
      loads += int'(w_load); accs += int'(acc_en); learns += int'(learn_en);
      wes += int'(w_we); latches += int'(u_latch); clears += int'(cnt_clear);
      if (src_valid && int'(src_idx) != last_src) begin
        if (int'(src_idx) != last_src + 1) order_bad++;
        last_src = int'(src_idx);
      end
      acc_run = acc_en ? acc_run + 1 : 0;
      if (u_latch && (acc_run != a || int'(src_idx) != n - 1)) latch_bad++;
      if (w_load && int'(w_addr) != last_src + 1) order_bad++;
      @(negedge clk);
    end
    if (c == CMD_UPDATE) begin
      expect_eq("update clocks", cycles, n * (12 + a));
      expect_eq("loads", loads, n);
      expect_eq("counting clocks", accs, n * a);
      expect_eq("latches", latches, 1);
      expect_eq("clears", clears, 2);
      expect_eq("latch position", latch_bad, 0);
      expect_eq("async flag", int'(async_q), int'(as));
      if (as) expect_eq("async index", int'(async_idx_q), ai);
    end else begin
      expect_eq("learn clocks", cycles, n * (24 + len));
      expect_eq("loads", loads, n);
      expect_eq("learning clocks", learns, n * len);
      expect_eq("write-backs", wes, n);
      expect_eq("latches", latches, 0);
    end
    expect_eq("broadcast order", order_bad, 0);
    expect_eq("last broadcaster", last_src, n - 1);
    expect_eq("ready after done", int'(cmd_ready), 1);
  endtask

  initial begin
    cmd_valid = 0; cmd = CMD_UPDATE; n_net = 0; na = 0; learn_len = 0; async_en = 0; async_idx = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(CMD_UPDATE, 1, 1, 1, 0, 0);
    run(CMD_UPDATE, 3, 5, 1, 0, 0);
    run(CMD_UPDATE, 50, 10, 1, 1, 17);
    run(CMD_UPDATE, 20, 600, 1, 0, 0);
    run(CMD_LEARN, 2, 1, 7, 0, 0);
    run(CMD_LEARN, 50, 1, 26, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
