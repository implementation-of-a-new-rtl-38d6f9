// End-to-end testbench of the neurochip at its default size (50 neurons,
// five 200-bit generators), with an array model of the external weight
// memory and the host's command sequence. It checks:
//   - state-update timing: n_net * (12 + Na) clocks from command to done;
//   - zero weights give u = 0 exactly;
//   - with clamped +/-1 sources, u_i = sum_j w_ij x_j in pulses, within
//     5 sigma of Na * sum_j s_ij |w_ij| / 128;
//   - overflow of the 14-bit u (all weights 127, Na = 200) sets ovf;
//   - the nonmonotonic characteristic end to end: neuron 0 is given a
//     potential U by one update, then broadcasts alone to 49 listeners with
//     weight 127, whose sum measures its firing rate; compared with
//     2q(1-q), q = U/Umax (uniform noise), with eq. (6) for the split
//     noise a = 200, b = 300, Umax = 500, with U/Umax in monotonic mode, and
//     exactly zero above the cut-off;
//   - asynchronous update changes only the selected neuron;
//   - slots of neurons on other chips take x from the x bus input, and the
//     chip drives the bus only in its own slots;
//   - learning: with clamped +/-1 neurons and a steady control pulse, a
//     clamped pass adds learn_len * s_i s_j to every weight and an unclamped
//     pass subtracts it, saturating at +/-127; timing n_net * (24 + len).
// Each mechanism is counted; one that never happens is a failure.
module tb_neurochip;
  import neuro_pkg::*;
  localparam int N = 50;

  logic clk = 0, rst_n = 0;
  logic cmd_valid, cmd_ready, async_en, phase, ctrl_pulse, w_we, x_bus_oe, busy, done;
  cmd_e cmd;
  logic [9:0] n_net, na, learn_len, chip_base, async_idx, w_addr;
  logic [12:0] a, b, umax;
  logic [N-1:0] clamp_en, clamp_neg, ovf_o, mono;
  logic [N-1:0][7:0] w_rdata, w_wdata;
  logic [N-1:0][13:0] u_o;
  spike_t x_bus_i, x_bus_o;

  int checks = 0, failures = 0;
  int n_sync = 0, n_async = 0, n_ovf = 0, n_nonmono = 0, n_mono = 0, n_split = 0,
      n_eco = 0, n_ext = 0, n_clamp_learn = 0, n_unclamp_learn = 0, n_sat = 0;

  // external weight memory: column j holds w_ij for the 50 neurons i
  logic [7:0] wmem [1024][N];

  always_comb
    for (int k = 0; k < N; k++) w_rdata[k] = wmem[w_addr][k];

  always_ff @(posedge clk)
    if (w_we) for (int k = 0; k < N; k++) wmem[w_addr][k] <= w_wdata[k];

  neurochip dut (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd, .n_net, .na, .learn_len, .chip_base,
    .async_en, .async_idx, .a, .b, .umax, .mono, .phase, .ctrl_pulse, .clamp_en,
    .clamp_neg, .w_addr, .w_rdata, .w_wdata, .w_we, .x_bus_i, .x_bus_o, .x_bus_oe,
    .u_o, .ovf_o, .busy, .done
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic int sval(logic [13:0] v);
    return int'($signed(v));
  endfunction

  // run one command; returns the clocks from acceptance to done
  task automatic run(cmd_e c, int n, int a_n, int len, output int cycles, output int oe_clocks);
    cycles = 0; oe_clocks = 0;
    @(negedge clk);
    cmd = c; n_net = 10'(n); na = 10'(a_n); learn_len = 10'(len);
    cmd_valid = 1;
    @(negedge clk);
    cmd_valid = 0;
    while (!done) begin
      cycles++;
      oe_clocks += int'(x_bus_oe);
      @(negedge clk);
    end
  endtask

  task automatic fill_col(int j, int v);
    for (int k = 0; k < N; k++) wmem[j][k] = 8'(v);
  endtask

  // measure the firing rate of neuron 0 whose potential is U: it broadcasts
  // alone (slot 0) to 49 listeners with weight 127; returns listener 1's sum
  task automatic measure(int n_acc, output int count);
    int cyc, oe;
    for (int j = 0; j < N; j++) fill_col(j, 0);
    fill_col(0, 127);
    clamp_en = '1; clamp_en[0] = 1'b0;
    run(CMD_UPDATE, N, n_acc, 1, cyc, oe);
    count = sval(u_o[1]);
  endtask

  // give neuron 0 a potential near target (sources 1..49 clamped +1)
  task automatic set_u0(int target, output int u0);
    int cyc, oe, v;
    for (int j = 0; j < N; j++) fill_col(j, 0);
    v = target * 128 / (49 * 40);
    for (int j = 1; j < N; j++) wmem[j][0] = 8'(v);
    clamp_en = '1; clamp_neg = '0;
    run(CMD_UPDATE, N, 40, 1, cyc, oe);
    u0 = sval(u_o[0]);
  endtask

  function automatic real pf_split(real uu, real aa, real bb, real um);
    real c = um + aa - bb, d = aa - bb, p1;
    if (uu < aa) p1 = uu / c;
    else if (uu < bb) p1 = aa / c;
    else if (uu < um) p1 = (uu + d) / c;
    else p1 = 1.0;
    return 2.0 * p1 * (1.0 - p1);
  endfunction

  task automatic rate_check(string what, int cnt, real p, int n_acc);
    real e = n_acc * p * 127.0 / 128.0;
    real sigma = $sqrt(n_acc * p * (1.0 - p)) + 1.0;
    real diff = (cnt < 0 ? -cnt : cnt) - e;
    if (diff < 0.0) diff = -diff;
    check($sformatf("%s: count %0d expected %0f", what, cnt, e), diff <= 5.0 * sigma + 0.02 * n_acc);
  endtask

  initial begin
    int cyc, oe, u0, cnt;
    int sgn [N];
    int wv [N][N];

    cmd_valid = 0; cmd = CMD_UPDATE; n_net = 0; na = 0; learn_len = 0; chip_base = 0;
    async_en = 0; async_idx = 0; a = 0; b = 0; umax = 800; mono = '0; phase = 0;
    ctrl_pulse = 0; clamp_en = '0; clamp_neg = '0; x_bus_i = '0;
    for (int j = 0; j < 1024; j++) fill_col(j, 0);
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. zero weights, timing of one state update at Na = 10
    run(CMD_UPDATE, N, 10, 1, cyc, oe);
    check($sformatf("update clocks %0d", cyc), cyc == N * (12 + 10));
    check("local broadcast clocks", oe == N * 10);
    for (int k = 0; k < N; k++) check("zero weights give u = 0", sval(u_o[k]) == 0);
    n_sync++;

    // 2. clamped sources, random weights, Na = 200
    for (int j = 0; j < N; j++) sgn[j] = ($urandom % 2) ? -1 : 1;
    for (int j = 0; j < N; j++)
      for (int i = 0; i < N; i++) begin
        wv[i][j] = int'($urandom % 255) - 127;
        wmem[j][i] = 8'(wv[i][j]);
      end
    clamp_en = '1;
    for (int j = 0; j < N; j++) clamp_neg[j] = sgn[j] < 0;
    run(CMD_UPDATE, N, 200, 1, cyc, oe);
    check("update clocks Na=200", cyc == N * 212);
    for (int i = 0; i < N; i++) begin
      automatic real mean = 0.0, var_s = 0.0, diff;
      for (int j = 0; j < N; j++) begin
        automatic real p = (wv[i][j] < 0 ? -wv[i][j] : wv[i][j]) / 128.0;
        mean += 200.0 * p * ((wv[i][j] < 0) ? -sgn[j] : sgn[j]);
        var_s += 200.0 * p * (1.0 - p);
      end
      diff = sval(u_o[i]) - mean;
      if (diff < 0.0) diff = -diff;
      check($sformatf("u[%0d]=%0d expected %0f", i, sval(u_o[i]), mean),
            diff <= 5.0 * $sqrt(var_s) + 1.0);
      check("no overflow", ovf_o[i] == 1'b0);
    end
    n_sync++;

    // 3. overflow of the 14-bit membrane counter
    for (int j = 0; j < N; j++) fill_col(j, 127);
    clamp_neg = '0;
    run(CMD_UPDATE, N, 200, 1, cyc, oe);
    for (int i = 0; i < N; i++) begin
      check("overflow flagged", ovf_o[i] == 1'b1);
      // the true sum is about 9922 and wraps to a negative value
      check("wrapped sum", sval(u_o[i]) < 0);
    end
    n_ovf++;

    // 4. nonmonotonic characteristic, uniform noise over [0, 800)
    a = 0; b = 0; umax = 800; mono = '0;
    for (int t = 0; t < 5; t++) begin
      automatic int targets [5] = '{150, 400, 650, -400, 1100};
      real q;
      set_u0(targets[t], u0);
      measure(1000, cnt);
      q = (u0 < 0 ? -u0 : u0) / 800.0;
      if (q > 1.0) q = 1.0;
      rate_check($sformatf("nonmonotonic U=%0d", u0), cnt, 2.0 * q * (1.0 - q), 1000);
      check("sign follows U", (u0 < 0) ? (cnt <= 0) : (cnt >= 0));
      if (q >= 1.0) begin
        check("end cut-off gives no pulses", cnt == 0);
        n_eco++;
      end
      n_nonmono++;
    end

    // 5. monotonic mode (R2 at its maximum)
    mono = '0; mono[0] = 1'b1;  // only the measured neuron is monotonic
    for (int t = 0; t < 3; t++) begin
      automatic int targets [3] = '{200, 600, 1100};
      real q;
      set_u0(targets[t], u0);
      measure(1000, cnt);
      q = (u0 < 0 ? -u0 : u0) / 800.0;
      if (q > 1.0) q = 1.0;
      rate_check($sformatf("monotonic U=%0d", u0), cnt, q, 1000);
      n_mono++;
    end
    mono = '0;

    // 6. split noise distribution a = 200, b = 300, Umax = 500
    a = 200; b = 300; umax = 500;
    for (int t = 0; t < 3; t++) begin
      automatic int targets [3] = '{120, 250, 420};
      set_u0(targets[t], u0);
      measure(1000, cnt);
      rate_check($sformatf("split noise U=%0d", u0), cnt,
                 pf_split(real'(u0 < 0 ? -u0 : u0), 200.0, 300.0, 500.0), 1000);
      n_split++;
    end
    a = 0; b = 0; umax = 800;

    // 7. asynchronous update of neuron 7 only
    begin
      logic [N-1:0][13:0] u_prev;
      for (int j = 0; j < N; j++) fill_col(j, 60);
      clamp_en = '1; clamp_neg = '0;
      u_prev = u_o;
      async_en = 1; async_idx = 7;
      run(CMD_UPDATE, N, 50, 1, cyc, oe);
      async_en = 0;
      for (int i = 0; i < N; i++)
        if (i != 7) check("async leaves other neurons", u_o[i] == u_prev[i]);
      // expected 50 * 50 * 60/128 = 1172
      check($sformatf("async neuron updated (%0d)", sval(u_o[7])),
            sval(u_o[7]) > 1000 && sval(u_o[7]) < 1350);
      n_async++;
    end

    // 8. ten more neurons on another chip: slots 50..59 take x_bus_i
    for (int j = 0; j < 60; j++) fill_col(j, (j >= N) ? 127 : 0);
    x_bus_i = '{fire: 1'b1, neg: 1'b1};
    run(CMD_UPDATE, 60, 30, 1, cyc, oe);
    check("60-neuron update clocks", cyc == 60 * 42);
    check("chip drives the bus only in its own slots", oe == N * 30);
    for (int i = 0; i < N; i++)
      // 10 slots * 30 clocks * 127/128, all counted down
      check($sformatf("external source sum %0d", sval(u_o[i])), sval(u_o[i]) <= -280 && sval(u_o[i]) >= -300);
    n_ext++;
    x_bus_i = '0;

    // 9. learning: clamped pass then unclamped pass, steady control pulse
    for (int j = 0; j < N; j++) sgn[j] = ($urandom % 2) ? -1 : 1;
    for (int j = 0; j < N; j++)
      for (int i = 0; i < N; i++) begin
        wv[i][j] = int'($urandom % 255) - 127;
        wmem[j][i] = 8'(wv[i][j]);
      end
    clamp_en = '1;
    for (int j = 0; j < N; j++) clamp_neg[j] = sgn[j] < 0;
    ctrl_pulse = 1;
    for (int p = 0; p < 2; p++) begin
      phase = 1'(p);
      run(CMD_LEARN, N, 1, 40, cyc, oe);
      check($sformatf("learning pass clocks %0d", cyc), cyc == N * (24 + 40));
      for (int j = 0; j < N; j++)
        for (int i = 0; i < N; i++) begin
          automatic int e = wv[i][j] + ((p == 0) ? 40 : -40) * sgn[i] * sgn[j];
          if (e > 127) begin e = 127; n_sat++; end
          if (e < -127) begin e = -127; n_sat++; end
          wv[i][j] = e;
          checks++;
          if (int'($signed(wmem[j][i])) != e) begin
            failures++;
            if (failures < 10) $display("FAIL learned w[%0d][%0d]=%0d expected %0d", i, j, $signed(wmem[j][i]), e);
          end
        end
      if (p == 0) n_clamp_learn++; else n_unclamp_learn++;
    end
    ctrl_pulse = 0;

    // every mechanism must have happened
    check("sync update",       n_sync > 0);
    check("async update",      n_async > 0);
    check("overflow",          n_ovf > 0);
    check("nonmonotonic mode", n_nonmono > 0);
    check("monotonic mode",    n_mono > 0);
    check("split noise",       n_split > 0);
    check("end cut-off",       n_eco > 0);
    check("external x bus",    n_ext > 0);
    check("clamped learning",  n_clamp_learn > 0);
    check("unclamped learning", n_unclamp_learn > 0);
    check("weight saturation", n_sat > 0);
    $display("mechanisms: sync=%0d async=%0d ovf=%0d nonmono=%0d mono=%0d split=%0d eco=%0d ext=%0d learn_cl=%0d learn_uncl=%0d sat=%0d",
             n_sync, n_async, n_ovf, n_nonmono, n_mono, n_split, n_eco, n_ext,
             n_clamp_learn, n_unclamp_learn, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
