// Five-city travelling-salesman workload on the neurochip (default size).
//
// The tour is coded in 25 neurons v[X][i] (city X at position i), the usual
// Hopfield-Tank form, with one more neuron clamped to +1 as the bias source.
// With 0/1 variables the field of v[X][i] is
//   h = -A sum_{j!=i} v[X][j] - B sum_{Y!=X} v[Y][i]
//       - D sum_Y d(X,Y) (v[Y][i+1] + v[Y][i-1]) + I.
// Because the chip's outputs are signed pulse streams whose mean sits near
// +/-0.5 on the noise plateau, the variables are written as v = s + 1/2 with
// s in {-1/2, +1/2}, so the weights stay w and the bias becomes
// I + (1/2) sum_j w. Everything is scaled into 8-bit weights.
// Each trial runs asynchronous updates of randomly chosen neurons with
// Na(t) = Na0 (1 + t/tau_s)^2, Na0 = 450, tau_s = 100, capped at 600 (the
// annealed case), or a fixed Na = 600, with split noise a = 200,
// b = 4Na - 200, Umax = 4Na, nonmonotonic neurons. The final state is read
// from the signs of u. Checks: the clock count of every update against
// 30 * (12 + Na), that the host schedule reached its cap, and that valid
// tours are found. The share of trials ending in the best tour is printed.
module tb_tsp5;
  import neuro_pkg::*;
  localparam int N = 50;
  localparam int NC = 5;          // cities
  localparam int NN = NC * NC;    // tour neurons
  localparam int NB = 5;          // clamped +1 bias neurons
  localparam int NT = NN + NB;    // network size
  localparam int TRIALS = 5;      // per schedule
  localparam int STEPS = 100;     // asynchronous updates per trial

  logic clk = 0, rst_n = 0;
  logic cmd_valid, cmd_ready, async_en, phase, ctrl_pulse, w_we, x_bus_oe, busy, done;
  cmd_e cmd;
  logic [9:0] n_net, na, learn_len, chip_base, async_idx, w_addr;
  logic [12:0] a, b, umax;
  logic [N-1:0] clamp_en, clamp_neg, ovf_o, mono;
  logic [N-1:0][7:0] w_rdata, w_wdata;
  logic [N-1:0][13:0] u_o;
  spike_t x_bus_i, x_bus_o;
  logic [7:0] wmem [64][N];

  int checks = 0, failures = 0;

  always_comb
    for (int k = 0; k < N; k++) w_rdata[k] = wmem[w_addr[5:0]][k];

  neurochip dut (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd, .n_net, .na, .learn_len, .chip_base,
    .async_en, .async_idx, .a, .b, .umax, .mono, .phase, .ctrl_pulse, .clamp_en,
    .clamp_neg, .w_addr, .w_rdata, .w_wdata, .w_we, .x_bus_i, .x_bus_o, .x_bus_oe,
    .u_o, .ovf_o, .busy, .done
  );

  always #5 clk = ~clk;

  initial begin
    repeat (40000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // city coordinates: a fixed irregular pentagon
  real cx [NC] = '{0.0, 1.0, 1.3, 0.5, -0.3};
  real cy [NC] = '{0.0, 0.1, 0.9, 1.4, 0.8};

  function automatic real city_dist(int p, int q);
    return $sqrt((cx[p] - cx[q]) ** 2 + (cy[p] - cy[q]) ** 2);
  endfunction

  function automatic real tour_len(int perm [NC]);
    real l = 0.0;
    for (int i = 0; i < NC; i++) l += city_dist(perm[i], perm[(i + 1) % NC]);
    return l;
  endfunction

  task automatic do_update(int n, int a_n, bit as, int idx);
    int cycles = 0;
    @(negedge clk);
    cmd = CMD_UPDATE; n_net = 10'(n); na = 10'(a_n); async_en = as; async_idx = 10'(idx);
    a = 13'(200); b = 13'(4 * a_n - 200); umax = 13'(4 * a_n);
    cmd_valid = 1;
    @(negedge clk);
    cmd_valid = 0;
    while (!done) begin cycles++; @(negedge clk); end
    checks++;
    if (cycles != n * (12 + a_n)) begin
      failures++;
      $display("FAIL update clocks %0d expected %0d", cycles, n * (12 + a_n));
    end
  endtask

  initial begin
    real A = 1.0, B = 1.0, D = 0.2, I = 0.8, scale;
    real wr [NN][NN + 1];
    real best = 1.0e9;
    int best_hits [2] = '{0, 0};
    int n_valid [2] = '{0, 0};
    int max_na = 0;
    int row_cnt [NC];
    int col_cnt [NC];

    // best tour by enumeration (city 0 first)
    for (int p1 = 1; p1 < NC; p1++) for (int p2 = 1; p2 < NC; p2++)
      for (int p3 = 1; p3 < NC; p3++) for (int p4 = 1; p4 < NC; p4++)
        if (p1 != p2 && p1 != p3 && p1 != p4 && p2 != p3 && p2 != p4 && p3 != p4) begin
          automatic int perm [NC] = '{0, p1, p2, p3, p4};
          if (tour_len(perm) < best) best = tour_len(perm);
        end

    // real-valued weights (receiver r, source s) and bias
    for (int r = 0; r < NN; r++) for (int s = 0; s <= NN; s++) wr[r][s] = 0.0;
    for (int x = 0; x < NC; x++) for (int i = 0; i < NC; i++) begin
      automatic int r = x * NC + i;
      automatic real sum = 0.0;
      for (int y = 0; y < NC; y++) for (int j = 0; j < NC; j++) begin
        automatic int s = y * NC + j;
        automatic real w = 0.0;
        if (x == y && i != j) w -= A;
        if (i == j && x != y) w -= B;
        if (x != y && (j == (i + 1) % NC || j == (i + NC - 1) % NC)) w -= D * city_dist(x, y);
        wr[r][s] = w;
        sum += w;
      end
      wr[r][NN] = (I + 0.5 * sum) / NB;  // shared by the NB bias neurons
    end
    scale = 0.0;
    for (int r = 0; r < NN; r++) for (int s = 0; s <= NN; s++)
      if ((wr[r][s] < 0 ? -wr[r][s] : wr[r][s]) > scale) scale = (wr[r][s] < 0 ? -wr[r][s] : wr[r][s]);
    scale = 127.0 / scale;
    for (int j = 0; j < 64; j++) for (int k = 0; k < N; k++) wmem[j][k] = 8'd0;
    for (int r = 0; r < NN; r++) for (int s = 0; s < NT; s++) begin
      automatic real v = wr[r][(s < NN) ? s : NN];
      wmem[s][r] = 8'($rtoi(v * scale + ((v < 0) ? -0.5 : 0.5)));
    end

    cmd_valid = 0; cmd = CMD_UPDATE; n_net = 0; na = 0; learn_len = 0; chip_base = 0;
    async_en = 0; async_idx = 0; a = 200; b = 1600; umax = 1800; mono = '0; phase = 0;
    ctrl_pulse = 0; clamp_en = '0; clamp_neg = '0; x_bus_i = '0;
    for (int k = NN; k < NT; k++) clamp_en[k] = 1'b1;
    repeat (3) @(negedge clk);
    rst_n = 1;

    for (int sched = 0; sched < 2; sched++) begin
      for (int trial = 0; trial < TRIALS; trial++) begin
        automatic int perm [NC];
        automatic bit tour_ok = 1;
        // random start: one synchronous update from a random clamp pattern
        for (int k = 0; k < NN; k++) begin clamp_en[k] = 1'b1; clamp_neg[k] = 1'($urandom); end
        do_update(NT, 20, 0, 0);
        for (int k = 0; k < NN; k++) clamp_en[k] = 1'b0;
        for (int t = 0; t < STEPS; t++) begin
          automatic real f = 1.0 + t / 100.0;
          automatic int n_a = (sched == 0) ? $rtoi(450.0 * f * f) : 600;
          if (n_a > 600) n_a = 600;
          if (n_a > max_na) max_na = n_a;
          do_update(NT, n_a, 1, $urandom % NN);
        end
        // decode: exactly one positive neuron per row and column
        for (int k = 0; k < NC; k++) begin row_cnt[k] = 0; col_cnt[k] = 0; end
        for (int c = 0; c < NC; c++)
          for (int pos = 0; pos < NC; pos++)
            if ($signed(u_o[c * NC + pos]) > 0) begin
              row_cnt[c]++; col_cnt[pos]++; perm[pos] = c;
            end
        for (int k = 0; k < NC; k++)
          if (row_cnt[k] != 1 || col_cnt[k] != 1) tour_ok = 0;
        if (tour_ok) begin
          n_valid[sched] += 1;
          if (tour_len(perm) < best + 1.0e-6) best_hits[sched] += 1;
          $display("schedule %0d trial %0d: tour %0d %0d %0d %0d %0d length %0f (best %0f)",
                   sched, trial, perm[0], perm[1], perm[2], perm[3], perm[4], tour_len(perm), best);
        end else
          $display("schedule %0d trial %0d: no valid tour", sched, trial);
        for (int c = 0; c < NC; c++)
          $display("  u row %0d: %6d %6d %6d %6d %6d", c, $signed(u_o[c*NC]), $signed(u_o[c*NC+1]),
                   $signed(u_o[c*NC+2]), $signed(u_o[c*NC+3]), $signed(u_o[c*NC+4]));
      end
    end
    checks++;
    if (max_na != 600) begin failures++; $display("FAIL schedule peak %0d", max_na); end
    checks++;
    if (n_valid[0] + n_valid[1] == 0) begin failures++; $display("FAIL no n_valid tour found"); end
    $display("annealed: %0d/%0d n_valid, %0d best; fixed Na=600: %0d/%0d n_valid, %0d best",
             n_valid[0], TRIALS, best_hits[0], n_valid[1], TRIALS, best_hits[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
