// Four-bit parity learning on the neurochip as a Boltzmann machine
// (default chip size).
//
// Network: 4 input neurons, H = 3 nonmonotonic hidden neurons, 1 monotonic
// output neuron and 1 bias neuron clamped to +1 (n_net = 9). Noise
// a = 200, b = 300, Umax = 500, Na = 1000; the control pulse fires with
// probability 0.048 (eps/T), learning windows are 512 clocks.
// For every pattern of every epoch the host:
//   clamped phase:   clamps inputs and the parity target, settles with two
//                    state updates, runs a learning pass with phase = 0;
//   unclamped phase: clamps only the inputs, settles, learns with phase = 1.
// Checks: the clock count of every update (9 * (12 + Na)) and learning pass
// (9 * (24 + 512)), and, in every clamped pass, the exact change of each
// weight between two clamped neurons: they fire every clock, so w_ij moves
// by s_i s_j times the control pulses counted in slot j (until it
// saturates). Only a few epochs fit in a simulation, so the parity accuracy
// reached is printed, not checked.
module tb_parity4;
  import neuro_pkg::*;
  localparam int N = 50;
  localparam int NI = 4, H = 3;
  localparam int OUT = NI + H;        // output neuron
  localparam int BIAS = OUT + 1;      // clamped +1
  localparam int NT = BIAS + 1;       // network size
  localparam int NA = 1000, LEN = 512, EPOCHS = 6;

  logic clk = 0, rst_n = 0;
  logic cmd_valid, cmd_ready, async_en, phase, ctrl_pulse, w_we, x_bus_oe, busy, done;
  cmd_e cmd;
  logic [9:0] n_net, na, learn_len, chip_base, async_idx, w_addr;
  logic [12:0] a, b, umax;
  logic [N-1:0] clamp_en, clamp_neg, ovf_o, mono;
  logic [N-1:0][7:0] w_rdata, w_wdata;
  logic [N-1:0][13:0] u_o;
  spike_t x_bus_i, x_bus_o;
  logic [7:0] wmem [16][N];
  int slot_pulses [NT];
  int slot;

  int checks = 0, failures = 0;

  always_comb
    for (int k = 0; k < N; k++) w_rdata[k] = wmem[w_addr[3:0]][k];

  always_ff @(posedge clk)
    if (w_we) for (int k = 0; k < N; k++) wmem[w_addr[3:0]][k] <= w_wdata[k];

  neurochip dut (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd, .n_net, .na, .learn_len, .chip_base,
    .async_en, .async_idx, .a, .b, .umax, .mono, .phase, .ctrl_pulse, .clamp_en,
    .clamp_neg, .w_addr, .w_rdata, .w_wdata, .w_we, .x_bus_i, .x_bus_o, .x_bus_oe,
    .u_o, .ovf_o, .busy, .done
  );

  always #5 clk = ~clk;

  // control pulse stream with density eps/T = 0.048, counted per slot
  always @(negedge clk) ctrl_pulse <= ($urandom % 1000) < 48;
  always @(posedge clk)
    if (x_bus_oe && ctrl_pulse) slot_pulses[w_addr] <= slot_pulses[w_addr] + 1;

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(cmd_e c, int a_n);
    int cycles = 0, expect_c;
    @(negedge clk);
    cmd = c; n_net = 10'(NT); na = 10'(a_n); learn_len = 10'(LEN);
    cmd_valid = 1;
    @(negedge clk);
    cmd_valid = 0;
    while (!done) begin cycles++; @(negedge clk); end
    expect_c = (c == CMD_UPDATE) ? NT * (12 + a_n) : NT * (24 + LEN);
    checks++;
    if (cycles != expect_c) begin
      failures++;
      $display("FAIL command clocks %0d expected %0d", cycles, expect_c);
    end
  endtask

  function automatic int parity_target(int p);
    // +1 for an odd number of +1 inputs, else -1
    return ($countones(4'(p)) % 2 == 1) ? 1 : -1;
  endfunction

  task automatic set_pattern(int p, bit with_target);
    clamp_en = '0; clamp_neg = '0;
    for (int k = 0; k < NI; k++) begin clamp_en[k] = 1'b1; clamp_neg[k] = !p[k]; end
    clamp_en[BIAS] = 1'b1;
    if (with_target) begin clamp_en[OUT] = 1'b1; clamp_neg[OUT] = parity_target(p) < 0; end
  endtask

  initial begin
    int correct;
    cmd_valid = 0; cmd = CMD_UPDATE; n_net = 0; na = 0; learn_len = 0; chip_base = 0;
    async_en = 0; async_idx = 0; a = 200; b = 300; umax = 500; phase = 0;
    clamp_en = '0; clamp_neg = '0; x_bus_i = '0;
    mono = '1;
    for (int k = NI; k < NI + H; k++) mono[k] = 1'b0;   // hidden layer nonmonotonic
    for (int j = 0; j < 16; j++)
      for (int k = 0; k < N; k++) wmem[j][k] = 8'(int'($urandom % 21) - 10);
    for (int j = 0; j < 16; j++) wmem[j][j] = 8'd0;  // no self-coupling
    repeat (3) @(negedge clk);
    rst_n = 1;

    for (int ep = 0; ep < EPOCHS; ep++) begin
      for (int p = 0; p < 16; p++) begin
        automatic int w_before [NT][NT];
        // clamped phase
        set_pattern(p, 1);
        run(CMD_UPDATE, NA);
        run(CMD_UPDATE, NA);
        for (int j = 0; j < NT; j++) for (int i = 0; i < NT; i++) w_before[i][j] = int'($signed(wmem[j][i]));
        for (int j = 0; j < NT; j++) slot_pulses[j] = 0;
        phase = 0;
        run(CMD_LEARN, 1);
        for (int j = 0; j < NT; j++)
          for (int i = 0; i < NT; i++)
            if (clamp_en[i] && clamp_en[j]) begin
              automatic int si = clamp_neg[i] ? -1 : 1, sj = clamp_neg[j] ? -1 : 1;
              automatic int e = w_before[i][j] + si * sj * slot_pulses[j];
              if (e > 127) e = 127;
              if (e < -127) e = -127;
              checks++;
              if (int'($signed(wmem[j][i])) != e) begin
                failures++;
                if (failures < 10) $display("FAIL clamped learning w[%0d][%0d]=%0d expected %0d",
                                            i, j, $signed(wmem[j][i]), e);
              end
            end
        // unclamped phase
        set_pattern(p, 0);
        run(CMD_UPDATE, NA);
        run(CMD_UPDATE, NA);
        phase = 1;
        run(CMD_LEARN, 1);
      end
      // evaluate: inputs clamped, read the sign of the output potential
      correct = 0;
      for (int p = 0; p < 16; p++) begin
        set_pattern(p, 0);
        run(CMD_UPDATE, NA);
        run(CMD_UPDATE, NA);
        if (($signed(u_o[OUT]) > 0) == (parity_target(p) > 0)) correct++;
      end
      $display("epoch %0d: %0d of 16 parity outputs correct", ep, correct);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
