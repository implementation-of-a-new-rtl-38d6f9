// Testbench of neuron. Each round loads a random weight, broadcasts a random
// pulse stream x_j for Na clocks with random weight noise, latches, and
// compares u with the sum worked out here: +/-1 for every clock where
// rnd_w < |w| and x_j fires, signed by sign(w) xor sign(x_j). Rounds chain
// several slots before a latch, as a state update does. The output x_i is
// checked every clock against the comparator/XOR rule on the latched u, the
// clamp against a steady +/-1, and learning against the pulse rule.
module tb_neuron;
  import neuro_pkg::*;
  logic clk = 0, rst_n = 0;
  logic w_load, acc_en, clear, latch, clamp_en, clamp_neg, learn_en, phase, ctrl_pulse, mono;
  logic [7:0] w_in, w;
  logic [6:0] rnd_w;
  logic [12:0] r1, r2;
  spike_t x_bus, x_out;
  logic [13:0] u;
  logic ovf;
  int checks = 0, failures = 0;
  int model_u, sum, mw;

  neuron #(.U_W(14), .W_W(8)) dut (
    .clk, .rst_n, .w_load, .w_in, .w, .rnd_w, .r1, .r2, .mono, .x_bus, .acc_en,
    .clear, .latch, .clamp_en, .clamp_neg, .learn_en, .phase, .ctrl_pulse,
    .x_out, .u, .ovf
  );

  always #5 clk = ~clk;

  function automatic spike_t coded(int uu, int rr1, int rr2, bit mo);
    int mag = (uu < 0) ? -uu : uu;
    spike_t s;
    s.fire = (rr1 < mag) ^ ((mo ? 8191 : rr2) < mag);
    s.neg  = uu < 0;
    return s;
  endfunction

  // x_i check on the current inputs
  task automatic check_x();
    spike_t e;
    #1;
    e = clamp_en ? spike_t'{1'b1, clamp_neg} : coded(model_u, int'(r1), int'(r2), mono);
    checks++;
    if (x_out !== e) begin
      failures++;
      if (failures < 10) $display("FAIL x_out=%b expected %b (u=%0d)", x_out, e, model_u);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {w_load, acc_en, clear, latch, clamp_en, clamp_neg, learn_en, phase, ctrl_pulse, mono} = '0;
    w_in = 0; rnd_w = 0; r1 = 0; r2 = 0; x_bus = '0;
    model_u = 0; sum = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 60; round++) begin
      automatic int slots = 1 + $urandom % 4;
      sum = 0;
      for (int s = 0; s < slots; s++) begin
        int wv, na;
        // load w
        w_in = 8'($urandom % 255 + 129);  // -127 .. 127
        wv = int'($signed(w_in));
        w_load = 1; @(negedge clk); w_load = 0;
        na = 20 + $urandom % 200;
        acc_en = 1;
        for (int c = 0; c < na; c++) begin
          automatic int mag = (wv < 0) ? -wv : wv;
          rnd_w = 7'($urandom);
          x_bus.fire = ($urandom % 3) != 0;
          x_bus.neg  = ($urandom % 2) != 0;
          r1 = 13'($urandom % 1000); r2 = 13'($urandom % 1000);
          mono = round % 3 == 0;
          clamp_en = 0;
          check_x();
          if (rnd_w < mag && x_bus.fire) sum += ((wv < 0) ^ x_bus.neg) ? -1 : 1;
          if (s == slots - 1 && c == na - 1) begin latch = 1; clear = 1; end
          @(negedge clk);
          latch = 0; clear = 0;
        end
        acc_en = 0;
      end
      model_u = sum;
      checks++;
      if (int'($signed(u)) != model_u) begin
        failures++;
        if (failures < 10) $display("FAIL round %0d u=%0d expected %0d", round, $signed(u), model_u);
      end
      // clamp
      clamp_en = 1; clamp_neg = 1'(round);
      check_x();
      clamp_en = 0;
    end
    // learning: clamp x_i, drive x_j, count with control pulses
    w_in = 8'd10; w_load = 1; @(negedge clk); w_load = 0;
    mw = 10;
    learn_en = 1;
    for (int c = 0; c < 400; c++) begin
      clamp_en = 1; clamp_neg = c >= 200;
      phase = (c % 100) >= 50;
      x_bus.fire = ($urandom % 2) != 0; x_bus.neg = ($urandom % 2) != 0;
      ctrl_pulse = ($urandom % 2) != 0;
      @(negedge clk);
      if (x_bus.fire && ctrl_pulse) begin
        if (phase ^ clamp_neg ^ x_bus.neg) begin if (mw > -127) mw--; end
        else if (mw < 127) mw++;
      end
      checks++;
      if (int'($signed(w)) != mw) begin
        failures++;
        if (failures < 10) $display("FAIL learn c=%0d w=%0d expected %0d", c, $signed(w), mw);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
