// Testbench of learn_unit: random loads, pulses, control pulses and phases
// against a model of eq. (9) in pulse form: count when x_i, x_j and the
// control pulse all fire during learn_en, down when phase xor sign(x_i x_j)
// is 1, saturating at +/-127; a loaded -128 becomes -127.
module tb_learn_unit;
  import neuro_pkg::*;
  logic clk = 0, rst_n = 0;
  logic w_load, learn_en, ctrl_pulse, phase;
  logic [7:0] w_in, w;
  spike_t xi, xj;
  int checks = 0, failures = 0, sat_hits = 0, ups = 0, downs = 0;
  int mw;

  learn_unit #(.W_W(8)) dut (.clk, .rst_n, .w_load, .w_in, .learn_en, .xi, .xj,
                             .ctrl_pulse, .phase, .w);

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    w_load = 0; learn_en = 0; ctrl_pulse = 0; phase = 0; w_in = 0; xi = '0; xj = '0;
    mw = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      w_load     = ($urandom % 200) == 0;
      w_in       = 8'($urandom);
      learn_en   = ($urandom % 8) != 0;
      ctrl_pulse = ($urandom % 4) != 0;
      phase      = (n / 1000) % 2 == 1;
      xi.fire = ($urandom % 4) != 0; xi.neg = ($urandom % 5) == 0;
      xj.fire = ($urandom % 4) != 0; xj.neg = ($urandom % 5) == 0;
      @(negedge clk);
      if (w_load) mw = ($signed(w_in) == -128) ? -127 : int'($signed(w_in));
      else if (learn_en && xi.fire && xj.fire && ctrl_pulse) begin
        if (phase ^ xi.neg ^ xj.neg) begin
          downs++;
          if (mw > -127) mw--; else sat_hits++;
        end else begin
          ups++;
          if (mw < 127) mw++; else sat_hits++;
        end
      end
      checks++;
      if (int'($signed(w)) != mw) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d w=%0d expected %0d", n, $signed(w), mw);
      end
    end
    checks++;
    if (sat_hits == 0 || ups == 0 || downs == 0) begin
      failures++;
      $display("FAIL coverage sat=%0d up=%0d down=%0d", sat_hits, ups, downs);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
