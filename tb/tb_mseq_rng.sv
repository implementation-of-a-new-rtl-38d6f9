// Testbench of mseq_rng: an independent bit-serial model of the recurrence
// a[n+200] = a[n+163] ^ a[n+2] ^ a[n+1] ^ a[n] (polynomial
// x^200 + x^163 + x^2 + x + 1), started from the all-ones seed, predicts every
// bit of the 200-bit output for 300 clocks (20 new bits per clock; state bit
// k after t clocks is a[20t + 199 - k]). Also checks the density of ones.
module tb_mseq_rng;
  localparam int WIDTH = 200, STEP = 20, CLOCKS = 300;
  logic clk = 0, rst_n = 0;
  logic [WIDTH-1:0] rnd;
  bit   seq [WIDTH + STEP*CLOCKS + 8];
  int checks = 0, failures = 0;
  longint ones = 0, total = 0;

  mseq_rng #(.WIDTH(WIDTH), .STEP(STEP), .SEED({WIDTH{1'b1}})) dut (.clk, .rst_n, .rnd);

  always #5 clk = ~clk;

  initial begin
    repeat (CLOCKS + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < WIDTH; n++) seq[n] = 1'b1;
    for (int n = WIDTH; n < WIDTH + STEP*CLOCKS + 8; n++)
      seq[n] = seq[n-37] ^ seq[n-198] ^ seq[n-199] ^ seq[n-200];
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < CLOCKS; t++) begin
      automatic int bad = 0;
      for (int k = 0; k < WIDTH; k++) begin
        if (rnd[k] !== seq[STEP*t + WIDTH - 1 - k]) bad++;
        ones += longint'(rnd[k]);
        total++;
      end
      checks++;
      if (bad != 0) begin
        failures++;
        if (failures < 5) $display("FAIL clock %0d: %0d bits differ", t, bad);
      end
      @(negedge clk);
    end
    checks++;
    // skip the all-ones seed when judging the density
    if (ones * 100 < total * 48 || ones * 100 > total * 53) begin
      failures++;
      $display("FAIL density of ones %0d / %0d", ones, total);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
