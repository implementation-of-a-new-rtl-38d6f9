// Testbench of stoch_coder: exhaustive check of the comparator over every
// value and random number of the 7-bit weight coder, plus the firing count
// over all random numbers, which must equal the value (probability value/128).
module tb_stoch_coder;
  localparam int W = 7;
  logic [W-1:0] value, rnd;
  logic         fire;
  int checks = 0, failures = 0;

  stoch_coder #(.W(W)) dut (.value, .rnd, .fire);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2**W; v++) begin
      automatic int ones = 0;
      for (int r = 0; r < 2**W; r++) begin
        value = W'(v); rnd = W'(r);
        #1;
        checks++;
        if (fire !== (r < v)) begin
          failures++;
          if (failures < 10) $display("FAIL v=%0d r=%0d fire=%0b", v, r, fire);
        end
        ones += int'(fire);
      end
      checks++;
      if (ones != v) begin
        failures++;
        $display("FAIL rate v=%0d ones=%0d", v, ones);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
