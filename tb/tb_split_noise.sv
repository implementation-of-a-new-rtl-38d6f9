// Testbench of split_noise: random operands against the scaling formula
// s = floor(r*C / 2**13), C = Umax + a - b, R = s (s < a) or s + b - a, and a
// sweep over every r for the distribution of the learning experiment
// (a = 200, b = 300, Umax = 500): no value in the gap [a, b), none at or
// above Umax, and the share below a close to a / C.
module tb_split_noise;
  localparam int RW = 13;
  logic [RW-1:0] r_in, a, b, umax, r_out;
  int checks = 0, failures = 0;

  split_noise #(.R_W(RW)) dut (.r_in, .a, .b, .umax, .r_out);

  function automatic int model(int r, int aa, int bb, int um);
    longint c = longint'(um + aa - bb);
    int s = int'((longint'(r) * c) >> RW);
    return (s < aa) ? s : s + bb - aa;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      automatic int um = 1 + ($urandom % 8191);
      automatic int bb = $urandom % (um + 1);
      automatic int aa = $urandom % (bb + 1);
      automatic int rr = $urandom % 8192;
      r_in = RW'(rr); a = RW'(aa); b = RW'(bb); umax = RW'(um);
      #1;
      checks++;
      if (int'(r_out) != model(rr, aa, bb, um)) begin
        failures++;
        if (failures < 10)
          $display("FAIL r=%0d a=%0d b=%0d umax=%0d got %0d exp %0d",
                   rr, aa, bb, um, r_out, model(rr, aa, bb, um));
      end
    end
    begin
      automatic int low = 0, bad = 0;
      a = 200; b = 300; umax = 500;
      for (int rr = 0; rr < 8192; rr++) begin
        r_in = RW'(rr);
        #1;
        if ((r_out >= a && r_out < b) || r_out >= umax) bad++;
        if (r_out < a) low++;
      end
      checks++;
      if (bad != 0) begin failures++; $display("FAIL %0d values outside the support", bad); end
      checks++;
      // expected share 200/400 of 8192 = 4096
      if (low < 4090 || low > 4102) begin failures++; $display("FAIL low share %0d", low); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
