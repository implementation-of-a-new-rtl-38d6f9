// Testbench of nonmono_coder. Part 1: random u, R1, R2 and mode against the
// comparator/XOR rule worked out here (fire = (R1 < |u|) xor (R2' < |u|),
// R2' = all ones in monotonic mode, sign = sign of u). Part 2: the firing rate
// with uniform noises over [0, Umax) is measured for several u and compared
// with P_f = 2(U/Umax)(1 - U/Umax) (nonmonotonic) and U/Umax (monotonic).
module tb_nonmono_coder;
  import neuro_pkg::*;
  localparam int UW = 14;
  logic [UW-1:0] u;
  logic [UW-2:0] r1, r2;
  logic          mono;
  spike_t        x;
  int checks = 0, failures = 0;

  nonmono_coder #(.U_W(UW)) dut (.u, .r1, .r2, .mono, .x);

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int uu, mag, rr1, rr2;
      bit p1, p2;
      uu = int'($urandom % 16384) - 8192;
      rr1 = $urandom % 8192; rr2 = $urandom % 8192;
      u = UW'(uu); r1 = 13'(rr1); r2 = 13'(rr2); mono = 1'($urandom);
      #1;
      mag = (uu < 0) ? -uu : uu;
      p1 = rr1 < mag;
      p2 = (mono ? 8191 : rr2) < mag;
      checks++;
      if (x.fire !== (p1 ^ p2) || x.neg !== (uu < 0)) begin
        failures++;
        if (failures < 10) $display("FAIL u=%0d r1=%0d r2=%0d mono=%0b x=%b", uu, rr1, rr2, mono, x);
      end
    end
    // firing rate against eq. (1), Umax = 800, 20000 samples per point
    for (int m = 0; m < 2; m++) begin
      for (int uu = -800; uu <= 800; uu += 100) begin
        automatic int fires = 0, negs = 0;
        real p, q, sigma, diff;
        mono = 1'(m);
        u = UW'(uu);
        for (int n = 0; n < 20000; n++) begin
          r1 = 13'($urandom % 800); r2 = 13'($urandom % 800);
          #1;
          fires += int'(x.fire);
          negs  += int'(x.neg);
        end
        q = ((uu < 0) ? -uu : uu) / 800.0;
        p = m ? q : 2.0 * q * (1.0 - q);
        sigma = $sqrt(20000.0 * p * (1.0 - p)) + 1.0;
        checks++;
        diff = fires - 20000.0 * p;
        if (diff < 0.0) diff = -diff;
        if (diff > 5.0 * sigma) begin
          failures++;
          $display("FAIL rate mono=%0d u=%0d fires=%0d expected %0f", m, uu, fires, 20000.0 * p);
        end
        checks++;
        if (negs != ((uu < 0) ? 20000 : 0)) begin
          failures++;
          $display("FAIL sign u=%0d", uu);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
