// Testbench of membrane_counter: random count, direction and clear for
// 20000 clocks against a model of a wrapping 14-bit two's complement counter
// with a sticky wrap flag; runs of pulses in one direction force wraps at
// both ends.
module tb_membrane_counter;
  localparam int UW = 14;
  logic clk = 0, rst_n = 0;
  logic cnt_en, down, clear;
  logic [UW-1:0] cnt, cnt_next;
  logic ovf, ovf_next;
  int checks = 0, failures = 0, wraps = 0;
  int model_cnt;
  bit model_ovf;

  membrane_counter #(.U_W(UW)) dut (.clk, .rst_n, .cnt_en, .down, .clear,
                                    .cnt, .cnt_next, .ovf, .ovf_next);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cnt_en = 0; down = 0; clear = 0;
    model_cnt = 0; model_ovf = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 40000; n++) begin
      automatic int seg = n / 10000;
      int nxt;
      bit novf;
      // alternate long runs up/down with mixed traffic
      cnt_en = (seg % 2 == 0) ? 1'b1 : 1'($urandom);
      down   = (seg % 4 == 0) ? 1'b0 : (seg % 4 == 2) ? 1'b1 : 1'($urandom);
      clear  = (seg % 2 == 1) && (($urandom % 3000) == 0);
      #1;
      nxt = model_cnt; novf = model_ovf;
      if (cnt_en) begin
        nxt = down ? model_cnt - 1 : model_cnt + 1;
        if (nxt > 8191)  begin nxt -= 16384; novf = 1; wraps++; end
        if (nxt < -8192) begin nxt += 16384; novf = 1; wraps++; end
      end
      checks++;
      if ($signed(cnt_next) != nxt || ovf_next != novf || $signed(cnt) != model_cnt || ovf != model_ovf) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d cnt=%0d/%0d next=%0d/%0d ovf=%0b/%0b",
                                    n, $signed(cnt), model_cnt, $signed(cnt_next), nxt, ovf, model_ovf);
      end
      @(negedge clk);
      if (clear) begin model_cnt = 0; model_ovf = 0; end
      else begin model_cnt = nxt; model_ovf = novf; end
    end
    checks++;
    if (wraps < 2) begin failures++; $display("FAIL no wrap exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
