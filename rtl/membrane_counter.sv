// Up/down counter that accumulates the membrane potential u_i.
//
// Each clock with cnt_en set adds +1 (down = 0) or -1 (down = 1) to a U_W-bit
// two's complement sum. cnt_next is the sum including this clock's pulse,
// so the neuron can latch a complete sum in the same clock that clear starts
// a new one (clear makes the stored sum zero after this clock). The sum wraps
// when it leaves the U_W-bit range, as a plain counter does, and ovf /
// ovf_next report that it has wrapped since the last clear.
// The counter follows the chip (14 bits, counts up or down by the product's
// sign); the overflow flag is this design's addition.
module membrane_counter #(
  parameter int unsigned U_W = 14
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           cnt_en,    // a product pulse this clock
  input  logic           down,      // 1: the pulse counts -1
  input  logic           clear,     // start a new sum after this clock
  output logic [U_W-1:0] cnt,       // stored sum
  output logic [U_W-1:0] cnt_next,  // sum including this clock's pulse
  output logic           ovf,       // stored sum has wrapped
  output logic           ovf_next   // ovf including this clock's pulse
);
  localparam logic [U_W-1:0] MAX_POS = {1'b0, {(U_W-1){1'b1}}};
  localparam logic [U_W-1:0] MIN_NEG = {1'b1, {(U_W-1){1'b0}}};

  always_comb begin
    cnt_next = cnt;
    ovf_next = ovf;
    if (cnt_en) begin
      if (down) begin
        cnt_next = cnt - 1'b1;
        if (cnt == MIN_NEG) ovf_next = 1'b1;
      end else begin
        cnt_next = cnt + 1'b1;
        if (cnt == MAX_POS) ovf_next = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      ovf <= 1'b0;
    end else if (clear) begin
      cnt <= '0;
      ovf <= 1'b0;
    end else begin
      cnt <= cnt_next;
      ovf <= ovf_next;
    end
  end
endmodule
