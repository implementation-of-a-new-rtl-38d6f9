// M-sequence random number generator.
//
// A 200-stage Fibonacci linear feedback shift register with the primitive
// feedback polynomial x^200 + x^163 + x^2 + x + 1, so its bit stream is
// an M-sequence of period 2^200 - 1. The whole 200-bit state is the output
// (one generator serves ten neurons with 20 bits each). The register advances
// STEP positions per clock, so every 20-bit slice holds fresh bits each
// clock; slice k then equals slice k-1 of the previous clock.
// From the chip: 200-bit M-sequence output, one generator per ten neurons.
// This design's choices: the polynomial, the leap of STEP = 20 bits per clock
// and the seed loaded at reset (any non-zero value).
//
// Bit order: rnd[0] is the newest bit. One step computes
//   new = s[199] ^ s[198] ^ s[197] ^ s[36];  s = {s[198:0], new}
// i.e. a[n+200] = a[n+163] ^ a[n+2] ^ a[n+1] ^ a[n]. The taps are fixed for
// WIDTH = 200; other widths are rejected at elaboration.
module mseq_rng #(
  parameter int unsigned     WIDTH = 200,
  parameter int unsigned     STEP  = 20,
  parameter logic [WIDTH-1:0] SEED = {WIDTH{1'b1}}
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic [WIDTH-1:0] rnd
);
  logic [WIDTH-1:0] state, nxt;

  if (WIDTH != 200) begin : g_width_check
    $error("mseq_rng: feedback taps are defined for WIDTH = 200 only");
  end

  always_comb begin
    nxt = state;
    for (int unsigned i = 0; i < STEP; i++) begin
      nxt = {nxt[WIDTH-2:0], nxt[199] ^ nxt[198] ^ nxt[197] ^ nxt[36]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= SEED;
    else        state <= nxt;
  end

  assign rnd = state;
endmodule
