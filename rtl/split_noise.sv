// Coding-noise shaper: uniform random number -> uniform or split noise.
//
// The nonmonotonic coder needs noise R that is uniform over [0, a) and
// [b, Umax) and never falls in [a, b) (the split distribution; a = b gives
// the plain uniform distribution over [0, Umax)). A uniform R_W-bit random
// number r is scaled onto [0, C), C = Umax + a - b, by s = (r * C) >> R_W,
// and values at or above a are moved up by b - a. Combinational.
// The distribution is the chip's; the scaling multiplier is this design's
// way of producing it. Requires a <= b <= umax.
module split_noise #(
  parameter int unsigned R_W = 13
) (
  input  logic [R_W-1:0] r_in,   // uniform random number
  input  logic [R_W-1:0] a,      // lower edge of the gap
  input  logic [R_W-1:0] b,      // upper edge of the gap
  input  logic [R_W-1:0] umax,   // maximum of the noise
  output logic [R_W-1:0] r_out   // shaped noise
);
  logic [R_W-1:0]   c;       // width of the support
  logic [2*R_W-1:0] prod;
  logic [R_W-1:0]   s;       // r scaled onto [0, C)

  always_comb begin
    c     = umax + a - b;
    prod  = r_in * c;
    s     = prod[2*R_W-1:R_W];
    r_out = (s < a) ? s : s + (b - a);
  end
endmodule
