// Nonmonotonic coding circuit of a neuron.
//
// Two coding circuits compare the magnitude |U| of the membrane potential
// with two independent noises R1 and R2; an XOR of the two pulses is the
// output pulse, and the sign bit of U is passed along as the pulse's sign.
// With P1 = P2 = P(R < |U|) the firing probability is P1(1-P2) + (1-P1)P2:
// it rises from zero, peaks, and falls back to zero once |U| is above every
// noise value (end cutoff). Holding R2 at its largest code (mono = 1) turns
// the second comparator off and gives the monotonic characteristic.
// All of this follows the chip. Combinational: x is valid in the same clock
// as u, r1 and r2. u is two's complement; the most negative value has
// magnitude 2**(U_W-1), which is above every noise value.
module nonmono_coder
  import neuro_pkg::*;
#(
  parameter int unsigned U_W = 14
) (
  input  logic [U_W-1:0] u,     // membrane potential
  input  logic [U_W-2:0] r1,    // coding noise of the first comparator
  input  logic [U_W-2:0] r2,    // coding noise of the second comparator
  input  logic           mono,  // 1: R2 held at its maximum (monotonic)
  output spike_t         x      // output pulse and its sign
);
  logic [U_W-1:0] mag;
  logic [U_W-2:0] r2_eff;
  logic           p1, p2;

  always_comb begin
    mag    = u[U_W-1] ? (~u + 1'b1) : u;
    r2_eff = mono ? '1 : r2;
    p1     = ({1'b0, r1} < mag);
    p2     = ({1'b0, r2_eff} < mag);
    x.fire = p1 ^ p2;
    x.neg  = u[U_W-1];
  end
endmodule
