// Stochastic coding circuit: a digital comparator.
//
// In every clock the output fires when the random number is below the value,
// so with a uniform random number over [0, 2**W) the firing probability is
// value / 2**W (P(U) = integral of the noise density from 0 to U). Purely
// combinational. The comparator itself is the chip's coding circuit; the
// strict "less than" is this design's choice.
module stoch_coder #(
  parameter int unsigned W = 7
) (
  input  logic [W-1:0] value,  // magnitude to code
  input  logic [W-1:0] rnd,    // random number
  output logic         fire    // pulse for this clock
);
  always_comb fire = (rnd < value);
endmodule
