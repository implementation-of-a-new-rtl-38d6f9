// One stochastic neuron: synapse, membrane counter, output coder, learning.
//
// Neurons share one broadcast bus: in each broadcast slot a single neuron j
// drives its pulse stream x_j, and every neuron i holds the weight w_ij in a
// register (loaded from the weight memory with w_load). The weight magnitude
// is coded into pulses by a comparator with 7 random bits, ANDed with x_j,
// and the membrane counter counts each product pulse up or down by the sign
// of w_ij x_j while acc_en is set. After all N slots the counter holds
// u_i(t+1) = sum_j w_ij x_j (in units of pulses, scaled by Na/2**(W_W-1)).
// latch copies the complete sum (including the pulse of that clock) into the
// u register, which drives the nonmonotonic coder that produces x_i; a
// separate counter and u register let all neurons update together. clear
// starts a new sum. clamp_en forces x_i to a steady +1 or -1 pulse stream.
// The learning circuit updates the weight register from x_i, x_j and the
// control pulse stream while learn_en is set; w goes back to memory.
// Structure and widths follow the chip. This design's choices: the double
// buffering of u, the clamp inputs and the use of 7 of the 20 random bits
// for the weight and 13 for the coding noise R1.
module neuron
  import neuro_pkg::*;
#(
  parameter int unsigned U_W = 14,
  parameter int unsigned W_W = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  // weight memory
  input  logic           w_load,
  input  logic [W_W-1:0] w_in,
  output logic [W_W-1:0] w,
  // noise
  input  logic [W_W-2:0] rnd_w,      // uniform noise for the weight coder
  input  logic [U_W-2:0] r1,         // shaped coding noise R1
  input  logic [U_W-2:0] r2,         // shaped coding noise R2
  input  logic           mono,       // monotonic characteristic
  // broadcast and sequencing
  input  spike_t         x_bus,      // pulse of the broadcasting neuron j
  input  logic           acc_en,     // count products this clock
  input  logic           clear,      // start a new sum after this clock
  input  logic           latch,      // u <= completed sum
  // clamping and learning
  input  logic           clamp_en,
  input  logic           clamp_neg,
  input  logic           learn_en,
  input  logic           phase,      // 0: clamped, 1: unclamped
  input  logic           ctrl_pulse,
  // state
  output spike_t         x_out,      // x_i
  output logic [U_W-1:0] u,          // membrane potential u_i(t)
  output logic           ovf         // u wrapped while it was summed
);
  logic [W_W-1:0] w_abs;
  logic [W_W-2:0] w_mag;
  logic           w_fire;
  logic           prod_fire, prod_neg;
  logic [U_W-1:0] cnt_next;
  logic           cnt_ovf_next;
  spike_t         x_coded;

  // synaptic weight register and learning circuit
  learn_unit #(.W_W(W_W)) u_learn (
    .clk, .rst_n, .w_load, .w_in, .learn_en,
    .xi(x_out), .xj(x_bus), .ctrl_pulse, .phase, .w
  );

  // weight coding and multiplication by x_j
  always_comb begin
    w_abs = w[W_W-1] ? (~w + 1'b1) : w;
    w_mag = w_abs[W_W-2:0];
  end

  stoch_coder #(.W(W_W-1)) u_wcode (.value(w_mag), .rnd(rnd_w), .fire(w_fire));

  always_comb begin
    prod_fire = acc_en & w_fire & x_bus.fire;
    prod_neg  = w[W_W-1] ^ x_bus.neg;
  end

  membrane_counter #(.U_W(U_W)) u_cnt (
    .clk, .rst_n, .cnt_en(prod_fire), .down(prod_neg), .clear,
    .cnt(), .cnt_next, .ovf(), .ovf_next(cnt_ovf_next)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      u   <= '0;
      ovf <= 1'b0;
    end else if (latch) begin
      u   <= cnt_next;
      ovf <= cnt_ovf_next;
    end
  end

  // output coding
  nonmono_coder #(.U_W(U_W)) u_ocode (.u, .r1, .r2, .mono, .x(x_coded));

  always_comb x_out = clamp_en ? spike_t'{fire: 1'b1, neg: clamp_neg} : x_coded;
endmodule
