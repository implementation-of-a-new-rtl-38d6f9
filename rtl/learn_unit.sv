// Learning circuit with the synaptic weight register of one synapse.
//
// Holds w_ij (two's complement, loaded from the weight memory with w_load).
// While learn_en is set, an AND of the neuron's own pulse x_i, the broadcast
// pulse x_j and an external control pulse stream (whose density sets the
// rate eps/T) makes the register count by one; an XOR of the phase
// (0 = clamped, 1 = unclamped) with the sign of x_i x_j picks up or down. Over
// a clamped and an unclamped pass this adds eps/T times the difference of the
// two correlations, the Boltzmann machine rule. This follows the chip.
// This design's choices: the register saturates at +/-(2**(W_W-1) - 1), so
// the magnitude always fits the W_W-1 bit weight coder, and a loaded -2**(W_W-1)
// becomes -(2**(W_W-1) - 1). Load wins over counting in the same clock.
module learn_unit
  import neuro_pkg::*;
#(
  parameter int unsigned W_W = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           w_load,      // load w_in
  input  logic [W_W-1:0] w_in,        // weight from memory
  input  logic           learn_en,    // learning count window
  input  spike_t         xi,          // this neuron's output
  input  spike_t         xj,          // broadcast neuron's output
  input  logic           ctrl_pulse,  // external rate pulse stream
  input  logic           phase,       // 0: clamped, 1: unclamped
  output logic [W_W-1:0] w            // weight register
);
  localparam logic [W_W-1:0] W_MAX = {1'b0, {(W_W-1){1'b1}}};
  localparam logic [W_W-1:0] W_MIN = {1'b1, {(W_W-2){1'b0}}, 1'b1};
  localparam logic [W_W-1:0] W_NEG_LIMIT = {1'b1, {(W_W-1){1'b0}}};

  logic step, down;

  always_comb begin
    step = learn_en & xi.fire & xj.fire & ctrl_pulse;
    down = phase ^ xi.neg ^ xj.neg;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w <= '0;
    end else if (w_load) begin
      w <= (w_in == W_NEG_LIMIT) ? W_MIN : w_in;
    end else if (step) begin
      if (down) begin
        if (w != W_MIN) w <= w - 1'b1;
      end else begin
        if (w != W_MAX) w <= w + 1'b1;
      end
    end
  end
endmodule
