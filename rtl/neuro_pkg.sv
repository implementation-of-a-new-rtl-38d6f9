// Shared types and widths of the stochastic-logic neurochip.
//
// A neuron output is a stochastic pulse stream with a sign: in every clock
// the neuron either fires or not, and the sign bit says whether the pulse
// stands for +1 or -1 (spike_t). Widths follow the chip: 14-bit membrane
// potential u and 8-bit synaptic weight w, both two's complement. Each neuron
// takes 20 random bits per clock: 7 code the weight magnitude and 13 the
// membrane-potential magnitude (this split is a design choice that uses the
// 20 bits exactly). Command encodings are this design's own.
package neuro_pkg;

  localparam int unsigned U_BITS   = 14;  // membrane potential u_i
  localparam int unsigned W_BITS   = 8;   // synaptic weight w_ij
  localparam int unsigned RND_W = 20;  // random bits per neuron and clock
  localparam int unsigned WR_W  = W_BITS - 1;  // weight magnitude / its noise
  localparam int unsigned CR_W  = U_BITS - 1;  // coding noise R1, R2
  localparam int unsigned IDX_W = 10;  // global neuron index (up to 1023)
  localparam int unsigned NA_W  = 10;  // accumulation time Na (up to 1023)

  // One stochastic pulse with its sign (neg = 1: the pulse counts as -1).
  typedef struct packed {
    logic fire;
    logic neg;
  } spike_t;

  // Host commands to the control unit.
  typedef enum logic [1:0] {
    CMD_UPDATE = 2'd0,  // one state update: every neuron broadcasts once
    CMD_LEARN  = 2'd1,  // one learning pass over every broadcasting neuron
    CMD_NOP    = 2'd2,
    CMD_NOP2   = 2'd3
  } cmd_e;

endpackage
