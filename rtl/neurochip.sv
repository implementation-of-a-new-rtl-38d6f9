// Stochastic-logic neurochip: 50 neurons, 5 M-sequence generators, one CU.
//
// The chip computes the discrete-time network u_i(t+1) = sum_j w_ij x_j(t),
// x_i = f(u_i) with stochastic pulse streams. Neurons take turns, under the
// control unit, to broadcast their pulse stream x_j on the x bus; in each slot
// all neurons load their weight w_ij from the external weight memory (column
// j, SETUP_CYCLES clocks) and count the product pulses for Na clocks. After
// all n_net slots every neuron latches its sum (synchronous update), or only
// neuron async_idx does (asynchronous update). A learning command runs the
// same slots with the Boltzmann-machine learning circuits counting and writes
// the updated weight column back.
//
// Noise: each of the N_RNG generators gives 200 random bits per clock, split
// into 20-bit slices for ten neurons: bits [6:0] code the weight, bits [19:7]
// go through a split-noise shaper to give R1. R2 of neuron 10g+m is R1 of
// neuron 10g+((m+1) mod 10); because the generator advances 20 bits per
// clock that is an independent sample (R1 of neuron 10g+m one clock earlier).
//
// mono[k] selects the monotonic characteristic for neuron k alone, so for
// example hidden neurons can be nonmonotonic and output neurons monotonic.
//
// Several chips form one network: all chips see the same host signals, and
// chip_base is the global index of this chip's neuron 0. When the
// broadcasting index j lies on this chip, the chip drives x_bus_o
// (x_bus_oe = 1); otherwise its neurons listen to x_bus_i.
//
// Weight memory port: w_addr = j is valid during the whole load window; the
// memory must return w_rdata (one weight per neuron, two's complement) by the
// last load clock, i.e. within SETUP_CYCLES - 1 clocks. w_we writes w_wdata
// to column w_addr.
//
// From the chip: 50 neurons, 5 generators of 200 bits, 20 bits per neuron,
// 14-bit u and 8-bit w, the x bus, external weight memory, host control and
// the 12 + Na clocks per slot. This design's own choices are listed in the
// modules below it (slice use, shaper, seeds, command interface).
module neurochip
  import neuro_pkg::*;
#(
  parameter int unsigned N_NEURON     = 50,
  parameter int unsigned N_RNG        = 5,
  parameter int unsigned RNG_WIDTH    = 200,
  parameter int unsigned U_W          = neuro_pkg::U_BITS,
  parameter int unsigned W_W          = neuro_pkg::W_BITS,
  parameter int unsigned SETUP_CYCLES = 12
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // host command and configuration
  input  logic                             cmd_valid,
  output logic                             cmd_ready,
  input  cmd_e                             cmd,
  input  logic [IDX_W-1:0]                 n_net,
  input  logic [NA_W-1:0]                  na,
  input  logic [NA_W-1:0]                  learn_len,
  input  logic [IDX_W-1:0]                 chip_base,
  input  logic                             async_en,
  input  logic [IDX_W-1:0]                 async_idx,
  input  logic [U_W-2:0]                   a,
  input  logic [U_W-2:0]                   b,
  input  logic [U_W-2:0]                   umax,
  input  logic [N_NEURON-1:0]              mono,
  input  logic                             phase,
  input  logic                             ctrl_pulse,
  input  logic [N_NEURON-1:0]              clamp_en,
  input  logic [N_NEURON-1:0]              clamp_neg,
  // external weight memory
  output logic [IDX_W-1:0]                 w_addr,
  input  logic [N_NEURON-1:0][W_W-1:0]     w_rdata,
  output logic [N_NEURON-1:0][W_W-1:0]     w_wdata,
  output logic                             w_we,
  // x bus between chips
  input  spike_t                           x_bus_i,
  output spike_t                           x_bus_o,
  output logic                             x_bus_oe,
  // state and status
  output logic [N_NEURON-1:0][U_W-1:0]     u_o,
  output logic [N_NEURON-1:0]              ovf_o,
  output logic                             busy,
  output logic                             done
);
  localparam int unsigned PER_RNG = N_NEURON / N_RNG;  // neurons per generator

  if (PER_RNG * RND_W > RNG_WIDTH || PER_RNG * N_RNG != N_NEURON) begin : g_cfg_check
    $error("neurochip: N_NEURON must split evenly over the generators");
  end
  if (U_W != neuro_pkg::U_BITS || W_W != neuro_pkg::W_BITS) begin : g_width_check
    $error("neurochip: U_W and W_W must match neuro_pkg");
  end

  // ---------------------------------------------------------------- control
  logic [IDX_W-1:0] src_idx, async_idx_q;
  logic             src_valid, w_load, acc_en, learn_en, cnt_clear, u_latch, async_q;

  control_unit #(.SETUP_CYCLES(SETUP_CYCLES)) u_cu (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd, .n_net, .na, .learn_len,
    .async_en, .async_idx, .busy, .done, .src_idx, .src_valid, .w_addr,
    .w_load, .w_we, .acc_en, .learn_en, .cnt_clear, .u_latch, .async_q,
    .async_idx_q
  );

  // ------------------------------------------------------------------ noise
  logic [N_RNG-1:0][RNG_WIDTH-1:0]  rng_out;
  logic [N_NEURON-1:0][RND_W-1:0]   slice;
  logic [N_NEURON-1:0][CR_W-1:0]    r_shaped;

  for (genvar g = 0; g < N_RNG; g++) begin : g_rng
    mseq_rng #(
      .WIDTH(RNG_WIDTH),
      .STEP (RND_W),
      .SEED ({RNG_WIDTH{1'b1}} ^ (RNG_WIDTH'(g) * RNG_WIDTH'(64'h9E37_79B9_7F4A_7C15)))
    ) u_rng (.clk, .rst_n, .rnd(rng_out[g]));
  end

  for (genvar k = 0; k < N_NEURON; k++) begin : g_noise
    assign slice[k] = rng_out[k / PER_RNG][(k % PER_RNG) * RND_W +: RND_W];
    split_noise #(.R_W(CR_W)) u_shape (
      .r_in(slice[k][RND_W-1:WR_W]), .a, .b, .umax, .r_out(r_shaped[k])
    );
  end

  // ------------------------------------------------------------------ x bus
  spike_t [N_NEURON-1:0] x_out;
  spike_t                x_bus;
  logic   [IDX_W-1:0]    local_idx;
  logic                  is_local;

  always_comb begin
    local_idx = src_idx - chip_base;
    is_local  = (src_idx >= chip_base) && (local_idx < IDX_W'(N_NEURON));
    x_bus_oe  = is_local && src_valid;
    x_bus_o   = x_bus_oe ? x_out[local_idx] : '0;
    x_bus     = is_local ? x_out[local_idx] : x_bus_i;
  end

  // ---------------------------------------------------------------- neurons
  for (genvar k = 0; k < N_NEURON; k++) begin : g_neuron
    localparam int unsigned GRP = k / PER_RNG;
    localparam int unsigned NBR = GRP * PER_RNG + ((k % PER_RNG) + 1) % PER_RNG;
    logic latch_k;

    always_comb
      latch_k = u_latch && (!async_q || (async_idx_q == chip_base + IDX_W'(k)));

    neuron #(.U_W(U_W), .W_W(W_W)) u_neuron (
      .clk, .rst_n,
      .w_load, .w_in(w_rdata[k]), .w(w_wdata[k]),
      .rnd_w(slice[k][WR_W-1:0]), .r1(r_shaped[k]), .r2(r_shaped[NBR]), .mono(mono[k]),
      .x_bus, .acc_en, .clear(cnt_clear), .latch(latch_k),
      .clamp_en(clamp_en[k]), .clamp_neg(clamp_neg[k]),
      .learn_en, .phase, .ctrl_pulse,
      .x_out(x_out[k]), .u(u_o[k]), .ovf(ovf_o[k])
    );
  end
endmodule
