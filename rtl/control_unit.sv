// Control unit (CU) of one neurochip: sequences broadcast slots.
//
// Each command from the host runs over the broadcasting neurons j = 0 .. n_net-1
// (global indices over all chips of the network), one slot per j:
//   CMD_UPDATE  SETUP_CYCLES clocks with w_addr = j, w_load on the last of
//               them (the weight column j enters every neuron), then Na
//               counting clocks (acc_en). On the last counting clock of the
//               last slot, u_latch and cnt_clear end the state update, so one
//               update takes exactly n_net * (SETUP_CYCLES + Na) clocks.
//   CMD_LEARN   SETUP_CYCLES load clocks, learn_len counting clocks
//               (learn_en), then SETUP_CYCLES store clocks with w_we on the
//               first, writing the updated column back: 2*SETUP_CYCLES +
//               learn_len clocks per slot.
// cnt_clear is also given on the first clock of an update, so every sum
// starts at zero. src_idx = j names the neuron that drives the x bus while
// src_valid is set. async_en/async_idx are latched with the command and tell
// the chip to latch only neuron async_idx (asynchronous update).
// Handshake: a command is taken when cmd_valid and cmd_ready are both high;
// done pulses for one clock after its last clock. na = 0 and n_net = 0 act
// as 1.
// From the chip: 12 + Na clocks per broadcast slot, neurons broadcasting in
// turn, synchronous or single-neuron updates. The command set, the learning
// slot layout (12 load + learn_len + 12 store clocks, read from the 24 +
// 512 eps/T term of the chip's learning rate) and the handshake are this
// design's choices.
module control_unit
  import neuro_pkg::*;
#(
  parameter int unsigned SETUP_CYCLES = 12
) (
  input  logic             clk,
  input  logic             rst_n,
  // host command
  input  logic             cmd_valid,
  output logic             cmd_ready,
  input  cmd_e             cmd,
  input  logic [IDX_W-1:0] n_net,      // neurons in the network
  input  logic [NA_W-1:0]  na,         // accumulation clocks Na
  input  logic [NA_W-1:0]  learn_len,  // learning count clocks
  input  logic             async_en,   // update one neuron only
  input  logic [IDX_W-1:0] async_idx,  // global index of that neuron
  // sequencing
  output logic             busy,
  output logic             done,
  output logic [IDX_W-1:0] src_idx,    // broadcasting neuron j
  output logic             src_valid,  // x bus carries x_j
  output logic [IDX_W-1:0] w_addr,     // weight column j
  output logic             w_load,
  output logic             w_we,
  output logic             acc_en,
  output logic             learn_en,
  output logic             cnt_clear,
  output logic             u_latch,
  output logic             async_q,
  output logic [IDX_W-1:0] async_idx_q
);
  typedef enum logic [2:0] {
    S_IDLE, S_SETUP, S_ACC, S_LSETUP, S_LCOUNT, S_LSTORE
  } state_e;

  localparam int unsigned CYC_W = (NA_W > 8) ? NA_W : 8;

  state_e           state;
  logic [IDX_W-1:0] j, n_q;
  logic [NA_W-1:0]  na_q, len_q;
  logic [CYC_W-1:0] cyc;
  logic             last_slot;
  logic             first_clk;

  localparam logic [CYC_W-1:0] SETUP_LAST = CYC_W'(SETUP_CYCLES - 1);

  always_comb begin
    last_slot   = (j == n_q - 1'b1);
    cmd_ready   = (state == S_IDLE);
    busy        = (state != S_IDLE);
    src_idx     = j;
    w_addr      = j;
    src_valid   = (state == S_ACC) || (state == S_LCOUNT);
    acc_en      = (state == S_ACC);
    learn_en    = (state == S_LCOUNT);
    w_load      = ((state == S_SETUP) || (state == S_LSETUP)) && (cyc == SETUP_LAST);
    w_we        = (state == S_LSTORE) && (cyc == '0);
    u_latch     = (state == S_ACC) && last_slot && (cyc == CYC_W'(na_q - 1'b1));
    cnt_clear   = u_latch || ((state == S_SETUP) && first_clk);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      j           <= '0;
      n_q         <= '0;
      na_q        <= '0;
      len_q       <= '0;
      cyc         <= '0;
      done        <= 1'b0;
      first_clk   <= 1'b0;
      async_q     <= 1'b0;
      async_idx_q <= '0;
    end else begin
      done      <= 1'b0;
      first_clk <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (cmd_valid && (cmd == CMD_UPDATE || cmd == CMD_LEARN)) begin
            j           <= '0;
            cyc         <= '0;
            n_q         <= (n_net == '0) ? IDX_W'(1) : n_net;
            na_q        <= (na == '0) ? NA_W'(1) : na;
            len_q       <= (learn_len == '0) ? NA_W'(1) : learn_len;
            async_q     <= async_en;
            async_idx_q <= async_idx;
            first_clk   <= 1'b1;
            state       <= (cmd == CMD_UPDATE) ? S_SETUP : S_LSETUP;
          end
        end
        S_SETUP: begin
          if (cyc == SETUP_LAST) begin
            cyc   <= '0;
            state <= S_ACC;
          end else cyc <= cyc + 1'b1;
        end
        S_ACC: begin
          if (cyc == CYC_W'(na_q - 1'b1)) begin
            cyc <= '0;
            if (last_slot) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              j     <= j + 1'b1;
              state <= S_SETUP;
            end
          end else cyc <= cyc + 1'b1;
        end
        S_LSETUP: begin
          if (cyc == SETUP_LAST) begin
            cyc   <= '0;
            state <= S_LCOUNT;
          end else cyc <= cyc + 1'b1;
        end
        S_LCOUNT: begin
          if (cyc == CYC_W'(len_q - 1'b1)) begin
            cyc   <= '0;
            state <= S_LSTORE;
          end else cyc <= cyc + 1'b1;
        end
        S_LSTORE: begin
          if (cyc == SETUP_LAST) begin
            cyc <= '0;
            if (last_slot) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              j     <= j + 1'b1;
              state <= S_LSETUP;
            end
          end else cyc <= cyc + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The x bus is never sampled while a weight column is being loaded or
  // stored, and the u registers are only latched on a counting clock.
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
    src_valid |-> !(w_load || w_we));
  a_latch_in_acc: assert property (@(posedge clk) disable iff (!rst_n)
    u_latch |-> acc_en);
endmodule
