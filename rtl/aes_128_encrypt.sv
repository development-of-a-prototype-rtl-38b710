// aes_128_encrypt: iterative AES-128 encryption core, one round per clock.
//
// How it works: on start, the plaintext is XORed with the initial key K0 (the
// pre-round key addition) into the state register, and K0 goes into the round
// key register. In each of the next ten clocks one aes_round transforms the
// state while aes_key_expand_round derives the round key of that same round
// from the previous one, so key expansion and data processing run side by side
// instead of one after the other. Rounds 1..9 apply SubBytes, ShiftRows,
// MixColumns and AddRoundKey; round 10 leaves out MixColumns. The result of
// round 10 is loaded into ciphertext_out, which holds it until the next block
// finishes.
//
// Interface (signal names follow the simulation trace of the original design:
// SYS_CLK, RST, START, KEY_LOAD, KEY_IN, PLAINTEXT_IN, CIPHERTEXT_OUT):
//   key_load     : key_reg <= key_in on this clock. If start is high in the
//                  same clock, key_in is used directly for that block.
//   start        : sampled when idle (busy = 0); plaintext_in is captured.
//                  While busy, start is ignored. Holding start high encrypts
//                  the same inputs over and over and ciphertext_out stays put.
//   done         : one-clock pulse in the clock ciphertext_out is updated.
// Timing: start sampled at clock edge 0, ciphertext_out valid and done high
// after edge NUM_ROUNDS (10), i.e. 10 cycles of latency; a new block can be
// started in the clock after done, so one block every 11 cycles.
// The round structure follows the document; the one-round-per-clock schedule,
// the done/busy outputs, synchronous active-high reset and the key_load bypass
// are this design's choices.
module aes_128_encrypt (
  input  logic            sys_clk,
  input  logic            rst,
  input  logic            start,
  input  logic            key_load,
  input  aes_pkg::block_t key_in,
  input  aes_pkg::block_t plaintext_in,
  output aes_pkg::block_t ciphertext_out,
  output logic            busy,
  output logic            done
);
  import aes_pkg::*;

  block_t     state_q, round_key_q, key_q;
  block_t     next_key, round_out, k0;
  logic [3:0] round_q;      // round being computed, 1..10
  logic [7:0] rcon_q;       // round constant of round_q

  aes_key_expand_round u_kexp (
    .key_in (round_key_q),
    .rcon   (rcon_q),
    .key_out(next_key)
  );

  aes_round u_round (
    .state_in   (state_q),
    .round_key  (next_key),
    .final_round(round_q == 4'(NUM_ROUNDS)),
    .state_out  (round_out)
  );

  always_comb k0 = key_load ? key_in : key_q;

  always_ff @(posedge sys_clk) begin
    if (rst) begin
      key_q          <= '0;
      state_q        <= '0;
      round_key_q    <= '0;
      round_q        <= '0;
      rcon_q         <= RCON_FIRST;
      busy           <= 1'b0;
      done           <= 1'b0;
      ciphertext_out <= '0;
    end else begin
      done <= 1'b0;
      if (key_load) key_q <= key_in;
      if (!busy) begin
        if (start) begin
          state_q     <= plaintext_in ^ k0;   // pre-round key addition
          round_key_q <= k0;
          round_q     <= 4'd1;
          rcon_q      <= RCON_FIRST;
          busy        <= 1'b1;
        end
      end else begin
        state_q     <= round_out;
        round_key_q <= next_key;
        rcon_q      <= xtime(rcon_q);
        if (round_q == 4'(NUM_ROUNDS)) begin
          ciphertext_out <= round_out;
          done           <= 1'b1;
          busy           <= 1'b0;
          round_q        <= '0;
        end else begin
          round_q <= round_q + 4'd1;
        end
      end
    end
  end

  // The round counter stays within 1..10 while a block is in flight.
  a_round_range: assert property (@(posedge sys_clk) disable iff (rst)
    busy |-> (round_q >= 4'd1 && round_q <= 4'(NUM_ROUNDS)));
  // done only ends a block that was running.
  a_done_after_busy: assert property (@(posedge sys_clk) disable iff (rst)
    done |-> $past(busy));

endmodule
