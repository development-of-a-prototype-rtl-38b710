// aes_round: one AES encryption round, combinational.
// state_out = AddRoundKey(MixColumns(ShiftRows(SubBytes(state_in))), round_key)
// For the last round (final_round = 1) MixColumns is skipped and the shifted
// matrix goes straight to the key addition, as the document describes for
// round 10. The key addition is the XOR with the round key produced by the
// key expansion for this round.
module aes_round (
  input  aes_pkg::block_t state_in,
  input  aes_pkg::block_t round_key,
  input  logic            final_round,
  output aes_pkg::block_t state_out
);
  import aes_pkg::*;

  block_t sub_out, shift_out, mix_out;

  aes_sub_bytes   u_sub  (.state_in(state_in),  .state_out(sub_out));
  aes_shift_rows  u_shift(.state_in(sub_out),   .state_out(shift_out));
  aes_mix_columns u_mix  (.state_in(shift_out), .state_out(mix_out));

  always_comb state_out = (final_round ? shift_out : mix_out) ^ round_key;

endmodule
