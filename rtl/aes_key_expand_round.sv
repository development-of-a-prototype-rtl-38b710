// aes_key_expand_round: one step of the AES-128 key schedule, combinational.
// Following the key expansion drawing: the 16 key bytes K0..K15 form the words
// W0..W3 (one word per matrix column). g(W3) = SubWord(RotWord(W3)) with the
// round constant XORed into its first byte; then
//   W4 = W0 ^ g(W3), W5 = W1 ^ W4, W6 = W2 ^ W5, W7 = W3 ^ W6,
// and W4..W7 are the next round key. The four S-box lookups of g and the
// round-constant values are those of the AES standard.
module aes_key_expand_round (
  input  aes_pkg::block_t key_in,    // round key r-1 (W0..W3)
  input  logic [7:0]      rcon,      // round constant of round r
  output aes_pkg::block_t key_out    // round key r (W4..W7)
);
  import aes_pkg::*;

  word_t w0, w1, w2, w3, g, w4, w5, w6, w7;
  word_t rot, sub;

  always_comb begin
    {w0, w1, w2, w3} = key_in;
    rot = {w3[23:0], w3[31:24]};         // RotWord: one byte left
  end

  for (genvar i = 0; i < 4; i++) begin : g_subword
    aes_sbox u_sbox (.in_byte(rot[31-8*i -: 8]), .out_byte(sub[31-8*i -: 8]));
  end

  always_comb begin
    g  = sub ^ {rcon, 24'h0};
    w4 = w0 ^ g;
    w5 = w1 ^ w4;
    w6 = w2 ^ w5;
    w7 = w3 ^ w6;
    key_out = {w4, w5, w6, w7};
  end

endmodule
