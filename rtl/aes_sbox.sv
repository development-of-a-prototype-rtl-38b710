// aes_sbox: the AES byte substitution table (S-box), one byte in, one byte out.
//
// The document describes the S-box as a constant 16x16 matrix looked up by the
// byte-substitution step. Here the 256 entries are a constant ROM computed at
// elaboration by aes_pkg::gen_sbox_table() from the S-box definition
// (inverse in GF(2^8), then the affine map); the lookup is purely
// combinational, so synthesis maps it to LUTs or a ROM.
module aes_sbox (
  input  logic [7:0] in_byte,
  output logic [7:0] out_byte
);
  import aes_pkg::*;

  always_comb out_byte = SBOX_TABLE[in_byte];

endmodule
