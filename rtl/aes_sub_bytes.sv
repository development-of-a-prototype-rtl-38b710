// aes_sub_bytes: SubBytes step of an AES round. Each of the 16 state bytes is
// replaced independently by its S-box entry, so sixteen aes_sbox lookups work
// in parallel (combinational, no latency). The document gives the step; using
// one S-box instance per byte is this design's choice.
module aes_sub_bytes (
  input  aes_pkg::block_t state_in,
  output aes_pkg::block_t state_out
);
  for (genvar i = 0; i < 16; i++) begin : g_byte
    aes_sbox u_sbox (
      .in_byte (state_in [127-8*i -: 8]),
      .out_byte(state_out[127-8*i -: 8])
    );
  end
endmodule
