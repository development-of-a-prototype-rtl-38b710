// aes_mix_columns: MixColumns step of an AES round (combinational).
// Each column (a0..a3) is multiplied over GF(2^8) by the constant circulant
// matrix [02 03 01 01; 01 02 03 01; 01 01 02 03; 03 01 01 02]. Multiplication
// by 02 is xtime (shift left, XOR 1B on carry), by 03 is xtime(a)^a.
// The document names the step and the constant matrix; the matrix entries are
// the AES standard's.
module aes_mix_columns (
  input  aes_pkg::block_t state_in,
  output aes_pkg::block_t state_out
);
  import aes_pkg::*;

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      logic [7:0] a0, a1, a2, a3;
      a0 = state_in[127-8*(4*c+0) -: 8];
      a1 = state_in[127-8*(4*c+1) -: 8];
      a2 = state_in[127-8*(4*c+2) -: 8];
      a3 = state_in[127-8*(4*c+3) -: 8];
      state_out[127-8*(4*c+0) -: 8] = xtime(a0) ^ (xtime(a1) ^ a1) ^ a2 ^ a3;
      state_out[127-8*(4*c+1) -: 8] = a0 ^ xtime(a1) ^ (xtime(a2) ^ a2) ^ a3;
      state_out[127-8*(4*c+2) -: 8] = a0 ^ a1 ^ xtime(a2) ^ (xtime(a3) ^ a3);
      state_out[127-8*(4*c+3) -: 8] = (xtime(a0) ^ a0) ^ a1 ^ a2 ^ xtime(a3);
    end
  end
endmodule
