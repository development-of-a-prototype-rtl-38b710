// aes_shift_rows: ShiftRows step of an AES round (combinational).
// The state is a 4x4 byte matrix stored column by column (byte i at row i%4,
// column i/4). Row 0 stays, row 1 rotates left by one position, row 2 by two
// and row 3 by three, as the document describes: out[r][c] = in[r][(c+r)%4].
// The step is a fixed byte permutation, so it synthesises to wiring only; it
// is kept as a module of its own because it is one of the four round steps.
module aes_shift_rows (
  input  aes_pkg::block_t state_in,
  output aes_pkg::block_t state_out
);
  always_comb begin
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        state_out[127-8*(4*c+r) -: 8] = state_in[127-8*(4*((c+r)%4)+r) -: 8];
  end
endmodule
