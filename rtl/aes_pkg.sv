// aes_pkg: types, constants and GF(2^8) helpers shared by the AES-128 encryption
// datapath and the serial front end.
//
// Byte order: a 128-bit block is 16 bytes, byte 0 in bits [127:120] (the first
// two hex digits when the block is written as a hex string). The 4x4 state is
// filled column by column, so byte i sits at row i%4, column i/4 - the K0..K15
// layout of the key matrix in the key expansion drawing.
//
// The S-box is the standard AES 16x16 substitution table. Instead of listing
// the 256 constants it is generated at elaboration from its definition:
// sbox(a) = affine(a^-1) in GF(2^8) modulo x^8+x^4+x^3+x+1 (0 maps to 0 before
// the affine step), affine(b) = b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^
// rotl(b,4) ^ 8'h63.
package aes_pkg;

  localparam int unsigned BLOCK_BITS = 128;
  localparam int unsigned NUM_ROUNDS = 10;   // AES-128: 10 rounds

  typedef logic [BLOCK_BITS-1:0] block_t;
  typedef logic [31:0]           word_t;
  typedef logic [255:0][7:0]     sbox_table_t;  // entry a at [a]

  // Byte i of a block (byte 0 = most significant).
  function automatic logic [7:0] get_byte(block_t b, int unsigned i);
    return b[BLOCK_BITS-1-8*i -: 8];
  endfunction

  // Multiply by x in GF(2^8).
  function automatic logic [7:0] xtime(logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // General GF(2^8) multiply (shift-and-add).
  function automatic logic [7:0] gf_mul(logic [7:0] a, logic [7:0] b);
    logic [7:0] p, aa;
    p  = 8'h00;
    aa = a;
    for (int k = 0; k < 8; k++) begin
      if (b[k]) p = p ^ aa;
      aa = xtime(aa);
    end
    return p;
  endfunction

  // Multiplicative inverse as a^254 (0 gives 0).
  function automatic logic [7:0] gf_inv(logic [7:0] a);
    logic [7:0] r, sq;
    r  = 8'h01;
    sq = a;
    // 254 = 0b11111110: multiply together a^2, a^4, ..., a^128
    for (int k = 1; k < 8; k++) begin
      sq = gf_mul(sq, sq);
      r  = gf_mul(r, sq);
    end
    return r;
  endfunction

  function automatic logic [7:0] rotl8(logic [7:0] b, int unsigned n);
    return (b << n) | (b >> (8 - n));
  endfunction

  function automatic logic [7:0] sbox_calc(logic [7:0] a);
    logic [7:0] b;
    b = gf_inv(a);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  function automatic sbox_table_t gen_sbox_table();
    sbox_table_t t;
    for (int a = 0; a < 256; a++) t[a] = sbox_calc(8'(a));
    return t;
  endfunction

  localparam sbox_table_t SBOX_TABLE = gen_sbox_table();

  // Round constant of round r (1..10) is x^(r-1): 01 02 04 08 10 20 40 80 1b 36.
  localparam logic [7:0] RCON_FIRST = 8'h01;

endpackage
