// aes_ref_pkg: reference model of AES-128 encryption for the testbenches.
// It is written independently of the RTL: the S-box comes from log/antilog
// tables of the generator 03 in GF(2^8) (the RTL uses a^254), field products
// are computed as a carry-less polynomial product reduced by 11B, and whole
// blocks are handled as 4x4 byte arrays. Known-answer vectors from the AES
// standard (FIPS-197) and from NIST SP 800-38A F.1.1 are kept here as well.
package aes_ref_pkg;

  typedef logic [7:0] mat_t [4][4];   // [row][col]

  // NIST SP 800-38A F.1.1 (ECB-AES128) key, plaintexts and ciphertexts.
  localparam logic [127:0] NIST_KEY = 128'h2b7e151628aed2a6abf7158809cf4f3c;
  localparam logic [127:0] NIST_PT [4] = '{
    128'h6bc1bee22e409f96e93d7e117393172a, 128'hae2d8a571e03ac9c9eb76fac45af8e51,
    128'h30c81c46a35ce411e5fbc1191a0a52ef, 128'hf69f2445df4f9b17ad2b417be66c3710};
  localparam logic [127:0] NIST_CT [4] = '{
    128'h3ad77bb40d7a3660a89ecaf32466ef97, 128'hf5d3d58503b9699de785895a96fdbaaf,
    128'h43b1cd7f598ece23881b00e3ed030688, 128'h7b0c785e27e8ad3f8223207104725dd4};
  // FIPS-197 Appendix C.1.
  localparam logic [127:0] FIPS_KEY = 128'h000102030405060708090a0b0c0d0e0f;
  localparam logic [127:0] FIPS_PT  = 128'h00112233445566778899aabbccddeeff;
  localparam logic [127:0] FIPS_CT  = 128'h69c4e0d86a7b0430d8cdb78070b4c55a;

  function automatic logic [7:0] pmul(logic [7:0] a, logic [7:0] b);
    logic [14:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 15'(a) << i;
    for (int i = 14; i >= 8; i--) if (p[i]) p ^= 15'h11b << (i - 8);
    return p[7:0];
  endfunction

  function automatic logic [7:0] ref_sbox(logic [7:0] a);
    logic [7:0] alog [256];
    logic [7:0] lg   [256];
    logic [7:0] inv, s;
    logic [7:0] x;
    x = 8'h01;
    for (int i = 0; i < 255; i++) begin
      alog[i] = x;
      lg[x]   = 8'(i);
      x = pmul(x, 8'h03);
    end
    inv = (a == 0) ? 8'h00 : alog[(255 - int'(lg[a])) % 255];
    for (int i = 0; i < 8; i++)
      s[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8]
             ^ 1'(8'h63 >> i);
    return s;
  endfunction

  function automatic mat_t to_mat(logic [127:0] b);
    mat_t m;
    for (int i = 0; i < 16; i++) m[i%4][i/4] = b[127-8*i -: 8];
    return m;
  endfunction

  function automatic logic [127:0] from_mat(mat_t m);
    logic [127:0] b;
    for (int i = 0; i < 16; i++) b[127-8*i -: 8] = m[i%4][i/4];
    return b;
  endfunction

  function automatic logic [127:0] ref_sub_bytes(logic [127:0] b);
    logic [127:0] o;
    for (int i = 0; i < 16; i++) o[8*i +: 8] = ref_sbox(b[8*i +: 8]);
    return o;
  endfunction

  function automatic logic [127:0] ref_shift_rows(logic [127:0] b);
    mat_t m, o;
    m = to_mat(b);
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) o[r][c] = m[r][(c + r) % 4];
    return from_mat(o);
  endfunction

  function automatic logic [127:0] ref_mix_columns(logic [127:0] b);
    mat_t m, o;
    logic [7:0] coef [4] = '{8'h02, 8'h03, 8'h01, 8'h01};
    m = to_mat(b);
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        o[r][c] = 8'h00;
        for (int k = 0; k < 4; k++) o[r][c] ^= pmul(coef[(k - r + 4) % 4], m[k][c]);
      end
    return from_mat(o);
  endfunction

  // Round key r (0..10) of a 128-bit key.
  function automatic logic [127:0] ref_round_key(logic [127:0] key, int r);
    logic [31:0] w [44];
    logic [31:0] t;
    logic [7:0]  rc;
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    rc = 8'h01;
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {ref_sbox(t[31:24]), ref_sbox(t[23:16]), ref_sbox(t[15:8]), ref_sbox(t[7:0])};
        t[31:24] ^= rc;
        rc = pmul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    return {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic logic [127:0] ref_round(logic [127:0] s, logic [127:0] rk, bit final_round);
    logic [127:0] t;
    t = ref_shift_rows(ref_sub_bytes(s));
    if (!final_round) t = ref_mix_columns(t);
    return t ^ rk;
  endfunction

  function automatic logic [127:0] ref_encrypt(logic [127:0] key, logic [127:0] pt);
    logic [127:0] s;
    s = pt ^ key;
    for (int r = 1; r <= 10; r++) s = ref_round(s, ref_round_key(key, r), r == 10);
    return s;
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
