// aes_ref_pkg -- reference arithmetic for the testbenches.
//
// Written independently of the RTL: multiplication is a full carry-less
// product followed by long division (the RTL reduces bit by bit), inversion is
// an exhaustive search, the S-box affine step uses the bit formula of
// FIPS-197 5.1.1, and the AES-128 encryption is a plain software model of the
// standard. Polynomials here carry all nine coefficients (9'h11B for AES).
// A 128-bit block has byte 0 in bits 127:120.
package aes_ref_pkg;

  function automatic logic [7:0] ref_mul(logic [7:0] a, logic [7:0] b, logic [8:0] p9);
    logic [15:0] prod = '0;
    for (int i = 0; i < 8; i++) if (b[i]) prod ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (prod[i]) prod ^= 16'(p9) << (i - 8);
    return prod[7:0];
  endfunction

  function automatic logic [7:0] ref_inv(logic [7:0] a, logic [8:0] p9);
    logic [7:0] r = '0;
    for (int c = 1; c < 256; c++) if (ref_mul(a, 8'(c), p9) == 8'h01) r = 8'(c);
    return r;
  endfunction

  function automatic logic [7:0] ref_sbox(logic [7:0] a);
    logic [7:0] b = ref_inv(a, 9'h11B);
    logic [7:0] c = 8'h63;
    logic [7:0] s;
    for (int i = 0; i < 8; i++)
      s[i] = b[i] ^ b[(i+4)%8] ^ b[(i+5)%8] ^ b[(i+6)%8] ^ b[(i+7)%8] ^ c[i];
    return s;
  endfunction

  // true if the degree-8 polynomial has no factor of degree 1..4
  function automatic bit ref_irreducible(logic [8:0] p9);
    for (int d = 2; d < 32; d++) begin
      logic [8:0] rem = p9;
      int dd = $clog2(d + 1) - 1;
      for (int i = 8; i >= dd; i--) if (rem[i]) rem ^= 9'(d) << (i - dd);
      if (rem == 9'h0) return 1'b0;
    end
    return 1'b1;
  endfunction

  function automatic logic [7:0] get_byte(logic [127:0] s, int i);
    return s[127 - 8*i -: 8];
  endfunction

  function automatic logic [127:0] ref_shift_rows(logic [127:0] s);
    logic [127:0] o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127 - 8*(r + 4*c) -: 8] = get_byte(s, r + 4*((c + r) % 4));
    return o;
  endfunction

  function automatic logic [127:0] ref_mix_columns(logic [127:0] s);
    logic [127:0] o;
    for (int c = 0; c < 4; c++) begin
      logic [7:0] a0 = get_byte(s, 4*c), a1 = get_byte(s, 4*c+1);
      logic [7:0] a2 = get_byte(s, 4*c+2), a3 = get_byte(s, 4*c+3);
      o[127 - 8*(4*c)   -: 8] = ref_mul(a0,2,9'h11B) ^ ref_mul(a1,3,9'h11B) ^ a2 ^ a3;
      o[127 - 8*(4*c+1) -: 8] = a0 ^ ref_mul(a1,2,9'h11B) ^ ref_mul(a2,3,9'h11B) ^ a3;
      o[127 - 8*(4*c+2) -: 8] = a0 ^ a1 ^ ref_mul(a2,2,9'h11B) ^ ref_mul(a3,3,9'h11B);
      o[127 - 8*(4*c+3) -: 8] = ref_mul(a0,3,9'h11B) ^ a1 ^ a2 ^ ref_mul(a3,2,9'h11B);
    end
    return o;
  endfunction

  function automatic logic [127:0] ref_sub_bytes(logic [127:0] s);
    logic [127:0] o;
    for (int i = 0; i < 16; i++) o[127 - 8*i -: 8] = ref_sbox(get_byte(s, i));
    return o;
  endfunction

  typedef logic [127:0] rk_arr_t [11];

  function automatic rk_arr_t ref_key_expand(logic [127:0] key);
    rk_arr_t rk;
    logic [31:0] w [44];
    logic [7:0] rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t = w[i-1];
      if (i % 4 == 0) begin
        t = {ref_sbox(t[23:16]) ^ rc, ref_sbox(t[15:8]), ref_sbox(t[7:0]), ref_sbox(t[31:24])};
        rc = ref_mul(rc, 8'h02, 9'h11B);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    return rk;
  endfunction

  function automatic logic [127:0] ref_encrypt(logic [127:0] key, logic [127:0] pt);
    rk_arr_t rk = ref_key_expand(key);
    logic [127:0] s = pt ^ rk[0];
    for (int r = 1; r <= 10; r++) begin
      s = ref_shift_rows(ref_sub_bytes(s));
      if (r != 10) s = ref_mix_columns(s);
      s = s ^ rk[r];
    end
    return s;
  endfunction

endpackage
