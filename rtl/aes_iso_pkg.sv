// aes_iso_pkg -- types and elaboration-time tables shared by the
// representation-randomised AES-128 core.
//
// A GF(2^8) element is a byte. An irreducible polynomial of degree 8 is
// carried as its eight low coefficients (the x^8 term is implied), so the
// AES polynomial x^8+x^4+x^3+x+1 is 8'h1B. An 8x8 binary matrix is packed by
// column: column j is the image of bit j, and M*x is the XOR of the columns
// selected by the set bits of x. A 128-bit block keeps AES byte order: byte 0
// (row 0, column 0) is bits 127:120 and byte i = row (i mod 4), column (i/4).
//
// The tables below are computed by constant functions at elaboration, never
// typed in:
//   IRR_POLY[i]  the 30 irreducible degree-8 polynomials over GF(2), ascending,
//                so index 0 is the AES polynomial.
//   ROOT_R0[i]   the smallest root of the AES polynomial in GF(2)[y]/IRR_POLY[i].
//                The field isomorphism phi_0 sends x (8'h02) to it.
//   ROOT_S0[i]   the element s of the AES field with phi_0(s) = y (8'h02 of the
//                new field), i.e. the root of IRR_POLY[i] matching ROOT_R0[i].
// Entries 30 and 31 repeat entry 0 so that a 5-bit index never leaves the table.
// Choosing these particular roots and this ordering is this design's own
// convention; the design itself only needs 240 = 30 x 8 distinct isomorphisms.
package aes_iso_pkg;

  typedef logic [7:0]        gf_t;
  typedef logic [7:0][7:0]   gf_mat_t;   // [j] = column j
  typedef logic [0:15][7:0]  state_t;    // [0] = byte 0 = bits 127:120

  localparam gf_t        AES_POLY = 8'h1B;
  localparam gf_t        AES_C    = 8'h63;
  localparam int unsigned N_POLYS = 30;
  localparam int unsigned N_GENS  = 8;
  localparam int unsigned N_REPS  = N_POLYS * N_GENS;  // 240

  // Parameters of one representation, as fed to the round transformations.
  typedef struct packed {
    gf_t     poly;    // field polynomial (low 8 bits)
    gf_mat_t map;     // standard -> selected representation
    gf_mat_t imap;    // selected -> standard representation
    gf_mat_t aff_a;   // SubBytes affine matrix in the selected representation
    gf_t     aff_c;   // SubBytes affine constant
    gf_t     mc2;     // image of 8'h02 (MixColumns coefficient)
    gf_t     mc3;     // image of 8'h03 (MixColumns coefficient)
  } rep_params_t;

  typedef logic [31:0][7:0] tab32_t;
  typedef logic [0:10][127:0] rk_tab_t;

  // ---- constant functions (elaboration only) ----

  function automatic gf_t f_mul(gf_t a, gf_t b, gf_t p);
    gf_t acc = '0;
    gf_t aa  = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) acc ^= aa;
      aa = {aa[6:0], 1'b0} ^ (aa[7] ? p : 8'h00);
    end
    return acc;
  endfunction

  function automatic gf_t f_mat_vec(gf_mat_t m, gf_t x);
    gf_t y = '0;
    for (int j = 0; j < 8; j++) if (x[j]) y ^= m[j];
    return y;
  endfunction

  // The AES affine matrix: y = x ^ rotl(x,1) ^ rotl(x,2) ^ rotl(x,3) ^ rotl(x,4).
  function automatic gf_mat_t f_aes_affine_mat();
    gf_mat_t m;
    for (int j = 0; j < 8; j++) begin
      gf_t e = gf_t'(1) << j;
      m[j] = e ^ {e[6:0], e[7]} ^ {e[5:0], e[7:6]} ^ {e[4:0], e[7:5]} ^ {e[3:0], e[7:4]};
    end
    return m;
  endfunction

  localparam gf_mat_t AES_A = f_aes_affine_mat();

  // Remainder of a (degree < 16) divided by d (degree 1..8).
  function automatic logic [15:0] f_pmod(logic [15:0] a, logic [15:0] d);
    int dd = 0;
    for (int i = 0; i < 16; i++) if (d[i]) dd = i;
    for (int i = 15; i >= 0; i--)
      if (i >= dd && a[i]) a ^= d << (i - dd);
    return a;
  endfunction

  function automatic tab32_t f_irr_polys();
    tab32_t t = '0;
    int n = 0;
    for (int v = 1; v < 256; v += 2) begin
      logic [15:0] p = 16'h0100 | 16'(v);
      bit red = 1'b0;
      for (int d = 2; d < 32; d++)          // every polynomial of degree 1..4
        if (f_pmod(p, 16'(d)) == 16'h0) red = 1'b1;
      if (!red && n < 32) begin
        t[n] = gf_t'(v);
        n++;
      end
    end
    t[30] = t[0];
    t[31] = t[0];
    return t;
  endfunction

  localparam tab32_t IRR_POLY = f_irr_polys();

  // Value of the AES polynomial at y in the field of polynomial p.
  function automatic gf_t f_aes_poly_at(gf_t y, gf_t p);
    gf_t y2 = f_mul(y, y, p);
    gf_t y3 = f_mul(y2, y, p);
    gf_t y4 = f_mul(y2, y2, p);
    gf_t y8 = f_mul(y4, y4, p);
    return y8 ^ y4 ^ y3 ^ y ^ 8'h01;
  endfunction

  function automatic tab32_t f_root_r0();
    tab32_t t = '0;
    for (int i = 0; i < 32; i++) begin
      bit found = 1'b0;
      for (int y = 2; y < 256; y++)
        if (!found && f_aes_poly_at(gf_t'(y), IRR_POLY[i]) == 8'h00) begin
          t[i] = gf_t'(y);
          found = 1'b1;
        end
    end
    return t;
  endfunction

  localparam tab32_t ROOT_R0 = f_root_r0();

  function automatic tab32_t f_root_s0();
    tab32_t t = '0;
    for (int i = 0; i < 32; i++) begin
      gf_mat_t m;
      gf_t pw = 8'h01;
      bit found = 1'b0;
      for (int j = 0; j < 8; j++) begin
        m[j] = pw;
        pw = f_mul(pw, ROOT_R0[i], IRR_POLY[i]);
      end
      for (int s = 0; s < 256; s++)
        if (!found && f_mat_vec(m, gf_t'(s)) == 8'h02) begin
          t[i] = gf_t'(s);
          found = 1'b1;
        end
    end
    return t;
  endfunction

  localparam tab32_t ROOT_S0 = f_root_s0();

  // AES-128 key schedule (FIPS-197), used only to fill the round-key store.
  function automatic gf_t f_sbox(gf_t a);
    gf_t inv = 8'h00;
    for (int c = 1; c < 256; c++)
      if (f_mul(a, gf_t'(c), AES_POLY) == 8'h01) inv = gf_t'(c);
    return f_mat_vec(AES_A, inv) ^ AES_C;
  endfunction

  function automatic rk_tab_t f_expand_key(logic [127:0] key);
    rk_tab_t rk;
    logic [31:0] w [44];
    gf_t rcon = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {f_sbox(t[31:24]) ^ rcon, f_sbox(t[23:16]), f_sbox(t[15:8]), f_sbox(t[7:0])};
        rcon = f_mul(rcon, 8'h02, AES_POLY);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    return rk;
  endfunction

endpackage
