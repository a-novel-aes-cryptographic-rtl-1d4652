// tb_op_params -- for each of the 240 representations, checks that the
// derived parameters describe a field isomorphism of AES:
//   * the polynomial is irreducible, and 30 different polynomials occur;
//   * map(a*b) = map(a)*map(b) (multiplication in the new field) and
//     imap(map(x)) = x, for random a, b, x and all basis vectors;
//   * the S-box built from the parameters satisfies S'(map(x)) = map(S(x));
//   * mc2 = map(02) and mc3 = map(03);
//   * all 240 mapping matrices differ, and representation 0 is the identity.
// The reference multiplier, inverter and S-box are the testbench's own.
module tb_op_params;
  import aes_iso_pkg::*;
  import aes_ref_pkg::*;
  logic [4:0] poly_idx;
  logic [2:0] gen_idx;
  rep_params_t prm;
  int checks = 0, failures = 0;
  op_params dut (.poly_idx, .gen_idx, .prm);
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic gf_t mv(gf_mat_t m, gf_t x);
    gf_t y;
    for (int i = 0; i < 8; i++) begin
      logic par = 1'b0;
      for (int j = 0; j < 8; j++) par ^= m[j][i] & x[j];
      y[i] = par;
    end
    return y;
  endfunction
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 8) $display("FAIL rep %0d/%0d: %s", poly_idx, gen_idx, what); end
  endtask
  initial begin
    logic [63:0] maps [240];
    logic [7:0]  polys [30];
    int ndistinct = 0;
    for (int pi = 0; pi < 30; pi++)
      for (int gi = 0; gi < 8; gi++) begin
        logic [8:0] p9;
        poly_idx = 5'(pi); gen_idx = 3'(gi); #1;
        p9 = {1'b1, prm.poly};
        maps[pi*8 + gi] = prm.map;
        polys[pi] = prm.poly;
        chk(ref_irreducible(p9), "irreducible");
        for (int n = 0; n < 24; n++) begin
          gf_t a, b, x;
          a = 8'($urandom);
          b = 8'($urandom);
          x = (n < 8) ? gf_t'(1) << n : a;
          chk(mv(prm.map, ref_mul(a, b, 9'h11B)) == ref_mul(mv(prm.map, a), mv(prm.map, b), p9), "multiplicative");
          chk(mv(prm.imap, mv(prm.map, x)) == x, "inverse map");
          chk((mv(prm.aff_a, ref_inv(mv(prm.map, a), p9)) ^ prm.aff_c) == mv(prm.map, ref_sbox(a)), "S-box commutes");
        end
        chk(prm.mc2 == mv(prm.map, 8'h02) && prm.mc3 == mv(prm.map, 8'h03), "MixColumns coefficients");
        if (pi == 0 && gi == 0) chk(prm.map == 64'h8040201008040201 && prm.poly == 8'h1B, "representation 0 is AES itself");
      end
    for (int i = 0; i < 240; i++)
      for (int j = i + 1; j < 240; j++)
        if (maps[i] == maps[j]) begin
          failures++;
          if (failures < 8) $display("FAIL maps %0d and %0d equal", i, j);
        end
    checks++;
    for (int i = 0; i < 30; i++) begin
      bit dup = 1'b0;
      for (int j = 0; j < i; j++) if (polys[j] == polys[i]) dup = 1'b1;
      if (!dup) ndistinct++;
    end
    poly_idx = 0; gen_idx = 0;
    chk(ndistinct == 30, "30 distinct polynomials");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
