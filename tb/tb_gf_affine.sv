// tb_gf_affine -- checks y = A*x + c for random matrices and vectors, computed
// row by row as parities (the RTL sums columns), and the AES affine step of the
// S-box for x = inv(53) = CA -> ED.
module tb_gf_affine;
  import aes_iso_pkg::*;
  gf_t x, c_vec, y;
  gf_mat_t a_mat;
  int checks = 0, failures = 0;
  gf_affine dut (.x, .a_mat, .c_vec, .y);
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(gf_t e);
    #1;
    checks++;
    if (y !== e) begin
      failures++;
      if (failures < 5) $display("FAIL x=%h c=%h y=%h want %h", x, c_vec, y, e);
    end
  endtask
  initial begin
    // AES matrix written row by row: row i has ones at i, i+4..i+7 (mod 8)
    for (int j = 0; j < 8; j++)
      for (int i = 0; i < 8; i++)
        a_mat[j][i] = (j == i) || (j == (i+4)%8) || (j == (i+5)%8) || (j == (i+6)%8) || (j == (i+7)%8);
    x = 8'hCA; c_vec = 8'h63; check(8'hED);
    x = 8'h00; c_vec = 8'h63; check(8'h63);
    for (int n = 0; n < 5000; n++) begin
      gf_t e;
      a_mat = {$urandom, $urandom};
      x = 8'($urandom); c_vec = 8'($urandom);
      for (int i = 0; i < 8; i++) begin
        logic par;
        par = c_vec[i];
        for (int j = 0; j < 8; j++) par ^= a_mat[j][i] & x[j];
        e[i] = par;
      end
      check(e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
