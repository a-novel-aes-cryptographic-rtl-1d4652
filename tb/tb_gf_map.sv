// tb_gf_map -- checks the change-of-basis multiply: identity matrix leaves
// every byte unchanged, a bit-reversal matrix reverses it, and random matrices
// agree with a row-parity computation.
module tb_gf_map;
  import aes_iso_pkg::*;
  gf_t x, y;
  gf_mat_t m_mat;
  int checks = 0, failures = 0;
  gf_map dut (.x, .m_mat, .y);
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
      if (failures < 5) $display("FAIL x=%h y=%h want %h", x, y, e);
    end
  endtask
  initial begin
    for (int j = 0; j < 8; j++) m_mat[j] = gf_t'(1) << j;
    for (int i = 0; i < 256; i++) begin x = 8'(i); check(8'(i)); end
    for (int j = 0; j < 8; j++) m_mat[j] = gf_t'(1) << (7 - j);
    for (int i = 0; i < 256; i++) begin x = 8'(i); check({<<{8'(i)}}); end
    for (int n = 0; n < 5000; n++) begin
      gf_t e;
      m_mat = {$urandom, $urandom};
      x = 8'($urandom);
      for (int i = 0; i < 8; i++) begin
        logic par;
        par = 1'b0;
        for (int j = 0; j < 8; j++) par ^= m_mat[j][i] & x[j];
        e[i] = par;
      end
      check(e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
