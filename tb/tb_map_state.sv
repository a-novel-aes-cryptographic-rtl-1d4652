// tb_map_state -- checks that all 16 bytes of a block are mapped with the same
// matrix and land in their own byte position, against a row-parity reference.
module tb_map_state;
  import aes_iso_pkg::*;
  logic [127:0] din, dout;
  gf_mat_t m_mat;
  int checks = 0, failures = 0;
  map_state dut (.din, .m_mat, .dout);
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 2000; n++) begin
      m_mat = {$urandom, $urandom};
      din = {$urandom, $urandom, $urandom, $urandom};
      #1;
      for (int b = 0; b < 16; b++) begin
        gf_t x, e;
        x = din[127 - 8*b -: 8];
        for (int i = 0; i < 8; i++) begin
          logic par;
          par = 1'b0;
          for (int j = 0; j < 8; j++) par ^= m_mat[j][i] & x[j];
          e[i] = par;
        end
        checks++;
        if (dout[127 - 8*b -: 8] !== e) begin
          failures++;
          if (failures < 5) $display("FAIL byte %0d: %h want %h", b, dout[127 - 8*b -: 8], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
