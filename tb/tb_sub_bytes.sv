// tb_sub_bytes -- with the standard parameters (polynomial 11B, AES affine
// matrix, 63) SubBytes must equal the FIPS-197 S-box: all 256 byte values
// are pushed through every byte position and compared with a reference S-box,
// and the FIPS-197 round-1 example state is checked.
module tb_sub_bytes;
  import aes_iso_pkg::*;
  import aes_ref_pkg::*;
  logic [127:0] din, dout;
  gf_t poly, c_vec;
  gf_mat_t a_mat;
  int checks = 0, failures = 0;
  sub_bytes dut (.din, .poly, .a_mat, .c_vec, .dout);
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    poly = 8'h1B; c_vec = 8'h63;
    for (int j = 0; j < 8; j++)
      for (int i = 0; i < 8; i++)
        a_mat[j][i] = (j == i) || (j == (i+4)%8) || (j == (i+5)%8) || (j == (i+6)%8) || (j == (i+7)%8);
    din = 128'h193de3bea0f4e22b9ac68d2ae9f84808; #1;
    checks++;
    if (dout !== 128'hd42711aee0bf98f1b8b45de51e415230) begin
      failures++; $display("FAIL FIPS round 1: %h", dout);
    end
    for (int n = 0; n < 256; n++) begin
      for (int b = 0; b < 16; b++) din[127 - 8*b -: 8] = 8'((n + 17*b) % 256);
      #1;
      for (int b = 0; b < 16; b++) begin
        checks++;
        if (dout[127 - 8*b -: 8] !== ref_sbox(8'((n + 17*b) % 256))) begin
          failures++;
          if (failures < 5) $display("FAIL S(%h) = %h", 8'((n + 17*b) % 256), dout[127 - 8*b -: 8]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
