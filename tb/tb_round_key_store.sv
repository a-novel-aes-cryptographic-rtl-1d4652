// tb_round_key_store -- checks the stored round keys: with the default key
// against a software key schedule for all 11 rounds, and with the FIPS-197
// Appendix A.1 key against the published round keys 1 and 10. Round numbers
// above 10 read as zero.
module tb_round_key_store;
  import aes_ref_pkg::*;
  localparam logic [127:0] K1 = 128'h2b7e151628aed2a6abf7158809cf4f3c;
  logic [3:0] rnd;
  logic [127:0] rk_def, rk_a1;
  int checks = 0, failures = 0;
  round_key_store dut_def (.rnd, .rkey(rk_def));
  round_key_store #(.KEY(K1)) dut_a1 (.rnd, .rkey(rk_a1));
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  initial begin
    rk_arr_t ref_def = ref_key_expand(128'h000102030405060708090a0b0c0d0e0f);
    for (int r = 0; r < 16; r++) begin
      rnd = 4'(r); #1;
      if (r <= 10) chk(rk_def == ref_def[r], $sformatf("default key round %0d", r));
      else chk(rk_def == '0, "out of range reads zero");
      if (r == 0)  chk(rk_a1 == K1, "A.1 round 0");
      if (r == 1)  chk(rk_a1 == 128'ha0fafe1788542cb123a339392a6c7605, "A.1 round 1");
      if (r == 10) chk(rk_a1 == 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "A.1 round 10");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
