// tb_add_round_key -- checks AddRoundKey on the FIPS-197 input example
// (plaintext + cipher key) and on random states, byte by byte.
module tb_add_round_key;
  import aes_ref_pkg::*;
  logic [127:0] din, rkey, dout;
  int checks = 0, failures = 0;
  add_round_key dut (.din, .rkey, .dout);
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    din = 128'h3243f6a8885a308d313198a2e0370734; rkey = 128'h2b7e151628aed2a6abf7158809cf4f3c; #1;
    checks++;
    if (dout !== 128'h193de3bea0f4e22b9ac68d2ae9f84808) begin failures++; $display("FAIL FIPS: %h", dout); end
    for (int n = 0; n < 1000; n++) begin
      din = {$urandom, $urandom, $urandom, $urandom};
      rkey = {$urandom, $urandom, $urandom, $urandom};
      #1;
      for (int b = 0; b < 16; b++) begin
        logic [7:0] e;
        for (int k = 0; k < 8; k++) e[k] = (get_byte(din, b) >> k & 1) != (get_byte(rkey, b) >> k & 1);
        checks++;
        if (get_byte(dout, b) !== e) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
