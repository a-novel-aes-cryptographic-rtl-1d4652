// tb_mix_columns -- with C(x) = {03,01,01,02} and polynomial 11B, checks
// MixColumns on the FIPS-197 round-1 example and on random states against a
// software model; then, with a random non-standard polynomial and
// coefficients, checks one column against the defining sum
// b_i = sum_j coef[(i-j) mod 4] * a_j.
module tb_mix_columns;
  import aes_ref_pkg::*;
  logic [127:0] din, dout;
  logic [7:0] poly;
  logic [3:0][7:0] coef;
  int checks = 0, failures = 0;
  mix_columns dut (.din, .poly, .coef, .dout);
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(logic [127:0] e);
    #1;
    checks++;
    if (dout !== e) begin
      failures++;
      if (failures < 5) $display("FAIL %h -> %h want %h", din, dout, e);
    end
  endtask
  initial begin
    poly = 8'h1B; coef = {8'h03, 8'h01, 8'h01, 8'h02};
    din = 128'hd4bf5d30e0b452aeb84111f11e2798e5;
    check(128'h046681e5e0cb199a48f8d37a2806264c);
    for (int n = 0; n < 500; n++) begin
      din = {$urandom, $urandom, $urandom, $urandom};
      check(ref_mix_columns(din));
    end
    for (int n = 0; n < 500; n++) begin
      logic [127:0] e;
      do poly = 8'($urandom) | 8'h01; while (!ref_irreducible({1'b1, poly}));
      coef = $urandom;
      din = {$urandom, $urandom, $urandom, $urandom};
      for (int c = 0; c < 4; c++)
        for (int i = 0; i < 4; i++) begin
          logic [7:0] s;
          s = 8'h00;
          for (int j = 0; j < 4; j++)
            s ^= ref_mul(coef[(i - j + 4) % 4], get_byte(din, 4*c + j), {1'b1, poly});
          e[127 - 8*(4*c + i) -: 8] = s;
        end
      check(e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
