// tb_gf_mul -- checks the representation-independent multiplier against a
// carry-less product reduced by long division, for random operands in every
// irreducible degree-8 polynomial, plus the FIPS-197 example 57*83 = C1.
module tb_gf_mul;
  import aes_ref_pkg::*;
  logic [7:0] a, b, poly, y;
  int checks = 0, failures = 0;
  gf_mul dut (.a, .b, .poly, .y);
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(logic [7:0] e);
    #1;
    checks++;
    if (y !== e) begin
      failures++;
      if (failures < 5) $display("FAIL %h*%h mod 1%h = %h, want %h", a, b, poly, y, e);
    end
  endtask
  initial begin
    int npoly = 0;
    a = 8'h57; b = 8'h83; poly = 8'h1B; check(8'hC1);
    a = 8'h57; b = 8'h13; poly = 8'h1B; check(8'hFE);
    for (int v = 1; v < 256; v += 2) begin
      if (!ref_irreducible({1'b1, 8'(v)})) continue;
      npoly++;
      poly = 8'(v);
      for (int n = 0; n < 300; n++) begin
        a = 8'($urandom); b = 8'($urandom);
        check(ref_mul(a, b, {1'b1, poly}));
      end
    end
    checks++;
    if (npoly != 30) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
