// tb_gf_inv -- checks the inverter on all 256 elements for every irreducible
// degree-8 polynomial: a * inv(a) = 1 with a reference multiplier, and
// inv(0) = 0.
module tb_gf_inv;
  import aes_ref_pkg::*;
  logic [7:0] a, poly, y;
  int checks = 0, failures = 0;
  gf_inv dut (.a, .poly, .y);
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 1; v < 256; v += 2) begin
      if (!ref_irreducible({1'b1, 8'(v)})) continue;
      poly = 8'(v);
      for (int i = 0; i < 256; i++) begin
        a = 8'(i); #1;
        checks++;
        if (i == 0 ? (y !== 8'h00) : (ref_mul(a, y, {1'b1, poly}) !== 8'h01)) begin
          failures++;
          if (failures < 5) $display("FAIL inv(%h) mod 1%h = %h", a, poly, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
