// tb_gf_add -- checks the GF(2^8) adder on all 65536 operand pairs against a
// bit-by-bit modulo-2 sum, plus the field laws a+a = 0 and a+0 = a.
module tb_gf_add;
  logic [7:0] a, b, y;
  int checks = 0, failures = 0;
  gf_add dut (.a, .b, .y);
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        logic [7:0] e;
        a = 8'(i); b = 8'(j); #1;
        for (int k = 0; k < 8; k++) e[k] = (a[k] + b[k]) % 2;
        checks++;
        if (y !== e) begin
          failures++;
          if (failures < 5) $display("FAIL %h+%h = %h, want %h", a, b, y, e);
        end
        if (i == j) begin checks++; if (y !== 8'h00) failures++; end
        if (j == 0) begin checks++; if (y !== a) failures++; end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
