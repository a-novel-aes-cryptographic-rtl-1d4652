// tb_shift_rows -- checks ShiftRows on the FIPS-197 round-1 example and on
// random states against a software model.
module tb_shift_rows;
  import aes_ref_pkg::*;
  logic [127:0] din, dout;
  int checks = 0, failures = 0;
  shift_rows dut (.din, .dout);
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
    din = 128'hd42711aee0bf98f1b8b45de51e415230;
    check(128'hd4bf5d30e0b452aeb84111f11e2798e5);
    for (int n = 0; n < 1000; n++) begin
      din = {$urandom, $urandom, $urandom, $urandom};
      check(ref_shift_rows(din));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
