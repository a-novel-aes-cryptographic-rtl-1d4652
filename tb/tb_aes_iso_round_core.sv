// tb_aes_iso_round_core -- end-to-end test of the one round per cycle, 12 cycles per block core.
//
// Encrypts the FIPS-197 Appendix C.1 block, then 250 random blocks, and
// compares every ciphertext with a software AES-128 model. Checks that each
// block takes exactly 12 cycles from the edge that takes start to done,
// that the first 240 blocks use 240 different representations, that a start
// pulse while busy is ignored, and that done is a single-cycle pulse.
module tb_aes_iso_round_core;
  import aes_ref_pkg::*;
  localparam int LAT = 12;
  localparam logic [127:0] KEY = 128'h000102030405060708090a0b0c0d0e0f;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [127:0] din = '0, dout;
  logic ready, busy, done;
  logic [7:0] rep_id;
  int checks = 0, failures = 0;
  aes_iso_round_core dut (.clk, .rst_n, .start, .din, .ready, .busy, .done, .dout, .rep_id);
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 8) $display("FAIL %s", what); end
  endtask
  task automatic encrypt(input logic [127:0] pt, input bit poke_busy, output logic [127:0] ct, output int cyc, output logic [7:0] rep);
    while (!ready) begin @(posedge clk); #1; end
    din = pt; start = 1'b1;
    @(posedge clk); #1;
    start = 1'b0; din = {$urandom, $urandom, $urandom, $urandom};
    cyc = 1;
    chk(busy, "busy after start");
    while (!done) begin
      if (poke_busy && cyc == 3) start = 1'b1;
      @(posedge clk); #1;
      start = 1'b0;
      cyc++;
      if (cyc > 100) break;
    end
    ct = dout; rep = rep_id;
    @(posedge clk); #1;
    chk(!done, "done lasts one cycle");
    chk(dout == ct, "dout holds");
  endtask
  initial begin
    logic [127:0] ct;
    int cyc;
    logic [7:0] rep;
    bit seen [256];
    int distinct = 0;
    for (int i = 0; i < 256; i++) seen[i] = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    encrypt(128'h00112233445566778899aabbccddeeff, 1'b0, ct, cyc, rep);
    chk(ct == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, $sformatf("FIPS-197 C.1: %h", ct));
    chk(cyc == LAT, $sformatf("latency %0d", cyc));
    seen[rep] = 1'b1; distinct++;
    for (int n = 1; n < 251; n++) begin
      logic [127:0] pt;
      pt = {$urandom, $urandom, $urandom, $urandom};
      encrypt(pt, n == 5, ct, cyc, rep);
      chk(ct == ref_encrypt(KEY, pt), $sformatf("block %0d rep %0d: %h", n, rep, ct));
      chk(cyc == LAT, $sformatf("latency %0d", cyc));
      if (n < 240) begin
        chk(!seen[rep] && rep < 240, "new representation");
        if (!seen[rep]) distinct++;
        seen[rep] = 1'b1;
      end
    end
    chk(distinct == 240, $sformatf("240 representations used, saw %0d", distinct));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
