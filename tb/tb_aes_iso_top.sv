// tb_aes_iso_top -- end-to-end test of the top level at its default
// parameters: both core versions run side by side on their own random
// plaintexts for 260 blocks each (more than one full round of 240
// representations), every ciphertext compared with a software AES-128 model
// and the FIPS-197 C.1 vector checked on both. It counts, and fails if any
// never happens:
//   rep_change   a block uses a different representation from the last one
//   nonstd_rep   a block runs in a representation other than plain AES
//   skip         the selector is stepping over an LFSR state that names no
//                representation
//   all_reps     all 240 representations were used by a core
//   mc_bypass    the last round skips MixColumns
//   busy_start   a start pulse during a block is ignored
// and checks the 12- and 42-cycle block latencies.
module tb_aes_iso_top;
  import aes_ref_pkg::*;
  localparam logic [127:0] KEY = 128'h000102030405060708090a0b0c0d0e0f;
  localparam int NBLK = 260;
  logic clk = 1'b0, rst_n = 1'b0;
  logic v1_start = 1'b0, v2_start = 1'b0;
  logic [127:0] v1_din = '0, v2_din = '0, v1_dout, v2_dout;
  logic v1_ready, v1_busy, v1_done, v2_ready, v2_busy, v2_done;
  logic [7:0] v1_rep_id, v2_rep_id;
  int checks = 0, failures = 0;
  int rep_change = 0, nonstd_rep = 0, skip = 0, all_reps = 0, mc_bypass = 0, busy_start = 0;

  aes_iso_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 8) $display("FAIL %s", what); end
  endtask

  // last-round MixColumns bypass, observed at the state register inputs
  always @(posedge clk) if (rst_n) begin
    if (int'(dut.u_v1.fsm) == 1 && dut.u_v1.rnd == 4'd10) mc_bypass++;
    if (int'(dut.u_v2.fsm) == 1 && dut.u_v2.rnd == 4'd10 && int'(dut.u_v2.ph) == 2) mc_bypass++;
    if (!dut.u_v1.rep_valid) skip++;
    if (!dut.u_v2.rep_valid) skip++;
  end

  task automatic run_core(input int ver, input int lat);
    bit seen [256];
    int distinct = 0;
    logic [7:0] last_rep = 8'hFF;
    for (int i = 0; i < 256; i++) seen[i] = 1'b0;
    for (int n = 0; n < NBLK; n++) begin
      logic [127:0] pt, ct;
      logic [7:0] rep;
      int cyc;
      pt = (n == 0) ? 128'h00112233445566778899aabbccddeeff : {$urandom, $urandom, $urandom, $urandom};
      if (ver == 1) begin
        while (!v1_ready) begin @(posedge clk); #1; end
        v1_din = pt; v1_start = 1'b1;
      end else begin
        while (!v2_ready) begin @(posedge clk); #1; end
        v2_din = pt; v2_start = 1'b1;
      end
      @(posedge clk); #1;
      if (ver == 1) v1_start = 1'b0; else v2_start = 1'b0;
      cyc = 1;
      while (ver == 1 ? !v1_done : !v2_done) begin
        if (n % 17 == 3 && cyc == 4) begin
          if (ver == 1) v1_start = 1'b1; else v2_start = 1'b1;
          busy_start++;
        end
        @(posedge clk); #1;
        v1_start = (ver == 1) ? 1'b0 : v1_start;
        v2_start = (ver == 2) ? 1'b0 : v2_start;
        cyc++;
        if (cyc > 100) break;
      end
      ct  = (ver == 1) ? v1_dout : v2_dout;
      rep = (ver == 1) ? v1_rep_id : v2_rep_id;
      chk(ct == ref_encrypt(KEY, pt), $sformatf("v%0d block %0d rep %0d", ver, n, rep));
      if (n == 0) chk(ct == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, $sformatf("v%0d FIPS-197 C.1", ver));
      chk(cyc == lat, $sformatf("v%0d latency %0d", ver, cyc));
      if (n > 0 && rep != last_rep) rep_change++;
      if (rep != 8'd0) nonstd_rep++;
      if (!seen[rep]) distinct++;
      seen[rep] = 1'b1;
      last_rep = rep;
    end
    if (distinct == 240) all_reps++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    fork
      run_core(1, 12);
      run_core(2, 42);
    join
    $display("events: rep_change=%0d nonstd_rep=%0d skip=%0d all_reps=%0d mc_bypass=%0d busy_start=%0d",
             rep_change, nonstd_rep, skip, all_reps, mc_bypass, busy_start);
    chk(rep_change > 0, "rep_change never happened");
    chk(nonstd_rep > 0, "nonstd_rep never happened");
    chk(skip > 0, "skip never happened");
    chk(all_reps == 2, "not all 240 representations used by both cores");
    chk(mc_bypass == 2 * NBLK, "mc_bypass count");
    chk(busy_start > 0, "busy_start never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
