// tb_rep_select -- runs the selector through more than two LFSR periods with
// advance asserted whenever a representation is available. Checks: every
// 240 consecutive representations are all different and below 240, the
// sequence repeats after exactly 240 picks, exactly 15 skip cycles occur per
// period, the polynomial and generator indices agree with the number, and the
// selection holds while advance is low.
module tb_rep_select;
  logic clk = 1'b0, rst_n = 1'b0, advance = 1'b0;
  logic rep_valid;
  logic [4:0] poly_idx;
  logic [2:0] gen_idx;
  logic [7:0] rep_id;
  int checks = 0, failures = 0;
  rep_select dut (.clk, .rst_n, .advance, .rep_valid, .poly_idx, .gen_idx, .rep_id);
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 8) $display("FAIL %s", what); end
  endtask
  initial begin
    logic [7:0] seq [480];
    bit seen [240];
    int n = 0, skips = 0, cyc = 0;
    logic [7:0] held;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // hold: no advance for several cycles while valid
    #1;
    chk(rep_valid && rep_id == 8'd0, "seed 1 must give representation 0");
    held = rep_id;
    repeat (4) @(posedge clk);
    #1;
    chk(rep_id == held, "selection must hold without advance");
    // advance whenever valid; 480 picks
    while (n < 480) begin
      advance = rep_valid;
      if (rep_valid) begin
        seq[n] = rep_id;
        chk(rep_id < 240, "number below 240");
        chk({poly_idx, gen_idx} == rep_id, "index split");
        n++;
      end else if (n > 0 && n <= 240) skips++;
      @(posedge clk); #1;
      cyc++;
    end
    advance = 1'b0;
    for (int i = 0; i < 240; i++) seen[i] = 1'b0;
    for (int i = 0; i < 240; i++) begin
      chk(!seen[seq[i]], "repeat inside one period");
      seen[seq[i]] = 1'b1;
    end
    for (int i = 0; i < 240; i++) chk(seq[i + 240] == seq[i], "period of 240 picks");
    chk(skips == 15, $sformatf("15 skip cycles per period, saw %0d", skips));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
