// tb_mont_exp: self-checking test of the exponentiator. Checks results for
// several multiplier shapes (1, 2 and 3 pipeline blocks, replication, with
// and without final subtraction), the number of multiplications, that two
// products share the multiplier when it has 2 blocks, and that 2 blocks cut
// the cycle count of an exponentiation to well below that of 1 block (the
// reason 2 blocks is the preferred setting).
module tb_mont_exp;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  localparam int NC = 5;
  int     ck [NC], fl [NC], ov [NC];
  logic   fin [NC];
  longint cy [NC];

  exp_tb_core #(.W(64), .P(1), .R(1), .FS(1), .S(1), .NOPS(4), .SEED(21)) c0 (clk, rst, ck[0], fl[0], fin[0], cy[0], ov[0]);
  exp_tb_core #(.W(64), .P(2), .R(1), .FS(1), .S(1), .NOPS(4), .SEED(22)) c1 (clk, rst, ck[1], fl[1], fin[1], cy[1], ov[1]);
  exp_tb_core #(.W(45), .P(3), .R(3), .FS(1), .S(3), .NOPS(5), .SEED(23)) c2 (clk, rst, ck[2], fl[2], fin[2], cy[2], ov[2]);
  exp_tb_core #(.W(64), .P(2), .R(4), .FS(0), .S(4), .NOPS(6), .SEED(24)) c3 (clk, rst, ck[3], fl[3], fin[3], cy[3], ov[3]);
  exp_tb_core #(.W(96), .P(2), .R(4), .FS(1), .S(4), .NOPS(3), .SEED(25)) c4 (clk, rst, ck[4], fl[4], fin[4], cy[4], ov[4]);

  int checks, failures;

  task automatic report(input int extra_fail);
    checks = 0; failures = extra_fail;
    for (int i = 0; i < NC; i++) begin checks += ck[i]; failures += fl[i]; end
    // pipelining: 2 blocks keep two products in flight and run much faster
    checks += 2;
    if (ov[1] == 0) begin failures++; $display("FAIL: no Z/P overlap with 2 blocks"); end
    if (cy[1] * 100 > cy[0] * 65) begin
      failures++;
      $display("FAIL: 2-block exponentiation %0d cycles vs 1-block %0d", cy[1], cy[0]);
    end
    // Cycle model: 2 L + (2W+1) N + 2(W+2) + 1 without adder pipelines;
    // each multiplication on the P chain adds at most 3S+4 adder/control cycles.
    begin
      longint lm, nm, lexp;
      nm = 64 / 2 + 2;
      lm = 2 * nm + 1;
      lexp = 2 * lm + (2 * 64 + 1) * nm + 2 * (64 + 2) + 1;
      checks++;
      if (cy[1] < lexp || cy[1] > lexp + 65 * (3 * 1 + 4)) begin
        failures++;
        $display("FAIL: 2-block exponentiation %0d cycles, model %0d", cy[1], lexp);
      end
    end
    $display("cycles per exponentiation: P=1 %0d, P=2 %0d", cy[0], cy[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst <= 0;
  end

  always @(posedge clk) begin
    bit all;
    all = 1;
    for (int i = 0; i < NC; i++) all &= fin[i];
    if (all) report(0);
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    report(1);
  end
endmodule
