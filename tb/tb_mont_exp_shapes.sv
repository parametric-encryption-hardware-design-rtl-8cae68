// tb_mont_exp_shapes: how the cycle count of a 512-bit exponentiation moves
// with the multiplier shape. Six exponentiators run one random
// exponentiation each, and every result is checked with wide integer
// arithmetic in exp_tb_core. The cycle counts must show the expected trends:
//   - 2 pipeline blocks need at most 60 % of the cycles of 1 block (two
//     independent products share the pipeline);
//   - 3 blocks are within 5 % of 2 blocks (only two products are ever
//     independent, so a third block cannot be filled);
//   - doubling the replicated adders (r = 1 -> 2, with 2 blocks) cuts the
//     cycles to between 45 % and 60 %;
//   - deeper adder pipelines add cycles but little: with 1 block, depth 8
//     costs more than depth 1, and by less than 10 %.
module tb_mont_exp_shapes;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  localparam int NC = 6;
  int     ck [NC], fl [NC], ov [NC];
  logic   fin [NC];
  longint cy [NC];

  exp_tb_core #(.W(512), .P(1), .R(1), .FS(1), .S(4), .NOPS(1), .SEED(61)) c0 (clk, rst, ck[0], fl[0], fin[0], cy[0], ov[0]);
  exp_tb_core #(.W(512), .P(2), .R(1), .FS(1), .S(4), .NOPS(1), .SEED(62)) c1 (clk, rst, ck[1], fl[1], fin[1], cy[1], ov[1]);
  exp_tb_core #(.W(512), .P(3), .R(1), .FS(1), .S(4), .NOPS(1), .SEED(63)) c2 (clk, rst, ck[2], fl[2], fin[2], cy[2], ov[2]);
  exp_tb_core #(.W(512), .P(2), .R(2), .FS(1), .S(4), .NOPS(1), .SEED(64)) c3 (clk, rst, ck[3], fl[3], fin[3], cy[3], ov[3]);
  exp_tb_core #(.W(512), .P(1), .R(1), .FS(1), .S(1), .NOPS(1), .SEED(65)) c4 (clk, rst, ck[4], fl[4], fin[4], cy[4], ov[4]);
  exp_tb_core #(.W(512), .P(1), .R(1), .FS(1), .S(8), .NOPS(1), .SEED(66)) c5 (clk, rst, ck[5], fl[5], fin[5], cy[5], ov[5]);

  int checks, failures;
  bit reported = 0;

  task automatic report(input int extra_fail);
    if (reported) return;
    reported = 1;
    checks = 4; failures = extra_fail;
    for (int i = 0; i < NC; i++) begin checks += ck[i]; failures += fl[i]; end
    $display("cycles: p1r1 %0d, p2r1 %0d, p3r1 %0d, p2r2 %0d, p1r1 adders depth 1: %0d, depth 8: %0d",
             cy[0], cy[1], cy[2], cy[3], cy[4], cy[5]);
    if (cy[1] * 100 > cy[0] * 60) begin
      failures++; $display("FAIL: 2 blocks do not nearly halve the cycles");
    end
    if (cy[2] * 100 > cy[1] * 105 || cy[2] * 100 < cy[1] * 95) begin
      failures++; $display("FAIL: 3 blocks differ from 2 blocks by more than 5 %%");
    end
    if (cy[3] * 100 > cy[1] * 60 || cy[3] * 100 < cy[1] * 45) begin
      failures++; $display("FAIL: doubling r does not nearly halve the cycles");
    end
    if (!(cy[5] > cy[4]) || cy[5] * 100 > cy[4] * 110) begin
      failures++; $display("FAIL: adder depth 8 vs 1 not a small increase");
    end
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
    repeat (800000) @(posedge clk);
    $display("watchdog expired");
    report(1);
  end
endmodule
