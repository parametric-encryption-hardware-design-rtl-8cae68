// tb_mont_exp_512: the exponentiator at its evaluated size, 512-bit operands.
// Runs one random 512-bit modular exponentiation on two multiplier shapes:
//   - 1 pipeline block, no replication, adder pipeline depth 4: the
//     configuration whose FPGA timing is published as 3.6 ms at 147.3 MHz,
//     i.e. about 530,000 clock cycles. The cycle count measured here must be
//     within 10 % of that figure.
//   - the default shape (2 blocks, 4 replicated carry-save adders), which must
//     be at least 3 times faster in cycles.
// Results are checked against square-and-multiply done with wide integer
// arithmetic inside exp_tb_core.
module tb_mont_exp_512;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  int     ck [2], fl [2], ov [2];
  logic   fin [2];
  longint cy [2];

  exp_tb_core #(.W(512), .P(1), .R(1), .FS(1), .S(4), .NOPS(1), .SEED(51)) c0 (clk, rst, ck[0], fl[0], fin[0], cy[0], ov[0]);
  exp_tb_core #(.W(512), .P(2), .R(4), .FS(1), .S(4), .NOPS(1), .SEED(52)) c1 (clk, rst, ck[1], fl[1], fin[1], cy[1], ov[1]);

  int checks, failures;
  bit reported = 0;

  // 3.6 ms at 147.3 MHz
  localparam longint PUBLISHED_CYCLES = 530280;

  task automatic report(input int extra_fail);
    if (reported) return;
    reported = 1;
    checks   = ck[0] + ck[1] + 2;
    failures = fl[0] + fl[1] + extra_fail;
    if (cy[0] * 10 < PUBLISHED_CYCLES * 9 || cy[0] * 10 > PUBLISHED_CYCLES * 11) begin
      failures++;
      $display("FAIL: 1-block 512-bit exponentiation took %0d cycles, published about %0d",
               cy[0], PUBLISHED_CYCLES);
    end
    if (cy[1] * 3 > cy[0]) begin
      failures++;
      $display("FAIL: default shape %0d cycles is not 3x faster than %0d", cy[1], cy[0]);
    end
    $display("512-bit exponentiation: p=1 r=1 %0d cycles (published about %0d), p=2 r=4 %0d cycles",
             cy[0], PUBLISHED_CYCLES, cy[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst <= 0;
  end

  always @(posedge clk) if (fin[0] && fin[1]) report(0);

  initial begin
    repeat (800000) @(posedge clk);
    $display("watchdog expired");
    report(1);
  end
endmodule
