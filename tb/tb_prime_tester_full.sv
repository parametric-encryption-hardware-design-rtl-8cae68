// tb_prime_tester_full: the prime tester at its default configuration
// (512-bit numbers, 12 bases, 2-block multiplier with 4 replicated adders and
// 4-stage adders), with no parameter overrides. Tests the 512-bit prime
// 2^512 - 569, which runs every round to completion, and one random odd
// 512-bit number; verdicts are compared with a wide-integer reference and
// the cycle count of the prime is printed.
module tb_prime_tester_full;
  localparam int W = 512;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [W-1:0] nums [$];
  int   checks_c, failures_c;
  logic fin;
  int   ev [12];
  longint cyc = 0;

  prime_tb_core #(.W(W), .P(2), .DEFAULTS(1'b1)) core (
    .clk(clk), .rst(rst), .nums(nums), .checks(checks_c), .failures(failures_c),
    .finished(fin), .ev(ev));

  always @(posedge clk) cyc <= cyc + 1;

  task automatic report(input int extra);
    int checks, failures;
    checks = checks_c + 2; failures = failures_c + extra;
    // the prime must pass all 12 rounds, the other number must be rejected
    if (ev[6] != 1) begin failures++; $display("FAIL: %0d prime verdicts, expected 1", ev[6]); end
    if (ev[11] == 0) begin failures++; $display("FAIL: standalone multiplier never used"); end
    $display("cycles: %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    logic [W-1:0] r;
    nums.push_back({W{1'b1}} - W'(568));              // 2^512 - 569
    for (int k = 0; k < W / 32; k++) r[k*32 +: 32] = $urandom();
    r[W-1] = 1'b1; r[0] = 1'b1;
    r = r - W'(r % 3);                                // divisible by 3 ...
    if (!r[0]) r = r + W'(3);                         // ... and odd
    nums.push_back(r);
    repeat (4) @(posedge clk);
    rst <= 0;
  end

  always @(posedge clk) if (fin) report(0);

  initial begin
    repeat (3000000) @(posedge clk);
    $display("watchdog expired");
    report(1);
  end
endmodule
