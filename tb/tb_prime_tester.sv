// tb_prime_tester: end-to-end test of the whole design (prime tester,
// exponentiator, shared pipelined multiplier, prime ROM) at 64 bits with a
// 3-block multiplier and 3 replicated adders (22/21/21 iterations per block,
// so the last cycle of a block uses fewer than 3 replicas). The numbers are
// chosen so that every decision path is taken: p equal to a base, a^d = 1
// (2047 is a strong pseudoprime to base 2), a^d = p-1, a hit in the squaring
// loop, composites rejected with s < 2 and after the squaring loop, a
// Carmichael number and a strong pseudoprime to bases 2..7, large primes and
// random odd numbers. Each mechanism must have occurred at least once.
module tb_prime_tester;
  localparam int W = 64;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [W-1:0] nums [$];
  int   checks_c, failures_c;
  logic fin;
  int   ev [12];

  prime_tb_core #(.W(W), .P(3), .R(3), .S(2), .NB(12), .DW(8), .AW(4)) core (
    .clk(clk), .rst(rst), .nums(nums), .checks(checks_c), .failures(failures_c),
    .finished(fin), .ev(ev));

  string names [12] = '{"p equals a base", "a^d = 1", "a^d = p-1", "squaring loop hit",
                        "composite with s < 2", "composite after squaring loop",
                        "prime verdict", "composite verdict", "Z write skipped",
                        "two products in multiplier", "FIFO row with 2 entries",
                        "standalone multiplication"};

  task automatic report(input int extra);
    int checks, failures;
    checks = checks_c; failures = failures_c + extra;
    for (int k = 0; k < 12; k++) begin
      checks++;
      $display("  %-30s %0d", names[k], ev[k]);
      if (ev[k] == 0) begin failures++; $display("FAIL mechanism never exercised: %s", names[k]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    nums = '{64'd3, 64'd5, 64'd37, 64'd41, 64'd9, 64'd15, 64'd561, 64'd2047, 64'd65537,
             64'd3215031751, 64'h1FFFFFFFFFFFFFFF, 64'd18446744073709551557,
             64'd1000000007 * 64'd998244353};
    for (int k = 0; k < 4; k++) nums.push_back({$urandom(), $urandom()} | 64'h8000000000000001);
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
