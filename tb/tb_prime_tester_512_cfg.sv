// tb_prime_tester_512_cfg: the prime tester at 512 bits in the six multiplier
// shapes whose FPGA timings were published for the original design
// (pipeline blocks p = 1 or 2, replicated adders r = 1, 2 or 4, adder
// pipeline depth 4). All six test the prime 2^512 - 569 against one base
// (NB_PRIMES = 1, base 2) from the same start pulse; each must report it
// prime. The cycle counts from start to done are then compared in order:
// the published times, converted to cycles at their clock rates, rank the
// shapes  p1r1 > {p1r2, p2r1} > {p1r4, p2r2} > p2r4,  and the same ranking
// must hold here. Absolute counts are printed next to the published ones,
// which are for a full test with an unstated number of bases, so only the
// ranking is checked.
module tb_prime_tester_512_cfg;
  localparam int W  = 512;
  localparam int NC = 6;
  localparam int PC [NC] = '{1, 1, 1, 2, 2, 2};
  localparam int RC [NC] = '{1, 2, 4, 1, 2, 4};
  // published time (us) x clock (MHz), in that order
  localparam longint PUB [NC] = '{2058000, 1058340, 864880, 1049750, 839800, 407550};

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic         start;
  logic [W-1:0] p, nr;
  logic         done [NC], result [NC];
  longint       cyc, t0, took [NC];
  logic         seen [NC];

  for (genvar c = 0; c < NC; c++) begin : g_cfg
    prime_tester #(.WIDTH(W), .NB_PRIMES(1), .PRIMES_DATA_WIDTH(8), .PRIMES_ADDR_WIDTH(4),
                   .PIPELINE_STAGES(PC[c]), .ADD_SUB_STAGES(4), .NB_REP(RC[c])) dut (
      .clock_i(clk), .reset_i(rst), .start_i(start), .p_i(p), .nr_i(nr),
      .done_o(done[c]), .result_o(result[c]));
  end

  int checks = 0, failures = 0;
  bit reported = 0;

  task automatic report(input int extra_fail);
    if (reported) return;
    reported = 1;
    failures += extra_fail;
    for (int c = 0; c < NC; c++)
      $display("p=%0d r=%0d: %0d cycles for one base (published full test: about %0d cycles)",
               PC[c], RC[c], took[c], PUB[c]);
    checks += 4;
    if (!(took[0] > took[1] && took[0] > took[3])) begin
      failures++; $display("FAIL: p=1 r=1 is not the slowest of the first tier");
    end
    if (!(took[1] > took[2] && took[1] > took[4] && took[3] > took[2] && took[3] > took[4])) begin
      failures++; $display("FAIL: p1r2/p2r1 not slower than p1r4/p2r2");
    end
    if (!(took[2] > took[5] && took[4] > took[5])) begin
      failures++; $display("FAIL: p=2 r=4 is not the fastest");
    end
    // the two middle tiers are each within 40 % of one another
    if (took[1] * 10 > took[3] * 14 || took[3] * 10 > took[1] * 14 ||
        took[2] * 10 > took[4] * 14 || took[4] * 10 > took[2] * 14) begin
      failures++; $display("FAIL: shapes published as equally fast differ by more than 40 %%");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  always_ff @(posedge clk) cyc <= rst ? 0 : cyc + 1;

  always @(posedge clk) begin
    if (!rst) begin
      bit all;
      all = 1;
      for (int c = 0; c < NC; c++) begin
        if (done[c] && !seen[c]) begin
          seen[c] = 1;
          took[c] = cyc - t0;
          checks++;
          if (result[c] !== 1'b1) begin
            failures++;
            $display("FAIL: p=%0d r=%0d reported the prime as composite", PC[c], RC[c]);
          end
        end
        all &= seen[c];
      end
      if (all) report(0);
    end
  end

  initial begin
    logic [2*W:0] big;
    start = 0;
    for (int c = 0; c < NC; c++) begin seen[c] = 0; took[c] = 0; end
    p = '1;
    p = p - W'(568);                 // 2^512 - 569
    big = '0;
    big[2*W] = 1'b1;
    big = big % {{(W+1){1'b0}}, p};
    nr = big[W-1:0];
    repeat (4) @(posedge clk);
    rst <= 0;
    repeat (2) @(posedge clk);
    start <= 1;
    t0 = cyc + 1;
    @(posedge clk);
    start <= 0;
  end

  initial begin
    repeat (1500000) @(posedge clk);
    $display("watchdog expired");
    report(1);
  end
endmodule
