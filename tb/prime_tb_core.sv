// prime_tb_core: runs the prime tester on a list of numbers and compares
// each verdict with a Rabin-Miller reference written with wide integer
// arithmetic (same bases: the first NB primes). It also counts how often
// each decision path of the tester is taken and a few datapath events, so
// the enclosing testbench can require that every mechanism was exercised.
module prime_tb_core #(
  parameter int W   = 64,
  parameter int P   = 2,
  parameter int R   = 3,
  parameter int S   = 2,
  parameter int NB  = 12,
  parameter int DW  = 8,
  parameter int AW  = 4,
  parameter bit DEFAULTS = 1'b0   // instantiate the tester with no parameter overrides
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] nums [$],
  output int           checks,
  output int           failures,
  output logic         finished,
  output int           ev [12]
);
  // ev: 0 p==a, 1 a^d==1, 2 a^d==p-1, 3 inner-loop hit, 4 composite s<2,
  //     5 composite inner loop exhausted, 6 prime verdicts, 7 composite
  //     verdicts, 8 Z write skipped (e_i = 0), 9 two products in multiplier,
  //     10 FIFO row holding 2 entries, 11 standalone multiplications
  logic         start, done, result;
  logic [W-1:0] p, nr;

  // Probes into the design, wired per instantiation branch.
  int   pr_st;
  logic pr_cmp, pr_exp_done, pr_m_done, pr_no_sub, pr_sub_fin;
  logic pr_zskip, pr_overlap, pr_mstart, pr_fill2;

  if (DEFAULTS) begin : g_def
    prime_tester dut (.clock_i(clk), .reset_i(rst), .start_i(start), .p_i(p), .nr_i(nr),
                      .done_o(done), .result_o(result));
    assign pr_st       = int'(dut.state);
    assign pr_cmp      = dut.cmp;
    assign pr_exp_done = dut.exp_done;
    assign pr_m_done   = dut.m_done;
    assign pr_no_sub   = dut.no_subtest;
    assign pr_sub_fin  = dut.subtest_finished;
    assign pr_zskip    = dut.u_exp.run && dut.u_exp.m_done && dut.u_exp.done_is_z && !dut.u_exp.ram_we;
    assign pr_overlap  = dut.u_exp.p_fly && dut.u_exp.z_fly;
    assign pr_mstart   = dut.m_start;
    if (P >= 3) begin : g_f
      assign pr_fill2 = (dut.u_exp.u_mult.g_block[2].g_next.fill == 2);
    end else begin : g_nf
      assign pr_fill2 = 1'b0;
    end
  end else begin : g_par
    prime_tester #(.WIDTH(W), .NB_PRIMES(NB), .PRIMES_DATA_WIDTH(DW), .PRIMES_ADDR_WIDTH(AW),
                   .PIPELINE_STAGES(P), .ADD_SUB_STAGES(S), .NB_REP(R)) dut (
      .clock_i(clk), .reset_i(rst), .start_i(start), .p_i(p), .nr_i(nr),
      .done_o(done), .result_o(result));
    assign pr_st       = int'(dut.state);
    assign pr_cmp      = dut.cmp;
    assign pr_exp_done = dut.exp_done;
    assign pr_m_done   = dut.m_done;
    assign pr_no_sub   = dut.no_subtest;
    assign pr_sub_fin  = dut.subtest_finished;
    assign pr_zskip    = dut.u_exp.run && dut.u_exp.m_done && dut.u_exp.done_is_z && !dut.u_exp.ram_we;
    assign pr_overlap  = dut.u_exp.p_fly && dut.u_exp.z_fly;
    assign pr_mstart   = dut.m_start;
    if (P >= 3) begin : g_f
      assign pr_fill2 = (dut.u_exp.u_mult.g_block[2].g_next.fill == 2);
    end else begin : g_nf
      assign pr_fill2 = 1'b0;
    end
  end

  function automatic logic [W-1:0] powmod(logic [W-1:0] b, logic [W-1:0] e, logic [W-1:0] n);
    logic [2*W-1:0] acc, base, nn;
    nn = {{W{1'b0}}, n};
    acc = 1;
    base = {{W{1'b0}}, b} % nn;
    for (int k = 0; k < W; k++) begin
      if (e[k]) acc = (acc * base) % nn;
      base = (base * base) % nn;
    end
    return acc[W-1:0];
  endfunction

  function automatic bit mr_ref(logic [W-1:0] n);
    logic [W-1:0] dd, x;
    logic [2*W-1:0] xx;
    int ss, found, a, cnt;
    dd = n - 1; ss = 0;
    while (!dd[0]) begin dd = dd >> 1; ss++; end
    a = 1; cnt = 0;
    while (cnt < NB) begin
      bit isp;
      a++;
      isp = 1;
      for (int q = 2; q * q <= a; q++) if (a % q == 0) isp = 0;
      if (!isp) continue;
      cnt++;
      if (n == W'(a)) return 1'b1;
      x = powmod(W'(a), dd, n);
      if (x == 1 || x == n - 1) continue;
      found = 0;
      for (int k = 1; k < ss; k++) begin
        xx = ({{W{1'b0}}, x} * {{W{1'b0}}, x}) % {{W{1'b0}}, n};
        x = xx[W-1:0];
        if (x == n - 1) begin found = 1; break; end
      end
      if (found == 0) return 1'b0;
    end
    return 1'b1;
  endfunction

  initial begin
    checks = 0; failures = 0; finished = 0; start = 0;
    for (int k = 0; k < 12; k++) ev[k] = 0;
    @(negedge rst);
    foreach (nums[k]) begin
      logic [2*W:0] big;
      bit exp_res;
      p = nums[k];
      big = '0;
      big[2*W] = 1'b1;
      big = big % {{(W+1){1'b0}}, p};
      nr = big[W-1:0];
      exp_res = mr_ref(p);
      @(posedge clk);
      start <= 1;
      @(posedge clk);
      start <= 0;
      while (!done) @(posedge clk);
      checks++;
      if (result != exp_res) begin
        failures++;
        $display("FAIL prime test of %0d: got %0d, expected %0d", p, result, exp_res);
      end
      if (result) ev[6]++; else ev[7]++;
    end
    finished = 1;
  end

  // Event counters, sampled from the design's own state.
  localparam int ST_RUN1 = 3, ST_RUN2 = 4, ST_RUN3 = 5, ST_RUN4 = 7;
  always @(posedge clk) begin
    if (!rst) begin
      if (pr_st == ST_RUN1 && pr_cmp) ev[0]++;
      if (pr_st == ST_RUN2 && pr_cmp && pr_exp_done) ev[1]++;
      if (pr_st == ST_RUN3 && pr_cmp) ev[2]++;
      if (pr_st == ST_RUN4 && pr_cmp && pr_m_done) ev[3]++;
      if (pr_st == ST_RUN3 && !pr_cmp && pr_no_sub) ev[4]++;
      if (pr_st == ST_RUN4 && !pr_cmp && pr_m_done && pr_sub_fin) ev[5]++;
      if (pr_zskip) ev[8]++;
      if (pr_overlap) ev[9]++;
      if (pr_fill2) ev[10]++;
      if (pr_mstart) ev[11]++;
    end
  end
endmodule
