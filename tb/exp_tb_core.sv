// exp_tb_core: runs NOPS random exponentiations on one mont_exp
// configuration and checks each result against square-and-multiply done with
// wide integer arithmetic. Also counts the multiplications issued (2W+2
// expected: W squarings, W+2 multiplications into Z) and reports the cycle
// count of the first exponentiation.
module exp_tb_core #(
  parameter int W    = 32,
  parameter int P    = 2,
  parameter int R    = 2,
  parameter bit FS   = 1'b1,
  parameter int S    = 2,
  parameter int NOPS = 4,
  parameter int SEED = 1
) (
  input  logic    clk,
  input  logic    rst,
  output int      checks,
  output int      failures,
  output logic    finished,
  output longint  first_cycles,
  output int      zp_overlap   // cycles with two products in the multiplier
);
  localparam int MW = FS ? W : W + 3;

  logic         start, done;
  logic [W-1:0] x, e, m, nr, res;
  logic         mready, mdone;
  logic [W-1:0] mp;

  mont_exp #(.WIDTH(W), .PIPELINE_STAGES(P), .NB_REP(R), .FINAL_SUB(FS), .ADD_SUB_STAGES(S)) dut (
    .clock_i(clk), .reset_i(rst), .start_i(start), .x_i(x), .e_i(e), .m_i(m), .nr_i(nr),
    .done_o(done), .res_o(res),
    .ext_start_i(1'b0), .ext_x_i('0), .ext_y_i('0),
    .mult_ready_o(mready), .mult_done_o(mdone), .mult_p_o(mp));

  function automatic logic [W-1:0] rnd();
    logic [W+31:0] v;
    v = '0;
    for (int i = 0; i < W; i += 32) v[i +: 32] = $urandom();
    return v[W-1:0];
  endfunction

  function automatic logic [W-1:0] modexp(logic [W-1:0] b, logic [W-1:0] ex, logic [W-1:0] n);
    logic [2*W-1:0] acc, base, nn;
    nn = {{W{1'b0}}, n};
    acc = 1;
    base = {{W{1'b0}}, b} % nn;
    for (int i = 0; i < W; i++) begin
      if (ex[i]) acc = (acc * base) % nn;
      base = (base * base) % nn;
    end
    return acc[W-1:0];
  endfunction

  int mults, op;
  longint cyc, t0;

  always_ff @(posedge clk) cyc <= rst ? 0 : cyc + 1;

  initial begin
    logic [2*MW:0] big;
    checks = 0; failures = 0; finished = 0; first_cycles = 0; zp_overlap = 0;
    start = 0; mults = 0;
    void'($urandom(SEED));
    @(negedge rst);
    for (op = 0; op < NOPS; op++) begin
      m = {1'b1, rnd()[W-2:1], 1'b1};
      x = rnd() % m;
      e = rnd();
      if (op == 0) e = '0;                     // x^0 = 1
      if (op == 1) e = '1;
      if (op == 2) x = m - 1;
      big = '0;
      big[2*MW] = 1'b1;
      big = big % {{(MW+1){1'b0}}, {(MW-W){1'b0}}, m};
      nr = big[W-1:0];
      @(posedge clk);
      start <= 1; mults = 0; t0 = cyc;
      @(posedge clk);
      start <= 0;
      while (!done) @(posedge clk);
      if (op == 0) first_cycles = cyc - t0;
      checks++;
      if (res != modexp(x, e, m)) begin
        failures++;
        $display("FAIL exp W=%0d P=%0d R=%0d FS=%0d: %h^%h mod %h = %h, got %h", W, P, R, FS, x, e, m, modexp(x, e, m), res);
      end
      checks++;
      if (mults != 2 * W + 2) begin
        failures++;
        $display("FAIL exp W=%0d: %0d multiplications, expected %0d", W, mults, 2 * W + 2);
      end
    end
    finished = 1;
  end

  always @(posedge clk) begin
    if (dut.m_start) mults++;
    if (dut.p_fly && dut.z_fly) zp_overlap++;
  end
endmodule
