// mult_tb_core: drives one mont_mult configuration with NOPS random
// multiplications issued back to back and checks every result.
//
// Reference: r is correct when r < N (r < 2N without final subtraction) and
// r * 2^W mod N == A * B mod N, evaluated with wide integer arithmetic. The
// latency of the first operation is checked against the block-split formula
//   L = (W mod P)(ceil(ceil(W/P)/R)+2) + (P - W mod P)(ceil(floor(W/P)/R)+2) + P-1
// plus the front (S+1) and back-end (S or 2S, +1) adder cycles. Operations
// are issued whenever ready is high; once the pipeline is full they must be
// accepted every N = ceil(ceil(W/P)/R) + 2 cycles, or every S + 2 cycles
// when the B+N adder is the slower part (the first interval is always S + 2).
module mult_tb_core #(
  parameter int W    = 32,
  parameter int P    = 2,
  parameter int R    = 2,
  parameter bit FS   = 1'b1,
  parameter int S    = 2,
  parameter int NOPS = 20,
  parameter int SEED = 1
) (
  input  logic clk,
  input  logic rst,
  output int   checks,
  output int   failures,
  output logic finished
);
  logic         start, ready, done;
  logic [W-1:0] x, y, m, p;

  mont_mult #(.WIDTH(W), .NB_BLOCKS(P), .NB_REP(R), .FINAL_SUB(FS), .ADD_SUB_STAGES(S)) dut (
    .clock_i(clk), .reset_i(rst), .start_i(start), .x_i(x), .y_i(y), .m_i(m),
    .ready_o(ready), .done_o(done), .p_o(p));

  function automatic logic [W-1:0] rnd();
    logic [W+31:0] v;
    v = '0;
    for (int i = 0; i < W; i += 32) v[i +: 32] = $urandom();
    return v[W-1:0];
  endfunction

  function automatic int ceil_div(int a, int b);
    return (a + b - 1) / b;
  endfunction

  localparam int LCORE = (W % P) * (ceil_div(ceil_div(W, P), R) + 2)
                       + (P - W % P) * (ceil_div(W / P, R) + 2) + P - 1;
  localparam int LTOT  = S + 1 + LCORE + S * (FS ? 2 : 1) + 1;
  localparam int NMULT  = ceil_div(ceil_div(W, P), R) + 2;
  localparam int PERIOD = (NMULT > S + 2) ? NMULT : S + 2;

  logic [W-1:0] qa[$], qb[$], qn[$];
  longint unsigned t_issue[$];
  longint unsigned cyc, last_issue;
  int issued, received;

  initial begin
    checks = 0; failures = 0; finished = 0;
    x = '0; y = '0; m = '0;
    issued = 0; received = 0; last_issue = 0;
    void'($urandom(SEED));
  end

  always_ff @(posedge clk) cyc <= rst ? 0 : cyc + 1;

  // Issue: one modulus per run; start is raised whenever the multiplier is
  // ready and operands remain, so the accept interval is the DUT's own.
  assign start = !rst && ready && (issued < NOPS);

  function automatic logic [2*W-1:0] next_operands(int idx);
    logic [W-1:0] a, b;
    a = rnd() % m;
    b = rnd() % m;
    if (idx == 0) a = m - 1;                 // corner operands
    if (idx == 1) begin a = '0; b = m - 1; end
    if (!FS && idx > 1) a = a | (m >> 1);    // larger operands without final subtraction
    return {a, b};
  endfunction

  always @(posedge clk) begin
    if (rst) begin
      m = {1'b1, rnd()[W-2:1], 1'b1};
      {x, y} <= next_operands(0);
    end else if (start) begin
      if (issued > 0) begin
        checks++;
        if (cyc - last_issue != longint'((issued == 1) ? S + 2 : PERIOD)) begin
          failures++;
          $display("FAIL W=%0d P=%0d R=%0d: accept interval %0d, expected %0d", W, P, R, cyc - last_issue,
                   (issued == 1) ? S + 2 : PERIOD);
        end
      end
      last_issue = cyc;
      qa.push_back(x); qb.push_back(y); qn.push_back(m);
      t_issue.push_back(cyc);
      issued++;
      {x, y} <= next_operands(issued);
    end
  end

  always @(posedge clk) begin
    if (!rst && done) begin
      logic [3*W:0] lhs, rhs, a, b, n;
      a = {{(2*W+1){1'b0}}, qa.pop_front()};
      b = {{(2*W+1){1'b0}}, qb.pop_front()};
      n = {{(2*W+1){1'b0}}, qn.pop_front()};
      lhs = ({{(2*W+1){1'b0}}, p} << W) % n;
      rhs = (a * b) % n;
      checks++;
      if (lhs != rhs || (FS ? ({{(2*W+1){1'b0}}, p} >= n) : ({{(2*W+1){1'b0}}, p} >= 2 * n))) begin
        failures++;
        $display("FAIL W=%0d P=%0d R=%0d FS=%0d op %0d: p=%h a=%h b=%h n=%h", W, P, R, FS, received, p, a[W-1:0], b[W-1:0], n[W-1:0]);
      end
      if (received == 0) begin
        checks++;
        if (cyc - t_issue[0] != longint'(LTOT)) begin
          failures++;
          $display("FAIL W=%0d P=%0d R=%0d: latency %0d, expected %0d", W, P, R, cyc - t_issue[0], LTOT);
        end
      end
      void'(t_issue.pop_front());
      received++;
      if (received == NOPS) finished <= 1;
    end
  end
endmodule
