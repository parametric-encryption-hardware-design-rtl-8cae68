// tb_mont_cell: checks one Montgomery pipeline block on its own.
// For accumulator input V0 = s_i + c_i and operand slice a (ITERS bits) the
// block must return S + C with (S + C) * 2^ITERS == V0 + a * B (mod N) and
// done_o must
// come ceil(ITERS/NB_REP) + 2 cycles after start_i, including when the next
// start arrives in the FINISHED cycle. Two shapes: 17 iterations with 3
// replicas (last cycle uses 2) and 40 iterations with 4 replicas.
module tb_mont_cell;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int W = 40;


  logic          st0, dn0, id0, st1, dn1, id1;
  logic [16:0]   a0;
  logic [39:0]   a1;
  logic [W-1:0]  b, n;
  logic [W:0]    bn, si, ci, so0, co0, so1, co1;

  mont_cell #(.WIDTH(W), .ITERS(17), .NB_REP(3)) c0 (
    .clk(clk), .rst(rst), .start_i(st0), .a_i(a0), .b_i(b), .n_i(n), .bn_i(bn),
    .s_i(si), .c_i(ci), .s_o(so0), .c_o(co0), .done_o(dn0), .idle_o(id0));
  mont_cell #(.WIDTH(W), .ITERS(40), .NB_REP(4)) c1 (
    .clk(clk), .rst(rst), .start_i(st1), .a_i(a1), .b_i(b), .n_i(n), .bn_i(bn),
    .s_i(si), .c_i(ci), .s_o(so1), .c_o(co1), .done_o(dn1), .idle_o(id1));

  // start and done cycles, sampled on the same edges
  longint cyc = 0, s0_at, d0_at, s1_at, d1_at;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (st0) s0_at <= cyc;
    if (dn0) d0_at <= cyc;
    if (st1) s1_at <= cyc;
    if (dn1) d1_at <= cyc;
  end

  function automatic logic [W-1:0] rnd();
    return {$urandom(), $urandom()};
  endfunction

  function automatic bit ok(logic [W:0] s, logic [W:0] c, logic [W:0] v0, logic [39:0] a, int iters);
    logic [3*W:0] lhs, rhs, nn;
    nn  = (3*W+1)'(n);
    lhs = (((3*W+1)'(s) + (3*W+1)'(c)) << iters) % nn;
    rhs = ((3*W+1)'(v0) + (3*W+1)'(a) * (3*W+1)'(b)) % nn;
    return lhs == rhs;
  endfunction

  initial begin
    st0 = 0; st1 = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int k = 0; k < 60; k++) begin
      int lat0, lat1;
      logic [39:0] ra;
      n  = rnd() | 40'h8000000001;
      b  = rnd() % n;
      bn = {1'b0, b} + {1'b0, n};
      si = (k == 0) ? '0 : (W+1)'(rnd() % n);
      ci = (k == 0) ? '0 : (W+1)'(rnd() % n);
      ra = rnd();
      a0 <= ra[16:0]; a1 <= ra;
      st0 <= 1; st1 <= 1;
      @(posedge clk);
      st0 <= 0; st1 <= 0;
      @(negedge clk);
      while (!dn0) @(negedge clk);
      @(posedge clk); #1;
      lat0 = int'(d0_at - s0_at);
      checks += 2;
      if (!ok(so0, co0, si + ci, {23'd0, ra[16:0]}, 17)) begin failures++; $display("FAIL cell 17/3 result, op %0d", k); end
      if (lat0 != 6 + 2) begin failures++; $display("FAIL cell 17/3 latency %0d", lat0); end
      while (!dn1) @(negedge clk);
      @(posedge clk); #1;
      lat1 = int'(d1_at - s1_at);
      checks += 2;
      if (!ok(so1, co1, si + ci, ra, 40)) begin failures++; $display("FAIL cell 40/4 result, op %0d", k); end
      if (lat1 != 10 + 2) begin failures++; $display("FAIL cell 40/4 latency %0d", lat1); end
      @(posedge clk);
    end
    // back-to-back: restart block 0 in its FINISHED cycle
    st0 <= 1;
    @(posedge clk);
    st0 <= 0;
    @(negedge clk);
    while (!dn0) @(negedge clk);
    st0 <= 1;                       // start seen while FINISHED
    @(posedge clk);
    st0 <= 0;
    @(negedge clk);
    while (!dn0) @(negedge clk);
    @(posedge clk); #1;
    begin
      int lat;
      lat = int'(d0_at - s0_at);
      checks++;
      if (lat != 8) begin failures++; $display("FAIL back-to-back latency %0d", lat); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
