// tb_pipe_adder: streams random operands, one per cycle, through a padded
// 4-stage adder (37 bits), an unpadded 4-stage subtractor (36 bits) and a
// single-stage subtractor, and checks sum, carry/borrow, side payload and the
// exact STAGES-cycle latency against wide integer arithmetic.
module tb_pipe_adder;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // DUT 0: adder, 37 bits, 4 stages (padded chunks)
  logic v0i, v0o, c0;
  logic [36:0] a0, b0, s0;
  logic [63:0] sd0i, sd0o;
  pipe_adder #(.WIDTH(37), .STAGES(4), .SUB(1'b0), .SIDE_W(64)) d0 (
    .clk(clk), .rst(rst), .valid_i(v0i), .a_i(a0), .b_i(b0), .side_i(sd0i),
    .valid_o(v0o), .sum_o(s0), .cout_o(c0), .side_o(sd0o));

  // DUT 1: subtractor, 36 bits, 4 stages (exact chunks)
  logic v1i, v1o, c1;
  logic [35:0] a1, b1, s1;
  logic [63:0] sd1i, sd1o;
  pipe_adder #(.WIDTH(36), .STAGES(4), .SUB(1'b1), .SIDE_W(64)) d1 (
    .clk(clk), .rst(rst), .valid_i(v1i), .a_i(a1), .b_i(b1), .side_i(sd1i),
    .valid_o(v1o), .sum_o(s1), .cout_o(c1), .side_o(sd1o));

  // DUT 2: subtractor, 20 bits, 1 stage
  logic v2i, v2o, c2;
  logic [19:0] a2, b2, s2;
  logic [63:0] sd2i, sd2o;
  pipe_adder #(.WIDTH(20), .STAGES(1), .SUB(1'b1), .SIDE_W(64)) d2 (
    .clk(clk), .rst(rst), .valid_i(v2i), .a_i(a2), .b_i(b2), .side_i(sd2i),
    .valid_o(v2o), .sum_o(s2), .cout_o(c2), .side_o(sd2o));

  logic [37:0] exp0 [$];
  logic [36:0] exp1 [$];
  logic [20:0] exp2 [$];
  longint t0 [$], t1 [$], t2 [$];

  initial begin
    v0i = 0; v1i = 0; v2i = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int k = 0; k < 400; k++) begin
      logic [36:0] ra, rb;
      logic [35:0] qa, qb;
      logic [19:0] ua, ub;
      ra = {$urandom(), $urandom()}; rb = {$urandom(), $urandom()};
      qa = {$urandom(), $urandom()}; qb = {$urandom(), $urandom()};
      ua = $urandom(); ub = $urandom();
      if (k == 0) begin ra = '1; rb = 37'd1; qa = '0; qb = 36'd1; ua = 20'd5; ub = 20'd5; end
      if (k % 3 == 1) qb = qa;                      // equal operands: no borrow
      a0 <= ra; b0 <= rb; v0i <= (k % 5 != 3);      // bubbles in the stream
      a1 <= qa; b1 <= qb; v1i <= 1;
      a2 <= ua; b2 <= ub; v2i <= 1;
      sd0i <= 64'(k); sd1i <= 64'(k); sd2i <= 64'(k);
      if (k % 5 != 3) begin exp0.push_back({1'b0, ra} + {1'b0, rb}); t0.push_back(cyc); k0.push_back(k); end
      exp1.push_back({1'b1, qa} - {1'b0, qb}); t1.push_back(cyc); k1.push_back(k);
      exp2.push_back({1'b1, ua} - {1'b0, ub}); t2.push_back(cyc); k2.push_back(k);
      @(posedge clk);
    end
    v0i <= 0; v1i <= 0; v2i <= 0;
    repeat (10) @(posedge clk);
    checks++;
    if (exp0.size() != 0 || exp1.size() != 0 || exp2.size() != 0) begin
      failures++; $display("FAIL: results missing");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // The value expected after k cycles was pushed when the operands were
  // driven; the DUT samples them one edge later, so latency = STAGES + 1
  // counted from the push.
  int k0 [$], k1 [$], k2 [$];
  always @(posedge clk) if (!rst) begin
    if (v0o) begin
      logic [37:0] e; longint t;
      e = exp0.pop_front(); t = t0.pop_front();
      checks++;
      if (sd0o != 64'(k0.pop_front())) begin failures++; $display("FAIL side payload 0"); end
      if ({c0, s0} != e || cyc - t != 5) begin failures++; $display("FAIL add: %h got %h, latency %0d", e, {c0, s0}, cyc - t); end
    end
    if (v1o) begin
      logic [36:0] e; longint t;
      e = exp1.pop_front(); t = t1.pop_front();
      checks++;
      if (sd1o != 64'(k1.pop_front())) begin failures++; $display("FAIL side payload 1"); end
      if ({c1, s1} != e || cyc - t != 5) begin failures++; $display("FAIL sub: %h got %h, latency %0d", e, {c1, s1}, cyc - t); end
    end
    if (v2o) begin
      logic [20:0] e; longint t;
      e = exp2.pop_front(); t = t2.pop_front();
      checks++;
      if (sd2o != 64'(k2.pop_front())) begin failures++; $display("FAIL side payload 2"); end
      if ({c2, s2} != e || cyc - t != 2) begin failures++; $display("FAIL sub1: %h got %h, latency %0d", e, {c2, s2}, cyc - t); end
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
