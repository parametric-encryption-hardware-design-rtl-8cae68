// tb_operand_fifo: random push/pop traffic (including simultaneous push and
// pop, and runs that fill the row) on a 4-entry row, compared with a queue
// model: head value, fill pointer and order of departure.
module tb_operand_fifo;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        push, pop;
  logic [15:0] din, dout;
  logic [2:0]  cnt;
  logic [15:0] model [$];
  int          full_seen = 0, both_seen = 0;

  operand_fifo #(.W(16), .DEPTH(4)) dut (
    .clk(clk), .rst(rst), .push_i(push), .din_i(din), .pop_i(pop), .dout_o(dout), .count_o(cnt));

  initial begin
    push = 0; pop = 0; din = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int k = 0; k < 2000; k++) begin
      bit pu, po;
      @(negedge clk);
      // compare state before this cycle's operation
      checks++;
      if (cnt != 3'(model.size())) begin failures++; $display("FAIL count %0d, model %0d", cnt, model.size()); end
      if (model.size() > 0) begin
        checks++;
        if (dout != model[0]) begin failures++; $display("FAIL head %h, model %h", dout, model[0]); end
      end
      pu = ($urandom() % 100) < ((k / 200) % 2 ? 70 : 40);
      po = ($urandom() % 100) < ((k / 200) % 2 ? 40 : 70);
      if (model.size() == 4) pu = pu && po;
      if (model.size() == 0) po = 0;
      push = pu; pop = po; din = 16'($urandom());
      if (pu && po) both_seen++;
      if (model.size() == 4) full_seen++;
      @(posedge clk);
      #1;
      if (po) void'(model.pop_front());
      if (pu) model.push_back(din);
    end
    checks += 2;
    if (full_seen == 0) begin failures++; $display("FAIL row never full"); end
    if (both_seen == 0) begin failures++; $display("FAIL no simultaneous push and pop"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
