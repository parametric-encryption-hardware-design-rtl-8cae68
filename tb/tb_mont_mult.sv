// tb_mont_mult: self-checking test of the pipelined Montgomery multiplier
// over several shapes: uneven block split (W mod P != 0), an iteration
// count per block that is not a multiple of the replication factor, deep
// pipelines where several operations are in flight at once (exercising the
// triangular FIFO rows), single-stage adders, and the variant without final
// subtraction. The last shape has blocks shorter than the B+N adder, so
// its accept interval is set by the front adder instead of the blocks.
module tb_mont_mult;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  localparam int NC = 7;
  int   ck [NC], fl [NC];
  logic fin [NC];

  mult_tb_core #(.W(32), .P(1), .R(1), .FS(1), .S(1), .NOPS(30), .SEED(11)) c0 (clk, rst, ck[0], fl[0], fin[0]);
  mult_tb_core #(.W(37), .P(3), .R(2), .FS(1), .S(2), .NOPS(40), .SEED(12)) c1 (clk, rst, ck[1], fl[1], fin[1]);
  mult_tb_core #(.W(64), .P(4), .R(3), .FS(1), .S(4), .NOPS(40), .SEED(13)) c2 (clk, rst, ck[2], fl[2], fin[2]);
  mult_tb_core #(.W(67), .P(2), .R(4), .FS(0), .S(3), .NOPS(40), .SEED(14)) c3 (clk, rst, ck[3], fl[3], fin[3]);
  mult_tb_core #(.W(29), .P(6), .R(1), .FS(1), .S(1), .NOPS(40), .SEED(15)) c4 (clk, rst, ck[4], fl[4], fin[4]);
  mult_tb_core #(.W(128), .P(2), .R(5), .FS(1), .S(4), .NOPS(20), .SEED(16)) c5 (clk, rst, ck[5], fl[5], fin[5]);
  mult_tb_core #(.W(16), .P(4), .R(4), .FS(1), .S(4), .NOPS(30), .SEED(17)) c6 (clk, rst, ck[6], fl[6], fin[6]);

  int checks, failures;

  task automatic report(input int extra_fail);
    checks = 0; failures = extra_fail;
    for (int i = 0; i < NC; i++) begin checks += ck[i]; failures += fl[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst <= 0;
  end

  always @(posedge clk) begin
    bit all;
    all = 1;
    for (int i = 0; i < NC; i++) all &= fin[i];
    if (all) report(0);
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    report(1);
  end
endmodule
