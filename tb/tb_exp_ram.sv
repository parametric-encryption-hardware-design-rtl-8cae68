// tb_exp_ram: writes random values to both addresses and checks that the
// two read ports return the last value written to the addresses they name,
// including a write and reads of the other entry in the same cycle.
module tb_exp_ram;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        we, wa;
  logic [71:0] wd, r0, r1, model [2];

  exp_ram #(.WIDTH(72)) dut (
    .clk(clk), .we_i(we), .waddr_i(wa), .wdata_i(wd),
    .raddr0_i(1'b0), .rdata0_o(r0), .raddr1_i(1'b1), .rdata1_o(r1));

  initial begin
    we = 1; wa = 0; wd = 72'h1; @(posedge clk); #1; model[0] = 72'h1;
    we = 1; wa = 1; wd = 72'h2; @(posedge clk); #1; model[1] = 72'h2;
    for (int k = 0; k < 500; k++) begin
      we = $urandom() % 2; wa = $urandom() % 2; wd = {$urandom(), $urandom(), $urandom()};
      @(posedge clk); #1;
      if (we) model[wa] = wd;
      checks += 2;
      if (r0 != model[0]) begin failures++; $display("FAIL P entry %h, model %h", r0, model[0]); end
      if (r1 != model[1]) begin failures++; $display("FAIL Z entry %h, model %h", r1, model[1]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
