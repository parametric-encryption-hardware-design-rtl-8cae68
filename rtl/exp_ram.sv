// exp_ram: dual-read RAM with a 1-bit address holding the two running values
// of the exponentiation loop, P (address 0) and Z (address 1).
//
// One synchronous write port and two asynchronous read ports, so both
// multiplier operands can be read in the same cycle. Written as a plain
// array so a synthesis tool may map it to a distributed or block RAM, or to
// registers. Reset is not applied to the contents; every entry is written
// before it is read.
module exp_ram #(
  parameter int WIDTH = 512
) (
  input  logic             clk,
  input  logic             we_i,
  input  logic             waddr_i,
  input  logic [WIDTH-1:0] wdata_i,
  input  logic             raddr0_i,
  output logic [WIDTH-1:0] rdata0_o,
  input  logic             raddr1_i,
  output logic [WIDTH-1:0] rdata1_o
);
  logic [WIDTH-1:0] mem [2];

  always_ff @(posedge clk) begin
    if (we_i) mem[waddr_i] <= wdata_i;
  end

  assign rdata0_o = mem[raddr0_i];
  assign rdata1_o = mem[raddr1_i];

endmodule
