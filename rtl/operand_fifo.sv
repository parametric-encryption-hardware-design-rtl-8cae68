// operand_fifo: one row of the triangular register array of the pipelined
// Montgomery multiplier.
//
// A pipeline block other than the first still needs the operands (its slice
// of A, B, N and B + N) of every multiplication that has left the first
// block but not yet left this one. The row keeps them as a FIFO of DEPTH
// registers with the oldest entry always in register 0, plus a pointer to the
// first empty slot. A pop shifts every register down by one (register i takes
// register i+1) and decrements the pointer; a push writes the register the
// pointer designates and increments it; both may happen in the same cycle.
// Rows further down the pipeline have more entries in flight, hence DEPTH
// grows with the block index and the array is triangular.
//
// Interface: push_i/din_i and pop_i act on the rising edge; dout_o is the
// head (register 0), valid while count_o > 0. Reset (synchronous, active
// high) empties the row. Pushing into a full row or popping an empty one is
// a usage error and is flagged by assertions.
module operand_fifo #(
  parameter int W     = 8,
  parameter int DEPTH = 2
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       push_i,
  input  logic [W-1:0]               din_i,
  input  logic                       pop_i,
  output logic [W-1:0]               dout_o,
  output logic [$clog2(DEPTH+1)-1:0] count_o
);
  localparam int PTRW = $clog2(DEPTH + 1);

  logic [W-1:0]    mem [DEPTH];
  logic [PTRW-1:0] ptr;   // first empty slot

  always_ff @(posedge clk) begin
    if (rst) begin
      ptr <= '0;
    end else begin
      ptr <= ptr + PTRW'(push_i) - PTRW'(pop_i);
    end
  end

  always_ff @(posedge clk) begin
    logic [PTRW-1:0] wptr;
    wptr = pop_i ? ptr - 1'b1 : ptr;
    for (int i = 0; i < DEPTH; i++) begin
      if (push_i && (PTRW'(i) == wptr)) mem[i] <= din_i;
      else if (pop_i) mem[i] <= (i + 1 < DEPTH) ? mem[(i + 1 < DEPTH) ? i + 1 : i] : mem[i];
    end
  end

  assign dout_o  = mem[0];
  assign count_o = ptr;

  // Usage rules of the row.
  always_ff @(posedge clk) begin
    if (!rst) begin
      assert (!(push_i && !pop_i && ptr == PTRW'(DEPTH)))
        else $error("operand_fifo: push into a full row");
      assert (!(pop_i && ptr == '0))
        else $error("operand_fifo: pop from an empty row");
    end
  end

endmodule
