// pipe_adder: adder/subtractor cut into STAGES carry-registered pipeline
// stages.
//
// Long carry chains on the operand widths used for public-key arithmetic
// limit the clock, so the operands are split into STAGES chunks of
// ceil(WIDTH/STAGES) bits. Stage k adds chunk k using the carry registered by
// stage k-1, and carries the untouched upper chunks along. The unit accepts a
// new operation every cycle. With SUB=1 it computes a - b as a + ~b + 1; the
// carry out is then 1 when a >= b (no borrow).
//
// Interface: valid_i/a_i/b_i/side_i are sampled on each rising edge; the
// result appears on sum_o/cout_o with valid_o exactly STAGES cycles later.
// side_i is an arbitrary payload delayed alongside the operation (used to
// carry the modulus or the unreduced value next to a result).
// Reset (synchronous, active high) clears only the valid flags.
// The chunked carry pipeline follows the design; the side payload is this
// implementation's way of keeping operands aligned with the pipeline.
module pipe_adder #(
  parameter int WIDTH  = 513,
  parameter int STAGES = 4,
  parameter bit SUB    = 1'b0,
  parameter int SIDE_W = 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              valid_i,
  input  logic [WIDTH-1:0]  a_i,
  input  logic [WIDTH-1:0]  b_i,
  input  logic [SIDE_W-1:0] side_i,
  output logic              valid_o,
  output logic [WIDTH-1:0]  sum_o,
  output logic              cout_o,
  output logic [SIDE_W-1:0] side_o
);
  localparam int CW = (WIDTH + STAGES - 1) / STAGES;
  localparam int PW = CW * STAGES;

  logic [PW-1:0]     a_q    [STAGES];
  logic [PW-1:0]     b_q    [STAGES];
  logic [PW-1:0]     s_q    [STAGES];
  logic              c_q    [STAGES];
  logic              v_q    [STAGES];
  logic [SIDE_W-1:0] side_q [STAGES];

  logic [PW-1:0] a_in, b_in;

  always_comb begin
    a_in = '0;
    b_in = '0;
    a_in[WIDTH-1:0] = a_i;
    b_in[WIDTH-1:0] = SUB ? ~b_i : b_i;
  end

  always_ff @(posedge clk) begin
    for (int st = 0; st < STAGES; st++) begin
      logic [PW-1:0] sa, sb, ss;
      logic          sc;
      logic [CW:0]   part;
      if (st == 0) begin
        sa = a_in; sb = b_in; ss = '0; sc = SUB;
        side_q[0] <= side_i;
      end else begin
        sa = a_q[st-1]; sb = b_q[st-1]; ss = s_q[st-1]; sc = c_q[st-1];
        side_q[st] <= side_q[st-1];
      end
      part = {1'b0, sa[st*CW +: CW]} + {1'b0, sb[st*CW +: CW]} + {{CW{1'b0}}, sc};
      ss[st*CW +: CW] = part[CW-1:0];
      a_q[st] <= sa;
      b_q[st] <= sb;
      s_q[st] <= ss;
      c_q[st] <= part[CW];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int st = 0; st < STAGES; st++) v_q[st] <= 1'b0;
    end else begin
      v_q[0] <= valid_i;
      for (int st = 1; st < STAGES; st++) v_q[st] <= v_q[st-1];
    end
  end

  // Carry out of bit WIDTH-1. Padding bits of both operands are zero, so
  // when the chunks pad the width the carry lands in sum bit WIDTH; without
  // padding it is the carry registered by the last stage.
  logic [PW:0] full_sum;
  always_comb begin
    full_sum = {c_q[STAGES-1], s_q[STAGES-1]};
    valid_o  = v_q[STAGES-1];
    sum_o    = full_sum[WIDTH-1:0];
    cout_o   = full_sum[WIDTH];
    side_o   = side_q[STAGES-1];
  end

endmodule
