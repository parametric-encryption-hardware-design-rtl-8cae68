// mont_cell: one pipeline block of the Montgomery multiplier.
//
// The block performs ITERS consecutive iterations of the carry-save
// Montgomery loop on a redundant accumulator (S, C), using the ITERS bits of
// operand A that belong to it. For every iteration the I-selector picks the
// addend from a_i and the parities of S, C and B:
//   a_i = 0, s0 == c0          -> 0
//   a_i = 0, s0 != c0          -> N
//   a_i = 1, s0 ^ c0 ^ b0 == 0 -> B
//   a_i = 1, s0 ^ c0 ^ b0 == 1 -> B + N
// and a carry-save adder forms S + C + I, after which S and C are halved.
// NB_REP selector/CSA pairs are chained in series, so one clock cycle
// performs NB_REP dependent iterations; the block runs ceil(ITERS/NB_REP)
// cycles and, in the last one, takes its result from the replica that
// completes iteration ITERS (ITERS mod NB_REP may be non-zero).
//
// FSM: IDLE -> LOADING (one cycle: S/C loaded from s_i/c_i, counter cleared)
// -> RUNNING (ceil(ITERS/NB_REP) cycles) -> FINISHED (done_o high one cycle,
// s_o/c_o valid) -> IDLE, or straight back to LOADING when start_i is high in
// FINISHED. So done_o comes ceil(ITERS/NB_REP)+2 cycles after start_i, and a
// new start can be accepted every ceil(ITERS/NB_REP)+2 cycles.
// a_i, b_i, n_i and bn_i (= B + N, precomputed outside) must stay stable
// from the start pulse until done_o. Accepting start in FINISHED (instead of
// requiring start to drop first) is this implementation's choice; it lets a
// block take back-to-back work from its predecessor. Reset is synchronous,
// active high.
module mont_cell
  import mont_pkg::*;
#(
  parameter int WIDTH  = 512,   // operand width n
  parameter int ITERS  = 256,   // iterations performed by this block
  parameter int NB_REP = 4      // replicated carry-save adders (r)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start_i,
  input  logic [ITERS-1:0] a_i,    // this block's slice of operand A
  input  logic [WIDTH-1:0] b_i,
  input  logic [WIDTH-1:0] n_i,
  input  logic [WIDTH:0]   bn_i,   // B + N
  input  logic [WIDTH:0]   s_i,    // accumulator from the previous block
  input  logic [WIDTH:0]   c_i,
  output logic [WIDTH:0]   s_o,
  output logic [WIDTH:0]   c_o,
  output logic             done_o,
  output logic             idle_o  // IDLE or FINISHED: a start is accepted
);
  localparam int NCYC = run_cycles(ITERS, NB_REP);
  localparam int LAST = ITERS - (NCYC - 1) * NB_REP;  // replicas used in the last cycle
  localparam int CNTW = cnt_width(NCYC);
  localparam int AW   = NCYC * NB_REP;

  cell_state_e       state;
  logic [CNTW-1:0]   cnt;
  logic [WIDTH:0]    s_q, c_q;
  logic [AW-1:0]     a_pad;
  logic [WIDTH:0]    s_chain [NB_REP+1];
  logic [WIDTH:0]    c_chain [NB_REP+1];
  logic              last_cycle;

  always_comb begin
    a_pad = '0;
    a_pad[ITERS-1:0] = a_i;
  end

  // NB_REP selector + CSA + shift stages in series.
  always_comb begin
    s_chain[0] = s_q;
    c_chain[0] = c_q;
    for (int j = 0; j < NB_REP; j++) begin
      logic           abit;
      logic [WIDTH:0] isel, sum, carry;
      abit = a_pad[int'(cnt) * NB_REP + j];
      unique case ({abit, s_chain[j][0] ^ c_chain[j][0] ^ (abit & b_i[0])})
        2'b00:   isel = '0;
        2'b01:   isel = {1'b0, n_i};
        2'b10:   isel = {1'b0, b_i};
        default: isel = bn_i;
      endcase
      sum   = s_chain[j] ^ c_chain[j] ^ isel;
      carry = (s_chain[j] & c_chain[j]) | (s_chain[j] & isel) | (c_chain[j] & isel);
      // S + C + I = sum + 2*carry; sum is even by the choice of I, so
      // halving gives sum>>1 and carry.
      s_chain[j+1] = sum >> 1;
      c_chain[j+1] = carry;
    end
  end

  assign last_cycle = (cnt == CNTW'(NCYC - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= CELL_IDLE;
      cnt   <= '0;
    end else begin
      unique case (state)
        CELL_IDLE:     if (start_i) state <= CELL_LOADING;
        CELL_LOADING: begin
          state <= CELL_RUNNING;
          cnt   <= '0;
        end
        CELL_RUNNING: begin
          cnt <= cnt + 1'b1;
          if (last_cycle) state <= CELL_FINISHED;
        end
        CELL_FINISHED: state <= start_i ? CELL_LOADING : CELL_IDLE;
        default:       state <= CELL_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state == CELL_LOADING) begin
      s_q <= s_i;
      c_q <= c_i;
    end else if (state == CELL_RUNNING) begin
      if (last_cycle) begin
        s_q <= s_chain[LAST];
        c_q <= c_chain[LAST];
      end else begin
        s_q <= s_chain[NB_REP];
        c_q <= c_chain[NB_REP];
      end
    end
  end

  assign s_o    = s_q;
  assign c_o    = c_q;
  assign done_o = (state == CELL_FINISHED);
  assign idle_o = (state == CELL_IDLE) || (state == CELL_FINISHED);

endmodule
