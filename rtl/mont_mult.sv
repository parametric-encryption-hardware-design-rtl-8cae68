// mont_mult: pipelined, replicated Montgomery modular multiplier.
//
// Computes p_o = x_i * y_i * 2^-WIDTH mod m_i for an odd modulus m_i, using
// the carry-save Montgomery loop split over NB_BLOCKS pipeline blocks
// (mont_cell), each holding NB_REP carry-save adders in series. Block k
// performs floor(WIDTH/NB_BLOCKS) iterations, plus one for the first
// (WIDTH mod NB_BLOCKS) blocks, on its own slice of x_i. Requires
// NB_BLOCKS * NB_REP <= WIDTH.
//
// Data path, in operation order:
//  1. front: B + N is computed by a pipelined adder (ADD_SUB_STAGES stages);
//     the operands then wait in a pending register. Block 0 takes them (its
//     input register is loaded and it is started) in the first cycle it is
//     idle or finishing, so while block 0 works on one operation the next
//     one is already in the front.
//  2. blocks: block k+1 starts one cycle after the done pulse of block k,
//     which also loads the inter-block S/C register feeding block k+1.
//  3. triangular register array: when block 0 finishes an operation, the
//     A slice of each later block and {B, N, B+N} are pushed, at once, into
//     that block's operand_fifo row; block k pops its row when it finishes.
//     Row k holds k+1 entries: because each block starts one cycle after
//     the done of the previous one, an operation drifts one cycle further
//     behind the next per block, so row k can hold k+1 operations. For the
//     same reason B, N and B+N cannot be forwarded in a single register per
//     block boundary: that register would be overwritten by the next
//     operation one cycle before the block reading it finishes.
//  4. back end: S + C by a pipelined adder; with FINAL_SUB=1 a pipelined
//     subtractor computes P - N and its borrow (the comparator) selects P or
//     P - N. With FINAL_SUB=0 the result is left in [0, 2N) and the caller
//     uses a multiplier 3 bits wider than its operands.
//
// Timing (S = ADD_SUB_STAGES, L = mont_pkg::mult_core_latency):
//  done_o pulses  S + 1 + L + S*(1+FINAL_SUB) + 1  cycles after start_i
//  when the pipeline is not busy. ready_o is high when the front is empty;
//  it falls for the cycle of the start and rises again once block 0 has
//  taken the operation. With a caller that starts whenever ready_o is high,
//  operations are accepted every max(ceil(iters0/NB_REP) + 2, S + 2) cycles,
//  i.e. at the block rate N = ceil(ceil(WIDTH/NB_BLOCKS)/NB_REP) + 2 unless
//  the blocks are shorter than the front adder. Results leave in issue
//  order. start_i must be a single-cycle pulse taken while ready_o is high.
// The block split, start chaining, FIFO array and final add/subtract follow
// the design; the pending register in the front, keeping B, N and B+N in
// the array rows (k+1 entries each) and the exact adder cycle counts are
// this implementation's choices.
// Reset is synchronous, active high, and clears done_o and p_o.
// Lint reports some signals as partly unused, on purpose: the row fill
// count of each operand_fifo is not needed by the control (assertions inside the FIFO
// guard it); the carry out of S + C is always 0 because S + C < 2N; and bit
// WIDTH of P and of P - N is dropped once the borrow has made its choice.
module mont_mult
  import mont_pkg::*;
#(
  parameter int WIDTH          = 512,
  parameter int NB_BLOCKS      = 2,
  parameter int NB_REP         = 4,
  parameter bit FINAL_SUB      = 1'b1,
  parameter int ADD_SUB_STAGES = 4
) (
  input  logic             clock_i,
  input  logic             reset_i,
  input  logic             start_i,
  input  logic [WIDTH-1:0] x_i,
  input  logic [WIDTH-1:0] y_i,
  input  logic [WIDTH-1:0] m_i,
  output logic             ready_o,
  output logic             done_o,
  output logic [WIDTH-1:0] p_o
);
  localparam int P  = NB_BLOCKS;
  localparam int BW = WIDTH + WIDTH + (WIDTH + 1);   // {B, N, B+N}
  localparam int OW = WIDTH + BW;                     // {A, B, N, B+N}

  // ------------------------------------------------------------------
  // Front: B + N precompute, input register.
  logic             bn_valid;
  logic [WIDTH:0]   bn_sum;
  logic [3*WIDTH-1:0] bn_side;
  logic             bn_cout;

  pipe_adder #(.WIDTH(WIDTH), .STAGES(ADD_SUB_STAGES), .SUB(1'b0), .SIDE_W(3*WIDTH)) u_bn_add (
    .clk(clock_i), .rst(reset_i), .valid_i(start_i && ready_o),
    .a_i(y_i), .b_i(m_i), .side_i({x_i, y_i, m_i}),
    .valid_o(bn_valid), .sum_o(bn_sum[WIDTH-1:0]), .cout_o(bn_cout), .side_o(bn_side));
  assign bn_sum[WIDTH] = bn_cout;

  logic [OW-1:0] pend_q;     // {A, B, N, B+N} of the next operation for block 0
  logic          pend_v;
  logic [OW-1:0] in_q;       // {A, B, N, B+N} of the operation in block 0
  logic          front_busy; // an operation is in the B+N adder or pending
  logic          start0;
  logic          idle0;

  // Block 0 takes the pending operation as soon as it is idle or finishing;
  // in_q is reloaded on the same edge that pushes its old contents into the
  // triangular array (done of block 0).
  assign start0 = pend_v && idle0;

  always_ff @(posedge clock_i) begin
    if (bn_valid) pend_q <= {bn_side, bn_sum};
    if (start0)   in_q   <= pend_q;
  end

  always_ff @(posedge clock_i) begin
    if (reset_i) begin
      front_busy <= 1'b0;
      pend_v     <= 1'b0;
    end else begin
      if (bn_valid)    pend_v <= 1'b1;
      else if (start0) pend_v <= 1'b0;
      if (start_i && ready_o) front_busy <= 1'b1;
      else if (start0)        front_busy <= 1'b0;
    end
  end

  // ------------------------------------------------------------------
  // Pipeline blocks, inter-block registers and the triangular array.
  // Block 0 reads its operands from the input register; block k >= 1 reads
  // its slice of A and {B, N, B+N} from the head of its row of the
  // triangular array.
  logic [WIDTH:0]  s_out [P];
  logic [WIDTH:0]  c_out [P];
  logic [WIDTH:0]  s_ib  [P];   // inter-block S/C register feeding block k (k >= 1)
  logic [WIDTH:0]  c_ib  [P];
  logic            done  [P];
  logic            idle  [P];
  logic            start [P];
  logic [BW-1:0]   bnq   [P];   // {B, N, B+N} seen by block k

  logic [WIDTH-1:0] a0;
  assign {a0, bnq[0]} = in_q;
  assign start[0] = start0;
  assign idle0    = idle[0];

  for (genvar k = 0; k < P; k++) begin : g_block
    localparam int ITK = block_iters(WIDTH, P, k);
    localparam int OFK = block_offset(WIDTH, P, k);

    logic [ITK-1:0]   ka;       // this block's slice of A
    logic [WIDTH-1:0] kb, kn;
    logic [WIDTH:0]   kbn;
    assign {kb, kn, kbn} = bnq[k];

    if (k == 0) begin : g_first
      assign ka = a0[OFK +: ITK];
      mont_cell #(.WIDTH(WIDTH), .ITERS(ITK), .NB_REP(NB_REP)) u_cell (
        .clk(clock_i), .rst(reset_i), .start_i(start[k]),
        .a_i(ka), .b_i(kb), .n_i(kn), .bn_i(kbn),
        .s_i('0), .c_i('0), .s_o(s_out[k]), .c_o(c_out[k]),
        .done_o(done[k]), .idle_o(idle[k]));
    end else begin : g_next
      logic start_q;
      logic [$clog2(k+2)-1:0] fill;

      // Inter-block register: S and C of the operation block k-1 has just
      // finished, loaded by its done pulse.
      always_ff @(posedge clock_i) begin
        if (reset_i) start_q <= 1'b0;
        else         start_q <= done[k-1];
        if (done[k-1]) begin
          s_ib[k] <= s_out[k-1];
          c_ib[k] <= c_out[k-1];
        end
      end
      assign start[k] = start_q;

      // Row k of the triangular array: {A slice of block k, B, N, B+N},
      // pushed when block 0 finishes, popped when block k finishes.
      operand_fifo #(.W(ITK + BW), .DEPTH(k + 1)) u_row (
        .clk(clock_i), .rst(reset_i),
        .push_i(done[0]), .din_i({a0[OFK +: ITK], bnq[0]}),
        .pop_i(done[k]), .dout_o({ka, bnq[k]}), .count_o(fill));

      mont_cell #(.WIDTH(WIDTH), .ITERS(ITK), .NB_REP(NB_REP)) u_cell (
        .clk(clock_i), .rst(reset_i), .start_i(start[k]),
        .a_i(ka), .b_i(kb), .n_i(kn), .bn_i(kbn),
        .s_i(s_ib[k]), .c_i(c_ib[k]), .s_o(s_out[k]), .c_o(c_out[k]),
        .done_o(done[k]), .idle_o(idle[k]));

      // A block is never started while it is still computing.
      always_ff @(posedge clock_i) begin
        if (!reset_i && start[k]) assert (idle[k])
          else $error("mont_mult: block %0d started while busy", k);
      end
    end
  end

  assign ready_o = !front_busy;

  // ------------------------------------------------------------------
  // Back end: P = S + C, then optional P - N and selection.
  logic [WIDTH-1:0] last_n;
  assign last_n = bnq[P-1][WIDTH+1 +: WIDTH];   // N field

  logic             sum_valid;
  logic [WIDTH:0]   sum_p;
  logic [WIDTH-1:0] sum_n;
  logic             sum_cout;

  pipe_adder #(.WIDTH(WIDTH+1), .STAGES(ADD_SUB_STAGES), .SUB(1'b0), .SIDE_W(WIDTH)) u_sc_add (
    .clk(clock_i), .rst(reset_i), .valid_i(done[P-1]),
    .a_i(s_out[P-1]), .b_i(c_out[P-1]), .side_i(last_n),
    .valid_o(sum_valid), .sum_o(sum_p), .cout_o(sum_cout), .side_o(sum_n));

  logic             res_valid;
  logic [WIDTH-1:0] res_val;

  if (FINAL_SUB) begin : g_sub
    logic           sub_valid;
    logic [WIDTH:0] diff, sub_p;
    logic           no_borrow;
    pipe_adder #(.WIDTH(WIDTH+1), .STAGES(ADD_SUB_STAGES), .SUB(1'b1), .SIDE_W(WIDTH+1)) u_sub (
      .clk(clock_i), .rst(reset_i), .valid_i(sum_valid),
      .a_i(sum_p), .b_i({1'b0, sum_n}), .side_i(sum_p),
      .valid_o(sub_valid), .sum_o(diff), .cout_o(no_borrow), .side_o(sub_p));
    assign res_valid = sub_valid;
    assign res_val   = no_borrow ? diff[WIDTH-1:0] : sub_p[WIDTH-1:0];
  end else begin : g_nosub
    assign res_valid = sum_valid;
    assign res_val   = sum_p[WIDTH-1:0];
  end

  always_ff @(posedge clock_i) begin
    if (reset_i) begin
      done_o <= 1'b0;
      p_o    <= '0;
    end else begin
      done_o <= res_valid;
      if (res_valid) p_o <= res_val;
    end
  end

  // Handshake rule: start only when ready.
  always_ff @(posedge clock_i) begin
    if (!reset_i && start_i) assert (ready_o)
      else $error("mont_mult: start_i while not ready");
  end

endmodule
