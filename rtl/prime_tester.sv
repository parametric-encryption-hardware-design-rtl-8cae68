// prime_tester: deterministic Rabin-Miller strong pseudoprime test of an odd
// WIDTH-bit number p_i, using the first NB_PRIMES primes as bases.
//
// For p - 1 = 2^s * d (d odd) and each base a from the prime ROM, p passes
// the round when p == a, a^d == 1, a^d == p-1, or a^(2^j d) == p-1 for some
// 1 <= j <= s-1 (mod p). p is declared composite as soon as a round fails,
// probably prime after all rounds pass.
//
// Hardware: one mont_exp computes a^d mod p; its Montgomery multiplier is
// reused in standalone mode for everything else, so the unit holds a single
// multiplier. s and d come from a right shifter and counter run while the
// multiplier converts p-1 to a Montgomery residue ((p-1)*Nr); the squarings
// a^(2^j d) stay in the residue domain and are compared with that residue,
// after a^d has itself been converted with one multiplication by Nr. One
// equality comparator with operand multiplexers serves all four tests.
//
// FSM: IDLE -> LOADING (s = 0) -> PRE1 (find s, d; convert p-1) -> RUN1
// (p == a?) -> RUN2 (a^d; == 1?) -> RUN3 (== p-1? no inner loop when s < 2)
// -> PRE2 (convert a^d) -> RUN4 (inner squaring loop) -> FINISHED, with a
// return to RUN1 for the next base whenever a round passes.
//
// Interface: start_i is a one-cycle pulse; p_i (odd, >= 3) and
// nr_i = 2^(2*WIDTH) mod p_i must stay stable until done_o, which is high
// for one cycle; result_o is 1 for probably prime, 0 for composite, and holds
// until the next start. Reset is synchronous, active high.
// The run time depends on the number under test. The standalone-multiplier
// port on the exponentiator and the single-cycle gaps between states are this
// implementation's choices.
module prime_tester
  import mont_pkg::*;
#(
  parameter int WIDTH             = 512,
  parameter int NB_PRIMES         = 12,
  parameter int PRIMES_DATA_WIDTH = 8,
  parameter int PRIMES_ADDR_WIDTH = 4,
  parameter int PIPELINE_STAGES   = 2,
  parameter int ADD_SUB_STAGES    = 4,
  parameter int NB_REP            = 4
) (
  input  logic             clock_i,
  input  logic             reset_i,
  input  logic             start_i,
  input  logic [WIDTH-1:0] p_i,
  input  logic [WIDTH-1:0] nr_i,
  output logic             done_o,
  output logic             result_o
);
  localparam int SW = cnt_width(WIDTH);

  typedef enum logic [3:0] {
    T_IDLE, T_LOADING, T_PRE1, T_RUN1, T_RUN2, T_RUN3, T_PRE2, T_RUN4, T_FINISHED
  } tester_state_e;

  tester_state_e state;

  logic [WIDTH-1:0]             pm1, pm1_r, d, int_value;
  logic [SW-1:0]                s, j;
  logic [PRIMES_ADDR_WIDTH-1:0] i;
  logic                         conv_done, mreq;
  logic [PRIMES_DATA_WIDTH-1:0] a;

  prime_rom #(.NB_PRIMES(NB_PRIMES), .PRIMES_DATA_WIDTH(PRIMES_DATA_WIDTH),
              .PRIMES_ADDR_WIDTH(PRIMES_ADDR_WIDTH)) u_rom (.addr_i(i), .data_o(a));

  // Exponentiator with its shared multiplier.
  logic             exp_start, exp_done, m_ready, m_done, m_start;
  logic [WIDTH-1:0] exp_res, m_x, m_y, m_p;

  mont_exp #(.WIDTH(WIDTH), .PIPELINE_STAGES(PIPELINE_STAGES), .NB_REP(NB_REP),
             .FINAL_SUB(1'b1), .ADD_SUB_STAGES(ADD_SUB_STAGES)) u_exp (
    .clock_i(clock_i), .reset_i(reset_i), .start_i(exp_start),
    .x_i(WIDTH'(a)), .e_i(d), .m_i(p_i), .nr_i(nr_i),
    .done_o(exp_done), .res_o(exp_res),
    .ext_start_i(m_start), .ext_x_i(m_x), .ext_y_i(m_y),
    .mult_ready_o(m_ready), .mult_done_o(m_done), .mult_p_o(m_p));

  // Standalone multiplier operands.
  always_comb begin
    unique case (state)
      T_PRE2:  begin m_x = int_value; m_y = nr_i;      end
      T_RUN4:  begin m_x = int_value; m_y = int_value; end
      default: begin m_x = pm1;       m_y = nr_i;      end
    endcase
  end
  assign m_start = mreq && m_ready;

  // Shared equality comparator.
  logic [WIDTH-1:0] cmp_a, cmp_b;
  logic             cmp;
  always_comb begin
    unique case (state)
      T_RUN1:  begin cmp_a = p_i;       cmp_b = WIDTH'(a);   end
      T_RUN2:  begin cmp_a = exp_res;   cmp_b = WIDTH'(1);   end
      T_RUN3:  begin cmp_a = int_value; cmp_b = pm1;         end
      default: begin cmp_a = m_p;       cmp_b = pm1_r;       end
    endcase
    cmp = (cmp_a == cmp_b);
  end

  logic test_finished, no_subtest, subtest_finished;
  assign test_finished    = (i == PRIMES_ADDR_WIDTH'(NB_PRIMES - 1));
  assign no_subtest       = (s < SW'(2));
  assign subtest_finished = (j == s - 1'b1);

  always_ff @(posedge clock_i) begin
    if (reset_i) begin
      state     <= T_IDLE;
      done_o    <= 1'b0;
      result_o  <= 1'b0;
      mreq      <= 1'b0;
      exp_start <= 1'b0;
      i         <= '0;
      s         <= '0;
      j         <= '0;
      conv_done <= 1'b0;
    end else begin
      done_o    <= 1'b0;
      exp_start <= 1'b0;
      if (m_start) mreq <= 1'b0;
      unique case (state)
        T_IDLE: if (start_i) state <= T_LOADING;
        T_LOADING: begin
          s         <= '0;
          d         <= p_i - 1'b1;
          pm1       <= p_i - 1'b1;
          i         <= '0;
          conv_done <= 1'b0;
          mreq      <= 1'b1;            // (p-1) * Nr
          state     <= T_PRE1;
        end
        T_PRE1: begin
          if (!d[0] && d != '0) begin
            d <= d >> 1;
            s <= s + 1'b1;
          end
          if (m_done) begin
            pm1_r     <= m_p;
            conv_done <= 1'b1;
          end
          if ((d[0] || d == '0) && (conv_done || m_done)) state <= T_RUN1;
        end
        T_RUN1: begin
          if (cmp) begin
            result_o <= 1'b1;
            state    <= T_FINISHED;
          end else begin
            exp_start <= 1'b1;
            state     <= T_RUN2;
          end
        end
        T_RUN2: begin
          if (exp_done) begin
            int_value <= exp_res;
            if (cmp) begin
              if (test_finished) begin result_o <= 1'b1; state <= T_FINISHED; end
              else begin i <= i + 1'b1; state <= T_RUN1; end
            end else begin
              state <= T_RUN3;
            end
          end
        end
        T_RUN3: begin
          if (cmp) begin
            if (test_finished) begin result_o <= 1'b1; state <= T_FINISHED; end
            else begin i <= i + 1'b1; state <= T_RUN1; end
          end else if (no_subtest) begin
            result_o <= 1'b0;
            state    <= T_FINISHED;
          end else begin
            mreq  <= 1'b1;              // a^d * Nr
            state <= T_PRE2;
          end
        end
        T_PRE2: begin
          if (m_done) begin
            int_value <= m_p;
            j         <= SW'(1);
            mreq      <= 1'b1;          // first squaring
            state     <= T_RUN4;
          end
        end
        T_RUN4: begin
          if (m_done) begin
            int_value <= m_p;
            if (cmp) begin
              if (test_finished) begin result_o <= 1'b1; state <= T_FINISHED; end
              else begin i <= i + 1'b1; state <= T_RUN1; end
            end else if (subtest_finished) begin
              result_o <= 1'b0;
              state    <= T_FINISHED;
            end else begin
              j    <= j + 1'b1;
              mreq <= 1'b1;
            end
          end
        end
        T_FINISHED: begin
          done_o <= 1'b1;
          state  <= T_IDLE;
        end
        default: state <= T_IDLE;
      endcase
    end
  end

endmodule
