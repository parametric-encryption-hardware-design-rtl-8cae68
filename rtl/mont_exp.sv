// mont_exp: modular exponentiator res_o = x_i ^ e_i mod m_i built around
// one pipelined Montgomery multiplier (mont_mult).
//
// Algorithm (right to left over the WIDTH exponent bits):
//   P0 = x * Nr, Z0 = 1 * Nr                      (to Montgomery residues)
//   for i = 0 .. WIDTH-1:  Z(i+1) = Z(i) * P(i)   (kept only when e_i = 1)
//                          P(i+1) = P(i) * P(i)   (not needed for i = WIDTH-1)
//   res = Z(WIDTH) * 1                             (back from residues)
// nr_i = 2^(2*MW) mod m_i, with MW the multiplier width (WIDTH, or WIDTH+3
// without final subtraction). The Z multiplication is issued for every bit
// whatever its value, so the run time does not depend on the exponent.
//
// P and Z live in a dual-read RAM (exp_ram). Only the P chain and the Z chain
// are independent, so at most two products are in the multiplier at once; a
// control FSM tracks which is ahead: EMPTY, P alone, Z-P (P ahead), P-Z
// (Z ahead), Z alone. When the older product completes it is written to the
// RAM (P always; Z(0) always; Z(i+1) only if e_i) and the next product of the
// same chain is issued: P(i+1) needs P(i) and that Z(i) was already issued
// (so Z(i+1) gets issued before P(i+1) overwrites P(i)); Z(i+1) needs Z(i)
// and P(i). When both are eligible Z goes first. With a 2-block multiplier
// both products are in flight almost all the time, which is why two
// pipeline blocks are the useful maximum here; any NB_BLOCKS works.
// A second FSM (IDLE, LOADING, RUNNING, FINISHED) clears the counters and
// raises done_o for one cycle.
//
// The multiplier is also offered for standalone use (ext_* ports, mult_*
// outputs) while the exponentiator is idle, so a larger unit can share it.
//
// Interface: start_i is a one-cycle pulse; x_i, e_i, m_i, nr_i must stay
// stable until done_o. res_o holds the result from done_o until the next
// start. FINAL_SUB=0 uses a WIDTH+3 multiplier with no final subtraction;
// the final conversion then leaves the result below m_i except with
// negligible probability. Reset is synchronous, active high.
// The issue-order rule, the Z-first priority and skipping the unused last
// P product are this implementation's reading of the control described for
// the pipelined version.
module mont_exp
  import mont_pkg::*;
#(
  parameter int WIDTH           = 512,
  parameter int PIPELINE_STAGES = 2,
  parameter int NB_REP          = 4,
  parameter bit FINAL_SUB       = 1'b1,
  parameter int ADD_SUB_STAGES  = 4
) (
  input  logic             clock_i,
  input  logic             reset_i,
  input  logic             start_i,
  input  logic [WIDTH-1:0] x_i,
  input  logic [WIDTH-1:0] e_i,
  input  logic [WIDTH-1:0] m_i,
  input  logic [WIDTH-1:0] nr_i,
  output logic             done_o,
  output logic [WIDTH-1:0] res_o,
  // standalone access to the multiplier while idle
  input  logic             ext_start_i,
  input  logic [WIDTH-1:0] ext_x_i,
  input  logic [WIDTH-1:0] ext_y_i,
  output logic             mult_ready_o,
  output logic             mult_done_o,
  output logic [WIDTH-1:0] mult_p_o
);
  localparam int MW  = FINAL_SUB ? WIDTH : WIDTH + 3;
  localparam int IW  = cnt_width(WIDTH + 1);
  localparam int EW  = (WIDTH > 1) ? $clog2(WIDTH) : 1;   // exponent bit index width

  typedef enum logic [1:0] {E_IDLE, E_LOADING, E_RUNNING, E_FINISHED} exp_state_e;
  typedef enum logic [2:0] {PL_EMPTY, PL_P, PL_ZP, PL_PZ, PL_Z} pipe_state_e;

  exp_state_e  state;
  pipe_state_e pstate;

  // Multiplier and its operand multiplexers.
  logic          m_start, m_ready, m_done;
  logic [MW-1:0] m_x, m_y, m_p;

  mont_mult #(.WIDTH(MW), .NB_BLOCKS(PIPELINE_STAGES), .NB_REP(NB_REP),
              .FINAL_SUB(FINAL_SUB), .ADD_SUB_STAGES(ADD_SUB_STAGES)) u_mult (
    .clock_i(clock_i), .reset_i(reset_i), .start_i(m_start),
    .x_i(m_x), .y_i(m_y), .m_i(MW'(m_i)),
    .ready_o(m_ready), .done_o(m_done), .p_o(m_p));

  // RAM holding P (address 0) and Z (address 1).
  localparam logic A_P = 1'b0, A_Z = 1'b1;
  logic             ram_we, ram_waddr;
  logic [MW-1:0]    ram_p, ram_z;

  // MW wide: without final subtraction the residues may reach 2N.
  exp_ram #(.WIDTH(MW)) u_ram (
    .clk(clock_i), .we_i(ram_we), .waddr_i(ram_waddr), .wdata_i(m_p),
    .raddr0_i(A_P), .rdata0_o(ram_p), .raddr1_i(A_Z), .rdata1_o(ram_z));

  // Chain bookkeeping.
  logic [IW-1:0] p_next;    // index of the next P product to issue
  logic [IW-1:0] z_next;    // index of the next Z product (WIDTH+1 = final conversion)
  logic [IW-1:0] p_ram;     // index of the P value in the RAM
  logic          p_valid;   // RAM holds a P value
  logic          p_fly, z_fly, z_first; // in flight; z_first: Z is the older one

  logic run, issue_p, issue_z, can_p, can_z, done_is_z;
  logic [IW-1:0] z_fly_idx;
  logic [EW-1:0] z_bit;     // exponent bit that decides the Z write (z_fly_idx - 1)

  assign run = (state == E_RUNNING);
  assign z_fly_idx = z_next - 1'b1;
  assign z_bit     = EW'(z_fly_idx - 1'b1);

  always_comb begin
    can_p = run && !p_fly && (p_next < IW'(WIDTH)) &&
            ((p_next == '0) || (p_valid && (p_ram == p_next - 1'b1) && (z_next >= p_next)));
    can_z = run && !z_fly && (z_next <= IW'(WIDTH + 1)) &&
            ((z_next == '0) ? (p_next != '0) :
             (z_next == IW'(WIDTH + 1)) ? 1'b1 :
             (p_valid && (p_ram == z_next - 1'b1)));
    issue_z = can_z && m_ready;
    issue_p = can_p && m_ready && !can_z;
  end

  // Operand selection.
  always_comb begin
    m_x = '0;
    m_y = '0;
    if (!run) begin
      m_x = MW'(ext_x_i);
      m_y = MW'(ext_y_i);
    end else if (issue_z) begin
      if (z_next == '0)                    begin m_x = MW'(1); m_y = MW'(nr_i); end
      else if (z_next == IW'(WIDTH + 1))   begin m_x = ram_z; m_y = MW'(1); end
      else                                 begin m_x = ram_z; m_y = ram_p; end
    end else begin
      if (p_next == '0) begin m_x = MW'(x_i);   m_y = MW'(nr_i); end
      else              begin m_x = ram_p; m_y = ram_p; end
    end
  end

  assign m_start = run ? (issue_p || issue_z) : (ext_start_i && state == E_IDLE);

  // Pipeline contents as the control FSM sees them.
  always_comb begin
    unique case ({p_fly, z_fly})
      2'b00:   pstate = PL_EMPTY;
      2'b10:   pstate = PL_P;
      2'b01:   pstate = PL_Z;
      default: pstate = z_first ? PL_PZ : PL_ZP;
    endcase
    // the older product completes first
    done_is_z = (pstate == PL_Z) || (pstate == PL_PZ);
  end

  // RAM write on completion.
  always_comb begin
    ram_we    = 1'b0;
    ram_waddr = A_P;
    if (run && m_done) begin
      if (!done_is_z) begin
        ram_we = 1'b1;
      end else if (z_fly_idx == '0) begin
        ram_we = 1'b1; ram_waddr = A_Z;
      end else if (z_fly_idx <= IW'(WIDTH)) begin
        ram_we = e_i[z_bit]; ram_waddr = A_Z;
      end
    end
  end

  logic final_done;
  assign final_done = run && m_done && done_is_z && (z_fly_idx == IW'(WIDTH + 1));

  always_ff @(posedge clock_i) begin
    if (reset_i) begin
      state   <= E_IDLE;
      p_next  <= '0;
      z_next  <= '0;
      p_ram   <= '0;
      p_valid <= 1'b0;
      p_fly   <= 1'b0;
      z_fly   <= 1'b0;
      z_first <= 1'b0;
      done_o  <= 1'b0;
      res_o   <= '0;
    end else begin
      done_o <= 1'b0;
      unique case (state)
        E_IDLE: if (start_i) state <= E_LOADING;
        E_LOADING: begin
          p_next  <= '0;
          z_next  <= '0;
          p_valid <= 1'b0;
          p_fly   <= 1'b0;
          z_fly   <= 1'b0;
          state   <= E_RUNNING;
        end
        E_RUNNING: begin
          // completions
          if (m_done) begin
            if (done_is_z) z_fly <= 1'b0;
            else begin
              p_fly   <= 1'b0;
              p_valid <= 1'b1;
              p_ram   <= p_next - 1'b1;
            end
          end
          // issues (never both in one cycle)
          if (issue_p) begin
            p_fly   <= 1'b1;
            p_next  <= p_next + 1'b1;
            z_first <= z_fly && !(m_done && done_is_z);
          end
          if (issue_z) begin
            z_fly   <= 1'b1;
            z_next  <= z_next + 1'b1;
            z_first <= !(p_fly && !(m_done && !done_is_z));
          end
          if (final_done) begin
            res_o  <= m_p[WIDTH-1:0];
            done_o <= 1'b1;
            state  <= E_FINISHED;
          end
        end
        E_FINISHED: state <= E_IDLE;
        default:    state <= E_IDLE;
      endcase
    end
  end

  assign mult_ready_o = (state == E_IDLE) && m_ready;
  assign mult_done_o  = (state == E_IDLE) && m_done;
  assign mult_p_o     = m_p[WIDTH-1:0];

  // P(i+1) may only overwrite P(i) once Z(i+1) has been issued.
  always_ff @(posedge clock_i) begin
    if (!reset_i && run && m_done && !done_is_z && p_next > IW'(1))
      assert (z_next >= p_next)
        else $error("mont_exp: P overwritten before the Z product that needs it was issued");
  end

endmodule
