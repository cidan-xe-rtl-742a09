// cidan_controller: the state machine that turns one CIDAN-XE instruction
// into DRAM commands and NPE control.
//
// An instruction names an operation, a bank group (four banks used in
// parallel), the rows holding operands X, Y, Z and the result row. It runs
// in rounds. An operand round activates the operand row in the four banks
// one after another, never two ACTs closer than T_RRD and never five within
// T_FAW. T_RCD after each ACT the row is sensed and the NPE array of that
// bank latches its nibbles (arr_ld, register slot ld_slot). When all four
// are latched and T_RAS has passed since the last ACT, one PRE closes all
// four banks. The same round repeats for the next operand once T_RP has
// passed. Compute then starts on the NPE sequencer at once, overlapping the
// precharge. The write-back round activates the result row in the four
// banks, issues a WR to each T_RCD after its ACT (arr_wr_en: the NPE array
// drives the bitlines), and precharges when T_WR and T_RAS have passed.
// An instruction on two operands is thus ACT x4, PRE, ACT x4, PRE, compute,
// ACT x4, WR x4, PRE. One command per clock: a WR that is due goes before
// an ACT.
//
// Interface: instr_valid/instr_ready handshake (instr must be held while
// valid and not ready); instr_done pulses when the final PRE has been issued.
// Timing parameters are in clock cycles; the defaults are DDR3-1600 values
// at a 1.25 ns clock. The source design gives the round structure, the four
// banks, the single precharge, the overlapped precharge and the tRRD/tFAW
// rules with tRRD = 7.5 ns and tFAW = 30 ns; tRCD, tRAS, tRP and tWR, the
// instruction format, the ACT before the write and the command priority are
// this design's own.
module cidan_controller
  import cidan_pkg::*;
#(
  parameter int unsigned T_RCD = 11,
  parameter int unsigned T_RAS = 28,
  parameter int unsigned T_RP  = 11,
  parameter int unsigned T_RRD = 6,
  parameter int unsigned T_FAW = 24,
  parameter int unsigned T_WR  = 12
) (
  input  logic        clk,
  input  logic        rst_n,
  // instruction port
  input  logic        instr_valid,
  output logic        instr_ready,
  input  instr_t      instr,
  output logic        instr_done,
  // DRAM command bus
  output dram_cmd_e   cmd,
  output logic [1:0]  cmd_bank,   // bank within the group
  output logic [15:0] cmd_row,
  output logic [1:0]  group,
  // NPE arrays
  output logic [3:0]  arr_ld,
  output logic [1:0]  ld_slot,
  output logic [3:0]  arr_wr_en,
  // NPE sequencer
  output logic        seq_start,
  output npe_op_e     seq_op,
  output logic        seq_chain,
  input  logic        seq_busy
);

  typedef enum logic [2:0] {
    S_IDLE    = 3'd0,
    S_ROUND   = 3'd1,  // operand round: ACTs, loads, PRE
    S_COMPUTE = 3'd2,
    S_WB      = 3'd3,  // write-back round: ACTs, WRs, PRE
    S_END     = 3'd4
  } state_e;

  localparam int unsigned CW = 32;

  state_e         state;
  instr_t         ir;
  logic [1:0]     nops;       // operand rows to load
  logic [1:0]     opnd;       // current operand round
  logic [CW-1:0]  cyc;        // free-running cycle count
  logic [3:0][CW-1:0] act_hist; // times of the last four ACTs, [0] newest
  logic [3:0]     hist_v;
  logic [CW-1:0]  last_pre;
  logic           pre_v;
  logic [CW-1:0]  last_wr;
  logic [3:0][CW-1:0] act_t;  // ACT time of each bank in this round
  logic [3:0]     acted, served;
  logic [2:0]     nact;       // ACTs issued in this round

  logic           in_round;
  logic [15:0]    round_row;
  logic           rrd_ok, faw_ok, rp_ok, act_ok;
  logic [3:0]     due;
  logic [1:0]     due_idx;
  logic           any_due;
  logic           pre_ok;
  logic           do_act, do_wr, do_pre, do_ld;

  assign in_round  = (state == S_ROUND) || (state == S_WB);
  assign group     = ir.group;
  assign seq_op    = ir.op;
  assign seq_chain = ir.chain;
  assign ld_slot   = opnd;

  always_comb begin
    case (opnd)
      2'd0:    round_row = ir.row_x;
      2'd1:    round_row = ir.row_y;
      default: round_row = ir.row_z;
    endcase
    if (state == S_WB) round_row = ir.row_dst;
  end

  // Activation rules.
  always_comb begin
    rrd_ok = !hist_v[0] || (cyc - act_hist[0] >= CW'(T_RRD));
    faw_ok = !hist_v[3] || (cyc - act_hist[3] >= CW'(T_FAW));
    rp_ok  = !pre_v     || (cyc - last_pre    >= CW'(T_RP));
    act_ok = in_round && (nact < 3'd4) && rrd_ok && faw_ok && rp_ok &&
             !(state == S_WB && seq_busy);
  end

  // Banks whose row is sensed and not yet served (loaded or written).
  always_comb begin
    due_idx = '0;
    any_due = 1'b0;
    for (int i = 3; i >= 0; i--) begin
      due[i] = acted[i] && !served[i] && (cyc - act_t[i] >= CW'(T_RCD));
      if (due[i]) begin
        due_idx = 2'(i);
        any_due = 1'b1;
      end
    end
  end

  always_comb begin
    pre_ok = in_round && (served == 4'hF) &&
             (cyc - act_hist[0] >= CW'(T_RAS)) &&
             (state != S_WB || (cyc - last_wr >= CW'(T_WR)));
    do_ld  = (state == S_ROUND) && any_due;
    do_wr  = (state == S_WB) && any_due;
    do_pre = pre_ok;
    do_act = act_ok && !do_wr && !do_pre;
  end

  always_comb begin
    cmd       = CMD_NOP;
    cmd_bank  = '0;
    cmd_row   = round_row;
    arr_ld    = '0;
    arr_wr_en = '0;
    if (do_ld) arr_ld[due_idx] = 1'b1;
    if (do_pre) begin
      cmd = CMD_PRE;
    end else if (do_wr) begin
      cmd      = CMD_WR;
      cmd_bank = due_idx;
      arr_wr_en[due_idx] = 1'b1;
    end else if (do_act) begin
      cmd      = CMD_ACT;
      cmd_bank = nact[1:0];
    end
  end

  assign instr_ready = (state == S_IDLE);
  assign seq_start   = (state == S_COMPUTE) && !seq_busy;
  assign instr_done  = (state == S_END);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      ir       <= '0;
      nops     <= '0;
      opnd     <= '0;
      cyc      <= '0;
      act_hist <= '0;
      hist_v   <= '0;
      last_pre <= '0;
      pre_v    <= 1'b0;
      last_wr  <= '0;
      act_t    <= '0;
      acted    <= '0;
      served   <= '0;
      nact     <= '0;
    end else begin
      cyc <= cyc + 1'b1;
      if (do_act) begin
        act_hist       <= {act_hist[2:0], cyc};
        hist_v         <= {hist_v[2:0], 1'b1};
        act_t[nact[1:0]] <= cyc;
        acted[nact[1:0]] <= 1'b1;
        nact           <= nact + 3'd1;
      end
      if (do_ld || do_wr) served[due_idx] <= 1'b1;
      if (do_wr) last_wr <= cyc;
      if (do_pre) begin
        last_pre <= cyc;
        pre_v    <= 1'b1;
        acted    <= '0;
        served   <= '0;
        nact     <= '0;
      end

      case (state)
        S_IDLE: if (instr_valid) begin
          ir   <= instr;
          nops <= op_operands(instr.op);
          opnd <= '0;
          state <= (op_operands(instr.op) == 2'd0) ? S_COMPUTE : S_ROUND;
        end
        S_ROUND: if (do_pre) begin
          if (opnd + 2'd1 == nops) state <= S_COMPUTE;
          else                     opnd  <= opnd + 2'd1;
        end
        S_COMPUTE: if (seq_start) state <= S_WB;
        S_WB: if (do_pre) state <= S_END;
        default: state <= S_IDLE;
      endcase
    end
  end

  // The instruction must not change while it waits to be accepted.
  a_instr_stable: assert property (@(posedge clk) disable iff (!rst_n)
    instr_valid && !instr_ready |=> instr_valid && $stable(instr));
  // Never more than four ACTs within T_FAW, never two within T_RRD.
  a_faw: assert property (@(posedge clk) disable iff (!rst_n)
    do_act && hist_v[3] |-> cyc - act_hist[3] >= CW'(T_FAW));
  a_rrd: assert property (@(posedge clk) disable iff (!rst_n)
    do_act && hist_v[0] |-> cyc - act_hist[0] >= CW'(T_RRD));

endmodule
