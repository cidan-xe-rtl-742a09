// cidan_xe_top: the CIDAN-XE processing-in-memory logic of one DRAM chip.
//
// Four NPE arrays, one per active bank, sit between the banks' bitline sense
// amplifiers (BLSA) and the local I/O gating. A bank multiplexer connects
// them to the four banks of one bank group. The controller takes one
// instruction at a time, issues ACT/PRE/WR commands to the DRAM under its
// timing rules, strobes operand nibbles from the sensed rows into the NPE
// registers, and starts the NPE sequencer, whose control word all
// 4 x ROW_BITS/4 NPEs share. Results go back into a row of the same banks.
//
// Interface: the instruction port (valid/ready, done pulse), the command
// bus to the DRAM banks (cmd, cmd_bank = 4*group + bank, cmd_row), and the
// row buffers of all banks: bank_rd is what each BLSA holds, bank_wr and
// bank_wr_en are what the NPE arrays drive onto a bank's bitlines during a
// WR. The DRAM arrays themselves are outside this module.
//
// Defaults: 8192-bit rows (8192 NPEs over four banks) and 16 banks, the
// configuration the source design evaluates CNNs on; DDR3-1600 timing at a
// 1.25 ns clock (tRRD and tFAW from the source design, the rest assumed).
// The NPEs run on the same clock as the command bus, a choice of this design.
// The sequencer's done output is left open here: the controller follows its
// busy output, and done serves the sequencer's own testbench.
module cidan_xe_top
  import cidan_pkg::*;
#(
  parameter int unsigned ROW_BITS  = 8192,
  parameter int unsigned NUM_BANKS = 16,
  parameter int unsigned T_RCD     = 11,
  parameter int unsigned T_RAS     = 28,
  parameter int unsigned T_RP      = 11,
  parameter int unsigned T_RRD     = 6,
  parameter int unsigned T_FAW     = 24,
  parameter int unsigned T_WR      = 12
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              instr_valid,
  output logic                              instr_ready,
  input  instr_t                            instr,
  output logic                              instr_done,
  output dram_cmd_e                         cmd,
  output logic [3:0]                        cmd_bank,
  output logic [15:0]                       cmd_row,
  input  logic [NUM_BANKS-1:0][ROW_BITS-1:0] bank_rd,
  output logic [NUM_BANKS-1:0][ROW_BITS-1:0] bank_wr,
  output logic [NUM_BANKS-1:0]              bank_wr_en
);

  logic [1:0]                group;
  logic [1:0]                bank_in_grp;
  logic [3:0]                arr_ld, arr_wr_en;
  logic [1:0]                ld_slot;
  logic                      seq_start, seq_chain, seq_busy;
  npe_op_e                   seq_op;
  npe_ctrl_t                 ctrl;
  wb_sel_t                   wb;
  logic [3:0][ROW_BITS-1:0]  arr_rd, arr_wr;

  cidan_controller #(
    .T_RCD (T_RCD), .T_RAS (T_RAS), .T_RP (T_RP),
    .T_RRD (T_RRD), .T_FAW (T_FAW), .T_WR (T_WR)
  ) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .instr_valid (instr_valid),
    .instr_ready (instr_ready),
    .instr       (instr),
    .instr_done  (instr_done),
    .cmd         (cmd),
    .cmd_bank    (bank_in_grp),
    .cmd_row     (cmd_row),
    .group       (group),
    .arr_ld      (arr_ld),
    .ld_slot     (ld_slot),
    .arr_wr_en   (arr_wr_en),
    .seq_start   (seq_start),
    .seq_op      (seq_op),
    .seq_chain   (seq_chain),
    .seq_busy    (seq_busy)
  );

  assign cmd_bank = {group, bank_in_grp};

  npe_sequencer u_seq (
    .clk   (clk),
    .rst_n (rst_n),
    .start (seq_start),
    .op    (seq_op),
    .chain (seq_chain),
    .busy  (seq_busy),
    .done  (),
    .ctrl  (ctrl),
    .wb    (wb)
  );

  bank_npe_mux #(.NUM_BANKS (NUM_BANKS), .ROW_BITS (ROW_BITS)) u_mux (
    .group      (group),
    .bank_rd    (bank_rd),
    .arr_rd     (arr_rd),
    .arr_wr     (arr_wr),
    .arr_wr_en  (arr_wr_en),
    .bank_wr    (bank_wr),
    .bank_wr_en (bank_wr_en)
  );

  for (genvar i = 0; i < 4; i++) begin : g_arr
    npe_array #(.ROW_BITS (ROW_BITS)) u_arr (
      .clk     (clk),
      .rst_n   (rst_n),
      .ctrl    (ctrl),
      .ld      (arr_ld[i]),
      .ld_slot (ld_slot),
      .wb      (wb),
      .bl_in   (arr_rd[i]),
      .bl_out  (arr_wr[i])
    );
  end

endmodule
