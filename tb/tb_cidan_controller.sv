// Testbench for cidan_controller at its default (DDR3-1600) timing. A
// behavioural sequencer stays busy for a chosen number of cycles; a DRAM
// model counts timing violations. For instructions with 0 to 3 operand rows
// it checks the command order (ACT x4 and PRE per operand, then ACT x4,
// WR x4, PRE), the banks and rows, that every NPE array latches its bank
// exactly T_RCD after that bank's ACT into the right register slot, that
// each WR comes with its array's write enable, that compute starts right
// after the last operand PRE, and the latency from acceptance to done
// against a timeline worked out from the timing rules here.
module tb_cidan_controller;
  import cidan_pkg::*;
  localparam int T_RCD = 11, T_RAS = 28, T_RP = 11, T_RRD = 6, T_FAW = 24, T_WR = 12;
  logic clk = 0, rst_n = 0;
  logic instr_valid = 0, instr_ready, instr_done;
  instr_t instr;
  dram_cmd_e cmd;
  logic [1:0] cmd_bank, group, ld_slot;
  logic [15:0] cmd_row;
  logic [3:0] arr_ld, arr_wr_en;
  logic seq_start, seq_chain, seq_busy;
  npe_op_e seq_op;
  logic [15:0][3:0] bank_rd, bank_wr;
  logic [15:0] bank_wr_en;
  int checks = 0, failures = 0;
  int seq_len = 3, seq_cnt = 0;
  longint cyc = 0;

  cidan_controller dut (.clk, .rst_n, .instr_valid, .instr_ready, .instr, .instr_done,
    .cmd, .cmd_bank, .cmd_row, .group, .arr_ld, .ld_slot, .arr_wr_en,
    .seq_start, .seq_op, .seq_chain, .seq_busy);

  dram_model #(.NUM_BANKS(16), .ROW_BITS(4), .ROWS(16)) u_dram (.clk, .cmd(cmd),
    .cmd_bank({group, cmd_bank}), .cmd_row, .bank_rd, .bank_wr, .bank_wr_en);

  always_comb for (int b = 0; b < 16; b++) begin
    bank_wr[b] = 4'(b);
    bank_wr_en[b] = (b / 4 == group) && arr_wr_en[b % 4];
  end

  // behavioural NPE sequencer: busy for seq_len cycles after start
  assign seq_busy = (seq_cnt != 0);
  always @(posedge clk) begin
    if (seq_start && !seq_busy) seq_cnt <= seq_len;
    else if (seq_cnt != 0) seq_cnt <= seq_cnt - 1;
  end

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  // run one instruction and check everything the controller does for it
  task automatic run(npe_op_e op, logic [1:0] g, int len);
    int nops, ph, nact, nwr, npre, nld, t_accept, t_done;
    longint act_at [4];
    longint pre_at [4];
    longint first_act [4];
    longint seq_at, wb_act0;
    longint exp_pre, a, w;
    nops = op_operands(op);
    seq_len = len;
    instr = '{op: op, chain: 0, group: g, row_x: 16'd1, row_y: 16'd2, row_z: 16'd3, row_dst: 16'd9};
    instr_valid <= 1;
    @(posedge clk);
    while (!instr_ready) @(posedge clk);
    t_accept = int'(cyc) - 1;
    instr_valid <= 0;
    ph = 0; nact = 0; nwr = 0; npre = 0; nld = 0; seq_at = -1;
    forever begin
      @(negedge clk);
      if (cmd == CMD_ACT) begin
        check(group == g, "ACT group");
        check(int'(cmd_bank) == nact, "ACT bank order");
        check(cmd_row == ((ph < nops) ? 16'(ph + 1) : 16'd9), "ACT row");
        act_at[nact] = cyc;
        if (nact == 0) first_act[ph] = cyc;
        if (ph == nops && nact == 0) wb_act0 = cyc;
        nact++;
      end
      if (arr_ld != 0) begin
        check($onehot(arr_ld), "one array loads at a time");
        for (int i = 0; i < 4; i++) if (arr_ld[i]) begin
          check(cyc == act_at[i] + T_RCD, "load exactly T_RCD after ACT");
          check(int'(ld_slot) == ph, "load slot");
        end
        nld++;
      end
      if (cmd == CMD_WR) begin
        check(arr_wr_en == (4'b1 << cmd_bank), "WR with its array's write enable");
        check(ph == nops, "WR only in the write-back round");
        nwr++;
      end else check(arr_wr_en == 0, "no write enable without WR");
      if (seq_start && !seq_busy) begin
        seq_at = cyc;
        check(ph == nops && (nops == 0 || cyc == pre_at[nops-1] + 1), "compute right after last operand PRE");
      end
      if (cmd == CMD_PRE) begin
        check(nact == 4, "PRE after four ACTs");
        pre_at[ph] = cyc; npre++;
        ph++; nact = 0;
      end
      if (instr_done) break;
    end
    t_done = int'(cyc);
    check(npre == nops + 1 && nwr == 4 && nld == 4 * nops, "command counts");
    // timeline from the timing rules, assuming the banks were idle long enough
    for (int k = 0; k < nops; k++) begin
      exp_pre = first_act[k] + 3 * T_RRD + T_RAS;
      check(pre_at[k] == exp_pre, $sformatf("operand PRE %0d at %0d expected %0d", k, pre_at[k], exp_pre));
      if (k > 0) check(first_act[k] == pre_at[k-1] + T_RP, "next operand ACT right after tRP");
    end
    if (nops == 0) w = seq_at + 1 + len;
    else begin
      w = pre_at[nops-1] + T_RP;
      if (pre_at[nops-1] + 2 + len > w) w = pre_at[nops-1] + 2 + len;
    end
    check(wb_act0 == w, $sformatf("write-back ACT at %0d expected %0d", wb_act0, w));
    check(pre_at[nops] == w + 3 * T_RRD + T_RAS, "final PRE");
    check(t_done == pre_at[nops] + 1, "done after final PRE");
    repeat (T_RP + 2) @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (20) @(posedge clk);
    run(OP_AND, 2'd0, 1);
    run(OP_ADD, 2'd1, 6);
    run(OP_NOT, 2'd2, 1);
    run(OP_MAJ, 2'd3, 1);
    run(OP_CARRY, 2'd1, 1);
    run(OP_CMP, 2'd0, 20);   // compute longer than tRP delays the write-back
    check(u_dram.violations == 0, "no DRAM timing violations");
    check(u_dram.rrd_bound > 0, "tRRD spacing used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
