// End-to-end testbench for cidan_xe_top at reduced size: 32-bit rows (8 NPEs
// per bank, 32 lanes per bank group), 8 banks and short DRAM timing chosen so
// that every activation rule binds at some point. Operand rows are written
// into a behavioural DRAM; instructions go in through the instruction port;
// result rows are read back from the DRAM and compared lane by lane with
// values computed here. The program covers every operation, 8-bit addition,
// comparison and maximum from chained 4-bit steps, a 2x2 max-pooling window
// (two maxima and the maximum of those), ReLU and 4x4-bit multiplication
// (low and high nibble), on two bank groups.
// Mechanisms counted, each must occur: ACT held by tRRD, by tFAW and by
// tRP; a due WR taking the command slot from an ACT; compute overlapping a
// precharge; carry and comparison chaining; a bank-group switch.
module tb_cidan_xe_top;
  import cidan_pkg::*;
  localparam int ROW = 32, NB = 8, ROWS = 32, LANES = ROW / 4;
  localparam int T_RCD = 2, T_RAS = 4, T_RP = 6, T_RRD = 2, T_FAW = 18, T_WR = 6;
  logic clk = 0, rst_n = 0;
  logic instr_valid = 0, instr_ready, instr_done;
  instr_t instr;
  dram_cmd_e cmd;
  logic [3:0] cmd_bank;
  logic [15:0] cmd_row;
  logic [NB-1:0][ROW-1:0] bank_rd, bank_wr;
  logic [NB-1:0] bank_wr_en;
  int checks = 0, failures = 0;
  int n_wr_over_act = 0, n_overlap = 0, n_chain_add = 0, n_chain_cmp = 0, n_group_switch = 0;
  logic [1:0] last_group = 0;

  cidan_xe_top #(.ROW_BITS(ROW), .NUM_BANKS(NB), .T_RCD(T_RCD), .T_RAS(T_RAS), .T_RP(T_RP),
                 .T_RRD(T_RRD), .T_FAW(T_FAW), .T_WR(T_WR)) dut (
    .clk, .rst_n, .instr_valid, .instr_ready, .instr, .instr_done,
    .cmd, .cmd_bank, .cmd_row, .bank_rd, .bank_wr, .bank_wr_en);

  dram_model #(.NUM_BANKS(NB), .ROW_BITS(ROW), .ROWS(ROWS), .T_RCD(T_RCD), .T_RAS(T_RAS),
               .T_RP(T_RP), .T_RRD(T_RRD), .T_FAW(T_FAW)) u_dram (
    .clk, .cmd(cmd), .cmd_bank, .cmd_row, .bank_rd, .bank_wr, .bank_wr_en);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanisms seen inside the design
  always @(posedge clk) if (rst_n) begin
    if (cmd == CMD_WR && dut.u_ctrl.act_ok) n_wr_over_act++;
    if (dut.u_seq.busy && u_dram.cyc - u_dram.last_pre < T_RP) n_overlap++;
  end

  task automatic issue(npe_op_e op, bit chain, logic [1:0] g, int rx, int ry, int rz, int rd);
    if (chain && op == OP_ADD) n_chain_add++;
    if (chain && op == OP_CMP) n_chain_cmp++;
    if (g != last_group) n_group_switch++;
    last_group = g;
    instr <= '{op: op, chain: chain, group: g, row_x: 16'(rx), row_y: 16'(ry),
               row_z: 16'(rz), row_dst: 16'(rd)};
    instr_valid <= 1;
    @(posedge clk);
    while (!instr_ready) @(posedge clk);
    instr_valid <= 0;
    do @(posedge clk); while (!instr_done);
  endtask

  function automatic logic [3:0] nib(logic [1:0] g, int row, int lane);
    int b;
    b = 4 * g + lane / LANES;
    return u_dram.mem[b][row][4 * (lane % LANES) +: 4];
  endfunction

  task automatic check_row(logic [1:0] g, int row, int lane, logic [3:0] exp, string what);
    checks++;
    if (nib(g, row, lane) !== exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s group %0d lane %0d: %h expected %h", what, g, lane, nib(g, row, lane), exp);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    for (int b = 0; b < NB; b++)
      for (int r = 0; r < ROWS; r++) u_dram.mem[b][r] = ROW'({$urandom, $urandom});
    // make some lanes equal so that comparison chaining matters
    for (int b = 0; b < NB; b++) begin
      u_dram.mem[b][3][7:0] = u_dram.mem[b][1][7:0];
      u_dram.mem[b][2][3:0] = u_dram.mem[b][0][3:0];
      u_dram.mem[b][3][3:0] = u_dram.mem[b][1][3:0];
    end
    rst_n <= 1;
    repeat (3) @(posedge clk);
    // rows: 0 X low, 1 X high, 2 Y low, 3 Y high, 4 Z; results from 10 on
    for (int gi = 0; gi < 2; gi++) begin
      logic [1:0] g;
      g = (gi == 0) ? 2'd1 : 2'd0;
      issue(OP_NOT,  0, g, 0, 0, 0, 10);
      issue(OP_AND,  0, g, 0, 2, 0, 11);
      issue(OP_OR,   0, g, 0, 2, 0, 12);
      issue(OP_NAND, 0, g, 0, 2, 0, 13);
      issue(OP_NOR,  0, g, 0, 2, 0, 14);
      issue(OP_MAJ,  0, g, 0, 2, 4, 15);
      issue(OP_XOR,  0, g, 0, 2, 0, 16);
      issue(OP_ADD,  0, g, 0, 2, 0, 17);
      issue(OP_ADD,  1, g, 1, 3, 0, 18);
      issue(OP_CARRY, 0, g, 0, 0, 0, 19);
      issue(OP_CMP,  0, g, 0, 2, 0, 20);
      issue(OP_CMP,  1, g, 1, 3, 0, 21);
      issue(OP_SEL,  0, g, 0, 2, 0, 22);
      issue(OP_SEL,  1, g, 1, 3, 0, 23);
      issue(OP_RELU, 0, g, 0, 2, 0, 24);
      // 2x2 max pooling of A=row0, B=row2, C=row1, D=row3
      issue(OP_CMP,  0, g, 0, 2, 0, 31);
      issue(OP_SEL,  0, g, 0, 2, 0, 25);
      issue(OP_CMP,  0, g, 1, 3, 0, 31);
      issue(OP_SEL,  0, g, 1, 3, 0, 26);
      issue(OP_CMP,  0, g, 25, 26, 0, 31);
      issue(OP_SEL,  0, g, 25, 26, 0, 27);
      issue(OP_MUL,  0, g, 0, 2, 0, 28);
      issue(OP_MULHI, 0, g, 0, 0, 0, 29);
      for (int l = 0; l < 4 * LANES; l++) begin
        logic [3:0] x, y, z, a, b, c, d, m1, m2;
        logic [7:0] x8, y8;
        logic [8:0] s8;
        x = nib(g, 0, l); y = nib(g, 2, l); z = nib(g, 4, l);
        x8 = {nib(g, 1, l), x}; y8 = {nib(g, 3, l), y}; s8 = x8 + y8;
        check_row(g, 10, l, ~x, "NOT");
        check_row(g, 11, l, x & y, "AND");
        check_row(g, 12, l, x | y, "OR");
        check_row(g, 13, l, ~(x & y), "NAND");
        check_row(g, 14, l, ~(x | y), "NOR");
        check_row(g, 15, l, (x & y) | (x & z) | (y & z), "MAJ");
        check_row(g, 16, l, x ^ y, "XOR");
        check_row(g, 17, l, s8[3:0], "ADD8 low");
        check_row(g, 18, l, s8[7:4], "ADD8 high");
        check_row(g, 19, l, {3'b000, s8[8]}, "ADD8 carry");
        check_row(g, 20, l, {3'b000, x > y}, "CMP4");
        check_row(g, 21, l, {3'b000, x8 > y8}, "CMP8");
        check_row(g, 22, l, (x8 > y8) ? x8[3:0] : y8[3:0], "MAX8 low");
        check_row(g, 23, l, (x8 > y8) ? x8[7:4] : y8[7:4], "MAX8 high");
        check_row(g, 24, l, (x > y) ? x : 4'h0, "RELU");
        a = x; b = y; c = x8[7:4]; d = y8[7:4];
        m1 = (a > b) ? a : b; m2 = (c > d) ? c : d;
        check_row(g, 27, l, (m1 > m2) ? m1 : m2, "MAXPOOL 2x2");
        check_row(g, 28, l, 4'(x * y), "MUL lo");
        check_row(g, 29, l, 4'(({4'h0, x} * {4'h0, y}) >> 4), "MUL hi");
      end
    end
    checks++; if (u_dram.violations != 0) begin failures++; $display("FAIL DRAM timing violations"); end
    $display("mechanisms: tRRD %0d tFAW %0d tRP %0d WR-over-ACT %0d compute-during-PRE %0d add-chain %0d cmp-chain %0d group-switch %0d",
             u_dram.rrd_bound, u_dram.faw_bound, u_dram.rp_bound, n_wr_over_act, n_overlap,
             n_chain_add, n_chain_cmp, n_group_switch);
    checks += 8;
    if (u_dram.rrd_bound == 0) begin failures++; $display("FAIL tRRD never bound"); end
    if (u_dram.faw_bound == 0) begin failures++; $display("FAIL tFAW never bound"); end
    if (u_dram.rp_bound == 0)  begin failures++; $display("FAIL tRP never bound"); end
    if (n_wr_over_act == 0)    begin failures++; $display("FAIL WR never took an ACT slot"); end
    if (n_overlap == 0)        begin failures++; $display("FAIL compute never overlapped a precharge"); end
    if (n_chain_add == 0 || n_chain_cmp == 0) begin failures++; $display("FAIL no chaining"); end
    if (n_group_switch == 0)   begin failures++; $display("FAIL no group switch"); end
    checks++; if (u_dram.n_wr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
