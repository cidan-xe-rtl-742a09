// Workload testbench: element-wise operations on 32-bit elements, the
// operand size of the raw-operation evaluation of the source design, at a
// reduced array size (32-bit rows, 8 lanes per bank, 4 banks, short DRAM
// timing). A 32-bit element is eight 4-bit segments, segment s of X in row
// s and of Y in row 8+s of the same lane. The host-side instruction
// sequences checked here are this design's way of running such operands:
//   ADD32  eight ADDs, chained from the second on, then CARRY (33-bit sum)
//   CMP32  eight CMPs, chained, lowest segment first (X > Y)
//   MAX32  CMP32, then eight SELs (the first unchained) - max pooling step
//   XOR32, OR32, NOT32  one instruction per segment
// Every result row is compared lane by lane with values computed here, and
// the cycles each 32-bit operation takes are printed.
module tb_workload_raw32;
  import cidan_pkg::*;
  localparam int ROW = 32, NB = 4, ROWS = 72, LANES = ROW / 4, NL = 4 * LANES;
  logic clk = 0, rst_n = 0;
  logic instr_valid = 0, instr_ready, instr_done;
  instr_t instr;
  dram_cmd_e cmd;
  logic [3:0] cmd_bank;
  logic [15:0] cmd_row;
  logic [NB-1:0][ROW-1:0] bank_rd, bank_wr;
  logic [NB-1:0] bank_wr_en;
  int checks = 0, failures = 0;
  longint t0;

  cidan_xe_top #(.ROW_BITS(ROW), .NUM_BANKS(NB), .T_RCD(2), .T_RAS(4), .T_RP(3),
                 .T_RRD(2), .T_FAW(10), .T_WR(3)) dut (
    .clk, .rst_n, .instr_valid, .instr_ready, .instr, .instr_done,
    .cmd, .cmd_bank, .cmd_row, .bank_rd, .bank_wr, .bank_wr_en);

  dram_model #(.NUM_BANKS(NB), .ROW_BITS(ROW), .ROWS(ROWS), .T_RCD(2), .T_RAS(4),
               .T_RP(3), .T_RRD(2), .T_FAW(10)) u_dram (
    .clk, .cmd(cmd), .cmd_bank, .cmd_row, .bank_rd, .bank_wr, .bank_wr_en);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic issue(npe_op_e op, bit chain, int rx, int ry, int rd);
    instr <= '{op: op, chain: chain, group: 2'd0, row_x: 16'(rx), row_y: 16'(ry),
               row_z: 16'd0, row_dst: 16'(rd)};
    instr_valid <= 1;
    @(posedge clk);
    while (!instr_ready) @(posedge clk);
    instr_valid <= 0;
    do @(posedge clk); while (!instr_done);
  endtask

  function automatic logic [3:0] nib(int row, int lane);
    return u_dram.mem[lane / LANES][row][4 * (lane % LANES) +: 4];
  endfunction

  function automatic logic [31:0] word(int row0, int lane);
    logic [31:0] w;
    for (int s = 0; s < 8; s++) w[4*s +: 4] = nib(row0 + s, lane);
    return w;
  endfunction

  task automatic check(logic [31:0] got, logic [31:0] exp, int lane, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s lane %0d: %h expected %h", what, lane, got, exp);
    end
  endtask

  task automatic start_op();
    t0 = u_dram.cyc;
  endtask

  task automatic end_op(string what);
    $display("%s: %0d cycles", what, u_dram.cyc - t0);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    for (int b = 0; b < NB; b++)
      for (int r = 0; r < ROWS; r++) u_dram.mem[b][r] = ROW'($urandom);
    // equal upper halves in some lanes so that the low segments decide
    for (int b = 0; b < NB; b++)
      for (int s = 4; s < 8; s++) u_dram.mem[b][8 + s][15:0] = u_dram.mem[b][s][15:0];
    // one lane with X = Y, one with the largest carry chain
    for (int s = 0; s < 8; s++) begin
      u_dram.mem[1][8 + s][3:0] = u_dram.mem[1][s][3:0];
      u_dram.mem[2][s][3:0] = 4'hF;
      u_dram.mem[2][8 + s][3:0] = (s == 0) ? 4'h1 : 4'h0;
    end
    rst_n <= 1;
    repeat (3) @(posedge clk);
    // rows: X 0..7, Y 8..15; results: ADD 16..24, CMP 25, MAX 26..33,
    // XOR 34..41, OR 42..49, NOT 50..57
    start_op();
    for (int s = 0; s < 8; s++) issue(OP_ADD, s != 0, s, 8 + s, 16 + s);
    issue(OP_CARRY, 0, 0, 0, 24);
    end_op("ADD32");
    start_op();
    for (int s = 0; s < 8; s++) issue(OP_CMP, s != 0, s, 8 + s, 25);
    end_op("CMP32");
    start_op();
    for (int s = 0; s < 8; s++) issue(OP_SEL, s != 0, s, 8 + s, 26 + s);
    end_op("SEL32 (after CMP32)");
    for (int s = 0; s < 8; s++) issue(OP_XOR, 0, s, 8 + s, 34 + s);
    for (int s = 0; s < 8; s++) issue(OP_OR, 0, s, 8 + s, 42 + s);
    start_op();
    for (int s = 0; s < 8; s++) issue(OP_NOT, 0, s, 0, 50 + s);
    end_op("NOT32");
    for (int l = 0; l < NL; l++) begin
      logic [31:0] x, y;
      logic [32:0] sum;
      x = word(0, l); y = word(8, l); sum = {1'b0, x} + {1'b0, y};
      check(word(16, l), sum[31:0], l, "ADD32");
      check(32'(nib(24, l)), 32'(sum[32]), l, "ADD32 carry");
      check(32'(nib(25, l)), 32'(x > y), l, "CMP32");
      check(word(26, l), (x > y) ? x : y, l, "MAX32");
      check(word(34, l), x ^ y, l, "XOR32");
      check(word(42, l), x | y, l, "OR32");
      check(word(50, l), ~x, l, "NOT32");
    end
    checks++;
    if (u_dram.violations != 0) begin failures++; $display("FAIL DRAM timing violations"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
