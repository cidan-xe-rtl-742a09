// Workload testbench: 8-bit by 8-bit multiplication, the core of the 8-bit
// CNN inference mode, at a reduced array size (32-bit rows, 8 lanes per
// bank, 4 banks, short DRAM timing). Each operand is split into 4-bit
// halves; the four 4-bit products V0 = XL*YL, V1 = XH*YL, V2 = XL*YH and
// V3 = XH*YH are formed with MUL/MULHI, and the 16-bit product is
// V0 + ((V1 + V2) << 4) + (V3 << 8), summed with chained 4-bit ADDs. The
// decomposition follows the source design; the exact instruction sequence
// is this design's. The product of every lane is checked against X*Y worked
// out here, and the cycles the whole sequence takes are printed.
module tb_workload_mul8;
  import cidan_pkg::*;
  localparam int ROW = 32, NB = 4, ROWS = 40, LANES = ROW / 4, NL = 4 * LANES;
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
    // corner lanes: 255 x 255, 0 x n, 1 x n
    u_dram.mem[0][0][3:0] = 4'hF; u_dram.mem[0][1][3:0] = 4'hF;
    u_dram.mem[0][2][3:0] = 4'hF; u_dram.mem[0][3][3:0] = 4'hF;
    u_dram.mem[1][0][3:0] = 4'h0; u_dram.mem[1][1][3:0] = 4'h0;
    u_dram.mem[2][0][3:0] = 4'h1; u_dram.mem[2][1][3:0] = 4'h0;
    rst_n <= 1;
    repeat (3) @(posedge clk);
    // rows: X low 0, X high 1, Y low 2, Y high 3
    // V0 = XL*YL -> 4,5   V1 = XH*YL -> 6,7   V2 = XL*YH -> 8,9   V3 = XH*YH -> 10,11
    start_op();
    issue(OP_MUL, 0, 0, 2, 4);   issue(OP_MULHI, 0, 0, 0, 5);
    issue(OP_MUL, 0, 1, 2, 6);   issue(OP_MULHI, 0, 0, 0, 7);
    issue(OP_MUL, 0, 0, 3, 8);   issue(OP_MULHI, 0, 0, 0, 9);
    issue(OP_MUL, 0, 1, 3, 10);  issue(OP_MULHI, 0, 0, 0, 11);
    // T = V1 + V2 (9 bits) -> 12, 13, 14
    issue(OP_ADD, 0, 6, 8, 12);  issue(OP_ADD, 1, 7, 9, 13);  issue(OP_CARRY, 0, 0, 0, 14);
    // A = V0 + (T << 4) + (V3 << 8): A0 is V0 low, then three chained adds
    issue(OP_ADD, 0, 5, 12, 15); issue(OP_ADD, 1, 10, 13, 16); issue(OP_ADD, 1, 11, 14, 17);
    end_op("MUL8 (16-bit product)");
    for (int l = 0; l < NL; l++) begin
      logic [7:0] x, y;
      logic [15:0] p;
      x = {nib(1, l), nib(0, l)}; y = {nib(3, l), nib(2, l)}; p = 16'(x) * 16'(y);
      check(32'({nib(17, l), nib(16, l), nib(15, l), nib(4, l)}), 32'(p), l, "MUL8");
      check(32'({nib(5, l), nib(4, l)}), 32'(x[3:0] * y[3:0]), l, "V0");
      check(32'({nib(11, l), nib(10, l)}), 32'(x[7:4] * y[7:4]), l, "V3");
    end
    checks++;
    if (u_dram.violations != 0) begin failures++; $display("FAIL DRAM timing violations"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
