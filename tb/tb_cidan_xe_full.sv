// Full-size testbench for cidan_xe_top with all parameters at their
// defaults: 8192-bit rows, 8192 NPEs over four banks, 16 banks, DDR3-1600
// timing. It runs one complete 4-bit addition on bank group 2 (two operand
// rounds, the ripple-carry schedule, the write-back round) and a carry
// instruction, then checks all 8192 lanes of the sum and carry rows in the
// behavioural DRAM, that banks outside the group were not written, that no
// DRAM timing rule was broken, and the instruction latency: ACT x4 + PRE
// twice, compute overlapped with tRP, ACT x4 + WR x4 + PRE.
module tb_cidan_xe_full;
  import cidan_pkg::*;
  localparam int ROW = 8192, NB = 16, ROWS = 4, LANES = ROW / 4;
  logic clk = 0, rst_n = 0;
  logic instr_valid = 0, instr_ready, instr_done;
  instr_t instr;
  dram_cmd_e cmd;
  logic [3:0] cmd_bank;
  logic [15:0] cmd_row;
  logic [NB-1:0][ROW-1:0] bank_rd, bank_wr;
  logic [NB-1:0] bank_wr_en;
  int checks = 0, failures = 0;
  longint t0, lat;

  cidan_xe_top dut (.clk, .rst_n, .instr_valid, .instr_ready, .instr, .instr_done,
    .cmd, .cmd_bank, .cmd_row, .bank_rd, .bank_wr, .bank_wr_en);

  dram_model #(.NUM_BANKS(NB), .ROW_BITS(ROW), .ROWS(ROWS)) u_dram (
    .clk, .cmd(cmd), .cmd_bank, .cmd_row, .bank_rd, .bank_wr, .bank_wr_en);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic issue(npe_op_e op, int rx, int ry, int rd);
    instr <= '{op: op, chain: 0, group: 2'd2, row_x: 16'(rx), row_y: 16'(ry),
               row_z: 16'd0, row_dst: 16'(rd)};
    instr_valid <= 1;
    @(posedge clk);
    while (!instr_ready) @(posedge clk);
    instr_valid <= 0;
    t0 = u_dram.cyc;
    do @(posedge clk); while (!instr_done);
    lat = u_dram.cyc - t0;
  endtask

  initial begin
    logic [ROW-1:0] untouched;
    repeat (3) @(posedge clk);
    for (int b = 0; b < NB; b++)
      for (int r = 0; r < ROWS; r++)
        for (int w = 0; w < ROW / 32; w++) u_dram.mem[b][r][32*w +: 32] = $urandom;
    untouched = u_dram.mem[0][2];
    rst_n <= 1;
    repeat (3) @(posedge clk);
    issue(OP_ADD, 0, 1, 2);
    // 2 operand rounds of 3*tRRD + tRAS + tRP, a write-back round of
    // 3*tRRD + tRAS, plus acceptance and done cycles
    checks++;
    if (lat != 2 * (3 * 6 + 28 + 11) + (3 * 6 + 28) + 2) begin
      failures++; $display("FAIL ADD latency %0d", lat);
    end
    issue(OP_CARRY, 0, 0, 3);
    for (int l = 0; l < 4 * LANES; l++) begin
      int b;
      logic [4:0] s;
      b = 8 + l / LANES;
      s = {1'b0, u_dram.mem[b][0][4*(l%LANES) +: 4]} + {1'b0, u_dram.mem[b][1][4*(l%LANES) +: 4]};
      checks += 2;
      if (u_dram.mem[b][2][4*(l%LANES) +: 4] !== s[3:0]) begin
        failures++; if (failures < 10) $display("FAIL sum lane %0d", l);
      end
      if (u_dram.mem[b][3][4*(l%LANES) +: 4] !== {3'b000, s[4]}) begin
        failures++; if (failures < 10) $display("FAIL carry lane %0d", l);
      end
    end
    checks++; if (u_dram.mem[0][2] !== untouched) begin failures++; $display("FAIL other group written"); end
    checks++; if (u_dram.violations != 0) begin failures++; $display("FAIL DRAM timing violations"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
