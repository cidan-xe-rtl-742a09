// Testbench for npe_sequencer: drives one NPE with the sequencer's control
// words and checks every operation on random 4-bit operands against results
// computed here (bitwise functions, sum and carry, X>Y, ReLU, select), plus
// 8-bit addition, comparison and maximum built from chained 4-bit steps.
// It also checks the schedule lengths: 1 evaluation cycle for the bitwise
// functions, 2 for XOR, 5 for a 4-bit addition (m+1), 4 for a 4-bit
// comparison (m), and the busy time of every operation. Multiplication is
// checked on all 256 pairs of 4-bit operands, with its 48-cycle schedule.
module tb_npe_sequencer;
  import cidan_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start = 0, chain = 0, busy, done;
  npe_op_e op = OP_AND;
  npe_ctrl_t ctrl;
  wb_sel_t wb;
  logic ld = 0;
  logic [1:0] ld_slot = 0;
  logic [3:0] bl_in = 0, bl_out;
  logic [3:0] q;
  int checks = 0, failures = 0;
  int busy_cycles, eval_cycles;

  npe_sequencer dut (.clk, .rst_n, .start, .op, .chain, .busy, .done, .ctrl, .wb);
  npe u_npe (.clk, .rst_n, .ctrl, .ld, .ld_slot, .bl_in, .nbr_ext('0), .wb, .q, .bl_out);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (busy) begin
    busy_cycles++;
    if (ctrl[0].en || ctrl[1].en || ctrl[2].en || ctrl[3].en) eval_cycles++;
  end

  task automatic load(logic [1:0] slot, logic [3:0] v);
    ld <= 1; ld_slot <= slot; bl_in <= v;
    @(posedge clk);
    ld <= 0;
  endtask

  task automatic run(npe_op_e o, logic ch, output logic [3:0] res);
    busy_cycles = 0; eval_cycles = 0;
    op <= o; chain <= ch; start <= 1;
    @(posedge clk);
    start <= 0;
    while (!(busy && done)) @(posedge clk);
    @(posedge clk); #1;
    res = bl_out;
  endtask

  task automatic expect_eq(logic [3:0] got, logic [3:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic expect_len(int busy_exp, int eval_exp, string what);
    checks++;
    if (busy_cycles != busy_exp || eval_cycles != eval_exp) begin
      failures++;
      $display("FAIL %s cycles: busy %0d eval %0d, expected %0d/%0d",
               what, busy_cycles, eval_cycles, busy_exp, eval_exp);
    end
  endtask

  initial begin
    logic [3:0] x, y, z, r, r2, c;
    logic [7:0] x8, y8;
    logic g;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int it = 0; it < 150; it++) begin
      x = 4'($urandom); y = 4'($urandom); z = 4'($urandom);
      load(0, x); load(1, y); load(2, z);
      run(OP_NOT, 0, r);  expect_eq(r, ~x, "NOT");         expect_len(1, 1, "NOT");
      run(OP_AND, 0, r);  expect_eq(r, x & y, "AND");      expect_len(1, 1, "AND");
      run(OP_OR, 0, r);   expect_eq(r, x | y, "OR");
      run(OP_NAND, 0, r); expect_eq(r, ~(x & y), "NAND");
      run(OP_NOR, 0, r);  expect_eq(r, ~(x | y), "NOR");
      run(OP_MAJ, 0, r);  expect_eq(r, (x & y) | (x & z) | (y & z), "MAJ");
      run(OP_XOR, 0, r);  expect_eq(r, x ^ y, "XOR");      expect_len(2, 2, "XOR");
      run(OP_ADD, 0, r);  expect_eq(r, 4'(x + y), "ADD");  expect_len(6, 5, "ADD");
      run(OP_CARRY, 0, r); expect_eq(r, {3'b000, 1'(({1'b0, x} + {1'b0, y}) >> 4)}, "CARRY");
      load(0, x); load(1, y);
      run(OP_CMP, 0, r);  expect_eq(r, {3'b000, x > y}, "CMP"); expect_len(4, 4, "CMP");
      run(OP_RELU, 0, r); expect_eq(r, (x > y) ? x : 4'h0, "RELU"); expect_len(5, 5, "RELU");
      run(OP_CMP, 0, r);
      run(OP_SEL, 0, r);  expect_eq(r, (x > y) ? x : y, "SEL/max");
      // 8-bit operations from 4-bit segments
      x8 = 8'($urandom); y8 = 8'($urandom);
      if (it % 5 == 0) y8 = x8;
      if (it % 7 == 0) y8[7:4] = x8[7:4];
      load(0, x8[3:0]); load(1, y8[3:0]); run(OP_ADD, 0, r);
      load(0, x8[7:4]); load(1, y8[7:4]); run(OP_ADD, 1, r2);
      run(OP_CARRY, 0, c);
      expect_eq(r2, 4'((x8 + y8) >> 4), "ADD8 hi");
      expect_eq(c, {3'b000, 1'((9'(x8) + 9'(y8)) >> 8)}, "ADD8 carry");
      expect_eq(r, 4'(x8 + y8), "ADD8 lo");
      load(0, x8[3:0]); load(1, y8[3:0]); run(OP_CMP, 0, r);
      load(0, x8[7:4]); load(1, y8[7:4]); run(OP_CMP, 1, r);
      expect_eq(r, {3'b000, x8 > y8}, "CMP8");
      load(0, x8[3:0]); load(1, y8[3:0]); run(OP_SEL, 0, r);
      load(0, x8[7:4]); load(1, y8[7:4]); run(OP_SEL, 1, r2);
      expect_eq(r, (x8 > y8) ? x8[3:0] : y8[3:0], "MAX8 lo");
      expect_eq(r2, (x8 > y8) ? x8[7:4] : y8[7:4], "MAX8 hi");
    end
    // 4-bit multiplication, all operand pairs: MUL gives the low nibble,
    // MULHI the high nibble of the same product
    for (int xv = 0; xv < 16; xv++)
      for (int yv = 0; yv < 16; yv++) begin
        logic [7:0] p;
        p = 8'(xv * yv);
        load(0, 4'(xv)); load(1, 4'(yv));
        run(OP_MUL, 0, r);    expect_eq(r, p[3:0], "MUL lo");
        if (xv == 15 && yv == 15) expect_len(48, 41, "MUL");
        run(OP_MULHI, 0, r2); expect_eq(r2, p[7:4], "MUL hi");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
