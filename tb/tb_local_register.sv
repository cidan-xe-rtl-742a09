// Testbench for local_register: random sequences of nibble loads, addressed
// writes of q, nibble rotations, clears and holds, compared each cycle
// with a reference register kept in the testbench; load must win over the
// register operation given in the same cycle.
module tb_local_register;
  import cidan_pkg::*;
  logic clk = 0, rst_n = 0, ld = 0, q = 0;
  logic [1:0] ld_slot = 0;
  logic [3:0] bl = 0, raddr = 0;
  reg_op_e rop = ROP_HOLD;
  logic [REG_BITS-1:0] r, model;
  int checks = 0, failures = 0;

  local_register dut (.clk, .rst_n, .ld, .ld_slot, .bl, .rop, .raddr, .q, .r);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1; model = '0;
    @(posedge clk); #1;
    checks++; if (r !== '0) begin failures++; $display("FAIL reset"); end
    for (int i = 0; i < 2000; i++) begin
      ld <= ($urandom % 3 == 0); ld_slot <= 2'($urandom); bl <= 4'($urandom);
      rop <= reg_op_e'($urandom % 4); raddr <= 4'($urandom); q <= 1'($urandom);
      @(posedge clk); #1;
      if (ld) model[ld_slot*4 +: 4] = bl;
      else case (rop)
        ROP_WRQ: model[raddr] = q;
        ROP_ROT: model = {model[3:0], model[15:4]};
        ROP_CLR: model = '0;
        default: ;
      endcase
      checks++;
      if (r !== model) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d r=%h model=%h", i, r, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
