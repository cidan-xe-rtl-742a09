// Testbench for npe_array (8 NPEs, 32 bitlines): loads a different nibble
// into every NPE, checks that one control word makes all NPEs compute the
// same function on their own bits (SIMD), that write-back returns the right
// nibble of every NPE, and that the six external neighbour lines of each
// NPE carry the outputs of the previous NPE (all four) and of the next NPE
// (neurons 0 and 1), with 0 past either end.
module tb_npe_array;
  import cidan_pkg::*;
  localparam int ROW = 32, P = ROW / 4;
  logic clk = 0, rst_n = 0;
  npe_ctrl_t ctrl;
  logic ld = 0;
  logic [1:0] ld_slot = 0;
  wb_sel_t wb;
  logic [ROW-1:0] bl_in = '0, bl_out;
  int checks = 0, failures = 0;

  npe_array #(.ROW_BITS(ROW)) dut (.clk, .rst_n, .ctrl, .ld, .ld_slot, .wb, .bl_in, .bl_out);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic set_all(logic [4:0] a, logic [4:0] b, logic [3:0] inv, logic [1:0] t);
    for (int n = 0; n < 4; n++) begin
      ctrl[n].sel = {SRC_ZERO, SRC_ZERO, b, a}; ctrl[n].inv = inv; ctrl[n].thr = t;
      ctrl[n].en = 1; ctrl[n].rop = ROP_HOLD; ctrl[n].raddr = 0;
    end
  endtask

  task automatic check(logic [ROW-1:0] exp, string what);
    checks++;
    if (bl_out !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %h expected %h", what, bl_out, exp);
    end
  endtask

  initial begin
    logic [ROW-1:0] xs, ys, qv, e;
    set_all(SRC_ZERO, SRC_ZERO, 0, 1);
    for (int n = 0; n < 4; n++) ctrl[n].en = 0;
    wb = '{src: WB_Q, an: 0, slot: 0};
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int it = 0; it < 50; it++) begin
      xs = ROW'($urandom); ys = ROW'($urandom);
      @(negedge clk); ld = 1; ld_slot = 0; bl_in = xs;
      @(negedge clk); ld_slot = 1; bl_in = ys;
      @(negedge clk); ld = 0;
      // read both slots back through write-back
      wb = '{src: WB_REG, an: 2'(it), slot: 0}; #1 check(xs, "wb slot0");
      wb = '{src: WB_REG, an: 2'(it + 1), slot: 1}; #1 check(ys, "wb slot1");
      // SIMD AND of X and Y in every NPE: neuron k uses bit k
      for (int n = 0; n < 4; n++) begin
        ctrl[n].sel = {SRC_ZERO, SRC_ZERO, src_reg(4 + n), src_reg(n)};
        ctrl[n].inv = 0; ctrl[n].thr = 2; ctrl[n].en = 1;
      end
      wb = '{src: WB_Q, an: 0, slot: 0};
      @(negedge clk); check(xs & ys, "SIMD AND");
      qv = xs & ys;
      // external neighbour line e (0..5) into every neuron
      for (int l = 0; l < NBR_EXT; l++) begin
        set_all(SRC_NBR0 + 5'(3 + l), SRC_ZERO, 0, 1);
        @(negedge clk);
        for (int p = 0; p < P; p++) begin
          logic b;
          if (l < 4) b = (p > 0) ? qv[4*(p-1) + l] : 1'b0;
          else       b = (p < P - 1) ? qv[4*(p+1) + (l - 4)] : 1'b0;
          e[4*p +: 4] = {4{b}};
        end
        check(e, $sformatf("neighbour line %0d", l));
        // restore q to the AND result for the next line
        for (int n = 0; n < 4; n++) begin
          ctrl[n].sel = {SRC_ZERO, SRC_ZERO, src_reg(4 + n), src_reg(n)};
          ctrl[n].thr = 2;
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
