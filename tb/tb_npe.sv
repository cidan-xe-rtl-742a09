// Testbench for npe: random control words, loads and neighbour inputs every
// cycle, compared with a reference NPE kept in the testbench (source map of
// the routing muxes, weighted sum a+b+c+2d >= T, register operations, full
// connection between the four neurons, write-back selection). A directed
// part first checks one path of each kind by hand.
module tb_npe;
  import cidan_pkg::*;
  logic clk = 0, rst_n = 0;
  npe_ctrl_t ctrl;
  logic ld = 0;
  logic [1:0] ld_slot = 0;
  logic [3:0] bl_in = 0, bl_out, q;
  logic [NBR_EXT-1:0] nbr_ext = 0;
  wb_sel_t wb;
  int checks = 0, failures = 0;

  logic [3:0] mq;
  logic [3:0][15:0] mr;

  npe dut (.clk, .rst_n, .ctrl, .ld, .ld_slot, .bl_in, .nbr_ext, .wb, .q, .bl_out);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic src(int n, logic [4:0] s);
    if (s == 0) return 0;
    if (s == 1) return 1;
    if (s == 2) return mq[n];
    if (s < 6) return mq[(n + 1 + (s - 3)) % 4];
    if (s < 12) return nbr_ext[s - 6];
    if (s < 28) return mr[n][s - 12];
    return 0;
  endfunction

  // advance the reference model by one clock edge
  task automatic model_step();
    logic [3:0] nq;
    logic [3:0][15:0] nr;
    nq = mq; nr = mr;
    for (int n = 0; n < 4; n++) begin
      int s;
      logic [3:0] xi;
      for (int i = 0; i < 4; i++) xi[i] = src(n, ctrl[n].sel[i]) ^ ctrl[n].inv[i];
      s = xi[0] + xi[1] + xi[2] + 2 * xi[3];
      if (ctrl[n].en) nq[n] = (s >= ctrl[n].thr);
      if (ld) nr[n][ld_slot*4 +: 4] = bl_in;
      else case (ctrl[n].rop)
        ROP_WRQ: nr[n][ctrl[n].raddr] = mq[n];
        ROP_ROT: nr[n] = {mr[n][3:0], mr[n][15:4]};
        ROP_CLR: nr[n] = '0;
        default: ;
      endcase
    end
    mq = nq; mr = nr;
  endtask

  task automatic compare(string what);
    logic [3:0] exp_bl;
    exp_bl = (wb.src == WB_Q) ? mq : mr[wb.an][wb.slot*4 +: 4];
    checks++;
    if (q !== mq || bl_out !== exp_bl || dut.r !== mr) begin
      failures++;
      if (failures < 10) $display("FAIL %s: q=%b/%b bl=%h/%h", what, q, mq, bl_out, exp_bl);
    end
  endtask

  task automatic idle_ctrl();
    for (int n = 0; n < 4; n++) begin
      ctrl[n].sel = '0; ctrl[n].inv = '0; ctrl[n].thr = 2'd1;
      ctrl[n].en = 0; ctrl[n].rop = ROP_HOLD; ctrl[n].raddr = '0;
    end
  endtask

  initial begin
    idle_ctrl();
    wb = '{src: WB_Q, an: 0, slot: 0};
    mq = '0; mr = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    compare("reset");
    // directed: load nibble 5 into slot 0, each neuron buffers bit n
    ld = 1; ld_slot = 0; bl_in = 4'b0101;
    @(posedge clk); model_step(); #1; ld = 0;
    for (int n = 0; n < 4; n++) begin
      ctrl[n].sel[0] = src_reg(n); ctrl[n].en = 1; ctrl[n].thr = 1;
    end
    @(posedge clk); model_step(); #1;
    checks++; if (q !== 4'b0101) begin failures++; $display("FAIL directed buffer q=%b", q); end
    // neighbour rotation: neuron n takes neuron n+1
    for (int n = 0; n < 4; n++) ctrl[n].sel[0] = src_an(n, (n + 1) % 4);
    @(posedge clk); model_step(); #1;
    checks++; if (q !== 4'b1010) begin failures++; $display("FAIL directed neighbour q=%b", q); end
    // weight 2 on input d reaches T=3 with one more input
    for (int n = 0; n < 4; n++) begin
      ctrl[n].sel = {SRC_ONE, SRC_ZERO, SRC_ZERO, SRC_ONE}; ctrl[n].thr = 3;
    end
    @(posedge clk); model_step(); #1;
    checks++; if (q !== 4'b1111) begin failures++; $display("FAIL directed weight q=%b", q); end
    // random part
    for (int i = 0; i < 4000; i++) begin
      for (int n = 0; n < 4; n++) begin
        for (int k = 0; k < 4; k++) ctrl[n].sel[k] = 5'($urandom % 30);
        ctrl[n].inv = 4'($urandom); ctrl[n].thr = 2'(1 + $urandom % 3);
        ctrl[n].en = 1'($urandom); ctrl[n].rop = reg_op_e'($urandom % 4);
        if (ctrl[n].rop == ROP_CLR && ($urandom % 4 != 0)) ctrl[n].rop = ROP_HOLD;
        ctrl[n].raddr = 4'($urandom);
      end
      ld = ($urandom % 4 == 0); ld_slot = 2'($urandom); bl_in = 4'($urandom);
      nbr_ext = NBR_EXT'($urandom);
      wb = '{src: wb_src_e'($urandom % 2), an: 2'($urandom), slot: 2'($urandom)};
      @(posedge clk); model_step(); #1;
      compare($sformatf("random step %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
