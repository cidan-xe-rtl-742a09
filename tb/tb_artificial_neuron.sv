// Testbench for artificial_neuron: applies every input combination with
// every threshold and checks the registered output against the weighted sum
// a + b + c + 2d >= T worked out here, then checks that en low holds q and
// that reset clears it. Also checks the four rows of the bitwise table
// (NOT through an inverted input, AND, OR, MAJ).
module tb_artificial_neuron;
  import cidan_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  logic [3:0] x = '0;
  logic [1:0] thr = 2'd1;
  logic q;
  int checks = 0, failures = 0;

  artificial_neuron dut (.clk, .rst_n, .en, .x, .thr, .q);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic exp, string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%0b expected %0b", what, q, exp);
    end
  endtask

  initial begin
    int s;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    #1 check(1'b0, "reset");
    for (int t = 1; t <= 3; t++) begin
      for (int v = 0; v < 16; v++) begin
        x <= 4'(v); thr <= 2'(t); en <= 1;
        @(posedge clk); #1;
        s = v[0] + v[1] + v[2] + 2 * v[3];
        check(s >= t, $sformatf("x=%b T=%0d", 4'(v), t));
      end
    end
    // hold with en low
    x <= 4'b1111; thr <= 2'd1; en <= 1; @(posedge clk);
    x <= 4'b0000; en <= 0; @(posedge clk); #1;
    check(1'b1, "hold");
    // table of bitwise operations: a=IP1, b=IP2, c=IP3
    for (int v = 0; v < 8; v++) begin
      logic a, b, c;
      {c, b, a} = 3'(v);
      en <= 1;
      x <= {1'b0, 1'b0, 1'b0, ~a}; thr <= 2'd1; @(posedge clk); #1 check(~a, "NOT");
      x <= {1'b0, 1'b0, b, a};     thr <= 2'd2; @(posedge clk); #1 check(a & b, "AND");
      x <= {1'b0, 1'b0, b, a};     thr <= 2'd1; @(posedge clk); #1 check(a | b, "OR");
      x <= {1'b0, c, b, a};        thr <= 2'd2; @(posedge clk); #1 check((a&b)|(a&c)|(b&c), "MAJ");
    end
    rst_n <= 0; x <= 4'b1111; @(posedge clk); #1 check(1'b0, "reset again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
