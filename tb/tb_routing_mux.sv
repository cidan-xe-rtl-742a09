// Testbench for routing_mux: for random source vectors checks every select
// code 0..31 with and without inversion against the source map
// (0, 1, feedback, nine neighbours, 16 register bits, then 0).
module tb_routing_mux;
  import cidan_pkg::*;
  logic [SEL_W-1:0] sel;
  logic inv, fb, y;
  logic [NBR_BITS-1:0] nbr;
  logic [REG_BITS-1:0] rbus;
  int checks = 0, failures = 0;

  routing_mux dut (.sel, .inv, .fb, .nbr, .rbus, .y);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    for (int r = 0; r < 40; r++) begin
      fb = 1'($urandom); nbr = NBR_BITS'($urandom); rbus = REG_BITS'($urandom);
      for (int s = 0; s < 32; s++) begin
        for (int i = 0; i < 2; i++) begin
          sel = 5'(s); inv = 1'(i);
          #1;
          if (s == 0) exp = 0;
          else if (s == 1) exp = 1;
          else if (s == 2) exp = fb;
          else if (s < 12) exp = nbr[s-3];
          else if (s < 28) exp = rbus[s-12];
          else exp = 0;
          exp = exp ^ inv;
          checks++;
          if (y !== exp) begin
            failures++;
            $display("FAIL sel=%0d inv=%0d y=%0b exp=%0b", s, i, y, exp);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
