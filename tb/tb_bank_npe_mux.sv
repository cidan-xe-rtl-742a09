// Testbench for bank_npe_mux (8 banks of 16 bits): for each bank group and
// random row buffers checks that array i reads bank 4g+i, that each bank
// gets the write data of array (bank mod 4), and that only the banks of the
// selected group see a write enable.
module tb_bank_npe_mux;
  localparam int NB = 8, RB = 16;
  logic [1:0] group;
  logic [NB-1:0][RB-1:0] bank_rd, bank_wr;
  logic [3:0][RB-1:0] arr_rd, arr_wr;
  logic [3:0] arr_wr_en;
  logic [NB-1:0] bank_wr_en;
  int checks = 0, failures = 0;

  bank_npe_mux #(.NUM_BANKS(NB), .ROW_BITS(RB)) dut (.group, .bank_rd, .arr_rd, .arr_wr,
    .arr_wr_en, .bank_wr, .bank_wr_en);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 200; it++) begin
      group = 2'($urandom % (NB / 4));
      for (int b = 0; b < NB; b++) bank_rd[b] = RB'($urandom);
      for (int i = 0; i < 4; i++) arr_wr[i] = RB'($urandom);
      arr_wr_en = 4'($urandom);
      #1;
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (arr_rd[i] !== bank_rd[4*group + i]) begin
          failures++; $display("FAIL read g=%0d i=%0d", group, i);
        end
      end
      for (int b = 0; b < NB; b++) begin
        checks++;
        if (bank_wr_en[b] !== ((b / 4 == group) && arr_wr_en[b % 4]) ||
            (bank_wr_en[b] && bank_wr[b] !== arr_wr[b % 4])) begin
          failures++; $display("FAIL write g=%0d bank=%0d", group, b);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
