// bank_npe_mux: shares the four NPE arrays among all banks of the chip.
//
// Only four banks can be active at once, so the chip has four NPE arrays.
// Bank group g (banks 4g .. 4g+3) is connected to them: array i reads the
// row buffer of bank 4g+i, and its write-back data goes to that bank. The
// write enable of a bank is the enable of its array when its group is
// selected. Purely combinational. NUM_BANKS is a multiple of 4, at most 16.
//
// Four arrays shared by multiplexers among 8 or 16 banks follows the source
// design; grouping the banks four by four is this design's own choice.
module bank_npe_mux #(
  parameter int unsigned NUM_BANKS = 16,
  parameter int unsigned ROW_BITS  = 8192
) (
  input  logic [1:0]                            group,
  input  logic [NUM_BANKS-1:0][ROW_BITS-1:0]    bank_rd,
  output logic [3:0][ROW_BITS-1:0]              arr_rd,
  input  logic [3:0][ROW_BITS-1:0]              arr_wr,
  input  logic [3:0]                            arr_wr_en,
  output logic [NUM_BANKS-1:0][ROW_BITS-1:0]    bank_wr,
  output logic [NUM_BANKS-1:0]                  bank_wr_en
);

  always_comb begin
    for (int i = 0; i < 4; i++)
      arr_rd[i] = bank_rd[4*group + i];
    for (int b = 0; b < NUM_BANKS; b++) begin
      bank_wr[b]    = arr_wr[b % 4];
      bank_wr_en[b] = (b / 4 == int'(group)) && arr_wr_en[b % 4];
    end
  end

endmodule
