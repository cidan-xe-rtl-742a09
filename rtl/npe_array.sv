// npe_array: the row of NPEs between one bank's bitline sense amplifiers
// and its local I/O gating.
//
// An NPE sits on every group of four adjacent bitlines, so a row of
// ROW_BITS bits feeds ROW_BITS/4 NPEs. All NPEs take the same control word
// and so run the same operation on their own four bits (SIMD). NPE p sees the
// four outputs of NPE p-1 and outputs 0 and 1 of NPE p+1 as its six
// external neighbour lines; lines past either end are 0.
//
// Interface: bl_in is the row buffer as sensed, ld loads its nibbles into
// register slot ld_slot, bl_out is the row the array drives back.
// Timing as in npe. ROW_BITS/4 NPEs per bank follows the source design;
// the default of 8192 bitlines is its CNN configuration. The neighbour wiring
// between NPEs is this design's own.
module npe_array
  import cidan_pkg::*;
#(
  parameter int unsigned ROW_BITS = 8192
) (
  input  logic                clk,
  input  logic                rst_n,
  input  npe_ctrl_t           ctrl,
  input  logic                ld,
  input  logic [1:0]          ld_slot,
  input  wb_sel_t             wb,
  input  logic [ROW_BITS-1:0] bl_in,
  output logic [ROW_BITS-1:0] bl_out
);

  localparam int unsigned NPES = ROW_BITS / 4;

  logic [NPES-1:0][NEURONS-1:0] q;

  for (genvar p = 0; p < NPES; p++) begin : g_npe
    logic [NBR_EXT-1:0] ext;
    always_comb begin
      ext[3:0] = (p > 0)        ? q[(p > 0) ? p-1 : 0] : 4'b0000;
      ext[5:4] = (p < NPES - 1) ? q[(p < NPES-1) ? p+1 : p][1:0] : 2'b00;
    end

    npe u_npe (
      .clk     (clk),
      .rst_n   (rst_n),
      .ctrl    (ctrl),
      .ld      (ld),
      .ld_slot (ld_slot),
      .bl_in   (bl_in[4*p +: 4]),
      .nbr_ext (ext),
      .wb      (wb),
      .q       (q[p]),
      .bl_out  (bl_out[4*p +: 4])
    );
  end

endmodule
