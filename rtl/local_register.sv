// local_register: the 16-bit local register attached to one neuron.
//
// It is a scratch store that the neuron reads through its routing muxes
// (all 16 bits form the R_BUS). Operations, one per clock:
//   load    (ld high, has priority) - nibble ld_slot takes the 4 bitline
//           bits of the NPE, the way operands arrive from the row buffer;
//   ROP_WRQ - bit raddr takes the neuron output q;
//   ROP_ROT - rotate right by one nibble (bits [7:4] move to [3:0]);
//   ROP_CLR - clear; ROP_HOLD - keep.
// The 16-bit size, loading from the bitlines and storing the neuron output
// follow the source design; the addressed write, the nibble rotation step
// and the operation encoding are this design's own. Reset clears it.
module local_register
  import cidan_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ld,
  input  logic [1:0]          ld_slot,
  input  logic [3:0]          bl,
  input  reg_op_e             rop,
  input  logic [3:0]          raddr,
  input  logic                q,
  output logic [REG_BITS-1:0] r
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r <= '0;
    end else if (ld) begin
      r[{ld_slot, 2'b00} +: 4] <= bl;
    end else begin
      case (rop)
        ROP_WRQ: r[raddr] <= q;
        ROP_ROT: r <= {r[3:0], r[REG_BITS-1:4]};
        ROP_CLR: r <= '0;
        default: ;
      endcase
    end
  end

endmodule
