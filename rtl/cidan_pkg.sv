// cidan_pkg: types and constants shared by the CIDAN-XE blocks.
//
// The neuron processing element (NPE) has four artificial neurons (ANs).
// Each AN is a threshold gate with weights [a=1, b=1, c=1, d=2] and a
// threshold T of 1, 2 or 3. Its four inputs come through routing muxes.
// Each mux has a 5-bit select over 28 sources: constants 0 and 1, the AN's
// own output (feedback), nine neighbour outputs and the 16 bits of the AN's
// local register. The per-AN control word, the register operations, the
// operation codes of the NPE sequencer, the DRAM command encoding and the
// instruction format are all defined here.
//
// From the source design: K=4 neurons per NPE, I=4 inputs per neuron, the
// 16-bit local register, the [2,1,1,1;T] function, the 12+16 mux sources and
// the 5-bit select. This design chose the encodings, the per-input inversion
// bit and the instruction format.
package cidan_pkg;

  localparam int unsigned NEURONS   = 4;   // ANs per NPE (K)
  localparam int unsigned AN_INPUTS = 4;   // inputs per AN (I)
  localparam int unsigned REG_BITS  = 16;  // local register per AN
  localparam int unsigned NBR_BITS  = 9;   // neighbour lines per routing mux
  localparam int unsigned SEL_W     = 5;   // routing mux select width
  localparam int unsigned NBR_EXT   = 6;   // neighbour lines from adjacent NPEs

  // Routing mux source codes.
  localparam logic [SEL_W-1:0] SRC_ZERO = 5'd0;
  localparam logic [SEL_W-1:0] SRC_ONE  = 5'd1;
  localparam logic [SEL_W-1:0] SRC_FB   = 5'd2;
  localparam logic [SEL_W-1:0] SRC_NBR0 = 5'd3;   // 3..11: neighbour 0..8
  localparam logic [SEL_W-1:0] SRC_REG0 = 5'd12;  // 12..27: register bit 0..15

  // Operations on a local register.
  typedef enum logic [2:0] {
    ROP_HOLD = 3'd0,  // keep contents
    ROP_WRQ  = 3'd1,  // write the AN output q into bit raddr
    ROP_ROT  = 3'd2,  // rotate right by one nibble
    ROP_CLR  = 3'd3   // clear all bits
  } reg_op_e;

  // Control of one AN, its four input muxes and its local register.
  typedef struct packed {
    logic [AN_INPUTS-1:0][SEL_W-1:0] sel;  // [0]=a, [1]=b, [2]=c, [3]=d (weight 2)
    logic [AN_INPUTS-1:0]            inv;  // invert the selected bit
    logic [1:0]                      thr;  // threshold T
    logic                            en;   // evaluate on this clock edge
    reg_op_e                         rop;
    logic [3:0]                      raddr;
  } an_ctrl_t;

  typedef an_ctrl_t [NEURONS-1:0] npe_ctrl_t;

  // Source of the four bits an NPE drives back onto its bitlines.
  typedef enum logic [0:0] {
    WB_Q   = 1'b0,  // the four AN outputs, bit k from AN k
    WB_REG = 1'b1   // one nibble of one AN's local register
  } wb_src_e;

  typedef struct packed {
    wb_src_e    src;
    logic [1:0] an;    // register owner for WB_REG
    logic [1:0] slot;  // nibble within it
  } wb_sel_t;

  // Operations run by the NPE sequencer on 4-bit operand segments.
  // X is loaded into register nibble 0, Y into nibble 1, Z into nibble 2.
  typedef enum logic [3:0] {
    OP_NOT   = 4'd0,
    OP_AND   = 4'd1,
    OP_OR    = 4'd2,
    OP_NAND  = 4'd3,
    OP_NOR   = 4'd4,
    OP_MAJ   = 4'd5,
    OP_XOR   = 4'd6,
    OP_ADD   = 4'd7,   // X+Y(+carry when chained), sum nibble
    OP_CARRY = 4'd8,   // carry out of the last ADD as {000,c}
    OP_CMP   = 4'd9,   // {000, X>Y}, chained from lower segments
    OP_RELU  = 4'd10,  // X if X>Y else 0
    OP_SEL   = 4'd11,  // X if last CMP result else Y (max pooling)
    OP_MUL   = 4'd12,  // low nibble of the 8-bit product X*Y
    OP_MULHI = 4'd13   // high nibble of the product of the last MUL
  } npe_op_e;

  // Number of operand rows an operation loads (0..3).
  function automatic logic [1:0] op_operands(npe_op_e op);
    case (op)
      OP_NOT:   return 2'd1;
      OP_MAJ:   return 2'd3;
      OP_CARRY: return 2'd0;
    OP_MULHI: return 2'd0;
      default:  return 2'd2;
    endcase
  endfunction

  // DRAM commands issued by the controller.
  typedef enum logic [1:0] {
    CMD_NOP = 2'd0,
    CMD_ACT = 2'd1,
    CMD_PRE = 2'd2,  // precharge all active banks
    CMD_WR  = 2'd3   // NPE array drives its bank's bitlines
  } dram_cmd_e;

  // One CIDAN-XE instruction: an operation on one 4-bit segment of every
  // NPE lane of the four banks of one bank group.
  typedef struct packed {
    npe_op_e     op;
    logic        chain;   // continue carry / comparison from the previous instruction
    logic [1:0]  group;   // bank group: banks 4*group .. 4*group+3
    logic [15:0] row_x;
    logic [15:0] row_y;
    logic [15:0] row_z;
    logic [15:0] row_dst;
  } instr_t;

  // Neighbour index i (0..2) of AN n is AN (n+1+i) mod 4 of the same NPE.
  // Returns the mux source code that reads AN j from AN n (j != n).
  function automatic logic [SEL_W-1:0] src_an(int unsigned n, int unsigned j);
    return SRC_NBR0 + SEL_W'((j + NEURONS - n - 1) % NEURONS);
  endfunction

  function automatic logic [SEL_W-1:0] src_reg(int unsigned bitpos);
    return SRC_REG0 + SEL_W'(bitpos);
  endfunction

endpackage
