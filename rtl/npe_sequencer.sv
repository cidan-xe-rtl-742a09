// npe_sequencer: issues the per-cycle control word that makes every NPE of
// the chip run one operation on a 4-bit operand segment.
//
// All NPEs share this word (SIMD). Before an operation starts, X is in
// nibble 0, Y in nibble 1 and Z in nibble 2 of every neuron's local register.
// The schedules (neuron AN0..AN3, x_t is bit t of X):
//   NOT/AND/OR/NAND/NOR/MAJ  1 cycle: AN k computes bit k with one threshold
//        function (AND T=2, OR T=1, MAJ T=2 on x,y,z; NOT/NAND/NOR use
//        inverted inputs).
//   XOR  2 cycles: AN k computes x&y, then x + y + 2*~(x&y) >= 3.
//   ADD  ripple carry, 5 evaluation cycles plus 1 store cycle: AN2 makes
//        carry c_t = [x_t + y_t + c_(t-1) >= 2] in cycles 0..3; AN3 copies
//        AN2 one cycle late; AN1 makes sum s_(t-1) = [x + y + c_(t-2) +
//        2*~c_(t-1) >= 3] in cycles 1..4 and writes it into bits 12..15 of
//        its register. With chain=1 the carry left in AN2 by the previous ADD
//        is the carry in; otherwise it is 0.
//   CARRY 1 cycle: the carry left in AN2 goes to AN0, the others give 0.
//   CMP  4 cycles on AN0: g_(t+1) = [x_t + ~y_t + g_t >= 2], giving X>Y;
//        chain=1 continues g from the previous CMP (lower segments first).
//   RELU CMP, then 1 cycle AN k: x_k & g  (X if X>Y else 0).
//   SEL  4 cycles, X if g else Y: g is copied to every AN and stored in
//        bit 15, then x&g (stored in bit 14), then y&~g, then their OR.
//        chain=0 takes g from AN0 (a CMP just ran); chain=1 from bit 15 (a
//        SEL just ran), so a multi-segment maximum is one CMP chain and one
//        SEL per segment.
//   MUL  48 cycles, the 8-bit product of X and Y, shift and add: for
//        i = 0..3 AN3 forms P_i = X & y_i bit by bit and AN0..AN2 copy it
//        into register bits 0..3 (for i = 0 straight into bits 8..11, the
//        accumulator, after clearing it). For i >= 1, accumulator bits
//        8+i..11+i plus P_i go through the ADD pipeline: carry on AN2 (AN0
//        when i = 2), buffer on AN3, sum on AN1, which writes the new bits
//        and the carry out (bit 12+i) back; the remaining neuron copies them
//        one cycle later, so the next carry neuron holds them too. The
//        product ends in AN1 bits 8..15: MUL writes back the low nibble,
//        MULHI (no operands, one idle cycle) the high nibble.
// Interface: start/op/chain are taken when busy is low; done is high during
// the last control cycle; wb tells the NPEs where the result is and stays
// valid until the next start. The single-neuron bitwise functions, the
// adder and comparator equations, their cycle counts, the neuron roles of
// the adder and building a product from AND-ed partial products and
// additions follow the source design; the neuron holding the comparator
// result, the store step, the SEL schedule, the chaining and the MUL
// schedule (48 cycles where the source design takes 21 with its own
// register routing) are this design's own.
module npe_sequencer
  import cidan_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  npe_op_e   op,
  input  logic      chain,
  output logic      busy,
  output logic      done,
  output npe_ctrl_t ctrl,
  output wb_sel_t   wb
);

  npe_op_e    op_r;
  logic       chain_r;
  logic [5:0] step;
  logic [5:0] last;

  // MUL: iteration 0 takes 6 steps, iterations 1..3 take 14 each
  localparam int unsigned MUL_LEN = 6 + 3 * 14;

  function automatic logic [5:0] op_len(npe_op_e o);
    case (o)
      OP_XOR:  return 6'd2;
      OP_ADD:  return 6'd6;
      OP_CMP:  return 6'd4;
      OP_RELU: return 6'd5;
      OP_SEL:  return 6'd4;
      OP_MUL:  return 6'(MUL_LEN);
      default: return 6'd1;
    endcase
  endfunction

  function automatic an_ctrl_t idle();
    an_ctrl_t c;
    c.sel   = '{default: SRC_ZERO};
    c.inv   = '0;
    c.thr   = 2'd1;
    c.en    = 1'b0;
    c.rop   = ROP_HOLD;
    c.raddr = '0;
    return c;
  endfunction

  // An evaluation with inputs a, b, c, d, their inversions and threshold t.
  function automatic an_ctrl_t eval(logic [SEL_W-1:0] a, logic [SEL_W-1:0] b,
                                    logic [SEL_W-1:0] c, logic [SEL_W-1:0] d,
                                    logic [3:0] inv, logic [1:0] t);
    an_ctrl_t r;
    r     = idle();
    r.sel = {d, c, b, a};
    r.inv = inv;
    r.thr = t;
    r.en  = 1'b1;
    return r;
  endfunction

  function automatic an_ctrl_t zero_out();
    return eval(SRC_ZERO, SRC_ZERO, SRC_ZERO, SRC_ZERO, 4'b0000, 2'd1);
  endfunction

  function automatic an_ctrl_t wrq(an_ctrl_t c, int unsigned addr);
    an_ctrl_t r;
    r       = c;
    r.rop   = ROP_WRQ;
    r.raddr = 4'(addr);
    return r;
  endfunction

  always_comb begin
    ctrl = '{default: idle()};
    if (busy) begin
      case (op_r)
        OP_NOT:  for (int k = 0; k < 4; k++)
                   ctrl[k] = eval(src_reg(k), SRC_ZERO, SRC_ZERO, SRC_ZERO, 4'b0001, 2'd1);
        OP_AND:  for (int k = 0; k < 4; k++)
                   ctrl[k] = eval(src_reg(k), src_reg(4+k), SRC_ZERO, SRC_ZERO, 4'b0000, 2'd2);
        OP_OR:   for (int k = 0; k < 4; k++)
                   ctrl[k] = eval(src_reg(k), src_reg(4+k), SRC_ZERO, SRC_ZERO, 4'b0000, 2'd1);
        OP_NAND: for (int k = 0; k < 4; k++)
                   ctrl[k] = eval(src_reg(k), src_reg(4+k), SRC_ZERO, SRC_ZERO, 4'b0011, 2'd1);
        OP_NOR:  for (int k = 0; k < 4; k++)
                   ctrl[k] = eval(src_reg(k), src_reg(4+k), SRC_ZERO, SRC_ZERO, 4'b0011, 2'd2);
        OP_MAJ:  for (int k = 0; k < 4; k++)
                   ctrl[k] = eval(src_reg(k), src_reg(4+k), src_reg(8+k), SRC_ZERO, 4'b0000, 2'd2);
        OP_XOR:  for (int k = 0; k < 4; k++)
                   if (step == 6'd0)
                     ctrl[k] = eval(src_reg(k), src_reg(4+k), SRC_ZERO, SRC_ZERO, 4'b0000, 2'd2);
                   else
                     ctrl[k] = eval(src_reg(k), src_reg(4+k), SRC_ZERO, SRC_FB, 4'b1000, 2'd3);
        OP_ADD: begin
          if (step <= 6'd3) begin
            // carry on AN2, carry copy on AN3
            ctrl[2] = eval(src_reg(int'(step)), src_reg(4 + int'(step)),
                           (step == 6'd0 && !chain_r) ? SRC_ZERO : SRC_FB,
                           SRC_ZERO, 4'b0000, 2'd2);
            ctrl[3] = eval((step == 6'd0 && !chain_r) ? SRC_ZERO : src_an(3, 2),
                           SRC_ZERO, SRC_ZERO, SRC_ZERO, 4'b0000, 2'd1);
          end
          if (step >= 6'd1 && step <= 6'd4)
            ctrl[1] = eval(src_reg(int'(step) - 1), src_reg(int'(step) + 3),
                           src_an(1, 3), src_an(1, 2), 4'b1000, 2'd3);
          if (step >= 6'd2)
            ctrl[1] = wrq(ctrl[1], 12 + int'(step) - 2);
        end
        OP_CARRY: begin
          ctrl[0] = eval(src_an(0, 2), SRC_ZERO, SRC_ZERO, SRC_ZERO, 4'b0000, 2'd1);
          for (int k = 1; k < 4; k++) ctrl[k] = zero_out();
        end
        OP_CMP, OP_RELU: begin
          if (step <= 6'd3) begin
            ctrl[0] = eval(src_reg(int'(step)), src_reg(4 + int'(step)),
                           (step == 6'd0 && !chain_r) ? SRC_ZERO : SRC_FB,
                           SRC_ZERO, 4'b0010, 2'd2);
            if (step == 6'd0)
              for (int k = 1; k < 4; k++) ctrl[k] = zero_out();
          end else begin
            for (int k = 0; k < 4; k++)
              ctrl[k] = eval(src_reg(k), (k == 0) ? SRC_FB : src_an(k, 0),
                             SRC_ZERO, SRC_ZERO, 4'b0000, 2'd2);
          end
        end
        OP_SEL: for (int k = 0; k < 4; k++)
          case (step)
            6'd0: ctrl[k] = eval(chain_r ? src_reg(15) : ((k == 0) ? SRC_FB : src_an(k, 0)),
                                 SRC_ZERO, SRC_ZERO, SRC_ZERO, 4'b0000, 2'd1);
            6'd1: ctrl[k] = wrq(eval(src_reg(k), SRC_FB, SRC_ZERO, SRC_ZERO, 4'b0000, 2'd2), 15);
            6'd2: ctrl[k] = wrq(eval(src_reg(4+k), src_reg(15), SRC_ZERO, SRC_ZERO, 4'b0010, 2'd2), 14);
            default: ctrl[k] = eval(SRC_FB, src_reg(14), SRC_ZERO, SRC_ZERO, 4'b0000, 2'd1);
          endcase
        OP_MUL: begin
          int unsigned i, u, a, cn, kn;
          if (int'(step) < 6) begin
            i = 0; u = int'(step);
          end else begin
            i = 1 + (int'(step) - 6) / 14; u = (int'(step) - 6) % 14;
          end
          if (u < 6) begin
            // partial product P_i = X & y_i on AN3, copied into AN0..AN2
            if (u <= 3)
              ctrl[3] = eval(src_reg(u), src_reg(4 + i), SRC_ZERO, SRC_ZERO, 4'b0000, 2'd2);
            for (int k = 0; k < 3; k++) begin
              if (u >= 1 && u <= 4)
                ctrl[k] = eval(src_an(k, 3), SRC_ZERO, SRC_ZERO, SRC_ZERO, 4'b0000, 2'd1);
              if (u >= 2)
                ctrl[k] = wrq(ctrl[k], ((i == 0) ? 8 : 0) + u - 2);
              if (i == 0 && u == 0) ctrl[k].rop = ROP_CLR;
            end
          end else begin
            // accumulator bits i..i+3 plus P_i, ripple carry as in ADD
            a  = u - 6;
            cn = (i == 2) ? 0 : 2;  // carry neuron
            kn = (i == 2) ? 2 : 0;  // neuron keeping a copy of the sum
            if (a <= 3) begin
              ctrl[cn] = eval(src_reg(8 + i + a), src_reg(a), (a == 0) ? SRC_ZERO : SRC_FB,
                              SRC_ZERO, 4'b0000, 2'd2);
              ctrl[3]  = eval((a == 0) ? SRC_ZERO : src_an(3, cn), SRC_ZERO, SRC_ZERO, SRC_ZERO,
                              4'b0000, 2'd1);
            end
            if (a >= 1 && a <= 4)
              ctrl[1] = eval(src_reg(8 + i + a - 1), src_reg(a - 1), src_an(1, 3), src_an(1, cn),
                             4'b1000, 2'd3);
            if (a == 5)
              ctrl[1] = eval(src_an(1, cn), SRC_ZERO, SRC_ZERO, SRC_ZERO, 4'b0000, 2'd1);
            if (a >= 2 && a <= 6)
              ctrl[1] = wrq(ctrl[1], 8 + i + a - 2);
            if (a >= 2 && a <= 6)
              ctrl[kn] = eval(src_an(kn, 1), SRC_ZERO, SRC_ZERO, SRC_ZERO, 4'b0000, 2'd1);
            if (a >= 3)
              ctrl[kn] = wrq(ctrl[kn], 8 + i + a - 3);
          end
        end
        default: ;
      endcase
    end
  end

  assign last = op_len(op_r) - 6'd1;
  assign done = busy && (step == last);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      step    <= '0;
      op_r    <= OP_NOT;
      chain_r <= 1'b0;
    end else if (!busy) begin
      if (start) begin
        busy    <= 1'b1;
        step    <= '0;
        op_r    <= op;
        chain_r <= chain;
      end
    end else if (step == last) begin
      busy <= 1'b0;
    end else begin
      step <= step + 6'd1;
    end
  end

  always_comb begin
    wb      = '{src: WB_Q, an: 2'd0, slot: 2'd0};
    case (op_r)
      OP_ADD:   wb = '{src: WB_REG, an: 2'd1, slot: 2'd3};
      OP_MUL:   wb = '{src: WB_REG, an: 2'd1, slot: 2'd2};
      OP_MULHI: wb = '{src: WB_REG, an: 2'd1, slot: 2'd3};
      default:  ;
    endcase
  end

endmodule
