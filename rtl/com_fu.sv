// com_fu: primitive function units.
//
// Performs the primitive methods selected by an ITLB hit with the
// primitive bit set. Operands arrive as tagged words with their classes;
// the ITLB has already established that the operand classes suit the
// operation, so the units do no type checks of their own. src1 is the
// first source operand (B of a 2- or 3-operand instruction, A of a
// 1-operand one) and src2 the second (C; for a 2-operand jump, the
// condition read from operand A).
//
// Operations (all on 32-bit small integers unless noted):
//   + - * / modulo negate; / truncates toward zero, modulo takes the sign
//   of the divisor; a zero divisor raises err; the most negative value
//   divided by -1 wraps to itself.
//   carry (carry out of the unsigned sum), mult1/mult2 (low/high word of
//   the unsigned 64-bit product): multiple precision without flags.
//   shift, arithmetic shift (left for a positive count, right for a
//   negative one), rotate (left by count mod 32), mask (extract the field
//   src2 marks: (src1 & src2) shifted down to bit 0), and, or, not, xor.
//   < = =0 give small integer 1 or 0; == (same object) compares tag and
//   data of any two words.
//   move copies a word of any type; as re-tags src1 with the tag in
//   src2's low bits, privileged when the new tag is an object pointer;
//   tag returns src1's tag as a small integer.
//   fjmp/rjmp jump forward/back by src1 words; with a second operand the
//   jump is taken only if that operand is non-zero. xfer transfers to the
//   next context (the processor carries it out).
// Purely combinational; the processor gives it a whole step.
//
// From the architecture: the list of primitives and which exist for small
// integers. Chosen here: everything about their exact results listed
// above, booleans as small integers 1/0, conditional jumps. Floating point
// arithmetic is not implemented: no float format is given, and an ITLB
// entry without the primitive bit sends such operations to a method.
//
// Lint note: src2's class bits and the low bits of the widened sum are
// not needed by any operation (only the carry is taken from the sum).
module com_fu
  import com_pkg::*;
(
  input  prim_e       op,
  input  oword_t      src1,
  input  oword_t      src2,
  input  logic        has_src2,
  input  logic        priv,       // process status: privileged
  output oword_t      res,
  output logic        has_res,
  output logic        jump,
  output logic signed [31:0] jump_dist, // signed word displacement
  output logic        xfer,
  output logic        err
);
  logic signed [31:0] a, b;
  logic [63:0]        uprod;
  logic [32:0]        usum;
  logic signed [31:0] q, r;
  logic [31:0]        amt_l, amt_r;
  logic [4:0]         lsb;

  assign a     = signed'(src1.data);
  assign b     = signed'(src2.data);
  assign uprod = {32'd0, src1.data} * {32'd0, src2.data};
  assign usum  = {1'b0, src1.data} + {1'b0, src2.data};
  assign amt_l = (b >= 0) ? unsigned'(b) : '0;
  assign amt_r = (b < 0) ? unsigned'(-b) : '0;

  always_comb begin
    q = '0;
    r = '0;
    if (b == -1) begin
      // -x, wrapping for the most negative value; remainder zero
      q = -a;
    end else if (b != 0) begin
      q = a / b;
      r = a % b;
      if (r != 0 && ((r < 0) != (b < 0))) r = r + b;
    end
  end

  always_comb begin
    lsb = '0;
    for (int i = 31; i >= 0; i--) if (src2.data[i]) lsb = 5'(i);
  end

  function automatic oword_t si(logic [31:0] v);
    return '{tag: TAG_SMALLINT, cls: tag_class(TAG_SMALLINT), data: v};
  endfunction

  always_comb begin
    res       = si('0);
    has_res   = 1'b1;
    jump      = 1'b0;
    jump_dist = '0;
    xfer      = 1'b0;
    err       = 1'b0;
    unique case (op)
      P_ADD:    res = si(a + b);
      P_SUB:    res = si(a - b);
      P_MUL:    res = si(uprod[31:0]);
      P_DIV:    begin res = si(q); err = (b == 0); end
      P_MOD:    begin res = si(r); err = (b == 0); end
      P_NEG:    res = si(-a);
      P_CARRY:  res = si({31'd0, usum[32]});
      P_MULT1:  res = si(uprod[31:0]);
      P_MULT2:  res = si(uprod[63:32]);
      P_SHIFT:  res = si((amt_l >= 32 || amt_r >= 32) ? 32'd0 :
                         (b >= 0) ? (src1.data << amt_l) : (src1.data >> amt_r));
      P_ASHIFT: res = si((b >= 0) ? ((amt_l >= 32) ? 32'd0 : (src1.data << amt_l))
                                  : ((amt_r >= 32) ? {32{a[31]}} : unsigned'(a >>> amt_r)));
      P_ROTATE: res = si((src1.data << src2.data[4:0]) |
                         ((src2.data[4:0] == 5'd0) ? 32'd0 : (src1.data >> (6'd32 - {1'b0, src2.data[4:0]}))));
      P_MASK:   res = si((src1.data & src2.data) >> lsb);
      P_AND:    res = si(src1.data & src2.data);
      P_OR:     res = si(src1.data | src2.data);
      P_NOT:    res = si(~src1.data);
      P_XOR:    res = si(src1.data ^ src2.data);
      P_LT:     res = si({31'd0, a < b});
      P_EQ:     res = si({31'd0, a == b});
      P_EQZ:    res = si({31'd0, a == 0});
      P_SAME:   res = si({31'd0, (src1.tag == src2.tag) && (src1.data == src2.data)});
      P_MOVE:   res = src1;
      P_AS: begin
        res = '{tag: tag_e'(src2.data[TAG_W-1:0]), cls: tag_class(tag_e'(src2.data[TAG_W-1:0])),
                data: src1.data};
        err = (tag_e'(src2.data[TAG_W-1:0]) == TAG_OBJPTR) && !priv;
      end
      P_TAG:    res = si({28'd0, src1.tag});
      P_FJMP, P_RJMP: begin
        has_res   = 1'b0;
        jump      = !has_src2 || (src2.data != '0);
        jump_dist = (op == P_FJMP) ? a : -a;
      end
      P_XFER: begin
        has_res = 1'b0;
        xfer    = 1'b1;
      end
      default: begin
        has_res = 1'b0;
        err     = 1'b1;
      end
    endcase
  end
endmodule
