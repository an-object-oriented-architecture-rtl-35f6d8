// operand_decode: instruction field and operand descriptor decoder.
//
// Splits a 32-bit instruction into its return bit, opcode, operand count
// and up to three operand descriptors, and expands each descriptor into
// either a pointer-relative reference (pointer CP, NCP, P1 or P2 plus a
// positive word offset) or a constant tagged as a small integer.
//
// Formats (bit 31 is always R, the return bit):
//   3 operands  R | O<6> | A<7> | B<7> | C<11>
//   2 operands  R | O<6> | A<7> | B<18>
//   1 operand   R | O<6> | A<25>
//   0 operands  R | O<31>
// The operand count is the opcode's top two bits (00 = none). A zero
// operand instruction's 31-bit field is its message name; its bits 28:27
// say how many locals of the next context (arg1, arg2) act as operands.
// The ITLB key's opcode part is the 31-bit field for zero-operand
// instructions and the 6-bit opcode followed by zeros otherwise.
//
// Descriptors other than the last are 7 bits, always pointer relative:
// pointer select [6:5], offset [4:0]. The last descriptor (width V) uses:
//   0 s s o...o   pointer relative, select [V-2:V-3], offset below
//   1 0 i...i     short integer, two's complement, sign extended to 32 bits
//   1 1 . . .     bit field, start [9:5] and stop [4:0]; the constant is a
//                 mask with bits min(start,stop)..max(start,stop) set
//                 (needs V >= 12, so not available in the 3-operand format,
//                 where this code is reported as a bad operand)
// In the 2-operand format an 18-bit B with bit 17 set is a half word:
// bit 16 selects the high (1) or low (0) half and bits 15:0 are the
// constant, the other half being zero; with bit 17 clear, bits 16:0 are a
// descriptor as above.
//
// From the architecture: the formats and field widths, the four modes,
// the four pointers, immediates only in the last descriptor, half words
// only in two-operand instructions. Chosen here: every bit-level encoding
// above. Purely combinational.
module operand_decode
  import com_pkg::*;
(
  input  logic [31:0] instr,
  output logic        ret_bit,
  output logic [5:0]  opcode,
  output logic [1:0]  nops,      // number of operands in the instruction word
  output logic [1:0]  nargs0,    // next-context locals used by a 0-operand instruction
  output logic [OPK_W-1:0] opkey,
  output opnd_t       opa,
  output opnd_t       opb,
  output opnd_t       opc
);
  // Pointer-relative descriptor from select bits and an offset.
  function automatic opnd_t mk_ptr(logic [1:0] sel, logic [21:0] off);
    opnd_t o;
    o.kind   = OPND_PTR;
    o.psel   = psel_e'(sel);
    o.offset = off;
    o.imm    = '0;
    return o;
  endfunction

  function automatic opnd_t mk_imm(logic [31:0] v);
    opnd_t o;
    o.kind   = OPND_IMM;
    o.psel   = PSEL_CP;
    o.offset = '0;
    o.imm    = v;
    return o;
  endfunction

  function automatic logic [31:0] field_mask(logic [4:0] a, logic [4:0] b);
    logic [4:0]  lo, hi;
    logic [31:0] m;
    lo = (a < b) ? a : b;
    hi = (a < b) ? b : a;
    for (int i = 0; i < 32; i++) m[i] = (5'(i) >= lo) && (5'(i) <= hi);
    return m;
  endfunction

  // Last descriptor of width V held right-aligned in d.
  function automatic opnd_t dec_last(logic [24:0] d, int v);
    opnd_t o;
    logic [24:0] sx;
    if (d[v-1] == 1'b0) begin
      o = mk_ptr({d[v-2], d[v-3]}, 22'(d & ((25'd1 << (v-3)) - 25'd1)));
    end else if (d[v-2] == 1'b0) begin
      // short integer: bits v-3..0, sign bit v-3
      sx = d & ((25'd1 << (v-2)) - 25'd1);
      if (d[v-3]) sx = sx | ~((25'd1 << (v-2)) - 25'd1);
      o = mk_imm({{7{sx[24]}}, sx});
    end else if (v >= 12) begin
      o = mk_imm(field_mask(d[9:5], d[4:0]));
    end else begin
      o = mk_imm('0);
      o.kind = OPND_BAD;
    end
    return o;
  endfunction

  opnd_t none;
  assign none = '{kind: OPND_NONE, psel: PSEL_CP, offset: '0, imm: '0};

  assign ret_bit = instr[31];
  assign opcode  = instr[30:25];
  assign nops    = instr[30:29];
  assign nargs0  = (instr[30:29] == 2'd0) ? instr[28:27] : 2'd0;
  assign opkey   = (instr[30:29] == 2'd0) ? instr[30:0] : {instr[30:25], 25'd0};

  always_comb begin
    opa = none;
    opb = none;
    opc = none;
    unique case (instr[30:29])
      2'd3: begin
        opa = mk_ptr(instr[24:23], 22'(instr[22:18]));
        opb = mk_ptr(instr[17:16], 22'(instr[15:11]));
        opc = dec_last(25'(instr[10:0]), 11);
      end
      2'd2: begin
        opa = mk_ptr(instr[24:23], 22'(instr[22:18]));
        if (instr[17])
          opb = mk_imm(instr[16] ? {instr[15:0], 16'd0} : {16'd0, instr[15:0]});
        else
          opb = dec_last(25'(instr[16:0]), 17);
      end
      2'd1: opa = dec_last(instr[24:0], 25);
      default: ;
    endcase
  end
endmodule
