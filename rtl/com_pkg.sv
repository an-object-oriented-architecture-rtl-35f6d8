// com_pkg: types and constants shared by the object machine's blocks.
//
// Every memory word is 32 data bits plus a 4-bit tag naming its primitive
// type (uninitialized, small integer, floating point, atom, instruction,
// object pointer). Inside the context cache a word also carries a 16-bit
// class: the tag zero-extended for primitives, the object's class for
// object pointers. Instructions are 32 bits: a return bit, a 6-bit opcode
// and zero to three operand descriptors (formats R|O<6>|A<7>|B<7>|C<11>,
// R|O<6>|A<7>|B<18>, R|O<6>|A<25> and R|O<31>).
//
// Taken from the architecture: the word, tag and class sizes, the list of
// tag kinds, the four instruction formats, the four pointer registers of
// the pointer-relative mode, the 32-word context whose first two words are
// the return context pointer and the return instruction pointer, and the
// list of primitive operations. Chosen here: the numeric tag encoding, the
// way the opcode's top two bits give the operand count, the bit layout of
// the operand modes and the numbering of the primitive operations.
//
// Some constants here (context word numbers, field widths) describe the
// formats and are not referenced by every block.
package com_pkg;

  localparam int WORD_W  = 32;
  localparam int TAG_W   = 4;
  localparam int CLASS_W = 16;
  localparam int OPC_W   = 6;
  localparam int OPK_W   = 31;   // width of the opcode part of an ITLB key
  localparam int CTX_WORDS = 32; // words per context

  typedef enum logic [TAG_W-1:0] {
    TAG_UNINIT   = 4'd0,
    TAG_SMALLINT = 4'd1,
    TAG_FLOAT    = 4'd2,
    TAG_ATOM     = 4'd3,
    TAG_INSTR    = 4'd4,
    TAG_OBJPTR   = 4'd5
  } tag_e;

  // A tagged memory word (36 bits).
  typedef struct packed {
    tag_e              tag;
    logic [WORD_W-1:0] data;
  } mword_t;

  // A word as the processor handles it: tag, class and data.
  typedef struct packed {
    tag_e               tag;
    logic [CLASS_W-1:0] cls;
    logic [WORD_W-1:0]  data;
  } oword_t;

  // Pointer register selected by the pointer-relative addressing mode.
  typedef enum logic [1:0] {
    PSEL_CP  = 2'd0,
    PSEL_NCP = 2'd1,
    PSEL_P1  = 2'd2,
    PSEL_P2  = 2'd3
  } psel_e;

  // Fixed locations within a context. P1 and P2 are the third and fourth
  // words, which in the Smalltalk mapping hold arg0 (result pointer) and
  // arg1 (receiver).
  localparam logic [4:0] CTX_RCP  = 5'd0;
  localparam logic [4:0] CTX_RIP  = 5'd1;
  localparam logic [4:0] CTX_ARG0 = 5'd2;
  localparam logic [4:0] CTX_ARG1 = 5'd3;
  localparam logic [4:0] CTX_ARG2 = 5'd4;

  // Decoded operand descriptor.
  typedef enum logic [1:0] {
    OPND_NONE = 2'd0,
    OPND_PTR  = 2'd1,
    OPND_IMM  = 2'd2,
    OPND_BAD  = 2'd3
  } opnd_kind_e;

  typedef struct packed {
    opnd_kind_e        kind;
    psel_e             psel;
    logic [21:0]       offset;  // word offset from the selected pointer
    logic [WORD_W-1:0] imm;     // constant, tagged small integer
  } opnd_t;

  // Primitive operations performed by the function units. An ITLB entry
  // with the primitive bit set carries one of these in its method field.
  typedef enum logic [5:0] {
    P_ADD    = 6'd0,
    P_SUB    = 6'd1,
    P_MUL    = 6'd2,
    P_DIV    = 6'd3,
    P_MOD    = 6'd4,
    P_NEG    = 6'd5,
    P_CARRY  = 6'd6,
    P_MULT1  = 6'd7,
    P_MULT2  = 6'd8,
    P_SHIFT  = 6'd9,
    P_ASHIFT = 6'd10,
    P_ROTATE = 6'd11,
    P_MASK   = 6'd12,
    P_AND    = 6'd13,
    P_OR     = 6'd14,
    P_NOT    = 6'd15,
    P_XOR    = 6'd16,
    P_LT     = 6'd17,
    P_EQ     = 6'd18,
    P_EQZ    = 6'd19,
    P_SAME   = 6'd20,
    P_MOVE   = 6'd21,
    P_AS     = 6'd22,
    P_TAG    = 6'd23,
    P_FJMP   = 6'd24,
    P_RJMP   = 6'd25,
    P_XFER   = 6'd26
  } prim_e;

  // Reasons the processor stops and waits for software.
  typedef enum logic [2:0] {
    TR_NONE      = 3'd0,
    TR_ITLB_MISS = 3'd1,  // no ITLB entry: method lookup needed
    TR_ATLB_MISS = 3'd2,  // no cached segment descriptor
    TR_BOUNDS    = 3'd3,  // offset beyond the segment length
    TR_CTX_FULL  = 3'd4,  // no free context (cache or free list)
    TR_CTX_MISS  = 3'd5,  // returning context not in the context cache
    TR_OPERAND   = 3'd6,  // operand descriptor the hardware cannot use
    TR_PRIM_ERR  = 3'd7   // primitive failed (zero divisor, privilege)
  } trap_e;

  // One-cycle event strobes, for monitoring.
  typedef struct packed {
    logic instr;      // instruction completed
    logic prim;       // primitive method executed
    logic call;       // method call started
    logic tail;       // call made with the return bit set (tail call)
    logic xfer;       // transfer to the next context
    logic ret;        // return to the calling context
    logic jump;       // jump taken (after its delay slot)
    logic icmiss;     // instruction cache miss
    logic itlbmiss;   // ITLB miss trap
    logic prel_ctx;   // P1/P2-relative access served by the context cache
    logic prel_mem;   // P1/P2-relative access served by memory
    logic alloc;      // context allocated
  } events_t;

  // Class of a primitive word: its tag zero-extended.
  function automatic logic [CLASS_W-1:0] tag_class(tag_e t);
    return {{(CLASS_W-TAG_W){1'b0}}, t};
  endfunction

endpackage
