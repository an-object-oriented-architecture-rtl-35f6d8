// com_core: the object machine's processor.
//
// There are no general registers: every operand is a word of a context
// (through CP or NCP), a field of an object (through the pointers P1 and
// P2 held in the current context) or a constant. Opcodes are abstract:
// after the operands are read, {opcode, class of operand 1, class of
// operand 2} is looked up in the ITLB, which either names a primitive
// operation for the function units or gives the address of a method to
// call. The processor state is CP, NCP, FP (inside context_alloc), IP, SN
// (team space number) and PS (here one privilege bit); CP and NCP are kept
// as absolute addresses, pre-translated.
//
// Interpretation of one instruction, as a sequence of steps:
//   1 fetch     the instruction cache is read at IP (a miss reads memory)
//   2 read      source operands: CP/NCP words from the context cache's two
//               read ports in one cycle; constants from the descriptor;
//               P1/P2-relative words by reading the pointer from the
//               current context, translating it in the ATLB, then offering
//               the absolute address to the context cache and, on a miss,
//               to memory (several cycles: a stall)
//   3 translate the ITLB maps opcode and operand classes to a primitive or
//               a method; a miss traps so software can do the lookup
//   4 operate   the function units compute the primitive's result
//   5 store     the result goes to the destination operand; IP advances
// Jumps are delayed by one instruction: the instruction after a taken
// jump is executed before control reaches the target.
//
// Method call (step 3 finds no primitive): IP+1 is stored as the current
// context's RIP; the next context becomes current (CP <- NCP); IP is set
// to the method; for 1- to 3-operand instructions the operands are copied
// into the new context (arg0 = the destination's address as a result
// pointer, arg1, arg2 = the sources), one cycle each; then a new next
// context is allocated from the free list, claimed in the context cache
// (cleared in one step) and its word 0 (RCP) set to the new CP. A call
// with the return bit set is a tail call: the new context takes over the
// old one's RCP and the old context is freed. An instruction with the
// return bit set returns after it completes: CP <- RCP through the
// context cache directory, the returning context becomes the next context
// (its RCP rewritten), the unused next context is freed and IP is reloaded
// from the caller's RIP. A return to RCP = 0 halts the processor. The xfer
// primitive transfers to the next context at the address in its RIP word.
//
// Interfaces: one memory port (request held until ack, 36-bit tagged
// words) shared by instruction fetch, P1/P2 data and the free list; fill
// ports for the ITLB and ATLB; a trap output with the cause, the ITLB key
// or virtual address concerned, and a resume input that retries the step
// that trapped once software has serviced it.
//
// From the architecture: the five steps, the register set, the operand
// modes and pointers, the ITLB key, the call and return sequences
// including the copying of operands, tail calls, result pointers, delayed
// jumps and the pre-translated pointers. This design's own choices: the
// steps run one after another instead of overlapping (one instruction
// takes 5 or more cycles rather than the pipelined 2), the trap and
// resume interface, contexts being named by a virtual address whose
// mantissa is their absolute address under exponent CTX_EXP (software maps
// that segment one to one), contexts aligned on 32 words, the RIP holding
// the absolute instruction address, and halting on a return to RCP = 0.
//
// Unused-signal lint notes: the context cache access vectors, the allocator's
// busy flag and FP, the second read port's hit flag and some bits of
// decoded words are outputs of shared blocks that this sequencer does not
// need; they are left unconnected in effect on purpose.
module com_core
  import com_pkg::*;
#(
  parameter int ITLB_ENTRIES = 512,
  parameter int ITLB_WAYS    = 2,
  parameter int IC_LINES     = 4096,
  parameter int IC_WAYS      = 2,
  parameter int ATLB_ENTRIES = 8,
  parameter int CC_BLOCKS    = 32,
  parameter int MANT_W       = 27,
  parameter int EXP_W        = 5,
  parameter int SN_W         = 8,
  parameter int ABS_W        = 32,
  parameter logic [EXP_W-1:0]   CTX_EXP   = 5'd16,
  parameter logic [CLASS_W-1:0] CTX_CLASS = 16'h0010
) (
  input  logic               clk,
  input  logic               rst_n,
  // start-up state
  input  logic [ABS_W-1:0]   boot_ip,
  input  logic [ABS_W-1:0]   boot_fp,
  input  logic [SN_W-1:0]    boot_sn,
  input  logic               boot_priv,
  // memory system
  output logic               mem_req,
  output logic               mem_we,
  output logic [ABS_W-1:0]   mem_addr,
  output mword_t             mem_wdata,
  input  mword_t             mem_rdata,
  input  logic               mem_ack,
  // ITLB fill (method lookup done by software)
  input  logic               itlb_fill_en,
  input  logic [OPK_W+2*CLASS_W-1:0] itlb_fill_key,
  input  logic               itlb_fill_prim,
  input  logic [31:0]        itlb_fill_method,
  input  logic               itlb_inval,
  // ATLB fill (segment descriptor table walk done by software)
  input  logic               atlb_fill_en,
  input  logic [EXP_W-1:0]   atlb_fill_exp,
  input  logic [MANT_W-1:0]  atlb_fill_seg,
  input  logic [ABS_W-1:0]   atlb_fill_base,
  input  logic [MANT_W-1:0]  atlb_fill_length,
  input  logic [CLASS_W-1:0] atlb_fill_cls,
  // traps and status
  output logic               trap,
  output trap_e              trap_cause,
  output logic [OPK_W+2*CLASS_W-1:0] trap_key,
  output logic [31:0]        trap_va,
  input  logic               resume,
  output logic               halted,
  output logic [ABS_W-1:0]   ip_o,
  output logic [ABS_W-1:0]   cp_o,
  output logic [ABS_W-1:0]   ncp_o,
  output events_t            ev
);
  localparam int KEY_W = OPK_W + 2*CLASS_W;

  typedef enum logic [5:0] {
    S_BOOT, S_ALLOC, S_ALLOC_W, S_CC_ALLOC, S_WR_RCP,
    S_FETCH, S_IMEM, S_READ,
    S_PR_PTR, S_PR_XL, S_PR_CC, S_PR_MEM, S_PR_CLS, S_PR_CCW, S_PR_MEMW,
    S_ITLB, S_COND, S_EXEC, S_WRITE, S_NEXT,
    S_CALL, S_CALL_SAVE, S_CALL_SW, S_CALL_COPY, S_TAIL_WR, S_TAIL_FREE, S_TAIL_FW,
    S_XFER,
    S_RET0, S_RET1, S_RET_FREE, S_RET_FW, S_RET_RCP, S_RET_RIP,
    S_TRAP, S_HALT
  } state_e;

  state_e st, trap_ret;

  // Processor registers.
  logic [ABS_W-1:0] ip, cp_abs, ncp_abs;
  logic [SN_W-1:0]  sn;
  logic             priv;
  logic [31:0]      ir;

  // Per-instruction working registers.
  oword_t           src [2];
  logic [1:0]       src_pend;
  oword_t           res_q;
  logic [1:0]       pr_idx;      // 0, 1: source being fetched; 2: destination
  logic [31:0]      pv;          // P1/P2-relative virtual address
  logic [ABS_W-1:0] pabs;        // its absolute address
  logic [31:0]      call_target;
  logic [31:0]      rp_va;       // result pointer for a call
  oword_t           tail_rcp;
  logic             is_tail, is_xfer;
  logic [1:0]       copy_k;
  logic [ABS_W-1:0] old_abs;
  logic             boot_done;
  logic             jslot;       // a taken jump's delay slot is executing
  logic             jnow;        // this instruction took a jump
  logic [ABS_W-1:0] jtarget;

  trap_e            cause_q;
  logic [KEY_W-1:0] key_q;
  logic [31:0]      va_q;

  // Context virtual address from an absolute address, and back.
  function automatic logic [31:0] ctx_va(logic [ABS_W-1:0] a);
    return {CTX_EXP, a[MANT_W-1:0]};
  endfunction
  function automatic logic [ABS_W-1:0] ctx_abs(logic [31:0] va);
    return ABS_W'(va[MANT_W-1:0]);
  endfunction
  function automatic oword_t ctx_ptr(logic [31:0] va);
    return '{tag: TAG_OBJPTR, cls: CTX_CLASS, data: va};
  endfunction

  // ---------------------------------------------------------------------
  // Decode
  logic             d_ret;
  logic [5:0]       d_opc;
  logic [1:0]       d_nops, d_nargs0;
  logic [OPK_W-1:0] d_opkey;
  opnd_t            d_a, d_b, d_c;

  operand_decode u_dec (
    .instr(ir), .ret_bit(d_ret), .opcode(d_opc), .nops(d_nops), .nargs0(d_nargs0),
    .opkey(d_opkey), .opa(d_a), .opb(d_b), .opc(d_c)
  );

  opnd_t src_d [2];
  logic  src_has [2];
  opnd_t dst_d;
  logic  dst_has;

  always_comb begin
    opnd_t nl;
    nl = '{kind: OPND_PTR, psel: PSEL_NCP, offset: 22'(CTX_ARG1), imm: '0};
    src_d[0] = d_b; src_d[1] = d_c; src_has[0] = 1'b0; src_has[1] = 1'b0;
    dst_d    = d_a; dst_has = 1'b0;
    unique case (d_nops)
      2'd3: begin src_has[0] = 1'b1; src_has[1] = 1'b1; dst_has = 1'b1; end
      2'd2: begin src_d[1] = d_a; src_has[0] = 1'b1; dst_has = 1'b1; end
      2'd1: begin src_d[0] = d_a; src_has[0] = 1'b1; dst_has = (d_a.kind == OPND_PTR); end
      default: begin
        src_d[0] = nl;
        src_d[1] = nl;
        src_d[1].offset = 22'(CTX_ARG2);
        src_has[0] = (d_nargs0 >= 2'd1);
        src_has[1] = (d_nargs0 >= 2'd2);
      end
    endcase
  end

  // ---------------------------------------------------------------------
  // Instruction cache
  logic        ic_hit;
  logic [31:0] ic_data;
  logic        ic_fill;

  icache #(.LINES(IC_LINES), .WAYS(IC_WAYS), .ADDR_W(ABS_W), .DATA_W(32)) u_icache (
    .clk, .rst_n, .lookup_en(st == S_FETCH), .addr(ip), .hit(ic_hit), .rdata(ic_data),
    .fill_en(ic_fill), .fill_addr(ip), .fill_data(mem_rdata.data), .inval_all(1'b0)
  );

  // ---------------------------------------------------------------------
  // ITLB
  logic [KEY_W-1:0] itlb_key;
  logic             itlb_hit, itlb_prim;
  logic [31:0]      itlb_method;

  assign itlb_key = {d_opkey,
                     src_has[0] ? src[0].cls : {CLASS_W{1'b0}},
                     src_has[1] ? src[1].cls : {CLASS_W{1'b0}}};

  itlb #(.ENTRIES(ITLB_ENTRIES), .WAYS(ITLB_WAYS), .OPK_W(OPK_W), .CLASS_W(CLASS_W), .METH_W(32)) u_itlb (
    .clk, .rst_n, .lookup_en(st == S_ITLB), .key(itlb_key), .hit(itlb_hit), .prim(itlb_prim),
    .method(itlb_method), .fill_en(itlb_fill_en), .fill_key(itlb_fill_key),
    .fill_prim(itlb_fill_prim), .fill_method(itlb_fill_method), .inval_all(itlb_inval)
  );

  // ---------------------------------------------------------------------
  // ATLB
  logic [31:0]        at_va;
  logic               at_hit, at_bounds;
  logic [ABS_W-1:0]   at_abs;
  logic [CLASS_W-1:0] at_cls;

  assign at_va = (st == S_PR_CLS) ? res_q.data : pv;

  atlb #(.ENTRIES(ATLB_ENTRIES), .MANT_W(MANT_W), .EXP_W(EXP_W), .SN_W(SN_W),
         .ABS_W(ABS_W), .CLASS_W(CLASS_W)) u_atlb (
    .clk, .rst_n, .sn(sn), .va(at_va), .hit(at_hit), .bounds_err(at_bounds),
    .abs_addr(at_abs), .cls(at_cls),
    .fill_en(atlb_fill_en), .fill_sn(sn), .fill_exp(atlb_fill_exp), .fill_seg(atlb_fill_seg),
    .fill_base(atlb_fill_base), .fill_length(atlb_fill_length), .fill_cls(atlb_fill_cls),
    .inval_all(1'b0)
  );

  // ---------------------------------------------------------------------
  // Function units
  oword_t             fu_res;
  logic               fu_has_res, fu_jump, fu_xfer, fu_err;
  logic signed [31:0] fu_dist;

  com_fu u_fu (
    .op(prim_e'(itlb_method[5:0])), .src1(src[0]), .src2(src[1]), .has_src2(src_has[1] || d_nops == 2'd2),
    .priv(priv), .res(fu_res), .has_res(fu_has_res), .jump(fu_jump), .jump_dist(fu_dist),
    .xfer(fu_xfer), .err(fu_err)
  );

  // ---------------------------------------------------------------------
  // Context cache
  logic [1:0]            cc_rd_en;
  logic [1:0][1:0]       cc_rd_sel;
  logic [1:0][4:0]       cc_rd_word;
  logic [1:0][ABS_W-1:0] cc_rd_abs;
  oword_t [1:0]          cc_rd_data;
  logic [1:0]            cc_rd_hit;
  logic                  cc_wr_en, cc_wr_hit;
  logic [1:0]            cc_wr_sel;
  logic [4:0]            cc_wr_word;
  logic [ABS_W-1:0]      cc_wr_abs;
  oword_t                cc_wr_data;
  logic                  cc_alloc, cc_alloc_fail, cc_call, cc_ret, cc_ret_miss, cc_free;
  logic [ABS_W-1:0]      cc_ret_abs, cc_free_abs;
  logic [CC_BLOCKS-1:0]  cc_cur, cc_nxt, cc_freev;

  localparam logic [1:0] CS_CUR = 2'd0, CS_NXT = 2'd1, CS_ABS = 2'd2;

  logic             al_init, al_alloc, al_free, al_busy, al_done, al_empty;
  logic [ABS_W-1:0] al_addr, al_fp, al_free_addr;

  context_cache #(.BLOCKS(CC_BLOCKS), .WORDS(CTX_WORDS), .ABS_W(ABS_W)) u_cc (
    .clk, .rst_n,
    .rd_en(cc_rd_en), .rd_sel(cc_rd_sel), .rd_word(cc_rd_word), .rd_abs(cc_rd_abs),
    .rd_data(cc_rd_data), .rd_hit(cc_rd_hit),
    .wr_en(cc_wr_en), .wr_sel(cc_wr_sel), .wr_word(cc_wr_word), .wr_abs(cc_wr_abs),
    .wr_data(cc_wr_data), .wr_hit(cc_wr_hit),
    .op_alloc(cc_alloc), .alloc_abs(al_addr), .alloc_fail(cc_alloc_fail),
    .op_call(cc_call), .op_ret(cc_ret), .ret_abs(cc_ret_abs), .ret_miss(cc_ret_miss),
    .op_free(cc_free), .free_abs(cc_free_abs),
    .cur_vec(cc_cur), .nxt_vec(cc_nxt), .free_vec(cc_freev)
  );

  // ---------------------------------------------------------------------
  // Context allocator (free list)
  logic             al_mem_req, al_mem_we;
  logic [ABS_W-1:0] al_mem_addr;
  mword_t           al_mem_wdata;

  context_alloc #(.ABS_W(ABS_W)) u_alloc (
    .clk, .rst_n, .init(al_init), .init_fp(boot_fp), .alloc_req(al_alloc),
    .free_req(al_free), .free_addr(al_free_addr), .busy(al_busy), .done(al_done),
    .empty(al_empty), .alloc_addr(al_addr), .fp(al_fp),
    .mem_req(al_mem_req), .mem_we(al_mem_we), .mem_addr(al_mem_addr),
    .mem_wdata(al_mem_wdata), .mem_rdata(mem_rdata), .mem_ack(mem_ack & al_mem_req)
  );

  // ---------------------------------------------------------------------
  // Combinational control
  opnd_t pr_d;
  assign pr_d = (pr_idx == 2'd2) ? dst_d : src_d[pr_idx[0]];

  // Word of the current context holding P1 or P2.
  function automatic logic [4:0] pword(psel_e p);
    return (p == PSEL_P1) ? CTX_ARG0 : CTX_ARG1;
  endfunction

  function automatic logic ctx_ok(opnd_t d);
    return d.kind == OPND_PTR && (d.psel == PSEL_CP || d.psel == PSEL_NCP) && d.offset < 22'd32;
  endfunction
  function automatic logic is_prel(opnd_t d);
    return d.kind == OPND_PTR && (d.psel == PSEL_P1 || d.psel == PSEL_P2);
  endfunction

  logic core_mem;
  always_comb begin
    core_mem  = (st == S_IMEM) || (st == S_PR_MEM) || (st == S_PR_MEMW);
    mem_req   = core_mem ? 1'b1 : al_mem_req;
    mem_we    = core_mem ? (st == S_PR_MEMW) : al_mem_we;
    mem_addr  = (st == S_IMEM) ? ip : (core_mem ? pabs : al_mem_addr);
    mem_wdata = core_mem ? '{tag: res_q.tag, data: res_q.data} : al_mem_wdata;
  end
  assign ic_fill = (st == S_IMEM) && mem_ack;

  always_comb begin
    cc_rd_en   = '0;
    cc_rd_sel  = '0;
    cc_rd_word = '0;
    cc_rd_abs  = '0;
    cc_wr_en   = 1'b0;
    cc_wr_sel  = CS_CUR;
    cc_wr_word = '0;
    cc_wr_abs  = '0;
    cc_wr_data = '0;
    cc_alloc   = 1'b0;
    cc_call    = 1'b0;
    cc_ret     = 1'b0;
    cc_ret_abs = '0;
    cc_free    = 1'b0;
    cc_free_abs = old_abs;
    unique case (st)
      S_READ: begin
        for (int k = 0; k < 2; k++)
          if (src_has[k] && ctx_ok(src_d[k])) begin
            cc_rd_en[k]   = 1'b1;
            cc_rd_sel[k]  = (src_d[k].psel == PSEL_CP) ? CS_CUR : CS_NXT;
            cc_rd_word[k] = src_d[k].offset[4:0];
          end
      end
      S_COND: begin
        cc_rd_en[0]   = 1'b1;
        cc_rd_sel[0]  = (dst_d.psel == PSEL_CP) ? CS_CUR : CS_NXT;
        cc_rd_word[0] = dst_d.offset[4:0];
      end
      S_PR_PTR, S_CALL: begin
        cc_rd_en[0]   = 1'b1;
        cc_rd_sel[0]  = CS_CUR;
        cc_rd_word[0] = pword((st == S_CALL) ? dst_d.psel : pr_d.psel);
      end
      S_PR_CC: begin
        cc_rd_en[0]   = 1'b1;
        cc_rd_sel[0]  = CS_ABS;
        cc_rd_abs[0]  = {pabs[ABS_W-1:5], 5'd0};
        cc_rd_word[0] = pabs[4:0];
      end
      S_PR_CCW: begin
        cc_wr_en   = 1'b1;
        cc_wr_sel  = CS_ABS;
        cc_wr_abs  = {pabs[ABS_W-1:5], 5'd0};
        cc_wr_word = pabs[4:0];
        cc_wr_data = res_q;
      end
      S_CC_ALLOC: cc_alloc = 1'b1;
      S_WR_RCP: begin
        cc_wr_en   = 1'b1;
        cc_wr_sel  = CS_NXT;
        cc_wr_word = CTX_RCP;
        cc_wr_data = boot_done ? ctx_ptr(ctx_va(cp_abs)) : '0;
        cc_call    = !boot_done;   // the first context becomes current
      end
      S_WRITE: if (ctx_ok(dst_d)) begin
        cc_wr_en   = 1'b1;
        cc_wr_sel  = (dst_d.psel == PSEL_CP) ? CS_CUR : CS_NXT;
        cc_wr_word = dst_d.offset[4:0];
        cc_wr_data = res_q;
      end
      S_CALL_SAVE: begin
        cc_wr_en   = 1'b1;
        cc_wr_sel  = CS_CUR;
        cc_wr_word = CTX_RIP;
        cc_wr_data = '{tag: TAG_OBJPTR, cls: tag_class(TAG_OBJPTR), data: 32'(ip + 1)};
      end
      S_CALL_SW: begin
        cc_call = 1'b1;
        if (is_tail) begin
          // read the old context's RCP before it stops being current
          cc_rd_en[0]   = 1'b1;
          cc_rd_sel[0]  = CS_CUR;
          cc_rd_word[0] = CTX_RCP;
        end
      end
      S_CALL_COPY: begin
        cc_wr_en   = 1'b1;
        cc_wr_sel  = CS_CUR;
        cc_wr_word = CTX_ARG0 + 5'(copy_k);
        cc_wr_data = (copy_k == 2'd0) ? ctx_ptr(rp_va) : src[copy_k[1] ? 1 : 0];
      end
      S_TAIL_WR: begin
        cc_wr_en   = 1'b1;
        cc_wr_sel  = CS_CUR;
        cc_wr_word = CTX_RCP;
        cc_wr_data = tail_rcp;
      end
      S_TAIL_FREE: cc_free = 1'b1;
      S_XFER: begin
        cc_rd_en[0]   = 1'b1;
        cc_rd_sel[0]  = CS_NXT;
        cc_rd_word[0] = CTX_RIP;
      end
      S_RET0: begin
        cc_rd_en[0]   = 1'b1;
        cc_rd_sel[0]  = CS_CUR;
        cc_rd_word[0] = CTX_RCP;
      end
      S_RET1: begin
        cc_ret     = 1'b1;
        cc_ret_abs = ctx_abs(res_q.data);
      end
      S_RET_RCP: begin
        cc_wr_en   = 1'b1;
        cc_wr_sel  = CS_NXT;
        cc_wr_word = CTX_RCP;
        cc_wr_data = ctx_ptr(ctx_va(cp_abs));
      end
      S_RET_RIP: begin
        cc_rd_en[0]   = 1'b1;
        cc_rd_sel[0]  = CS_CUR;
        cc_rd_word[0] = CTX_RIP;
      end
      default: ;
    endcase
  end

  assign al_init      = (st == S_BOOT);
  assign al_alloc     = (st == S_ALLOC);
  assign al_free      = (st == S_TAIL_FREE) || (st == S_RET_FREE);
  assign al_free_addr = old_abs;

  // ---------------------------------------------------------------------
  // Sequencer
  task automatic do_trap(trap_e c, state_e back);
    cause_q  <= c;
    trap_ret <= back;
    st       <= S_TRAP;
  endtask

  // Result pointer of a call: virtual address of the destination word.
  logic [31:0] rp_calc;
  always_comb begin
    unique case (dst_d.psel)
      PSEL_CP:  rp_calc = ctx_va(cp_abs + ABS_W'(dst_d.offset));
      PSEL_NCP: rp_calc = ctx_va(ncp_abs + ABS_W'(dst_d.offset));
      default:  rp_calc = cc_rd_data[0].data + 32'(dst_d.offset);
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= S_BOOT;
      trap_ret    <= S_BOOT;
      ip          <= '0;
      cp_abs      <= '0;
      ncp_abs     <= '0;
      sn          <= '0;
      priv        <= 1'b0;
      ir          <= '0;
      src[0]      <= '0;
      src[1]      <= '0;
      src_pend    <= '0;
      res_q       <= '0;
      pr_idx      <= '0;
      pv          <= '0;
      pabs        <= '0;
      call_target <= '0;
      rp_va       <= '0;
      tail_rcp    <= '0;
      is_tail     <= 1'b0;
      is_xfer     <= 1'b0;
      copy_k      <= '0;
      old_abs     <= '0;
      boot_done   <= 1'b0;
      jslot       <= 1'b0;
      jnow        <= 1'b0;
      jtarget     <= '0;
      cause_q     <= TR_NONE;
      key_q       <= '0;
      va_q        <= '0;
      ev          <= '0;
    end else begin
      ev <= '0;
      unique case (st)
        // ---------------- start-up and context allocation
        S_BOOT: begin
          sn   <= boot_sn;
          priv <= boot_priv;
          st   <= S_ALLOC;
        end
        S_ALLOC: st <= S_ALLOC_W;
        S_ALLOC_W: if (al_done) begin
          if (al_empty) do_trap(TR_CTX_FULL, S_ALLOC);
          else          st <= S_CC_ALLOC;
        end
        S_CC_ALLOC: begin
          if (cc_alloc_fail) do_trap(TR_CTX_FULL, S_CC_ALLOC);
          else begin
            ncp_abs  <= al_addr;
            ev.alloc <= 1'b1;
            st       <= S_WR_RCP;
          end
        end
        S_WR_RCP: begin
          if (!boot_done) begin
            // first context becomes current, then a next one is made
            boot_done <= 1'b1;
            cp_abs    <= ncp_abs;
            ip        <= boot_ip;
            st        <= S_ALLOC;
          end else begin
            st <= S_FETCH;
          end
        end
        // ---------------- step 1: fetch
        S_FETCH: begin
          if (ic_hit) begin
            ir       <= ic_data;
            jnow     <= 1'b0;
            src_pend <= '0;
            st       <= S_READ;
          end else begin
            ev.icmiss <= 1'b1;
            st        <= S_IMEM;
          end
        end
        S_IMEM: if (mem_ack) st <= S_FETCH;
        // ---------------- step 2: operand read
        S_READ: begin
          logic [1:0] pend;
          logic       bad;
          pend = '0;
          bad  = 1'b0;
          for (int k = 0; k < 2; k++) begin
            if (!src_has[k]) begin
              src[k] <= '0;
            end else if (src_d[k].kind == OPND_IMM) begin
              src[k] <= '{tag: TAG_SMALLINT, cls: tag_class(TAG_SMALLINT), data: src_d[k].imm};
            end else if (ctx_ok(src_d[k])) begin
              src[k] <= cc_rd_data[k];
            end else if (is_prel(src_d[k])) begin
              pend[k] = 1'b1;
            end else begin
              bad = 1'b1;
            end
          end
          if (dst_has && !(ctx_ok(dst_d) || is_prel(dst_d))) bad = 1'b1;
          src_pend <= pend;
          if (bad)          do_trap(TR_OPERAND, S_HALT);
          else if (pend[0]) begin pr_idx <= 2'd0; st <= S_PR_PTR; end
          else if (pend[1]) begin pr_idx <= 2'd1; st <= S_PR_PTR; end
          else              st <= S_ITLB;
        end
        // ---------------- P1/P2-relative access (read or write)
        S_PR_PTR: begin
          pv <= cc_rd_data[0].data + 32'(pr_d.offset);
          st <= S_PR_XL;
        end
        S_PR_XL: begin
          if (!at_hit) begin
            va_q <= pv;
            do_trap(TR_ATLB_MISS, S_PR_XL);
          end else if (at_bounds) begin
            va_q <= pv;
            do_trap(TR_BOUNDS, S_HALT);
          end else begin
            pabs <= at_abs;
            st   <= (pr_idx == 2'd2) ? S_PR_CCW : S_PR_CC;
          end
        end
        S_PR_CC: begin
          if (cc_rd_hit[0]) begin
            src[pr_idx[0]] <= cc_rd_data[0];
            ev.prel_ctx    <= 1'b1;
            src_pend[pr_idx[0]] <= 1'b0;
            if (pr_idx == 2'd0 && src_pend[1]) begin pr_idx <= 2'd1; st <= S_PR_PTR; end
            else st <= S_ITLB;
          end else begin
            st <= S_PR_MEM;
          end
        end
        S_PR_MEM: if (mem_ack) begin
          ev.prel_mem <= 1'b1;
          res_q <= '{tag: mem_rdata.tag, cls: tag_class(mem_rdata.tag), data: mem_rdata.data};
          if (mem_rdata.tag == TAG_OBJPTR) st <= S_PR_CLS;
          else begin
            src[pr_idx[0]] <= '{tag: mem_rdata.tag, cls: tag_class(mem_rdata.tag), data: mem_rdata.data};
            src_pend[pr_idx[0]] <= 1'b0;
            if (pr_idx == 2'd0 && src_pend[1]) begin pr_idx <= 2'd1; st <= S_PR_PTR; end
            else st <= S_ITLB;
          end
        end
        S_PR_CLS: begin
          // an object pointer loaded from memory takes its class from its
          // segment descriptor
          if (!at_hit) begin
            va_q <= res_q.data;
            do_trap(TR_ATLB_MISS, S_PR_CLS);
          end else begin
            src[pr_idx[0]] <= '{tag: res_q.tag, cls: at_cls, data: res_q.data};
            src_pend[pr_idx[0]] <= 1'b0;
            if (pr_idx == 2'd0 && src_pend[1]) begin pr_idx <= 2'd1; st <= S_PR_PTR; end
            else st <= S_ITLB;
          end
        end
        S_PR_CCW: begin
          if (cc_wr_hit) begin
            ev.prel_ctx <= 1'b1;
            st <= S_NEXT;
          end else st <= S_PR_MEMW;
        end
        S_PR_MEMW: if (mem_ack) begin
          ev.prel_mem <= 1'b1;
          st <= S_NEXT;
        end
        // ---------------- step 3: ITLB
        S_ITLB: begin
          if (!itlb_hit) begin
            key_q       <= itlb_key;
            ev.itlbmiss <= 1'b1;
            do_trap(TR_ITLB_MISS, S_ITLB);
          end else if (itlb_prim) begin
            // a 2-operand jump also reads its condition, operand A
            if (d_nops == 2'd2 && (itlb_method[5:0] == P_FJMP || itlb_method[5:0] == P_RJMP))
              st <= ctx_ok(dst_d) ? S_COND : S_TRAP;
            else
              st <= S_EXEC;
            if (d_nops == 2'd2 && (itlb_method[5:0] == P_FJMP || itlb_method[5:0] == P_RJMP) && !ctx_ok(dst_d)) begin
              cause_q  <= TR_OPERAND;
              trap_ret <= S_HALT;
            end
          end else begin
            call_target <= itlb_method;
            is_xfer     <= 1'b0;
            st          <= S_CALL;
          end
        end
        S_COND: begin
          src[1] <= cc_rd_data[0];
          st     <= S_EXEC;
        end
        // ---------------- step 4: primitive operation
        S_EXEC: begin
          ev.prim <= 1'b1;
          res_q   <= fu_res;
          if (fu_err) do_trap(TR_PRIM_ERR, S_HALT);
          else if (fu_xfer) st <= S_XFER;
          else begin
            if (fu_jump) begin
              jnow    <= 1'b1;
              jtarget <= ip + ABS_W'(fu_dist);
            end
            st <= (fu_has_res && dst_has) ? S_WRITE : S_NEXT;
          end
        end
        // ---------------- step 5: store result, advance
        S_WRITE: begin
          if (ctx_ok(dst_d)) st <= S_NEXT;
          else begin
            pr_idx <= 2'd2;
            st     <= S_PR_PTR;
          end
        end
        S_NEXT: begin
          ev.instr <= 1'b1;
          if (jslot) begin
            ip      <= jtarget;
            jslot   <= 1'b0;
            ev.jump <= 1'b1;
          end else begin
            ip    <= ip + 1;
            jslot <= jnow;
          end
          st <= d_ret ? S_RET0 : S_FETCH;
        end
        // ---------------- method call
        S_CALL: begin
          ev.call <= 1'b1;
          rp_va   <= rp_calc;
          is_tail <= d_ret;
          ev.tail <= d_ret;
          copy_k  <= dst_has ? 2'd0 : 2'd1;
          st      <= d_ret ? S_CALL_SW : S_CALL_SAVE;
        end
        S_XFER: begin
          ev.xfer     <= 1'b1;
          call_target <= cc_rd_data[0].data;
          is_xfer     <= 1'b1;
          is_tail     <= 1'b0;
          st          <= S_CALL_SAVE;
        end
        S_CALL_SAVE: st <= S_CALL_SW;
        S_CALL_SW: begin
          tail_rcp <= cc_rd_data[0];
          old_abs  <= cp_abs;
          cp_abs   <= ncp_abs;
          ip       <= ABS_W'(call_target);
          jslot    <= 1'b0;
          if (!is_xfer && d_nops != 2'd0) st <= S_CALL_COPY;
          else if (is_tail)               st <= S_TAIL_WR;
          else                            st <= S_ALLOC;
        end
        S_CALL_COPY: begin
          // arg0 (result pointer), arg1, arg2 in turn, as the format has them
          logic [1:0] last;
          last = (d_nops == 2'd3) ? 2'd2 : 2'd1;
          if (copy_k == last) st <= is_tail ? S_TAIL_WR : S_ALLOC;
          else copy_k <= copy_k + 2'd1;
        end
        S_TAIL_WR:   st <= S_TAIL_FREE;
        S_TAIL_FREE: st <= S_TAIL_FW;
        S_TAIL_FW:   if (al_done) st <= S_ALLOC;
        // ---------------- return
        S_RET0: begin
          res_q <= cc_rd_data[0];
          if (cc_rd_data[0].data == '0) st <= S_HALT;
          else                          st <= S_RET1;
        end
        S_RET1: begin
          if (cc_ret_miss) begin
            va_q <= res_q.data;
            do_trap(TR_CTX_MISS, S_RET1);
          end else begin
            old_abs <= ncp_abs;
            ncp_abs <= cp_abs;
            cp_abs  <= ctx_abs(res_q.data);
            st      <= S_RET_FREE;
          end
        end
        S_RET_FREE: st <= S_RET_FW;
        S_RET_FW:   if (al_done) st <= S_RET_RCP;
        S_RET_RCP:  st <= S_RET_RIP;
        S_RET_RIP: begin
          ip     <= ABS_W'(cc_rd_data[0].data);
          ev.ret <= 1'b1;
          st     <= S_FETCH;
        end
        // ---------------- traps
        S_TRAP: if (resume) begin
          cause_q <= TR_NONE;
          st      <= trap_ret;
        end
        S_HALT: ;
        default: st <= S_HALT;
      endcase
    end
  end

  assign trap       = (st == S_TRAP);
  assign trap_cause = cause_q;
  assign trap_key   = key_q;
  assign trap_va    = va_q;
  assign halted     = (st == S_HALT);
  assign ip_o       = ip;
  assign cp_o       = cp_abs;
  assign ncp_o      = ncp_abs;
endmodule
