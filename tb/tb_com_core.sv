// End-to-end test of the whole processor (com_core) at its default sizes.
//
// The testbench plays the memory system (one-cycle answer) and the
// system software: on an ITLB miss it looks the key up in a small message
// dictionary and fills the ITLB; on an ATLB miss it walks a two-entry
// segment descriptor table and fills the ATLB; then it resumes. The
// program, assembled here, does:
//   main:  n3 := 5; n3 fact (recursive method call, result via pointer);
//          builds an object pointer with the privileged `as`, reads and
//          writes object fields through P1 (memory); counts down a loop
//          closed by a conditional backward jump whose delay slot counts
//          the iterations; xfer to a routine in the next context that
//          returns; finally a tail call n3 fact with n3 = 4, whose outer
//          return to RCP = 0 halts the machine.
//   fact:  c4 := c3 < 2; fjmp c4 -> base; (delay) c5 := 1;
//          n3 := c3 - 1; n3 fact; c5 := c3 * n3; base: *c2 := c5 (return)
// Checked: the values written to the object (5! = 120, the field read,
// the iteration count, the value the xfer routine left), and the counts
// of calls, returns, tail calls, xfers, taken jumps, and that every
// mechanism (instruction cache miss, ITLB miss, ATLB miss, P1/P2 access
// served by the context cache and by memory, context allocation,
// primitive execution) happened.
module tb_com_core;
  import com_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        mem_req, mem_we, mem_ack = 0;
  logic [31:0] mem_addr;
  mword_t      mem_wdata, mem_rdata = '0;
  logic        itlb_fill_en = 0, itlb_fill_prim = 0, atlb_fill_en = 0, resume = 0;
  logic [62:0] itlb_fill_key = '0, trap_key;
  logic [31:0] itlb_fill_method = '0, trap_va;
  logic [4:0]  atlb_fill_exp = '0;
  logic [26:0] atlb_fill_seg = '0, atlb_fill_length = '0;
  logic [31:0] atlb_fill_base = '0;
  logic [15:0] atlb_fill_cls = '0;
  logic        trap, halted;
  trap_e       trap_cause;
  logic [31:0] ip_o, cp_o, ncp_o;
  events_t     ev;

  com_core dut (
    .clk, .rst_n, .boot_ip(32'h100), .boot_fp(32'h1000), .boot_sn(8'd1), .boot_priv(1'b1),
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_rdata, .mem_ack,
    .itlb_fill_en, .itlb_fill_key, .itlb_fill_prim, .itlb_fill_method, .itlb_inval(1'b0),
    .atlb_fill_en, .atlb_fill_exp, .atlb_fill_seg, .atlb_fill_base, .atlb_fill_length,
    .atlb_fill_cls, .trap, .trap_cause, .trap_key, .trap_va, .resume, .halted,
    .ip_o, .cp_o, .ncp_o, .ev
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycles = 0;
  int n_instr = 0, n_prim = 0, n_call = 0, n_tail = 0, n_xfer = 0, n_ret = 0, n_jump = 0;
  int n_icmiss = 0, n_itlbmiss = 0, n_atlbmiss = 0, n_prel_ctx = 0, n_prel_mem = 0, n_alloc = 0;

  task automatic chk(input string w, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", w); end
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog: ip=%h", ip_o);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------- memory
  mword_t mem [logic [31:0]];
  always @(posedge clk) begin
    mem_ack <= 1'b0;
    if (mem_req && !mem_ack) begin
      mem_ack <= 1'b1;
      if (mem_we) mem[mem_addr] = mem_wdata;
      else        mem_rdata <= mem.exists(mem_addr) ? mem[mem_addr] : '0;
    end
  end

  // ------------------------------------------------------- assembler
  localparam logic [1:0] CP = 2'd0, NCP = 2'd1, P1 = 2'd2;
  function automatic logic [6:0] p7(logic [1:0] s, int off);  return {s, 5'(off)}; endfunction
  function automatic logic [10:0] cptr(logic [1:0] s, int off); return {1'b0, s, 8'(off)}; endfunction
  function automatic logic [10:0] csi(int v);                return {2'b10, 9'(v)}; endfunction
  function automatic logic [17:0] bptr(logic [1:0] s, int off); return {2'b00, s, 14'(off)}; endfunction
  function automatic logic [17:0] bsi(int v);                return {2'b01, 1'b0, 15'(v)}; endfunction
  function automatic logic [17:0] bhw(logic hi, logic [15:0] v); return {1'b1, hi, v}; endfunction
  function automatic logic [31:0] i3(logic r, logic [5:0] o, logic [6:0] a, logic [6:0] b, logic [10:0] c);
    return {r, o, a, b, c};
  endfunction
  function automatic logic [31:0] i2(logic r, logic [5:0] o, logic [6:0] a, logic [17:0] b);
    return {r, o, a, b};
  endfunction
  function automatic logic [31:0] i0(logic r, logic [30:0] msg); return {r, msg}; endfunction
  function automatic logic [31:0] i1(logic r, logic [5:0] o, logic [1:0] s, int off);
    return {r, o, 1'b0, s, 22'(off)};
  endfunction

  localparam logic [5:0] OP_ADD = 6'h30, OP_SUB = 6'h31, OP_MUL = 6'h32, OP_LT = 6'h33,
                         OP_AS = 6'h34, OP_OR = 6'h35, OP_MOVE = 6'h20, OP_FJMP = 6'h21,
                         OP_RJMP = 6'h22, OP_FACT = 6'h11;
  localparam logic [30:0] MSG_XFER = {2'b00, 2'd0, 27'h00000AA};
  localparam int MAIN = 32'h100, FACT = 32'h200, XR = 32'h300;
  localparam logic [31:0] OBJ_VA = {5'd4, 27'h0001230}, OBJ_ABS = 32'h0005_0000;

  // keys are {opcode part, class 1, class 2}
  function automatic logic [62:0] k(logic [5:0] o, logic [15:0] c1, logic [15:0] c2);
    return {o, 25'd0, c1, c2};
  endfunction

  typedef struct { logic prim; logic [31:0] m; } dict_t;
  dict_t dict [logic [62:0]];

  initial begin
    logic [31:0] prog [$];
    // message dictionary: primitives for small integers, fact a method
    dict[k(OP_ADD, 1, 1)]  = '{1, P_ADD};
    dict[k(OP_SUB, 1, 1)]  = '{1, P_SUB};
    dict[k(OP_MUL, 1, 1)]  = '{1, P_MUL};
    dict[k(OP_LT, 1, 1)]   = '{1, P_LT};
    dict[k(OP_OR, 1, 1)]   = '{1, P_OR};
    dict[k(OP_AS, 1, 1)]   = '{1, P_AS};
    dict[k(OP_MOVE, 1, 0)] = '{1, P_MOVE};
    dict[k(OP_FJMP, 1, 0)] = '{1, P_FJMP};
    dict[k(OP_RJMP, 1, 0)] = '{1, P_RJMP};
    dict[k(OP_FACT, 1, 0)] = '{0, FACT};
    dict[{MSG_XFER, 16'd0, 16'd0}] = '{1, P_XFER};

    // main
    prog = {
      i2(0, OP_MOVE, p7(NCP, 3), bsi(5)),                 // 0  n3 := 5
      i1(0, OP_FACT, NCP, 3),                             // 1  n3 fact
      i3(0, OP_ADD, p7(CP, 6), p7(NCP, 3), csi(0)),       // 2  c6 := n3 + 0
      i2(0, OP_MOVE, p7(CP, 7), bhw(1, OBJ_VA[31:16])),   // 3  c7 := high half
      i2(0, OP_MOVE, p7(CP, 12), bhw(0, OBJ_VA[15:0])),   // 4  c12 := low half
      i3(0, OP_OR, p7(CP, 7), p7(CP, 7), cptr(CP, 12)),   // 5  c7 := c7 | c12
      i3(0, OP_AS, p7(CP, 2), p7(CP, 7), csi(5)),         // 6  P1 := c7 as pointer
      i3(0, OP_ADD, p7(CP, 8), p7(P1, 1), csi(0)),        // 7  c8 := P1[1] + 0
      i2(0, OP_MOVE, p7(P1, 2), bptr(CP, 6)),             // 8  P1[2] := c6
      i2(0, OP_MOVE, p7(P1, 3), bptr(CP, 8)),             // 9  P1[3] := c8
      i2(0, OP_MOVE, p7(CP, 9), bsi(3)),                  // 10 c9 := 3
      i2(0, OP_MOVE, p7(CP, 11), bsi(0)),                 // 11 c11 := 0
      i3(0, OP_SUB, p7(CP, 9), p7(CP, 9), csi(1)),        // 12 c9 := c9 - 1
      i2(0, OP_RJMP, p7(CP, 9), bsi(1)),                  // 13 if c9 jump to 12
      i3(0, OP_ADD, p7(CP, 11), p7(CP, 11), csi(1)),      // 14 (delay) c11 += 1
      i2(0, OP_MOVE, p7(P1, 4), bptr(CP, 11)),            // 15 P1[4] := c11
      i2(0, OP_MOVE, p7(NCP, 1), bsi(XR)),                // 16 n1 := XR (its RIP)
      i0(0, MSG_XFER),                                    // 17 xfer
      i2(0, OP_MOVE, p7(P1, 5), bptr(NCP, 5)),            // 18 P1[5] := n5
      i2(0, OP_MOVE, p7(NCP, 3), bsi(4)),                 // 19 n3 := 4
      i1(1, OP_FACT, NCP, 3)                              // 20 n3 fact, tail call
    };
    foreach (prog[i]) mem[MAIN + i] = '{tag: TAG_INSTR, data: prog[i]};
    prog = {
      i3(0, OP_LT, p7(CP, 4), p7(CP, 3), csi(2)),         // 0 c4 := c3 < 2
      i2(0, OP_FJMP, p7(CP, 4), bsi(5)),                  // 1 if c4 jump to 6
      i2(0, OP_MOVE, p7(CP, 5), bsi(1)),                  // 2 (delay) c5 := 1
      i3(0, OP_SUB, p7(NCP, 3), p7(CP, 3), csi(1)),       // 3 n3 := c3 - 1
      i1(0, OP_FACT, NCP, 3),                             // 4 n3 fact
      i3(0, OP_MUL, p7(CP, 5), p7(CP, 3), cptr(NCP, 3)),  // 5 c5 := c3 * n3
      i2(1, OP_MOVE, p7(P1, 0), bptr(CP, 5))              // 6 *c2 := c5, return
    };
    foreach (prog[i]) mem[FACT + i] = '{tag: TAG_INSTR, data: prog[i]};
    mem[XR] = '{tag: TAG_INSTR, data: i2(1, OP_MOVE, p7(CP, 5), bsi(9))};  // c5 := 9, return
    // free list of 16 contexts at 0x1000, 32 words apart
    for (int i = 0; i < 16; i++)
      mem[32'h1000 + 32'(i) * 32] = '{tag: TAG_OBJPTR, data: (i == 15) ? 0 : 32'h1000 + 32'(i + 1) * 32};
    // the object: field 1 holds 77
    mem[OBJ_ABS + 1] = '{tag: TAG_SMALLINT, data: 32'd77};
  end

  // ------------------------------------------------ system software
  always @(negedge clk) begin
    itlb_fill_en <= 1'b0;
    atlb_fill_en <= 1'b0;
    resume       <= 1'b0;
    if (trap && !resume && !itlb_fill_en && !atlb_fill_en) begin
      unique case (trap_cause)
        TR_ITLB_MISS: begin
          if (dict.exists(trap_key)) begin
            itlb_fill_en     <= 1'b1;
            itlb_fill_key    <= trap_key;
            itlb_fill_prim   <= dict[trap_key].prim;
            itlb_fill_method <= dict[trap_key].m;
            resume           <= 1'b1;
          end else begin
            chk($sformatf("message not understood %h", trap_key), 0);
            $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
            $finish;
          end
        end
        TR_ATLB_MISS: begin
          n_atlbmiss++;
          atlb_fill_en <= 1'b1;
          resume       <= 1'b1;
          if (trap_va[31:27] == 5'd16 && trap_va[26:16] == 0) begin
            // contexts: one segment mapped one to one
            atlb_fill_exp <= 5'd16; atlb_fill_seg <= 27'd0; atlb_fill_base <= 32'd0;
            atlb_fill_length <= 27'hFFFF; atlb_fill_cls <= 16'h0010;
          end else begin
            atlb_fill_exp <= 5'd4; atlb_fill_seg <= 27'h123; atlb_fill_base <= OBJ_ABS;
            atlb_fill_length <= 27'd15; atlb_fill_cls <= 16'h0020;
          end
        end
        default: begin
          chk($sformatf("unexpected trap %s", trap_cause.name()), 0);
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      endcase
    end
  end

  always @(posedge clk) if (rst_n && $test$plusargs("trace")) $display("%0t st=%s ip=%h ir=%h cp=%h ncp=%h", $time, dut.st.name(), ip_o, dut.ir, cp_o, ncp_o);
  always @(posedge clk) if (rst_n) begin
    cycles++;
    n_instr += int'(ev.instr); n_prim += int'(ev.prim); n_call += int'(ev.call);
    n_tail += int'(ev.tail); n_xfer += int'(ev.xfer); n_ret += int'(ev.ret);
    n_jump += int'(ev.jump); n_icmiss += int'(ev.icmiss); n_itlbmiss += int'(ev.itlbmiss);
    n_prel_ctx += int'(ev.prel_ctx); n_prel_mem += int'(ev.prel_mem); n_alloc += int'(ev.alloc);
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (halted);
    @(negedge clk);
    $display("cycles=%0d instr=%0d prim=%0d call=%0d tail=%0d xfer=%0d ret=%0d jump=%0d",
             cycles, n_instr, n_prim, n_call, n_tail, n_xfer, n_ret, n_jump);
    $display("icmiss=%0d itlbmiss=%0d atlbmiss=%0d prel_ctx=%0d prel_mem=%0d alloc=%0d",
             n_icmiss, n_itlbmiss, n_atlbmiss, n_prel_ctx, n_prel_mem, n_alloc);
    chk("5! stored in the object", mem[OBJ_ABS + 2].data == 120 && mem[OBJ_ABS + 2].tag == TAG_SMALLINT);
    chk("field read through P1", mem[OBJ_ABS + 3].data == 77);
    chk("loop ran three times", mem[OBJ_ABS + 4].data == 3);
    chk("xfer routine result", mem[OBJ_ABS + 5].data == 9);
    chk("calls", n_call == 9);
    chk("tail calls", n_tail == 1);
    chk("returns", n_ret == 9);
    chk("xfers", n_xfer == 1);
    chk("taken jumps", n_jump == 4);
    chk("icache misses", n_icmiss == 21 + 7 + 1);
    chk("itlb misses", n_itlbmiss == 11);
    chk("atlb misses", n_atlbmiss >= 2);
    chk("P-relative via context cache", n_prel_ctx >= 1);
    chk("P-relative via memory", n_prel_mem >= 1);
    chk("contexts allocated", n_alloc >= 2);
    chk("primitives", n_prim >= 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
