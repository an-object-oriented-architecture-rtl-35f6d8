// Self-checking test of context_cache at its full size (32 blocks of 32
// words). A model in the testbench keeps the contents of every allocated
// context by absolute address and which contexts are current and next.
// The test allocates, calls and returns through a chain of contexts,
// writes and reads through the current, next and absolute paths (two reads
// in one cycle), checks that a reused block reads as cleared, fills the
// cache until allocation fails, and checks the return-miss report.
module tb_context_cache;
  import com_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [1:0]        rd_en = 0;
  logic [1:0][1:0]   rd_sel = 0;
  logic [1:0][4:0]   rd_word = 0;
  logic [1:0][31:0]  rd_abs = 0;
  oword_t [1:0]      rd_data;
  logic [1:0]        rd_hit;
  logic              wr_en = 0, wr_hit;
  logic [1:0]        wr_sel = 0;
  logic [4:0]        wr_word = 0;
  logic [31:0]       wr_abs = 0;
  oword_t            wr_data = '0;
  logic              op_alloc = 0, op_call = 0, op_ret = 0, op_free = 0;
  logic [31:0]       alloc_abs = 0, ret_abs = 0, free_abs = 0;
  logic              alloc_fail, ret_miss;
  logic [31:0]       cur_vec, nxt_vec, free_vec;
  int checks = 0, failures = 0;

  context_cache dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model: context contents by absolute address
  oword_t model [logic [31:0]][32];
  logic [31:0] m_cur, m_nxt;

  task automatic chk(input string w, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", w, $time); end
  endtask

  task automatic alloc(input [31:0] a);
    @(negedge clk); op_alloc = 1; alloc_abs = a; #1;
    chk("alloc ok", !alloc_fail);
    @(negedge clk); op_alloc = 0;
    for (int i = 0; i < 32; i++) model[a][i] = '0;
    m_nxt = a;
  endtask

  task automatic call();
    @(negedge clk); op_call = 1; @(negedge clk); op_call = 0;
    m_cur = m_nxt; m_nxt = '1;
  endtask

  task automatic ret(input [31:0] a);
    @(negedge clk); op_ret = 1; ret_abs = a; #1;
    chk("ret hit", !ret_miss);
    @(negedge clk); op_ret = 0;
    m_nxt = m_cur; m_cur = a;
  endtask

  // sel 0 current, 1 next, 2 absolute
  task automatic write(input [1:0] sel, input [31:0] a, input [4:0] w, input oword_t d);
    logic [31:0] tgt;
    tgt = (sel == 0) ? m_cur : (sel == 1) ? m_nxt : a;
    @(negedge clk); wr_en = 1; wr_sel = sel; wr_abs = a; wr_word = w; wr_data = d; #1;
    chk("write hit", wr_hit);
    @(negedge clk); wr_en = 0;
    model[tgt][w] = d;
  endtask

  task automatic read2(input [1:0] s0, input [31:0] a0, input [4:0] w0,
                       input [1:0] s1, input [31:0] a1, input [4:0] w1);
    logic [31:0] t0, t1;
    t0 = (s0 == 0) ? m_cur : (s0 == 1) ? m_nxt : a0;
    t1 = (s1 == 0) ? m_cur : (s1 == 1) ? m_nxt : a1;
    @(negedge clk);
    rd_en = 2'b11; rd_sel[0] = s0; rd_sel[1] = s1; rd_abs[0] = a0; rd_abs[1] = a1;
    rd_word[0] = w0; rd_word[1] = w1; #1;
    chk("read0", rd_hit[0] && rd_data[0] == model[t0][w0]);
    chk("read1", rd_hit[1] && rd_data[1] == model[t1][w1]);
    @(negedge clk); rd_en = 0;
  endtask

  function automatic oword_t rnd();
    return '{tag: tag_e'($urandom_range(1, 5)), cls: 16'($urandom), data: $urandom};
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk("all free", free_vec == '1 && cur_vec == 0 && nxt_vec == 0);
    // chain A0 -> A1 -> A2
    alloc(32'h1000);
    chk("first free block", nxt_vec == 32'h1 && free_vec == 32'hFFFF_FFFE);
    write(1, 0, 0, rnd());
    call();
    chk("call moves next", cur_vec == 32'h1 && nxt_vec == 0);
    alloc(32'h1020);
    for (int i = 0; i < 32; i++) write(0, 0, 5'(i), rnd());
    for (int i = 0; i < 8; i++) write(1, 0, 5'(i), rnd());
    for (int i = 0; i < 32; i++) read2(0, 0, 5'(i), 1, 0, 5'(i));
    read2(2, 32'h1000, 5'd3, 2, 32'h1020, 5'd7);
    read2(1, 0, 5'd20, 2, 32'h1020, 5'd20);   // never written: cleared
    call();
    alloc(32'h1040);
    write(2, 32'h1040, 5'd9, rnd());
    chk("three blocks used", free_vec == 32'hFFFF_FFF8 && cur_vec == 32'h2 && nxt_vec == 32'h4);
    // return to A0: A1 becomes next, A2's block is freed
    ret(32'h1000);
    chk("ret vectors", cur_vec == 32'h1 && nxt_vec == 32'h2 && free_vec == 32'hFFFF_FFFC);
    read2(0, 0, 5'd5, 1, 0, 5'd5);
    // reuse of A2's block under a new address reads cleared
    alloc(32'h2000);
    chk("block 2 reused", nxt_vec == 32'h4);
    read2(1, 0, 5'd9, 2, 32'h2000, 5'd0);
    // absolute miss
    @(negedge clk); rd_en = 2'b01; rd_sel[0] = 2; rd_abs[0] = 32'h1040; #1;
    chk("abs miss", !rd_hit[0]);
    @(negedge clk); rd_en = 0;
    // explicit free
    @(negedge clk); op_free = 1; free_abs = 32'h2000; @(negedge clk); op_free = 0;
    chk("freed", free_vec == 32'hFFFF_FFFC && nxt_vec == 0);
    // fill the cache
    for (int i = 0; i < 30; i++) alloc(32'h8000 + 32'(i) * 32);
    chk("full", free_vec == 0);
    @(negedge clk); op_alloc = 1; alloc_abs = 32'hF000; #1;
    chk("alloc fails when full", alloc_fail);
    @(negedge clk); op_alloc = 0;
    @(negedge clk); op_ret = 1; ret_abs = 32'hF000; #1;
    chk("ret miss", ret_miss);
    @(negedge clk); op_ret = 0;
    chk("state kept", cur_vec == 32'h1 && free_vec == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
