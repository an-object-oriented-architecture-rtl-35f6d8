// Self-checking test of context_alloc with a small memory model: a free
// list of five contexts is built in memory, contexts are allocated and
// freed in a mixed order against a queue model of the list, each
// operation is checked to make exactly one memory reference, and
// allocation from the empty list reports empty.
module tb_context_alloc;
  import com_pkg::*;
  logic        clk = 0, rst_n = 0;
  logic        init = 0, alloc_req = 0, free_req = 0;
  logic [31:0] init_fp = 0, free_addr = 0;
  logic        busy, done, empty;
  logic [31:0] alloc_addr, fp;
  logic        mem_req, mem_we, mem_ack = 0;
  logic [31:0] mem_addr;
  mword_t      mem_wdata, mem_rdata = '0;
  int checks = 0, failures = 0, refs = 0;

  context_alloc dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // memory with a one-cycle wait
  mword_t mem [logic [31:0]];
  always @(posedge clk) begin
    mem_ack <= 1'b0;
    if (mem_req && !mem_ack) begin
      mem_ack <= 1'b1;
      refs++;
      if (mem_we) mem[mem_addr] = mem_wdata;
      else        mem_rdata <= mem.exists(mem_addr) ? mem[mem_addr] : '0;
    end
  end

  task automatic chk(input string w, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", w, $time); end
  endtask

  logic [31:0] q[$];

  task automatic do_alloc();
    int r0;
    r0 = refs;
    @(negedge clk); alloc_req = 1; @(negedge clk); alloc_req = 0;
    while (!done) @(negedge clk);
    if (q.size() == 0) chk("empty", empty && refs == r0);
    else begin
      chk("alloc addr", !empty && alloc_addr == q[0]);
      chk("one reference", refs == r0 + 1);
      void'(q.pop_front());
      chk("fp follows", fp == ((q.size() == 0) ? 32'd0 : q[0]));
    end
  endtask

  task automatic do_free(input [31:0] a);
    int r0;
    r0 = refs;
    @(negedge clk); free_req = 1; free_addr = a; @(negedge clk); free_req = 0;
    while (!done) @(negedge clk);
    chk("one reference", refs == r0 + 1);
    chk("fp is freed", fp == a);
    q.push_front(a);
  endtask

  initial begin
    // list 0x100 -> 0x120 -> ... -> 0x180 -> 0
    for (int i = 0; i < 5; i++) begin
      mem[32'h100 + 32'(i) * 32] = '{tag: TAG_OBJPTR, data: (i == 4) ? 32'd0 : 32'h100 + 32'(i + 1) * 32};
      q.push_back(32'h100 + 32'(i) * 32);
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); init = 1; init_fp = 32'h100; @(negedge clk); init = 0;
    chk("init", fp == 32'h100);
    do_alloc(); do_alloc();
    do_free(32'h100);
    do_alloc(); do_alloc();
    do_free(32'h120); do_free(32'h140);
    for (int i = 0; i < 6; i++) do_alloc();
    chk("list used up", q.size() == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
