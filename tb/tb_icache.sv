// Self-checking test of icache at its full size (4096 entries, 2 ways):
// miss, fill, hit; three addresses mapping to one set (same low 11 bits)
// check LRU replacement; a block of sequential addresses is filled and
// read back; finally, for random addresses, every address that differs
// from a cached one in a single tag bit must miss (each tag bit is
// compared).
module tb_icache;
  logic        clk = 0, rst_n = 0, lookup_en = 0, fill_en = 0, inval = 0;
  logic [31:0] addr = 0, fill_addr = 0, fill_data = 0, rdata;
  logic        hit;
  int checks = 0, failures = 0;

  icache dut (.clk, .rst_n, .lookup_en, .addr, .hit, .rdata,
              .fill_en, .fill_addr, .fill_data, .inval_all(inval));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fill(input [31:0] a, input [31:0] d);
    @(negedge clk); fill_en = 1; fill_addr = a; fill_data = d;
    @(negedge clk); fill_en = 0;
  endtask

  task automatic look(input [31:0] a, input logic eh, input [31:0] ed);
    @(negedge clk); addr = a; lookup_en = 1; #1;
    checks++;
    if (hit !== eh || (eh && rdata !== ed)) begin
      failures++;
      $display("FAIL a=%h hit=%b d=%h exp %b %h", a, hit, rdata, eh, ed);
    end
    @(negedge clk); lookup_en = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    look(32'h100, 0, 0);
    fill(32'h100, 32'hDEAD_0100);
    look(32'h100, 1, 32'hDEAD_0100);
    fill(32'h100 + 32'h800, 32'hBEEF_0900);     // same set, other way
    look(32'h100, 1, 32'hDEAD_0100);            // 0x100 becomes MRU
    fill(32'h100 + 32'h1000, 32'hCAFE_1100);    // replaces 0x900
    look(32'h900, 0, 0);
    look(32'h100, 1, 32'hDEAD_0100);
    look(32'h1100, 1, 32'hCAFE_1100);
    for (int i = 0; i < 64; i++) fill(32'h4000 + i, 32'(i * 7 + 1));
    for (int i = 0; i < 64; i++) look(32'h4000 + i, 1, 32'(i * 7 + 1));
    @(negedge clk); inval = 1; @(negedge clk); inval = 0;
    look(32'h4000, 0, 0);
    for (int n = 0; n < 8; n++) begin
      logic [31:0] a;
      a = $urandom;
      @(negedge clk); inval = 1; @(negedge clk); inval = 0;
      fill(a, ~a);
      look(a, 1, ~a);
      for (int k = 11; k < 32; k++) look(a ^ (32'd1 << k), 0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
