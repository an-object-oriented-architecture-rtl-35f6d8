// Self-checking test of itlb at its full size (512 entries, 2 ways).
// Random associations are filled and looked up again; keys that differ in
// two bits IW apart fold to the same set, which lets the test fill three
// keys into one set and check that the least recently used one leaves.
// Also: refilling a present key, misses, and invalidation.
module tb_itlb;
  localparam int KW = 63;
  localparam int IW = 8;   // log2 of the 256 sets
  logic          clk = 0, rst_n = 0;
  logic          lookup_en = 0, fill_en = 0, fill_prim = 0, inval = 0;
  logic [KW-1:0] key = '0, fill_key = '0;
  logic          hit, prim;
  logic [31:0]   method, fill_method = '0;
  int checks = 0, failures = 0;

  itlb dut (.clk, .rst_n, .lookup_en, .key, .hit, .prim, .method,
            .fill_en, .fill_key, .fill_prim, .fill_method, .inval_all(inval));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fill(input [KW-1:0] k, input logic p, input [31:0] m);
    @(negedge clk);
    fill_en = 1; fill_key = k; fill_prim = p; fill_method = m;
    @(negedge clk);
    fill_en = 0;
  endtask

  task automatic look(input [KW-1:0] k, input logic eh, input logic ep, input [31:0] em);
    @(negedge clk);
    key = k; lookup_en = 1;
    #1;
    checks++;
    if (hit !== eh || (eh && (prim !== ep || method !== em))) begin
      failures++;
      $display("FAIL key=%h hit=%b prim=%b m=%h exp %b %b %h", k, hit, prim, method, eh, ep, em);
    end
    @(negedge clk);
    lookup_en = 0;
  endtask

  logic [KW-1:0] keys [40];
  logic [31:0]   meths [40];
  logic [KW-1:0] k0, k1, k2;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // distinct random keys: at most 2 share a set with high probability;
    // keep 40 and check them right after filling each
    for (int i = 0; i < 40; i++) begin
      keys[i]  = {$urandom, $urandom};
      meths[i] = $urandom;
      fill(keys[i], meths[i][0], meths[i]);
      look(keys[i], 1, meths[i][0], meths[i]);
    end
    look({$urandom, $urandom} | 63'h1, 0, 0, 0) ;
    // three keys in one set
    k0 = {$urandom, $urandom};
    k1 = k0 ^ (63'd1 << 3) ^ (63'd1 << (3 + IW));
    k2 = k0 ^ (63'd1 << 5) ^ (63'd1 << (5 + 2*IW));
    @(negedge clk); inval = 1; @(negedge clk); inval = 0;
    look(keys[0], 0, 0, 0);
    fill(k0, 1, 32'h11);
    fill(k1, 0, 32'h22);
    look(k0, 1, 1, 32'h11);   // k0 most recently used, k1 least
    fill(k2, 0, 32'h33);      // replaces k1
    look(k1, 0, 0, 0);
    look(k0, 1, 1, 32'h11);
    look(k2, 1, 0, 32'h33);
    fill(k2, 1, 32'h44);      // update in place
    look(k2, 1, 1, 32'h44);
    look(k0, 1, 1, 32'h11);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
