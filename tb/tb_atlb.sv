// Self-checking test of atlb: descriptors are filled, then virtual
// addresses inside, at the edge of and beyond segments are translated and
// compared with base | offset worked out here; also team separation,
// misses, replacement of the oldest entry and invalidation.
module tb_atlb;
  logic        clk = 0, rst_n = 0;
  logic [7:0]  sn;
  logic [31:0] va;
  logic        hit, berr;
  logic [31:0] abs_a;
  logic [15:0] cls;
  logic        fill_en = 0, inval = 0;
  logic [7:0]  f_sn;
  logic [4:0]  f_exp;
  logic [26:0] f_seg, f_len;
  logic [31:0] f_base;
  logic [15:0] f_cls;
  int checks = 0, failures = 0;

  atlb #(.ENTRIES(8)) dut (
    .clk, .rst_n, .sn, .va, .hit, .bounds_err(berr), .abs_addr(abs_a), .cls,
    .fill_en, .fill_sn(f_sn), .fill_exp(f_exp), .fill_seg(f_seg), .fill_base(f_base),
    .fill_length(f_len), .fill_cls(f_cls), .inval_all(inval)
  );

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fill(input [7:0] s, input [4:0] e, input [26:0] g, input [31:0] b,
                      input [26:0] l, input [15:0] c);
    @(negedge clk);
    fill_en = 1; f_sn = s; f_exp = e; f_seg = g; f_base = b; f_len = l; f_cls = c;
    @(negedge clk);
    fill_en = 0;
  endtask

  task automatic look(input [7:0] s, input [4:0] e, input [26:0] mant,
                      input logic eh, input logic eb, input [31:0] ea, input [15:0] ec);
    sn = s; va = {e, mant};
    #1;
    checks++;
    if (hit !== eh || (eh && (berr !== eb || (!eb && (abs_a !== ea || cls !== ec))))) begin
      failures++;
      $display("FAIL sn=%0d va=%h hit=%b berr=%b abs=%h cls=%h exp %b %b %h %h",
               s, va, hit, berr, abs_a, cls, eh, eb, ea, ec);
    end
  endtask

  initial begin
    sn = 0; va = 0; f_sn = 0; f_exp = 0; f_seg = 0; f_base = 0; f_len = 0; f_cls = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // segment 3 with exponent 4 (16-word segment) of team 1, 10 words long
    fill(8'd1, 5'd4, 27'd3, 32'h0000_1230, 27'd9, 16'h0042);
    look(8'd1, 5'd4, {23'd3, 4'd0}, 1, 0, 32'h0000_1230, 16'h0042);
    look(8'd1, 5'd4, {23'd3, 4'd9}, 1, 0, 32'h0000_1239, 16'h0042);
    look(8'd1, 5'd4, {23'd3, 4'd10}, 1, 1, 0, 0);        // beyond the length
    look(8'd2, 5'd4, {23'd3, 4'd0}, 0, 0, 0, 0);         // other team
    look(8'd1, 5'd5, {22'd3, 5'd0}, 0, 0, 0, 0);         // other exponent
    // a large segment: exponent 20
    fill(8'd1, 5'd20, 27'd5, 32'h0510_0000, 27'hF_FFFF, 16'h0007);
    look(8'd1, 5'd20, {7'd5, 20'hABCDE}, 1, 0, 32'h051A_BCDE, 16'h0007);
    // fill the other six entries; the ninth fill replaces the oldest
    for (int i = 0; i < 6; i++)
      fill(8'd3, 5'd2, 27'(100 + i), 32'(400 + 4*i), 27'd3, 16'(i));
    look(8'd1, 5'd4, {23'd3, 4'd1}, 1, 0, 32'h0000_1231, 16'h0042);
    fill(8'd3, 5'd2, 27'd200, 32'd800, 27'd3, 16'd9);
    look(8'd1, 5'd4, {23'd3, 4'd1}, 0, 0, 0, 0);         // oldest replaced
    look(8'd1, 5'd20, {7'd5, 20'h1}, 1, 0, 32'h0510_0001, 16'h0007);
    for (int i = 0; i < 6; i++)
      look(8'd3, 5'd2, {25'(100 + i), 2'd2}, 1, 0, 32'(400 + 4*i + 2), 16'(i));
    // refill of a present segment overwrites it
    fill(8'd3, 5'd2, 27'd100, 32'd1000, 27'd3, 16'd77);
    look(8'd3, 5'd2, {25'd100, 2'd3}, 1, 0, 32'd1003, 16'd77);
    @(negedge clk); inval = 1; @(negedge clk); inval = 0;
    look(8'd3, 5'd2, {25'd100, 2'd3}, 0, 0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
