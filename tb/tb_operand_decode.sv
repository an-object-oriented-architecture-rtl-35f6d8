// Self-checking test of operand_decode: instructions of every format are
// assembled field by field in the testbench and the decoded operands are
// compared with the values the encoding defines.
module tb_operand_decode;
  import com_pkg::*;
  logic [31:0] instr;
  logic        r;
  logic [5:0]  opc;
  logic [1:0]  nops, nargs0;
  logic [30:0] opkey;
  opnd_t       a, b, c;
  int checks = 0, failures = 0;

  operand_decode dut (.instr, .ret_bit(r), .opcode(opc), .nops, .nargs0, .opkey,
                      .opa(a), .opb(b), .opc(c));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s instr=%h", what, instr); end
  endtask

  task automatic chk_ptr(input string w, input opnd_t o, input psel_e p, input int off);
    chk(w, o.kind == OPND_PTR && o.psel == p && int'(o.offset) == off);
  endtask
  task automatic chk_imm(input string w, input opnd_t o, input logic [31:0] v);
    chk(w, o.kind == OPND_IMM && o.imm == v);
  endtask

  initial begin
    // 3 operands: n1 = c1 - 1  (opcode 0x31, A = NCP+1, B = CP+1, C = short int -1)
    instr = {1'b0, 6'h31, 2'd1, 5'd1, 2'd0, 5'd1, 2'b10, 9'h1FF};
    #1;
    chk("r", r == 0); chk("nops3", nops == 3); chk("opc", opc == 6'h31);
    chk("opkey", opkey == {6'h31, 25'd0});
    chk_ptr("a3", a, PSEL_NCP, 1); chk_ptr("b3", b, PSEL_CP, 1);
    chk_imm("c3 -1", c, 32'hFFFF_FFFF);
    // 3 operands, C pointer relative P2 + 200, return bit
    instr = {1'b1, 6'h3A, 2'd2, 5'd7, 2'd3, 5'd31, 1'b0, 2'd3, 8'd200};
    #1;
    chk("r1", r == 1); chk_ptr("a P1", a, PSEL_P1, 7); chk_ptr("b P2", b, PSEL_P2, 31);
    chk_ptr("c P2+200", c, PSEL_P2, 200);
    // 3 operands, C short int +255
    instr = {1'b0, 6'h30, 2'd0, 5'd2, 2'd0, 5'd3, 2'b10, 9'h0FF};
    #1; chk_imm("c3 +255", c, 32'd255);
    // 3 operands, bit field code not available
    instr = {1'b0, 6'h30, 2'd0, 5'd2, 2'd0, 5'd3, 2'b11, 9'h0};
    #1; chk("c3 bad", c.kind == OPND_BAD);
    // 2 operands: half word high / low
    instr = {1'b0, 6'h21, 2'd0, 5'd4, 1'b1, 1'b1, 16'hBEEF};
    #1; chk("nops2", nops == 2); chk_ptr("a2", a, PSEL_CP, 4); chk_imm("hw hi", b, 32'hBEEF_0000);
    chk("c none", c.kind == OPND_NONE);
    instr = {1'b0, 6'h21, 2'd0, 5'd4, 1'b1, 1'b0, 16'h1234};
    #1; chk_imm("hw lo", b, 32'h0000_1234);
    // 2 operands: bit field 3..10 (given as stop, start) and short int -5
    instr = {1'b0, 6'h22, 2'd1, 5'd0, 1'b0, 2'b11, 5'd0, 5'd10, 5'd3};
    #1; chk_imm("bitfield", b, 32'h0000_07F8);
    instr = {1'b0, 6'h22, 2'd1, 5'd0, 1'b0, 2'b10, 15'h7FFB};
    #1; chk_imm("si2 -5", b, 32'hFFFF_FFFB);
    instr = {1'b0, 6'h22, 2'd1, 5'd0, 1'b0, 1'b0, 2'd2, 14'd1000};
    #1; chk_ptr("b2 P1+1000", b, PSEL_P1, 1000);
    // 1 operand: short int +1000000, then pointer NCP + 5
    instr = {1'b0, 6'h11, 2'b10, 23'd1000000};
    #1; chk("nops1", nops == 1); chk_imm("si1", a, 32'd1000000);
    chk("b none", b.kind == OPND_NONE);
    instr = {1'b0, 6'h11, 1'b0, 2'd1, 22'd5};
    #1; chk_ptr("a1 ptr", a, PSEL_NCP, 5);
    instr = {1'b0, 6'h11, 2'b11, 13'd0, 5'd31, 5'd31};
    #1; chk_imm("bitfield 31", a, 32'h8000_0000);
    // 0 operands with two next-context arguments
    instr = {1'b1, 2'b00, 2'd2, 27'h123_4567};
    #1; chk("nops0", nops == 0); chk("nargs", nargs0 == 2);
    chk("opkey0", opkey == {2'b00, 2'd2, 27'h123_4567});
    chk("a none", a.kind == OPND_NONE);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
