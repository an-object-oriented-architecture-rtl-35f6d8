// Self-checking test of com_fu: random operands (with a bias toward
// small and edge values) for every primitive, compared with a reference
// model written with 64-bit arithmetic in the testbench.
module tb_com_fu;
  import com_pkg::*;
  prim_e  op;
  oword_t s1, s2, res;
  logic   has2, priv, has_res, jump, xfer, err;
  logic signed [31:0] jdist;
  int checks = 0, failures = 0;

  com_fu dut (.op, .src1(s1), .src2(s2), .has_src2(has2), .priv, .res, .has_res,
              .jump, .jump_dist(jdist), .xfer, .err);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] pick();
    unique case ($urandom_range(0, 5))
      0: return 32'($urandom_range(0, 40)) - 32'd20;
      1: return 32'h8000_0000;
      2: return 32'h7FFF_FFFF;
      3: return 32'hFFFF_FFFF;
      default: return $urandom;
    endcase
  endfunction

  initial begin
    for (int n = 0; n < 20000; n++) begin
      longint sa, sb, q, r;
      longint unsigned ua, ub, p;
      logic [31:0] exp_d;
      logic        exp_err, exp_res, exp_jump;
      tag_e        exp_tag;
      op   = prim_e'($urandom_range(0, 26));
      s1   = '{tag: TAG_SMALLINT, cls: 16'd1, data: pick()};
      s2   = '{tag: TAG_SMALLINT, cls: 16'd1, data: pick()};
      if (op == P_SHIFT || op == P_ASHIFT || op == P_ROTATE)
        s2.data = 32'($urandom_range(0, 80)) - 32'd40;
      if (op == P_SAME && $urandom_range(0, 1)) s2 = s1;
      if (op == P_SAME && $urandom_range(0, 3) == 0) s2.tag = TAG_ATOM;
      if (op == P_AS) s2.data = 32'($urandom_range(0, 5));
      has2 = $urandom_range(0, 1);
      priv = $urandom_range(0, 1);
      #1;
      sa = longint'(signed'(s1.data)); sb = longint'(signed'(s2.data));
      ua = longint'(s1.data);          ub = longint'(s2.data);
      exp_err = 0; exp_res = 1; exp_jump = 0; exp_tag = TAG_SMALLINT; exp_d = '0;
      case (op)
        P_ADD:  exp_d = 32'(sa + sb);
        P_SUB:  exp_d = 32'(sa - sb);
        P_MUL:  exp_d = 32'(sa * sb);
        P_DIV, P_MOD: begin
          if (sb == 0) exp_err = 1;
          else begin
            q = sa / sb; r = sa - q * sb;
            if (r != 0 && ((r < 0) != (sb < 0))) r = r + sb;
            exp_d = (op == P_DIV) ? 32'(q) : 32'(r);
          end
        end
        P_NEG:  exp_d = 32'(-sa);
        P_CARRY: exp_d = 32'((ua + ub) >> 32);
        P_MULT1: begin p = ua * ub; exp_d = p[31:0]; end
        P_MULT2: begin p = ua * ub; exp_d = p[63:32]; end
        P_SHIFT:  exp_d = (sb >= 32 || sb <= -32) ? 0 : (sb >= 0) ? 32'(ua << sb) : 32'(ua >> (-sb));
        P_ASHIFT: exp_d = (sb >= 32) ? 0 : (sb >= 0) ? 32'(ua << sb) :
                          (sb <= -32) ? ((sa < 0) ? 32'hFFFF_FFFF : 0) : 32'(sa >>> (-sb));
        P_ROTATE: begin p = {ua[31:0], ua[31:0]} << (ub % 32); exp_d = p[63:32]; end
        P_MASK: begin
          exp_d = s1.data & s2.data;
          if (s2.data != 0) while (!s2.data[0]) begin s2.data = s2.data >> 1; exp_d = exp_d >> 1; end
        end
        P_AND:  exp_d = s1.data & s2.data;
        P_OR:   exp_d = s1.data | s2.data;
        P_NOT:  exp_d = ~s1.data;
        P_XOR:  exp_d = s1.data ^ s2.data;
        P_LT:   exp_d = (sa < sb) ? 1 : 0;
        P_EQ:   exp_d = (sa == sb) ? 1 : 0;
        P_EQZ:  exp_d = (sa == 0) ? 1 : 0;
        P_SAME: exp_d = (s1.tag == s2.tag && s1.data == s2.data) ? 1 : 0;
        P_MOVE: exp_d = s1.data;
        P_AS:   begin exp_d = s1.data; exp_tag = tag_e'(s2.data[3:0]);
                      exp_err = (s2.data == 32'd5) && !priv; end
        P_TAG:  exp_d = 32'(s1.tag);
        P_FJMP, P_RJMP: begin exp_res = 0; exp_jump = !has2 || s2.data != 0; end
        P_XFER: exp_res = 0;
        default: ;
      endcase
      checks++;
      if (err !== exp_err || (!exp_err && (has_res !== exp_res ||
          (exp_res && (res.data !== exp_d || res.tag !== exp_tag)) ||
          jump !== exp_jump || (exp_jump && jdist !== ((op == P_FJMP) ? signed'(s1.data) : -signed'(s1.data))) ||
          xfer !== (op == P_XFER)))) begin
        failures++;
        if (failures < 10) $display("FAIL op=%s a=%h b=%h res=%h exp=%h err=%b", op.name(), s1.data, s2.data, res.data, exp_d, err);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
