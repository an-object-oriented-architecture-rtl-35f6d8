// Self-checking test of fp_addr_decode: random 32-bit virtual addresses
// (5-bit exponent, 27-bit mantissa) and every exponent value; the expected
// segment and offset are computed by shifting in the testbench.
module tb_fp_addr_decode;
  logic [31:0] va;
  logic [4:0]  e;
  logic [26:0] seg, off, lim;
  int checks = 0, failures = 0;

  fp_addr_decode #(.MANT_W(27)) dut (.va(va), .exp_o(e), .seg_o(seg), .off_o(off), .limit_o(lim));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int unsigned ex;
      longint unsigned m, eo, es;
      va = $urandom;
      if (i < 32) va[31:27] = 5'(i);
      #1;
      ex = va[31:27];
      m  = va[26:0];
      if (ex >= 27) begin eo = m; es = 0; end
      else begin eo = m % (64'd1 << ex); es = m / (64'd1 << ex); end
      checks++;
      if (e != va[31:27] || off != 27'(eo) || seg != 27'(es) ||
          lim != 27'((ex >= 27) ? 64'h7ffffff : ((64'd1 << ex) - 1))) begin
        failures++;
        if (failures < 5) $display("mismatch va=%h seg=%h off=%h", va, seg, off);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
