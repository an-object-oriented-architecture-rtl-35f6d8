// fp_addr_decode: splits a floating point virtual address into its segment
// name and its offset.
//
// A virtual address is an EXP_W-bit exponent above an MANT_W-bit mantissa.
// The exponent places the binary point inside the mantissa: the low `exp`
// mantissa bits are the offset within the segment and the bits above them
// are the segment field. The exponent and the segment field together name
// the segment descriptor, so one address format serves both many small
// objects (small exponent, many segment numbers) and a few huge ones (large
// exponent, long offsets). Exponents of MANT_W or more make the whole
// mantissa an offset.
//
// Purely combinational. The split itself and e = ceil(lg m) follow the
// architecture; the 27-bit mantissa, which makes an address fit one 32-bit
// word, is this design's choice (the architecture's worked example is a
// 36-bit address with a 31-bit mantissa, reachable with MANT_W = 31).
module fp_addr_decode #(
  parameter int MANT_W = 27,
  parameter int EXP_W  = $clog2(MANT_W)
) (
  input  logic [EXP_W+MANT_W-1:0] va,
  output logic [EXP_W-1:0]        exp_o,
  output logic [MANT_W-1:0]       seg_o,    // segment field, right-aligned
  output logic [MANT_W-1:0]       off_o,    // offset within the segment
  output logic [MANT_W-1:0]       limit_o   // largest offset the exponent allows
);
  logic [MANT_W-1:0] mant;
  logic [MANT_W-1:0] mask;

  assign mant  = va[MANT_W-1:0];
  assign exp_o = va[EXP_W+MANT_W-1:MANT_W];

  always_comb begin
    if (int'(exp_o) >= MANT_W) mask = '1;
    else                       mask = (MANT_W'(1) << exp_o) - MANT_W'(1);
  end

  assign off_o   = mant & mask;
  assign seg_o   = (int'(exp_o) >= MANT_W) ? '0 : (mant >> exp_o);
  assign limit_o = mask;
endmodule
