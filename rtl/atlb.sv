// atlb: address translation lookaside buffer, virtual to absolute.
//
// A floating point virtual address is split by fp_addr_decode into an
// exponent, a segment field and an offset. {team space number, exponent,
// segment} names a segment descriptor (base, length, class). The ATLB holds
// ENTRIES recently used descriptors in a fully associative array. On a hit
// the offset is compared with the descriptor's length and, if it is in
// bounds, joined with the base to give the absolute address. Segments are
// aligned on multiples of their size, so the join is a bitwise OR rather
// than an add. The descriptor's class is returned for tag/type checks.
//
// Interface: lookup is combinational (hit, bounds_err, abs_addr, cls valid
// in the same cycle as va/sn). A miss is resolved outside (by software that
// walks the team's segment descriptor table) and written back through the
// fill port, one descriptor per cycle; replacement is round-robin.
//
// From the architecture: the descriptor fields (base, length, class), the
// per-team tables (hence SN in the key), the offset/length comparison
// (printed as A > B with A the offset: length is the largest legal offset)
// and the OR in place of an add. Chosen here: a fully associative ATLB of
// 8 entries, an 8-bit team number, 32-bit absolute addresses, round-robin
// replacement and the invalidate-all input.
//
// Lint note: the address decoder's limit output is not used here; the
// descriptor's length field bounds the offset instead.
module atlb #(
  parameter int ENTRIES = 8,
  parameter int MANT_W  = 27,
  parameter int EXP_W   = $clog2(MANT_W),
  parameter int SN_W    = 8,
  parameter int ABS_W   = 32,
  parameter int CLASS_W = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // lookup
  input  logic [SN_W-1:0]          sn,
  input  logic [EXP_W+MANT_W-1:0]  va,
  output logic                     hit,
  output logic                     bounds_err,
  output logic [ABS_W-1:0]         abs_addr,
  output logic [CLASS_W-1:0]       cls,
  // fill with a descriptor for segment {fill_sn, fill_exp, fill_seg}
  input  logic                     fill_en,
  input  logic [SN_W-1:0]          fill_sn,
  input  logic [EXP_W-1:0]         fill_exp,
  input  logic [MANT_W-1:0]        fill_seg,
  input  logic [ABS_W-1:0]         fill_base,
  input  logic [MANT_W-1:0]        fill_length,
  input  logic [CLASS_W-1:0]       fill_cls,
  input  logic                     inval_all
);
  typedef struct packed {
    logic               valid;
    logic [SN_W-1:0]    sn;
    logic [EXP_W-1:0]   exp;
    logic [MANT_W-1:0]  seg;
    logic [ABS_W-1:0]   base;
    logic [MANT_W-1:0]  length;
    logic [CLASS_W-1:0] cls;
  } desc_t;

  localparam int IDX_W = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  desc_t            ent [ENTRIES];
  logic [IDX_W-1:0] victim;

  logic [EXP_W-1:0]  d_exp;
  logic [MANT_W-1:0] d_seg, d_off, d_limit;

  fp_addr_decode #(.MANT_W(MANT_W), .EXP_W(EXP_W)) u_dec (
    .va(va), .exp_o(d_exp), .seg_o(d_seg), .off_o(d_off), .limit_o(d_limit)
  );

  always_comb begin
    hit        = 1'b0;
    bounds_err = 1'b0;
    abs_addr   = '0;
    cls        = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      if (ent[i].valid && ent[i].sn == sn && ent[i].exp == d_exp && ent[i].seg == d_seg) begin
        hit        = 1'b1;
        bounds_err = d_off > ent[i].length;
        abs_addr   = ent[i].base | ABS_W'(d_off);
        cls        = ent[i].cls;
      end
    end
  end

  // A fill for a segment already present overwrites that entry.
  logic             fill_present;
  logic [IDX_W-1:0] fill_idx;
  always_comb begin
    fill_present = 1'b0;
    fill_idx     = victim;
    for (int i = 0; i < ENTRIES; i++) begin
      if (ent[i].valid && ent[i].sn == fill_sn && ent[i].exp == fill_exp && ent[i].seg == fill_seg) begin
        fill_present = 1'b1;
        fill_idx     = IDX_W'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) ent[i] <= '0;
      victim <= '0;
    end else if (inval_all) begin
      for (int i = 0; i < ENTRIES; i++) ent[i].valid <= 1'b0;
    end else if (fill_en) begin
      ent[fill_idx] <= '{valid: 1'b1, sn: fill_sn, exp: fill_exp, seg: fill_seg,
                         base: fill_base, length: fill_length, cls: fill_cls};
      if (!fill_present)
        victim <= (int'(victim) == ENTRIES-1) ? '0 : victim + IDX_W'(1);
    end
  end
endmodule
