// itlb: instruction translation lookaside buffer.
//
// Instructions are abstract: what an opcode does depends on the classes of
// its operands. The ITLB associates a key {opcode, class of operand 1,
// class of operand 2} with an entry holding a primitive bit and a method
// field. With the primitive bit set the method field selects a function-unit
// operation (a com_pkg::prim_e code in its low bits); otherwise it is the
// address of the code that defines the method and the processor performs a
// call. A miss means the association must be fetched by method lookup in
// the class's message dictionary, which is done outside and written back
// through the fill port.
//
// Organisation: SETS = ENTRIES/WAYS sets of WAYS ways, each way storing the
// full key. The set index is the XOR-fold of the key. Lookup is
// combinational; on a hit with lookup_en the way becomes the set's most
// recently used. A fill replaces, in this order, a way already holding the
// key, an invalid way, or the way after the most recently used one (for two
// ways: the least recently used). inval_all clears every entry, e.g. after
// a method is redefined.
//
// From the architecture: the three fields of an entry, the key, and the
// default size of 512 entries, two ways (the size its measurements show
// reaching a 99% hit ratio). Chosen here: the XOR-fold index, the
// replacement order, storing the whole key as the tag and a 32-bit method
// field.
module itlb #(
  parameter int ENTRIES = 512,
  parameter int WAYS    = 2,
  parameter int OPK_W   = 31,
  parameter int CLASS_W = 16,
  parameter int METH_W  = 32
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // lookup
  input  logic                         lookup_en,
  input  logic [OPK_W+2*CLASS_W-1:0]   key,
  output logic                         hit,
  output logic                         prim,
  output logic [METH_W-1:0]            method,
  // fill
  input  logic                         fill_en,
  input  logic [OPK_W+2*CLASS_W-1:0]   fill_key,
  input  logic                         fill_prim,
  input  logic [METH_W-1:0]            fill_method,
  input  logic                         inval_all
);
  localparam int KEY_W = OPK_W + 2*CLASS_W;
  localparam int SETS  = ENTRIES / WAYS;
  localparam int IW    = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int WW    = (WAYS > 1) ? $clog2(WAYS) : 1;

  function automatic logic [IW-1:0] set_of(logic [KEY_W-1:0] k);
    logic [IW-1:0] h;
    h = '0;
    for (int i = 0; i < KEY_W; i++) h[i % IW] ^= k[i];
    return (SETS > 1) ? h : '0;
  endfunction

  logic [KEY_W-1:0]  tag_mem  [WAYS][SETS];
  logic [METH_W-1:0] meth_mem [WAYS][SETS];
  logic              prim_mem [WAYS][SETS];
  logic [WAYS-1:0]   valid    [SETS];
  logic [WW-1:0]     mru      [SETS];

  logic [IW-1:0] l_set, f_set;
  logic [WW-1:0] hit_way;
  assign l_set = set_of(key);
  assign f_set = set_of(fill_key);

  always_comb begin
    hit     = 1'b0;
    prim    = 1'b0;
    method  = '0;
    hit_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (valid[l_set][w] && tag_mem[w][l_set] == key) begin
        hit     = 1'b1;
        prim    = prim_mem[w][l_set];
        method  = meth_mem[w][l_set];
        hit_way = WW'(w);
      end
    end
  end

  // Choice of the way a fill writes.
  logic [WW-1:0] f_way;
  always_comb begin
    logic found;
    found = 1'b0;
    f_way = (int'(mru[f_set]) == WAYS-1) ? '0 : mru[f_set] + WW'(1);
    for (int w = WAYS-1; w >= 0; w--)
      if (!valid[f_set][w]) begin f_way = WW'(w); end
    for (int w = 0; w < WAYS; w++)
      if (valid[f_set][w] && tag_mem[w][f_set] == fill_key && !found) begin
        f_way = WW'(w);
        found = 1'b1;
      end
  end

  // Tag, method and primitive arrays: written on fill only.
  always_ff @(posedge clk) begin
    if (fill_en) begin
      tag_mem[f_way][f_set]  <= fill_key;
      meth_mem[f_way][f_set] <= fill_method;
      prim_mem[f_way][f_set] <= fill_prim;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        valid[s] <= '0;
        mru[s]   <= '0;
      end
    end else if (inval_all) begin
      for (int s = 0; s < SETS; s++) valid[s] <= '0;
    end else begin
      if (lookup_en && hit) mru[l_set] <= hit_way;
      if (fill_en) begin
        valid[f_set][f_way] <= 1'b1;
        mru[f_set]          <= f_way;
      end
    end
  end
endmodule
