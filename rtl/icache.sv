// icache: instruction cache.
//
// Holds the instructions of frequently executed methods, one 32-bit
// instruction per entry, addressed by absolute word address. LINES entries
// are arranged as LINES/WAYS sets of WAYS ways; the set index is the low
// address bits and the rest of the address is the tag. Lookup is
// combinational; a miss is served by reading the word from the memory
// system and writing it through the fill port. Replacement: an invalid way,
// else the way after the most recently used (for two ways: LRU).
//
// From the architecture: an instruction cache addressed by the instruction
// pointer, and the default size (4096 entries, two ways), which its
// measurements show is needed for a 99% hit ratio. Chosen here: one word
// per entry, direct low-bit indexing and the replacement order.
module icache #(
  parameter int LINES  = 4096,
  parameter int WAYS   = 2,
  parameter int ADDR_W = 32,
  parameter int DATA_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              lookup_en,
  input  logic [ADDR_W-1:0] addr,
  output logic              hit,
  output logic [DATA_W-1:0] rdata,
  input  logic              fill_en,
  input  logic [ADDR_W-1:0] fill_addr,
  input  logic [DATA_W-1:0] fill_data,
  input  logic              inval_all
);
  localparam int SETS = LINES / WAYS;
  localparam int IW   = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int WW   = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int TW   = ADDR_W - IW;

  logic [TW-1:0]     tag_mem  [WAYS][SETS];
  logic [DATA_W-1:0] data_mem [WAYS][SETS];
  logic [WAYS-1:0]   valid    [SETS];
  logic [WW-1:0]     mru      [SETS];

  logic [IW-1:0] l_set, f_set;
  logic [TW-1:0] l_tag, f_tag;
  logic [WW-1:0] hit_way, f_way;

  assign l_set = (SETS > 1) ? addr[IW-1:0] : '0;
  assign l_tag = addr[ADDR_W-1:ADDR_W-TW];
  assign f_set = (SETS > 1) ? fill_addr[IW-1:0] : '0;
  assign f_tag = fill_addr[ADDR_W-1:ADDR_W-TW];

  always_comb begin
    hit     = 1'b0;
    rdata   = '0;
    hit_way = '0;
    for (int w = 0; w < WAYS; w++)
      if (valid[l_set][w] && tag_mem[w][l_set] == l_tag) begin
        hit     = 1'b1;
        rdata   = data_mem[w][l_set];
        hit_way = WW'(w);
      end
  end

  always_comb begin
    f_way = (int'(mru[f_set]) == WAYS-1) ? '0 : mru[f_set] + WW'(1);
    for (int w = WAYS-1; w >= 0; w--)
      if (!valid[f_set][w]) f_way = WW'(w);
    for (int w = 0; w < WAYS; w++)
      if (valid[f_set][w] && tag_mem[w][f_set] == f_tag) f_way = WW'(w);
  end

  always_ff @(posedge clk) begin
    if (fill_en) begin
      tag_mem[f_way][f_set]  <= f_tag;
      data_mem[f_way][f_set] <= fill_data;
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
