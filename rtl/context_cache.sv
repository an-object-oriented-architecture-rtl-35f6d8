// context_cache: cache of method contexts, used in place of a register file.
//
// BLOCKS blocks of WORDS words, one context per block. Each word is kept
// with its tag and 16-bit class. Beside the data array sit a directory
// (the absolute address of the context in each block) and four BLOCKS-bit
// access vectors: current (the block of the current context), next (the
// block of the next context), free (unused blocks) and match (the block
// whose directory entry equals an absolute address).
//
// Access: each of the two read ports and the write port names its block
// either through the current or next vector, which skips the directory,
// or by an absolute address matched in the directory; a 5-bit word address
// selects the word. Reads are combinational, writes take effect at the
// clock edge. The array serves two reads or one write in a cycle, never
// both; an assertion checks that rule. Each port has its own directory
// comparison (the directory is duplicated to dual-port the cache).
//
// Context operations, at most one per cycle:
//   alloc  - the lowest free block leaves the free set and becomes the
//            next context; it is cleared in one step (per-word "written"
//            bits are reset, so every word reads as zero with the
//            uninitialized tag) and its directory entry gets alloc_abs.
//            alloc_fail is raised instead when no block is free.
//   call   - the next vector moves to the current vector; next is empty
//            until the following alloc.
//   ret    - the current vector moves back to the next vector, the block
//            matching ret_abs (the caller's context) becomes current and
//            the old next block is freed. ret_miss is raised instead when
//            ret_abs is not in the directory.
//   free   - the block matching free_abs is freed.
//
// From the architecture: the organisation above (directory, four access
// vectors, a 32 x 32 word dual-port array, block clear in one operation,
// first-free allocation, the moves on call and return, two reads or one
// write per cycle). Chosen here: freeing the old next block on return, the
// lowest-index choice of "first free", the per-word written bits as the
// clearing circuit, and the explicit free operation. The copy-back of
// least recently used contexts to memory is not built: when every block is
// in use, allocation fails and software must make room.
//
// Lint note: the assertions are disabled while rst_n is low, so rst_n is
// also seen in a clocked context; that is a simulation check, not logic.
module context_cache
  import com_pkg::*;
#(
  parameter int BLOCKS = 32,
  parameter int WORDS  = 32,
  parameter int ABS_W  = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  // read ports
  input  logic [1:0]         rd_en,
  input  logic [1:0][1:0]    rd_sel,     // 0: current, 1: next, 2: absolute
  input  logic [1:0][$clog2(WORDS)-1:0] rd_word,
  input  logic [1:0][ABS_W-1:0] rd_abs,
  output oword_t [1:0]       rd_data,
  output logic [1:0]         rd_hit,
  // write port
  input  logic               wr_en,
  input  logic [1:0]         wr_sel,
  input  logic [$clog2(WORDS)-1:0] wr_word,
  input  logic [ABS_W-1:0]   wr_abs,
  input  oword_t             wr_data,
  output logic               wr_hit,
  // context operations
  input  logic               op_alloc,
  input  logic [ABS_W-1:0]   alloc_abs,
  output logic               alloc_fail,
  input  logic               op_call,
  input  logic               op_ret,
  input  logic [ABS_W-1:0]   ret_abs,
  output logic               ret_miss,
  input  logic               op_free,
  input  logic [ABS_W-1:0]   free_abs,
  // state
  output logic [BLOCKS-1:0]  cur_vec,
  output logic [BLOCKS-1:0]  nxt_vec,
  output logic [BLOCKS-1:0]  free_vec
);
  localparam int BW = $clog2(BLOCKS);
  localparam int WW = $clog2(WORDS);

  localparam logic [1:0] SEL_CUR = 2'd0;
  localparam logic [1:0] SEL_NXT = 2'd1;

  oword_t             mem     [BLOCKS][WORDS];
  logic [WORDS-1:0]   written [BLOCKS];
  logic [ABS_W-1:0]   dir     [BLOCKS];

  function automatic logic [BLOCKS-1:0] match_of(logic [ABS_W-1:0] addr);
    logic [BLOCKS-1:0] m;
    for (int i = 0; i < BLOCKS; i++) m[i] = !free_vec[i] && dir[i] == addr;
    return m;
  endfunction

  function automatic logic [BW-1:0] index_of(logic [BLOCKS-1:0] v);
    logic [BW-1:0] idx;
    idx = '0;
    for (int i = BLOCKS-1; i >= 0; i--) if (v[i]) idx = BW'(i);
    return idx;
  endfunction

  function automatic logic [BLOCKS-1:0] vec_of(logic [1:0] sel, logic [ABS_W-1:0] addr);
    if (sel == SEL_CUR)      return cur_vec;
    else if (sel == SEL_NXT) return nxt_vec;
    else                     return match_of(addr);
  endfunction

  // Read ports.
  always_comb begin
    for (int p = 0; p < 2; p++) begin
      logic [BLOCKS-1:0] v;
      logic [BW-1:0]     b;
      v = vec_of(rd_sel[p], rd_abs[p]);
      b = index_of(v);
      rd_hit[p]  = rd_en[p] && (v != '0);
      rd_data[p] = (v != '0 && written[b][rd_word[p]]) ? mem[b][rd_word[p]] : '0;
    end
  end

  // Write port.
  logic [BLOCKS-1:0] wvec;
  logic [BW-1:0]     wblk;
  assign wvec   = vec_of(wr_sel, wr_abs);
  assign wblk   = index_of(wvec);
  assign wr_hit = wr_en && (wvec != '0);

  always_ff @(posedge clk) begin
    if (wr_hit) mem[wblk][wr_word] <= wr_data;
  end

  // Context operations.
  logic [BLOCKS-1:0] first_free, ret_match, free_match;
  logic [BW-1:0]     ff_blk;
  assign ff_blk     = index_of(free_vec);
  assign first_free = (free_vec == '0) ? '0 : (BLOCKS'(1) << ff_blk);
  assign alloc_fail = op_alloc && (free_vec == '0);
  assign ret_match  = match_of(ret_abs);
  assign ret_miss   = op_ret && (ret_match == '0);
  assign free_match = match_of(free_abs);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_vec  <= '0;
      nxt_vec  <= '0;
      free_vec <= '1;
      for (int i = 0; i < BLOCKS; i++) begin
        written[i] <= '0;
        dir[i]     <= '0;
      end
    end else begin
      if (wr_hit) written[wblk][wr_word] <= 1'b1;
      if (op_alloc && !alloc_fail) begin
        free_vec        <= free_vec & ~first_free;
        nxt_vec         <= first_free;
        written[ff_blk] <= '0;
        dir[ff_blk]     <= alloc_abs;
      end else if (op_call) begin
        cur_vec <= nxt_vec;
        nxt_vec <= '0;
      end else if (op_ret && !ret_miss) begin
        free_vec <= free_vec | nxt_vec;
        nxt_vec  <= cur_vec;
        cur_vec  <= ret_match;
      end else if (op_free) begin
        free_vec <= free_vec | free_match;
        cur_vec  <= cur_vec & ~free_match;
        nxt_vec  <= nxt_vec & ~free_match;
      end
    end
  end

  // The array does two reads or one write per cycle, not both.
  a_rw_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    !(wr_en && (rd_en != '0)));
  // One context operation per cycle.
  a_one_op: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({op_alloc, op_call, op_ret, op_free}));
  // Current and next are singletons (or empty).
  a_singleton: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(cur_vec) && $onehot0(nxt_vec));
endmodule
