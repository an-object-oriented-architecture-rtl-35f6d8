// context_alloc: free list of fixed-size contexts in memory.
//
// All contexts have the same size, so one linked free list serves them.
// The free context pointer (FP) register holds the absolute address of the
// first free context; the first word of every free context holds the
// address of the following one, and a link of zero ends the list.
//   allocate: the context at FP is handed out and FP is loaded with its
//             link word - one memory read.
//   free:     the context's first word is written with FP and FP is set
//             to the context - one memory write.
// Handshake: pulse alloc_req or free_req for one cycle while idle (busy
// low). The block issues one memory request, holds mem_req until mem_ack,
// then pulses done. On an allocation from an empty list (FP = 0) no memory
// access is made and done comes with empty set. init loads FP with
// init_fp (the head of a list software has built).
//
// From the architecture: the single free list, the FP register and one
// memory reference per allocation or release. Chosen here: the link in the
// context's first word, zero as the end of the list, the handshake and the
// tag (object pointer) given to the link word.
//
// Lint notes: a link word's tag is ignored (only its 32 data bits are
// the address). The assertion is disabled while rst_n is low, so rst_n is
// also seen in a clocked context; that is a simulation check, not logic.
module context_alloc
  import com_pkg::*;
#(
  parameter int ABS_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             init,
  input  logic [ABS_W-1:0] init_fp,
  input  logic             alloc_req,
  input  logic             free_req,
  input  logic [ABS_W-1:0] free_addr,
  output logic             busy,
  output logic             done,
  output logic             empty,
  output logic [ABS_W-1:0] alloc_addr,
  output logic [ABS_W-1:0] fp,
  // memory port
  output logic             mem_req,
  output logic             mem_we,
  output logic [ABS_W-1:0] mem_addr,
  output mword_t           mem_wdata,
  input  mword_t           mem_rdata,
  input  logic             mem_ack
);
  typedef enum logic [1:0] {A_IDLE, A_READ, A_WRITE} astate_e;
  astate_e          st;
  logic [ABS_W-1:0] pend;

  assign busy      = (st != A_IDLE);
  assign mem_req   = (st != A_IDLE);
  assign mem_we    = (st == A_WRITE);
  assign mem_addr  = (st == A_WRITE) ? pend : fp;
  assign mem_wdata = '{tag: TAG_OBJPTR, data: WORD_W'(fp)};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= A_IDLE;
      fp         <= '0;
      pend       <= '0;
      done       <= 1'b0;
      empty      <= 1'b0;
      alloc_addr <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        A_IDLE: begin
          if (init) begin
            fp <= init_fp;
          end else if (alloc_req) begin
            if (fp == '0) begin
              done  <= 1'b1;
              empty <= 1'b1;
            end else begin
              st    <= A_READ;
              empty <= 1'b0;
            end
          end else if (free_req) begin
            pend  <= free_addr;
            st    <= A_WRITE;
            empty <= 1'b0;
          end
        end
        A_READ: if (mem_ack) begin
          alloc_addr <= fp;
          fp         <= ABS_W'(mem_rdata.data);
          done       <= 1'b1;
          st         <= A_IDLE;
        end
        A_WRITE: if (mem_ack) begin
          fp   <= pend;
          done <= 1'b1;
          st   <= A_IDLE;
        end
        default: st <= A_IDLE;
      endcase
    end
  end

  a_one_req: assert property (@(posedge clk) disable iff (!rst_n)
    !(alloc_req && free_req));
endmodule
