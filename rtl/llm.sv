// llm: linked list manager of the Reassembler.
//
// The reassembly buffer is divided into NBLK blocks of 16 words; each holds
// one cell body. For every list (256 virtual circuits and 256 datagrams) the
// LLM keeps head, tail, a block count and a count of frame ends; the pointer
// memory holds, per block, the next block, the cell's valid byte count and a
// last-cell flag. Operations, one at a time:
//   APPEND  take a free block, record length/last, link it after the list's
//           tail, then command the buffer controller to move the cell body
//           into it (about 6 clocks, within the 12 the design gives);
//   DROP    command the buffer controller to discard a cell body;
//   FLUSH   splice a whole list onto the free list (constant time);
//   POP     (host) unlink the head block of a list and report block, length
//           and last flag; waits until the buffer controller is idle, so a
//           block is never handed out before its data is written;
//   FREE    (host) return a block the host has finished reading.
// Free blocks come first from a counter of never-used blocks, then from a free
// list threaded through the pointer memory, so no initialisation pass is
// needed after reset. If no block is free an APPEND becomes a discard and
// no_block pulses. Network requests (req_*) take priority over host ones.
// The per-list linked lists, the pointer memory and tail insertion / head
// removal follow the design; block size, the free list and the command
// interfaces are this implementation's choices.
module llm
  import atm_pkg::*;
#(
  parameter int NBLK  = 2048,
  parameter int NLIST = 512,
  localparam int BW = $clog2(NBLK),
  localparam int LW = $clog2(NLIST)
) (
  input  logic          clk,
  input  logic          rst_n,
  // from the CAM lookup controller
  input  logic          req_valid,
  input  llm_req_t      req,
  output logic          req_ready,
  // host operations
  input  logic          pop_req,
  input  logic [LW-1:0] pop_list,
  output logic          pop_done,
  output logic          pop_ok,
  output logic [BW-1:0] pop_blk,
  output logic [5:0]    pop_len,
  output logic          pop_last,
  input  logic          free_req,
  input  logic [BW-1:0] free_blk,
  output logic          free_done,
  // list status for the host
  input  logic [LW-1:0] stat_list,
  output logic [BW:0]   stat_cnt,
  output logic [BW:0]   stat_frames,
  output logic [BW:0]   free_blocks,
  // command to the dual-port reassembly controller
  output logic          wr_valid,
  output logic [BW-1:0] wr_blk,
  output logic [3:0]    wr_nwords,
  output logic          wr_discard,
  input  logic          wr_ready,
  output logic          no_block
);
  typedef enum logic [2:0] {S_IDLE, S_ALLOC, S_INIT, S_LINK, S_SEND, S_FLUSH, S_POP, S_FREE} state_e;
  state_e state;

  // pointer memory
  logic [BW-1:0] nxt   [NBLK];
  logic [5:0]    plen  [NBLK];
  logic          plast [NBLK];
  // list table
  logic [BW-1:0] head  [NLIST];
  logic [BW-1:0] tail  [NLIST];
  logic [BW:0]   cnt   [NLIST];
  logic [BW:0]   nfr   [NLIST];

  logic [BW:0]   fresh;       // blocks never used yet start here
  logic [BW-1:0] free_head;
  logic [BW:0]   free_cnt;

  llm_req_t      r;
  logic [LW-1:0] l;
  logic [BW-1:0] b;

  assign stat_cnt    = cnt[stat_list];
  assign stat_frames = nfr[stat_list];
  assign free_blocks = free_cnt + ((BW+1)'(NBLK) - fresh);

  assign req_ready  = (state == S_IDLE) && req_valid;
  assign wr_valid   = (state == S_SEND);
  assign wr_blk     = b;
  assign wr_nwords  = r.nwords;
  assign wr_discard = (r.op != LOP_APPEND);

  always_ff @(posedge clk) begin
    unique case (state)
      S_INIT: begin
        plen[b]  <= r.len;
        plast[b] <= r.last;
      end
      S_LINK:  if (cnt[l] != '0) nxt[tail[l]] <= b;
      S_FLUSH: if (cnt[l] != '0) nxt[tail[l]] <= free_head;
      S_FREE:  nxt[b] <= free_head;
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    unique case (state)
      S_LINK: begin
        if (cnt[l] == '0) head[l] <= b;
        tail[l] <= b;
      end
      S_POP: if (cnt[l] != '0) head[l] <= nxt[head[l]];
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NLIST; i++) begin
        cnt[i] <= '0;
        nfr[i] <= '0;
      end
    end else begin
      unique case (state)
        S_LINK: begin
          cnt[l] <= cnt[l] + 1'b1;
          if (r.last) nfr[l] <= nfr[l] + 1'b1;
        end
        S_FLUSH: begin
          cnt[l] <= '0;
          nfr[l] <= '0;
        end
        S_POP: if (cnt[l] != '0) begin
          cnt[l] <= cnt[l] - 1'b1;
          if (plast[head[l]]) nfr[l] <= nfr[l] - 1'b1;
        end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      fresh     <= '0;
      free_head <= '0;
      free_cnt  <= '0;
      r         <= '0;
      l         <= '0;
      b         <= '0;
      pop_done  <= 1'b0;
      pop_ok    <= 1'b0;
      pop_blk   <= '0;
      pop_len   <= '0;
      pop_last  <= 1'b0;
      free_done <= 1'b0;
      no_block  <= 1'b0;
    end else begin
      pop_done  <= 1'b0;
      free_done <= 1'b0;
      no_block  <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (req_valid) begin
            r <= req;
            l <= LW'(req.list);
            unique case (req.op)
              LOP_APPEND: state <= S_ALLOC;
              LOP_FLUSH:  state <= S_FLUSH;
              default:    state <= S_SEND;
            endcase
          end else if (pop_req && !pop_done && wr_ready) begin
            l     <= pop_list;
            state <= S_POP;
          end else if (free_req && !free_done) begin
            b     <= free_blk;
            state <= S_FREE;
          end
        end
        S_ALLOC: begin
          if (fresh != (BW+1)'(NBLK)) begin
            b     <= BW'(fresh);
            fresh <= fresh + 1'b1;
            state <= S_INIT;
          end else if (free_cnt != '0) begin
            b         <= free_head;
            free_head <= nxt[free_head];
            free_cnt  <= free_cnt - 1'b1;
            state     <= S_INIT;
          end else begin
            r.op     <= LOP_DROP;      // no room: discard the body
            no_block <= 1'b1;
            state    <= S_SEND;
          end
        end
        S_INIT:  state <= S_LINK;
        S_LINK:  state <= S_SEND;
        S_SEND:  if (wr_ready) state <= S_IDLE;
        S_FLUSH: begin
          if (cnt[l] != '0) begin
            free_head <= head[l];
            free_cnt  <= free_cnt + cnt[l];
          end
          state <= S_IDLE;
        end
        S_POP: begin
          pop_done <= 1'b1;
          pop_ok   <= (cnt[l] != '0);
          pop_blk  <= head[l];
          pop_len  <= plen[head[l]];
          pop_last <= plast[head[l]];
          state    <= S_IDLE;
        end
        S_FREE: begin
          free_head <= b;
          free_cnt  <= free_cnt + 1'b1;
          free_done <= 1'b1;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
