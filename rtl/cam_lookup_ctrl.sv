// cam_lookup_ctrl: CAM lookup controller of the Reassembler.
//
// Manages two CAMs of 256 x 48: the VC CAM, keyed by the cell's VCI, and the
// datagram CAM, keyed by {VC entry, MID}. For each cell descriptor it
//   1. searches the VC CAM; an unknown VCI takes the lowest free VC entry;
//   2. for Class 4 cells, searches the datagram CAM; a BOM or SSM cell with
//      no entry takes the lowest free datagram entry, a COM or EOM cell needs
//      an existing one; an EOM or SSM cell removes the key from the CAM (the
//      MID can start a new datagram) but keeps the entry reserved;
//   3. passes a list reference to the linked list manager: {0, VC entry} for
//      non-Class-4 cells, {1, datagram entry} for Class 4 cells.
// Bad cells, cells with no entry and cells finding a CAM full become DROP
// requests (no_entry pulses for the last two), so the LLM still discards their
// bodies in order. Host flushes (between cells) invalidate an entry, release
// its reservation and send a FLUSH request for its list. From taking a
// descriptor to offering the request takes at most 6 clocks, within the 11
// the design gives for its longest per-cell operation; an LLM that is not
// ready adds wait clocks.
// Learning entries on first use, the key layout and the drop rules are this
// implementation's choices; the design gives the two CAMs, their sizes and
// the lookup and flush functions.
module cam_lookup_ctrl
  import atm_pkg::*;
#(
  parameter int NENT  = 256,
  parameter int WIDTH = 48
) (
  input  logic       clk,
  input  logic       rst_n,
  // descriptor queue
  input  logic       desc_empty,
  input  cell_desc_t desc_in,
  output logic       desc_pop,
  // to the linked list manager
  output logic       req_valid,
  output llm_req_t   req,
  input  logic       req_ready,
  // host flush
  input  logic       flush_req,
  input  logic       flush_dg,
  input  logic [7:0] flush_idx,
  output logic       flush_ack,
  // events
  output logic       no_entry
);
  typedef enum logic [2:0] {S_IDLE, S_VC_SRCH, S_VC_RES, S_DG_SRCH, S_DG_RES, S_ISSUE, S_FLUSH} state_e;
  state_e state;

  cell_desc_t d;
  logic [7:0] vcidx;
  logic [NENT-1:0] vc_used, dg_used;
  logic       is_flush;

  // CAM ports
  logic             vc_search, dg_search, vc_hit, dg_hit;
  logic [7:0]       vc_hit_idx, dg_hit_idx;
  logic             vc_we, dg_we, vc_wvalid, dg_wvalid;
  logic [7:0]       vc_widx, dg_widx;
  logic [WIDTH-1:0] vc_key, dg_key, vc_wkey, dg_wkey;

  assign vc_key = WIDTH'(d.vci);
  assign dg_key = WIDTH'({vcidx, d.mid});

  cam #(.DEPTH(NENT), .WIDTH(WIDTH)) u_vc_cam (
    .clk, .rst_n, .search(vc_search), .key(vc_key), .hit(vc_hit), .hit_idx(vc_hit_idx),
    .we(vc_we), .widx(vc_widx), .wkey(vc_wkey), .wvalid(vc_wvalid)
  );
  cam #(.DEPTH(NENT), .WIDTH(WIDTH)) u_dg_cam (
    .clk, .rst_n, .search(dg_search), .key(dg_key), .hit(dg_hit), .hit_idx(dg_hit_idx),
    .we(dg_we), .widx(dg_widx), .wkey(dg_wkey), .wvalid(dg_wvalid)
  );

  // lowest free entry of each CAM
  logic       vc_free_ok, dg_free_ok;
  logic [7:0] vc_free, dg_free;
  always_comb begin
    vc_free_ok = 1'b0; vc_free = '0;
    dg_free_ok = 1'b0; dg_free = '0;
    for (int i = NENT - 1; i >= 0; i--) begin
      if (!vc_used[i]) begin vc_free_ok = 1'b1; vc_free = 8'(i); end
      if (!dg_used[i]) begin dg_free_ok = 1'b1; dg_free = 8'(i); end
    end
  end

  wire bom_like = (d.st == ST_BOM) || (d.st == ST_SSM);

  always_comb begin
    vc_search = (state == S_VC_SRCH);
    dg_search = (state == S_DG_SRCH);
    vc_we = 1'b0; vc_widx = vc_free; vc_wkey = vc_key; vc_wvalid = 1'b1;
    dg_we = 1'b0; dg_widx = dg_free; dg_wkey = dg_key; dg_wvalid = !d.last;
    if (state == S_VC_RES && !vc_hit && vc_free_ok) vc_we = 1'b1;
    if (state == S_DG_RES) begin
      if (dg_hit) begin
        dg_we   = d.last;                // datagram ends: remove its key
        dg_widx = dg_hit_idx;
      end else if (bom_like && dg_free_ok) begin
        dg_we   = 1'b1;
      end
    end
    if (state == S_FLUSH && !is_flush) begin
      if (flush_dg) begin dg_we = 1'b1; dg_widx = flush_idx; dg_wvalid = 1'b0; end
      else          begin vc_we = 1'b1; vc_widx = flush_idx; vc_wvalid = 1'b0; end
    end
  end

  assign desc_pop  = (state == S_IDLE) && !flush_req && !desc_empty;
  assign req_valid = (state == S_ISSUE) || (state == S_FLUSH && is_flush);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      d         <= '0;
      vcidx     <= '0;
      vc_used   <= '0;
      dg_used   <= '0;
      req       <= '0;
      is_flush  <= 1'b0;
      flush_ack <= 1'b0;
      no_entry  <= 1'b0;
    end else begin
      flush_ack <= 1'b0;
      no_entry  <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (flush_req && !flush_ack) begin
            is_flush <= 1'b0;
            state    <= S_FLUSH;
          end else if (!desc_empty) begin
            d          <= desc_in;
            req.len    <= desc_in.li;
            req.last   <= desc_in.last;
            req.nwords <= desc_in.nwords;
            if (desc_in.good) begin
              state <= S_VC_SRCH;
            end else begin
              req.op <= LOP_DROP;
              state  <= S_ISSUE;
            end
          end
        end
        S_VC_SRCH: state <= S_VC_RES;
        S_VC_RES: begin
          if (vc_hit || vc_free_ok) begin
            vcidx <= vc_hit ? vc_hit_idx : vc_free;
            if (!vc_hit) vc_used[vc_free] <= 1'b1;
            if (d.class4) begin
              state <= S_DG_SRCH;
            end else begin
              req.op   <= LOP_APPEND;
              req.list <= {1'b0, vc_hit ? vc_hit_idx : vc_free};
              state    <= S_ISSUE;
            end
          end else begin
            req.op   <= LOP_DROP;
            no_entry <= 1'b1;
            state    <= S_ISSUE;
          end
        end
        S_DG_SRCH: state <= S_DG_RES;
        S_DG_RES: begin
          if (dg_hit) begin
            req.op   <= LOP_APPEND;
            req.list <= {1'b1, dg_hit_idx};
          end else if (bom_like && dg_free_ok) begin
            req.op   <= LOP_APPEND;
            req.list <= {1'b1, dg_free};
            dg_used[dg_free] <= 1'b1;
          end else begin
            req.op   <= LOP_DROP;
            no_entry <= 1'b1;
          end
          state <= S_ISSUE;
        end
        S_ISSUE: if (req_ready) state <= S_IDLE;
        S_FLUSH: begin
          if (!is_flush) begin
            // invalidate the entry this clock, then ask the LLM to free its list
            if (flush_dg) dg_used[flush_idx] <= 1'b0;
            else          vc_used[flush_idx] <= 1'b0;
            req.op   <= LOP_FLUSH;
            req.list <= {flush_dg, flush_idx};
            is_flush <= 1'b1;
          end else if (req_ready) begin
            flush_ack <= 1'b1;
            state     <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
