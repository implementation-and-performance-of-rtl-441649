// reassembler: receive board of the ATM host interface.
//
// A four-stage cell pipeline whose stages work in parallel on different cells:
//   cell manager     checks HEC and CRC-10 while a cell arrives, queues the
//                    body in the body FIFO and a descriptor in a small queue;
//   CAM lookup ctrl  maps VCI (and MID for Class 4) to a list reference using
//                    the VC and datagram CAMs;
//   linked list mgr  allocates a buffer block and links it to the list;
//   dual-port ctrl   moves the body from the FIFO into that block.
// The host, through the bus interface, pops blocks of a list in arrival order
// and reads their words from the buffer's second port, and flushes circuits
// and datagrams it does not want. The pipeline and its blocks follow the
// design; FIFO depths (BODY_DEPTH words, DESC_DEPTH cells) are this
// implementation's choice.
//
// Ports: the host bus (see rsm_mca_if) and the byte stream from the framer.
module reassembler
  import atm_pkg::*;
#(
  parameter int BODY_DEPTH = 64,
  parameter int DESC_DEPTH = 8,
  parameter int AW         = 15,   // 32K-word reassembly buffer
  parameter int NENT       = 256   // entries per CAM
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bus_sel,
  input  logic        bus_we,
  input  logic [3:0]  bus_addr,
  input  logic [31:0] bus_wdata,
  output logic [31:0] bus_rdata,
  output logic        bus_ack,
  input  logic        rx_valid,
  input  logic [7:0]  rx_data,
  input  logic        rx_soc
);
  localparam int BLKW = 4;
  localparam int BW   = AW - BLKW;
  localparam int BCW  = $clog2(BODY_DEPTH) + 1;
  localparam int DCW  = $clog2(DESC_DEPTH) + 1;

  logic class4;
  // cell manager -> FIFOs
  logic        body_push, body_pop, body_full, body_empty;
  logic [31:0] body_din, body_dout;
  logic [BCW-1:0] body_count;
  logic        desc_push, desc_pop, desc_full, desc_empty;
  cell_desc_t  desc_din, desc_dout;
  logic [DCW-1:0] desc_count;
  logic        ev_hec, ev_crc, ev_ovf, no_entry, no_block;
  // CAM controller -> LLM
  logic        req_valid, req_ready;
  llm_req_t    req;
  logic        flush_req, flush_dg, flush_ack;
  logic [7:0]  flush_idx;
  // LLM <-> host interface / buffer controller
  logic        pop_req, pop_done, pop_ok, pop_last, free_req, free_done;
  logic [8:0]  pop_list, stat_list;
  logic [BW-1:0] pop_blk, free_blk, wr_blk;
  logic [5:0]  pop_len;
  logic [BW:0] stat_cnt, stat_frames, free_blocks;
  logic        wr_valid, wr_discard, wr_ready;
  logic [3:0]  wr_nwords;
  logic        rd_en;
  logic [AW-1:0] rd_addr;
  logic [31:0] rd_data;

  wire body_room = (BCW'(BODY_DEPTH) - body_count) >= BCW'(RAW_WORDS);

  cell_mgr u_cell_mgr (
    .clk, .rst_n, .class4, .rx_valid, .rx_data, .rx_soc,
    .body_push, .body_din, .body_room,
    .desc_push, .desc(desc_din), .desc_full,
    .hec_err(ev_hec), .crc_err(ev_crc), .ovf_drop(ev_ovf)
  );

  sync_fifo #(.WIDTH(32), .DEPTH(BODY_DEPTH)) u_body_fifo (
    .clk, .rst_n, .push(body_push), .din(body_din), .pop(body_pop),
    .dout(body_dout), .full(body_full), .empty(body_empty), .count(body_count)
  );

  sync_fifo #(.WIDTH($bits(cell_desc_t)), .DEPTH(DESC_DEPTH)) u_desc_fifo (
    .clk, .rst_n, .push(desc_push), .din(desc_din), .pop(desc_pop),
    .dout(desc_dout), .full(desc_full), .empty(desc_empty), .count(desc_count)
  );

  cam_lookup_ctrl #(.NENT(NENT)) u_cam_ctrl (
    .clk, .rst_n, .desc_empty, .desc_in(desc_dout), .desc_pop,
    .req_valid, .req, .req_ready,
    .flush_req, .flush_dg, .flush_idx, .flush_ack, .no_entry
  );

  llm #(.NBLK(2**BW), .NLIST(2*NENT)) u_llm (
    .clk, .rst_n, .req_valid, .req, .req_ready,
    .pop_req, .pop_list, .pop_done, .pop_ok, .pop_blk, .pop_len, .pop_last,
    .free_req, .free_blk, .free_done,
    .stat_list, .stat_cnt, .stat_frames, .free_blocks,
    .wr_valid, .wr_blk, .wr_nwords, .wr_discard, .wr_ready, .no_block
  );

  rsm_buf_ctrl #(.AW(AW), .DW(32), .BLKW(BLKW)) u_buf_ctrl (
    .clk, .rst_n, .cmd_valid(wr_valid), .cmd_blk(wr_blk), .cmd_nwords(wr_nwords),
    .cmd_discard(wr_discard), .cmd_ready(wr_ready),
    .body_empty, .body_dout, .body_pop,
    .rd_en, .rd_addr, .rd_data
  );

  rsm_mca_if #(.BW(BW), .AW(AW)) u_if (
    .clk, .rst_n, .bus_sel, .bus_we, .bus_addr, .bus_wdata, .bus_rdata, .bus_ack,
    .class4, .flush_req, .flush_dg, .flush_idx, .flush_ack,
    .pop_req, .pop_list, .pop_done, .pop_ok, .pop_blk, .pop_len, .pop_last,
    .free_req, .free_blk, .free_done, .stat_list, .stat_cnt, .stat_frames, .free_blocks,
    .rd_en, .rd_addr, .rd_data,
    .ev_hec, .ev_crc, .ev_ovf, .ev_drop(no_entry || no_block)
  );

  a_body_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) body_push |-> !body_full);
endmodule
