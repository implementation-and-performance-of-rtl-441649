// segmenter: transmit board of the ATM host interface.
//
// The host loads the VCI (ATM header generator) and, for Class 4 data, the MID
// (AAL header generator), starts a transfer with its length, and streams the
// data words into the 512 x 32 data FIFO. The segmentation controller cuts the
// data into cells as soon as each cell's words are in the FIFO, adds the ATM
// header, the AAL 3/4 segment header and trailer (CRC-10 computed on the way
// out) and hands the 53 bytes to the SONET framer, one byte per accepted
// clock. The block structure follows the design; see the sub-blocks for the
// choices made where it gives only a block's function.
//
// Ports: the host bus (see seg_mca_if) and the byte stream to the framer.
module segmenter
  import atm_pkg::*;
#(
  parameter int FIFO_DEPTH = 512
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bus_sel,
  input  logic        bus_we,
  input  logic [3:0]  bus_addr,
  input  logic [31:0] bus_wdata,
  output logic [31:0] bus_rdata,
  output logic        bus_ack,
  output logic        tx_valid,
  output logic [7:0]  tx_data,
  output logic        tx_soc,
  input  logic        tx_ready
);
  localparam int CW = $clog2(FIFO_DEPTH) + 1;

  logic        vci_load, mid_load, start, class4, fifo_push, fifo_pop;
  logic        fifo_full, fifo_empty, busy, hdr_valid;
  logic        aal_next, aal_first, aal_last;
  logic [15:0] vci, sar_hdr;
  logic [9:0]  mid;
  logic [16:0] len_bytes;
  logic [31:0] fifo_din, fifo_dout;
  logic [CW-1:0] fifo_count;
  logic [39:0] hdr, hdr_last;

  seg_mca_if u_if (
    .clk, .rst_n, .bus_sel, .bus_we, .bus_addr, .bus_wdata, .bus_rdata, .bus_ack,
    .vci_load, .vci, .mid_load, .mid, .start, .len_bytes, .class4,
    .fifo_push, .fifo_din, .fifo_full, .fifo_count(10'(fifo_count)), .busy, .hdr_valid
  );

  atm_hdr_gen u_atm_hdr (
    .clk, .rst_n, .load(vci_load), .vci, .hdr, .hdr_last, .hdr_valid
  );

  aal_hdr_gen u_aal_hdr (
    .clk, .rst_n, .load_mid(mid_load), .mid, .next(aal_next),
    .first(aal_first), .last(aal_last), .sar_hdr
  );

  sync_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .push(fifo_push), .din(fifo_din), .pop(fifo_pop),
    .dout(fifo_dout), .full(fifo_full), .empty(fifo_empty), .count(fifo_count)
  );

  seg_ctrl #(.FIFO_CW(CW)) u_ctrl (
    .clk, .rst_n, .start, .len_bytes, .class4, .busy,
    .hdr, .hdr_last, .hdr_valid, .sar_hdr, .aal_next, .aal_first, .aal_last,
    .fifo_dout, .fifo_count, .fifo_pop,
    .tx_valid, .tx_data, .tx_soc, .tx_ready
  );

  a_pop_has_data: assert property (@(posedge clk) disable iff (!rst_n) fifo_pop |-> !fifo_empty);
endmodule
