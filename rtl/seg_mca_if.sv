// seg_mca_if: host bus interface of the Segmenter board.
//
// Register map (32-bit registers, word addresses):
//   0 W  VCI (bits 15:0); loading it starts the ATM header generator
//   1 W  MID (bits 9:0) for Class 4 transfers; restarts the sequence number
//   2 W  start a transfer: bit 31 Class 4, bits 16:0 length in bytes
//   3 W  data word, pushed into the 512 x 32 FIFO (the streaming target)
//   4 R  status: bit 31 busy, bit 30 header ready, bits 9:0 FIFO words
// Bus cycle: the host drives bus_sel with bus_we/bus_addr/bus_wdata and holds
// them until bus_ack, which is high for one clock. Register accesses finish on
// the next clock; a data write waits (no ack) while the FIFO is full, the
// bus's wait state. A new cycle may follow right after the ack clock.
// The design names this block (a Micro Channel interface with streaming
// transfers); the generic bus and the register map are this implementation's.
module seg_mca_if (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        bus_sel,
  input  logic        bus_we,
  input  logic [3:0]  bus_addr,
  input  logic [31:0] bus_wdata,
  output logic [31:0] bus_rdata,
  output logic        bus_ack,
  // to the blocks of the board
  output logic        vci_load,
  output logic [15:0] vci,
  output logic        mid_load,
  output logic [9:0]  mid,
  output logic        start,
  output logic [16:0] len_bytes,
  output logic        class4,
  output logic        fifo_push,
  output logic [31:0] fifo_din,
  input  logic        fifo_full,
  input  logic [9:0]  fifo_count,
  input  logic        busy,
  input  logic        hdr_valid
);
  wire active = bus_sel && !bus_ack;
  wire wr     = active && bus_we;
  wire rd     = active && !bus_we;

  assign vci_load  = wr && bus_addr == 4'd0;
  assign vci       = bus_wdata[15:0];
  assign mid_load  = wr && bus_addr == 4'd1;
  assign mid       = bus_wdata[9:0];
  assign start     = wr && bus_addr == 4'd2 && !busy;
  assign class4    = bus_wdata[31];
  assign len_bytes = bus_wdata[16:0];
  assign fifo_push = wr && bus_addr == 4'd3 && !fifo_full;
  assign fifo_din  = bus_wdata;

  // a start while a transfer is running waits, like a data write to a full FIFO
  wire stall = (bus_addr == 4'd3 && fifo_full) || (bus_addr == 4'd2 && busy);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_ack   <= 1'b0;
      bus_rdata <= '0;
    end else begin
      bus_ack <= (wr && !stall) || rd;
      if (rd) bus_rdata <= (bus_addr == 4'd4) ? {busy, hdr_valid, 20'd0, fifo_count} : 32'd0;
    end
  end
endmodule
