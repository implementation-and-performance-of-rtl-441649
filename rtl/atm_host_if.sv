// atm_host_if: ATM host interface for a workstation, top level.
//
// The interface consists of two boards that sit side by side on the host's
// I/O bus: the Segmenter, which turns host data into 53-byte ATM cells for
// the SONET framer, and the Reassembler, which checks arriving cells, sorts
// them by virtual circuit and datagram into linked lists in a 32K x 32 buffer
// and lets the host read them list by list. Each board has its own host bus
// port (seg_bus_*, rsm_bus_*); the framer is outside the design, so the
// transmit byte stream (tx_*) and the receive byte stream (rx_*) are ports.
// Both boards run on the same 20 MHz clock here.
module atm_host_if (
  input  logic        clk,
  input  logic        rst_n,
  // Segmenter host bus
  input  logic        seg_bus_sel,
  input  logic        seg_bus_we,
  input  logic [3:0]  seg_bus_addr,
  input  logic [31:0] seg_bus_wdata,
  output logic [31:0] seg_bus_rdata,
  output logic        seg_bus_ack,
  // Reassembler host bus
  input  logic        rsm_bus_sel,
  input  logic        rsm_bus_we,
  input  logic [3:0]  rsm_bus_addr,
  input  logic [31:0] rsm_bus_wdata,
  output logic [31:0] rsm_bus_rdata,
  output logic        rsm_bus_ack,
  // to the transmit SONET framer
  output logic        tx_valid,
  output logic [7:0]  tx_data,
  output logic        tx_soc,
  input  logic        tx_ready,
  // from the receive SONET framer
  input  logic        rx_valid,
  input  logic [7:0]  rx_data,
  input  logic        rx_soc
);
  segmenter u_seg (
    .clk, .rst_n,
    .bus_sel(seg_bus_sel), .bus_we(seg_bus_we), .bus_addr(seg_bus_addr),
    .bus_wdata(seg_bus_wdata), .bus_rdata(seg_bus_rdata), .bus_ack(seg_bus_ack),
    .tx_valid, .tx_data, .tx_soc, .tx_ready
  );

  reassembler u_rsm (
    .clk, .rst_n,
    .bus_sel(rsm_bus_sel), .bus_we(rsm_bus_we), .bus_addr(rsm_bus_addr),
    .bus_wdata(rsm_bus_wdata), .bus_rdata(rsm_bus_rdata), .bus_ack(rsm_bus_ack),
    .rx_valid, .rx_data, .rx_soc
  );
endmodule
