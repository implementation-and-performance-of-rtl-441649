// aal_hdr_gen: AAL 3/4 (Class 4) segment header generator of the Segmenter.
//
// The host loads the multiplexing identifier (MID) for a Class 4 transfer. For
// every cell the segmentation controller sends, sar_hdr gives the 16-bit
// segment header {ST, SN, MID}: ST is BOM for the first cell, EOM for the last,
// SSM for a cell that is both and COM otherwise; SN is a 4-bit sequence number
// that starts at 0 on load_mid and advances modulo 16 on each next pulse.
// sar_hdr is combinational from first/last and the registered SN/MID.
// The field encoding is the standard AAL 3/4 one; the design names the
// generator and the MID but not the format.
module aal_hdr_gen
  import atm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load_mid,
  input  logic [9:0]  mid,
  input  logic        next,     // current cell has been sent
  input  logic        first,
  input  logic        last,
  output logic [15:0] sar_hdr
);
  logic [9:0] mid_q;
  logic [3:0] sn;
  seg_type_e  st;

  always_comb begin
    unique case ({first, last})
      2'b11:   st = ST_SSM;
      2'b10:   st = ST_BOM;
      2'b01:   st = ST_EOM;
      default: st = ST_COM;
    endcase
  end

  assign sar_hdr = {st, sn, mid_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mid_q <= '0;
      sn    <= '0;
    end else if (load_mid) begin
      mid_q <= mid;
      sn    <= '0;
    end else if (next) begin
      sn    <= sn + 1'b1;
    end
  end
endmodule
