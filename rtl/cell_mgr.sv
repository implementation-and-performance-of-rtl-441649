// cell_mgr: cell manager of the Reassembler.
//
// Takes the cells the SONET framer delivers, one byte per clock with a
// start-of-cell flag, and works on each cell as it streams in:
//   - bytes 0..3 go through the CRC-8 header check, compared with byte 4
//     (the HEC, coset 0x55); the VCI and PT are taken from the header;
//   - for Class 4 cells, bytes 5..52 go through the AAL 3/4 CRC-10, which
//     must leave a zero remainder; the segment type and MID come from bytes
//     5..6 and the length indicator from byte 51; the sequence number is
//     ignored;
//   - the body (44 bytes for Class 4, 48 otherwise) is packed into 32-bit
//     words, first byte most significant, and pushed into the body FIFO as
//     each word completes.
// One clock after the last byte, a descriptor (VCI, type, MID, length, last,
// good, word count) is pushed into the descriptor queue, so a cell is checked
// within its own 53-clock cell time. Bad cells keep their body in the FIFO
// and are discarded downstream. A cell that arrives while the body FIFO lacks
// room for 12 words or the descriptor queue is full is not taken at all
// (ovf_drop pulses). hec_err and crc_err pulse for each bad cell.
// The checks and field extraction follow the design; formats, the byte
// interface and the overflow rule are this implementation's choices.
module cell_mgr
  import atm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        class4,
  // from the SONET framer
  input  logic        rx_valid,
  input  logic [7:0]  rx_data,
  input  logic        rx_soc,
  // body FIFO
  output logic        body_push,
  output logic [31:0] body_din,
  input  logic        body_room,   // room for a whole cell body
  // descriptor queue
  output logic        desc_push,
  output cell_desc_t  desc,
  input  logic        desc_full,
  // event pulses
  output logic        hec_err,
  output logic        crc_err,
  output logic        ovf_drop
);
  logic        in_cell, take, c4;
  logic [5:0]  bi;
  logic [31:0] hdr;
  logic [7:0]  hec;
  logic [9:0]  crc;
  logic [15:0] sar;
  logic [5:0]  li;
  logic [23:0] wbuf;
  logic [7:0]  hdr_hec;    // the HEC byte as received

  wire start = rx_valid && rx_soc;
  wire [5:0] idx = start ? 6'd0 : bi;        // index of the byte now on rx_data
  wire [7:0] hec_calc = hec ^ HEC_COSET;
  wire [5:0] pay_start = c4 ? 6'd7 : 6'd5;
  wire [5:0] pay_end   = c4 ? 6'd50 : 6'd52;
  wire       byte_ok   = rx_valid && (start || in_cell);
  wire       in_pay    = byte_ok && take && idx >= pay_start && idx <= pay_end;
  wire [5:0] p         = idx - pay_start;
  wire [9:0] crc_next  = crc10_byte(crc, rx_data);

  assign body_push = in_pay && (p[1:0] == 2'd3);
  assign body_din  = {wbuf, rx_data};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_cell   <= 1'b0;
      take      <= 1'b0;
      c4        <= 1'b0;
      bi        <= '0;
      hdr       <= '0;
      hec       <= '0;
      crc       <= '0;
      sar       <= '0;
      li        <= '0;
      wbuf      <= '0;
      hdr_hec   <= '0;
      desc_push <= 1'b0;
      desc      <= '0;
      hec_err   <= 1'b0;
      crc_err   <= 1'b0;
      ovf_drop  <= 1'b0;
    end else begin
      desc_push <= 1'b0;
      hec_err   <= 1'b0;
      crc_err   <= 1'b0;
      ovf_drop  <= 1'b0;
      if (start) begin
        in_cell  <= 1'b1;
        take     <= body_room && !desc_full;
        ovf_drop <= !(body_room && !desc_full);
        c4       <= class4;
        hec      <= crc8_byte(8'h00, rx_data);
        hdr      <= {rx_data, 24'h0};
        crc      <= '0;
        bi       <= 6'd1;
      end else if (rx_valid && in_cell) begin
        bi <= bi + 1'b1;
        if (bi < 6'd4) begin
          hec <= crc8_byte(hec, rx_data);
          hdr[31 - 8*bi[1:0] -: 8] <= rx_data;
        end
        if (bi >= 6'd5) crc <= crc_next;
        if (bi == 6'd4) hdr_hec <= rx_data;
        if (bi == 6'd5) sar[15:8] <= rx_data;
        if (bi == 6'd6) sar[7:0]  <= rx_data;
        if (bi == 6'd51) li <= rx_data[7:2];
        if (bi == 6'(CELL_BYTES - 1)) begin
          in_cell <= 1'b0;
          if (take) begin
            desc_push     <= 1'b1;
            desc.vci      <= hdr[19:4];
            desc.class4   <= c4;
            desc.st       <= sar[15:14];
            desc.mid      <= sar[9:0];
            desc.li       <= c4 ? li : 6'(RAW_PAY_BYTES);
            desc.last     <= c4 ? (sar[15:14] == ST_EOM || sar[15:14] == ST_SSM) : hdr[1];
            desc.nwords   <= c4 ? 4'(C4_WORDS) : 4'(RAW_WORDS);
            desc.good     <= (hec_calc == hdr_hec) && (!c4 || crc_next == '0);
            hec_err       <= (hec_calc != hdr_hec);
            crc_err       <= (hec_calc == hdr_hec) && c4 && (crc_next != '0);
          end
        end
      end
      if (in_pay) wbuf <= {wbuf[15:0], rx_data};
    end
  end

endmodule
