// seg_ctrl: segmentation controller of the Segmenter.
//
// A transfer starts with start, giving its length in bytes and whether it is
// Class 4 (AAL 3/4). The host streams the data words into the 512 x 32 FIFO
// meanwhile. As soon as the FIFO holds every word of the next cell (and the
// ATM header generator has finished), the controller sends the cell to the
// SONET framer one byte per accepted clock:
//   Class 4:  ATM header (5), segment header (2), 44 payload, trailer (2)
//   other:    ATM header (5), 48 payload
// The Class 4 trailer carries the length indicator (valid payload bytes) and a
// CRC-10 that is computed on the fly as the segment header and payload bytes
// go out, then over the 6 LI bits. Payload is taken from each 32-bit word most
// significant byte first; a FIFO word is popped after its 4th byte goes out;
// bytes past the end of the transfer are sent as zero. This repeats until the
// whole length has been sent, then busy falls (the driver's status flag).
// A non-Class-4 transfer marks its last cell with PT=001 (hdr_last).
//
// Cell assembly order follows the design; the byte-wide framer interface with
// valid/ready and start-of-cell, the byte order and the padding are this
// implementation's choices. Timing: 53 accepted bytes per cell, plus one idle
// clock between cells when the FIFO already holds the next cell.
module seg_ctrl
  import atm_pkg::*;
#(
  parameter int FIFO_CW = 10      // width of the FIFO's count output
) (
  input  logic               clk,
  input  logic               rst_n,
  // transfer set-up
  input  logic               start,
  input  logic [16:0]        len_bytes,
  input  logic               class4,
  output logic               busy,
  // header generators
  input  logic [39:0]        hdr,
  input  logic [39:0]        hdr_last,
  input  logic               hdr_valid,
  input  logic [15:0]        sar_hdr,
  output logic               aal_next,
  output logic               aal_first,
  output logic               aal_last,
  // data FIFO read side
  input  logic [31:0]        fifo_dout,
  input  logic [FIFO_CW-1:0] fifo_count,
  output logic               fifo_pop,
  // to the SONET framer
  output logic               tx_valid,
  output logic [7:0]         tx_data,
  output logic               tx_soc,
  input  logic               tx_ready
);
  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_SEND} state_e;
  state_e      state;
  logic [16:0] rem;        // bytes of the transfer not yet sent
  logic        c4;
  logic        first_cell;
  logic [5:0]  bi;         // byte index within the cell
  logic [9:0]  crc;
  logic [7:0]  crc_fin_q;

  // this cell's payload size
  wire [6:0]  pay_bytes  = c4 ? 7'(C4_PAY_BYTES) : 7'(RAW_PAY_BYTES);
  wire        last_cell  = (rem <= 17'(pay_bytes));
  wire [5:0]  cell_valid = last_cell ? rem[5:0] : pay_bytes[5:0];
  wire [3:0]  cell_words = 4'((cell_valid + 6'd3) >> 2);

  // payload byte index for this byte position
  wire [5:0]  pay_start  = c4 ? 6'd7 : 6'd5;
  wire        in_pay     = (bi >= pay_start) && (bi < pay_start + pay_bytes[5:0]);
  wire [5:0]  p          = bi - pay_start;
  wire [7:0]  pay_byte   = (p < cell_valid) ? fifo_dout[31 - 8*p[1:0] -: 8] : 8'h00;
  wire [39:0] h          = (!c4 && last_cell) ? hdr_last : hdr;
  wire [9:0]  crc_fin    = crc10_bits(crc, {cell_valid, 2'b00}, 6);

  assign aal_first = first_cell;
  assign aal_last  = last_cell;
  assign busy      = (state != S_IDLE);
  assign tx_valid  = (state == S_SEND);
  assign tx_soc    = (state == S_SEND) && (bi == 6'd0);

  always_comb begin
    tx_data = 8'h00;
    if (bi < 6'd5)                 tx_data = h[39 - 8*bi[2:0] -: 8];
    else if (c4 && bi == 6'd5)     tx_data = sar_hdr[15:8];
    else if (c4 && bi == 6'd6)     tx_data = sar_hdr[7:0];
    else if (in_pay)               tx_data = pay_byte;
    else if (c4 && bi == 6'd51)    tx_data = {cell_valid, crc_fin[9:8]};
    else if (c4 && bi == 6'd52)    tx_data = crc_fin_q;
  end

  wire xfer = tx_valid && tx_ready;
  assign fifo_pop = xfer && in_pay && (p[1:0] == 2'd3) && ({2'b0, p[5:2]} < {2'b0, cell_words});
  assign aal_next = xfer && (bi == 6'(CELL_BYTES - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      rem        <= '0;
      c4         <= 1'b0;
      first_cell <= 1'b0;
      bi         <= '0;
      crc        <= '0;
      crc_fin_q  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start && len_bytes != '0) begin
          rem        <= len_bytes;
          c4         <= class4;
          first_cell <= 1'b1;
          state      <= S_WAIT;
        end
        S_WAIT: if (hdr_valid && fifo_count >= FIFO_CW'(cell_words)) begin
          bi    <= '0;
          crc   <= '0;
          state <= S_SEND;
        end
        S_SEND: if (xfer) begin
          if (c4 && bi >= 6'd5 && bi <= 6'd50) crc <= crc10_byte(crc, tx_data);
          if (bi == 6'd51) crc_fin_q <= crc_fin[7:0];
          if (bi == 6'(CELL_BYTES - 1)) begin
            rem        <= rem - 17'(cell_valid);
            first_cell <= 1'b0;
            state      <= last_cell ? S_IDLE : S_WAIT;
          end else begin
            bi <= bi + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
