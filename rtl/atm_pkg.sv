// atm_pkg: types, constants and CRC functions shared by the Segmenter and the
// Reassembler of the ATM host interface.
//
// Cell layout on the framer byte stream (53 bytes, one per clock):
//   bytes 0..3  ATM header: GFC(4) VPI(8) VCI(16) PT(3) CLP(1)
//   byte  4     HEC = CRC-8 (x^8+x^2+x+1) of bytes 0..3, XOR 0x55
//   Class 4 (AAL 3/4) cells:
//     bytes 5..6   SAR header: ST(2) SN(4) MID(10)
//     bytes 7..50  44 payload bytes
//     bytes 51..52 SAR trailer: LI(6) CRC-10(10), CRC over bytes 5..52
//   other cells: bytes 5..52 are 48 payload bytes.
// The header/trailer field layout is the standard ATM/AAL 3/4 one; the design
// names the fields but not their encoding.
package atm_pkg;

  localparam int CELL_BYTES   = 53;
  localparam int C4_WORDS     = 11;   // 44 payload bytes
  localparam int RAW_WORDS    = 12;   // 48 payload bytes
  localparam int C4_PAY_BYTES = 44;
  localparam int RAW_PAY_BYTES= 48;

  localparam logic [7:0] HEC_COSET = 8'h55;

  // AAL 3/4 segment types
  typedef enum logic [1:0] {
    ST_COM = 2'b00,
    ST_EOM = 2'b01,
    ST_BOM = 2'b10,
    ST_SSM = 2'b11
  } seg_type_e;

  // Descriptor of one received cell, cell manager -> CAM lookup controller
  typedef struct packed {
    logic        good;     // HEC (and CRC-10 for Class 4) correct
    logic        class4;   // AAL 3/4 framing
    logic [15:0] vci;
    logic [1:0]  st;       // segment type (Class 4)
    logic [9:0]  mid;
    logic [5:0]  li;       // valid payload bytes in this cell
    logic        last;     // EOM/SSM, or PT last-cell bit for other cells
    logic [3:0]  nwords;   // body words queued in the body FIFO
  } cell_desc_t;

  typedef enum logic [1:0] {
    LOP_APPEND = 2'd0,     // link a new block holding this cell
    LOP_DROP   = 2'd1,     // discard this cell's body
    LOP_FLUSH  = 2'd2      // free a whole list
  } llm_op_e;

  // Request CAM lookup controller -> linked list manager
  typedef struct packed {
    llm_op_e     op;
    logic [8:0]  list;     // {datagram, index}
    logic [5:0]  len;      // valid bytes
    logic        last;     // frame/datagram ends with this cell
    logic [3:0]  nwords;   // body words to move or discard
  } llm_req_t;

  // one bit step of the ATM HEC CRC-8, x^8 + x^2 + x + 1
  function automatic logic [7:0] crc8_byte(input logic [7:0] crc, input logic [7:0] d);
    logic [7:0] c;
    logic       fb;
    c = crc;
    for (int i = 7; i >= 0; i--) begin
      fb = c[7] ^ d[i];
      c  = {c[6:0], 1'b0};
      if (fb) c = c ^ 8'h07;
    end
    return c;
  endfunction

  // CRC-10 of AAL 3/4, x^10 + x^9 + x^5 + x^4 + x + 1, n bits of d from bit 7 down
  function automatic logic [9:0] crc10_bits(input logic [9:0] crc, input logic [7:0] d,
                                            input int unsigned n);
    logic [9:0] c;
    logic       fb;
    c = crc;
    for (int i = 7; i >= 0; i--) begin
      if (i >= 8 - int'(n)) begin
        fb = c[9] ^ d[i];
        c  = {c[8:0], 1'b0};
        if (fb) c = c ^ 10'h233;
      end
    end
    return c;
  endfunction

  function automatic logic [9:0] crc10_byte(input logic [9:0] crc, input logic [7:0] d);
    return crc10_bits(crc, d, 8);
  endfunction

endpackage
