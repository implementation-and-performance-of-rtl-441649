// atm_hdr_gen: ATM header generator of the Segmenter.
//
// The host loads the virtual circuit identifier (VCI) once per transfer. The
// block then builds the 4 header bytes and computes the header error control
// byte (HEC) with a byte-serial CRC-8 (x^8+x^2+x+1, result XOR 0x55): one
// header byte per clock for 4 clocks and one clock to finish, so hdr_valid
// rises on the 5th clock edge after load, matching the 5 clocks the design
// budgets for header generation. Two headers are produced in parallel: hdr for
// ordinary cells (PT=000) and hdr_last with PT=001, which the segmentation
// controller puts on the last cell of a non-Class-4 transfer.
//
// Only the VCI is programmable. GFC, VPI and CLP are zero; that, the HEC
// polynomial (standard ATM) and the last-cell PT marking are this
// implementation's choices.
//
// Interface: load (1 clock) with vci; hdr/hdr_last are 40 bits, byte 0 in
// bits 39:32, HEC in bits 7:0; hdr_valid stays high until the next load.
module atm_hdr_gen
  import atm_pkg::*;
#(
  parameter int HDR_CYCLES = 5   // fixed by the byte-serial structure: 4 bytes + 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic [15:0] vci,
  output logic [39:0] hdr,
  output logic [39:0] hdr_last,
  output logic        hdr_valid
);
  logic [15:0] vci_q;
  logic [2:0]  step;
  logic        busy;
  logic [7:0]  crc_n, crc_l;

  // header bytes 0..3 for PT = 000 and PT = 001
  function automatic logic [31:0] hdr4(input logic [15:0] v, input logic last);
    return {4'h0, 8'h00, v, 2'b00, last, 1'b0};
  endfunction

  wire [31:0] h_n = hdr4(vci_q, 1'b0);
  wire [31:0] h_l = hdr4(vci_q, 1'b1);
  wire [7:0]  b_n = h_n[31 - 8*step[1:0] -: 8];
  wire [7:0]  b_l = h_l[31 - 8*step[1:0] -: 8];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vci_q     <= '0;
      step      <= '0;
      busy      <= 1'b0;
      crc_n     <= '0;
      crc_l     <= '0;
      hdr_valid <= 1'b0;
      hdr       <= '0;
      hdr_last  <= '0;
    end else if (load) begin
      vci_q     <= vci;
      step      <= '0;
      busy      <= 1'b1;
      crc_n     <= '0;
      crc_l     <= '0;
      hdr_valid <= 1'b0;
    end else if (busy) begin
      if (step < 3'(HDR_CYCLES - 1)) begin
        crc_n <= crc8_byte(crc_n, b_n);
        crc_l <= crc8_byte(crc_l, b_l);
        step  <= step + 1'b1;
      end else begin
        hdr       <= {h_n, crc_n ^ HEC_COSET};
        hdr_last  <= {h_l, crc_l ^ HEC_COSET};
        hdr_valid <= 1'b1;
        busy      <= 1'b0;
      end
    end
  end
endmodule
