// dp_ram: dual-port RAM, one write port and one read port, same clock.
//
// Holds the Reassembler's 32K x 32 reassembly buffer. Port A writes din to
// waddr when we is high. Port B reads raddr when re is high and shows the word
// on rdata one clock later (synchronous read, which maps onto block RAM).
// A read of the address being written in the same clock returns the old word.
module dp_ram #(
  parameter int AW = 15,
  parameter int DW = 32
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] din,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= din;
    if (re) rdata <= mem[raddr];
  end
endmodule
