// sync_fifo: single-clock first-in first-out buffer.
//
// Used as the Segmenter's 512 x 32 data buffer between the host stream and the
// segmentation controller, and in the Reassembler as the cell body FIFO and the
// cell descriptor queue. The storage is an array addressed by read and write
// pointers one bit wider than the address, so full and empty are told apart.
// Reads are first-word fall-through: dout shows the oldest entry whenever
// empty is low, and pop removes it at the clock edge. push while full and pop
// while empty are ignored (and flagged by assertions). The 512 x 32 size is
// the design's; the fall-through read is this implementation's choice.
module sync_fifo #(
  parameter int WIDTH = 32,
  parameter int DEPTH = 512
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push,
  input  logic [WIDTH-1:0]         din,
  input  logic                     pop,
  output logic [WIDTH-1:0]         dout,
  output logic                     full,
  output logic                     empty,
  output logic [$clog2(DEPTH):0]   count
);
  localparam int AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wp, rp;

  wire do_push = push && !full;
  wire do_pop  = pop && !empty;

  assign count = wp - rp;
  assign full  = (count == (AW+1)'(DEPTH));
  assign empty = (wp == rp);
  assign dout  = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_push) mem[wp[AW-1:0]] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (do_push) wp <= wp + 1'b1;
      if (do_pop)  rp <= rp + 1'b1;
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));
endmodule
