// rsm_buf_ctrl: dual-port reassembly controller with its reassembly buffer.
//
// The buffer is a 32K x 32 dual-port RAM divided into blocks of 2**BLKW
// (16) words. Network side: the linked list manager gives a command (block,
// word count, discard); the controller pops that many words from the body
// FIFO, one per clock while the FIFO has data, and writes them to consecutive
// words of the block, or throws them away for a discarded cell. cmd_ready is
// high only while the controller is idle, so it also tells the LLM that every
// accepted cell is completely in the buffer. Host side: rd_en with a word
// address reads the other port; rd_data is valid one clock later, so host
// reads never wait for network writes.
// The 32K x 32 dual-ported buffer and its two uses follow the design; block
// size and timing are this implementation's choices.
module rsm_buf_ctrl #(
  parameter int AW   = 15,
  parameter int DW   = 32,
  parameter int BLKW = 4,
  localparam int BW  = AW - BLKW
) (
  input  logic          clk,
  input  logic          rst_n,
  // command from the linked list manager
  input  logic          cmd_valid,
  input  logic [BW-1:0] cmd_blk,
  input  logic [3:0]    cmd_nwords,
  input  logic          cmd_discard,
  output logic          cmd_ready,
  // body FIFO read side
  input  logic          body_empty,
  input  logic [DW-1:0] body_dout,
  output logic          body_pop,
  // host read port
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [DW-1:0] rd_data
);
  logic          busy, discard;
  logic [BW-1:0] blk;
  logic [3:0]    left;
  logic [BLKW-1:0] idx;

  assign cmd_ready = !busy;
  assign body_pop  = busy && !body_empty;

  dp_ram #(.AW(AW), .DW(DW)) u_buf (
    .clk,
    .we(body_pop && !discard), .waddr({blk, idx}), .din(body_dout),
    .re(rd_en), .raddr(rd_addr), .rdata(rd_data)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      discard <= 1'b0;
      blk     <= '0;
      left    <= '0;
      idx     <= '0;
    end else if (!busy) begin
      if (cmd_valid && cmd_nwords != '0) begin
        busy    <= 1'b1;
        discard <= cmd_discard;
        blk     <= cmd_blk;
        left    <= cmd_nwords;
        idx     <= '0;
      end
    end else if (body_pop) begin
      idx  <= idx + 1'b1;
      left <= left - 1'b1;
      if (left == 4'd1) busy <= 1'b0;
    end
  end
endmodule
