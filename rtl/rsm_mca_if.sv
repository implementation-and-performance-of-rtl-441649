// rsm_mca_if: host bus interface of the Reassembler board.
//
// Register map (32-bit registers, word addresses):
//   0 W/R mode: bit 0 = received cells are Class 4 (AAL 3/4)
//   1 W   flush virtual circuit entry (bits 7:0)
//   2 W   flush datagram entry (bits 7:0)
//   3 W   pop list (bits 8:0 = {datagram, entry}): gives the block the host
//         held back to the free pool, then takes the head block of the list
//     R   held block: bit 31 valid, bit 30 last cell of frame/datagram,
//         bits 21:16 valid bytes, bits 10:0 block number
//   4 R   next word of the held block (the word index restarts at each pop)
//   5 W   select a list for status; R: bits 27:16 frame ends, 11:0 blocks
//   6 R   event counters (8 bits each, wrapping): 31:24 header errors,
//         23:16 CRC-10 errors, 15:8 overflow drops, 7:0 no entry/no block
//   7 R   free blocks of the reassembly buffer
// Bus cycle as on the Segmenter board: the host holds bus_sel and the
// address/data until bus_ack, high for one clock; operations that need the
// CAM controller, the LLM or the buffer hold the ack back as wait states.
// The design names this interface and says the host reads a circuit or
// datagram by giving a list reference; the bus and register map are this
// implementation's choices.
module rsm_mca_if #(
  parameter int BW = 11,
  parameter int AW = 15
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          bus_sel,
  input  logic          bus_we,
  input  logic [3:0]    bus_addr,
  input  logic [31:0]   bus_wdata,
  output logic [31:0]   bus_rdata,
  output logic          bus_ack,
  // mode
  output logic          class4,
  // CAM lookup controller flush
  output logic          flush_req,
  output logic          flush_dg,
  output logic [7:0]    flush_idx,
  input  logic          flush_ack,
  // LLM host operations and status
  output logic          pop_req,
  output logic [8:0]    pop_list,
  input  logic          pop_done,
  input  logic          pop_ok,
  input  logic [BW-1:0] pop_blk,
  input  logic [5:0]    pop_len,
  input  logic          pop_last,
  output logic          free_req,
  output logic [BW-1:0] free_blk,
  input  logic          free_done,
  output logic [8:0]    stat_list,
  input  logic [BW:0]   stat_cnt,
  input  logic [BW:0]   stat_frames,
  input  logic [BW:0]   free_blocks,
  // buffer read port
  output logic          rd_en,
  output logic [AW-1:0] rd_addr,
  input  logic [31:0]   rd_data,
  // events to count
  input  logic          ev_hec,
  input  logic          ev_crc,
  input  logic          ev_ovf,
  input  logic          ev_drop
);
  typedef enum logic [2:0] {S_IDLE, S_FLUSH, S_FREE, S_POP, S_RD, S_ACK} state_e;
  state_e state;

  logic          held, held_last;
  logic [5:0]    held_len;
  logic [AW-BW-1:0] widx;
  logic [7:0]    c_hec, c_crc, c_ovf, c_drop;

  wire active = bus_sel && !bus_ack && (state == S_IDLE);
  wire wr = active && bus_we;
  wire rd = active && !bus_we;

  assign free_blk = pop_blk;   // the held block is the last one popped
  assign rd_addr  = {pop_blk, widx};
  assign rd_en    = rd && bus_addr == 4'd4;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      bus_ack   <= 1'b0;
      bus_rdata <= '0;
      class4    <= 1'b0;
      flush_req <= 1'b0;
      flush_dg  <= 1'b0;
      flush_idx <= '0;
      pop_req   <= 1'b0;
      pop_list  <= '0;
      free_req  <= 1'b0;
      stat_list <= '0;
      held      <= 1'b0;
      held_last <= 1'b0;
      held_len  <= '0;
      widx      <= '0;
      c_hec     <= '0;
      c_crc     <= '0;
      c_ovf     <= '0;
      c_drop    <= '0;
    end else begin
      bus_ack <= 1'b0;
      if (ev_hec)  c_hec  <= c_hec + 1'b1;
      if (ev_crc)  c_crc  <= c_crc + 1'b1;
      if (ev_ovf)  c_ovf  <= c_ovf + 1'b1;
      if (ev_drop) c_drop <= c_drop + 1'b1;
      unique case (state)
        S_IDLE: begin
          if (wr) begin
            unique case (bus_addr)
              4'd0: begin class4 <= bus_wdata[0]; bus_ack <= 1'b1; end
              4'd1, 4'd2: begin
                flush_req <= 1'b1;
                flush_dg  <= (bus_addr == 4'd2);
                flush_idx <= bus_wdata[7:0];
                state     <= S_FLUSH;
              end
              4'd3: begin
                pop_list <= bus_wdata[8:0];
                if (held) begin free_req <= 1'b1; state <= S_FREE; end
                else      begin pop_req  <= 1'b1; state <= S_POP;  end
              end
              4'd5: begin stat_list <= bus_wdata[8:0]; bus_ack <= 1'b1; end
              default: bus_ack <= 1'b1;
            endcase
          end else if (rd) begin
            unique case (bus_addr)
              4'd0: begin bus_rdata <= {31'd0, class4}; bus_ack <= 1'b1; end
              4'd3: begin
                bus_rdata <= {held, held_last, 8'd0, held_len, 16'(pop_blk)};
                bus_ack   <= 1'b1;
              end
              4'd4: state <= S_RD;
              4'd5: begin
                bus_rdata <= {4'd0, 12'(stat_frames), 4'd0, 12'(stat_cnt)};
                bus_ack   <= 1'b1;
              end
              4'd6: begin bus_rdata <= {c_hec, c_crc, c_ovf, c_drop}; bus_ack <= 1'b1; end
              4'd7: begin bus_rdata <= 32'(free_blocks); bus_ack <= 1'b1; end
              default: begin bus_rdata <= '0; bus_ack <= 1'b1; end
            endcase
          end
        end
        S_FLUSH: if (flush_ack) begin
          flush_req <= 1'b0;
          state     <= S_ACK;
        end
        S_FREE: if (free_done) begin
          free_req <= 1'b0;
          held     <= 1'b0;
          pop_req  <= 1'b1;
          state    <= S_POP;
        end
        S_POP: if (pop_done) begin
          pop_req   <= 1'b0;
          held      <= pop_ok;
          held_last <= pop_last;
          held_len  <= pop_len;
          widx      <= '0;
          state     <= S_ACK;
        end
        S_RD: begin
          bus_rdata <= rd_data;
          widx      <= widx + 1'b1;
          state     <= S_ACK;
        end
        S_ACK: begin
          bus_ack <= 1'b1;
          state   <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
