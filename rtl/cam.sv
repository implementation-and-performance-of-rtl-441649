// cam: content-addressable memory used by the CAM lookup controller.
//
// DEPTH entries of WIDTH bits, each with a valid bit. A search compares the
// key with every valid entry in parallel; one clock later hit says whether any
// matched and hit_idx gives the lowest matching entry. Entries are written (or
// invalidated, wvalid = 0) by index. The Reassembler uses two of these, one
// for virtual circuits and one for datagrams, 256 x 48 each, which make up the
// 512 x 48 CAM of the design. Lowest-index priority and the registered result
// are this implementation's choices.
module cam #(
  parameter int DEPTH = 256,
  parameter int WIDTH = 48,
  localparam int IW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             search,
  input  logic [WIDTH-1:0] key,
  output logic             hit,
  output logic [IW-1:0]    hit_idx,
  input  logic             we,
  input  logic [IW-1:0]    widx,
  input  logic [WIDTH-1:0] wkey,
  input  logic             wvalid
);
  logic [WIDTH-1:0] keys  [DEPTH];
  logic [DEPTH-1:0] valid;

  logic             m_hit;
  logic [IW-1:0]    m_idx;

  always_comb begin
    m_hit = 1'b0;
    m_idx = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (valid[i] && keys[i] == key) begin
        m_hit = 1'b1;
        m_idx = IW'(i);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (we) keys[widx] <= wkey;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid   <= '0;
      hit     <= 1'b0;
      hit_idx <= '0;
    end else begin
      if (we) valid[widx] <= wvalid;
      if (search) begin
        hit     <= m_hit;
        hit_idx <= m_idx;
      end
    end
  end
endmodule
