// tb_rsm_buf_ctrl: gives the dual-port reassembly controller write and
// discard commands for random blocks, feeds the body words with random gaps,
// and reads every written block back through the host port, comparing with
// a model of the 32K x 32 buffer. Discarded bodies must leave the buffer
// unchanged and still be removed from the body FIFO.
module tb_rsm_buf_ctrl;
  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_discard = 0, cmd_ready;
  logic [10:0] cmd_blk = 0;
  logic [3:0] cmd_nwords = 0;
  logic body_empty = 1, body_pop;
  logic [31:0] body_dout = 0;
  logic rd_en = 0;
  logic [14:0] rd_addr = 0;
  logic [31:0] rd_data;
  int checks = 0, failures = 0;
  logic [31:0] model[int];
  logic [31:0] bq[$];

  rsm_buf_ctrl dut (.*);

  always #25 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // body FIFO model: sampled after the falling edge, popped at the rising edge
  initial forever begin
    @(negedge clk);
    body_empty = (bq.size() == 0) || ($urandom_range(0, 4) == 0);
    body_dout  = (bq.size() > 0) ? bq[0] : 32'h0;
    #2;
    if (body_pop) void'(bq.pop_front());
  end

  initial begin
    int blks[$];
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      int b, n;
      bit disc;
      b = $urandom_range(0, 2047); n = $urandom_range(1, 12); disc = ($urandom_range(0, 4) == 0);
      for (int i = 0; i < n; i++) bq.push_back($urandom);
      if (!disc) for (int i = 0; i < n; i++) model[b * 16 + i] = bq[bq.size() - n + i];
      if (!disc) blks.push_back(b);
      @(negedge clk);
      #1;
      cmd_valid = 1; cmd_blk = 11'(b); cmd_nwords = 4'(n); cmd_discard = disc;
      #2;
      while (!cmd_ready) begin @(negedge clk); #3; end
      @(negedge clk);
      #1;
      cmd_valid = 0;
      #2;
      while (!cmd_ready) begin @(negedge clk); #3; end
      check(bq.size() == 0, "body words all taken");
    end
    foreach (model[a]) begin
      @(negedge clk);
      rd_en = 1; rd_addr = 15'(a);
      @(negedge clk);
      rd_en = 0;
      check(rd_data == model[a], $sformatf("word %0h: %h expected %h", a, rd_data, model[a]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
