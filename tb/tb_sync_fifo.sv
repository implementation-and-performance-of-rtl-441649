// tb_sync_fifo: random pushes and pops of the 512 x 32 FIFO against a queue
// model; checks data order, count, full and empty, including filling it.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  logic [31:0] din = 0, dout;
  logic full, empty;
  logic [9:0] count;
  int checks = 0, failures = 0;
  logic [31:0] model[$];

  sync_fifo #(.WIDTH(32), .DEPTH(512)) dut (.*);

  always #25 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int fills = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 6000; t++) begin
      int bias;
      bias = (t < 2000) ? 80 : (t < 4000) ? 20 : 50;
      @(negedge clk);
      check(count == 10'(model.size()), $sformatf("count %0d model %0d", count, model.size()));
      check(full == (model.size() == 512), "full flag");
      check(empty == (model.size() == 0), "empty flag");
      if (model.size() == 512) fills++;
      if (!empty) check(dout == model[0], "head word");
      push = ($urandom_range(0, 99) < bias) && !full;
      pop  = ($urandom_range(0, 99) < 100 - bias) && !empty;
      din  = $urandom;
      @(posedge clk);
      #1;
      if (pop) void'(model.pop_front());
      if (push) model.push_back(din);
      push = 0; pop = 0;
    end
    check(fills > 0, "FIFO was filled at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
