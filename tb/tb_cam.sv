// tb_cam: random writes, invalidations and searches of a 256 x 48 CAM against
// an associative-array model; checks hit, and that the index returned is the
// lowest entry holding the key.
module tb_cam;
  logic clk = 0, rst_n = 0, search = 0, we = 0, wvalid = 0;
  logic [47:0] key = 0, wkey = 0;
  logic [7:0] widx = 0, hit_idx;
  logic hit;
  int checks = 0, failures = 0;
  logic [47:0] mkey[256];
  bit          mval[256];
  int hits = 0;

  cam #(.DEPTH(256), .WIDTH(48)) dut (.*);

  always #25 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    foreach (mval[i]) mval[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 8000; t++) begin
      @(negedge clk);
      if ($urandom_range(0, 1)) begin
        we = 1; widx = 8'($urandom); wkey = 48'($urandom_range(0, 40)); wvalid = ($urandom_range(0, 3) != 0);
        mkey[widx] = wkey; mval[widx] = wvalid;
        @(negedge clk);
        we = 0;
      end else begin
        int exp_idx;
        search = 1; key = 48'($urandom_range(0, 40));
        exp_idx = -1;
        for (int i = 255; i >= 0; i--) if (mval[i] && mkey[i] == key) exp_idx = i;
        @(negedge clk);
        search = 0;
        check(hit == (exp_idx >= 0), $sformatf("hit for key %0d", key));
        if (exp_idx >= 0) begin
          hits++;
          check(hit_idx == 8'(exp_idx), $sformatf("index %0d expected %0d", hit_idx, exp_idx));
        end
      end
    end
    check(hits > 100, "enough hits exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
