// tb_llm: random appends, drops, flushes, host pops and frees on a linked list
// manager with 32 blocks and 8 lists, against a model of the lists and of the
// free-block policy (never-used blocks first, then the free list, last freed
// first). Checks each buffer command, each popped block with its length and
// last flag, list status and the free count, the no-block discard when the
// buffer is full, that a pop waits while the buffer controller is busy, and
// that an append takes at most 12 clocks from acceptance to its command.
module tb_llm;
  import atm_pkg::*;
  localparam int NBLK = 32, NLIST = 8;
  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready;
  llm_req_t req = '0;
  logic pop_req = 0, pop_done, pop_ok, pop_last, free_req = 0, free_done;
  logic [2:0] pop_list = 0, stat_list = 0;
  logic [4:0] pop_blk, free_blk = 0, wr_blk;
  logic [5:0] pop_len;
  logic [5:0] stat_cnt, stat_frames, free_blocks;
  logic wr_valid, wr_discard, wr_ready = 1, no_block;
  logic [3:0] wr_nwords;
  int checks = 0, failures = 0;

  // model
  int lq[NLIST][$];
  int blen[NBLK], blast[NBLK];
  int fl[$];
  int fresh = 0;
  int held[$];
  int n_noblock = 0, n_reuse = 0, max_cyc = 0;

  llm #(.NBLK(NBLK), .NLIST(NLIST)) dut (.*);

  always #25 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // offer a request and wait until the LLM takes it; returns clocks waited
  task automatic issue(llm_op_e op, int list, int len, bit last, int nw);
    @(negedge clk);
    req_valid = 1; req.op = op; req.list = 9'(list); req.len = 6'(len); req.last = last;
    req.nwords = 4'(nw);
    #2;
    while (!req_ready) begin @(negedge clk); #2; end
    @(negedge clk);
    req_valid = 0;
  endtask

  task automatic wait_cmd(int exp_blk, bit exp_disc, int nw, output int cyc);
    cyc = 1;
    #2;
    while (!(wr_valid && wr_ready)) begin
      @(negedge clk); #2; cyc++;
      wr_ready = ($urandom_range(0, 3) != 0);
      #1;
    end
    check(wr_discard == exp_disc, "discard flag");
    check(wr_nwords == 4'(nw), "word count");
    if (!exp_disc) check(wr_blk == 5'(exp_blk), $sformatf("block %0d expected %0d", wr_blk, exp_blk));
    @(negedge clk);
    wr_ready = 1;
  endtask

  task automatic append(int list);
    int b, len, cyc;
    bit last, disc;
    len = $urandom_range(1, 48); last = $urandom_range(0, 1);
    if (fresh < NBLK) begin b = fresh; fresh++; disc = 0; end
    else if (fl.size() > 0) begin b = fl.pop_front(); disc = 0; n_reuse++; end
    else begin b = -1; disc = 1; n_noblock++; end
    issue(LOP_APPEND, list, len, last, 11);
    wait_cmd(b, disc, 11, cyc);
    if (!disc) begin
      lq[list].push_back(b); blen[b] = len; blast[b] = last;
    end
  endtask

  task automatic pop(int list, bit busy_first);
    int cyc;
    @(negedge clk);
    pop_req = 1; pop_list = 3'(list);
    if (busy_first) begin
      wr_ready = 0;
      repeat (6) begin @(negedge clk); check(!pop_done, "pop waits for the buffer controller"); end
      wr_ready = 1;
    end
    #2;
    while (!pop_done) begin @(negedge clk); #2; end
    pop_req = 0;
    check(pop_ok == (lq[list].size() > 0), "pop ok flag");
    if (lq[list].size() > 0) begin
      int b;
      b = lq[list].pop_front();
      check(pop_blk == 5'(b) && pop_len == 6'(blen[b]) && pop_last == blast[b],
            $sformatf("popped %0d/%0d/%0d expected %0d/%0d/%0d", pop_blk, pop_len, pop_last, b, blen[b], blast[b]));
      held.push_back(b);
    end
    @(negedge clk);
  endtask

  task automatic free_one();
    int k, b;
    k = $urandom_range(0, held.size() - 1);
    b = held[k]; held.delete(k);
    @(negedge clk);
    free_req = 1; free_blk = 5'(b);
    #2;
    while (!free_done) begin @(negedge clk); #2; end
    free_req = 0;
    fl.push_front(b);
    @(negedge clk);
  endtask

  task automatic flush(int list);
    issue(LOP_FLUSH, list, 0, 0, 0);
    repeat (3) @(negedge clk);
    fl = {lq[list], fl};
    lq[list].delete();
  endtask

  // one append timed with the buffer controller always ready
  task automatic timed_append(int list);
    int cyc;
    int b;
    wr_ready = 1;
    @(negedge clk);
    req_valid = 1; req.op = LOP_APPEND; req.list = 9'(list); req.len = 6'd44; req.last = 0; req.nwords = 4'd11;
    #2;
    while (!req_ready) begin @(negedge clk); #2; end
    @(negedge clk);
    req_valid = 0;
    cyc = 1;
    #2;
    while (!wr_valid) begin @(negedge clk); #2; cyc++; end
    if (cyc > max_cyc) max_cyc = cyc;
    if (fresh < NBLK) begin b = fresh; fresh++; end
    else if (fl.size() > 0) b = fl.pop_front();
    else b = -1;
    if (b >= 0) begin lq[list].push_back(b); blen[b] = 44; blast[b] = 0; end
    else n_noblock++;
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int r;
      r = $urandom_range(0, 99);
      if (r < 40) append($urandom_range(0, NLIST - 1));
      else if (r < 45) begin
        int cyc;
        issue(LOP_DROP, 0, 0, 0, 12);
        wait_cmd(0, 1, 12, cyc);
      end
      else if (r < 75) pop($urandom_range(0, NLIST - 1), (t % 50) == 7);
      else if (r < 92 && held.size() > 0) free_one();
      else if (r < 95) flush($urandom_range(0, NLIST - 1));
      else timed_append($urandom_range(0, NLIST - 1));
      // status
      stat_list = 3'($urandom_range(0, NLIST - 1));
      #1;
      check(stat_cnt == 6'(lq[stat_list].size()), "list block count");
      begin
        int fr;
        fr = 0;
        foreach (lq[stat_list][i]) fr += blast[lq[stat_list][i]];
        check(stat_frames == 6'(fr), "list frame count");
      end
      check(free_blocks == 6'(fl.size() + NBLK - fresh), "free block count");
    end
    check(n_noblock > 0, "buffer ran out of blocks at least once");
    check(n_reuse > 0, "freed blocks were reused");
    check(max_cyc <= 12, $sformatf("append took %0d clocks (limit 12)", max_cyc));
    $display("longest append %0d clocks, %0d no-block, %0d reuses", max_cyc, n_noblock, n_reuse);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
