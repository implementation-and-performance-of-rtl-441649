// tb_cam_lookup_ctrl: feeds cell descriptors to the CAM lookup controller and
// compares each request to the LLM with a behavioural model of the lookup
// (learning VC entries, datagram entries opened by BOM/SSM and closed by
// EOM/SSM, drops, host flushes, a full VC CAM). Checks that no cell takes
// more than 11 clocks from descriptor to request while the LLM is ready.
module tb_cam_lookup_ctrl;
  import atm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic desc_empty, desc_pop, req_valid, req_ready = 1;
  cell_desc_t desc_in;
  llm_req_t req;
  logic flush_req = 0, flush_dg = 0, flush_ack, no_entry;
  logic [7:0] flush_idx = 0;
  int checks = 0, failures = 0;

  cell_desc_t dq[$];
  llm_req_t   got[$];
  int         lat[$];
  int         t = 0, t_pop = 0, max_lat = 0;

  // model state
  int vcmap[int];         // vci -> entry
  int dgmap[int];         // (entry<<10 | mid) -> entry
  bit vc_used[256], dg_used[256];

  cam_lookup_ctrl dut (.*);

  always #25 clk = ~clk;
  // descriptor queue model outputs, refreshed whenever the queue changes
  function automatic void upd();
    desc_empty = (dq.size() == 0);
    desc_in    = (dq.size() > 0) ? dq[0] : '0;
  endfunction
  initial upd();

  // Monitor: everything is sampled 2 time units after the falling edge,
  // when the testbench's own drives for the cycle have settled; what it sees
  // then happens at the next rising edge.
  logic rv_q = 0;
  initial forever begin
    @(negedge clk);
    t++;
    #2;
    if (desc_pop) begin
      @(posedge clk);
      #1;
      void'(dq.pop_front());
      upd();
      t_pop = t;
      continue;
    end
    if (req_valid && req_ready) got.push_back(req);
    if (req_valid && !rv_q && req.op != LOP_FLUSH) begin
      lat.push_back(t - t_pop);
      if (t - t_pop > max_lat) max_lat = t - t_pop;
    end
    rv_q = req_valid && !req_ready;
  end

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

  // a DROP only needs its op and word count; its list is not used
  function automatic bit same(llm_req_t a, llm_req_t b);
    if (a.op == LOP_DROP || b.op == LOP_DROP) return a.op == b.op && a.nwords == b.nwords;
    return a == b;
  endfunction

  function automatic int lowest_free(bit u[256]);
    for (int i = 0; i < 256; i++) if (!u[i]) return i;
    return -1;
  endfunction

  function automatic llm_req_t model(cell_desc_t d);
    llm_req_t r;
    int v, k, e;
    r = '0; r.len = d.li; r.last = d.last; r.nwords = d.nwords; r.op = LOP_DROP;
    if (!d.good) return r;
    if (vcmap.exists(d.vci)) v = vcmap[d.vci];
    else begin
      v = lowest_free(vc_used);
      if (v < 0) return r;
      vc_used[v] = 1; vcmap[d.vci] = v;
    end
    if (!d.class4) begin r.op = LOP_APPEND; r.list = {1'b0, 8'(v)}; return r; end
    k = (v << 10) | d.mid;
    if (dgmap.exists(k)) begin
      e = dgmap[k];
      if (d.last) dgmap.delete(k);
    end else if (d.st == ST_BOM || d.st == ST_SSM) begin
      e = lowest_free(dg_used);
      if (e < 0) return r;
      dg_used[e] = 1;
      if (!d.last) dgmap[k] = e;
    end else return r;
    r.op = LOP_APPEND; r.list = {1'b1, 8'(e)};
    return r;
  endfunction

  task automatic run_cells(int n, int nvci, bit stall);
    llm_req_t exp;
    for (int i = 0; i < n; i++) begin
      cell_desc_t d;
      d.good   = ($urandom_range(0, 9) != 0);
      d.class4 = ($urandom_range(0, 3) != 0);
      d.vci    = 16'($urandom_range(0, nvci - 1) * 37);
      d.st     = 2'($urandom_range(0, 3));
      d.mid    = 10'($urandom_range(0, 3));
      d.li     = 6'($urandom_range(1, 44));
      d.last   = d.class4 ? (d.st == ST_EOM || d.st == ST_SSM) : 1'($urandom_range(0, 1));
      d.nwords = d.class4 ? 4'd11 : 4'd12;
      got.delete();
      exp = model(d);
      @(negedge clk);
      dq.push_back(d);
      upd();
      req_ready = stall ? ($urandom_range(0, 1) == 1) : 1'b1;
      while (got.size() == 0) begin
        @(negedge clk);
        req_ready = stall ? ($urandom_range(0, 1) == 1) : 1'b1;
      end
      req_ready = 1;
      check(same(got[0], exp), $sformatf("cell %0d: request %h expected %h", i, got[0], exp));
    end
  endtask

  task automatic flush(bit dg, int idx);
    llm_req_t exp;
    exp = '0; exp.op = LOP_FLUSH; exp.list = {dg, 8'(idx)};
    got.delete();
    @(negedge clk);
    flush_req = 1; flush_dg = dg; flush_idx = 8'(idx);
    while (!flush_ack) @(negedge clk);
    flush_req = 0;
    check(got.size() == 1 && got[0].op == LOP_FLUSH && got[0].list == exp.list, "flush request to the LLM");
    if (dg) begin
      dg_used[idx] = 0;
      foreach (dgmap[k]) if (dgmap[k] == idx) dgmap.delete(k);
    end else begin
      vc_used[idx] = 0;
      foreach (vcmap[k]) if (vcmap[k] == idx) vcmap.delete(k);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_cells(400, 6, 0);
    for (int i = 0; i < 6; i++) flush(1, i);
    flush(0, 2);
    run_cells(300, 6, 1);
    // fill the VC CAM: 260 distinct circuits, the last ones find no entry
    run_cells(0, 1, 0);
    for (int i = 0; i < 300; i++) begin
      cell_desc_t d;
      llm_req_t exp;
      d = '0; d.good = 1; d.class4 = 0; d.vci = 16'(1000 + i); d.li = 48; d.nwords = 12;
      got.delete();
      exp = model(d);
      @(negedge clk);
      dq.push_back(d);
      upd();
      while (got.size() == 0) @(negedge clk);
      check(same(got[0], exp), $sformatf("fill %0d: %h expected %h", i, got[0], exp));
    end
    check(lowest_free(vc_used) < 0, "VC CAM full reached");
    check(max_lat <= 11, $sformatf("longest lookup %0d clocks (limit 11)", max_lat));
    $display("longest lookup %0d clocks", max_lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
