// tb_seg_ctrl: drives the segmentation controller with a modelled FIFO and
// header inputs, and compares every byte sent to the framer with cells built
// by the reference model, for Class 4 and plain transfers of random lengths
// and random framer back-pressure. Also checks the cell rate: with data ready
// and the framer always ready, one cell every 54 clocks.
module tb_seg_ctrl;
  import atm_tb_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, class4 = 0;
  logic [16:0] len_bytes = 0;
  logic busy, hdr_valid = 0, aal_next, aal_first, aal_last, fifo_pop;
  logic [39:0] hdr = 0, hdr_last = 0;
  logic [15:0] sar_hdr;
  logic [31:0] fifo_dout;
  logic [9:0]  fifo_count;
  logic tx_valid, tx_soc, tx_ready = 1;
  logic [7:0] tx_data;
  int checks = 0, failures = 0;

  logic [31:0] q[$];
  int unsigned sn = 0, mid = 10'h2a5;
  logic [1:0] st_now;

  seg_ctrl #(.FIFO_CW(10)) dut (.*);

  always #25 clk = ~clk;

  assign fifo_dout  = (q.size() > 0) ? q[0] : 32'h0;
  assign fifo_count = 10'(q.size());
  assign st_now     = aal_first ? (aal_last ? 2'b11 : 2'b10) : (aal_last ? 2'b01 : 2'b00);
  assign sar_hdr    = {st_now, 4'(sn), 10'(mid)};

  always @(posedge clk) begin
    if (fifo_pop) void'(q.pop_front());
    if (aal_next) sn = (sn + 1) % 16;
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

  // one transfer: push data, start, collect and compare all cells
  task automatic run(int unsigned vci, bit c4, int len, bit backpressure, bit timed);
    byte unsigned data[];
    byte unsigned pay[];
    cell_t exp, none_c;
    int pb, ncell, off, cnt, soc_t[$], t;
    byte unsigned none[];
    pb    = c4 ? 44 : 48;
    ncell = (len + pb - 1) / pb;
    data  = new[len];
    foreach (data[i]) data[i] = $urandom;
    none_c = build_cell(vci, 0, 0, 0, 0, 0, none, 0);
    @(negedge clk);
    hdr      = {none_c[0], none_c[1], none_c[2], none_c[3], none_c[4]};
    none_c   = build_cell(vci, 1, 0, 0, 0, 0, none, 0);
    hdr_last = {none_c[0], none_c[1], none_c[2], none_c[3], none_c[4]};
    hdr_valid = 1;
    sn = 0;
    for (int w = 0; w < (len + 3) / 4; w++) begin
      logic [31:0] word;
      word = 0;
      for (int k = 0; k < 4; k++) word = {word[23:0], (4*w + k < len) ? data[4*w + k] : 8'h5a};
      q.push_back(word);
    end
    class4 = c4; len_bytes = 17'(len); start = 1;
    @(negedge clk);
    start = 0;
    off = 0; t = 0;
    for (int c = 0; c < ncell; c++) begin
      int n;
      n   = (len - off < pb) ? len - off : pb;
      pay = new[n];
      for (int i = 0; i < n; i++) pay[i] = data[off + i];
      exp = build_cell(vci, !c4 && (c == ncell - 1), c4,
                       (ncell == 1) ? 3 : (c == 0) ? 2 : (c == ncell - 1) ? 1 : 0,
                       c % 16, mid, pay, n);
      cnt = 0;
      while (cnt < 53) begin
        tx_ready = backpressure ? ($urandom_range(0, 3) != 0) : 1'b1;
        #1;
        if (tx_valid && tx_ready) begin
          if (cnt == 0) begin check(tx_soc, "start of cell flag"); soc_t.push_back(t); end
          check(tx_data == exp[cnt], $sformatf("cell %0d byte %0d: %h expected %h", c, cnt, tx_data, exp[cnt]));
          cnt++;
        end
        @(negedge clk);
        t++;
      end
      off += n;
    end
    tx_ready = 1;
    repeat (3) @(negedge clk);
    check(!busy, "controller idle after transfer");
    check(q.size() == 0, "FIFO drained");
    if (timed)
      for (int i = 1; i < soc_t.size(); i++)
        check(soc_t[i] - soc_t[i-1] == 54, $sformatf("cell spacing %0d clocks", soc_t[i] - soc_t[i-1]));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(16'h0123, 1, 40, 0, 0);     // single segment message (SSM)
    run(16'h0777, 1, 44 * 5, 0, 1); // exactly five cells, timed
    run(16'hbeef, 0, 48 * 3, 0, 1); // plain cells, last one marked
    for (int i = 0; i < 12; i++)
      run($urandom_range(0, 16'hffff), $urandom_range(0, 1), $urandom_range(1, 700), 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
