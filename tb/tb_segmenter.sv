// tb_segmenter: the Segmenter board driven through its host bus. Loads VCI
// and MID, starts transfers, streams the data words and compares the cells
// on the framer side with the reference model. One transfer is larger than
// the 512-word FIFO while the framer is held off, so data writes must wait
// (FIFO-full stall); the status register's busy flag is polled to the end.
module tb_segmenter;
  import atm_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic bus_sel = 0, bus_we = 0, bus_ack;
  logic [3:0] bus_addr = 0;
  logic [31:0] bus_wdata = 0, bus_rdata;
  logic tx_valid, tx_soc, tx_ready = 1;
  logic [7:0] tx_data;
  int checks = 0, failures = 0;
  int stalls = 0;
  byte unsigned rx[$];
  int socs[$];

  segmenter dut (.*);

  always #25 clk = ~clk;

  // framer side: collect bytes
  always @(posedge clk) if (tx_valid && tx_ready) begin
    if (tx_soc) socs.push_back(rx.size());
    rx.push_back(tx_data);
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic bus(bit we, int a, logic [31:0] wd, output logic [31:0] rd, output int waits);
    @(negedge clk);
    bus_sel = 1; bus_we = we; bus_addr = 4'(a); bus_wdata = wd;
    waits = 0;
    @(posedge clk); #1;
    while (!bus_ack) begin @(posedge clk); #1; waits++; end
    rd = bus_rdata;
    @(negedge clk);
    bus_sel = 0;
  endtask

  task automatic transfer(int unsigned vci, int unsigned mid, bit c4, int len);
    byte unsigned data[];
    logic [31:0] rd;
    int w, pb, ncell, off;
    data = new[len];
    foreach (data[i]) data[i] = $urandom;
    rx.delete(); socs.delete();
    bus(1, 0, vci, rd, w);
    bus(1, 1, mid, rd, w);
    bus(1, 2, {c4, 14'd0, 17'(len)}, rd, w);
    for (int i = 0; i < (len + 3) / 4; i++) begin
      logic [31:0] word;
      word = 0;
      for (int k = 0; k < 4; k++) word = {word[23:0], (4*i + k < len) ? data[4*i + k] : 8'h00};
      bus(1, 3, word, rd, w);
      if (w > 0) stalls++;
    end
    do bus(0, 4, 0, rd, w); while (rd[31]);
    pb = c4 ? 44 : 48;
    ncell = (len + pb - 1) / pb;
    check(rx.size() == 53 * ncell, $sformatf("%0d bytes sent, expected %0d", rx.size(), 53 * ncell));
    check(socs.size() == ncell, "one start-of-cell per cell");
    off = 0;
    for (int c = 0; c < ncell && rx.size() == 53 * ncell; c++) begin
      byte unsigned pay[];
      cell_t e;
      int n, bad;
      n = (len - off < pb) ? len - off : pb;
      pay = new[n];
      for (int i = 0; i < n; i++) pay[i] = data[off + i];
      e = build_cell(vci, !c4 && c == ncell - 1, c4,
                     (ncell == 1) ? 3 : (c == 0) ? 2 : (c == ncell - 1) ? 1 : 0, c % 16, mid, pay, n);
      bad = 0;
      for (int i = 0; i < 53; i++) if (rx[53*c + i] != e[i]) bad++;
      check(bad == 0, $sformatf("cell %0d of %0d: %0d wrong bytes", c, ncell, bad));
      off += n;
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    transfer(16'h0042, 10'h155, 1, 1000);
    transfer(16'h1234, 10'h001, 0, 333);
    // hold the framer off so a 4 KB transfer overfills the FIFO
    fork
      begin tx_ready = 0; repeat (2500) @(posedge clk); tx_ready = 1; end
      transfer(16'h4321, 10'h3ff, 1, 4096);
    join
    check(stalls > 0, "data writes waited on a full FIFO");
    transfer(16'h0001, 10'h000, 1, 44);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
