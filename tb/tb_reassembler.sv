// tb_reassembler: the Reassembler board, cells in from the framer side, host
// reads over its bus. Two Class 4 datagrams on one circuit arrive interleaved
// and must come out as separate lists; cells with a header error, with a
// payload CRC error and a COM cell with no open datagram must be dropped and
// counted; flushes must empty lists and return their blocks; plain cells go
// to their circuit's list with the PT last-cell mark; popping an empty list
// returns no block; one cell passes the whole pipeline within 4 us.
module tb_reassembler;
  import atm_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic bus_sel = 0, bus_we = 0, bus_ack;
  logic [3:0] bus_addr = 0;
  logic [31:0] bus_wdata = 0, bus_rdata;
  logic rx_valid = 0, rx_soc = 0;
  logic [7:0] rx_data = 0;
  int checks = 0, failures = 0;

  reassembler dut (.*);

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

  task automatic bus(bit we, int a, logic [31:0] wd, output logic [31:0] rd);
    @(negedge clk);
    bus_sel = 1; bus_we = we; bus_addr = 4'(a); bus_wdata = wd;
    @(posedge clk); #1;
    while (!bus_ack) begin @(posedge clk); #1; end
    rd = bus_rdata;
    @(negedge clk);
    bus_sel = 0;
  endtask

  task automatic send(cell_t c, int corrupt);
    if (corrupt == 1) c[3] = c[3] ^ 8'h80;
    if (corrupt == 2) c[30] = c[30] ^ 8'h04;
    for (int i = 0; i < 53; i++) begin
      @(negedge clk);
      rx_valid = 1; rx_soc = (i == 0); rx_data = c[i];
    end
    @(negedge clk);
    rx_valid = 0; rx_soc = 0;
  endtask

  // pop the head of a list and compare its words with the expected payload
  task automatic expect_cell(int list, byte unsigned pay[], bit last, string what);
    logic [31:0] rd;
    bus(1, 3, list, rd);
    bus(0, 3, 0, rd);
    check(rd[31], {what, ": block available"});
    if (!rd[31]) return;
    check(rd[21:16] == 6'(pay.size()), $sformatf("%s: length %0d expected %0d", what, rd[21:16], pay.size()));
    check(rd[30] == last, {what, ": last flag"});
    for (int w = 0; w < (pay.size() + 3) / 4; w++) begin
      logic [31:0] e;
      e = 0;
      for (int k = 0; k < 4; k++) e = {e[23:0], (4*w + k < pay.size()) ? pay[4*w + k] : 8'h00};
      bus(0, 4, 0, rd);
      check(rd == e, $sformatf("%s: word %0d %h expected %h", what, w, rd, e));
    end
  endtask

  function automatic void rnd(ref byte unsigned p[], input int n);
    p = new[n];
    foreach (p[i]) p[i] = $urandom;
  endfunction

  initial begin
    byte unsigned a0[], a1[], a2[], b0[], b1[], c0[], p0[], p1[], p2[], full[];
    logic [31:0] rd;
    repeat (3) @(negedge clk);
    rst_n = 1;
    bus(1, 0, 1, rd);                        // Class 4 mode
    // latency of one cell through the whole pipeline: from its first byte
    // until its body is in the buffer (buffer controller idle again after
    // its write), at most 80 clocks = 4 us at 20 MHz
    begin
      byte unsigned s0[];
      int t0, n;
      bit seen_busy;
      rnd(s0, 12);
      fork
        send(build_cell(300, 0, 1, 3, 0, 5, s0, 12), 0);
        begin
          @(negedge clk);            // first byte is on the line
          n = 1; seen_busy = 0;
          while (!(seen_busy && dut.u_buf_ctrl.cmd_ready) && n < 400) begin
            @(negedge clk); n++;
            if (!dut.u_buf_ctrl.cmd_ready) seen_busy = 1;
          end
        end
      join
      $display("cell latency %0d clocks", n);
      check(n <= 80, $sformatf("cell latency %0d clocks, limit 80 (4 us)", n));
      expect_cell(9'h100, s0, 1, "latency cell");
      bus(1, 2, 0, rd);
      bus(1, 1, 0, rd);
    end
    rnd(a0, 44); rnd(a1, 44); rnd(a2, 20); rnd(b0, 44); rnd(b1, 7);
    send(build_cell(100, 0, 1, 2, 0, 1, a0, 44), 0);   // A BOM
    send(build_cell(100, 0, 1, 2, 0, 2, b0, 44), 0);   // B BOM
    send(build_cell(100, 0, 1, 0, 1, 1, a1, 44), 0);   // A COM
    send(build_cell(100, 0, 1, 0, 1, 1, a1, 44), 1);   // header error
    send(build_cell(100, 0, 1, 1, 1, 2, b1, 7), 0);    // B EOM
    send(build_cell(100, 0, 1, 0, 2, 1, a1, 44), 2);   // payload CRC error
    send(build_cell(100, 0, 1, 0, 0, 9, a1, 44), 0);   // COM with no BOM
    send(build_cell(100, 0, 1, 1, 2, 1, a2, 20), 0);   // A EOM
    repeat (30) @(negedge clk);
    bus(1, 5, 9'h100, rd); bus(0, 5, 0, rd);
    check(rd[11:0] == 3 && rd[27:16] == 1, $sformatf("datagram A list status %h", rd));
    bus(1, 5, 9'h101, rd); bus(0, 5, 0, rd);
    check(rd[11:0] == 2 && rd[27:16] == 1, $sformatf("datagram B list status %h", rd));
    bus(0, 6, 0, rd);
    check(rd[31:24] == 1 && rd[23:16] == 1 && rd[7:0] == 1, $sformatf("event counters %h", rd));
    expect_cell(9'h100, a0, 0, "A0");
    expect_cell(9'h100, a1, 0, "A1");
    expect_cell(9'h100, a2, 1, "A2");
    bus(1, 3, 9'h100, rd); bus(0, 3, 0, rd);
    check(!rd[31], "empty list gives no block");
    expect_cell(9'h101, b0, 0, "B0");
    expect_cell(9'h101, b1, 1, "B1");
    bus(1, 2, 0, rd); bus(1, 2, 1, rd);           // flush both datagram entries
    // a new datagram on MID 1 takes entry 0 again; single-segment on MID 3 entry 1
    rnd(c0, 30);
    send(build_cell(100, 0, 1, 3, 0, 3, c0, 30), 0);
    send(build_cell(100, 0, 1, 2, 0, 1, a0, 44), 0);
    repeat (30) @(negedge clk);
    expect_cell(9'h100, c0, 1, "SSM");
    bus(1, 5, 9'h101, rd); bus(0, 5, 0, rd);
    check(rd[11:0] == 1 && rd[27:16] == 0, $sformatf("open datagram list status %h", rd));
    bus(1, 2, 1, rd);                               // flush it
    bus(1, 5, 9'h101, rd); bus(0, 5, 0, rd);
    check(rd[11:0] == 0, "flushed datagram list is empty");
    // plain cells on circuit 200 (VC entry 1)
    bus(1, 0, 0, rd);
    rnd(p0, 48); rnd(p1, 48); rnd(p2, 48);
    send(build_cell(200, 0, 0, 0, 0, 0, p0, 48), 0);
    send(build_cell(200, 0, 0, 0, 0, 0, p1, 48), 0);
    send(build_cell(200, 1, 0, 0, 0, 0, p2, 48), 0);
    repeat (30) @(negedge clk);
    bus(1, 5, 9'h001, rd); bus(0, 5, 0, rd);
    check(rd[11:0] == 3 && rd[27:16] == 1, $sformatf("circuit list status %h", rd));
    expect_cell(9'h001, p0, 0, "P0");
    bus(1, 1, 1, rd);                               // flush the circuit
    bus(1, 5, 9'h001, rd); bus(0, 5, 0, rd);
    check(rd[11:0] == 0, "flushed circuit list is empty");
    bus(1, 3, 9'h001, rd);                          // returns the held block
    bus(0, 7, 0, rd);
    check(rd == 2048, $sformatf("all blocks free again: %0d", rd));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
