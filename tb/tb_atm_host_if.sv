// tb_atm_host_if: end-to-end test of the whole host interface at its default
// sizes. The transmit byte stream is looped back into the receive side, with
// an optional bit error injected into chosen cells. One host process writes
// transfers through the Segmenter's bus; another pops and reads the lists
// through the Reassembler's bus and compares the data with what was sent.
// It runs the seven write sizes of the measurement table (1K to 64K bytes,
// Class 4), a single-segment datagram, a transfer whose cells suffer a
// header error and a payload CRC error, a plain (non-Class-4) transfer after a
// mode switch, and a transfer larger than the 512-word FIFO while the framer
// is held off. Each mechanism is counted and must occur at least once; more
// than 2048 cells pass through, so freed buffer blocks are reused.
module tb_atm_host_if;
  import atm_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic seg_bus_sel = 0, seg_bus_we = 0, seg_bus_ack;
  logic [3:0] seg_bus_addr = 0;
  logic [31:0] seg_bus_wdata = 0, seg_bus_rdata;
  logic rsm_bus_sel = 0, rsm_bus_we = 0, rsm_bus_ack;
  logic [3:0] rsm_bus_addr = 0;
  logic [31:0] rsm_bus_wdata = 0, rsm_bus_rdata;
  logic tx_valid, tx_soc, tx_ready = 1;
  logic [7:0] tx_data;
  logic rx_valid, rx_soc;
  logic [7:0] rx_data;
  int checks = 0, failures = 0;

  atm_host_if dut (.*);

  always #25 clk = ~clk;

  // loopback with error injection: flip a bit of byte err_byte in cell err_cell
  int cell_no = 0, byte_no = 0;
  int err_cell[$], err_byte[$];
  logic [7:0] flip;
  always_comb begin
    flip = 8'h00;
    foreach (err_cell[i]) if (err_cell[i] == cell_no && err_byte[i] == byte_no) flip = 8'h20;
  end
  assign rx_valid = tx_valid && tx_ready;
  assign rx_soc   = tx_soc;
  assign rx_data  = tx_data ^ flip;

  // counters of the mechanisms exercised
  int n_bom = 0, n_com = 0, n_eom = 0, n_ssm = 0, n_plain = 0, n_plain_last = 0;
  int n_stall = 0, n_hec = 0, n_crc = 0, n_flush_vc = 0, n_flush_dg = 0;
  int n_mode = 0, n_empty_pop = 0, n_cells_stored = 0;
  bit c4_mode = 1;
  always @(posedge clk) if (tx_valid && tx_ready) begin
    if (byte_no == 52) begin byte_no = 0; cell_no++; end
    else byte_no++;
  end
  // the transmitted cells are classified from values sampled at the falling
  // edge, when the byte on tx_data is stable
  int mb = 0;
  always @(negedge clk) if (tx_valid && tx_ready) begin
    if (tx_soc) mb = 0;
    if (mb == 3 && !c4_mode) begin n_plain++; if (tx_data[1]) n_plain_last++; end
    if (mb == 5 && c4_mode)
      case (tx_data[7:6]) 2'b10: n_bom++; 2'b00: n_com++; 2'b01: n_eom++; default: n_ssm++; endcase
    mb++;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic seg(bit we, int a, logic [31:0] wd, output logic [31:0] rd, output int waits);
    @(negedge clk);
    seg_bus_sel = 1; seg_bus_we = we; seg_bus_addr = 4'(a); seg_bus_wdata = wd;
    waits = 0;
    @(posedge clk); #1;
    while (!seg_bus_ack) begin @(posedge clk); #1; waits++; end
    rd = seg_bus_rdata;
    @(negedge clk);
    seg_bus_sel = 0;
  endtask

  task automatic rsm(bit we, int a, logic [31:0] wd, output logic [31:0] rd);
    @(negedge clk);
    rsm_bus_sel = 1; rsm_bus_we = we; rsm_bus_addr = 4'(a); rsm_bus_wdata = wd;
    @(posedge clk); #1;
    while (!rsm_bus_ack) begin @(posedge clk); #1; end
    rd = rsm_bus_rdata;
    @(negedge clk);
    rsm_bus_sel = 0;
  endtask

  // host write(): load VCI and MID, start, stream the words, wait for idle
  task automatic host_write(int vci, int mid, bit c4, byte unsigned data[], output int clocks);
    logic [31:0] rd;
    int w, t0;
    t0 = int'($time / 50);
    seg(1, 0, vci, rd, w);
    seg(1, 1, mid, rd, w);
    seg(1, 2, {c4, 14'd0, 17'(data.size())}, rd, w);
    for (int i = 0; i < (data.size() + 3) / 4; i++) begin
      logic [31:0] word;
      word = 0;
      for (int k = 0; k < 4; k++) word = {word[23:0], (4*i + k < data.size()) ? data[4*i + k] : 8'h00};
      seg(1, 3, word, rd, w);
      if (w > 0) n_stall++;
    end
    do seg(0, 4, 0, rd, w); while (rd[31]);
    clocks = int'($time / 50) - t0;
  endtask

  // pop every block of a list; gather payload bytes and last flags
  task automatic host_read(int list, ref byte unsigned got[$], ref int lasts, output int ncell);
    logic [31:0] rd;
    ncell = 0;
    forever begin
      rsm(1, 3, list, rd);
      rsm(0, 3, 0, rd);
      if (!rd[31]) begin n_empty_pop++; break; end
      ncell++;
      n_cells_stored++;
      if (rd[30]) lasts++;
      begin
        int len;
        len = int'(rd[21:16]);
        for (int w = 0; w < (len + 3) / 4; w++) begin
          rsm(0, 4, 0, rd);
          for (int k = 0; k < 4; k++) if (4*w + k < len) got.push_back(rd[31 - 8*k -: 8]);
        end
      end
    end
  endtask

  function automatic void rnd(ref byte unsigned p[], input int n);
    p = new[n];
    foreach (p[i]) p[i] = $urandom;
  endfunction

  // one Class 4 transfer sent and read back from datagram entry 0, then flushed
  task automatic c4_round(int vci, int mid, int len, int exp_drop, bit do_check);
    byte unsigned d[];
    byte unsigned got[$];
    logic [31:0] rd;
    int clocks, ncell, lasts, nexp;
    rnd(d, len);
    host_write(vci, mid, 1, d, clocks);
    repeat (40) @(negedge clk);
    lasts = 0;
    host_read(9'h100, got, lasts, ncell);
    nexp = (len + 43) / 44;
    check(ncell == nexp - exp_drop, $sformatf("%0d bytes: %0d cells read, expected %0d", len, ncell, nexp - exp_drop));
    check(lasts == 1, "datagram ends once");
    if (do_check) begin
      int bad;
      bad = 0;
      if (got.size() != len) bad = 1;
      else foreach (d[i]) if (got[i] != d[i]) bad++;
      check(bad == 0, $sformatf("%0d bytes: data differs (%0d)", len, bad));
      $display("write of %0d bytes: %0d cells in %0d clocks, %0.1f Mbit/s at 20 MHz",
               len, nexp, clocks, 8.0 * len / (clocks * 50.0e-9) / 1.0e6);
    end
    rsm(1, 2, 0, rd); n_flush_dg++;
  endtask

  initial begin
    logic [31:0] rd;
    int w;
    repeat (3) @(negedge clk);
    rst_n = 1;
    rsm(1, 0, 1, rd);                                  // Class 4 mode
    // the seven write sizes of the measurement table
    for (int i = 0; i < 7; i++) c4_round(16'h0100, 1, 1024 << i, 0, 1);
    c4_round(16'h0100, 2, 30, 0, 1);                   // single segment
    // header error in cell 2, payload CRC error in cell 4 of a 6-cell datagram
    err_cell.push_back(cell_no + 2); err_byte.push_back(2);
    err_cell.push_back(cell_no + 4); err_byte.push_back(20);
    c4_round(16'h0100, 3, 6 * 44, 2, 0);
    rsm(0, 6, 0, rd);
    n_hec = rd[31:24]; n_crc = rd[23:16];
    check(n_hec == 1 && n_crc == 1, $sformatf("error counters %h", rd));
    // FIFO full: hold the framer off during a 4 KB transfer
    fork
      begin tx_ready = 0; repeat (3000) @(negedge clk); tx_ready = 1; end
      c4_round(16'h0100, 4, 4096, 0, 1);
    join
    rsm(1, 1, 0, rd); n_flush_vc++;                    // circuit 0x100 no longer wanted
    // plain cells after a mode switch; circuit 0x0200 takes VC entry 0 again
    rsm(1, 0, 0, rd); n_mode++; c4_mode = 0;
    begin
      byte unsigned d[];
      byte unsigned got[$];
      int clocks, ncell, lasts;
      rnd(d, 500);
      host_write(16'h0200, 0, 0, d, clocks);
      repeat (40) @(negedge clk);
      lasts = 0;
      host_read(9'h000, got, lasts, ncell);
      check(ncell == 11 && lasts == 1, $sformatf("plain transfer: %0d cells, %0d ends", ncell, lasts));
      check(got.size() == 11 * 48, "plain cells carry 48 bytes each");
      begin
        int bad;
        bad = 0;
        foreach (d[i]) if (got[i] != d[i]) bad++;
        check(bad == 0, "plain transfer data");
      end
    end
    rsm(1, 1, 0, rd); n_flush_vc++;
    rsm(0, 7, 0, rd);
    check(rd <= 2048 && rd >= 2047, $sformatf("free blocks at the end: %0d", rd));
    // every mechanism must have happened
    check(n_bom > 0 && n_com > 0 && n_eom > 0, "BOM/COM/EOM segments");
    // nine multi-cell Class 4 writes, one single-segment write, one 500-byte plain write
    check(n_bom == 9 && n_eom == 9 && n_ssm == 1, $sformatf("segment types %0d/%0d/%0d", n_bom, n_eom, n_ssm));
    check(n_plain == 11 && n_plain_last == 1, $sformatf("plain cells %0d, last %0d", n_plain, n_plain_last));
    check(n_ssm > 0, "single segment message");
    check(n_plain > 0 && n_plain_last > 0, "plain cells with last-cell mark");
    check(n_stall > 0, "FIFO-full stall of host writes");
    check(n_hec > 0 && n_crc > 0, "header and payload errors detected");
    check(n_flush_vc > 0 && n_flush_dg > 0, "circuit and datagram flushes");
    check(n_mode > 0, "mode switch");
    check(n_empty_pop > 0, "pop of an empty list");
    check(n_cells_stored > 2048, "buffer blocks reused");
    $display("BOM %0d COM %0d EOM %0d SSM %0d plain %0d stalls %0d hec %0d crc %0d flushes %0d/%0d cells stored %0d",
             n_bom, n_com, n_eom, n_ssm, n_plain, n_stall, n_hec, n_crc, n_flush_vc, n_flush_dg, n_cells_stored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
