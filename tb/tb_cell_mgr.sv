// tb_cell_mgr: sends reference cells (Class 4 and plain, intact, with a
// corrupted header and with a corrupted payload) into the cell manager and
// checks the body words, every descriptor field, the error pulses, the
// overflow drop when the FIFOs have no room, and that each descriptor is
// queued on the clock after the cell's last byte (within one cell time).
module tb_cell_mgr;
  import atm_tb_pkg::*;
  import atm_pkg::*;
  logic clk = 0, rst_n = 0, class4 = 1;
  logic rx_valid = 0, rx_soc = 0;
  logic [7:0] rx_data = 0;
  logic body_push, desc_push, body_room = 1, desc_full = 0;
  logic [31:0] body_din;
  cell_desc_t desc;
  logic hec_err, crc_err, ovf_drop;
  int checks = 0, failures = 0;
  logic [31:0] body[$];
  cell_desc_t descs[$];
  int desc_t[$];
  int n_hec = 0, n_crc = 0, n_ovf = 0;
  int t = 0;

  cell_mgr dut (.*);

  always #25 clk = ~clk;
  always @(posedge clk) begin
    t++;
    if (body_push) body.push_back(body_din);
    if (desc_push) begin descs.push_back(desc); desc_t.push_back(t); end
    if (hec_err) n_hec++;
    if (crc_err) n_crc++;
    if (ovf_drop) n_ovf++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // send one cell; corrupt: 0 none, 1 header byte, 2 payload byte
  task automatic send(cell_t c, int corrupt, int gap, output int t_last);
    if (corrupt == 1) c[2] = c[2] ^ 8'h10;
    if (corrupt == 2) c[20] = c[20] ^ 8'h01;
    for (int i = 0; i < 53; i++) begin
      @(negedge clk);
      rx_valid = 1; rx_soc = (i == 0); rx_data = c[i];
    end
    @(negedge clk);
    t_last = t;                  // number of the edge that took the last byte
    rx_valid = 0; rx_soc = 0;
    repeat (gap) @(negedge clk);
  endtask

  initial begin
    int tl;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 60; k++) begin
      byte unsigned pay[];
      cell_t c;
      int unsigned vci, mid, st, li, corrupt;
      bit c4, pt, room;
      c4 = (k % 3) != 0;
      vci = $urandom_range(0, 16'hffff); mid = $urandom_range(0, 1023);
      st = $urandom_range(0, 3); li = c4 ? $urandom_range(1, 44) : 48;
      pt = $urandom_range(0, 1);
      corrupt = (k % 5 == 3) ? 1 : (k % 5 == 4 && c4) ? 2 : 0;
      room = (k % 11 != 7);
      pay = new[c4 ? 44 : 48];
      foreach (pay[i]) pay[i] = $urandom;
      c = build_cell(vci, pt && !c4, c4, st, k % 16, mid, pay, li);
      body.delete(); descs.delete(); desc_t.delete();
      n_hec = 0; n_crc = 0; n_ovf = 0;
      class4 = c4; body_room = room;
      send(c, corrupt, $urandom_range(0, 3), tl);
      repeat (2) @(negedge clk);
      body_room = 1;
      if (!room) begin
        check(n_ovf == 1 && descs.size() == 0 && body.size() == 0, "overflow: cell not taken");
        continue;
      end
      check(descs.size() == 1, "one descriptor per cell");
      if (descs.size() != 1) continue;
      check(desc_t[0] == tl + 1, $sformatf("descriptor %0d clocks after last byte", desc_t[0] - tl));
      check(descs[0].good == (corrupt == 0), $sformatf("good flag, corrupt=%0d", corrupt));
      check(n_hec == (corrupt == 1) && n_crc == (corrupt == 2), "error pulses");
      if (corrupt != 1) begin
        check(descs[0].vci == 16'(vci), "VCI");
        check(descs[0].class4 == c4, "class4");
        check(descs[0].nwords == (c4 ? 11 : 12), "word count");
        check(body.size() == (c4 ? 11 : 12), "body words pushed");
        if (c4) begin
          check(descs[0].st == 2'(st) && descs[0].mid == 10'(mid) && descs[0].li == 6'(li), "AAL fields");
          check(descs[0].last == (st == 1 || st == 3), "last for EOM/SSM");
        end else begin
          check(descs[0].li == 48 && descs[0].last == pt, "plain cell length and PT last");
        end
        if (corrupt == 0)
          for (int w = 0; w < body.size(); w++)
            check(body[w] == {c[(c4?7:5)+4*w], c[(c4?8:6)+4*w], c[(c4?9:7)+4*w], c[(c4?10:8)+4*w]},
                  $sformatf("body word %0d", w));
      end
    end
    // back-to-back cells, no gap
    body.delete(); descs.delete();
    class4 = 1;
    for (int k = 0; k < 4; k++) begin
      byte unsigned pay[];
      pay = new[44];
      foreach (pay[i]) pay[i] = k;
      send(build_cell(k, 0, 1, 0, k, 7, pay, 44), 0, 0, tl);
    end
    repeat (3) @(negedge clk);
    check(descs.size() == 4 && body.size() == 44, "four back-to-back cells");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
