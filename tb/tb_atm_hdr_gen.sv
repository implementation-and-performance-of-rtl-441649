// tb_atm_hdr_gen: checks the ATM header generator against the reference HEC
// (long division) for a set of VCIs, and that the header is ready exactly 5
// clocks after the VCI is loaded.
module tb_atm_hdr_gen;
  import atm_tb_pkg::*;
  logic clk = 0, rst_n = 0, load = 0;
  logic [15:0] vci = 0;
  logic [39:0] hdr, hdr_last;
  logic hdr_valid;
  int checks = 0, failures = 0;

  atm_hdr_gen dut (.*);

  always #25 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int unsigned v;
    int n;
    cell_t c, cl;
    byte unsigned none[];
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // the known idle-cell style vector: header 00 00 00 02 (PT=001) and 00 00 00 00
    check(ref_hec(0, 0, 0, 0) == 8'h55, "reference HEC of all-zero header");
    for (int t = 0; t < 40; t++) begin
      v = (t < 4) ? (t * 16'h5555) : $urandom_range(0, 16'hffff);
      @(negedge clk);
      vci  = 16'(v);
      load = 1;
      @(negedge clk);
      load = 0;
      n = 0;                       // clock edges after the load edge
      while (!hdr_valid && n < 20) begin @(negedge clk); n++; end
      check(n == 5, $sformatf("header ready %0d clocks after load, expected 5", n));
      c  = build_cell(v, 0, 0, 0, 0, 0, none, 0);
      cl = build_cell(v, 1, 0, 0, 0, 0, none, 0);
      check(hdr == {c[0], c[1], c[2], c[3], c[4]}, $sformatf("hdr %h vci %h", hdr, v));
      check(hdr_last == {cl[0], cl[1], cl[2], cl[3], cl[4]}, $sformatf("hdr_last %h", hdr_last));
      repeat ($urandom_range(0, 3)) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
