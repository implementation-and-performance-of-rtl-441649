// tb_aal_hdr_gen: checks segment type coding, MID and the modulo-16 sequence
// number of the AAL 3/4 header generator over several transfers.
module tb_aal_hdr_gen;
  logic clk = 0, rst_n = 0, load_mid = 0, next = 0, first = 0, last = 0;
  logic [9:0] mid = 0;
  logic [15:0] sar_hdr;
  int checks = 0, failures = 0;

  aal_hdr_gen dut (.*);

  always #25 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int ncell;
    int unsigned m;
    logic [1:0] st;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 10; t++) begin
      m = $urandom_range(0, 1023);
      ncell = (t == 0) ? 1 : $urandom_range(2, 40);
      mid <= 10'(m); load_mid <= 1;
      @(posedge clk);
      load_mid <= 0;
      for (int k = 0; k < ncell; k++) begin
        first <= (k == 0); last <= (k == ncell - 1);
        #1;
        st = (ncell == 1) ? 2'b11 : (k == 0) ? 2'b10 : (k == ncell - 1) ? 2'b01 : 2'b00;
        check(sar_hdr == {st, 4'(k % 16), 10'(m)},
              $sformatf("cell %0d of %0d: got %h", k, ncell, sar_hdr));
        next <= 1;
        @(posedge clk);
        next <= 0;
        @(posedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
