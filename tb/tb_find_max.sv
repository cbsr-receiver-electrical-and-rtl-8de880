// Testbench of find_max: random windows of random length with random valid
// gaps; the index of the first maximum is found here by a plain search and
// compared, together with the value and the done timing.
`timescale 1ns/1ps
module tb_find_max;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  logic start = 0, in_valid = 0, done;
  logic [9:0] len, max_idx;
  logic [17:0] din, max_val;
  find_max #(.DW(18), .IW(10)) dut (.*);
  initial begin
    int L, bi; logic [17:0] bv, v;
    len = '0; din = '0;
    repeat (2) @(posedge clk); rst <= 0;
    for (int w = 0; w < 40; w++) begin
      L = $urandom_range(1, 60);
      @(posedge clk); start <= 1; len <= 10'(L);
      @(posedge clk); start <= 0;
      bi = 0; bv = 0;
      for (int n = 0; n < L; n++) begin
        while ($urandom_range(0, 2) == 0) begin @(posedge clk); in_valid <= 0; end
        v = (w % 4 == 0) ? 18'd7 : 18'($urandom_range(0, 1000));
        if (n == 0 || v > bv) begin bv = v; bi = n; end
        @(posedge clk); in_valid <= 1; din <= v;
      end
      @(posedge clk); in_valid <= 0;
      @(negedge clk);
      chk(done, "done one clock after last sample");
      chk(max_idx == 10'(bi) && max_val == bv, $sformatf("idx %0d exp %0d", max_idx, bi));
      @(negedge clk);
      chk(!done, "done is a pulse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
