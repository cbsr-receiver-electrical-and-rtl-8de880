// Testbench of sample_fifo (AW=4): random simultaneous writes and reads
// that never overflow or underflow, compared with a queue model; count,
// empty and full are checked every clock, and flush empties the queue.
`timescale 1ns/1ps
module tb_sample_fifo;
  import cbsr_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  logic flush = 0, wr_en = 0, rd_en = 0, empty, full;
  cplx_t wr_data, rd_data;
  logic [4:0] count;
  sample_fifo #(.AW(4)) dut (.*);
  cplx_t q[$]; cplx_t exp_d; bit pend = 0;
  initial begin
    wr_data = '0;
    repeat (2) @(posedge clk); rst <= 0;
    for (int n = 0; n < 600; n++) begin
      bit w, r;
      @(negedge clk);
      if (pend) chk(rd_data == exp_d, "read data");
      pend = 0;
      chk(count == 5'(q.size()) && empty == (q.size() == 0) && full == (q.size() == 16), "flags");
      w = $urandom_range(0, (n < 300) ? 1 : 3) != 0 && q.size() < 16;
      r = $urandom_range(0, 1) != 0 && q.size() > 0;
      wr_en = w; rd_en = r; wr_data = cplx_t'($urandom);
      if (r) begin exp_d = q.pop_front(); pend = 1; end
      if (w) q.push_back(wr_data);
    end
    @(negedge clk); wr_en = 0; rd_en = 0; flush = 1; @(negedge clk); flush = 0;
    chk(empty && count == 0, "flush");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
