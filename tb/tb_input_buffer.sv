// Testbench of input_buffer: writes more than one lap of a small (AW=6)
// buffer, checks the write address, and reads back random addresses among
// the newest 64 samples, comparing with a model memory, including the
// one-clock read latency.
`timescale 1ns/1ps
module tb_input_buffer;
  import cbsr_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  logic wr_en = 0, rd_en = 0;
  cplx_t wr_data, rd_data;
  logic [5:0] wr_addr, rd_addr;
  input_buffer #(.AW(6)) dut (.*);
  cplx_t model [64];
  int nw = 0;
  initial begin
    wr_data = '0; rd_addr = '0;
    repeat (2) @(posedge clk); rst <= 0;
    for (int n = 0; n < 150; n++) begin
      @(posedge clk);
      wr_en <= 1; wr_data <= cplx_t'($urandom);
      @(negedge clk);
      model[wr_addr] = wr_data;
      chk(wr_addr == 6'(nw), "write address");
      nw++;
    end
    @(posedge clk); wr_en <= 0;
    for (int n = 0; n < 100; n++) begin
      int a;
      a = $urandom_range(0, 63);
      @(posedge clk); rd_en <= 1; rd_addr <= 6'(a);
      @(posedge clk); rd_en <= 0;
      @(negedge clk);
      chk(rd_data == model[a], $sformatf("read addr %0d", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
