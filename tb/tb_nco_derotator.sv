// Testbench of nco_derotator: a tone exp(j*(p0 + f*n)) is derotated with
// load_phase = p0 and freq = f and must come out as a constant real value
// (within the CORDIC accuracy); then a load mid-stream re-aligns the phase.
`timescale 1ns/1ps
module tb_nco_derotator;
  import cbsr_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  logic load = 0, in_valid = 0, out_valid;
  logic [15:0] load_phase, freq;
  cplx_t in_data, out_data;
  nco_derotator dut (.*);
  initial begin
    real pi = 3.14159265358979, a; int p0, f; int ore, oim;
    in_data = '0; load_phase = 0; freq = 0;
    repeat (2) @(posedge clk); rst <= 0;
    for (int t = 0; t < 4; t++) begin
      p0 = $urandom_range(0, 65535); f = $urandom_range(0, 4000) - 2000;
      @(posedge clk); load <= 1; load_phase <= 16'(p0); freq <= 16'(f);
      @(posedge clk); load <= 0;
      for (int n = 0; n < 200; n++) begin
        a = (p0 + f * n) * 2 * pi / 65536.0;
        @(posedge clk); in_valid <= 1;
        in_data.re <= 16'($rtoi(10000 * $cos(a))); in_data.im <= 16'($rtoi(10000 * $sin(a)));
        @(negedge clk);
        ore = out_data.re; oim = out_data.im;
        if (n > 0 && out_valid) chk(ore > 9980 && oim < 20 && oim > -20,
                       $sformatf("t%0d n%0d out %0d,%0d", t, n, ore, oim));
        if ($urandom_range(0, 3) == 0) begin @(posedge clk); in_valid <= 0; end
      end
      @(posedge clk); in_valid <= 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
