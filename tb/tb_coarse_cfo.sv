// Testbench of coarse_cfo: F_AMB sections that are pure tones of k bins
// (k from -KMAX to KMAX, plus fractional offsets that must round to the
// nearest bin) with a little noise, for F_AMB lengths 64 and 128. Checks the
// bin, freq = k*65536/N and the completion time (2*KMAX+1)*N + 3 clocks.
`timescale 1ns/1ps
module tb_coarse_cfo;
  import cbsr_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  logic frame_start = 0, in_valid = 0, sync = 0, done;
  cplx_t in_data;
  logic [1:0] f_amb_code;
  logic [15:0] freq;
  logic signed [7:0] bin;
  coarse_cfo #(.KMAX(16)) dut (.*);
  initial begin
    real pi = 3.14159265358979, f; int N, cyc; int ks [6];
    ks = '{0, 3, -7, 16, -16, 11};
    in_data = '0; f_amb_code = 0;
    repeat (2) @(posedge clk); rst <= 0;
    for (int c = 0; c < 2; c++) begin
      f_amb_code <= 2'(c); N = 64 << c;
      for (int t = 0; t < 6; t++) begin
        f = ks[t] + ((t % 2) ? 0.3 : -0.2);
        @(posedge clk); frame_start <= 1; @(posedge clk); frame_start <= 0;
        for (int n = 0; n < N; n++) begin
          @(posedge clk); in_valid <= 1; sync <= 1;
          in_data.re <= 16'($rtoi(4000*$cos(2*pi*f*n/N))) + 16'($urandom_range(0, 200)) - 16'sd100;
          in_data.im <= 16'($rtoi(4000*$sin(2*pi*f*n/N))) + 16'($urandom_range(0, 200)) - 16'sd100;
          @(posedge clk); in_valid <= 0;
        end
        @(posedge clk); sync <= 0;
        cyc = 0;
        while (!done) begin @(posedge clk); cyc++; end
        chk(bin == 8'(ks[t]), $sformatf("N=%0d f=%f bin %0d", N, f, bin));
        chk(freq == 16'(ks[t] * (65536 / N)), $sformatf("freq %0d", freq));
        chk(cyc >= 33*N && cyc <= 33*N + 4, $sformatf("cycles %0d", cyc));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
