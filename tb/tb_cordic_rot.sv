// Testbench of cordic_rot: random vectors rotated by random angles (all
// quadrants); the result is compared with a floating-point rotation.
`timescale 1ns/1ps
module tb_cordic_rot;
  import cbsr_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  logic in_valid = 0, out_valid;
  cplx_t in_data, out_data;
  logic [15:0] angle;
  cordic_rot dut (.*);

  initial begin
    real pi = 3.14159265358979, a, er, ei;
    int r, i, an;
    in_data = '0; angle = '0;
    repeat (2) @(posedge clk); rst <= 0;
    for (int n = 0; n < 400; n++) begin
      r = $urandom_range(0, 40000) - 20000; i = $urandom_range(0, 40000) - 20000;
      an = $urandom_range(0, 65535);
      @(posedge clk); in_valid <= 1; in_data.re <= 16'(r); in_data.im <= 16'(i); angle <= 16'(an);
      @(posedge clk); in_valid <= 0;
      @(negedge clk);
      a = an / 65536.0 * 2 * pi;
      er = r * $cos(a) - i * $sin(a);
      ei = r * $sin(a) + i * $cos(a);
      chk(out_valid, "valid after 1 clock");
      chk((real'(out_data.re) - er) < 6 && (er - real'(out_data.re)) < 6 && (real'(out_data.im) - ei) < 6 && (ei - real'(out_data.im)) < 6,
          $sformatf("rot (%0d,%0d) by %0d -> (%0d,%0d) exp (%f,%f)", r, i, an,
                    out_data.re, out_data.im, er, ei));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
