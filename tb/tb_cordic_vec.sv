// Testbench of cordic_vec: random and corner-case vectors in all four
// quadrants. Magnitude is compared with 1.6468*|x| (the CORDIC gain) and the
// phase with atan2, both computed in floating point here.
`timescale 1ns/1ps
module tb_cordic_vec;
  import cbsr_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  logic in_valid = 0, out_valid;
  cplx_t in_data;
  logic [17:0] mag;
  logic [15:0] phase;
  cordic_vec dut (.*);

  initial begin
    real pi = 3.14159265358979, em, ep, dp;
    int r, i;
    in_data = '0;
    repeat (2) @(posedge clk); rst <= 0;
    for (int n = 0; n < 400; n++) begin
      if (n < 4) begin r = (n[0] ? -20000 : 20000); i = (n[1] ? -1 : 1); end
      else begin r = $urandom_range(0, 60000) - 30000; i = $urandom_range(0, 60000) - 30000; end
      @(posedge clk); in_valid <= 1; in_data.re <= 16'(r); in_data.im <= 16'(i);
      @(posedge clk); in_valid <= 0;
      @(negedge clk);
      chk(out_valid, "valid after 1 clock");
      em = 1.646760258 * $sqrt(real'(r)*r + real'(i)*i);
      ep = $atan2(real'(i), real'(r)) / (2*pi) * 65536.0;
      dp = real'(signed'(phase)) - ep;
      if (dp > 32768) dp -= 65536; if (dp < -32768) dp += 65536;
      chk((real'(mag) - em) < 4 + em*0.001 && (em - real'(mag)) < 4 + em*0.001,
          $sformatf("mag %0d exp %f (%0d,%0d)", mag, em, r, i));
      chk(dp < 4 && dp > -4, $sformatf("phase %0d exp %f (%0d,%0d)", signed'(phase), ep, r, i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
