// Testbench of midamble_filter: a cyclically extended P_AMB midamble with
// each of the 8 cyclic shifts (CRI_STEP apart) is sent, rotated by a known
// phase. The magnitude must peak where the unshifted base sequence is
// complete inside the midamble (moving CRI_STEP earlier per shift), and the
// phase at the peak must be the rotation phase, whatever the shift.
`timescale 1ns/1ps
module tb_midamble_filter;
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
  midamble_filter dut (.*);

  int oidx; logic [17:0] best; int bidx; logic [15:0] bph;
  always @(posedge clk) if (!rst && out_valid) begin
    if (mag > best) begin best = mag; bidx = oidx; bph = phase; end
    oidx++;
  end
  initial begin
    real pi = 3.14159265358979, th0 = -1.1;
    in_data = '0;
    repeat (3) @(posedge clk); rst <= 0;
    for (int c = 0; c < 8; c++) begin
      int sh; sh = c * CRI_STEP;
      best = 0; oidx = 0; bidx = -1;
      // 40 zeros, then the midamble: P[m] = z[(m - 7*STEP + sh) mod N]
      for (int m = -40; m < P_AMB_LEN + 10; m++) begin
        real zr, zi; int q;
        @(posedge clk); in_valid <= 1;
        if (m < 0 || m >= P_AMB_LEN) in_data <= '0;
        else begin
          q = ((m - 7*CRI_STEP + sh) % ZC_LEN + ZC_LEN) % ZC_LEN;
          zr = 8.0 * $cos(-pi*3*q*(q+1)/ZC_LEN); zi = 8.0 * $sin(-pi*3*q*(q+1)/ZC_LEN);
          in_data.re <= 16'($rtoi(127.0 * (zr*$cos(th0) - zi*$sin(th0))));
          in_data.im <= 16'($rtoi(127.0 * (zr*$sin(th0) + zi*$cos(th0))));
        end
      end
      @(posedge clk); in_valid <= 0; repeat (4) @(posedge clk);
      // base sequence complete at midamble index 7*STEP - sh + N - 1
      chk(bidx == 40 + 7*CRI_STEP - sh + ZC_LEN - 1,
          $sformatf("shift %0d: peak at %0d", c, bidx));
      chk(best > 18'd1500, $sformatf("peak magnitude %0d", best));
      begin
        int e; e = int'(signed'(bph)) - int'(th0 / (2*pi) * 65536);
        chk(e < 200 && e > -200, $sformatf("shift %0d: phase %0d", c, signed'(bph)));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
