// Testbench of fine_offset_est with P_AMB 8, period 40: midamble
// magnitude/phase streams whose peak phase advances by 40*f per midamble
// (f per sample), with lower-magnitude samples of random phase around the
// peak. Checks the phase at the peak, freq after the second midamble
// (within 2 units), the est_done timing, and that start clears the history.
`timescale 1ns/1ps
module tb_fine_offset_est;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  logic start = 0, in_valid = 0, est_done;
  logic [17:0] mag;
  logic [15:0] phase, phase_est, freq_est;
  fine_offset_est #(.P_AMB_LEN(8), .PERIOD(40)) dut (.*);
  initial begin
    int f, p0, ph, pk;
    mag = '0; phase = '0;
    repeat (2) @(posedge clk); rst <= 0;
    for (int fr = 0; fr < 3; fr++) begin
      f = $urandom_range(0, 600) - 300; p0 = $urandom_range(0, 65535);
      @(posedge clk); start <= 1; @(posedge clk); start <= 0;
      for (int m = 0; m < 5; m++) begin
        ph = p0 + 40 * f * m; pk = $urandom_range(0, 7);
        for (int n = 0; n < 8; n++) begin
          @(posedge clk); in_valid <= 1;
          mag   <= (n == pk) ? 18'd3000 : 18'($urandom_range(0, 2000));
          phase <= (n == pk) ? 16'(ph) : 16'($urandom);
        end
        @(posedge clk); in_valid <= 0;
        @(negedge clk);
        chk(est_done, "est_done one clock after the midamble");
        chk(phase_est == 16'(ph), $sformatf("phase %0d exp %0d", phase_est, 16'(ph)));
        if (m >= 1) begin
          int e; e = int'(signed'(freq_est)) - f;
          chk(e <= 2 && e >= -2, $sformatf("freq %0d exp %0d", signed'(freq_est), f));
        end else chk(freq_est == 0, "no frequency after one midamble");
        repeat (3) @(posedge clk);
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
