// Testbench of cri_eval: magnitude windows with one peak placed at
// IDX_REF - c*CRI_STEP (+/- a sample of jitter) must give coding-rate
// indicator c for c = 0..7; a peak far outside gives an invalid value (>7).
// Also checks that cri_valid comes 2 clocks after the window's last sample.
`timescale 1ns/1ps
module tb_cri_eval;
  import cbsr_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  localparam int WIN = P_AMB_LEN + 8, REF = P_AMB_LEN + 2;
  logic start = 0, in_valid = 0, cri_valid;
  logic [17:0] mag;
  logic [3:0] cri;
  cri_eval dut (.*);
  task automatic window(input int pk, output logic [3:0] r, output int lat);
    @(posedge clk); start <= 1; @(posedge clk); start <= 0;
    for (int n = 0; n < WIN; n++) begin
      @(posedge clk); in_valid <= 1; mag <= (n == pk) ? 18'd5000 : 18'($urandom_range(0, 900));
    end
    @(posedge clk); in_valid <= 0;
    lat = 0;
    while (!cri_valid) begin @(posedge clk); lat++; end
    r = cri;
  endtask
  initial begin
    logic [3:0] r; int lat;
    mag = '0;
    repeat (2) @(posedge clk); rst <= 0;
    for (int c = 0; c < 8; c++) begin
      for (int j = 0; j < 2; j++) begin
        window(REF - c*CRI_STEP + (j == 0 ? 0 : (c % 2 ? 1 : -1) * (CRI_STEP/2 - 1)), r, lat);
        chk(r == 4'(c), $sformatf("c=%0d got %0d", c, r));
        chk(lat == 2, $sformatf("latency %0d", lat));
      end
    end
    window(2, r, lat);
    chk(r > 4'd7, $sformatf("out of range peak gave %0d", r));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
