// Testbench of cri_checker: valid rates pass unchanged; 7 raises eot_flag
// until flush_end; values above 7 raise override_flag and select rate 0
// until override_end; disabling the receiver clears both flags.
`timescale 1ns/1ps
module tb_cri_checker;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  logic [3:0] cri_val = 0;
  logic cri_valid = 0, flush_end = 0, override_end = 0, rx_enable = 1, override_flag, eot_flag;
  logic [2:0] cri_out;
  cri_checker dut (.*);
  task automatic give(input int v);
    @(posedge clk); cri_val <= 4'(v); cri_valid <= 1; @(posedge clk); cri_valid <= 0; @(negedge clk);
  endtask
  task automatic pulse(input bit which);   // 0: override_end, 1: flush_end
    @(posedge clk);
    if (which) flush_end <= 1; else override_end <= 1;
    @(posedge clk); flush_end <= 0; override_end <= 0; @(negedge clk);
  endtask
  initial begin
    repeat (2) @(posedge clk); rst <= 0;
    for (int v = 0; v < 7; v++) begin
      give(v); chk(cri_out == 3'(v) && !override_flag && !eot_flag, $sformatf("valid rate %0d", v));
    end
    give(9); chk(override_flag && cri_out == 0 && !eot_flag, "invalid rate overrides");
    repeat (5) @(posedge clk); chk(override_flag, "override holds");
    pulse(0); chk(!override_flag, "override_end clears");
    give(15); chk(override_flag, "15 invalid");
    give(3); chk(!override_flag && cri_out == 3, "valid rate after invalid");
    give(7); chk(eot_flag && !override_flag, "EoT detected");
    give(2); chk(eot_flag, "EoT holds");
    pulse(1); chk(!eot_flag, "flush_end clears EoT");
    give(7); give(8); chk(eot_flag && override_flag, "both set");
    @(posedge clk); rx_enable <= 0; @(posedge clk); rx_enable <= 1; @(negedge clk);
    chk(!eot_flag && !override_flag, "disable clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
