// Testbench of rx_write_control with small frame geometry (P_AMB 5, data
// block 7): for 2 subframes of 3 periods the write_en stream (with gaps)
// must be split sample by sample into midamble and data writes in the
// pattern 5 midamble / 7 data, stop after the frame, restart on start and
// write nothing while eot is high.
`timescale 1ns/1ps
module tb_rx_write_control;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  logic start = 0, write_en = 0, eot = 0, write_data, write_midamble;
  logic [4:0] num_phase_midamble = 5'd3;
  logic [7:0] num_subframes = 8'd2;
  logic [1:0] outState;
  rx_write_control #(.P_AMB_LEN(5), .DATA_LEN(7)) dut (.*);
  int idx, nm, nd;
  always @(posedge clk) if (!rst && write_en) begin
    // expected class of sample idx
    if (idx < 2*3*12) begin
      bit exp_mid; exp_mid = (idx % 12) < 5;
      chk(write_midamble == (exp_mid && !eot) && write_data == (!exp_mid && !eot),
          $sformatf("sample %0d mid %0b data %0b", idx, write_midamble, write_data));
    end else chk(!write_midamble && !write_data, $sformatf("write after frame end %0d", idx));
    nm += write_midamble; nd += write_data;
    idx++;
  end
  task automatic frame(input int extra);
    @(posedge clk); start <= 1; @(posedge clk); start <= 0;
    idx = 0; nm = 0; nd = 0;
    for (int n = 0; n < 72 + extra; n++) begin
      @(posedge clk); write_en <= 1;
      if ($urandom_range(0, 3) == 0) begin @(posedge clk); write_en <= 0; end
    end
    @(posedge clk); write_en <= 0; @(posedge clk);
  endtask
  initial begin
    repeat (2) @(posedge clk); rst <= 0;
    frame(10);
    chk(nm == 30 && nd == 42, $sformatf("counts %0d %0d", nm, nd));
    frame(0);
    chk(nm == 30 && nd == 42, $sformatf("second frame counts %0d %0d", nm, nd));
    eot <= 1; frame(0); 
    chk(nm == 0 && nd == 0, "nothing written during EoT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
