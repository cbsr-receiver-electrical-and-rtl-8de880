// Testbench of rx_frame_control with small geometry (P_AMB 5, data 7,
// 3 periods per subframe, 2 subframes): with queue availability toggling at
// random, the read strobes must follow 5 midamble / wait for est_done /
// 7 data per period, subframe_end must mark the 21st data read of each
// subframe and frame_done the last; no read may be issued on an empty
// queue; the block must wait for est_done and for process_en to drop.
`timescale 1ns/1ps
module tb_rx_frame_control;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  logic process_en = 0, mid_avail = 0, data_avail = 0, est_done = 0;
  logic d_sym_valid, ph_sym_valid, read_buf, subframe_end, frame_done, first_mid;
  logic [2:0] out_state;
  rx_frame_control #(.P_AMB_LEN(5), .DATA_LEN(7)) dut (.*, .num_phase_midamble(5'd3),
                                                       .num_subframes(8'd2));
  int nr, nm, nd, nsf, nfd, est_wait; bit waiting_est;
  always @(posedge clk) if (!rst) begin
    chk(!(ph_sym_valid && !mid_avail) && !(d_sym_valid && !data_avail), "read on empty queue");
    chk(read_buf == (ph_sym_valid || d_sym_valid), "read_buf");
    if (ph_sym_valid) begin chk((nr % 12) < 5, $sformatf("midamble read at %0d", nr)); nr++; nm++; end
    if (d_sym_valid)  begin chk((nr % 12) >= 5, $sformatf("data read at %0d", nr)); nr++; nd++; end
    if (subframe_end) begin chk(nr == 36*(nsf+1), $sformatf("subframe_end at %0d", nr)); nsf++; end
    if (frame_done) begin chk(nr == 72, "frame_done at end"); nfd++; end
    mid_avail  <= $urandom_range(0, 2) != 0;
    data_avail <= $urandom_range(0, 2) != 0;
  end
  // give est_done some clocks after each fifth midamble read
  initial forever begin
    @(posedge clk);
    if (out_state == 3'd2) begin
      repeat (6) begin @(posedge clk); chk(!d_sym_valid, "data read before est_done"); end
      est_done <= 1; @(posedge clk); est_done <= 0;
    end
  end
  initial begin
    repeat (2) @(posedge clk); rst <= 0;
    repeat (5) @(posedge clk);
    chk(nr == 0, "nothing before process_en");
    process_en <= 1;
    wait (nfd == 1); repeat (10) @(posedge clk);
    chk(nm == 30 && nd == 42 && nsf == 2, $sformatf("reads %0d %0d %0d", nm, nd, nsf));
    chk(nr == 72, "no reads after frame");
    process_en <= 0; repeat (3) @(posedge clk);
    chk(out_state == 3'd0, "back to idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
