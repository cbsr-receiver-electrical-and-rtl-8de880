// Testbench of sync_machine. A model writer advances addr_in one sample
// every second clock and supplies a correlation metric that crosses the
// threshold and peaks at a chosen address. Checked: no detection below the
// threshold; read starts at the sample after the peak; sel_phase is the
// phase at the peak; exactly F_AMB_len reads with sync; the read never
// overtakes addr_in; the read does not end before cri_ready and then ends
// after read_num_samples; continuous preamble mode ends after F_AMB; the
// machine returns to SEARCH and idles when disabled.
`timescale 1ns/1ps
module tb_sync_machine;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  logic corr_valid = 0, cri_ready = 0, cont_preamble_en = 0, enabled = 0;
  logic [17:0] corr_in;
  logic [11:0] addr_in, read_addr_out;
  logic [15:0] phase, th, sel_phase;
  logic [8:0]  F_AMB_len;
  logic [23:0] read_num_samples;
  logic rd_en, valid, sync, frame_start;
  logic [2:0] out_state;
  sync_machine dut (.*);

  int peak_addr;
  // writer: a new sample every 2 clocks, metric = triangle around peak_addr
  always @(posedge clk) begin
    if (rst) begin addr_in <= '0; corr_valid <= 0; end
    else begin
      corr_valid <= ~corr_valid;
      if (!corr_valid) begin
        int d;
        addr_in <= addr_in + 1'b1;
        d = int'(addr_in + 1'b1) - peak_addr; if (d < 0) d = -d;
        corr_in <= (d < 10) ? 18'(1000 - 90*d) : 18'd50;
        phase   <= 16'(addr_in + 1'b1) * 16'd7;
      end
    end
  end

  int n_sync, n_read, first_addr; bit got_first;
  always @(posedge clk) if (!rst) begin
    if (valid) n_read++;
    if (sync) n_sync++;
    if (rd_en && !got_first) begin first_addr = read_addr_out; got_first = 1; end
    if (rd_en) chk(read_addr_out != addr_in + 1'b1, "read overtakes writer");
  end

  task automatic run_frame(input int pk, input bit cont, input int cri_delay, output int cyc);
    peak_addr = pk; n_sync = 0; n_read = 0; got_first = 0;
    cont_preamble_en = cont;
    cyc = 0;
    wait (frame_start); @(posedge clk);
    fork
      begin repeat (cri_delay) @(posedge clk); cri_ready <= 1; @(posedge clk); cri_ready <= 0; end
      begin while (out_state != 3'd1) begin @(posedge clk); cyc++; end end
    join
    repeat (2) @(posedge clk);
  endtask

  initial begin
    int cyc;
    th = 16'd500; F_AMB_len = 9'd64; read_num_samples = 24'd100;
    peak_addr = 100000;
    repeat (3) @(posedge clk); rst <= 0; enabled <= 1;
    repeat (200) @(posedge clk);
    chk(out_state == 3'd1, "stays in SEARCH without signal");
    run_frame(int'(addr_in) + 40, 0, 50, cyc);
    chk(first_addr == (peak_addr + 1) % 4096, $sformatf("first read %0d peak %0d", first_addr, peak_addr));
    chk(sel_phase == 16'(peak_addr * 7), "sel_phase is phase at peak");
    chk(n_sync == 64, $sformatf("sync samples %0d", n_sync));
    chk(n_read == 64 + 100, $sformatf("reads %0d", n_read));
    // CRI arrives late: reading must not end before it
    run_frame(int'(addr_in) + 40, 0, 800, cyc);
    chk(cyc >= 800, $sformatf("ended before cri_ready (%0d)", cyc));
    chk(n_read >= 64 + 100, $sformatf("reads %0d", n_read));
    // continuous preamble mode
    run_frame(int'(addr_in) + 40, 1, 5, cyc);
    chk(n_sync == 64 && n_read == 64, $sformatf("cont preamble reads %0d", n_read));
    enabled <= 0; repeat (3) @(posedge clk);
    chk(out_state == 3'd0 && !rd_en, "idle when disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
