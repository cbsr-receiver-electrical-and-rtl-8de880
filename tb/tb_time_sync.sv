// Testbench of time_sync together with an input buffer: a stream of
// low-level pseudo-random samples carries one copy of the T_AMB Zadoff-Chu
// sequence, rotated by a known phase. Checked: the frame is detected, the
// read starts at the sample right after the last T_AMB sample, sel_phase is
// the rotation phase (within the CORDIC accuracy) and F_AMB_len samples are
// read with sync, and they are the samples written after the preamble.
`timescale 1ns/1ps
module tb_time_sync;
  import cbsr_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  logic in_valid = 0, rd_en, valid, sync, frame_start;
  cplx_t in_data, rd_data;
  logic [11:0] wr_addr, read_addr;
  logic [15:0] sel_phase;
  logic [2:0] state;
  logic [17:0] corr_mag;
  input_buffer u_buf (.clk, .rst, .wr_en(in_valid), .wr_data(in_data), .wr_addr,
                      .rd_en, .rd_addr(read_addr), .rd_data);
  time_sync dut (.clk, .rst, .in_valid, .in_data, .wr_addr, .th(16'd1500), .fa_len(9'd64),
                 .cri_ready(1'b1), .read_num_samples(24'd10), .cont_preamble_en(1'b0),
                 .enabled(1'b1), .rd_en, .read_addr, .valid, .sync, .sel_phase, .state,
                 .frame_start, .corr_mag);

  int pre_end, n_sync, n_ok, first; bit got;
  real pi = 3.14159265358979;
  initial begin
    real th0, c, s; int idx;
    in_data = '0; th0 = 0.6; c = $cos(th0); s = $sin(th0);
    n_sync = 0; n_ok = 0; got = 0;
    repeat (3) @(posedge clk); rst <= 0;
    for (int n = 0; n < 400; n++) begin
      @(posedge clk); in_valid <= 1;
      if (n >= 100 && n < 100 + ZC_LEN) begin
        idx = n - 100;
        in_data.re <= 16'($rtoi(8.0 * (ZC_TAMB_RE[idx] * c - ZC_TAMB_IM[idx] * s)));
        in_data.im <= 16'($rtoi(8.0 * (ZC_TAMB_RE[idx] * s + ZC_TAMB_IM[idx] * c)));
        if (idx == ZC_LEN - 1) pre_end = n;
      end else begin
        // F_AMB-like samples after the preamble carry their index
        in_data.re <= (n > 100) ? 16'(n) : 16'($urandom_range(0, 100)) - 16'sd50;
        in_data.im <= '0;
      end
      @(posedge clk); in_valid <= 0;
    end
    repeat (50) @(posedge clk);
    chk(got, "frame detected");
    chk(first == pre_end + 1, $sformatf("first read %0d, preamble ends at %0d", first, pre_end));
    begin
      int e; e = int'(signed'(sel_phase)) - int'(th0 / (2*pi) * 65536);
      chk(e < 40 && e > -40, $sformatf("sel_phase %0d", sel_phase));
    end
    chk(n_sync == 64, $sformatf("sync samples %0d", n_sync));
    chk(n_ok == 64, $sformatf("F_AMB samples in order %0d", n_ok));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) if (!rst) begin
    if (rd_en && !got) begin got = 1; first = int'(read_addr); end
    if (sync) begin
      if (rd_data.re == 16'(pre_end + 1 + n_sync)) n_ok++;
      n_sync++;
    end
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
