// Testbench of cfir_corr: random complex input with gaps in the valid
// strobe; every output is compared exactly with a direct evaluation of
// sum x[t-k]*conj(c[N-1-k]) >> 12 (saturated), and a clean copy of the
// T_AMB sequence is checked to give a peak of about its amplitude when its
// last sample enters.
`timescale 1ns/1ps
module tb_cfir_corr;
  import cbsr_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  logic in_valid = 0, out_valid;
  cplx_t in_data, out_data;
  cfir_corr dut (.*);

  int xr[$], xi[$];
  function automatic int sat(longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : int'(v);
  endfunction
  int er, ei; bit pend = 0; int peak_seen = 0;
  always @(posedge clk) if (!rst) begin
    if (pend) begin
      chk(out_valid && out_data.re == 16'(er) && out_data.im == 16'(ei),
          $sformatf("out %0d,%0d exp %0d,%0d", out_data.re, out_data.im, er, ei));
    end
    pend = 0;
    if (in_valid) begin
      longint ar, ai;
      ar = 0; ai = 0;
      xr.push_front(in_data.re); xi.push_front(in_data.im);
      for (int k = 0; k < ZC_LEN && k < xr.size(); k++) begin
        ar += longint'(xr[k]) * ZC_TAMB_RE[ZC_LEN-1-k] + longint'(xi[k]) * ZC_TAMB_IM[ZC_LEN-1-k];
        ai += longint'(xi[k]) * ZC_TAMB_RE[ZC_LEN-1-k] - longint'(xr[k]) * ZC_TAMB_IM[ZC_LEN-1-k];
      end
      er = sat(ar >>> 12); ei = sat(ai >>> 12); pend = 1;
    end
  end

  initial begin
    in_data = '0;
    repeat (2) @(posedge clk); rst <= 0;
    for (int n = 0; n < 300; n++) begin
      @(posedge clk);
      in_valid <= ($urandom_range(0, 3) != 0);
      in_data.re <= 16'($urandom_range(0, 8000)) - 16'sd4000;
      in_data.im <= 16'($urandom_range(0, 8000)) - 16'sd4000;
    end
    // zeros, then a clean sequence of amplitude 8*127
    for (int n = 0; n < ZC_LEN + ZC_LEN; n++) begin
      @(posedge clk); in_valid <= 1;
      if (n < ZC_LEN) in_data <= '0;
      else begin in_data.re <= 16'(8*ZC_TAMB_RE[n-ZC_LEN]); in_data.im <= 16'(8*ZC_TAMB_IM[n-ZC_LEN]); end
    end
    @(posedge clk); in_valid <= 0;
    @(negedge clk);
    // the last sample has just been processed: expect about 8*127*127*31/4096
    chk(out_data.re > 16'sd950 && out_data.re < 16'sd1000 && out_data.im < 16'sd20 && out_data.im > -16'sd20,
        $sformatf("peak %0d,%0d", out_data.re, out_data.im));
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
