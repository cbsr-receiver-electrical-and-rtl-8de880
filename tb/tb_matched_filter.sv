// Testbench of matched_filter: random complex samples, one valid every
// second clock (as the AD9361 interface delivers them). The reference keeps
// every second sample and applies a root-raised-cosine FIR whose taps are
// computed here from the RRC formula (beta 0.35 / 0.5, 2 samples per symbol,
// sum normalised to 2, Q1.14), then checks every output sample exactly and
// the one-clock latency, for both roll-off settings.
`timescale 1ns/1ps
module tb_matched_filter;
  import cbsr_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  logic in_valid = 0, rolloff_sel = 0, out_valid;
  cplx_t in_data, out_data;
  matched_filter dut (.*);

  localparam int T = 17;
  int h [2][T];
  function automatic real rrc(real t, real b);
    real pi = 3.14159265358979;
    if (t == 0.0) return 1.0 - b + 4.0*b/pi;
    if ((4.0*b*t)**2 > 0.9999 && (4.0*b*t)**2 < 1.0001)
      return b/$sqrt(2.0)*((1+2/pi)*$sin(pi/(4*b)) + (1-2/pi)*$cos(pi/(4*b)));
    return ($sin(pi*t*(1-b)) + 4*b*t*$cos(pi*t*(1+b))) / (pi*t*(1-(4*b*t)**2));
  endfunction

  int xr[$], xi[$];
  longint ar, ai;
  int n_out = 0, k;

  initial begin
    real hv [T]; real s; real betas [2];
    betas[0] = 0.35; betas[1] = 0.5;
    for (int b = 0; b < 2; b++) begin
      s = 0;
      for (int i = 0; i < T; i++) begin hv[i] = rrc((i - 8) / 2.0, betas[b]); s += hv[i]; end
      for (int i = 0; i < T; i++) begin
        real v; v = hv[i] / s * 2.0 * 16384.0;
        h[b][i] = (v >= 0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
      end
    end
    in_data = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int b = 0; b < 2; b++) begin
      rolloff_sel <= b[0];
      for (int n = 0; n < 120; n++) begin
        @(posedge clk);
        in_valid <= 1;
        in_data.re <= 16'($urandom_range(0, 16000)) - 16'sd8000;
        in_data.im <= 16'($urandom_range(0, 16000)) - 16'sd8000;
        @(posedge clk);
        in_valid <= 0;
      end
    end
    @(posedge clk); @(posedge clk);
    chk(n_out == 120, $sformatf("output count %0d", n_out));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: observe accepted inputs
  bit ph = 0; bit exp_pending = 0; int er, ei;
  always @(posedge clk) if (!rst) begin
    if (exp_pending) begin
      chk(out_valid, "valid one clock after kept sample");
      chk(out_data.re == 16'(er) && out_data.im == 16'(ei),
          $sformatf("out %0d,%0d exp %0d,%0d", out_data.re, out_data.im, er, ei));
      n_out++;
    end else chk(!out_valid, "no spurious valid");
    exp_pending = 0;
    if (in_valid) begin
      if (!ph) begin
        xr.push_front(in_data.re); xi.push_front(in_data.im);
        ar = 0; ai = 0;
        for (int i = 0; i < T && i < xr.size(); i++) begin
          ar += longint'(xr[i]) * h[rolloff_sel][i];
          ai += longint'(xi[i]) * h[rolloff_sel][i];
        end
        ar = ar >>> 15; ai = ai >>> 15;
        er = (ar > 32767) ? 32767 : (ar < -32768) ? -32768 : int'(ar);
        ei = (ai > 32767) ? 32767 : (ai < -32768) ? -32768 : int'(ai);
        exp_pending = 1;
      end
      ph = ~ph;
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
