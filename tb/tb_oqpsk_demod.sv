// Testbench of oqpsk_demod: random QPSK symbols are turned into an OQPSK
// sample stream at 2 samples per symbol (Q delayed by half a symbol, i.e.
// one sample), with random valid gaps. The demodulator must return each
// symbol's soft values (component >> 6, saturated to +/-127), hard
// decisions (sign bits) and the last flag on the subframe's final symbol.
`timescale 1ns/1ps
module tb_oqpsk_demod;
  import cbsr_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  logic sof = 0, in_valid = 0, in_last = 0, out_valid, out_last;
  cplx_t in_data;
  logic signed [7:0] llr_i, llr_q;
  logic [1:0] hard;
  oqpsk_demod dut (.*);
  int ei[$], eq[$]; int nsym, nlast;
  localparam int NS = 60;
  always @(posedge clk) if (!rst && out_valid) begin
    int a, b, xi, xq;
    xi = ei.pop_front(); xq = eq.pop_front();
    a = xi >>> 6; b = xq >>> 6;
    a = a > 127 ? 127 : a < -127 ? -127 : a; b = b > 127 ? 127 : b < -127 ? -127 : b;
    chk(int'(llr_i) == a && int'(llr_q) == b, $sformatf("sym %0d llr %0d,%0d exp %0d,%0d", nsym, llr_i, llr_q, a, b));
    chk(hard == {xq < 0, xi < 0}, "hard bits");
    chk(out_last == ((nsym % NS) == NS - 1), $sformatf("last flag at %0d", nsym));
    nsym++;
  end
  initial begin
    int si, sq, prev_q;
    in_data = '0; nsym = 0;
    repeat (2) @(posedge clk); rst <= 0;
    for (int sf = 0; sf < 3; sf++) begin
      for (int s = 0; s < NS; s++) begin
        si = ($urandom_range(0, 1) ? 1 : -1) * $urandom_range(1000, 9000);
        sq = ($urandom_range(0, 1) ? 1 : -1) * $urandom_range(1000, 9000);
        ei.push_back(si); eq.push_back(sq);
        // sample 2s: I of this symbol; sample 2s+1: Q of this symbol
        for (int h = 0; h < 2; h++) begin
          while ($urandom_range(0, 3) == 0) begin @(posedge clk); in_valid <= 0; sof <= 0; in_last <= 0; end
          @(posedge clk); in_valid <= 1;
          sof <= (s == 0 && h == 0);
          in_last <= (s == NS - 1 && h == 1);
          in_data.re <= (h == 0) ? 16'(si) : 16'($urandom);
          in_data.im <= (h == 1) ? 16'(sq) : 16'($urandom);
        end
      end
    end
    @(posedge clk); in_valid <= 0; repeat (3) @(posedge clk);
    chk(nsym == 3*NS, $sformatf("symbols %0d", nsym));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
