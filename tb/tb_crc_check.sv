// Testbench of crc_check: random payloads of random length get a CRC24A
// appended, computed here by polynomial long division of payload*x^24; each
// subframe must be reported ok, and the same subframe with one bit flipped
// must be reported as failed. done must pulse one clock after the last bit.
`timescale 1ns/1ps
module tb_crc_check;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  logic in_valid = 0, in_bit = 0, in_last = 0, done, ok;
  crc_check dut (.*);
  function automatic void add_crc(ref bit b[$]);
    bit w[$]; bit [24:0] g = 25'h1864CFB;
    w = b; for (int i = 0; i < 24; i++) w.push_back(0);
    for (int i = 0; i + 24 < w.size(); i++)
      if (w[i]) for (int j = 0; j <= 24; j++) w[i+j] ^= g[24-j];
    for (int i = 0; i < 24; i++) b.push_back(w[w.size()-24+i]);
  endfunction
  task automatic send(bit b[$], output bit r);
    for (int i = 0; i < b.size(); i++) begin
      @(posedge clk); in_valid <= 1; in_bit <= b[i]; in_last <= (i == b.size() - 1);
      if (i < b.size() - 1 && $urandom_range(0, 4) == 0) begin @(posedge clk); in_valid <= 0; end
    end
    @(posedge clk); in_valid <= 0; in_last <= 0;
    @(negedge clk); chk(done, "done after last bit"); r = ok;
  endtask
  initial begin
    bit b[$]; bit r; int L, f;
    repeat (2) @(posedge clk); rst <= 0;
    for (int t = 0; t < 20; t++) begin
      b.delete(); L = $urandom_range(1, 200);
      for (int i = 0; i < L; i++) b.push_back($urandom_range(0, 1));
      add_crc(b);
      send(b, r); chk(r, $sformatf("good subframe %0d", t));
      f = $urandom_range(0, b.size() - 1); b[f] = !b[f];
      send(b, r); chk(!r, $sformatf("corrupted subframe %0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
