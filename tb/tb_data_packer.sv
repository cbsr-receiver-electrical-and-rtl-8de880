// Testbench of data_packer. Subframes of random length (payload + 24 CRC
// bits, the CRC bits random here since only the verdict matters) are fed
// with crc_ok chosen per subframe.
//  mode 0: the words of good subframes must appear, MSB first, the last
//          word zero-padded; bad subframes must leave no word.
//  mode 1: payload = PN9 sequence with some bits flipped: bit_count and
//          bit_err_count must match, no word may be delivered.
//  mode 2: as mode 1 but good subframes are delivered.
// Subframe and error counters are checked, and cnt_reset clears them.
`timescale 1ns/1ps
module tb_data_packer;
  import cbsr_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  logic [1:0] mode = 0;
  logic cnt_reset = 0, bit_valid = 0, bit_data = 0, bit_last = 0, crc_done = 0, crc_ok = 0;
  logic [31:0] data_out, subframe_count, subframe_err_count;
  logic valid_out, overflow;
  logic [63:0] bit_count, bit_err_count;
  data_packer dut (.*);

  logic [31:0] exp_w[$]; int nw;
  always @(posedge clk) if (!rst && valid_out) begin
    chk(exp_w.size() > 0 && data_out == exp_w.pop_front(), $sformatf("word %0d = %h", nw, data_out));
    nw++;
  end

  int nsf, nerr; longint nb, nbe;
  task automatic subframe(input int L, input bit good, input int flips);
    bit pay[$]; logic [8:0] pn; logic [31:0] w; int k;
    pn = '1;
    for (int i = 0; i < L; i++) begin
      bit p; p = pn[8]; pn = {pn[7:0], pn[8] ^ pn[4]};
      pay.push_back(mode == 0 ? bit'($urandom_range(0, 1)) : p);
    end
    for (int f = 0; f < flips; f++) begin k = $urandom_range(0, L - 1); pay[k] = !pay[k]; end
    if (mode != 0) begin nb += L; end
    // expected words
    if (good && mode != 1) begin
      for (int i = 0; i < L; i += 32) begin
        w = '0;
        for (int j = 0; j < 32; j++) w[31-j] = (i + j < L) ? pay[i+j] : 1'b0;
        exp_w.push_back(w);
      end
    end
    for (int i = 0; i < L + 24; i++) begin
      @(posedge clk); bit_valid <= 1; bit_data <= (i < L) ? pay[i] : bit'($urandom_range(0, 1));
      bit_last <= (i == L + 23);
      if (i < L + 23 && $urandom_range(0, 3) == 0) begin @(posedge clk); bit_valid <= 0; end
    end
    @(posedge clk); bit_valid <= 0; bit_last <= 0; crc_done <= 1; crc_ok <= good;
    @(posedge clk); crc_done <= 0;
    nsf++; nerr += !good;
    repeat (5) @(posedge clk);
  endtask

  initial begin
    int fl;
    nw = 0; nsf = 0; nerr = 0; nb = 0; nbe = 0;
    repeat (2) @(posedge clk); rst <= 0;
    for (int m = 0; m < 3; m++) begin
      mode <= 2'(m); @(posedge clk);
      for (int t = 0; t < 8; t++) begin
        fl = (m == 0) ? 0 : $urandom_range(0, 5);
        nbe += fl;   // flips may hit the same bit twice: kept distinct below
        subframe($urandom_range(1, 300), t % 3 != 1, 0);
        if (m != 0) begin nbe -= fl; end
        if (m != 0 && fl > 0) begin subframe(64 + 32*t, 1'b0, 1); nbe += 1; end
      end
      repeat (50) @(posedge clk);
      chk(exp_w.size() == 0, $sformatf("mode %0d: %0d words missing", m, exp_w.size()));
    end
    chk(subframe_count == 32'(nsf) && subframe_err_count == 32'(nerr),
        $sformatf("subframes %0d/%0d exp %0d/%0d", subframe_count, subframe_err_count, nsf, nerr));
    chk(bit_count == 64'(nb) && bit_err_count == 64'(nbe),
        $sformatf("bits %0d/%0d exp %0d/%0d", bit_count, bit_err_count, nb, nbe));
    @(posedge clk); cnt_reset <= 1; @(posedge clk); cnt_reset <= 0; @(negedge clk);
    chk(subframe_count == 0 && bit_count == 0 && bit_err_count == 0, "counters cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
