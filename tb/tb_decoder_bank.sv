// Testbench of decoder_bank with behavioural decoders: each model decoder
// collects one subframe of soft values, stays busy for a while and then
// returns the hard decisions of its soft values as decoded bits. Eight
// subframes are sent; the testbench checks that subframe i goes to decoder
// i mod 6, that the merged bit stream equals the expected bits in order,
// and that a subframe sent to a still-busy decoder raises overrun.
`timescale 1ns/1ps
module tb_decoder_bank;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  localparam int ND = 6, L = 20;
  logic llr_valid = 0, llr_last = 0;
  logic signed [7:0] llr_i, llr_q;
  logic [ND-1:0] dec_in_valid, dec_busy, dec_out_valid, dec_out_bit, dec_out_last;
  logic [15:0] dec_llr;
  logic dec_in_last, bit_valid, bit_data, bit_last, overrun;
  logic [2:0] sel;
  decoder_bank #(.NDEC(ND)) dut (.*);

  // behavioural decoders; model m finishes its output STAGGER*m clocks late
  // so that outputs of consecutive decoders never overlap
  for (genvar m = 0; m < ND; m++) begin : g_dec
    bit bits[$];
    initial begin
      dec_busy[m] = 0; dec_out_valid[m] = 0; dec_out_bit[m] = 0; dec_out_last[m] = 0;
      forever begin
        @(posedge clk);
        if (dec_in_valid[m]) begin
          dec_busy[m] <= 1;
          bits.push_back(dec_llr[15]); bits.push_back(dec_llr[7]);
          if (dec_in_last) begin
            repeat (10) @(posedge clk);
            while (bits.size() > 0) begin
              dec_out_valid[m] <= 1; dec_out_bit[m] <= bits.pop_front();
              dec_out_last[m] <= (bits.size() == 0);
              @(posedge clk);
            end
            dec_out_valid[m] <= 0; dec_out_last[m] <= 0;
            repeat (600) @(posedge clk);
            dec_busy[m] <= 0;
          end
        end
      end
    end
  end

  bit exp_bits[$]; int nbits, nlast, novr, dest[$];
  always @(posedge clk) if (!rst) begin
    if (bit_valid) begin
      chk(exp_bits.size() > 0 && bit_data == exp_bits.pop_front(), $sformatf("bit %0d", nbits));
      nbits++; nlast += bit_last;
    end
    if (overrun) novr++;
    if (llr_valid && llr_last) dest.push_back(sel);
  end

  initial begin
    llr_i = 0; llr_q = 0;
    repeat (2) @(posedge clk); rst <= 0;
    for (int sf = 0; sf < 8; sf++) begin
      for (int n = 0; n < L; n++) begin
        @(posedge clk); llr_valid <= 1; llr_last <= (n == L - 1);
        llr_i <= 8'($urandom_range(0, 255)); llr_q <= 8'($urandom_range(0, 255));
        @(negedge clk); exp_bits.push_back(llr_i[7]); exp_bits.push_back(llr_q[7]);
      end
      @(posedge clk); llr_valid <= 0; llr_last <= 0;
      repeat (60) @(posedge clk);   // decoder output of this subframe ends in time
    end
    repeat (100) @(posedge clk);
    for (int i = 0; i < 8; i++) chk(dest[i] == i % ND, $sformatf("subframe %0d to decoder %0d", i, dest[i]));
    chk(nbits == 6*2*L && nlast == 6,   // subframes 6, 7 hit busy models and are lost
        $sformatf("bits %0d lasts %0d", nbits, nlast));
    chk(novr >= 1, "busy decoder reported as overrun");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
