// Data packing and error statistics.
//
// Decoded bits (first bit = MSB of the first word) are packed into 32-bit
// words for the software. The last CRC_LEN bits of each subframe are the
// CRC: bits pass a CRC_LEN-bit delay line and only bits that leave it are
// packed, so the CRC is dropped when the subframe ends; a partly filled last
// word is padded with zeros. Words are staged in a FIFO and only handed out
// (data_out/valid_out, one word per clock) once the subframe's CRC verdict
// (crc_done/crc_ok) allows it:
//  - mode 0 (data): subframes with a CRC error are discarded (the staged
//    words are rolled back);
//  - modes 1 and 2 (test modes): every subframe carries the PN9 test pattern
//    (x^9+x^5+1, all-ones seed, restarted each subframe). Payload bits are
//    counted (bit_count) and compared with it (bit_err_count); in mode 2 the
//    CRC-correct subframes are also delivered, in mode 1 none.
// subframe_count and subframe_err_count count subframes and CRC failures in
// every mode. cnt_reset clears all counters.
// The test pattern and the commit/rollback staging are this design's
// choices; detection of fake subframes in data mode is not part of it.
module data_packer
  import cbsr_pkg::*;
#(
  parameter int AW = 8,              // staging FIFO: 256 words = 8192 bits
  parameter int CRC_BITS = CRC_LEN
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [1:0]  mode,
  input  logic        cnt_reset,
  input  logic        bit_valid,
  input  logic        bit_data,
  input  logic        bit_last,
  input  logic        crc_done,
  input  logic        crc_ok,
  output logic [31:0] data_out,
  output logic        valid_out,
  output logic [31:0] subframe_count,
  output logic [31:0] subframe_err_count,
  output logic [63:0] bit_count,
  output logic [63:0] bit_err_count,
  output logic        overflow
);
  logic [CRC_BITS-1:0] dly;
  logic [5:0]  fill;          // bits in the delay line (saturates at CRC_BITS)
  logic [31:0] sh;
  logic [4:0]  nb;            // bits in sh
  logic [8:0]  pn;
  logic [31:0] mem [2**AW];
  logic [AW:0] wp, wp_commit, rp;
  logic        pay_valid, pay_bit;
  logic        test_mode;
  logic [31:0] word_n;
  logic        push;
  logic        flush_word;

  assign test_mode = (mode == MODE_BER1) || (mode == MODE_BER2);
  // a payload bit leaves the delay line when a new bit enters a full line
  assign pay_valid = bit_valid && (fill == 6'(CRC_BITS));
  assign pay_bit   = dly[CRC_BITS-1];
  assign word_n    = {sh[30:0], pay_bit};
  assign push      = pay_valid && (nb == 5'd31);
  assign flush_word = bit_valid && bit_last && (nb != 0 || pay_valid) && !push;

  always_ff @(posedge clk) begin
    if (rst) begin
      dly <= '0; fill <= '0; sh <= '0; nb <= '0; pn <= '1;
      wp <= '0; wp_commit <= '0; rp <= '0; overflow <= 1'b0;
      valid_out <= 1'b0; data_out <= '0;
    end else begin
      overflow <= 1'b0;
      if (bit_valid) begin
        dly  <= {dly[CRC_BITS-2:0], bit_data};
        fill <= (fill == 6'(CRC_BITS)) ? fill : fill + 1'b1;
        if (pay_valid) begin
          sh <= word_n;
          nb <= nb + 1'b1;
          pn <= {pn[7:0], pn[8] ^ pn[4]};
        end
        if (push) begin
          mem[wp[AW-1:0]] <= word_n;
          wp <= wp + 1'b1;
          overflow <= (wp - rp) == (AW+1)'(2**AW);
        end else if (flush_word) begin
          // pad the last partial word with zeros, MSB-aligned
          mem[wp[AW-1:0]] <= (pay_valid ? word_n : sh) << (pay_valid ? 5'(31 - nb) : 5'(32 - nb));
          wp <= wp + 1'b1;
        end
        if (bit_last) begin
          fill <= '0; nb <= '0; pn <= '1;
        end
      end
      if (crc_done) begin
       
        if ((mode == MODE_DATA && crc_ok) || (mode == MODE_BER2 && crc_ok))
          wp_commit <= wp;
        else
          wp <= wp_commit;         // roll back
      end
      valid_out <= 1'b0;
      if (rp != wp_commit) begin
        data_out  <= mem[rp[AW-1:0]];
        valid_out <= 1'b1;
        rp <= rp + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst || cnt_reset) begin
      subframe_count <= '0; subframe_err_count <= '0; bit_count <= '0; bit_err_count <= '0;
    end else begin
      if (crc_done) begin
        subframe_count <= subframe_count + 1'b1;
        if (!crc_ok) subframe_err_count <= subframe_err_count + 1'b1;
      end
      if (test_mode && pay_valid) begin
        bit_count <= bit_count + 1'b1;
        if (pay_bit != pn[8]) bit_err_count <= bit_err_count + 1'b1;
      end
    end
  end
endmodule
