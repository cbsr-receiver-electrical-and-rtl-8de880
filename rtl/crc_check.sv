// CRC verification of a decoded subframe.
//
// The decoded bits of a subframe (first bit first) end with a 24-bit CRC.
// The checker divides the whole subframe, CRC included, by the LTE CRC24A
// generator x^24+x^23+x^18+x^17+x^14+x^11+x^10+x^7+x^6+x^5+x^4+x^3+x+1 with
// a zero initial register; the remainder is zero for an error-free
// subframe. One clock after the bit flagged last, done pulses with ok.
// The polynomial choice follows from the LTE turbo code the receiver uses;
// the exact CRC is this design's assumption.
module crc_check #(
  parameter logic [23:0] POLY = 24'h864CFB
) (
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  input  logic in_bit,
  input  logic in_last,
  output logic done,
  output logic ok
);
  logic [23:0] r, r_n;

  always_comb begin
    r_n = {r[22:0], 1'b0} ^ ((r[23] ^ in_bit) ? POLY : 24'h0);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      r <= '0; done <= 1'b0; ok <= 1'b0;
    end else begin
      done <= 1'b0;
      if (in_valid) begin
        if (in_last) begin
          r    <= '0;
          done <= 1'b1;
          ok   <= (r_n == '0);
        end else begin
          r <= r_n;
        end
      end
    end
  end
endmodule
