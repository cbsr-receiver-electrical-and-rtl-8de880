// OQPSK demodulator.
//
// The corrected data samples arrive at 2 samples per symbol. The in-phase
// component is delayed by one sample (half a symbol) to undo the offset of
// OQPSK, which turns each pair of samples into one QPSK symbol; every second
// sample is then kept. Each QPSK symbol is mapped to two soft values for the
// decoder: with Gray mapping and equal noise on both axes, the log-likelihood
// ratio (d1^2 - d0^2)/N0 of each bit is proportional to the corresponding
// component, so llr = saturate(component >> LLR_SHIFT) in 8 bits, positive
// meaning bit 0. hard = sign bits. sof resets the symbol phase at the start
// of a subframe; in_last marks the subframe's last sample and comes out with
// its symbol as out_last. Latency 1 clock.
module oqpsk_demod
  import cbsr_pkg::*;
#(
  parameter int LLR_SHIFT = 6
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              sof,
  input  logic              in_valid,
  input  cplx_t             in_data,
  input  logic              in_last,
  output logic              out_valid,
  output logic signed [7:0] llr_i,
  output logic signed [7:0] llr_q,
  output logic [1:0]        hard,
  output logic              out_last
);
  logic signed [15:0] re_d;
  logic               ph;

  function automatic logic signed [7:0] sat8(input logic signed [15:0] v);
    logic signed [15:0] s;
    s = v >>> LLR_SHIFT;
    if (s > 16'sd127)       return 8'sd127;
    else if (s < -16'sd127) return -8'sd127;
    else                    return s[7:0];
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      re_d <= '0; ph <= 1'b0; out_valid <= 1'b0; llr_i <= '0; llr_q <= '0;
      hard <= '0; out_last <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      if (in_valid) begin
        re_d <= in_data.re;
        ph   <= sof ? 1'b1 : ~ph;
        if (ph && !sof) begin
          out_valid <= 1'b1;
          llr_i     <= sat8(re_d);
          llr_q     <= sat8(in_data.im);
          hard      <= {in_data.im < 0, re_d < 0};
          out_last  <= in_last;
        end
      end
    end
  end
endmodule
