// Decoding subsystem around a bank of parallel turbo decoders.
//
// One turbo decoder cannot keep up with the subframe rate, so NDEC decoders
// work in turn: the soft values of subframe i go to decoder i mod NDEC (the
// selection advances after each subframe's last soft value). Because the
// decoders are used in sequence their outputs never overlap in time, so the
// decoded bits of all decoders are merged onto one stream by OR-ing their
// masked outputs and one CRC checker suffices; an assertion checks that at
// most one decoder delivers at a time. If the selected decoder is still
// busy when a new subframe starts, overrun pulses (the subframe still goes
// to it). The decoder cores themselves are outside this block: the soft
// value bus is shared, dec_in_valid selects the decoder.
// Decoder interface (this design's choice): soft values {llr_i, llr_q} with
// valid/last in, decoded bits with valid/last out, busy while decoding.
// The soft-value bus dec_llr and dec_in_last are the input soft values
// wired straight to all decoders (only dec_in_valid selects one), so they
// add no delay.
module decoder_bank #(
  parameter int NDEC = 6
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              llr_valid,
  input  logic signed [7:0] llr_i,
  input  logic signed [7:0] llr_q,
  input  logic              llr_last,
  // to the decoders
  output logic [NDEC-1:0]   dec_in_valid,
  output logic [15:0]       dec_llr,
  output logic              dec_in_last,
  // from the decoders
  input  logic [NDEC-1:0]   dec_busy,
  input  logic [NDEC-1:0]   dec_out_valid,
  input  logic [NDEC-1:0]   dec_out_bit,
  input  logic [NDEC-1:0]   dec_out_last,
  // merged decoded stream
  output logic              bit_valid,
  output logic              bit_data,
  output logic              bit_last,
  output logic [2:0]        sel,
  output logic              overrun
);
  logic first;   // next soft value is the first of a subframe

  assign dec_llr     = {llr_i, llr_q};
  assign dec_in_last = llr_last;

  always_comb begin
    dec_in_valid = '0;
    dec_in_valid[sel] = llr_valid;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sel <= '0; first <= 1'b1; overrun <= 1'b0;
    end else begin
      overrun <= llr_valid && first && dec_busy[sel];
      if (llr_valid) begin
        first <= llr_last;
        if (llr_last) sel <= (sel == 3'(NDEC - 1)) ? '0 : sel + 1'b1;
      end
    end
  end

  assign bit_valid = |dec_out_valid;
  assign bit_data  = |(dec_out_valid & dec_out_bit);
  assign bit_last  = |(dec_out_valid & dec_out_last);

  a_no_overlap: assert property (@(posedge clk) disable iff (rst) $onehot0(dec_out_valid));
endmodule
