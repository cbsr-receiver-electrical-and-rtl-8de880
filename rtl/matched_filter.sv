// Matched filter of the receiver front end.
//
// Every second valid input sample is kept (decimation by 2, as in the
// front-end chain of the receiver model), and the kept samples are filtered
// by a 17-tap root-raised-cosine FIR, applied to I and Q alike. The result is
// the matched-filtered signal at 2 samples per symbol that feeds the input
// buffer and the time synchronisation.
// Two coefficient sets are held; rolloff_sel picks one, matching the two
// roll-off settings of RADIO_CONFIG_REG. The roll-off values themselves
// (0.35 for setting 0, 0.5 for setting 1), the 8-symbol span and the Q1.14
// coefficient format are this design's choices. Coefficients:
//   h[i] = rrc(t=(i-8)/2, beta), normalised so that sum(h) = 2, times 16384.
// Timing: out_valid follows a kept input sample by one clock.
module matched_filter
  import cbsr_pkg::*;
#(
  parameter int TAPS = 17
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  cplx_t in_data,
  input  logic  rolloff_sel,
  output logic  out_valid,
  output cplx_t out_data
);
  typedef logic signed [15:0] tap_arr_t [TAPS];
  localparam tap_arr_t H0 = '{33, 156, -415, 418, 932, -2204, -1381, 9912, 17868,
                              9912, -1381, -2204, 932, 418, -415, 156, 33};
  localparam tap_arr_t H1 = '{-166, 176, 50, -247, 698, -1233, -1744, 9510, 18680,
                              9510, -1744, -1233, 698, -247, 50, 176, -166};

  cplx_t dl [TAPS];
  logic  phase;          // decimation phase
  logic  keep;

  assign keep = in_valid && !phase;

  always_ff @(posedge clk) begin
    if (rst) begin
      phase <= 1'b0;
      for (int i = 0; i < TAPS; i++) dl[i] <= '0;
    end else if (in_valid) begin
      phase <= ~phase;
      if (!phase) begin
        dl[0] <= in_data;
        for (int i = 1; i < TAPS; i++) dl[i] <= dl[i-1];
      end
    end
  end

  // FIR on the delay line as it is after the shift
  logic signed [39:0] acc_re, acc_im;
  always_comb begin
    acc_re = 40'(in_data.re) * 40'(rolloff_sel ? H1[0] : H0[0]);
    acc_im = 40'(in_data.im) * 40'(rolloff_sel ? H1[0] : H0[0]);
    for (int i = 1; i < TAPS; i++) begin
      acc_re += 40'(dl[i-1].re) * 40'(rolloff_sel ? H1[i] : H0[i]);
      acc_im += 40'(dl[i-1].im) * 40'(rolloff_sel ? H1[i] : H0[i]);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= keep;
      if (keep) begin
        out_data.re <= sat16(acc_re >>> 15);
        out_data.im <= sat16(acc_im >>> 15);
      end
    end
  end
endmodule
