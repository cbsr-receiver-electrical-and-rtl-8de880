// Complex correlator (complex FIR matched to a Zadoff-Chu sequence).
//
// y[t] = sum_{k=0}^{N-1} x[t-k] * conj(c[N-1-k]) >> SHIFT
// i.e. the FIR whose impulse response is the time-reversed conjugate of the
// reference sequence c. The output peaks when the last sample of a complete
// copy of c has entered. Used with the T_AMB sequence in the time
// synchronisation and with the base P_AMB sequence in the midamble filter.
// Coefficients are 8-bit (sequence scaled by 127); SHIFT=12 gives a peak of
// about the input amplitude. Direct form, one output per valid input,
// latency 1 clock.
module cfir_corr
  import cbsr_pkg::*;
#(
  parameter int N = ZC_LEN,
  parameter int SHIFT = 12,
  parameter logic signed [7:0] C_RE [N] = ZC_TAMB_RE,
  parameter logic signed [7:0] C_IM [N] = ZC_TAMB_IM
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  cplx_t in_data,
  output logic  out_valid,
  output cplx_t out_data
);
  cplx_t dl [N-1];     // dl[k-1] holds x[t-k] after the current sample
  logic signed [39:0] acc_re, acc_im;

  // x * conj(c) = (xr*cr + xi*ci) + j(xi*cr - xr*ci)
  always_comb begin
    acc_re = 40'(in_data.re) * 40'(C_RE[N-1]) + 40'(in_data.im) * 40'(C_IM[N-1]);
    acc_im = 40'(in_data.im) * 40'(C_RE[N-1]) - 40'(in_data.re) * 40'(C_IM[N-1]);
    for (int k = 1; k < N; k++) begin
      acc_re += 40'(dl[k-1].re) * 40'(C_RE[N-1-k]) + 40'(dl[k-1].im) * 40'(C_IM[N-1-k]);
      acc_im += 40'(dl[k-1].im) * 40'(C_RE[N-1-k]) - 40'(dl[k-1].re) * 40'(C_IM[N-1-k]);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < N-1; k++) dl[k] <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        dl[0] <= in_data;
        for (int k = 1; k < N-1; k++) dl[k] <= dl[k-1];
        out_data.re <= sat16(acc_re >>> SHIFT);
        out_data.im <= sat16(acc_im >>> SHIFT);
      end
    end
  end
endmodule
