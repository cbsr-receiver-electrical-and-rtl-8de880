// Midamble filter: correlation with the base P_AMB Zadoff-Chu sequence,
// followed by magnitude and phase.
//
// The coding rate is carried by a cyclic shift of the base sequence, so the
// position of the correlation peak inside a midamble tells the coding rate,
// and the phase at the peak is the residual carrier phase at that midamble.
// Input samples enter with in_valid; mag/phase leave with out_valid two
// clocks later.
module midamble_filter
  import cbsr_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  cplx_t       in_data,
  output logic        out_valid,
  output logic [17:0] mag,
  output logic [15:0] phase
);
  logic  c_valid;
  cplx_t c_data;

  cfir_corr #(.N(ZC_LEN), .SHIFT(12), .C_RE(ZC_PAMB_RE), .C_IM(ZC_PAMB_IM)) u_corr (
    .clk, .rst, .in_valid, .in_data, .out_valid(c_valid), .out_data(c_data));

  cordic_vec u_mag (.clk, .rst, .in_valid(c_valid), .in_data(c_data),
                    .out_valid, .mag, .phase);
endmodule
