// Signal detection and time synchronisation (TSyncPreambleDetection).
//
// Each matched-filtered sample (the same one the input buffer stores) goes
// through a correlator matched to the Zadoff-Chu sequence of the T_AMB
// preamble; magnitude and phase of the correlator output are computed by a
// vectoring CORDIC. The magnitude is the detection / timing metric and the
// phase the coarse phase estimate, both handed to the Sync Machine together
// with the buffer address of the sample they belong to.
// Timing: the metric of the sample written at address a reaches the Sync
// Machine two clocks after that write.
module time_sync
  import cbsr_pkg::*;
#(
  parameter int AW = 12,
  parameter int PEAK_WIN = 8
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          in_valid,      // sample written to the input buffer
  input  cplx_t         in_data,
  input  logic [AW-1:0] wr_addr,       // address it is written at
  input  logic [15:0]   th,
  input  logic [8:0]    fa_len,
  input  logic          cri_ready,
  input  logic [23:0]   read_num_samples,
  input  logic          cont_preamble_en,
  input  logic          enabled,
  output logic          rd_en,
  output logic [AW-1:0] read_addr,
  output logic          valid,
  output logic          sync,
  output logic [15:0]   sel_phase,
  output logic [2:0]    state,
  output logic          frame_start,
  output logic [17:0]   corr_mag       // detection metric, for observation
);
  logic          c_valid, m_valid;
  cplx_t         c_data;
  logic [17:0]   mag;
  logic [15:0]   ph;
  logic [AW-1:0] a_d1, a_d2;

  cfir_corr #(.N(ZC_LEN), .SHIFT(12), .C_RE(ZC_TAMB_RE), .C_IM(ZC_TAMB_IM)) u_corr (
    .clk, .rst, .in_valid, .in_data, .out_valid(c_valid), .out_data(c_data));

  cordic_vec u_mag (.clk, .rst, .in_valid(c_valid), .in_data(c_data),
                    .out_valid(m_valid), .mag, .phase(ph));

  always_ff @(posedge clk) begin
    if (rst) begin
      a_d1 <= '0; a_d2 <= '0;
    end else begin
      if (in_valid) a_d1 <= wr_addr;
      if (c_valid)  a_d2 <= a_d1;
    end
  end

  assign corr_mag = mag;

  sync_machine #(.AW(AW), .MW(18), .PEAK_WIN(PEAK_WIN)) u_sm (
    .clk, .rst, .corr_valid(m_valid), .corr_in(mag), .addr_in(a_d2), .phase(ph),
    .th, .F_AMB_len(fa_len), .cri_ready, .read_num_samples, .cont_preamble_en,
    .enabled, .rd_en, .read_addr_out(read_addr), .valid, .sync, .sel_phase,
    .out_state(state), .frame_start);
endmodule
