// Coding-rate evaluation.
//
// The first midamble after the F_AMB part is passed through the midamble
// filter (outside this module); this module receives the filter magnitude.
// start opens a search window of WIN samples in which find_max locates the
// correlation peak. Post-processing maps the peak index to the coding-rate
// indicator: a cyclic shift of s samples of the base sequence moves the peak
// s samples earlier, so
//   cri = (IDX_REF - idx + CRI_STEP/2) / CRI_STEP
// where IDX_REF is the peak index of the unshifted sequence. Indices outside
// the range give a value of 8 or more (flagged invalid by the CRI checker);
// 7 denotes the EoT frame. A window with no correlation at all (peak value
// 0) is also reported as 15. cri_valid pulses when cri is ready.
// IDX_REF depends on the pipeline delays between the buffer read and this
// module; the receiver top sets it to the value found for its pipeline
// (P_AMB_LEN - 2), the default fits a stand-alone filter.
module cri_eval
  import cbsr_pkg::*;
#(
  parameter int WIN     = P_AMB_LEN + 8,
  parameter int IDX_REF = P_AMB_LEN + 2,
  parameter int STEP    = CRI_STEP
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic        in_valid,
  input  logic [17:0] mag,
  output logic [3:0]  cri,
  output logic        cri_valid
);
  logic       fm_done;
  logic [9:0] fm_idx;
  logic [17:0] fm_val;
  int         d;

  find_max #(.DW(18), .IW(10)) u_fm (
    .clk, .rst, .start, .len(10'(WIN)), .in_valid, .din(mag),
    .done(fm_done), .max_idx(fm_idx), .max_val(fm_val));

  always_comb begin
    d = IDX_REF - int'(fm_idx) + STEP/2;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cri <= '0; cri_valid <= 1'b0;
    end else begin
      cri_valid <= fm_done;
      if (fm_done) begin
        if (fm_val == '0 || d < 0 || d / STEP > 15) cri <= 4'd15;
        else                        cri <= 4'(d / STEP);
      end
    end
  end
endmodule
