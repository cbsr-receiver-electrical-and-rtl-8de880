// EoT detector and coding-rate verifier (CRI_Checker).
//
// Examines every evaluated coding-rate indicator (cri_valid):
//  - 7 marks the end-of-transmission (EoT) frame: eot_flag is set and stays
//    set until flush_end reports that the EoT procedure has finished, or the
//    receiver is disabled;
//  - 0..6 are valid coding rates;
//  - anything else is invalid: override_flag is set, so that the default
//    coding rate 0 is used instead (that frame is lost), until override_end.
// cri_out is the coding rate the rest of the receiver should use.
// Outputs are registered: they change the clock after cri_valid.
module cri_checker (
  input  logic       clk,
  input  logic       rst,
  input  logic [3:0] cri_val,
  input  logic       cri_valid,
  input  logic       flush_end,
  input  logic       override_end,
  input  logic       rx_enable,
  output logic       override_flag,
  output logic       eot_flag,
  output logic [2:0] cri_out
);
  always_ff @(posedge clk) begin
    if (rst || !rx_enable) begin
      override_flag <= 1'b0; eot_flag <= 1'b0; cri_out <= '0;
    end else begin
      if (flush_end)    eot_flag <= 1'b0;
      if (override_end) override_flag <= 1'b0;
      if (cri_valid) begin
        if (cri_val == 4'd7) begin
          eot_flag <= 1'b1; cri_out <= 3'd0;
        end else if (cri_val > 4'd7) begin
          override_flag <= 1'b1; cri_out <= 3'd0;
        end else begin
          override_flag <= 1'b0; cri_out <= cri_val[2:0];
        end
      end
    end
  end
endmodule
