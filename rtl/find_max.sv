// Search of the largest value in a window (findMax).
//
// A pulse on start opens a window of len valid samples. The module tracks
// the largest din seen and the index (0..len-1) where it first occurred.
// One clock after the last sample of the window, done pulses with max_idx
// and max_val. Used by the coding-rate evaluation (peak of the midamble
// filter) and by the coarse frequency estimator (largest DFT bin).
module find_max #(
  parameter int DW = 18,
  parameter int IW = 10
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic [IW-1:0] len,
  input  logic          in_valid,
  input  logic [DW-1:0] din,
  output logic          done,
  output logic [IW-1:0] max_idx,
  output logic [DW-1:0] max_val
);
  logic          active;
  logic [IW-1:0] cnt;
  logic [DW-1:0] best;
  logic [IW-1:0] best_idx;

  always_ff @(posedge clk) begin
    if (rst) begin
      active <= 1'b0; cnt <= '0; best <= '0; best_idx <= '0;
      done <= 1'b0; max_idx <= '0; max_val <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        active <= 1'b1; cnt <= '0; best <= '0; best_idx <= '0;
      end else if (active && in_valid) begin
        if (cnt == '0 || din > best) begin
          best <= din; best_idx <= cnt;
        end
        if (cnt == len - 1'b1) begin
          active  <= 1'b0;
          done    <= 1'b1;
          max_idx <= (cnt == '0 || din > best) ? cnt : best_idx;
          max_val <= (cnt == '0 || din > best) ? din : best;
        end
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
