// Sync Machine: radio-frame detection and input-buffer read control.
//
// The correlation metric of the T_AMB correlator arrives with the buffer
// address of the sample it belongs to. In SEARCH the machine waits for the
// metric to exceed the threshold th; in PEAK it follows the metric and keeps
// the largest value, its address and its phase, and once PEAK_WIN further
// samples have not beaten it the peak is taken as the frame timing. The
// phase at the peak becomes sel_phase (coarse phase estimate).
// Reading then starts at the sample after the peak: first F_AMB_len samples
// with sync high (the F_AMB part, for the coarse frequency estimator), then
// the rest of the frame with sync low. The frame length read_num_samples
// depends on the coding rate, so the machine only ends the read once
// cri_ready has been seen; then it returns to SEARCH, the next detection
// window. With cont_preamble_en set (continuous preamble mode) it returns
// to SEARCH right after the F_AMB part. enabled low forces IDLE.
// The read never passes the newest correlated sample (addr_in), so reading
// may go one sample per clock and still never overtake the writer.
// Timing: rd_en/read_addr_out drive the buffer's synchronous read port;
// valid and sync are delayed one clock so that they line up with the
// buffer's rd_data.
// The ports follow the Sync Machine's published interface; corr_valid, rd_en
// and the peak-window rule are this design's additions.
module sync_machine #(
  parameter int AW = 12,
  parameter int MW = 18,
  parameter int PEAK_WIN = 8
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          corr_valid,
  input  logic [MW-1:0] corr_in,
  input  logic [AW-1:0] addr_in,
  input  logic [15:0]   phase,
  input  logic [15:0]   th,
  input  logic [8:0]    F_AMB_len,
  input  logic          cri_ready,
  input  logic [23:0]   read_num_samples,
  input  logic          cont_preamble_en,
  input  logic          enabled,
  output logic          rd_en,
  output logic [AW-1:0] read_addr_out,
  output logic          valid,
  output logic          sync,
  output logic [15:0]   sel_phase,
  output logic [2:0]    out_state,
  output logic          frame_start    // one-clock pulse when a peak is accepted
);
  typedef enum logic [2:0] {S_IDLE, S_SEARCH, S_PEAK, S_READ_F, S_READ_D} state_e;
  state_e state;

  logic [MW-1:0] best;
  logic [AW-1:0] best_addr;
  logic [15:0]   best_phase;
  logic [7:0]    win_cnt;
  logic [23:0]   cnt;
  logic          cri_seen;
  logic          can_read;

  assign can_read = (read_addr_out != addr_in + 1'b1);
  assign out_state = state;

  always_comb begin
    rd_en = 1'b0;
    if (state == S_READ_F) rd_en = can_read;
    else if (state == S_READ_D)
      rd_en = can_read && (!cri_seen || cnt < read_num_samples);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE; best <= '0; best_addr <= '0; best_phase <= '0;
      win_cnt <= '0; cnt <= '0; cri_seen <= 1'b0; read_addr_out <= '0;
      valid <= 1'b0; sync <= 1'b0; sel_phase <= '0; frame_start <= 1'b0;
    end else begin
      valid <= rd_en;
      sync  <= rd_en && state == S_READ_F;
      frame_start <= 1'b0;
      if (cri_ready) cri_seen <= 1'b1;
      if (rd_en) read_addr_out <= read_addr_out + 1'b1;
      if (!enabled) begin
        state <= S_IDLE;
      end else begin
        unique case (state)
          S_IDLE: state <= S_SEARCH;
          S_SEARCH:
            if (corr_valid && corr_in > MW'(th)) begin
              best <= corr_in; best_addr <= addr_in; best_phase <= phase;
              win_cnt <= '0; state <= S_PEAK;
            end
          S_PEAK:
            if (corr_valid) begin
              if (corr_in > best) begin
                best <= corr_in; best_addr <= addr_in; best_phase <= phase;
                win_cnt <= '0;
              end else if (win_cnt == 8'(PEAK_WIN - 1)) begin
                state <= S_READ_F;
                read_addr_out <= best_addr + 1'b1;
                sel_phase <= best_phase;
                cnt <= '0; cri_seen <= 1'b0;
                frame_start <= 1'b1;
              end else begin
                win_cnt <= win_cnt + 1'b1;
              end
            end
          S_READ_F:
            if (rd_en) begin
              cnt <= cnt + 1'b1;
              if (cnt == 24'(F_AMB_len) - 1'b1) begin
                cnt <= '0;
                state <= cont_preamble_en ? S_SEARCH : S_READ_D;
              end
            end
          S_READ_D: begin
            if (rd_en) cnt <= cnt + 1'b1;
            if (cri_seen && cnt >= read_num_samples) state <= S_SEARCH;
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end
endmodule
