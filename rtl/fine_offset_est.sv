// Fine phase and frequency offset estimation.
//
// Input is the magnitude/phase stream of the midamble filter for the
// midamble samples of a frame. Every P_AMB_LEN samples form one midamble;
// the phase at the sample of largest magnitude is that midamble's phase
// estimate (sample-and-hold on the maximum). From the second midamble of a
// frame on, the phase step between consecutive midambles, wrapped to
// [-pi, pi), is averaged (running mean of the new step and the previous
// average) and divided by the midamble spacing PERIOD to give the residual
// frequency per sample:
//   freq = avg_step * round(2^24 / PERIOD) >> 24
// est_done pulses with phase_est/freq_est one clock after the last sample of
// each midamble. start clears the history at the beginning of a frame.
module fine_offset_est #(
  parameter int P_AMB_LEN = cbsr_pkg::P_AMB_LEN,
  parameter int PERIOD    = cbsr_pkg::P_AMB_LEN + cbsr_pkg::DATA_BLK_LEN
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic        in_valid,
  input  logic [17:0] mag,
  input  logic [15:0] phase,
  output logic        est_done,
  output logic [15:0] phase_est,
  output logic [15:0] freq_est
);
  localparam longint RECIP = (64'd1 << 24) / 64'(PERIOD);

  logic [9:0]  cnt;
  logic [17:0] best;
  logic [15:0] best_ph, cur_ph, prev_ph;
  logic        have_prev, have_avg;
  logic signed [15:0] step, avg, avg_n;
  logic signed [47:0] f;

  always_comb begin
    cur_ph = (cnt == '0 || mag > best) ? phase : best_ph;
    step   = signed'(cur_ph - prev_ph);
    avg_n  = have_avg ? 16'((17'(avg) + 17'(step)) >>> 1) : step;
    f      = 48'(avg_n) * 48'(RECIP);
  end

  always_ff @(posedge clk) begin
    if (rst || start) begin
      cnt <= '0; best <= '0; best_ph <= '0; prev_ph <= '0;
      have_prev <= 1'b0; have_avg <= 1'b0; avg <= '0;
      est_done <= 1'b0; phase_est <= '0; freq_est <= '0;
    end else begin
      est_done <= 1'b0;
      if (in_valid) begin
        if (cnt == '0 || mag > best) begin
          best <= mag; best_ph <= phase;
        end
        if (cnt == 10'(P_AMB_LEN - 1)) begin
          cnt       <= '0;
          est_done  <= 1'b1;
          phase_est <= cur_ph;
          prev_ph   <= cur_ph;
          have_prev <= 1'b1;
          if (have_prev) begin
            avg      <= avg_n;
            have_avg <= 1'b1;
            freq_est <= 16'(f >>> 24);
          end
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
