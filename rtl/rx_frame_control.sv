// RxFrameControl: reads a stored radio frame back out of the two queues.
//
// Once process_en is high (coarse frequency offset estimated and coding
// rate known) the frame is replayed in its original order: for each of the
// num_phase_midamble periods of each of the num_subframes subframes, first
// P_AMB_LEN samples from the midamble queue (ph_sym_valid), then DATA_LEN
// samples from the data queue (d_sym_valid). Between the two it waits for
// est_done, the fine phase/frequency estimate of that midamble, so that the
// data that follows is corrected with it. A read is only issued while the
// queue in question holds a sample (mid_avail / data_avail), so the replay
// may stall. read_buf is high for any read; subframe_end marks the last
// data read of a subframe and frame_done the last of the frame. After the
// frame the block waits for process_en to drop.
// Read strobes are combinational (same clock as the state); the queues
// deliver the sample one clock later. mid_avail, data_avail, est_done and
// frame_done are this design's additions to the published interface.
module rx_frame_control #(
  parameter int P_AMB_LEN = cbsr_pkg::P_AMB_LEN,
  parameter int DATA_LEN  = cbsr_pkg::DATA_BLK_LEN
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       process_en,
  input  logic [4:0] num_phase_midamble,
  input  logic [7:0] num_subframes,
  input  logic       mid_avail,
  input  logic       data_avail,
  input  logic       est_done,
  output logic       d_sym_valid,
  output logic       ph_sym_valid,
  output logic       read_buf,
  output logic       subframe_end,
  output logic       frame_done,
  output logic       first_mid,      // reading the first midamble of the frame
  output logic [2:0] out_state
);
  typedef enum logic [2:0] {F_IDLE, F_MID, F_WAIT, F_DATA, F_DONE} fstate_e;
  fstate_e st;
  logic [9:0] cnt;
  logic [4:0] per;
  logic [7:0] sf;
  logic       last_data;

  assign ph_sym_valid = (st == F_MID) && mid_avail;
  assign d_sym_valid  = (st == F_DATA) && data_avail;
  assign read_buf     = ph_sym_valid || d_sym_valid;
  assign last_data    = d_sym_valid && cnt == 10'(DATA_LEN - 1) && per == num_phase_midamble - 1'b1;
  assign subframe_end = last_data;
  assign frame_done   = last_data && sf == num_subframes - 1'b1;
  assign first_mid    = (st == F_MID) && per == '0 && sf == '0;
  assign out_state    = st;

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= F_IDLE; cnt <= '0; per <= '0; sf <= '0;
    end else begin
      unique case (st)
        F_IDLE:
          if (process_en) begin
            st <= F_MID; cnt <= '0; per <= '0; sf <= '0;
          end
        F_MID:
          if (ph_sym_valid) begin
            if (cnt == 10'(P_AMB_LEN - 1)) begin cnt <= '0; st <= F_WAIT; end
            else cnt <= cnt + 1'b1;
          end
        F_WAIT:
          if (est_done) st <= F_DATA;
        F_DATA:
          if (d_sym_valid) begin
            if (cnt == 10'(DATA_LEN - 1)) begin
              cnt <= '0;
              st  <= F_MID;
              if (per == num_phase_midamble - 1'b1) begin
                per <= '0;
                if (sf == num_subframes - 1'b1) st <= F_DONE;
                sf <= sf + 1'b1;
              end else begin
                per <= per + 1'b1;
              end
            end else begin
              cnt <= cnt + 1'b1;
            end
          end
        F_DONE:
          if (!process_en) st <= F_IDLE;
        default: st <= F_IDLE;
      endcase
    end
  end
endmodule
