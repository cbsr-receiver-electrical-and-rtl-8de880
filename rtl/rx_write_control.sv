// RxWriteControl: splits the radio frame read from the input buffer into
// the midamble queue and the data queue.
//
// After the F_AMB part, the frame is a sequence of periods of P_AMB_LEN
// midamble samples followed by DATA_LEN data samples; num_phase_midamble
// periods make a subframe and num_subframes subframes make the frame. A
// position counter inside the period decides, for every sample offered with
// write_en, whether it goes to the midamble queue (write_midamble) or to the
// data queue (write_data). After the last sample of the frame no more
// writes happen until the next start. While eot is high nothing is written
// (end of transmission, until the next reception session).
// write_data / write_midamble are combinational from write_en (same clock).
// The start input (new frame detected) is this design's addition.
module rx_write_control #(
  parameter int P_AMB_LEN = cbsr_pkg::P_AMB_LEN,
  parameter int DATA_LEN  = cbsr_pkg::DATA_BLK_LEN
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic       write_en,
  input  logic [4:0] num_phase_midamble,
  input  logic [7:0] num_subframes,
  input  logic       eot,
  output logic       write_data,
  output logic       write_midamble,
  output logic [1:0] outState
);
  typedef enum logic [1:0] {W_IDLE, W_ACTIVE, W_DONE, W_EOT} wstate_e;
  wstate_e st;
  logic [9:0] pos;
  logic [4:0] per;
  logic [7:0] sf;
  logic       go;

  assign go             = (st == W_ACTIVE) && write_en && !eot;
  assign write_midamble = go && (pos < 10'(P_AMB_LEN));
  assign write_data     = go && (pos >= 10'(P_AMB_LEN));
  assign outState       = st;

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= W_IDLE; pos <= '0; per <= '0; sf <= '0;
    end else if (eot) begin
      st <= W_EOT;
    end else if (start) begin
      st <= W_ACTIVE; pos <= '0; per <= '0; sf <= '0;
    end else if (st == W_EOT) begin
      st <= W_IDLE;
    end else if (go) begin
      if (pos == 10'(P_AMB_LEN + DATA_LEN - 1)) begin
        pos <= '0;
        if (per == num_phase_midamble - 1'b1) begin
          per <= '0;
          if (sf == num_subframes - 1'b1) st <= W_DONE;
          sf <= sf + 1'b1;
        end else begin
          per <= per + 1'b1;
        end
      end else begin
        pos <= pos + 1'b1;
      end
    end
  end
endmodule
