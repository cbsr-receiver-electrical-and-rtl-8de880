// Frequency and phase offset correction.
//
// out = in * exp(-j*acc), where the phase accumulator acc advances by freq
// after every valid sample (a numerically controlled oscillator) and load
// sets it to load_phase. With load_phase = 0 and freq = coarse estimate it
// removes the coarse frequency offset; loaded with the phase measured at a
// midamble and stepped by the fine frequency estimate it removes the
// residual phase and frequency offset. Phases in 16-bit turn units.
// Latency 1 clock (rotation CORDIC).
module nco_derotator
  import cbsr_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        load,
  input  logic [15:0] load_phase,
  input  logic [15:0] freq,
  input  logic        in_valid,
  input  cplx_t       in_data,
  output logic        out_valid,
  output cplx_t       out_data
);
  logic [15:0] acc;

  always_ff @(posedge clk) begin
    if (rst)           acc <= '0;
    else if (load)     acc <= load_phase;
    else if (in_valid) acc <= acc + freq;
  end

  cordic_rot u_rot (.clk, .rst, .in_valid, .in_data, .angle(16'(-acc)),
                    .out_valid, .out_data);
endmodule
