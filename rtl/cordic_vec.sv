// Complex to magnitude and phase (vectoring CORDIC).
//
// Computes |x| and arg(x) of a complex sample, as the "Complex to
// Magnitude-Angle" blocks of the time synchronisation and the midamble filter
// do. The input is first folded into the right half plane (a rotation by
// +/-pi/2), then 16 shift-and-add iterations drive the imaginary part to
// zero while the angle accumulates. The magnitude keeps the CORDIC gain of
// about 1.647 (it is only compared against thresholds and other magnitudes).
// Inside, the datapath is 24 bits wide with 3 extra fraction bits (inputs
// shifted left by 3, magnitude rounded back), which keeps the phase error
// within a few units. Magnitude is 18 bits unsigned, phase 16 bits
// (65536 = 2*pi).
// All iterations are unrolled; result registered, latency 1 clock.
module cordic_vec
  import cbsr_pkg::*;
#(
  parameter int ITER = 16
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  cplx_t       in_data,
  output logic        out_valid,
  output logic [17:0] mag,
  output logic [15:0] phase
);
  logic signed [23:0] x, y, xn, yn;   // 3 extra fraction bits
  logic        [15:0] z;
  logic        [17:0] mag_c;

  always_comb begin
    // fold into right half plane
    if (in_data.re < 0) begin
      if (in_data.im >= 0) begin   // rotate by -pi/2
        x = 24'(in_data.im) <<< 3;  y = -(24'(in_data.re) <<< 3);  z = 16'd16384;
      end else begin               // rotate by +pi/2
        x = -(24'(in_data.im) <<< 3); y = 24'(in_data.re) <<< 3;   z = 16'd49152;
      end
    end else begin
      x = 24'(in_data.re) <<< 3; y = 24'(in_data.im) <<< 3; z = 16'd0;
    end
    for (int i = 0; i < ITER; i++) begin
      if (y >= 0) begin
        xn = x + (y >>> i); yn = y - (x >>> i); z = z + cordic_atan(i);
      end else begin
        xn = x - (y >>> i); yn = y + (x >>> i); z = z - cordic_atan(i);
      end
      x = xn; y = yn;
    end
    mag_c = 18'((x + 24'sd4) >>> 3);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0; mag <= '0; phase <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        mag   <= mag_c;
        phase <= z;
      end
    end
  end
endmodule
