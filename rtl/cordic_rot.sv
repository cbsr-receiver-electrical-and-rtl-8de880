// Rotation of a complex sample by a phase (rotation-mode CORDIC).
//
// out = in * exp(j*angle), angle in 16-bit turn units (65536 = 2*pi). The
// angle is first reduced to [-pi/2, pi/2) by an exact rotation of pi (sign
// change), then 16 iterations rotate the vector; the CORDIC gain is removed
// by a multiplication with 0.60725 (19898/32768). Inside, the datapath is
// 24 bits wide with 3 extra fraction bits, removed with the gain. Used by the frequency
// offset estimator (DFT twiddles) and by the offset correction.
// All iterations are unrolled; result registered, latency 1 clock.
module cordic_rot
  import cbsr_pkg::*;
#(
  parameter int ITER = 16
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  cplx_t       in_data,
  input  logic [15:0] angle,
  output logic        out_valid,
  output cplx_t       out_data
);
  logic signed [23:0] x, y, xn, yn;   // 3 extra fraction bits
  logic signed [16:0] z;
  logic signed [39:0] xs, ys;

  always_comb begin
    // angle as signed; fold quadrants 2 and 3 by negating the vector
    if (angle[15] != angle[14]) begin
      x = -(24'(in_data.re) <<< 3); y = -(24'(in_data.im) <<< 3);
      z = 17'(signed'(angle + 16'd32768));
    end else begin
      x = 24'(in_data.re) <<< 3; y = 24'(in_data.im) <<< 3;
      z = 17'(signed'(angle));
    end
    for (int i = 0; i < ITER; i++) begin
      if (z >= 0) begin
        xn = x - (y >>> i); yn = y + (x >>> i); z = z - 17'(cordic_atan(i));
      end else begin
        xn = x + (y >>> i); yn = y - (x >>> i); z = z + 17'(cordic_atan(i));
      end
      x = xn; y = yn;
    end
    xs = (40'(x) * 40'sd19898 + 40'sd131072) >>> 18;
    ys = (40'(y) * 40'sd19898 + 40'sd131072) >>> 18;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0; out_data <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_data.re <= sat16(xs);
        out_data.im <= sat16(ys);
      end
    end
  end
endmodule
