// Coarse frequency offset estimation.
//
// The F_AMB part of the preamble is an unmodulated sequence, so a residual
// carrier offset turns it into a tone. The F_AMB samples (sync high) are
// stored, then a serial DFT evaluates the bins k = -KMAX..KMAX: each bin is
// the sum over n of x[n]*exp(-j*2*pi*k*n/N), one product per clock through a
// rotation CORDIC. The bin with the largest |re|+|im| gives the offset
//   freq = k * 65536 / N   (phase advance per sample, 65536 = 2*pi)
// which the frequency correction removes. N = F_AMB length (64, 128 or 256,
// a power of two). done pulses when freq is valid, (2*KMAX+1)*N + 3 clocks
// after the last F_AMB sample.
// Only the integer-bin search is done here; the refinement of the bin
// estimate is not part of this block. Restricting the search to +/-KMAX bins
// (instead of the full FFT) is this design's choice.
module coarse_cfo
  import cbsr_pkg::*;
#(
  parameter int KMAX = 16,
  parameter int NMAX = 256
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        frame_start,   // clears the collection
  input  logic        in_valid,
  input  logic        sync,          // sample belongs to F_AMB
  input  cplx_t       in_data,
  input  logic [1:0]  f_amb_code,    // 0:64 1:128 2:256 samples
  output logic        done,
  output logic [15:0] freq,
  output logic signed [7:0] bin
);
  typedef enum logic [1:0] {C_IDLE, C_COLLECT, C_CALC, C_DRAIN} cstate_e;
  cstate_e st;

  cplx_t mem [NMAX];
  logic [8:0] wcnt, n;
  logic [8:0] len;
  logic [3:0] lg;                 // log2(len)
  logic signed [7:0] k;

  // pipeline: issue -> mem read (stage 1) -> cordic (stage 2)
  logic        v1, last1;
  logic signed [7:0] k1, k2;
  logic        last2, last2_d;
  logic [15:0] ang1;
  cplx_t       x1;
  logic        v2;
  cplx_t       r2;
  logic signed [31:0] acc_re, acc_im, m_re, m_im;
  logic [31:0] metric, best;
  logic signed [7:0] best_k;

  assign len = 9'(f_amb_len(f_amb_code));
  assign lg  = (f_amb_code == 2'd0) ? 4'd6 : (f_amb_code == 2'd1) ? 4'd7 : 4'd8;

  always_ff @(posedge clk) begin
    if (st == C_COLLECT && in_valid && sync) mem[wcnt[7:0]] <= in_data;
    x1 <= mem[n[7:0]];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= C_IDLE; wcnt <= '0; n <= '0; k <= '0;
      v1 <= 1'b0; last1 <= 1'b0; k1 <= '0; ang1 <= '0;
    end else begin
      v1 <= 1'b0; last1 <= 1'b0;
      if (frame_start) begin
        st <= C_COLLECT; wcnt <= '0;
      end else begin
        unique case (st)
          C_IDLE: ;
          C_COLLECT:
            if (in_valid && sync) begin
              wcnt <= wcnt + 1'b1;
              if (wcnt == len - 1'b1) begin
                st <= C_CALC; n <= '0; k <= -8'(KMAX);
              end
            end
          C_CALC: begin
            v1    <= 1'b1;
            k1    <= k;
            last1 <= (n == len - 1'b1);
            // angle = -2*pi*k*n/N  ->  -(k*n) << (16 - log2 N)
            ang1  <= 16'(-((32'(signed'(k)) * 32'(n)) <<< (16 - lg)));
            if (n == len - 1'b1) begin
              n <= '0;
              if (k == 8'(KMAX)) st <= C_DRAIN;
              k <= k + 1'b1;
            end else begin
              n <= n + 1'b1;
            end
          end
          C_DRAIN: if (done) st <= C_IDLE;
          default: st <= C_IDLE;
        endcase
      end
    end
  end

  cordic_rot u_rot (.clk, .rst, .in_valid(v1), .in_data(x1), .angle(ang1),
                    .out_valid(v2), .out_data(r2));

  always_ff @(posedge clk) begin
    if (rst) begin k2 <= '0; last2 <= 1'b0; end
    else begin k2 <= k1; last2 <= last1; end
  end

  always_comb begin
    m_re = acc_re + 32'(r2.re);
    m_im = acc_im + 32'(r2.im);
    metric = 32'(m_re < 0 ? -m_re : m_re) + 32'(m_im < 0 ? -m_im : m_im);
  end

  always_ff @(posedge clk) begin
    if (rst || frame_start) begin
      acc_re <= '0; acc_im <= '0; best <= '0; best_k <= '0;
      done <= 1'b0; freq <= '0; bin <= '0; last2_d <= 1'b0;
    end else begin
      done <= 1'b0;
      last2_d <= 1'b0;
      if (v2) begin
        if (last2) begin
          acc_re <= '0; acc_im <= '0;
          if (k2 == -8'(KMAX) || metric > best) begin
            best <= metric; best_k <= k2;
          end
          if (k2 == 8'(KMAX)) last2_d <= 1'b1;
        end else begin
          acc_re <= m_re; acc_im <= m_im;
        end
      end
      if (last2_d) begin
        done <= 1'b1;
        bin  <= best_k;
        freq <= 16'(32'(signed'(best_k)) <<< (16 - lg));
      end
    end
  end
endmodule
