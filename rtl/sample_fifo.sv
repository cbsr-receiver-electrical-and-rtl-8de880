// Processing queue (data-symbol queue and midamble queue).
//
// A synchronous first-in first-out memory of 2^AW complex samples. Samples
// wait here until the coding rate and the coarse frequency offset of their
// frame are known. rd_data is registered: it is valid the clock after rd_en.
// Writing into a full queue or reading an empty one is ignored (and flagged
// by an assertion in simulation). flush empties the queue.
module sample_fifo
  import cbsr_pkg::*;
#(
  parameter int AW = 12
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        flush,
  input  logic        wr_en,
  input  cplx_t       wr_data,
  input  logic        rd_en,
  output cplx_t       rd_data,
  output logic        empty,
  output logic        full,
  output logic [AW:0] count
);
  cplx_t       mem [2**AW];
  logic [AW:0] wp, rp;
  logic        do_wr, do_rd;

  assign count = wp - rp;
  assign empty = (count == '0);
  assign full  = (count == (AW+1)'(2**AW));
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  always_ff @(posedge clk) begin
    if (rst || flush) begin
      wp <= '0; rp <= '0;
    end else begin
      if (do_wr) wp <= wp + 1'b1;
      if (do_rd) rp <= rp + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp[AW-1:0]] <= wr_data;
    if (do_rd) rd_data <= mem[rp[AW-1:0]];
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) wr_en |-> !full);
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) rd_en |-> !empty);
endmodule
