// Input buffer: circular sample memory between the matched filter and the
// rest of the receiver.
//
// Every valid filtered sample is written at the current write address, which
// then advances (modulo 2^AW). wr_addr tells the Sync Machine where the
// newest sample is; the Sync Machine reads back from any address. The read
// port is synchronous: rd_data is the sample at the address presented with
// rd_en one clock earlier. Depth (4096 samples) is this design's choice.
module input_buffer
  import cbsr_pkg::*;
#(
  parameter int AW = 12
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          wr_en,
  input  cplx_t         wr_data,
  output logic [AW-1:0] wr_addr,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output cplx_t         rd_data
);
  cplx_t mem [2**AW];

  always_ff @(posedge clk) begin
    if (rst) wr_addr <= '0;
    else if (wr_en) wr_addr <= wr_addr + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
