// AXI4-Lite control and status registers of the receiver IP core.
//
// The processor configures the receiver and reads its statistics through
// a 32-bit AXI4-Lite slave. The bus is in the receiver clock domain (the
// clock crossing sits in the AXI interconnect in front of it). One write and
// one read are handled at a time; every access answers OKAY, unmapped
// addresses read 0. Register map (byte offsets):
//   0x100 RADIO_CONFIG_REG   rw [1:0] transmission mode, [2] RRC roll-off
//                                select, [5:4] F_AMB length code
//   0x104 NUM_RF_SUBFRAMES_REG rw [7:0] subframes per radio frame
//   0x108 MAGIC_NUMBER       ro  identifies the core
//   0x110 RESET_CNTRS        wo  writing bit 0 = 1 clears the statistics
//   0x114 ENABLE_REG         rw  [0] receiver enable, [1] continuous
//                                preamble mode
//   0x118 SUBFRAME_ERR_COUNT_REG ro
//   0x11C SUBFRAME_COUNT_REG ro
//   0x120/0x124 BIT_COUNT_REG_L/_H ro,  0x128/0x12C BIT_ERR_COUNT_REG_L/_H ro
//   0x130 ZTEST_BIT_MASK, 0x134 ZTEST_FIXED_POINT, 0x138 ZTEST_REG32BIT,
//   0x13C/0x140 ZTEST_REG64BIT_L/_H  rw  bus test registers (read back only)
//   0x240 SYNC_THR_VAL_REG   wo [15:0] detection threshold
//   0x244 SYNC_THR_VAL_REG   ro  read-back of the threshold
// The register names and the offsets 0x108, 0x110, 0x114, 0x118, 0x240 and
// 0x244 follow the published interface; the remaining offsets, the bit
// fields and the magic number are this design's choices. Read data appears
// one clock after the address handshake.
module rx_regs #(
  parameter logic [31:0] MAGIC = 32'hCB5A_0016
) (
  input  logic        clk,
  input  logic        rst,
  // AXI4-Lite slave
  input  logic [11:0] s_axi_awaddr,
  input  logic        s_axi_awvalid,
  output logic        s_axi_awready,
  input  logic [31:0] s_axi_wdata,
  input  logic [3:0]  s_axi_wstrb,
  input  logic        s_axi_wvalid,
  output logic        s_axi_wready,
  output logic [1:0]  s_axi_bresp,
  output logic        s_axi_bvalid,
  input  logic        s_axi_bready,
  input  logic [11:0] s_axi_araddr,
  input  logic        s_axi_arvalid,
  output logic        s_axi_arready,
  output logic [31:0] s_axi_rdata,
  output logic [1:0]  s_axi_rresp,
  output logic        s_axi_rvalid,
  input  logic        s_axi_rready,
  // configuration
  output logic [31:0] radio_config,
  output logic [31:0] num_rf_subframes,
  output logic [31:0] enable_reg,
  output logic [15:0] sync_thr,
  output logic        cnt_reset,
  // status
  input  logic [31:0] subframe_count,
  input  logic [31:0] subframe_err_count,
  input  logic [63:0] bit_count,
  input  logic [63:0] bit_err_count
);
  logic [31:0] ztest_mask, ztest_fix, ztest32, ztest64_l, ztest64_h;
  logic [11:0] awaddr_q;
  logic        aw_have, w_have;
  logic [31:0] wdata_q;
  logic [3:0]  wstrb_q;

  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] nw,
                                        input logic [3:0] strb);
    for (int b = 0; b < 4; b++) if (strb[b]) old[8*b +: 8] = nw[8*b +: 8];
    return old;
  endfunction

  assign s_axi_awready = !aw_have && !s_axi_bvalid;
  assign s_axi_wready  = !w_have && !s_axi_bvalid;
  assign s_axi_bresp   = 2'b00;
  assign s_axi_rresp   = 2'b00;
  assign s_axi_arready = !s_axi_rvalid;

  always_ff @(posedge clk) begin
    if (rst) begin
      aw_have <= 1'b0; w_have <= 1'b0; awaddr_q <= '0; wdata_q <= '0; wstrb_q <= '0;
      s_axi_bvalid <= 1'b0; cnt_reset <= 1'b0;
      radio_config <= '0; num_rf_subframes <= 32'd1; enable_reg <= '0; sync_thr <= '0;
      ztest_mask <= '0; ztest_fix <= '0; ztest32 <= '0; ztest64_l <= '0; ztest64_h <= '0;
    end else begin
      cnt_reset <= 1'b0;
      if (s_axi_awvalid && s_axi_awready) begin aw_have <= 1'b1; awaddr_q <= s_axi_awaddr; end
      if (s_axi_wvalid && s_axi_wready) begin
        w_have <= 1'b1; wdata_q <= s_axi_wdata; wstrb_q <= s_axi_wstrb;
      end
      if (aw_have && w_have) begin
        aw_have <= 1'b0; w_have <= 1'b0; s_axi_bvalid <= 1'b1;
        unique case (awaddr_q)
          12'h100: radio_config     <= merge(radio_config, wdata_q, wstrb_q);
          12'h104: num_rf_subframes <= merge(num_rf_subframes, wdata_q, wstrb_q);
          12'h110: cnt_reset        <= wstrb_q[0] && wdata_q[0];
          12'h114: enable_reg       <= merge(enable_reg, wdata_q, wstrb_q);
          12'h130: ztest_mask       <= merge(ztest_mask, wdata_q, wstrb_q);
          12'h134: ztest_fix        <= merge(ztest_fix, wdata_q, wstrb_q);
          12'h138: ztest32          <= merge(ztest32, wdata_q, wstrb_q);
          12'h13C: ztest64_l        <= merge(ztest64_l, wdata_q, wstrb_q);
          12'h140: ztest64_h        <= merge(ztest64_h, wdata_q, wstrb_q);
          12'h240: sync_thr         <= 16'(merge({16'h0, sync_thr}, wdata_q, wstrb_q));
          default: ;
        endcase
      end
      if (s_axi_bvalid && s_axi_bready) s_axi_bvalid <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      s_axi_rvalid <= 1'b0; s_axi_rdata <= '0;
    end else begin
      if (s_axi_arvalid && s_axi_arready) begin
        s_axi_rvalid <= 1'b1;
        unique case (s_axi_araddr)
          12'h100: s_axi_rdata <= radio_config;
          12'h104: s_axi_rdata <= num_rf_subframes;
          12'h108: s_axi_rdata <= MAGIC;
          12'h114: s_axi_rdata <= enable_reg;
          12'h118: s_axi_rdata <= subframe_err_count;
          12'h11C: s_axi_rdata <= subframe_count;
          12'h120: s_axi_rdata <= bit_count[31:0];
          12'h124: s_axi_rdata <= bit_count[63:32];
          12'h128: s_axi_rdata <= bit_err_count[31:0];
          12'h12C: s_axi_rdata <= bit_err_count[63:32];
          12'h130: s_axi_rdata <= ztest_mask;
          12'h134: s_axi_rdata <= ztest_fix;
          12'h138: s_axi_rdata <= ztest32;
          12'h13C: s_axi_rdata <= ztest64_l;
          12'h140: s_axi_rdata <= ztest64_h;
          12'h244: s_axi_rdata <= {16'h0, sync_thr};
          default: s_axi_rdata <= '0;
        endcase
      end else if (s_axi_rvalid && s_axi_rready) begin
        s_axi_rvalid <= 1'b0;
      end
    end
  end

  a_bresp_hold: assert property (@(posedge clk) disable iff (rst)
                                 s_axi_bvalid && !s_axi_bready |=> s_axi_bvalid);
  a_rresp_hold: assert property (@(posedge clk) disable iff (rst)
                                 s_axi_rvalid && !s_axi_rready |=> s_axi_rvalid && $stable(s_axi_rdata));
endmodule
