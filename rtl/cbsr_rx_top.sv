// CBSR receiver IP core: the physical-layer receiver of the C-band CubeSat
// ground station, between the AD9361 sample interface and the DMA to the
// processor.
//
// Datapath (all in the receiver clock domain):
//   rx_i/rx_q -> matched filter -> input buffer
//                      \-> time synchronisation (T_AMB correlator, Sync Machine)
//   buffer read-out:  F_AMB part (sync)  -> coarse frequency estimator
//                     first midamble     -> midamble filter -> CRI evaluation
//                                           -> EoT detector / CRI verifier
//                     whole frame        -> RxWriteControl -> data / midamble queues
//   replay (RxFrameControl): queues -> coarse frequency correction
//                     midambles -> midamble filter -> fine phase/frequency estimate
//                     data      -> fine correction -> OQPSK demodulator
//   -> bank of NDEC turbo decoders (external, ports brought out)
//   -> CRC check -> data packing -> data_out/valid_out (32-bit words to DMA)
// The AXI4-Lite register block configures it and returns the statistics
// (its response codes are always OKAY).
//
// The coding rate sets the number of midambles per subframe and hence the
// frame length, so the Sync Machine keeps reading the buffer until the rate
// of the frame is known. The stored frame is replayed only once both the
// coarse frequency offset and the coding rate are known. An EoT frame
// (coding-rate indicator 7) stops detection and writing; the part of it
// already queued is dropped and detection resumes after that flush. An
// invalid indicator makes the frame use rate 0.
// Some outputs of the sub-blocks are not used here and stay unconnected on
// purpose: the coarse phase at the detection peak (sel_phase; the phase is
// re-estimated on every midamble), the metric and DFT bin (debug values),
// the phase of the CRI midamble filter, queue full/count (the queues are
// sized for the largest frame), the write-control and first-midamble state
// flags, the hard decisions of the demodulator, the decoder index and the
// packer overflow flag, and the unused register bits.
// Ports are plain signals; the decoder cores connect through the dec_*
// ports. The structure follows the published block structure of the
// receiver; the glue between blocks (flags, pipeline alignment) is this
// design's own.
module cbsr_rx_top
  import cbsr_pkg::*;
#(
  parameter int NDEC     = 6,
  parameter int BUF_AW   = 12,
  parameter int QUEUE_AW = 12,
  parameter int KMAX     = 16,
  parameter int CRI_IDX_REF = P_AMB_LEN - 2
) (
  input  logic              clk,
  input  logic              rst,
  // AD9361 samples
  input  logic signed [15:0] rx_i,
  input  logic signed [15:0] rx_q,
  input  logic              valid_in,
  // decoded data to the DMA
  output logic [31:0]       data_out,
  output logic              valid_out,
  // AXI4-Lite
  input  logic [11:0]       s_axi_awaddr,
  input  logic              s_axi_awvalid,
  output logic              s_axi_awready,
  input  logic [31:0]       s_axi_wdata,
  input  logic [3:0]        s_axi_wstrb,
  input  logic              s_axi_wvalid,
  output logic              s_axi_wready,
  output logic [1:0]        s_axi_bresp,
  output logic              s_axi_bvalid,
  input  logic              s_axi_bready,
  input  logic [11:0]       s_axi_araddr,
  input  logic              s_axi_arvalid,
  output logic              s_axi_arready,
  output logic [31:0]       s_axi_rdata,
  output logic [1:0]        s_axi_rresp,
  output logic              s_axi_rvalid,
  input  logic              s_axi_rready,
  // turbo decoders
  output logic [NDEC-1:0]   dec_in_valid,
  output logic [15:0]       dec_llr,
  output logic              dec_in_last,
  input  logic [NDEC-1:0]   dec_busy,
  input  logic [NDEC-1:0]   dec_out_valid,
  input  logic [NDEC-1:0]   dec_out_bit,
  input  logic [NDEC-1:0]   dec_out_last,
  // status
  output logic              eot_flag,
  output logic              override_flag,
  output logic [2:0]        cri,
  output logic [2:0]        sync_state,
  output logic              frame_start,
  output logic              subframe_end,
  output logic              dec_overrun
);
  // ---------------- registers ----------------
  logic [31:0] radio_config, num_rf_subframes, enable_reg;
  logic [15:0] sync_thr;
  logic        cnt_reset;
  logic [31:0] subframe_count, subframe_err_count;
  logic [63:0] bit_count, bit_err_count;

  rx_regs u_regs (
    .clk, .rst, .s_axi_awaddr, .s_axi_awvalid, .s_axi_awready, .s_axi_wdata, .s_axi_wstrb,
    .s_axi_wvalid, .s_axi_wready, .s_axi_bresp, .s_axi_bvalid, .s_axi_bready,
    .s_axi_araddr, .s_axi_arvalid, .s_axi_arready, .s_axi_rdata, .s_axi_rresp,
    .s_axi_rvalid, .s_axi_rready, .radio_config, .num_rf_subframes, .enable_reg,
    .sync_thr, .cnt_reset, .subframe_count, .subframe_err_count, .bit_count, .bit_err_count);

  logic       rx_enable;
  logic [1:0] mode;
  logic [1:0] famb_code;
  logic [7:0] num_sf;
  logic [4:0] num_pm;
  assign rx_enable = enable_reg[0];
  assign mode      = radio_config[1:0];
  assign famb_code = radio_config[5:4];
  assign num_sf    = num_rf_subframes[7:0];
  assign num_pm    = num_phase_midamble(cri);

  // ---------------- matched filter and input buffer ----------------
  logic  f_valid;
  cplx_t f_data;
  matched_filter u_mf (.clk, .rst, .in_valid(valid_in && rx_enable), .in_data({rx_i, rx_q}),
                       .rolloff_sel(radio_config[2]), .out_valid(f_valid), .out_data(f_data));

  logic [BUF_AW-1:0] wr_addr, rd_addr;
  logic              rd_en;
  cplx_t             b_data;
  input_buffer #(.AW(BUF_AW)) u_buf (.clk, .rst, .wr_en(f_valid), .wr_data(f_data), .wr_addr,
                                     .rd_en, .rd_addr, .rd_data(b_data));

  // ---------------- time synchronisation ----------------
  logic        b_valid, b_sync, cri_ready;
  logic [15:0] sel_phase;
  logic [17:0] corr_mag;
  logic [23:0] read_num;
  assign read_num = 24'(num_sf) * 24'(num_pm) * 24'(P_AMB_LEN + DATA_BLK_LEN);

  time_sync #(.AW(BUF_AW)) u_ts (
    .clk, .rst, .in_valid(f_valid), .in_data(f_data), .wr_addr, .th(sync_thr),
    .fa_len(9'(f_amb_len(famb_code))), .cri_ready, .read_num_samples(read_num),
    .cont_preamble_en(enable_reg[1]), .enabled(rx_enable && !eot_flag), .rd_en,
    .read_addr(rd_addr), .valid(b_valid), .sync(b_sync), .sel_phase, .state(sync_state),
    .frame_start, .corr_mag);

  // ---------------- coarse frequency offset ----------------
  logic        cfo_done;
  logic [15:0] cfo_freq;
  logic signed [7:0] cfo_bin;
  coarse_cfo #(.KMAX(KMAX)) u_cfo (
    .clk, .rst, .frame_start, .in_valid(b_valid), .sync(b_sync), .in_data(b_data),
    .f_amb_code(famb_code), .done(cfo_done), .freq(cfo_freq), .bin(cfo_bin));

  // ---------------- coding-rate evaluation ----------------
  logic        after_sync, cri_start;
  logic        m1_valid;
  logic [17:0] m1_mag;
  logic [15:0] m1_phase;
  logic [3:0]  cri_raw;
  logic        cri_raw_valid;

  // the first sample after the F_AMB part opens the CRI window
  assign cri_start = b_valid && !b_sync && after_sync;
  always_ff @(posedge clk) begin
    if (rst || frame_start) after_sync <= 1'b0;
    else if (b_valid) after_sync <= b_sync;
  end

  midamble_filter u_mfil_cri (.clk, .rst, .in_valid(b_valid && !b_sync), .in_data(b_data),
                              .out_valid(m1_valid), .mag(m1_mag), .phase(m1_phase));

  cri_eval #(.IDX_REF(CRI_IDX_REF)) u_cri (
    .clk, .rst, .start(cri_start), .in_valid(m1_valid), .mag(m1_mag),
    .cri(cri_raw), .cri_valid(cri_raw_valid));

  logic flush_end, frame_done;
  cri_checker u_chk (
    .clk, .rst, .cri_val(cri_raw), .cri_valid(cri_raw_valid), .flush_end,
    .override_end(frame_done), .rx_enable, .override_flag, .eot_flag, .cri_out(cri));

  always_ff @(posedge clk) begin
    if (rst) cri_ready <= 1'b0;
    else     cri_ready <= cri_raw_valid;
  end

  // ---------------- frame disassembly into the queues ----------------
  logic       wr_data_q, wr_mid_q;
  logic [1:0] wc_state;
  rx_write_control u_wc (
    .clk, .rst, .start(frame_start), .write_en(b_valid && !b_sync), .num_phase_midamble(num_pm),
    .num_subframes(num_sf), .eot(eot_flag), .write_data(wr_data_q), .write_midamble(wr_mid_q),
    .outState(wc_state));

  logic  rd_dq, rd_mq, dq_empty, mq_empty, dq_full, mq_full, q_flush;
  cplx_t dq_data, mq_data;
  logic [QUEUE_AW:0] dq_count, mq_count;
  sample_fifo #(.AW(QUEUE_AW)) u_dq (.clk, .rst, .flush(q_flush), .wr_en(wr_data_q), .wr_data(b_data),
    .rd_en(rd_dq), .rd_data(dq_data), .empty(dq_empty), .full(dq_full), .count(dq_count));
  sample_fifo #(.AW(QUEUE_AW)) u_mq (.clk, .rst, .flush(q_flush), .wr_en(wr_mid_q), .wr_data(b_data),
    .rd_en(rd_mq), .rd_data(mq_data), .empty(mq_empty), .full(mq_full), .count(mq_count));

  // ---------------- replay control ----------------
  logic cfo_have, cri_have, process_en, est_done, first_mid;
  logic [2:0] fc_state;
  always_ff @(posedge clk) begin
    if (rst || frame_done || flush_end || frame_start) begin
      cfo_have <= 1'b0; cri_have <= 1'b0;
    end else begin
      if (cfo_done)  cfo_have <= 1'b1;
      if (cri_ready) cri_have <= 1'b1;
    end
  end
  assign process_en = cfo_have && cri_have && !eot_flag;
  // the part of an EoT frame already queued is never replayed: drop it once
  // the replay of any earlier frame is over
  assign q_flush    = eot_flag && fc_state == 3'd0;
  assign flush_end  = eot_flag && fc_state == 3'd0 && dq_empty && mq_empty && sync_state != 3'd3
                      && sync_state != 3'd4;

  logic read_buf;
  rx_frame_control u_fc (
    .clk, .rst, .process_en, .num_phase_midamble(num_pm), .num_subframes(num_sf),
    .mid_avail(!mq_empty), .data_avail(!dq_empty), .est_done, .d_sym_valid(rd_dq),
    .ph_sym_valid(rd_mq), .read_buf, .subframe_end, .frame_done, .first_mid,
    .out_state(fc_state));

  // subframe start / end tags travel with the samples
  logic sf_first;
  always_ff @(posedge clk) begin
    if (rst || (fc_state == 3'd0)) sf_first <= 1'b1;
    else if (rd_dq) sf_first <= subframe_end;
  end

  // stage 1: queue output
  logic  q_valid, q_mid, q_sof, q_last;
  cplx_t q_data;
  always_ff @(posedge clk) begin
    if (rst) begin
      q_valid <= 1'b0; q_mid <= 1'b0; q_sof <= 1'b0; q_last <= 1'b0;
    end else begin
      q_valid <= read_buf; q_mid <= rd_mq;
      q_sof   <= rd_dq && sf_first; q_last <= subframe_end;
    end
  end
  assign q_data = q_mid ? mq_data : dq_data;

  // stage 2: coarse correction
  logic  c_valid, c_mid, c_sof, c_last;
  cplx_t c_data;
  nco_derotator u_coarse (.clk, .rst, .load(fc_state == 3'd0), .load_phase(16'd0),
                          .freq(cfo_freq), .in_valid(q_valid), .in_data(q_data),
                          .out_valid(c_valid), .out_data(c_data));
  always_ff @(posedge clk) begin
    if (rst) begin c_mid <= 1'b0; c_sof <= 1'b0; c_last <= 1'b0; end
    else begin c_mid <= q_mid; c_sof <= q_sof; c_last <= q_last; end
  end

  // fine estimation on the midambles
  logic        m2_valid;
  logic [17:0] m2_mag;
  logic [15:0] m2_phase, phase_est, freq_est;
  midamble_filter u_mfil_fine (.clk, .rst, .in_valid(c_valid && c_mid), .in_data(c_data),
                               .out_valid(m2_valid), .mag(m2_mag), .phase(m2_phase));
  fine_offset_est u_fine (.clk, .rst, .start(fc_state == 3'd0), .in_valid(m2_valid),
                          .mag(m2_mag), .phase(m2_phase), .est_done, .phase_est, .freq_est);

  // stage 3: fine correction of the data
  logic  d_valid, d_sof, d_last;
  cplx_t d_data;
  nco_derotator u_fine_rot (.clk, .rst, .load(est_done), .load_phase(phase_est), .freq(freq_est),
                            .in_valid(c_valid && !c_mid), .in_data(c_data),
                            .out_valid(d_valid), .out_data(d_data));
  always_ff @(posedge clk) begin
    if (rst) begin d_sof <= 1'b0; d_last <= 1'b0; end
    else begin d_sof <= c_sof; d_last <= c_last; end
  end

  // ---------------- demodulation, decoding, packing ----------------
  logic              s_valid, s_last;
  logic signed [7:0] llr_i, llr_q;
  logic [1:0]        hard;
  oqpsk_demod u_dem (.clk, .rst, .sof(d_sof), .in_valid(d_valid), .in_data(d_data),
                     .in_last(d_last), .out_valid(s_valid), .llr_i, .llr_q, .hard,
                     .out_last(s_last));

  logic       bit_valid, bit_data, bit_last;
  logic [2:0] dec_sel;
  decoder_bank #(.NDEC(NDEC)) u_dec (
    .clk, .rst, .llr_valid(s_valid), .llr_i, .llr_q, .llr_last(s_last), .dec_in_valid,
    .dec_llr, .dec_in_last, .dec_busy, .dec_out_valid, .dec_out_bit, .dec_out_last,
    .bit_valid, .bit_data, .bit_last, .sel(dec_sel), .overrun(dec_overrun));

  logic crc_done, crc_ok;
  crc_check u_crc (.clk, .rst, .in_valid(bit_valid), .in_bit(bit_data), .in_last(bit_last),
                   .done(crc_done), .ok(crc_ok));

  logic pack_overflow;
  data_packer u_pack (
    .clk, .rst, .mode, .cnt_reset, .bit_valid, .bit_data, .bit_last, .crc_done, .crc_ok,
    .data_out, .valid_out, .subframe_count, .subframe_err_count, .bit_count, .bit_err_count,
    .overflow(pack_overflow));
endmodule
