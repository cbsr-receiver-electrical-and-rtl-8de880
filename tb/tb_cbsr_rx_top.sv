// End-to-end testbench of the receiver top, with default parameters.
//
// A transmitter model builds radio frames at the filtered sample rate and
// feeds each sample twice (the receiver's matched filter keeps every
// second one): T_AMB Zadoff-Chu sequence, unmodulated F_AMB part (256
// samples), then per subframe and per midamble period a 45-sample midamble
// (cyclic prefix plus the P_AMB sequence cyclically shifted by the coding-
// rate indicator) followed by 240 OQPSK data samples (2 samples per
// symbol, Q offset by one sample). Each subframe carries payload bits plus
// a CRC24A. A carrier offset of a whole DFT bin and a carrier phase are
// applied. The six turbo decoders are modelled as pass-through cores that
// return the hard decisions after a short busy time. Everything is set up
// over AXI4-Lite.
// Frames sent: rate 0 (good); rate 2 with one CRC-corrupted subframe;
// an invalid indicator (override to rate 0); test mode 2 with the PN9
// pattern and bit errors in one subframe; an EoT frame; a good frame after
// the flush, replayed while the decoders report busy (overrun); two
// preambles in continuous preamble mode.
// Checked: every delivered word against the transmitted payload, the word
// count, the evaluated indicators, the register counters (subframes,
// subframe errors, bits, bit errors), and that each mechanism happened at
// least once (a failure is counted for each one that never did).
`timescale 1ns/1ps
module tb_cbsr_rx_top;
  import cbsr_pkg::*;
  localparam int NDEC = 6;
  localparam int A = 6000;       // preamble / midamble amplitude
  localparam int AD = 3000;      // data amplitude per axis
  localparam int AM = 4000;      // midamble amplitude (about the data power)
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  logic signed [15:0] rx_i = 0, rx_q = 0;
  logic valid_in = 0;
  logic [31:0] data_out;
  logic valid_out;
  logic [11:0] s_axi_awaddr = 0, s_axi_araddr = 0;
  logic s_axi_awvalid = 0, s_axi_wvalid = 0, s_axi_bready = 0, s_axi_arvalid = 0, s_axi_rready = 0;
  logic s_axi_awready, s_axi_wready, s_axi_bvalid, s_axi_arready, s_axi_rvalid;
  logic [31:0] s_axi_wdata = 0, s_axi_rdata;
  logic [3:0] s_axi_wstrb = 4'hf;
  logic [1:0] s_axi_bresp, s_axi_rresp;
  logic [NDEC-1:0] dec_in_valid, dec_busy, dec_out_valid, dec_out_bit, dec_out_last;
  logic [15:0] dec_llr;
  logic dec_in_last, eot_flag, override_flag, frame_start, subframe_end, dec_overrun;
  logic [2:0] cri, sync_state;

  cbsr_rx_top dut (.*);

  // decoder busy = model busy, or forced high to provoke an overrun
  logic [NDEC-1:0] mdl_busy, force_busy;
  assign dec_busy = mdl_busy | force_busy;

  // ---------------- pass-through decoder models ----------------
  for (genvar m = 0; m < NDEC; m++) begin : g_dec
    bit bits[$];
    initial begin
      mdl_busy[m] = 0; dec_out_valid[m] = 0; dec_out_bit[m] = 0; dec_out_last[m] = 0;
      forever begin
        @(posedge clk);
        if (dec_in_valid[m]) begin
          mdl_busy[m] <= 1;
          bits.push_back(dec_llr[15]); bits.push_back(dec_llr[7]);
          if (dec_in_last) begin
            repeat (20) @(posedge clk);
            while (bits.size() > 0) begin
              dec_out_valid[m] <= 1; dec_out_bit[m] <= bits.pop_front();
              dec_out_last[m] <= (bits.size() == 0);
              @(posedge clk);
            end
            dec_out_valid[m] <= 0; dec_out_last[m] <= 0; mdl_busy[m] <= 0;
          end
        end
      end
    end
  end

  // ---------------- AXI4-Lite master ----------------
  task automatic axi_wr(input logic [11:0] a, input logic [31:0] d);
    @(posedge clk);
    s_axi_awvalid <= 1; s_axi_awaddr <= a; s_axi_wvalid <= 1; s_axi_wdata <= d;
    #1;
    while (s_axi_awvalid || s_axi_wvalid) begin
      bit ha, hw;
      @(negedge clk);
      ha = s_axi_awvalid && s_axi_awready; hw = s_axi_wvalid && s_axi_wready;
      @(posedge clk);
      if (ha) s_axi_awvalid <= 0;
      if (hw) s_axi_wvalid <= 0;
      #1;
    end
    s_axi_bready <= 1;
    do @(negedge clk); while (!s_axi_bvalid);
    @(posedge clk); s_axi_bready <= 0;
  endtask
  task automatic axi_rd(input logic [11:0] a, output logic [31:0] d);
    @(posedge clk); s_axi_arvalid <= 1; s_axi_araddr <= a;
    do @(negedge clk); while (!s_axi_arready);
    @(posedge clk); s_axi_arvalid <= 0; s_axi_rready <= 1;
    do @(negedge clk); while (!s_axi_rvalid);
    d = s_axi_rdata;
    @(posedge clk); s_axi_rready <= 0;
  endtask

  // ---------------- transmitter model ----------------
  real PI = 3.14159265358979;
  real tx_ph;                    // carrier phase (rad)
  real tx_dph;                   // carrier phase step per filtered sample
  int  n_in_samples;
  logic [31:0] exp_words[$];     // words expected at data_out
  int  exp_sf, exp_sf_err, exp_bits, exp_bit_err;

  task automatic put(input int re, input int im);
    real c, s; int r, q;
    c = $cos(tx_ph); s = $sin(tx_ph);
    r = $rtoi(re * c - im * s); q = $rtoi(re * s + im * c);
    repeat (2) begin
      @(posedge clk); valid_in <= 1; rx_i <= 16'(r); rx_q <= 16'(q);
    end
    tx_ph += tx_dph;
    n_in_samples++;
  endtask
  task automatic noise(input int n);
    repeat (n) begin
      @(posedge clk); valid_in <= 1;
      rx_i <= 16'($urandom_range(0, 100)) - 16'sd50; rx_q <= 16'($urandom_range(0, 100)) - 16'sd50;
    end
  endtask
  task automatic preamble();
    for (int k = 0; k < ZC_LEN; k++) put(ZC_TAMB_RE[k] * A / 127, ZC_TAMB_IM[k] * A / 127);
    for (int k = 0; k < 256; k++) put(A, 0);
  endtask
  task automatic midamble(input int shift);
    int q;
    for (int m = 0; m < P_AMB_LEN; m++) begin
      q = ((m - 7 * CRI_STEP + shift) % ZC_LEN + ZC_LEN) % ZC_LEN;
      put(ZC_PAMB_RE[q] * AM / 127, ZC_PAMB_IM[q] * AM / 127);
    end
  endtask
  function automatic logic [23:0] crc24(input bit b[$]);
    logic [23:0] r; r = '0;
    foreach (b[i]) r = {r[22:0], 1'b0} ^ ((r[23] ^ b[i]) ? 24'h864CFB : 24'h0);
    return r;
  endfunction

  // One frame. cri_tx: indicator carried by the midambles (-1 = invalid);
  // npm: midambles per subframe used by the transmitter; pn: PN9 payload;
  // bad_sf: subframe whose data gets nflip wrong bits (-1 = none);
  // deliver: CRC-correct subframes are expected at data_out.
  task automatic frame(input int cri_tx, input int npm, input int nsf, input bit pn,
                       input int bad_sf, input int nflip, input bit deliver);
    preamble();
    for (int sf = 0; sf < nsf; sf++) begin
      bit b[$]; logic [23:0] c; logic [8:0] lf; int nb, ni, nq; int iv[], qv[];
      nb = npm * DATA_BLK_LEN;
      lf = '1;
      for (int i = 0; i < nb - CRC_LEN; i++) begin
        if (pn) begin b.push_back(lf[8]); lf = {lf[7:0], lf[8] ^ lf[4]}; end
        // the last Q half-symbol of a block has a midamble as neighbour; it
        // repeats the previous Q bit so that the receive filter cannot flip it
        else if (i % DATA_BLK_LEN == DATA_BLK_LEN - 1) b.push_back(b[i - 2]);
        else b.push_back(1'($urandom));
      end
      c = crc24(b);
      for (int i = CRC_LEN - 1; i >= 0; i--) b.push_back(c[i]);
      exp_sf++;
      if (pn) exp_bits += nb - CRC_LEN;
      if (sf == bad_sf) begin
        exp_sf_err++;
        if (pn) exp_bit_err += nflip;
      end else if (deliver) begin
        logic [31:0] w; int k; k = 0; w = '0;
        for (int i = 0; i < nb - CRC_LEN; i++) begin
          w = {w[30:0], b[i]}; k++;
          if (k == 32) begin exp_words.push_back(w); k = 0; w = '0; end
        end
        if (k > 0) exp_words.push_back(w << (32 - k));
      end
      if (sf == bad_sf) for (int i = 0; i < nflip; i++) b[10 + 37 * i] = !b[10 + 37 * i];
      // OQPSK: symbol k carries bits 2k (I) and 2k+1 (Q); I on samples 2k,2k+1,
      // Q on samples 2k+1,2k+2
      iv = new[nb]; qv = new[nb];
      for (int j = 0; j < nb; j++) begin
        iv[j] = b[2 * (j / 2)] ? -AD : AD;
        qv[j] = (j == 0) ? (b[1] ? -AD : AD) : (b[2 * ((j - 1) / 2) + 1] ? -AD : AD);
      end
      for (int p = 0; p < npm; p++) begin
        midamble(cri_tx * CRI_STEP);
        for (int j = 0; j < DATA_BLK_LEN; j++) put(iv[p * DATA_BLK_LEN + j], qv[p * DATA_BLK_LEN + j]);
      end
    end
  endtask

  task automatic wait_idle();
    noise(3000);
    while (!(dut.fc_state == 3'd0 && !dut.cfo_have && dut.dq_empty && dut.mq_empty &&
             dut.dec_busy == '0)) noise(100);
    noise(500);
  endtask

  // ---------------- scoreboard and mechanism counters ----------------
  int n_words, n_word_err, n_detect, n_cfo, n_cri, n_override, n_eot, n_flush, n_sfend;
  int n_crc_ok, n_crc_bad, n_wait, n_cont, n_dec_used, n_famb, n_ovr;
  int cri_seen[$];
  logic [NDEC-1:0] dec_used;
  logic ovr_d, eot_d;
  bit cont_mode;
  always @(posedge clk) if (!rst) begin
    if (valid_out) begin
      n_words++;
      if (exp_words.size() == 0 || data_out != exp_words.pop_front()) n_word_err++;
    end
    if (frame_start) begin n_detect++; if (cont_mode) n_cont++; end
    if (dut.b_valid && dut.b_sync) n_famb++;
    if (dut.cfo_done) n_cfo++;
    if (dut.cri_raw_valid) begin n_cri++; cri_seen.push_back(int'(dut.cri_raw)); end
    if (override_flag && !ovr_d) n_override++;
    if (eot_flag && !eot_d) n_eot++;
    ovr_d <= override_flag; eot_d <= eot_flag;
    if (dut.flush_end) n_flush++;
    if (dec_overrun) n_ovr++;
    if (subframe_end) n_sfend++;
    if (dut.crc_done && dut.crc_ok) n_crc_ok++;
    if (dut.crc_done && !dut.crc_ok) n_crc_bad++;
    if (dut.fc_state == 3'd2) n_wait++;
    dec_used <= dec_used | dec_in_valid;
  end

  task automatic mech(input int n, input string name);
    $display("mechanism %-28s %0d", name, n);
    chk(n > 0, {"mechanism never happened: ", name});
  endtask

  initial begin
    logic [31:0] d;
    tx_ph = 0.7; tx_dph = 0; n_in_samples = 0;
    exp_sf = 0; exp_sf_err = 0; exp_bits = 0; exp_bit_err = 0;
    dec_used = '0; force_busy = '0; ovr_d = 0; eot_d = 0; cont_mode = 0;
    repeat (4) @(posedge clk); rst <= 0;
    axi_rd(12'h108, d); chk(d == 32'hCB5A_0016, "magic number");
    axi_wr(12'h100, 32'h0000_0024);   // data mode, roll-off 0.5, F_AMB 256
    axi_wr(12'h104, 32'd2);           // 2 subframes per frame
    axi_wr(12'h240, 32'd4000);        // detection threshold
    axi_wr(12'h114, 32'd1);           // enable
    axi_rd(12'h244, d); chk(d == 4000, "threshold read-back");
    noise(400);

    // 1: rate 0, no offset
    frame(0, 4, 2, 0, -1, 0, 1); wait_idle();
    // 2: rate 2, +1 bin offset, second subframe corrupted
    tx_dph = 2.0 * PI / 256.0;
    frame(2, 6, 2, 0, 1, 1, 1); wait_idle();
    // 3: invalid indicator -> rate 0, -1 bin offset; the shifted midambles
    // stick one sample out of the midamble, which spoils the first phase
    // estimate, so the first subframe is expected to fail its CRC
    tx_dph = -2.0 * PI / 256.0;
    frame(-1, 4, 2, 0, 0, 0, 1); wait_idle();
    // 4: test mode 2, PN9 payload, 3 bit errors in the first subframe
    tx_dph = 0;
    axi_wr(12'h100, 32'h0000_0026);
    frame(1, 5, 2, 1, 0, 3, 1); wait_idle();
    axi_wr(12'h100, 32'h0000_0024);
    // 5: EoT frame: preamble, one midamble with indicator 7, a little data
    preamble(); midamble(CRI_EOT * CRI_STEP);
    for (int j = 0; j < DATA_BLK_LEN; j++) put(AD, AD);
    noise(20000);
    // 6: good frame after the flush; the decoders report busy during its
    // replay, so both subframes raise an overrun (the models still decode)
    begin
      int target; target = n_sfend + 2;
      frame(0, 4, 2, 0, -1, 0, 1);
      force_busy = '1;
      while (n_sfend < target) noise(100);
      noise(100);
      force_busy = '0;
      wait_idle();
    end
    // 7: continuous preamble mode
    cont_mode = 1;
    axi_wr(12'h114, 32'd3);
    preamble(); noise(3000); preamble(); noise(20000);
    axi_wr(12'h114, 32'd1);
    cont_mode = 0;

    // register counters
    axi_rd(12'h11C, d); chk(d == 32'(exp_sf), $sformatf("subframe count %0d, expected %0d", d, exp_sf));
    axi_rd(12'h118, d); chk(d == 32'(exp_sf_err), $sformatf("subframe errors %0d, expected %0d", d, exp_sf_err));
    axi_rd(12'h120, d); chk(d == 32'(exp_bits), $sformatf("bit count %0d, expected %0d", d, exp_bits));
    axi_rd(12'h128, d); chk(d == 32'(exp_bit_err), $sformatf("bit errors %0d, expected %0d", d, exp_bit_err));
    axi_wr(12'h110, 32'd1);
    axi_rd(12'h11C, d); chk(d == 0, "counter reset");

    chk(n_word_err == 0, $sformatf("%0d wrong words", n_word_err));
    chk(exp_words.size() == 0, $sformatf("%0d words missing", exp_words.size()));
    chk(cri_seen.size() == 6 && cri_seen[0] == 0 && cri_seen[1] == 2 && cri_seen[2] >= 8 &&
        cri_seen[3] == 1 && cri_seen[4] == 7 && cri_seen[5] == 0,
        $sformatf("indicators %p", cri_seen));
    chk(n_ovr == 2, $sformatf("decoder overruns %0d, expected 2", n_ovr));
    n_dec_used = $countones(dec_used);
    mech(n_detect, "frame detection");
    mech(n_famb, "F_AMB read with sync");
    mech(n_cfo, "coarse frequency estimate");
    mech(n_cri, "coding-rate evaluation");
    mech(n_override, "invalid indicator override");
    mech(n_eot, "EoT detection");
    mech(n_flush, "flush after EoT");
    mech(n_sfend, "subframe end");
    mech(n_wait, "wait for fine estimate");
    mech(n_crc_ok, "CRC pass");
    mech(n_crc_bad, "CRC fail / rollback");
    mech(n_words, "words to DMA");
    mech(exp_bit_err, "bit errors counted");
    mech(n_dec_used == NDEC ? 1 : 0, "all decoders used in turn");
    mech(n_cont, "continuous preamble detection");
    mech(n_ovr, "decoder overrun (busy decoder)");
    chk(n_cont == 2, $sformatf("continuous preamble detections %0d", n_cont));
    $display("input samples %0d, words %0d", n_in_samples, n_words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
