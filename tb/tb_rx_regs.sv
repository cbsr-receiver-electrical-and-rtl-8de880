// Testbench of rx_regs: AXI4-Lite writes (address and data phases in
// either order, with delayed ready on the response channels) and reads of
// every register: read-back of the configuration registers, the magic
// number, the status inputs, the write-only counter-reset pulse, byte
// strobes, and zero for an unmapped address. Handshakes are sampled on
// the falling clock edge so that the testbench sees ready before the
// rising edge that completes the transfer.
`timescale 1ns/1ps
module tb_rx_regs;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask
  logic [11:0] s_axi_awaddr = 0, s_axi_araddr = 0;
  logic s_axi_awvalid = 0, s_axi_wvalid = 0, s_axi_bready = 0, s_axi_arvalid = 0, s_axi_rready = 0;
  logic s_axi_awready, s_axi_wready, s_axi_bvalid, s_axi_arready, s_axi_rvalid;
  logic [31:0] s_axi_wdata = 0, s_axi_rdata;
  logic [3:0] s_axi_wstrb = 4'hf;
  logic [1:0] s_axi_bresp, s_axi_rresp;
  logic [31:0] radio_config, num_rf_subframes, enable_reg;
  logic [15:0] sync_thr;
  logic cnt_reset;
  logic [31:0] subframe_count = 32'd1234, subframe_err_count = 32'd56;
  logic [63:0] bit_count = 64'h0000_0007_8000_0001, bit_err_count = 64'h0000_0002_0000_0003;
  rx_regs dut (.*);
  int n_rst;
  always @(posedge clk) if (!rst && cnt_reset) n_rst++;

  task automatic wr(input logic [11:0] a, input logic [31:0] d, input logic [3:0] st = 4'hf);
    bit order, sent2;
    order = 1'($urandom_range(0, 1)); sent2 = 0;
    @(posedge clk);
    if (order) begin s_axi_awvalid <= 1; s_axi_awaddr <= a; end
    else begin s_axi_wvalid <= 1; s_axi_wdata <= d; s_axi_wstrb <= st; end
    #1;
    while (s_axi_awvalid || s_axi_wvalid || !sent2) begin
      bit ha, hw;
      @(negedge clk);
      ha = s_axi_awvalid && s_axi_awready; hw = s_axi_wvalid && s_axi_wready;
      @(posedge clk);
      if (ha) s_axi_awvalid <= 0;
      if (hw) s_axi_wvalid <= 0;
      if (!sent2) begin
        if (!order) begin s_axi_awvalid <= 1; s_axi_awaddr <= a; end
        else begin s_axi_wvalid <= 1; s_axi_wdata <= d; s_axi_wstrb <= st; end
        sent2 = 1;
      end
      #1;
    end
    while (!s_axi_bvalid) @(posedge clk);
    repeat (2) @(posedge clk);
    chk(s_axi_bvalid && s_axi_bresp == 2'b00, "write response held until ready");
    s_axi_bready <= 1; @(posedge clk); s_axi_bready <= 0;
  endtask
  task automatic rd(input logic [11:0] a, output logic [31:0] d);
    @(posedge clk); s_axi_arvalid <= 1; s_axi_araddr <= a;
    do @(negedge clk); while (!s_axi_arready);
    @(posedge clk); s_axi_arvalid <= 0;
    while (!s_axi_rvalid) @(posedge clk);
    repeat (2) @(posedge clk);
    d = s_axi_rdata; chk(s_axi_rvalid && s_axi_rresp == 0, "read response held");
    s_axi_rready <= 1; @(posedge clk); s_axi_rready <= 0;
  endtask
  initial begin
    logic [31:0] d;
    logic [11:0] rw_addr [9];
    rw_addr = '{12'h100, 12'h104, 12'h114, 12'h130, 12'h134, 12'h138, 12'h13C, 12'h140, 12'h100};
    n_rst = 0;
    repeat (2) @(posedge clk); rst <= 0;
    rd(12'h108, d); chk(d == 32'hCB5A_0016, "magic number");
    for (int i = 0; i < 8; i++) begin
      logic [31:0] v; v = $urandom;
      wr(rw_addr[i], v); rd(rw_addr[i], d);
      chk(d == v, $sformatf("read-back %h: %h vs %h", rw_addr[i], d, v));
    end
    wr(12'h100, 32'h0000_0035); chk(radio_config == 32'h35, "radio_config output");
    wr(12'h100, 32'hFFFF_FF00, 4'b0010); chk(radio_config == 32'h0000_FF35, "byte strobe");
    wr(12'h104, 32'd7); chk(num_rf_subframes == 7, "num subframes output");
    wr(12'h114, 32'd3); chk(enable_reg == 3, "enable output");
    wr(12'h240, 32'h0000_1F40); chk(sync_thr == 16'h1F40, "threshold output");
    rd(12'h244, d); chk(d == 32'h1F40, "threshold read-back");
    rd(12'h118, d); chk(d == 56, "subframe error count");
    rd(12'h11C, d); chk(d == 1234, "subframe count");
    rd(12'h120, d); chk(d == 32'h8000_0001, "bit count L");
    rd(12'h124, d); chk(d == 7, "bit count H");
    rd(12'h128, d); chk(d == 3, "bit err L");
    rd(12'h12C, d); chk(d == 2, "bit err H");
    rd(12'h3F0, d); chk(d == 0, "unmapped");
    wr(12'h110, 32'd1); chk(n_rst == 1, "counter reset pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
