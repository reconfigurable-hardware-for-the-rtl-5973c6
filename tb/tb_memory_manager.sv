// tb_memory_manager: end-to-end check of the Memory Manager.
//
// The testbench programs the registers over AXI4-Lite (raw region, frame
// geometry, encoded region, enables, restart), streams raw frames in with
// random gaps, and checks that each frame comes back out of the video
// output in order with correct start-of-frame and end-of-line markers
// while one memory model serves both the write and read masters.  At the
// same time it sends encoded frames of assorted lengths and checks them in
// a second memory model at their slots, and reads the "last encoded frame"
// register.  It then sends a frame with an early line end and checks the
// status register over AXI4-Lite, and that a restart clears it.
//
// Origin: the expected values are computed here independently of the RTL,
// from the behaviour the original design specifies; the stimulus sizes are
// this testbench's own choice.
module tb_memory_manager;
  import vc_pkg::*;
  localparam int DATA_W = 64, ADDR_W = 64, BL = 8;
  localparam int WPL = 6, VRES = 4, NWF = WPL * VRES, FB = NWF * 8;
  localparam longint RAW_START = 64'h10000, RAW_SIZE = 3 * FB;
  localparam longint ENC_START = 64'h40000, SLOT = FB / 16, ENC_SIZE = 4 * SLOT;
  logic clk = 0, rst_n = 0;
  logic [7:0]  awaddr = 0, araddr = 0;
  logic        awvalid = 0, wvalid = 0, bready = 0, arvalid = 0, rready = 0;
  logic [63:0] wdata = 0; logic [7:0] wstrb = 0;
  logic        awready, wready, bvalid, arready, rvalid;
  logic [1:0]  bresp, rresp; logic [63:0] rdata;
  logic [DATA_W-1:0] vi_tdata = 0; logic vi_tvalid = 0, vi_tready, vi_tuser = 0, vi_tlast = 0;
  logic [DATA_W-1:0] vo_tdata; logic vo_tvalid, vo_tready = 0, vo_tuser, vo_tlast;
  logic [7:0] e_tdata = 0; logic e_tvalid = 0, e_tready, e_tlast = 0;
  // raw write / read / encoded write buses
  logic [ADDR_W-1:0] w_awaddr, r_araddr, e_awaddr;
  logic [7:0] w_awlen, r_arlen, e_awlen; logic [2:0] w_awsize, r_arsize, e_awsize;
  logic [1:0] w_awburst, r_arburst, e_awburst;
  logic w_awvalid, w_awready, w_wlast, w_wvalid, w_wready, w_bvalid, w_bready;
  logic [DATA_W-1:0] w_wdata, r_rdata, e_wdata; logic [DATA_W/8-1:0] w_wstrb, e_wstrb;
  logic [1:0] w_bresp, r_rresp, e_bresp, x_bresp, x_rresp;
  logic r_arvalid, r_arready, r_rlast, r_rvalid, r_rready;
  logic e_awvalid, e_awready, e_wlast, e_wvalid, e_wready, e_bvalid, e_bready;
  logic x_arready, x_rlast, x_rvalid; logic [DATA_W-1:0] x_rdata;
  logic [4:0] raw_status; logic enc_status;
  logic frame_written, frame_read, enc_frame_written, rectified;
  int checks = 0, failures = 0;
  int n_out = 0, n_bad = 0, widx = 0, exp_f = 0, n_read = 0, n_enc = 0;

  always #5 clk = ~clk;

  memory_manager #(.DATA_W(DATA_W), .ADDR_W(ADDR_W), .BURST_LEN(BL)) dut (
    .clk, .rst_n,
    .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready),
    .s_axil_wdata(wdata), .s_axil_wstrb(wstrb), .s_axil_wvalid(wvalid),
    .s_axil_wready(wready), .s_axil_bresp(bresp), .s_axil_bvalid(bvalid),
    .s_axil_bready(bready), .s_axil_araddr(araddr), .s_axil_arvalid(arvalid),
    .s_axil_arready(arready), .s_axil_rdata(rdata), .s_axil_rresp(rresp),
    .s_axil_rvalid(rvalid), .s_axil_rready(rready),
    .s_axis_video_tdata(vi_tdata), .s_axis_video_tvalid(vi_tvalid),
    .s_axis_video_tready(vi_tready), .s_axis_video_tuser(vi_tuser),
    .s_axis_video_tlast(vi_tlast),
    .m_axis_video_tdata(vo_tdata), .m_axis_video_tvalid(vo_tvalid),
    .m_axis_video_tready(vo_tready), .m_axis_video_tuser(vo_tuser),
    .m_axis_video_tlast(vo_tlast),
    .s_axis_enc_tdata(e_tdata), .s_axis_enc_tvalid(e_tvalid), .s_axis_enc_tready(e_tready),
    .s_axis_enc_tlast(e_tlast),
    .m_axi_s2mm_awaddr(w_awaddr), .m_axi_s2mm_awlen(w_awlen), .m_axi_s2mm_awsize(w_awsize),
    .m_axi_s2mm_awburst(w_awburst), .m_axi_s2mm_awvalid(w_awvalid),
    .m_axi_s2mm_awready(w_awready), .m_axi_s2mm_wdata(w_wdata), .m_axi_s2mm_wstrb(w_wstrb),
    .m_axi_s2mm_wlast(w_wlast), .m_axi_s2mm_wvalid(w_wvalid), .m_axi_s2mm_wready(w_wready),
    .m_axi_s2mm_bresp(w_bresp), .m_axi_s2mm_bvalid(w_bvalid), .m_axi_s2mm_bready(w_bready),
    .m_axi_mm2s_araddr(r_araddr), .m_axi_mm2s_arlen(r_arlen), .m_axi_mm2s_arsize(r_arsize),
    .m_axi_mm2s_arburst(r_arburst), .m_axi_mm2s_arvalid(r_arvalid),
    .m_axi_mm2s_arready(r_arready), .m_axi_mm2s_rdata(r_rdata), .m_axi_mm2s_rresp(r_rresp),
    .m_axi_mm2s_rlast(r_rlast), .m_axi_mm2s_rvalid(r_rvalid), .m_axi_mm2s_rready(r_rready),
    .m_axi_enc_awaddr(e_awaddr), .m_axi_enc_awlen(e_awlen), .m_axi_enc_awsize(e_awsize),
    .m_axi_enc_awburst(e_awburst), .m_axi_enc_awvalid(e_awvalid),
    .m_axi_enc_awready(e_awready), .m_axi_enc_wdata(e_wdata), .m_axi_enc_wstrb(e_wstrb),
    .m_axi_enc_wlast(e_wlast), .m_axi_enc_wvalid(e_wvalid), .m_axi_enc_wready(e_wready),
    .m_axi_enc_bresp(e_bresp), .m_axi_enc_bvalid(e_bvalid), .m_axi_enc_bready(e_bready),
    .o_raw_status(raw_status), .o_enc_status(enc_status), .o_frame_written(frame_written),
    .o_frame_read(frame_read), .o_enc_frame_written(enc_frame_written), .o_rectified(rectified));

  axi_mem_model #(.DATA_W(DATA_W), .ADDR_W(ADDR_W), .STALL(10)) u_raw_mem (
    .clk, .rst_n,
    .awaddr(w_awaddr), .awlen(w_awlen), .awvalid(w_awvalid), .awready(w_awready),
    .wdata(w_wdata), .wstrb(w_wstrb), .wlast(w_wlast), .wvalid(w_wvalid), .wready(w_wready),
    .bresp(w_bresp), .bvalid(w_bvalid), .bready(w_bready),
    .araddr(r_araddr), .arlen(r_arlen), .arvalid(r_arvalid), .arready(r_arready),
    .rdata(r_rdata), .rresp(r_rresp), .rlast(r_rlast), .rvalid(r_rvalid), .rready(r_rready));

  axi_mem_model #(.DATA_W(DATA_W), .ADDR_W(ADDR_W), .STALL(10)) u_enc_mem (
    .clk, .rst_n,
    .awaddr(e_awaddr), .awlen(e_awlen), .awvalid(e_awvalid), .awready(e_awready),
    .wdata(e_wdata), .wstrb(e_wstrb), .wlast(e_wlast), .wvalid(e_wvalid), .wready(e_wready),
    .bresp(e_bresp), .bvalid(e_bvalid), .bready(e_bready),
    .araddr('0), .arlen('0), .arvalid(1'b0), .arready(x_arready),
    .rdata(x_rdata), .rresp(x_rresp), .rlast(x_rlast), .rvalid(x_rvalid), .rready(1'b0));

  function automatic logic [63:0] pat(int f, int w);
    return {32'hBEEF0000 | 32'(f), 32'(w)};
  endfunction

  always @(negedge clk) vo_tready <= ($urandom % 100) >= 20;
  always_ff @(posedge clk) if (rst_n) begin
    if (vo_tvalid && vo_tready) begin
      n_out <= n_out + 1;
      if (vo_tdata != pat(exp_f, widx) || vo_tuser != (widx == 0) ||
          vo_tlast != (widx % WPL == WPL - 1)) n_bad <= n_bad + 1;
      if (widx == NWF - 1) begin widx <= 0; exp_f <= exp_f + 1; end
      else widx <= widx + 1;
    end
    if (frame_read) n_read <= n_read + 1;
    if (enc_frame_written) n_enc <= n_enc + 1;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [7:0] a, input logic [63:0] d);
    @(negedge clk);
    awaddr = a; awvalid = 1; wdata = d; wstrb = '1; wvalid = 1; bready = 1;
    do @(posedge clk); while (!awready);
    @(negedge clk);
    awvalid = 0; wvalid = 0;
    while (!bvalid) @(posedge clk);
    @(negedge clk);
    bready = 0;
  endtask

  task automatic rd(input logic [7:0] a, output logic [63:0] d);
    @(negedge clk);
    araddr = a; arvalid = 1; rready = 1;
    do @(posedge clk); while (!arready);
    @(negedge clk);
    arvalid = 0;
    while (!rvalid) @(posedge clk);
    d = rdata;
    @(negedge clk);
    rready = 0;
  endtask

  task automatic expect_eq(longint got, longint e, string what);
    checks++;
    if (got != e) begin failures++; $display("FAIL %s: %h expected %h", what, got, e); end
  endtask

  task automatic send_raw(int f, bit short_line = 0);
    for (int l = 0; l < VRES; l++)
      for (int c = 0; c < WPL; c++) begin
        @(negedge clk);
        while (($urandom % 100) < 70) @(negedge clk);
        vi_tdata = pat(f, l * WPL + c); vi_tuser = (l == 0 && c == 0);
        vi_tlast = (c == WPL - 1) || (short_line && l == 1 && c == 2);
        vi_tvalid = 1;
        @(posedge clk); #1 vi_tvalid = 0; vi_tuser = 0; vi_tlast = 0;
        if (short_line && l == 1 && c == 2) break;
      end
  endtask

  task automatic send_enc(int f, int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      while (($urandom % 100) < 50) @(negedge clk);
      e_tdata = 8'(f * 16 + i); e_tlast = (i == n - 1); e_tvalid = 1;
      @(posedge clk); #1 e_tvalid = 0; e_tlast = 0;
    end
  endtask

  logic [63:0] d;
  int enc_len[3] = '{5, 12, 9};
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wr(MM_RAW_START, RAW_START);
    wr(MM_RAW_SIZE, RAW_SIZE);
    wr(MM_HRES_BYTES, WPL * 8);
    wr(MM_VRES, VRES);
    wr(MM_ENC_START, ENC_START);
    wr(MM_ENC_SIZE, ENC_SIZE);
    wr(MM_RAW_CTRL, 64'h7);            // restart, write, read
    wr(MM_ENC_CTRL, 64'h3);            // restart, enable
    fork
      for (int f = 0; f < 5; f++) send_raw(f);
      foreach (enc_len[k]) send_enc(k, enc_len[k]);
    join
    repeat (1500) @(posedge clk);
    expect_eq(n_read, 5, "raw frames read back");
    expect_eq(n_out, 5 * NWF, "raw words streamed out");
    expect_eq(n_bad, 0, "raw words, SOF and EOL correct");
    expect_eq(n_enc, 3, "encoded frames written");
    for (int k = 0; k < 3; k++) begin
      int bad = 0;
      for (int i = 0; i < enc_len[k]; i++) begin
        logic [63:0] w;
        w = u_enc_mem.peek(ENC_START + k * SLOT + (i / 8) * 8);
        if (w[(i % 8) * 8 +: 8] != 8'(k * 16 + i)) bad++;
      end
      expect_eq(bad, 0, "encoded frame bytes in its slot");
    end
    rd(MM_ENC_LAST_ADDR, d);
    expect_eq(d, ENC_START + 2 * SLOT, "last encoded frame address");
    rd(MM_RAW_STATUS, d);
    expect_eq(d, 0, "no raw errors");
    // early end of line shows in the status register
    wr(MM_RAW_CTRL, 64'h2);            // keep writing, stop reading
    send_raw(9, 1);
    repeat (200) @(posedge clk);
    rd(MM_RAW_STATUS, d);
    expect_eq(d[1], 1, "EOL early in status register");
    wr(MM_RAW_CTRL, 64'h3);
    repeat (5) @(posedge clk);
    rd(MM_RAW_STATUS, d);
    expect_eq(d, 0, "restart clears status");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
