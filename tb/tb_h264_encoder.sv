// tb_h264_encoder: end-to-end check of the H.264 encoder wrapper.
//
// The testbench programs width 64, height 32 and the frame rate over
// AXI4-Lite, enables the wrapper with a restart, and streams three raw
// frames in (256-bit YUYV beats) while a behavioural core model consumes
// the macroblock words and returns bytes.  It checks the number of luma
// and chroma words the core receives (64 and 32 per macroblock), the
// quantisation parameter, and the output byte stream: per frame the
// 22-byte header (start code, SPS NAL type 0x67 with the size fields for
// 64x32, start code, PPS 68 CE 3C 80) followed by the core's bytes in
// order, TLAST on the last byte only.  The sink applies back-pressure.
//
// Origin: the expected values are computed here independently of the RTL,
// from the behaviour the original design specifies; the stimulus sizes are
// this testbench's own choice.
module tb_h264_encoder;
  import vc_pkg::*;
  localparam int TDATA_W = 256, MAX_W = 64, W = 64, H = 32, BPL = W / 8;
  localparam int NMB = (W / 16) * (H / 16);
  logic clk = 0, clk2 = 1, rst_n = 0;
  logic [7:0]  awaddr = 0, araddr = 0;
  logic        awvalid = 0, wvalid = 0, bready = 0, arvalid = 0, rready = 0;
  logic [63:0] wdata = 0; logic [7:0] wstrb = 0;
  logic        awready, wready, bvalid, arready, rvalid;
  logic [1:0]  bresp, rresp; logic [63:0] rdata;
  logic [TDATA_W-1:0] tdata = 0; logic tvalid = 0, tready, tuser = 0, tlast = 0;
  logic [7:0] m_tdata; logic m_tvalid, m_tready = 0, m_tlast;
  logic newslice, newline, y_strobe, uv_strobe, y_ready, uv_ready, align_valid, xbuffer_done;
  logic [5:0] qp; logic [31:0] y_data, uv_data;
  logic [7:0] tob_byte; logic tob_strobe, tob_done;
  logic enable, tx_overflow;
  enc_main_state_e mstate; enc_comp_state_e ystate, uvstate; tx_state_e txstate;
  int checks = 0, failures = 0;
  logic [7:0] got [$];
  logic       got_last [$];

  always #10 clk = ~clk;
  always #5 clk2 = ~clk2;

  h264_encoder #(.TDATA_W(TDATA_W), .MAX_W(MAX_W)) dut (
    .clk, .clk2, .rst_n,
    .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready),
    .s_axil_wdata(wdata), .s_axil_wstrb(wstrb), .s_axil_wvalid(wvalid),
    .s_axil_wready(wready), .s_axil_bresp(bresp), .s_axil_bvalid(bvalid),
    .s_axil_bready(bready), .s_axil_araddr(araddr), .s_axil_arvalid(arvalid),
    .s_axil_arready(arready), .s_axil_rdata(rdata), .s_axil_rresp(rresp),
    .s_axil_rvalid(rvalid), .s_axil_rready(rready),
    .s_axis_tdata(tdata), .s_axis_tvalid(tvalid), .s_axis_tready(tready),
    .s_axis_tuser(tuser), .s_axis_tlast(tlast),
    .m_axis_tdata(m_tdata), .m_axis_tvalid(m_tvalid), .m_axis_tready(m_tready),
    .m_axis_tlast(m_tlast),
    .core_newslice(newslice), .core_newline(newline), .core_qp(qp),
    .core_intra4x4_strobei(y_strobe), .core_intra4x4_datai(y_data),
    .core_intra4x4_readyi(y_ready), .core_intra8x8cc_strobei(uv_strobe),
    .core_intra8x8cc_datai(uv_data), .core_intra8x8cc_readyi(uv_ready),
    .core_align_valid(align_valid), .core_xbuffer_done(xbuffer_done),
    .core_tobytes_byte(tob_byte), .core_tobytes_strobe(tob_strobe),
    .core_tobytes_done(tob_done),
    .o_enable(enable), .o_tx_overflow(tx_overflow), .o_main_state(mstate),
    .o_y_state(ystate), .o_uv_state(uvstate), .o_tx_state(txstate));

  h264_core_model #(.READY_PCT(60)) u_core (
    .clk, .clk2, .rst_n, .newslice, .newline, .qp,
    .intra4x4_strobei(y_strobe), .intra4x4_datai(y_data), .intra4x4_readyi(y_ready),
    .intra8x8cc_strobei(uv_strobe), .intra8x8cc_datai(uv_data),
    .intra8x8cc_readyi(uv_ready), .align_valid, .xbuffer_done,
    .tobytes_byte(tob_byte), .tobytes_strobe(tob_strobe), .tobytes_done(tob_done));

  always @(negedge clk) m_tready <= ($urandom % 100) >= 30;
  always_ff @(posedge clk) if (rst_n && m_tvalid && m_tready) begin
    got.push_back(m_tdata);
    got_last.push_back(m_tlast);
  end

  initial begin
    repeat (400000) @(posedge clk);
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

  task automatic expect_eq(longint got_v, longint e, string what);
    checks++;
    if (got_v != e) begin failures++; $display("FAIL %s: %0d expected %0d", what, got_v, e); end
  endtask

  task automatic send_frame(int f);
    for (int y = 0; y < H; y++)
      for (int j = 0; j < BPL; j++) begin
        @(negedge clk);
        while (($urandom % 100) < 20) @(negedge clk);
        for (int k = 0; k < TDATA_W / 32; k++) tdata[32*k +: 32] = 32'($urandom);
        tuser = (y == 0 && j == 0); tlast = (j == BPL - 1); tvalid = 1;
        do @(posedge clk); while (!tready);
        #1 tvalid = 0; tuser = 0; tlast = 0;
      end
  endtask

  // SPS for 64x32: ue(3) = 00100, ue(1) = 010
  localparam logic [7:0] HDR [22] = '{
    8'h00, 8'h00, 8'h00, 8'h01,
    8'h67, 8'h42, 8'h00, 8'h3C, 8'hF8, 8'h8B, 8'h20, 8'h00, 8'h00, 8'h00,
    8'h00, 8'h00, 8'h00, 8'h01, 8'h68, 8'hCE, 8'h3C, 8'h80};

  initial begin
    int pos, bad, nbytes_core, frames_seen;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wr(ENC_HRES, W);
    wr(ENC_VRES, H);
    wr(ENC_FPS, 60);
    wr(ENC_CTRL, 64'h3);
    expect_eq(enable, 1, "enabled");
    for (int f = 0; f < 3; f++) send_frame(f);
    wait (u_core.n_align == 3 && txstate == TX_IDLE && got.size() > 0 && got_last[got.size()-1]);
    repeat (50) @(posedge clk);
    expect_eq(u_core.n_y, 3 * NMB * 64, "luma words to the core");
    expect_eq(u_core.n_uv, 3 * NMB * 32, "chroma words to the core");
    expect_eq(u_core.n_newslice, 3, "one slice per frame");
    expect_eq(u_core.last_qp, 28, "quantisation parameter");
    expect_eq(tx_overflow, 0, "no FIFO overflow");
    // parse three frames: header + core bytes, TLAST on the last
    pos = 0; bad = 0; nbytes_core = 0; frames_seen = 0;
    for (int f = 0; f < 3; f++) begin
      for (int i = 0; i < 22; i++) begin
        if (pos >= got.size() || got[pos] != HDR[i] || got_last[pos]) bad++;
        pos++;
      end
      while (pos < got.size()) begin
        if (got[pos] != 8'(nbytes_core)) bad++;
        nbytes_core++;
        pos++;
        if (got_last[pos - 1]) begin frames_seen++; break; end
      end
    end
    expect_eq(bad, 0, "headers and core bytes");
    expect_eq(frames_seen, 3, "three frames with TLAST");
    expect_eq(pos, got.size(), "no bytes after the last frame");
    expect_eq(nbytes_core, u_core.n_bytes, "all core bytes forwarded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
