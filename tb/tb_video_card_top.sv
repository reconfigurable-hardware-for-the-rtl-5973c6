// tb_video_card_top: end-to-end test of the video card datapath at the
// design's default parameters (256-bit streams and memory words, 256-beat
// bursts, one frame of delay, encoder buffers for 8192-pixel lines).
//
// Frames of 128x32 pixels (512 bytes per line, two bursts per frame) are
// generated with a known pattern and streamed in.  One memory model serves
// the raw write and read masters, another the encoded write master, and a
// behavioural model stands in for the H.264 core.  The testbench checks that
// every frame read back leaves the card unchanged, that each encoded frame
// lands in its slot starting with the stream header, and then drives the
// card through its error and control paths.  Input at the 8k60 duty cycle
// (88.5% of cycles) must be written without loss, and a frame must stream
// out at close to one beat per cycle (cycle count checked).  Each mechanism
// is counted and the test fails if one never happened: frames written,
// read and encoded, double-buffered bursts, raw and encoded region
// rotation, video output back-pressure, encoder back-pressure on the read
// stream (both band halves full), encoder switched off while video keeps
// flowing (mode switch), EOL early, EOL late, SOF error, start address
// rectification, unwritten data under memory congestion, halt on error,
// and restart recovery.
//
// Origin: the expected values are computed here independently of the RTL,
// from the behaviour the original design specifies; the stimulus sizes are
// this testbench's own choice.
module tb_video_card_top;
  import vc_pkg::*;
  localparam int W = 128, H = 32, WPL = W * 4 / 32, NWF = WPL * H;
  localparam longint FB = W * 4 * H;
  localparam longint RAW_START = 64'h0100_0000, RAW_SIZE = 3 * FB;
  localparam longint SLOT = FB / 16, ENC_START = 64'h0800_0000, ENC_SIZE = 4 * SLOT;

  logic clk = 0, clk2 = 1, rst_n = 0;
  logic [7:0]          mm_axil_awaddr = 0;
  logic                mm_axil_awvalid = 0;
  logic                mm_axil_awready;
  logic [63:0]         mm_axil_wdata = 0;
  logic [7:0]          mm_axil_wstrb = 0;
  logic                mm_axil_wvalid = 0;
  logic                mm_axil_wready;
  logic [1:0]          mm_axil_bresp;
  logic                mm_axil_bvalid;
  logic                mm_axil_bready = 0;
  logic [7:0]          mm_axil_araddr = 0;
  logic                mm_axil_arvalid = 0;
  logic                mm_axil_arready;
  logic [63:0]         mm_axil_rdata;
  logic [1:0]          mm_axil_rresp;
  logic                mm_axil_rvalid;
  logic                mm_axil_rready = 0;
  logic [7:0]          enc_axil_awaddr = 0;
  logic                enc_axil_awvalid = 0;
  logic                enc_axil_awready;
  logic [63:0]         enc_axil_wdata = 0;
  logic [7:0]          enc_axil_wstrb = 0;
  logic                enc_axil_wvalid = 0;
  logic                enc_axil_wready;
  logic [1:0]          enc_axil_bresp;
  logic                enc_axil_bvalid;
  logic                enc_axil_bready = 0;
  logic [7:0]          enc_axil_araddr = 0;
  logic                enc_axil_arvalid = 0;
  logic                enc_axil_arready;
  logic [63:0]         enc_axil_rdata;
  logic [1:0]          enc_axil_rresp;
  logic                enc_axil_rvalid;
  logic                enc_axil_rready = 0;
  logic [256-1:0]      s_axis_video_tdata = 0;
  logic                s_axis_video_tvalid = 0;
  logic                s_axis_video_tready;
  logic                s_axis_video_tuser = 0;
  logic                s_axis_video_tlast = 0;
  logic [256-1:0]      m_axis_video_tdata;
  logic                m_axis_video_tvalid;
  logic                m_axis_video_tready = 0;
  logic                m_axis_video_tuser;
  logic                m_axis_video_tlast;
  logic [64-1:0]       m_axi_s2mm_awaddr;
  logic [7:0]          m_axi_s2mm_awlen;
  logic [2:0]          m_axi_s2mm_awsize;
  logic [1:0]          m_axi_s2mm_awburst;
  logic                m_axi_s2mm_awvalid;
  logic                m_axi_s2mm_awready = 0;
  logic [256-1:0]      m_axi_s2mm_wdata;
  logic [256/8-1:0]    m_axi_s2mm_wstrb;
  logic                m_axi_s2mm_wlast;
  logic                m_axi_s2mm_wvalid;
  logic                m_axi_s2mm_wready = 0;
  logic [1:0]          m_axi_s2mm_bresp = 0;
  logic                m_axi_s2mm_bvalid = 0;
  logic                m_axi_s2mm_bready;
  logic [64-1:0]       m_axi_mm2s_araddr;
  logic [7:0]          m_axi_mm2s_arlen;
  logic [2:0]          m_axi_mm2s_arsize;
  logic [1:0]          m_axi_mm2s_arburst;
  logic                m_axi_mm2s_arvalid;
  logic                m_axi_mm2s_arready = 0;
  logic [256-1:0]      m_axi_mm2s_rdata = 0;
  logic [1:0]          m_axi_mm2s_rresp = 0;
  logic                m_axi_mm2s_rlast = 0;
  logic                m_axi_mm2s_rvalid = 0;
  logic                m_axi_mm2s_rready;
  logic [64-1:0]       m_axi_enc_awaddr;
  logic [7:0]          m_axi_enc_awlen;
  logic [2:0]          m_axi_enc_awsize;
  logic [1:0]          m_axi_enc_awburst;
  logic                m_axi_enc_awvalid;
  logic                m_axi_enc_awready = 0;
  logic [256-1:0]      m_axi_enc_wdata;
  logic [256/8-1:0]    m_axi_enc_wstrb;
  logic                m_axi_enc_wlast;
  logic                m_axi_enc_wvalid;
  logic                m_axi_enc_wready = 0;
  logic [1:0]          m_axi_enc_bresp = 0;
  logic                m_axi_enc_bvalid = 0;
  logic                m_axi_enc_bready;
  logic                core_newslice;
  logic                core_newline;
  logic [5:0]          core_qp;
  logic                core_intra4x4_strobei;
  logic [31:0]         core_intra4x4_datai;
  logic                core_intra4x4_readyi = 0;
  logic                core_intra8x8cc_strobei;
  logic [31:0]         core_intra8x8cc_datai;
  logic                core_intra8x8cc_readyi = 0;
  logic                core_align_valid;
  logic                core_xbuffer_done = 0;
  logic [7:0]          core_tobytes_byte = 0;
  logic                core_tobytes_strobe = 0;
  logic                core_tobytes_done = 0;
  logic [4:0]          o_raw_status;
  logic                o_enc_status;
  logic                o_frame_written;
  logic                o_frame_read;
  logic                o_enc_frame_written;
  logic                o_rectified;
  logic                o_enc_tx_overflow;
  enc_main_state_e     o_enc_main_state;
  enc_comp_state_e     o_enc_y_state;
  enc_comp_state_e     o_enc_uv_state;
  tx_state_e           o_enc_tx_state;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;
  always #5 clk2 = ~clk2;

  video_card_top dut (.*);

  axi_mem_model #(.DATA_W(256), .ADDR_W(64), .STALL(10)) u_raw_mem (
    .clk, .rst_n,
    .awaddr(m_axi_s2mm_awaddr), .awlen(m_axi_s2mm_awlen), .awvalid(m_axi_s2mm_awvalid),
    .awready(m_axi_s2mm_awready), .wdata(m_axi_s2mm_wdata), .wstrb(m_axi_s2mm_wstrb),
    .wlast(m_axi_s2mm_wlast), .wvalid(m_axi_s2mm_wvalid), .wready(m_axi_s2mm_wready),
    .bresp(m_axi_s2mm_bresp), .bvalid(m_axi_s2mm_bvalid), .bready(m_axi_s2mm_bready),
    .araddr(m_axi_mm2s_araddr), .arlen(m_axi_mm2s_arlen), .arvalid(m_axi_mm2s_arvalid),
    .arready(m_axi_mm2s_arready), .rdata(m_axi_mm2s_rdata), .rresp(m_axi_mm2s_rresp),
    .rlast(m_axi_mm2s_rlast), .rvalid(m_axi_mm2s_rvalid), .rready(m_axi_mm2s_rready));

  logic x_arready, x_rlast, x_rvalid; logic [255:0] x_rdata; logic [1:0] x_rresp;
  axi_mem_model #(.DATA_W(256), .ADDR_W(64), .STALL(10)) u_enc_mem (
    .clk, .rst_n,
    .awaddr(m_axi_enc_awaddr), .awlen(m_axi_enc_awlen), .awvalid(m_axi_enc_awvalid),
    .awready(m_axi_enc_awready), .wdata(m_axi_enc_wdata), .wstrb(m_axi_enc_wstrb),
    .wlast(m_axi_enc_wlast), .wvalid(m_axi_enc_wvalid), .wready(m_axi_enc_wready),
    .bresp(m_axi_enc_bresp), .bvalid(m_axi_enc_bvalid), .bready(m_axi_enc_bready),
    .araddr('0), .arlen('0), .arvalid(1'b0), .arready(x_arready), .rdata(x_rdata),
    .rresp(x_rresp), .rlast(x_rlast), .rvalid(x_rvalid), .rready(1'b0));

  h264_core_model #(.READY_PCT(60)) u_core (
    .clk, .clk2, .rst_n, .newslice(core_newslice), .newline(core_newline), .qp(core_qp),
    .intra4x4_strobei(core_intra4x4_strobei), .intra4x4_datai(core_intra4x4_datai),
    .intra4x4_readyi(core_intra4x4_readyi), .intra8x8cc_strobei(core_intra8x8cc_strobei),
    .intra8x8cc_datai(core_intra8x8cc_datai), .intra8x8cc_readyi(core_intra8x8cc_readyi),
    .align_valid(core_align_valid), .xbuffer_done(core_xbuffer_done),
    .tobytes_byte(core_tobytes_byte), .tobytes_strobe(core_tobytes_strobe),
    .tobytes_done(core_tobytes_done));

  // ---------------- pattern
  function automatic logic [255:0] pat(int f, int w);
    logic [255:0] d;
    for (int k = 0; k < 8; k++) d[32*k +: 32] = {8'(f), 8'(k), 16'(w)};
    return d;
  endfunction

  // ---------------- mechanism counters
  int n_enc_lo;
  int n_written, n_read, n_enc, n_bursts, n_raw_wrap, n_enc_wrap, n_out_stall,
      n_enc_bp, n_frames_no_enc, n_eol_early, n_eol_late, n_sof_err,
      n_rect, n_unwritten, n_halt, n_restart_ok;
  int sink_stall = 20;
  longint cyc = 0, sof_cyc = 0, frame_cycles = 0;
  bit check_out = 1;
  int out_f = 0, out_w = 0, out_bad = 0, out_frames = 0;
  longint raw_aw_seen = 0, enc_aw_seen = 0;

  always @(negedge clk) m_axis_video_tready <= ($urandom % 100) >= sink_stall;

  always_ff @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (m_axis_video_tvalid && m_axis_video_tready && m_axis_video_tuser) sof_cyc <= cyc;
    if (m_axis_video_tvalid && m_axis_video_tready && !m_axis_video_tuser && out_w == NWF - 1)
      frame_cycles <= cyc - sof_cyc + 1;
    if (o_frame_written) n_written <= n_written + 1;
    if (o_frame_read) n_read <= n_read + 1;
    if (o_enc_frame_written) n_enc <= n_enc + 1;
    if (o_rectified) n_rect <= n_rect + 1;
    if (m_axi_s2mm_awvalid && m_axi_s2mm_awready) begin
      n_bursts <= n_bursts + 1;
      if (m_axi_s2mm_awaddr == RAW_START && raw_aw_seen != 0) n_raw_wrap <= n_raw_wrap + 1;
      raw_aw_seen <= raw_aw_seen + 1;
    end
    if (m_axi_enc_awvalid && m_axi_enc_awready) begin
      if (m_axi_enc_awaddr == ENC_START && enc_aw_seen != 0) n_enc_wrap <= n_enc_wrap + 1;
      enc_aw_seen <= enc_aw_seen + 1;
    end
    if (rst_n && !dut.enc_tready && dut.enc_en) n_enc_lo <= n_enc_lo + 1;
    if (m_axis_video_tvalid && !m_axis_video_tready) n_out_stall <= n_out_stall + 1;
    if (dut.rd_tvalid && m_axis_video_tready && dut.enc_en && !dut.enc_tready)
      n_enc_bp <= n_enc_bp + 1;
    if (o_frame_read && !dut.enc_en) n_frames_no_enc <= n_frames_no_enc + 1;
    // output check: every frame read back equals one sent, in order
    if (m_axis_video_tvalid && m_axis_video_tready && check_out) begin
      if (m_axis_video_tuser) begin out_w <= 1; out_f <= int'(m_axis_video_tdata[31:24]); end
      else out_w <= out_w + 1;
      if (m_axis_video_tuser) begin
        if (m_axis_video_tdata != pat(int'(m_axis_video_tdata[31:24]), 0)) out_bad <= out_bad + 1;
        out_frames <= out_frames + 1;
      end else if (m_axis_video_tdata != pat(out_f, out_w)) out_bad <= out_bad + 1;
      if (m_axis_video_tlast != ((m_axis_video_tuser ? 0 : out_w) % WPL == WPL - 1))
        out_bad <= out_bad + 1;
    end
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- AXI4-Lite masters
  task automatic mm_wr(input logic [7:0] a, input logic [63:0] d);
    @(negedge clk);
    mm_axil_awaddr = a; mm_axil_awvalid = 1; mm_axil_wdata = d; mm_axil_wstrb = '1;
    mm_axil_wvalid = 1; mm_axil_bready = 1;
    do @(posedge clk); while (!mm_axil_awready);
    @(negedge clk);
    mm_axil_awvalid = 0; mm_axil_wvalid = 0;
    while (!mm_axil_bvalid) @(posedge clk);
    @(negedge clk);
    mm_axil_bready = 0;
  endtask

  task automatic mm_rd(input logic [7:0] a, output logic [63:0] d);
    @(negedge clk);
    mm_axil_araddr = a; mm_axil_arvalid = 1; mm_axil_rready = 1;
    do @(posedge clk); while (!mm_axil_arready);
    @(negedge clk);
    mm_axil_arvalid = 0;
    while (!mm_axil_rvalid) @(posedge clk);
    d = mm_axil_rdata;
    @(negedge clk);
    mm_axil_rready = 0;
  endtask

  task automatic enc_wr(input logic [7:0] a, input logic [63:0] d);
    @(negedge clk);
    enc_axil_awaddr = a; enc_axil_awvalid = 1; enc_axil_wdata = d; enc_axil_wstrb = '1;
    enc_axil_wvalid = 1; enc_axil_bready = 1;
    do @(posedge clk); while (!enc_axil_awready);
    @(negedge clk);
    enc_axil_awvalid = 0; enc_axil_wvalid = 0;
    while (!enc_axil_bvalid) @(posedge clk);
    @(negedge clk);
    enc_axil_bready = 0;
  endtask

  // ---------------- video source
  // kind: 0 good, 1 early line end, 2 late line end, 3 cut short (SOF error)
  task automatic send_frame(int f, int kind = 0, int gap = 50);
    for (int l = 0; l < H; l++)
      for (int c = 0; c < WPL; c++) begin
        logic last;
        if (kind == 3 && l == H / 2) return;
        last = (c == WPL - 1);
        if (kind == 1 && l == 3 && c == WPL - 4) last = 1;
        if (kind == 2 && l == 3) last = 0;
        @(negedge clk);
        while (($urandom % 100) < gap) @(negedge clk);
        s_axis_video_tdata = pat(f, l * WPL + c);
        s_axis_video_tuser = (l == 0 && c == 0);
        s_axis_video_tlast = last;
        s_axis_video_tvalid = 1;
        do @(posedge clk); while (!s_axis_video_tready);
        #1 s_axis_video_tvalid = 0; s_axis_video_tuser = 0; s_axis_video_tlast = 0;
        if (kind == 1 && l == 3 && c == WPL - 4) break;
      end
  endtask

  task automatic expect_true(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic settle(int n = 3000);
    repeat (n) @(posedge clk);
  endtask

  logic [63:0] st;
  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    // ---------------- configuration
    mm_wr(MM_RAW_START, RAW_START);
    mm_wr(MM_RAW_SIZE, RAW_SIZE);
    mm_wr(MM_HRES_BYTES, W * 4);
    mm_wr(MM_VRES, H);
    mm_wr(MM_ENC_START, ENC_START);
    mm_wr(MM_ENC_SIZE, ENC_SIZE);
    enc_wr(ENC_HRES, W);
    enc_wr(ENC_VRES, H);
    enc_wr(ENC_FPS, 60);
    enc_wr(ENC_CTRL, 64'h3);
    mm_wr(MM_ENC_CTRL, 64'h3);
    mm_wr(MM_RAW_CTRL, 64'h7);
    // ---------------- normal operation
    // a slow core for two frames makes the encoder push back on the read stream
    u_core.ready_pct = 5;
    for (int f = 0; f < 2; f++) send_frame(f, 0, 15);
    settle(6000);
    u_core.ready_pct = 60;
    for (int f = 2; f < 6; f++) send_frame(f);
    settle(6000);
    expect_true(n_written == 6, "six frames written");
    expect_true(n_read == 6, "six frames read");
    expect_true(out_frames == 6 && out_bad == 0, "frames leave the card unchanged");
    expect_true(n_enc == 6, "six frames encoded and stored");
    for (int k = 0; k < 4; k++) begin
      logic [255:0] w0;
      w0 = u_enc_mem.peek(ENC_START + k * SLOT);
      expect_true(w0[39:0] == 40'h67_01_00_00_00, "encoded slot starts with the header");
    end
    mm_rd(MM_RAW_STATUS, st);
    expect_true(st == 0, "no errors in normal operation");
    mm_rd(MM_ENC_LAST_ADDR, st);
    expect_true(st == ENC_START + SLOT, "last encoded frame address");
    // ---------------- encoder switched off: video keeps flowing
    enc_wr(ENC_CTRL, 64'h0);
    mm_wr(MM_ENC_CTRL, 64'h0);
    for (int f = 6; f < 8; f++) send_frame(f, 0, 20);
    settle();
    expect_true(n_read == 8 && out_bad == 0, "video continues without the encoder");
    // ---------------- 8k60 rate: input on 88.5% of cycles (265.4 M of 300 M beats/s),
    // output at one beat (8 pixels) per cycle
    u_raw_mem.stall_pct = 0;
    sink_stall = 0;
    mm_wr(MM_RAW_CTRL, 64'h0);
    mm_wr(MM_RAW_CTRL, 64'h7);
    begin
      int r0 = n_read;
      for (int f = 10; f < 13; f++) send_frame(f, 0, 12);
      settle();
      mm_rd(MM_RAW_STATUS, st);
      expect_true(st == 0, "input at the 8k60 rate written without loss");
      expect_true(n_read >= r0 + 2 && out_bad == 0, "8k60-rate frames read back unchanged");
      $display("frame of %0d beats streamed out in %0d cycles", NWF, frame_cycles);
      expect_true(frame_cycles <= NWF + NWF / 256 * 16, "read-out close to one beat per cycle");
    end
    u_raw_mem.stall_pct = 10;
    sink_stall = 20;
    // ---------------- frame errors (reader off so memory may be inspected)
    check_out = 0;
    mm_wr(MM_RAW_CTRL, 64'h3);
    send_frame(20, 1); send_frame(21); settle(1000);
    mm_rd(MM_RAW_STATUS, st);
    if (st[ST_EOL_EARLY]) n_eol_early++;
    mm_wr(MM_RAW_CTRL, 64'h3);
    send_frame(22, 2); send_frame(23); settle(1000);
    mm_rd(MM_RAW_STATUS, st);
    if (st[ST_EOL_LATE]) n_eol_late++;
    mm_wr(MM_RAW_CTRL, 64'h3);
    send_frame(24, 3); send_frame(25); settle(1000);
    mm_rd(MM_RAW_STATUS, st);
    if (st[ST_SOF_ERR]) n_sof_err++;
    expect_true(u_raw_mem.peek(RAW_START + FB) == pat(25, 0), "frame after a cut frame at its slot");
    // ---------------- congestion: unwritten data
    mm_wr(MM_RAW_CTRL, 64'h3);
    u_raw_mem.stall_pct = 97;
    for (int f = 30; f < 33; f++) send_frame(f, 0, 0);
    u_raw_mem.stall_pct = 10;
    settle(20000);
    mm_rd(MM_RAW_STATUS, st);
    if (st[ST_UNWRITTEN]) n_unwritten++;
    // ---------------- halt on error, then restart
    mm_wr(MM_RAW_CTRL, 64'hB);
    send_frame(40, 1); send_frame(41); settle(1000);
    mm_rd(MM_RAW_STATUS, st);
    if (st[ST_HALTED]) n_halt++;
    mm_wr(MM_RAW_CTRL, 64'h7);
    settle(100);
    check_out = 1;
    begin
      int r0 = n_read;
      send_frame(50); send_frame(51);
      settle();
      mm_rd(MM_RAW_STATUS, st);
      if (st == 0 && n_read >= r0 + 1 && out_bad == 0) n_restart_ok++;
    end
    // ---------------- mechanism report
    $display("frames written %0d read %0d encoded %0d, bursts %0d", n_written, n_read, n_enc, n_bursts);
    $display("raw wrap %0d, encoded wrap %0d, output stalls %0d, encoder back-pressure %0d",
             n_raw_wrap, n_enc_wrap, n_out_stall, n_enc_bp);
    $display("frames without encoder %0d, EOL early %0d, EOL late %0d, SOF error %0d, rectified %0d",
             n_frames_no_enc, n_eol_early, n_eol_late, n_sof_err, n_rect);
    $display("unwritten %0d, halt %0d, restart recovery %0d, encoder not-ready cycles %0d", n_unwritten, n_halt, n_restart_ok, n_enc_lo);
    expect_true(n_bursts > 2 * n_written - 1, "double-buffered bursts");
    expect_true(n_raw_wrap > 0, "raw region rotation");
    expect_true(n_enc_wrap > 0, "encoded region rotation");
    expect_true(n_out_stall > 0, "video output back-pressure");
    expect_true(n_enc_bp > 0, "encoder back-pressure on the read stream");
    expect_true(n_frames_no_enc > 0, "mode switch: encoder off");
    expect_true(n_eol_early > 0, "EOL early");
    expect_true(n_eol_late > 0, "EOL late");
    expect_true(n_sof_err > 0, "SOF error");
    expect_true(n_rect > 0, "start address rectification");
    expect_true(n_unwritten > 0, "unwritten data");
    expect_true(n_halt > 0, "halt on error");
    expect_true(n_restart_ok > 0, "restart recovery");
    expect_true(u_raw_mem.wlast_err == 0 && u_enc_mem.wlast_err == 0, "WLAST placement");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
