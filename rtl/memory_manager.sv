// memory_manager: Memory Manager IP core.
//
// Sits between the video source, external memory and the video sinks.  It
// writes incoming raw video frames into a configurable circular region of
// external memory (raw write subsystem), streams complete frames back out
// (raw read subsystem), and writes the encoded video coming back from the
// H.264 encoder into a second circular region (encoded write subsystem).
// All three use their own AXI4 memory-mapped master port; software controls
// the core through an AXI4-Lite register file (mm_config).
//
// The write subsystem's "frame written" pulse feeds the read subsystem's
// frame counter, which is how reading is kept behind writing by at least
// FRAMES_DELAY whole frames.  One clock drives everything; reset is active
// low and synchronous; each datapath is also restarted by the restart bit of
// its control register, which applies the new configuration.
//
// Origin: the split into configuration, raw write, raw read and encoded
// write subsystems follows the original design; three separate AXI4 master
// ports are this design's own choice.
module memory_manager
  import vc_pkg::*;
#(
  parameter int DATA_W       = 256,   // stream and memory word width
  parameter int ADDR_W       = 64,
  parameter int BURST_LEN    = 256,
  parameter int FRAMES_DELAY = 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // AXI4-Lite configuration slave
  input  logic [7:0]          s_axil_awaddr,
  input  logic                s_axil_awvalid,
  output logic                s_axil_awready,
  input  logic [63:0]         s_axil_wdata,
  input  logic [7:0]          s_axil_wstrb,
  input  logic                s_axil_wvalid,
  output logic                s_axil_wready,
  output logic [1:0]          s_axil_bresp,
  output logic                s_axil_bvalid,
  input  logic                s_axil_bready,
  input  logic [7:0]          s_axil_araddr,
  input  logic                s_axil_arvalid,
  output logic                s_axil_arready,
  output logic [63:0]         s_axil_rdata,
  output logic [1:0]          s_axil_rresp,
  output logic                s_axil_rvalid,
  input  logic                s_axil_rready,
  // raw video in (AXI4-Stream Video)
  input  logic [DATA_W-1:0]   s_axis_video_tdata,
  input  logic                s_axis_video_tvalid,
  output logic                s_axis_video_tready,
  input  logic                s_axis_video_tuser,
  input  logic                s_axis_video_tlast,
  // raw video out (AXI4-Stream Video)
  output logic [DATA_W-1:0]   m_axis_video_tdata,
  output logic                m_axis_video_tvalid,
  input  logic                m_axis_video_tready,
  output logic                m_axis_video_tuser,
  output logic                m_axis_video_tlast,
  // encoded video in (AXI4-Stream, bytes)
  input  logic [7:0]          s_axis_enc_tdata,
  input  logic                s_axis_enc_tvalid,
  output logic                s_axis_enc_tready,
  input  logic                s_axis_enc_tlast,
  // raw write master (S2MM)
  output logic [ADDR_W-1:0]   m_axi_s2mm_awaddr,
  output logic [7:0]          m_axi_s2mm_awlen,
  output logic [2:0]          m_axi_s2mm_awsize,
  output logic [1:0]          m_axi_s2mm_awburst,
  output logic                m_axi_s2mm_awvalid,
  input  logic                m_axi_s2mm_awready,
  output logic [DATA_W-1:0]   m_axi_s2mm_wdata,
  output logic [DATA_W/8-1:0] m_axi_s2mm_wstrb,
  output logic                m_axi_s2mm_wlast,
  output logic                m_axi_s2mm_wvalid,
  input  logic                m_axi_s2mm_wready,
  input  logic [1:0]          m_axi_s2mm_bresp,
  input  logic                m_axi_s2mm_bvalid,
  output logic                m_axi_s2mm_bready,
  // raw read master (MM2S)
  output logic [ADDR_W-1:0]   m_axi_mm2s_araddr,
  output logic [7:0]          m_axi_mm2s_arlen,
  output logic [2:0]          m_axi_mm2s_arsize,
  output logic [1:0]          m_axi_mm2s_arburst,
  output logic                m_axi_mm2s_arvalid,
  input  logic                m_axi_mm2s_arready,
  input  logic [DATA_W-1:0]   m_axi_mm2s_rdata,
  input  logic [1:0]          m_axi_mm2s_rresp,
  input  logic                m_axi_mm2s_rlast,
  input  logic                m_axi_mm2s_rvalid,
  output logic                m_axi_mm2s_rready,
  // encoded write master
  output logic [ADDR_W-1:0]   m_axi_enc_awaddr,
  output logic [7:0]          m_axi_enc_awlen,
  output logic [2:0]          m_axi_enc_awsize,
  output logic [1:0]          m_axi_enc_awburst,
  output logic                m_axi_enc_awvalid,
  input  logic                m_axi_enc_awready,
  output logic [DATA_W-1:0]   m_axi_enc_wdata,
  output logic [DATA_W/8-1:0] m_axi_enc_wstrb,
  output logic                m_axi_enc_wlast,
  output logic                m_axi_enc_wvalid,
  input  logic                m_axi_enc_wready,
  input  logic [1:0]          m_axi_enc_bresp,
  input  logic                m_axi_enc_bvalid,
  output logic                m_axi_enc_bready,
  // observation
  output logic [4:0]          o_raw_status,
  output logic                o_enc_status,
  output logic                o_frame_written,
  output logic                o_frame_read,
  output logic                o_enc_frame_written,
  output logic                o_rectified
);

  logic        raw_restart, enc_restart, wr_en, rd_en, halt_en, enc_en;
  mm_raw_cfg_t raw_cfg;
  mm_enc_cfg_t enc_cfg;
  logic [ADDR_W-1:0] enc_last_addr;

  mm_config u_cfg (
    .clk, .rst_n,
    .s_axil_awaddr, .s_axil_awvalid, .s_axil_awready, .s_axil_wdata, .s_axil_wstrb,
    .s_axil_wvalid, .s_axil_wready, .s_axil_bresp, .s_axil_bvalid, .s_axil_bready,
    .s_axil_araddr, .s_axil_arvalid, .s_axil_arready, .s_axil_rdata, .s_axil_rresp,
    .s_axil_rvalid, .s_axil_rready,
    .i_raw_status    (o_raw_status),
    .i_enc_status    (o_enc_status),
    .i_enc_last_addr (64'(enc_last_addr)),
    .o_raw_restart   (raw_restart),
    .o_enc_restart   (enc_restart),
    .o_wr_en (wr_en), .o_rd_en (rd_en), .o_halt_en (halt_en), .o_enc_en (enc_en),
    .o_raw_cfg (raw_cfg), .o_enc_cfg (enc_cfg)
  );

  mm_raw_write #(.DATA_W(DATA_W), .ADDR_W(ADDR_W), .BURST_LEN(BURST_LEN)) u_wr (
    .clk, .rst_n, .i_restart(raw_restart), .i_enable(wr_en), .i_halt_en(halt_en),
    .i_cfg(raw_cfg),
    .s_axis_tdata (s_axis_video_tdata), .s_axis_tvalid(s_axis_video_tvalid),
    .s_axis_tready(s_axis_video_tready), .s_axis_tuser(s_axis_video_tuser),
    .s_axis_tlast (s_axis_video_tlast),
    .o_status(o_raw_status), .o_frame_written(o_frame_written), .o_rectified(o_rectified),
    .o_check_counter(),
    .m_axi_awaddr(m_axi_s2mm_awaddr), .m_axi_awlen(m_axi_s2mm_awlen),
    .m_axi_awsize(m_axi_s2mm_awsize), .m_axi_awburst(m_axi_s2mm_awburst),
    .m_axi_awvalid(m_axi_s2mm_awvalid), .m_axi_awready(m_axi_s2mm_awready),
    .m_axi_wdata(m_axi_s2mm_wdata), .m_axi_wstrb(m_axi_s2mm_wstrb),
    .m_axi_wlast(m_axi_s2mm_wlast), .m_axi_wvalid(m_axi_s2mm_wvalid),
    .m_axi_wready(m_axi_s2mm_wready), .m_axi_bresp(m_axi_s2mm_bresp),
    .m_axi_bvalid(m_axi_s2mm_bvalid), .m_axi_bready(m_axi_s2mm_bready)
  );

  mm_raw_read #(.DATA_W(DATA_W), .ADDR_W(ADDR_W), .BURST_LEN(BURST_LEN),
                .FRAMES_DELAY(FRAMES_DELAY)) u_rd (
    .clk, .rst_n, .i_restart(raw_restart), .i_enable(rd_en), .i_cfg(raw_cfg),
    .i_frame_written(o_frame_written), .o_frame_read(o_frame_read),
    .o_frames_pending(), .o_state(),
    .m_axi_araddr(m_axi_mm2s_araddr), .m_axi_arlen(m_axi_mm2s_arlen),
    .m_axi_arsize(m_axi_mm2s_arsize), .m_axi_arburst(m_axi_mm2s_arburst),
    .m_axi_arvalid(m_axi_mm2s_arvalid), .m_axi_arready(m_axi_mm2s_arready),
    .m_axi_rdata(m_axi_mm2s_rdata), .m_axi_rresp(m_axi_mm2s_rresp),
    .m_axi_rlast(m_axi_mm2s_rlast), .m_axi_rvalid(m_axi_mm2s_rvalid),
    .m_axi_rready(m_axi_mm2s_rready),
    .m_axis_tdata(m_axis_video_tdata), .m_axis_tvalid(m_axis_video_tvalid),
    .m_axis_tready(m_axis_video_tready), .m_axis_tuser(m_axis_video_tuser),
    .m_axis_tlast(m_axis_video_tlast)
  );

  mm_enc_write #(.DATA_W(DATA_W), .ADDR_W(ADDR_W), .BURST_LEN(BURST_LEN)) u_enc (
    .clk, .rst_n, .i_restart(enc_restart), .i_enable(enc_en),
    .i_raw_cfg(raw_cfg), .i_cfg(enc_cfg),
    .s_axis_tdata(s_axis_enc_tdata), .s_axis_tvalid(s_axis_enc_tvalid),
    .s_axis_tready(s_axis_enc_tready), .s_axis_tlast(s_axis_enc_tlast),
    .o_status(o_enc_status), .o_last_addr(enc_last_addr),
    .o_frame_written(o_enc_frame_written),
    .m_axi_awaddr(m_axi_enc_awaddr), .m_axi_awlen(m_axi_enc_awlen),
    .m_axi_awsize(m_axi_enc_awsize), .m_axi_awburst(m_axi_enc_awburst),
    .m_axi_awvalid(m_axi_enc_awvalid), .m_axi_awready(m_axi_enc_awready),
    .m_axi_wdata(m_axi_enc_wdata), .m_axi_wstrb(m_axi_enc_wstrb),
    .m_axi_wlast(m_axi_enc_wlast), .m_axi_wvalid(m_axi_enc_wvalid),
    .m_axi_wready(m_axi_enc_wready), .m_axi_bresp(m_axi_enc_bresp),
    .m_axi_bvalid(m_axi_enc_bvalid), .m_axi_bready(m_axi_enc_bready)
  );

endmodule
