// video_card_top: Memory Manager and H.264 encoder of the video card.
//
// The raw video stream (256-bit AXI4-Stream Video, eight YUYV pixels per
// beat) is written by the Memory Manager into a circular region of external
// memory.  Complete frames are read back and streamed out of the card on
// m_axis_video_*; the same stream feeds the H.264 encoder wrapper.  The
// encoder's byte stream (header plus encoded frame) comes back to the
// Memory Manager, which writes it to a second circular region.
//
// The read stream is broadcast to the video output and to the encoder: a
// word moves only when the output is ready and, while the encoder is
// enabled, the encoder is ready too.  External memory (three AXI4 masters),
// the encoder core (core_*), and the two AXI4-Lite configuration ports are
// brought out.  clk2 runs at twice clk with aligned rising edges and is only
// used by the encoder's data delivery.
//
// Origin: the data flow (memory write, read back, encoder fed from memory,
// encoded stream written back) follows the original card; broadcasting one
// read stream to the output and the encoder is this design's own choice.
module video_card_top
  import vc_pkg::*;
#(
  parameter int DATA_W       = 256,
  parameter int ADDR_W       = 64,
  parameter int BURST_LEN    = 256,
  parameter int FRAMES_DELAY = 1,
  parameter int MAX_W        = 8192
) (
  input  logic                clk,
  input  logic                clk2,
  input  logic                rst_n,
  // Memory Manager AXI4-Lite
  input  logic [7:0]          mm_axil_awaddr,
  input  logic                mm_axil_awvalid,
  output logic                mm_axil_awready,
  input  logic [63:0]         mm_axil_wdata,
  input  logic [7:0]          mm_axil_wstrb,
  input  logic                mm_axil_wvalid,
  output logic                mm_axil_wready,
  output logic [1:0]          mm_axil_bresp,
  output logic                mm_axil_bvalid,
  input  logic                mm_axil_bready,
  input  logic [7:0]          mm_axil_araddr,
  input  logic                mm_axil_arvalid,
  output logic                mm_axil_arready,
  output logic [63:0]         mm_axil_rdata,
  output logic [1:0]          mm_axil_rresp,
  output logic                mm_axil_rvalid,
  input  logic                mm_axil_rready,
  // encoder AXI4-Lite
  input  logic [7:0]          enc_axil_awaddr,
  input  logic                enc_axil_awvalid,
  output logic                enc_axil_awready,
  input  logic [63:0]         enc_axil_wdata,
  input  logic [7:0]          enc_axil_wstrb,
  input  logic                enc_axil_wvalid,
  output logic                enc_axil_wready,
  output logic [1:0]          enc_axil_bresp,
  output logic                enc_axil_bvalid,
  input  logic                enc_axil_bready,
  input  logic [7:0]          enc_axil_araddr,
  input  logic                enc_axil_arvalid,
  output logic                enc_axil_arready,
  output logic [63:0]         enc_axil_rdata,
  output logic [1:0]          enc_axil_rresp,
  output logic                enc_axil_rvalid,
  input  logic                enc_axil_rready,
  // raw video in
  input  logic [DATA_W-1:0]   s_axis_video_tdata,
  input  logic                s_axis_video_tvalid,
  output logic                s_axis_video_tready,
  input  logic                s_axis_video_tuser,
  input  logic                s_axis_video_tlast,
  // raw video out
  output logic [DATA_W-1:0]   m_axis_video_tdata,
  output logic                m_axis_video_tvalid,
  input  logic                m_axis_video_tready,
  output logic                m_axis_video_tuser,
  output logic                m_axis_video_tlast,
  // external memory: raw write
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
  // external memory: raw read
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
  // external memory: encoded write
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
  // encoder core
  output logic                core_newslice,
  output logic                core_newline,
  output logic [5:0]          core_qp,
  output logic                core_intra4x4_strobei,
  output logic [31:0]         core_intra4x4_datai,
  input  logic                core_intra4x4_readyi,
  output logic                core_intra8x8cc_strobei,
  output logic [31:0]         core_intra8x8cc_datai,
  input  logic                core_intra8x8cc_readyi,
  output logic                core_align_valid,
  input  logic                core_xbuffer_done,
  input  logic [7:0]          core_tobytes_byte,
  input  logic                core_tobytes_strobe,
  input  logic                core_tobytes_done,
  // status
  output logic [4:0]          o_raw_status,
  output logic                o_enc_status,
  output logic                o_frame_written,
  output logic                o_frame_read,
  output logic                o_enc_frame_written,
  output logic                o_rectified,
  output logic                o_enc_tx_overflow,
  output enc_main_state_e     o_enc_main_state,
  output enc_comp_state_e     o_enc_y_state,
  output enc_comp_state_e     o_enc_uv_state,
  output tx_state_e           o_enc_tx_state
);

  // read stream broadcast to the card output and the encoder
  logic [DATA_W-1:0] rd_tdata;
  logic rd_tvalid, rd_tready, rd_tuser, rd_tlast;
  logic enc_tready, enc_en;
  logic [7:0] e_tdata;
  logic e_tvalid, e_tready, e_tlast;
  logic enc_ok;

  assign enc_ok              = enc_tready || !enc_en;
  assign rd_tready           = m_axis_video_tready && enc_ok;
  assign m_axis_video_tdata  = rd_tdata;
  assign m_axis_video_tvalid = rd_tvalid && enc_ok;
  assign m_axis_video_tuser  = rd_tuser;
  assign m_axis_video_tlast  = rd_tlast;

  memory_manager #(.DATA_W(DATA_W), .ADDR_W(ADDR_W), .BURST_LEN(BURST_LEN),
                   .FRAMES_DELAY(FRAMES_DELAY)) u_mm (
    .clk, .rst_n,
    .s_axil_awaddr(mm_axil_awaddr), .s_axil_awvalid(mm_axil_awvalid),
    .s_axil_awready(mm_axil_awready), .s_axil_wdata(mm_axil_wdata),
    .s_axil_wstrb(mm_axil_wstrb), .s_axil_wvalid(mm_axil_wvalid),
    .s_axil_wready(mm_axil_wready), .s_axil_bresp(mm_axil_bresp),
    .s_axil_bvalid(mm_axil_bvalid), .s_axil_bready(mm_axil_bready),
    .s_axil_araddr(mm_axil_araddr), .s_axil_arvalid(mm_axil_arvalid),
    .s_axil_arready(mm_axil_arready), .s_axil_rdata(mm_axil_rdata),
    .s_axil_rresp(mm_axil_rresp), .s_axil_rvalid(mm_axil_rvalid),
    .s_axil_rready(mm_axil_rready),
    .s_axis_video_tdata, .s_axis_video_tvalid, .s_axis_video_tready,
    .s_axis_video_tuser, .s_axis_video_tlast,
    .m_axis_video_tdata(rd_tdata), .m_axis_video_tvalid(rd_tvalid),
    .m_axis_video_tready(rd_tready), .m_axis_video_tuser(rd_tuser),
    .m_axis_video_tlast(rd_tlast),
    .s_axis_enc_tdata(e_tdata), .s_axis_enc_tvalid(e_tvalid),
    .s_axis_enc_tready(e_tready), .s_axis_enc_tlast(e_tlast),
    .m_axi_s2mm_awaddr, .m_axi_s2mm_awlen, .m_axi_s2mm_awsize, .m_axi_s2mm_awburst,
    .m_axi_s2mm_awvalid, .m_axi_s2mm_awready, .m_axi_s2mm_wdata, .m_axi_s2mm_wstrb,
    .m_axi_s2mm_wlast, .m_axi_s2mm_wvalid, .m_axi_s2mm_wready, .m_axi_s2mm_bresp,
    .m_axi_s2mm_bvalid, .m_axi_s2mm_bready,
    .m_axi_mm2s_araddr, .m_axi_mm2s_arlen, .m_axi_mm2s_arsize, .m_axi_mm2s_arburst,
    .m_axi_mm2s_arvalid, .m_axi_mm2s_arready, .m_axi_mm2s_rdata, .m_axi_mm2s_rresp,
    .m_axi_mm2s_rlast, .m_axi_mm2s_rvalid, .m_axi_mm2s_rready,
    .m_axi_enc_awaddr, .m_axi_enc_awlen, .m_axi_enc_awsize, .m_axi_enc_awburst,
    .m_axi_enc_awvalid, .m_axi_enc_awready, .m_axi_enc_wdata, .m_axi_enc_wstrb,
    .m_axi_enc_wlast, .m_axi_enc_wvalid, .m_axi_enc_wready, .m_axi_enc_bresp,
    .m_axi_enc_bvalid, .m_axi_enc_bready,
    .o_raw_status, .o_enc_status, .o_frame_written, .o_frame_read,
    .o_enc_frame_written, .o_rectified
  );

  h264_encoder #(.TDATA_W(DATA_W), .MAX_W(MAX_W)) u_enc (
    .clk, .clk2, .rst_n,
    .s_axil_awaddr(enc_axil_awaddr), .s_axil_awvalid(enc_axil_awvalid),
    .s_axil_awready(enc_axil_awready), .s_axil_wdata(enc_axil_wdata),
    .s_axil_wstrb(enc_axil_wstrb), .s_axil_wvalid(enc_axil_wvalid),
    .s_axil_wready(enc_axil_wready), .s_axil_bresp(enc_axil_bresp),
    .s_axil_bvalid(enc_axil_bvalid), .s_axil_bready(enc_axil_bready),
    .s_axil_araddr(enc_axil_araddr), .s_axil_arvalid(enc_axil_arvalid),
    .s_axil_arready(enc_axil_arready), .s_axil_rdata(enc_axil_rdata),
    .s_axil_rresp(enc_axil_rresp), .s_axil_rvalid(enc_axil_rvalid),
    .s_axil_rready(enc_axil_rready),
    .s_axis_tdata(rd_tdata), .s_axis_tvalid(rd_tvalid && m_axis_video_tready && enc_en),
    .s_axis_tready(enc_tready), .s_axis_tuser(rd_tuser), .s_axis_tlast(rd_tlast),
    .m_axis_tdata(e_tdata), .m_axis_tvalid(e_tvalid), .m_axis_tready(e_tready),
    .m_axis_tlast(e_tlast),
    .core_newslice, .core_newline, .core_qp, .core_intra4x4_strobei, .core_intra4x4_datai,
    .core_intra4x4_readyi, .core_intra8x8cc_strobei, .core_intra8x8cc_datai,
    .core_intra8x8cc_readyi, .core_align_valid, .core_xbuffer_done, .core_tobytes_byte,
    .core_tobytes_strobe, .core_tobytes_done,
    .o_enable(enc_en), .o_tx_overflow(o_enc_tx_overflow),
    .o_main_state(o_enc_main_state), .o_y_state(o_enc_y_state),
    .o_uv_state(o_enc_uv_state), .o_tx_state(o_enc_tx_state)
  );

endmodule
