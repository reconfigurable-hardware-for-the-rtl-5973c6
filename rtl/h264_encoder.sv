// h264_encoder: H.264 encoder IP core wrapper.
//
// Adapts an external intra-only H.264 encoder core to the video card.  Raw
// YUYV 4:2:2 10-bit video read from memory arrives on an AXI4-Stream Video
// slave; enc_acquisition converts it to 8-bit 4:2:0, buffers 16-line bands
// and hands the samples to the core macroblock by macroblock; enc_header_tx
// prefixes each encoded frame with an SPS/PPS header carrying the
// configured resolution and streams header and encoded bytes back to the
// Memory Manager with TLAST at the end of the frame.  enc_config is the
// AXI4-Lite register file (control, resolution, frames per second).
//
// The core itself is not part of this RTL: its ports are brought out here
// (core_*), named after the core's own signals.  The core runs on clk, with
// clk2 at twice the frequency for data delivery; clk2's rising edges must
// coincide with clk's.  QP is a fixed parameter because the register map
// has no QP register.
//
// Origin: the configuration, acquisition and transmission subsystems around
// an external core follow the original design; the fixed QP is this design's
// own choice.
module h264_encoder
  import vc_pkg::*;
#(
  parameter int         TDATA_W    = 256,
  parameter int         MAX_W      = 8192,
  parameter logic [5:0] QP         = 6'd28,
  parameter logic [7:0] LEVEL_IDC  = 8'd60
) (
  input  logic               clk,
  input  logic               clk2,
  input  logic               rst_n,
  // AXI4-Lite configuration slave
  input  logic [7:0]         s_axil_awaddr,
  input  logic               s_axil_awvalid,
  output logic               s_axil_awready,
  input  logic [63:0]        s_axil_wdata,
  input  logic [7:0]         s_axil_wstrb,
  input  logic               s_axil_wvalid,
  output logic               s_axil_wready,
  output logic [1:0]         s_axil_bresp,
  output logic               s_axil_bvalid,
  input  logic               s_axil_bready,
  input  logic [7:0]         s_axil_araddr,
  input  logic               s_axil_arvalid,
  output logic               s_axil_arready,
  output logic [63:0]        s_axil_rdata,
  output logic [1:0]         s_axil_rresp,
  output logic               s_axil_rvalid,
  input  logic               s_axil_rready,
  // raw video in
  input  logic [TDATA_W-1:0] s_axis_tdata,
  input  logic               s_axis_tvalid,
  output logic               s_axis_tready,
  input  logic               s_axis_tuser,
  input  logic               s_axis_tlast,
  // encoded video out
  output logic [7:0]         m_axis_tdata,
  output logic               m_axis_tvalid,
  input  logic               m_axis_tready,
  output logic               m_axis_tlast,
  // encoder core ports
  output logic               core_newslice,
  output logic               core_newline,
  output logic [5:0]         core_qp,
  output logic               core_intra4x4_strobei,
  output logic [31:0]        core_intra4x4_datai,
  input  logic               core_intra4x4_readyi,
  output logic               core_intra8x8cc_strobei,
  output logic [31:0]        core_intra8x8cc_datai,
  input  logic               core_intra8x8cc_readyi,
  output logic               core_align_valid,
  input  logic               core_xbuffer_done,
  input  logic [7:0]         core_tobytes_byte,
  input  logic               core_tobytes_strobe,
  input  logic               core_tobytes_done,
  // status and observation
  output logic               o_enable,
  output logic               o_tx_overflow,
  output enc_main_state_e    o_main_state,
  output enc_comp_state_e    o_y_state,
  output enc_comp_state_e    o_uv_state,
  output tx_state_e          o_tx_state
);

  logic     restart, frame_start;
  enc_cfg_t cfg;

  enc_config u_cfg (
    .clk, .rst_n,
    .s_axil_awaddr, .s_axil_awvalid, .s_axil_awready, .s_axil_wdata, .s_axil_wstrb,
    .s_axil_wvalid, .s_axil_wready, .s_axil_bresp, .s_axil_bvalid, .s_axil_bready,
    .s_axil_araddr, .s_axil_arvalid, .s_axil_arready, .s_axil_rdata, .s_axil_rresp,
    .s_axil_rvalid, .s_axil_rready,
    .o_restart(restart), .o_enable(o_enable), .o_cfg(cfg)
  );

  enc_acquisition #(.TDATA_W(TDATA_W), .MAX_W(MAX_W)) u_acq (
    .clk, .clk2, .rst_n, .i_restart(restart), .i_enable(o_enable), .i_cfg(cfg),
    .s_axis_tdata, .s_axis_tvalid, .s_axis_tready, .s_axis_tuser, .s_axis_tlast,
    .o_newslice(core_newslice), .o_newline(core_newline), .o_align_valid(core_align_valid),
    .i_xbuffer_done(core_xbuffer_done), .i_tobytes_done(core_tobytes_done),
    .o_intra4x4_strobe(core_intra4x4_strobei), .o_intra4x4_data(core_intra4x4_datai),
    .i_intra4x4_readyi(core_intra4x4_readyi),
    .o_intra8x8cc_strobe(core_intra8x8cc_strobei), .o_intra8x8cc_data(core_intra8x8cc_datai),
    .i_intra8x8cc_readyi(core_intra8x8cc_readyi),
    .o_frame_start(frame_start), .o_main_state, .o_y_state, .o_uv_state
  );

  enc_header_tx #(.LEVEL_IDC(LEVEL_IDC)) u_tx (
    .clk, .rst_n, .i_restart(restart), .i_hres(cfg.hres), .i_vres(cfg.vres),
    .i_frame_start(frame_start),
    .i_tobytes_byte(core_tobytes_byte), .i_tobytes_strobe(core_tobytes_strobe),
    .i_tobytes_done(core_tobytes_done),
    .m_axis_tdata, .m_axis_tvalid, .m_axis_tready, .m_axis_tlast,
    .o_overflow(o_tx_overflow), .o_state(o_tx_state)
  );

  assign core_qp = QP;

endmodule
