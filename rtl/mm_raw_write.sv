// mm_raw_write: raw video write subsystem of the Memory Manager.
//
// Receives uncompressed video on an AXI4-Stream Video slave (TUSER marks the
// first word of a frame, TLAST the last word of a line) and writes it to a
// circular region of external memory through mm_burst_writer.  TREADY is
// always high: the video source cannot be paused, so data that cannot be
// buffered is counted as lost instead of back-pressuring the source.
//
// Frame tracking: words per line = hres_bytes / (DATA_W/8).  A TLAST before
// the expected last word of a line raises "EOL early"; the expected last
// word arriving without TLAST raises "EOL late"; a TUSER arriving when the
// number of complete lines differs from vres raises "SOF error".  The first
// TUSER after a restart synchronises the tracker; words before it are
// dropped.  Errors are sticky until the next restart.  If halting is enabled
// any of these errors stops the subsystem (status bit "halted") until a
// restart; otherwise writing continues and the frame start address
// mechanism realigns the next frame.
//
// Frame start address control: every frame starts at base + k * frame_size
// inside [start, start + size).  When the next frame would not fit before
// the end of the region the base rotates back to the start, so frames are
// never split.  The burst writer compares its running burst address with
// the expected address at each frame start and pulses o_rectified when they
// differ (a frame of the wrong size was received); the frame is then written
// at the expected address anyway.
//
// Outputs: o_status = {unwritten data, SOF error, EOL late, EOL early,
// halted}, o_frame_written pulses when the last burst of a frame has been
// acknowledged by memory.  Configuration is sampled from i_cfg, which only
// changes on a restart.
//
// Origin: the three frame errors, halt on error, rotation without splitting
// frames and start address rectification follow the original design; the
// exact error conditions and dropping words before the first TUSER are this
// design's own choices.
module mm_raw_write
  import vc_pkg::*;
#(
  parameter int DATA_W    = 256,
  parameter int ADDR_W    = 64,
  parameter int BURST_LEN = 256
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                i_restart,
  input  logic                i_enable,
  input  logic                i_halt_en,
  input  mm_raw_cfg_t         i_cfg,
  // AXI4-Stream Video slave
  input  logic [DATA_W-1:0]   s_axis_tdata,
  input  logic                s_axis_tvalid,
  output logic                s_axis_tready,
  input  logic                s_axis_tuser,
  input  logic                s_axis_tlast,
  // status and events
  output logic [4:0]          o_status,
  output logic                o_frame_written,
  output logic                o_rectified,
  output logic [1:0]          o_check_counter,
  // AXI4 write master
  output logic [ADDR_W-1:0]   m_axi_awaddr,
  output logic [7:0]          m_axi_awlen,
  output logic [2:0]          m_axi_awsize,
  output logic [1:0]          m_axi_awburst,
  output logic                m_axi_awvalid,
  input  logic                m_axi_awready,
  output logic [DATA_W-1:0]   m_axi_wdata,
  output logic [DATA_W/8-1:0] m_axi_wstrb,
  output logic                m_axi_wlast,
  output logic                m_axi_wvalid,
  input  logic                m_axi_wready,
  input  logic [1:0]          m_axi_bresp,
  input  logic                m_axi_bvalid,
  output logic                m_axi_bready
);

  localparam int BSH = $clog2(DATA_W / 8);

  assign s_axis_tready = 1'b1;

  // ---------------- configuration derived values ----------------
  logic [31:0]       wpl;          // words per line
  logic [ADDR_W-1:0] frame_bytes, region_end;
  assign wpl         = i_cfg.hres_bytes >> BSH;
  assign frame_bytes = ADDR_W'(i_cfg.hres_bytes) * ADDR_W'(i_cfg.vres);
  assign region_end  = ADDR_W'(i_cfg.start_addr + i_cfg.mem_size);

  // ---------------- line / frame tracking ----------------
  logic        synced, halted;
  logic [31:0] col, line;
  logic        err_early, err_late, err_sof, err_unwritten;
  logic        beat, accept;
  logic [31:0] col_i, line_i;
  logic        is_eol_early, is_eol_late, is_sof_err, frame_end;

  assign beat   = s_axis_tvalid && s_axis_tready;
  assign accept = beat && (synced || s_axis_tuser) && i_enable && !halted;

  always_comb begin
    col_i        = s_axis_tuser ? 32'd0 : col;
    line_i       = s_axis_tuser ? 32'd0 : line;
    is_sof_err   = s_axis_tuser && synced && (line != i_cfg.vres);
    is_eol_early = s_axis_tlast && (col_i < wpl - 32'd1);
    is_eol_late  = !s_axis_tlast && (col_i == wpl - 32'd1);
    frame_end    = s_axis_tlast && (line_i + 32'd1 == i_cfg.vres);
  end

  logic new_err;
  assign new_err = accept && (is_sof_err || is_eol_early || is_eol_late);

  always_ff @(posedge clk) begin
    if (!rst_n || i_restart) begin
      synced <= 1'b0; col <= '0; line <= '0; halted <= 1'b0;
      err_early <= 1'b0; err_late <= 1'b0; err_sof <= 1'b0;
    end else begin
      if (accept) begin
        synced <= 1'b1;
        if (s_axis_tlast) begin
          col  <= '0;
          line <= line_i + 32'd1;
        end else begin
          col  <= col_i + 32'd1;
          line <= line_i;
        end
        if (is_sof_err)   err_sof   <= 1'b1;
        if (is_eol_early) err_early <= 1'b1;
        if (is_eol_late)  err_late  <= 1'b1;
      end
      if (new_err && i_halt_en) halted <= 1'b1;
    end
  end

  // ---------------- frame start address control ----------------
  logic              first_frame;
  logic [ADDR_W-1:0] base, expected, next_base;
  logic              frame_start, overflow;

  assign expected  = base + frame_bytes;
  assign next_base = first_frame ? i_cfg.start_addr :
                     (expected + frame_bytes > region_end) ? i_cfg.start_addr : expected;

  always_ff @(posedge clk) begin
    if (!rst_n || i_restart) begin
      first_frame <= 1'b1;
      base        <= '0;
    end else if (frame_start) begin
      first_frame <= 1'b0;
      base        <= next_base;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || i_restart) err_unwritten <= 1'b0;
    else if (overflow)       err_unwritten <= 1'b1;
  end

  mm_burst_writer #(.DATA_W(DATA_W), .ADDR_W(ADDR_W), .BURST_LEN(BURST_LEN)) u_writer (
    .clk, .rst_n, .i_restart,
    .i_halt      (halted),
    .i_valid     (accept),
    .i_data      (s_axis_tdata),
    .i_strb      ('1),
    .i_first     (s_axis_tuser),
    .i_last      (frame_end),
    .i_next_base (next_base),
    .i_expected  (expected),
    .i_check     (!first_frame),
    .o_frame_start (frame_start),
    .o_rectified (o_rectified),
    .o_rxn_done  (),
    .o_txn_done  (),
    .o_frame_done(o_frame_written),
    .o_overflow  (overflow),
    .o_check_counter(o_check_counter),
    .o_state     (),
    .m_axi_awaddr, .m_axi_awlen, .m_axi_awsize, .m_axi_awburst, .m_axi_awvalid,
    .m_axi_awready, .m_axi_wdata, .m_axi_wstrb, .m_axi_wlast, .m_axi_wvalid,
    .m_axi_wready, .m_axi_bresp, .m_axi_bvalid, .m_axi_bready
  );

  assign o_status = {err_unwritten, err_sof, err_late, err_early, halted};

endmodule
