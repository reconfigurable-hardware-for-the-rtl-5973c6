// mm_enc_write: encoded video write subsystem of the Memory Manager.
//
// Receives the encoded byte stream of the H.264 encoder on an AXI4-Stream
// slave (8-bit TDATA, TLAST on the last byte of an encoded frame), packs the
// bytes little-endian into DATA_W-bit words and writes them to a circular
// region of external memory through mm_burst_writer.  A partial last word of
// a frame is written with only its valid byte strobes.  TREADY is always high
// (the encoder output cannot wait); bytes that cannot be buffered set the
// sticky "unwritten data" status bit.
//
// Each encoded frame is placed in a slot of one sixteenth of a raw frame
// (hres_bytes * vres / 16), which bounds the size of an intra-coded 8-bit
// 4:2:0 frame with margin.  Slots follow each other from the region start
// and rotate back to it when the next slot would pass the region end.
// o_last_addr holds the start address of the last encoded frame completely
// written to memory.  Both configurations only change on a restart.
//
// Origin: the circular encoded region with slots of raw frame size / 16
// follows the original design; little-endian packing and the last-frame
// address register are this design's own choices.
module mm_enc_write
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
  input  mm_raw_cfg_t         i_raw_cfg,
  input  mm_enc_cfg_t         i_cfg,
  // encoded AXI4-Stream slave
  input  logic [7:0]          s_axis_tdata,
  input  logic                s_axis_tvalid,
  output logic                s_axis_tready,
  input  logic                s_axis_tlast,
  // status
  output logic                o_status,
  output logic [ADDR_W-1:0]   o_last_addr,
  output logic                o_frame_written,
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

  localparam int BYTES = DATA_W / 8;
  localparam int BI    = $clog2(BYTES);

  assign s_axis_tready = 1'b1;

  logic [ADDR_W-1:0] slot_bytes, region_end;
  assign slot_bytes = (ADDR_W'(i_raw_cfg.hres_bytes) * ADDR_W'(i_raw_cfg.vres)) >> 4;
  assign region_end = ADDR_W'(i_cfg.start_addr + i_cfg.mem_size);

  // ---------------- byte packing ----------------
  logic [DATA_W-1:0] word;
  logic [BI-1:0]     bidx;
  logic              at_frame_start;   // next byte starts an encoded frame
  logic              word_first;       // the word being packed starts a frame
  logic              take, word_done;
  logic [DATA_W-1:0] word_n;
  logic [BYTES-1:0]  strb_n;

  assign take      = s_axis_tvalid && s_axis_tready && i_enable;
  assign word_done = take && (s_axis_tlast || bidx == BI'(BYTES - 1));

  always_comb begin
    word_n = word;
    word_n[bidx*8 +: 8] = s_axis_tdata;
    for (int b = 0; b < BYTES; b++) strb_n[b] = (BI'(b) <= bidx);
  end

  always_ff @(posedge clk) begin
    if (!rst_n || i_restart) begin
      word <= '0; bidx <= '0; at_frame_start <= 1'b1; word_first <= 1'b0;
    end else if (take) begin
      if (bidx == '0) word_first <= at_frame_start;
      at_frame_start <= s_axis_tlast;
      if (word_done) begin
        word <= '0; bidx <= '0;
      end else begin
        word <= word_n; bidx <= bidx + BI'(1);
      end
    end
  end

  // ---------------- slot addressing ----------------
  logic              first_frame, frame_start, overflow;
  logic [ADDR_W-1:0] base, expected, next_base;

  assign expected  = base + slot_bytes;
  assign next_base = first_frame ? i_cfg.start_addr :
                     (expected + slot_bytes > region_end) ? i_cfg.start_addr : expected;

  always_ff @(posedge clk) begin
    if (!rst_n || i_restart) begin
      first_frame <= 1'b1; base <= '0; o_status <= 1'b0; o_last_addr <= '0;
    end else begin
      if (frame_start) begin
        first_frame <= 1'b0;
        base <= next_base;
      end
      if (overflow) o_status <= 1'b1;
      if (o_frame_written) o_last_addr <= base;
    end
  end

  mm_burst_writer #(.DATA_W(DATA_W), .ADDR_W(ADDR_W), .BURST_LEN(BURST_LEN)) u_writer (
    .clk, .rst_n, .i_restart,
    .i_halt      (1'b0),
    .i_valid     (word_done),
    .i_data      (word_n),
    .i_strb      (strb_n),
    .i_first     ((bidx == '0) ? at_frame_start : word_first),
    .i_last      (s_axis_tlast),
    .i_next_base (next_base),
    .i_expected  (expected),
    .i_check     (1'b0),
    .o_frame_start (frame_start),
    .o_rectified (),
    .o_rxn_done  (),
    .o_txn_done  (),
    .o_frame_done(o_frame_written),
    .o_overflow  (overflow),
    .o_check_counter(),
    .o_state     (),
    .m_axi_awaddr, .m_axi_awlen, .m_axi_awsize, .m_axi_awburst, .m_axi_awvalid,
    .m_axi_awready, .m_axi_wdata, .m_axi_wstrb, .m_axi_wlast, .m_axi_wvalid,
    .m_axi_wready, .m_axi_bresp, .m_axi_bvalid, .m_axi_bready
  );

endmodule
