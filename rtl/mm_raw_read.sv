// mm_raw_read: raw video read subsystem of the Memory Manager.
//
// Streams complete frames from external memory out of an AXI4-Stream Video
// master.  A frame counter holds the number of frames written but not yet
// streamed: the write subsystem pulses i_frame_written when a frame is
// complete in memory, and this module decrements the counter when it has
// streamed the last word of a frame.  A frame is started only when the
// counter is at least FRAMES_DELAY and reading is enabled, so a frame being
// written is never read.
//
// State machine: RESET -> IDLE -> READ_MEMORY -> IDLE.  In READ_MEMORY the
// frame is fetched with INCR bursts of up to BURST_LEN words, one burst
// outstanding at a time; read data is forwarded straight to the stream
// (RREADY = TREADY).  TUSER is set on the first word of a frame and TLAST on
// the last word of every line (words per line = hres_bytes / (DATA_W/8)).
// Frame addresses follow the same rule as the write subsystem: the first
// frame after a restart starts at the region start, each next frame one
// frame size further, rotating to the start when a whole frame would not
// fit before the end of the region.
//
// Origin: the frame counter compared against FRAMES_DELAY, the
// RESET/IDLE/READ_MEMORY machine and TUSER/TLAST generation follow the
// original design; one burst outstanding and TUSER on the first beat are
// this design's own choices.
module mm_raw_read
  import vc_pkg::*;
#(
  parameter int DATA_W       = 256,
  parameter int ADDR_W       = 64,
  parameter int BURST_LEN    = 256,
  parameter int FRAMES_DELAY = 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                i_restart,
  input  logic                i_enable,
  input  mm_raw_cfg_t         i_cfg,
  input  logic                i_frame_written,
  output logic                o_frame_read,
  output logic [3:0]          o_frames_pending,
  output rd_state_e           o_state,
  // AXI4 read master
  output logic [ADDR_W-1:0]   m_axi_araddr,
  output logic [7:0]          m_axi_arlen,
  output logic [2:0]          m_axi_arsize,
  output logic [1:0]          m_axi_arburst,
  output logic                m_axi_arvalid,
  input  logic                m_axi_arready,
  input  logic [DATA_W-1:0]   m_axi_rdata,
  input  logic [1:0]          m_axi_rresp,
  input  logic                m_axi_rlast,
  input  logic                m_axi_rvalid,
  output logic                m_axi_rready,
  // AXI4-Stream Video master
  output logic [DATA_W-1:0]   m_axis_tdata,
  output logic                m_axis_tvalid,
  input  logic                m_axis_tready,
  output logic                m_axis_tuser,
  output logic                m_axis_tlast
);

  localparam int BSH = $clog2(DATA_W / 8);

  logic [31:0]       wpl;
  logic [ADDR_W-1:0] frame_bytes, region_end, frame_words;
  assign wpl         = i_cfg.hres_bytes >> BSH;
  assign frame_bytes = ADDR_W'(i_cfg.hres_bytes) * ADDR_W'(i_cfg.vres);
  assign frame_words = ADDR_W'(wpl) * ADDR_W'(i_cfg.vres);
  assign region_end  = ADDR_W'(i_cfg.start_addr + i_cfg.mem_size);

  rd_state_e         state;
  logic              first_frame, burst_busy;
  logic [ADDR_W-1:0] base, next_addr, words_to_request, words_to_stream;
  logic [31:0]       col;
  logic              first_word;
  logic [3:0]        frames;
  logic              tnext, frame_last, can_start;
  logic [ADDR_W-1:0] blen;
  logic [ADDR_W-1:0] next_base;

  assign next_base = first_frame ? i_cfg.start_addr :
                     (base + frame_bytes + frame_bytes > region_end) ? i_cfg.start_addr
                                                                     : base + frame_bytes;
  assign can_start = (state == RD_IDLE) && i_enable && (frames >= 4'(FRAMES_DELAY))
                     && (frame_words != '0);
  assign blen      = (words_to_request > ADDR_W'(BURST_LEN)) ? ADDR_W'(BURST_LEN)
                                                             : words_to_request;
  assign tnext      = m_axis_tvalid && m_axis_tready;
  assign frame_last = (words_to_stream == ADDR_W'(1));

  always_ff @(posedge clk) begin
    if (!rst_n || i_restart) begin
      state <= RD_RESET; first_frame <= 1'b1; base <= '0; next_addr <= '0;
      words_to_request <= '0; words_to_stream <= '0; burst_busy <= 1'b0;
      m_axi_arvalid <= 1'b0; m_axi_araddr <= '0; m_axi_arlen <= '0;
      col <= '0; first_word <= 1'b0;
    end else begin
      unique case (state)
        RD_RESET: state <= RD_IDLE;
        RD_IDLE: if (can_start) begin
          base <= next_base; next_addr <= next_base; first_frame <= 1'b0;
          words_to_request <= frame_words; words_to_stream <= frame_words;
          col <= '0; first_word <= 1'b1;
          state <= RD_READ_MEMORY;
        end
        RD_READ_MEMORY: begin
          // address phase: one burst in flight at a time
          if (!burst_busy && !m_axi_arvalid && words_to_request != '0) begin
            m_axi_araddr  <= next_addr;
            m_axi_arlen   <= 8'(blen - ADDR_W'(1));
            m_axi_arvalid <= 1'b1;
            next_addr <= next_addr + (blen << BSH);
            words_to_request <= words_to_request - blen;
          end
          if (m_axi_arvalid && m_axi_arready) begin
            m_axi_arvalid <= 1'b0;
            burst_busy    <= 1'b1;
          end
          if (tnext && m_axi_rlast) burst_busy <= 1'b0;
          // data phase: line and frame tracking
          if (tnext) begin
            first_word <= 1'b0;
            col <= (col == wpl - 32'd1) ? 32'd0 : col + 32'd1;
            words_to_stream <= words_to_stream - ADDR_W'(1);
            if (frame_last) state <= RD_IDLE;
          end
        end
        default: state <= RD_RESET;
      endcase
    end
  end

  assign o_frame_read = tnext && frame_last && (state == RD_READ_MEMORY);

  // frames written to memory and not yet streamed
  always_ff @(posedge clk) begin
    if (!rst_n || i_restart) frames <= '0;
    else frames <= frames + 4'(i_frame_written) - 4'(o_frame_read);
  end

  assign m_axi_arsize  = 3'(BSH);
  assign m_axi_arburst = 2'b01;
  assign m_axi_rready  = m_axis_tready && (state == RD_READ_MEMORY);
  assign m_axis_tvalid = m_axi_rvalid && (state == RD_READ_MEMORY);
  assign m_axis_tdata  = m_axi_rdata;
  assign m_axis_tuser  = first_word;
  assign m_axis_tlast  = (col == wpl - 32'd1);
  assign o_frames_pending = frames;
  assign o_state = state;

  a_ar_hold: assert property (@(posedge clk) disable iff (!rst_n || i_restart)
      m_axi_arvalid && !m_axi_arready |=> m_axi_arvalid && $stable(m_axi_araddr));

  wire unused_rresp = ^m_axi_rresp;

endmodule
