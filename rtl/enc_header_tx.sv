// enc_header_tx: data transmission subsystem of the H.264 encoder wrapper.
//
// Sends each encoded frame to the Memory Manager as an AXI4-Stream of bytes:
// first a fixed-size stream header, then the bytes produced by the encoder
// core, with TLAST on the frame's last byte.
//
// Header (HDR_BYTES = 22 bytes, Annex B byte stream):
//   00 00 00 01, SPS NAL (10 bytes), 00 00 00 01, PPS NAL 68 CE 3C 80.
// The SPS carries the picture size in macroblocks minus one as two ue(v)
// Exp-Golomb fields, so its useful length varies (20 to 36 bits for the
// pair over 640x480 ... 8192x4320); it is built as
//   {fixed prefix, ue(width_mbs-1), ue(height_mbs-1), 5'b11001}
// left-aligned and zero-padded to a fixed 80 bits.  The fixed prefix is the
// NAL header 0x67, profile_idc 66 (baseline), constraint flags 0, level_idc
// LEVEL_IDC, then seq_parameter_set_id, log2_max_frame_num_minus4,
// pic_order_cnt_type, log2_max_pic_order_cnt_lsb_minus4 and
// max_num_ref_frames all ue(0), and gaps_in_frame_num_allowed 0.  The tail
// is frame_mbs_only 1, direct_8x8_inference 1, frame_cropping 0,
// vui_parameters_present 0 and the RBSP stop bit.  No IDR NAL is added.
//
// State machine: RESET -> IDLE; a frame-start pulse (remembered if it comes
// while the previous frame is still draining) moves to HEADER, which
// sends the header bytes; DATA then forwards core bytes until the one marked
// last has been sent, and returns to IDLE.  Core bytes go through a FIFO of
// FIFO_DEPTH entries so that bytes produced while the header is being sent
// are kept.  The newest core byte is held back one strobe so that
// tobytes_DONE can mark it last.  A FIFO overflow is reported on
// o_overflow (the core cannot be stopped).
//
// Origin: a fixed-size SPS/PPS header carrying the frame size in Exp-Golomb
// ahead of each encoded frame follows the original design; the SPS field
// values other than the size, the FIFO and TLAST placement are this design's
// own choices.
module enc_header_tx
  import vc_pkg::*;
#(
  parameter logic [7:0] LEVEL_IDC  = 8'd60,
  parameter int         FIFO_DEPTH = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        i_restart,
  input  logic [15:0] i_hres,
  input  logic [15:0] i_vres,
  input  logic        i_frame_start,
  // encoder core output
  input  logic [7:0]  i_tobytes_byte,
  input  logic        i_tobytes_strobe,
  input  logic        i_tobytes_done,
  // AXI4-Stream master
  output logic [7:0]  m_axis_tdata,
  output logic        m_axis_tvalid,
  input  logic        m_axis_tready,
  output logic        m_axis_tlast,
  output logic        o_overflow,
  output tx_state_e   o_state
);

  localparam int HDR_BYTES = 22;
  localparam int SPS_BITS  = 80;
  localparam int FAW       = $clog2(FIFO_DEPTH);

  // ---------------- header construction ----------------
  logic [32:0] ue_w, ue_h;
  logic [5:0]  len_w, len_h;

  exp_golomb #(.W(16)) u_eg_w (.i_value((i_hres >> 4) - 16'd1), .o_code(ue_w), .o_len(len_w));
  exp_golomb #(.W(16)) u_eg_h (.i_value((i_vres >> 4) - 16'd1), .o_code(ue_h), .o_len(len_h));

  localparam logic [37:0] SPS_PREFIX = {8'h67, 8'd66, 8'h00, LEVEL_IDC, 6'b111110};

  logic [SPS_BITS-1:0]   sps;
  logic [HDR_BYTES*8-1:0] header;

  always_comb begin
    logic [SPS_BITS-1:0] acc;
    int total;
    acc   = SPS_BITS'(SPS_PREFIX);
    acc   = (acc << len_w) | SPS_BITS'(ue_w);
    acc   = (acc << len_h) | SPS_BITS'(ue_h);
    acc   = (acc << 5) | SPS_BITS'(5'b11001);
    total = 38 + int'(len_w) + int'(len_h) + 5;
    sps   = acc << (SPS_BITS - total);
    header = {32'h0000_0001, sps, 32'h0000_0001, 32'h68CE_3C80};
  end

  // ---------------- core byte FIFO ----------------
  logic [8:0]   fifo [FIFO_DEPTH];      // {last, byte}
  logic [FAW:0] wr_ptr, rd_ptr;
  logic         fifo_empty, fifo_full, push, pop;
  logic [8:0]   push_data;
  logic [7:0]   hold;
  logic         hold_valid, flush_pending;

  assign fifo_empty = (wr_ptr == rd_ptr);
  assign fifo_full  = (wr_ptr[FAW] != rd_ptr[FAW]) && (wr_ptr[FAW-1:0] == rd_ptr[FAW-1:0]);

  always_comb begin
    push = 1'b0; push_data = '0;
    if (flush_pending && hold_valid) begin
      push = 1'b1; push_data = {1'b1, hold};
    end else if (i_tobytes_strobe && hold_valid) begin
      push = 1'b1; push_data = {1'b0, hold};
    end else if (i_tobytes_done && hold_valid) begin
      push = 1'b1; push_data = {1'b1, hold};
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || i_restart) begin
      wr_ptr <= '0; hold_valid <= 1'b0; hold <= '0; flush_pending <= 1'b0; o_overflow <= 1'b0;
    end else begin
      if (push) begin
        if (fifo_full) o_overflow <= 1'b1;
        else begin
          fifo[wr_ptr[FAW-1:0]] <= push_data;
          wr_ptr <= wr_ptr + 1'b1;
        end
      end
      if (i_tobytes_strobe) begin
        hold <= i_tobytes_byte; hold_valid <= 1'b1;
        flush_pending <= i_tobytes_done;     // done together with the final byte
      end else if (push) begin
        hold_valid <= 1'b0; flush_pending <= 1'b0;
      end
    end
  end

  // ---------------- transmit state machine ----------------
  tx_state_e  state;
  logic [4:0] hidx;
  logic       hs;

  assign hs = m_axis_tvalid && m_axis_tready;

  always_comb begin
    m_axis_tvalid = 1'b0; m_axis_tdata = '0; m_axis_tlast = 1'b0;
    unique case (state)
      TX_HEADER: begin
        m_axis_tvalid = 1'b1;
        m_axis_tdata  = header[(HDR_BYTES-1-int'(hidx))*8 +: 8];
      end
      TX_DATA: begin
        m_axis_tvalid = !fifo_empty;
        m_axis_tdata  = fifo[rd_ptr[FAW-1:0]][7:0];
        m_axis_tlast  = fifo[rd_ptr[FAW-1:0]][8];
      end
      default: ;
    endcase
  end
  assign pop = (state == TX_DATA) && hs;

  // a frame start seen while the previous frame is still draining is kept
  logic start_req;
  always_ff @(posedge clk) begin
    if (!rst_n || i_restart) begin
      state <= TX_RESET; hidx <= '0; rd_ptr <= '0; start_req <= 1'b0;
    end else begin
      if (i_frame_start) start_req <= 1'b1;
      unique case (state)
        TX_RESET: state <= TX_IDLE;
        TX_IDLE: if (i_frame_start || start_req) begin
          hidx <= '0; state <= TX_HEADER; start_req <= 1'b0;
        end
        TX_HEADER: if (hs) begin
          if (hidx == 5'(HDR_BYTES - 1)) state <= TX_DATA;
          else hidx <= hidx + 5'd1;
        end
        TX_DATA: if (pop) begin
          rd_ptr <= rd_ptr + 1'b1;
          if (m_axis_tlast) state <= TX_IDLE;
        end
        default: state <= TX_RESET;
      endcase
    end
  end

  assign o_state = state;

endmodule
