// enc_acquisition: data acquisition subsystem of the H.264 encoder wrapper.
//
// Input: raw video on an AXI4-Stream Video slave, TDATA_W bits per beat,
// 32 bits per pixel in YUYV 4:2:2 order with 16-bit containers holding
// 10-bit samples: for the pixel pair p, Y0 = bits [64p+15:64p],
// U = [64p+31:64p+16], Y1 = [64p+47:64p+32], V = [64p+63:64p+48].
// Conversion to 8-bit 4:2:0 keeps bits [9:2] of each sample, every luma
// sample, and the chroma samples of the even lines of each frame (lines
// 0, 2, 4 ...); chroma of odd lines is discarded.
//
// Buffering: luma goes to a Y buffer and chroma to separate U and V
// buffers, each double-buffered ("halves"), each half holding one band of
// 16 luma lines (8 chroma lines) of up to MAX_W pixels as 32-bit words of
// four samples.  The Y buffer is split into TDATA_W/128 banks and U/V into
// TDATA_W/256 banks so a whole beat is written in one cycle.  When a half
// is full the writer moves to the other half; if that one is still being
// encoded TREADY drops until it is released.  The first TUSER after a
// restart aligns the writer to a frame; the frame geometry is then counted.
//
// Delivery to the encoder core uses three co-operating state machines.  The
// main machine (clk) sequences PREPARE_NEXT_FRAME (pulse NEWSLICE once a
// band is buffered), PREPARE_NEW_LINE (wait for xbuffer_DONE and a full
// band, pulse NEWLINE), ENCODE_LINE (the band is delivered) and
// ALIGN_ENCODER (pulse align_VALID after the last band, wait for
// tobytes_DONE).  The Y and UV machines (clk2, twice the clock rate,
// rising edges aligned with clk) deliver one macroblock each - 64 luma words,
// then 16 U and 16 V words - and meet in WAIT_SYNC before the next
// macroblock, so the two components stay in step.  Words are read in the
// order given by enc_mb_addr; a word is read when the core's ready input is
// high and strobed to the core one clk2 cycle later.  When the Y machine has
// delivered the whole band and UV is waiting, it flags band done to the main
// machine (and enters END_OF_FRAME after the last band of a frame).
//
// Widths and resolutions must be multiples of 16; TDATA_W must be a
// multiple of 256.
//
// Origin: the 4:2:2 to 4:2:0 conversion, 16-line double-buffered bands, the
// main/Y/UV state machines and their states follow the original design; the
// bit layout of a beat, truncation to 8 bits and the banking are this
// design's own choices.
module enc_acquisition
  import vc_pkg::*;
#(
  parameter int TDATA_W = 256,
  parameter int MAX_W   = 8192
) (
  input  logic               clk,
  input  logic               clk2,
  input  logic               rst_n,
  input  logic               i_restart,
  input  logic               i_enable,
  input  enc_cfg_t           i_cfg,
  // raw video in
  input  logic [TDATA_W-1:0] s_axis_tdata,
  input  logic               s_axis_tvalid,
  output logic               s_axis_tready,
  input  logic               s_axis_tuser,
  input  logic               s_axis_tlast,
  // encoder core control (clk)
  output logic               o_newslice,
  output logic               o_newline,
  output logic               o_align_valid,
  input  logic               i_xbuffer_done,
  input  logic               i_tobytes_done,
  // encoder core data (clk2)
  output logic               o_intra4x4_strobe,
  output logic [31:0]        o_intra4x4_data,
  input  logic               i_intra4x4_readyi,
  output logic               o_intra8x8cc_strobe,
  output logic [31:0]        o_intra8x8cc_data,
  input  logic               i_intra8x8cc_readyi,
  // to the transmission subsystem and for observation
  output logic               o_frame_start,
  output enc_main_state_e    o_main_state,
  output enc_comp_state_e    o_y_state,
  output enc_comp_state_e    o_uv_state
);

  localparam int PIX   = TDATA_W / 32;          // pixels per beat
  localparam int YW    = PIX / 4;               // luma words per beat
  localparam int UVW   = PIX / 8;               // words per chroma component per beat
  localparam int YBUF  = 16 * MAX_W / 4;        // luma words per half
  localparam int UVBUF = 8 * MAX_W / 8;         // words per chroma component per half
  localparam int YAW   = $clog2(2 * YBUF);
  localparam int UVAW  = $clog2(2 * UVBUF);
  localparam int YIW   = $clog2(2 * YBUF / YW);
  localparam int UVIW  = $clog2(2 * UVBUF / UVW);
  localparam int YBW   = (YW > 1) ? $clog2(YW) : 1;
  localparam int UVBW  = (UVW > 1) ? $clog2(UVW) : 1;
  localparam int CW    = 20;

  // ---------------- geometry ----------------
  logic [15:0] y_fw, uv_fw, n_mb, n_bands;
  assign y_fw    = i_cfg.hres >> 2;
  assign uv_fw   = i_cfg.hres >> 3;
  assign n_mb    = i_cfg.hres >> 4;
  assign n_bands = i_cfg.vres >> 4;

  // ---------------- band memories ----------------
  logic [31:0] ymem  [YW]  [2*YBUF/YW];
  logic [31:0] umem  [UVW] [2*UVBUF/UVW];
  logic [31:0] vmem  [UVW] [2*UVBUF/UVW];

  // ---------------- writer (clk) ----------------
  logic        synced, wr_half;
  logic [1:0]  half_full, half_clr;
  logic [15:0] count_w;          // pixel position in the line
  logic [4:0]  line;             // line inside the band
  logic        take, accept, line_end;
  logic [YAW-1:0]  y_waddr;
  logic [UVAW-1:0] uv_waddr;
  logic            chroma_line;

  assign s_axis_tready = i_enable && !half_full[wr_half];
  assign take     = s_axis_tvalid && s_axis_tready;
  assign accept   = take && (synced || s_axis_tuser);
  assign line_end = (32'(count_w) + 32'(PIX) >= 32'(i_cfg.hres));
  assign chroma_line = !line[0];
  assign y_waddr  = YAW'(32'(wr_half) * YBUF + 32'(line) * 32'(y_fw) + 32'(count_w >> 2));
  assign uv_waddr = UVAW'(32'(wr_half) * UVBUF + 32'(line >> 1) * 32'(uv_fw) + 32'(count_w >> 3));

  always_ff @(posedge clk) begin
    if (accept) begin
      for (int j = 0; j < YW; j++)
        ymem[j][YIW'(y_waddr / YAW'(YW))] <=
          {s_axis_tdata[(4*j+3)*32+2 +: 8], s_axis_tdata[(4*j+2)*32+2 +: 8],
           s_axis_tdata[(4*j+1)*32+2 +: 8], s_axis_tdata[(4*j)*32+2 +: 8]};
      if (chroma_line)
        for (int k = 0; k < UVW; k++) begin
          umem[k][UVIW'(uv_waddr / UVAW'(UVW))] <=
            {s_axis_tdata[(4*k+3)*64+18 +: 8], s_axis_tdata[(4*k+2)*64+18 +: 8],
             s_axis_tdata[(4*k+1)*64+18 +: 8], s_axis_tdata[(4*k)*64+18 +: 8]};
          vmem[k][UVIW'(uv_waddr / UVAW'(UVW))] <=
            {s_axis_tdata[(4*k+3)*64+50 +: 8], s_axis_tdata[(4*k+2)*64+50 +: 8],
             s_axis_tdata[(4*k+1)*64+50 +: 8], s_axis_tdata[(4*k)*64+50 +: 8]};
        end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n || i_restart) begin
      synced <= 1'b0; wr_half <= 1'b0; half_full <= '0; count_w <= '0; line <= '0;
    end else begin
      logic [1:0] hf;
      hf = half_full & ~half_clr;
      if (accept) begin
        synced <= 1'b1;
        if (line_end) begin
          count_w <= '0;
          if (line == 5'd15) begin
            line <= '0;
            hf[wr_half] = 1'b1;
            wr_half <= ~wr_half;
          end else begin
            line <= line + 5'd1;
          end
        end else begin
          count_w <= count_w + 16'(PIX);
        end
      end
      half_full <= hf;
    end
  end

  wire unused_tlast = s_axis_tlast;

  // ---------------- main state machine (clk) ----------------
  enc_main_state_e mstate;
  logic            rd_half;
  logic [15:0]     rd_band;
  logic            band_done;        // clk2 domain, level
  logic            main_encode, last_band;

  assign main_encode = (mstate == EM_ENCODE_LINE);
  assign last_band   = (rd_band == n_bands - 16'd1);

  always_ff @(posedge clk) begin
    if (!rst_n || i_restart) begin
      mstate <= EM_RESET; rd_half <= 1'b0; rd_band <= '0; half_clr <= '0;
      o_newslice <= 1'b0; o_newline <= 1'b0; o_align_valid <= 1'b0; o_frame_start <= 1'b0;
    end else begin
      o_newslice <= 1'b0; o_newline <= 1'b0; o_align_valid <= 1'b0; o_frame_start <= 1'b0;
      half_clr <= '0;
      unique case (mstate)
        EM_RESET: if (i_enable) mstate <= EM_PREPARE_NEXT_FRAME;
        EM_PREPARE_NEXT_FRAME:
          if (half_full[rd_half]) begin
            o_newslice <= 1'b1; o_frame_start <= 1'b1;
            mstate <= EM_PREPARE_NEW_LINE;
          end
        EM_PREPARE_NEW_LINE:
          if (i_xbuffer_done && half_full[rd_half]) begin
            o_newline <= 1'b1;
            mstate <= EM_ENCODE_LINE;
          end
        EM_ENCODE_LINE:
          if (band_done) begin
            half_clr[rd_half] <= 1'b1;
            rd_half <= ~rd_half;
            if (last_band) begin
              rd_band <= '0;
              o_align_valid <= 1'b1;
              mstate <= EM_ALIGN_ENCODER;
            end else begin
              rd_band <= rd_band + 16'd1;
              mstate <= EM_PREPARE_NEW_LINE;
            end
          end
        EM_ALIGN_ENCODER: if (i_tobytes_done) mstate <= EM_PREPARE_NEXT_FRAME;
        default: mstate <= EM_RESET;
      endcase
    end
  end

  // ---------------- Y and UV state machines (clk2) ----------------
  enc_comp_state_e ystate, uvstate;
  logic [CW-1:0]   y_count, y_total, uv_base;
  logic [5:0]      y_mb_word;
  logic [4:0]      uv_k;
  logic            sync_go, y_issue, uv_issue;
  logic [YAW-2:0]  y_addr;
  logic [UVAW-2:0] uv_addr;

  assign y_total  = CW'(n_mb) * CW'(64);
  assign sync_go  = main_encode && !band_done && (ystate == CS_WAIT_SYNC) &&
                    (uvstate == CS_WAIT_SYNC) && (y_count != y_total);
  assign y_issue  = (ystate == CS_ABLE) && i_intra4x4_readyi;
  assign uv_issue = (uvstate == CS_ABLE) && i_intra8x8cc_readyi;

  enc_mb_addr #(.CW(CW), .AW(YAW-1)) u_y_addr (
    .i_y_count(y_count), .i_uv_count(CW'(0)), .i_y_frame_width(y_fw),
    .i_uv_frame_width(uv_fw), .o_y_addr(y_addr), .o_uv_addr()
  );
  enc_mb_addr #(.CW(CW), .AW(UVAW-1)) u_uv_addr (
    .i_y_count(CW'(0)), .i_uv_count(uv_base + CW'(uv_k[3:0])), .i_y_frame_width(y_fw),
    .i_uv_frame_width(uv_fw), .o_y_addr(), .o_uv_addr(uv_addr)
  );

  always_ff @(posedge clk2) begin
    if (!rst_n || i_restart) begin
      ystate <= CS_RESET; uvstate <= CS_RESET; band_done <= 1'b0;
      y_count <= '0; y_mb_word <= '0; uv_base <= '0; uv_k <= '0;
    end else begin
      // luma
      unique case (ystate)
        CS_RESET: ystate <= CS_WAIT_SYNC;
        CS_WAIT_SYNC: begin
          if (!main_encode) begin
            y_count <= '0; band_done <= 1'b0;
          end else if (sync_go) begin
            ystate <= CS_ABLE;
          end else if (!band_done && y_count == y_total && uvstate == CS_WAIT_SYNC) begin
            band_done <= 1'b1;
            if (last_band) ystate <= CS_END_OF_FRAME;
          end
        end
        CS_ABLE: if (y_issue) begin
          y_count   <= y_count + CW'(1);
          y_mb_word <= y_mb_word + 6'd1;
          if (y_mb_word == 6'd63) ystate <= CS_WAIT_SYNC;
        end
        CS_END_OF_FRAME: if (!main_encode) begin
          y_count <= '0; band_done <= 1'b0; ystate <= CS_WAIT_SYNC;
        end
        default: ystate <= CS_RESET;
      endcase
      // chroma
      unique case (uvstate)
        CS_RESET: uvstate <= CS_WAIT_SYNC;
        CS_WAIT_SYNC: begin
          if (!main_encode) uv_base <= '0;
          else if (sync_go) uvstate <= CS_ABLE;
        end
        CS_ABLE: if (uv_issue) begin
          uv_k <= uv_k + 5'd1;
          if (uv_k == 5'd31) begin
            uv_base <= uv_base + CW'(16);
            uvstate <= CS_WAIT_SYNC;
          end
        end
        default: uvstate <= CS_RESET;
      endcase
    end
  end

  // buffer reads, one clk2 cycle of latency, then strobe
  logic [YAW-1:0]  y_raddr;
  logic [UVAW-1:0] uv_raddr;
  logic [31:0]     y_q [YW];
  logic [31:0]     u_q [UVW];
  logic [31:0]     v_q [UVW];
  logic [YBW-1:0]  y_bank_q;
  logic [UVBW-1:0] uv_bank_q;
  logic            uv_is_v_q;

  assign y_raddr  = YAW'(32'(rd_half) * YBUF + 32'(y_addr));
  assign uv_raddr = UVAW'(32'(rd_half) * UVBUF + 32'(uv_addr));

  always_ff @(posedge clk2) begin
    if (y_issue)
      for (int j = 0; j < YW; j++) y_q[j] <= ymem[j][YIW'(y_raddr / YAW'(YW))];
    if (uv_issue)
      for (int k = 0; k < UVW; k++) begin
        u_q[k] <= umem[k][UVIW'(uv_raddr / UVAW'(UVW))];
        v_q[k] <= vmem[k][UVIW'(uv_raddr / UVAW'(UVW))];
      end
  end

  always_ff @(posedge clk2) begin
    if (!rst_n || i_restart) begin
      o_intra4x4_strobe <= 1'b0; o_intra8x8cc_strobe <= 1'b0;
      y_bank_q <= '0; uv_bank_q <= '0; uv_is_v_q <= 1'b0;
    end else begin
      o_intra4x4_strobe   <= y_issue;
      o_intra8x8cc_strobe <= uv_issue;
      if (y_issue)  y_bank_q  <= YBW'(y_raddr % YAW'(YW));
      if (uv_issue) begin
        uv_bank_q <= UVBW'(uv_raddr % UVAW'(UVW));
        uv_is_v_q <= uv_k[4];
      end
    end
  end

  assign o_intra4x4_data   = y_q[y_bank_q];
  assign o_intra8x8cc_data = uv_is_v_q ? v_q[uv_bank_q] : u_q[uv_bank_q];

  assign o_main_state = mstate;
  assign o_y_state    = ystate;
  assign o_uv_state   = uvstate;

  initial begin
    assert (TDATA_W % 256 == 0) else $error("TDATA_W must be a multiple of 256");
  end

endmodule
