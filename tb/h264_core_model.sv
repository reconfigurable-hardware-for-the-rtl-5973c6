// h264_core_model: behavioural stand-in for the H.264 encoder core's
// handshake, for testbenches.  It does not compress anything.
//
// On clk2 it raises intra4x4_READYI and intra8x8cc_READYI at random
// (READY_PCT percent of cycles) and records every strobed luma and chroma
// word in queues the testbench can inspect.  On clk it keeps xbuffer_DONE
// low for a few cycles after each NEWLINE (the core is busy starting a
// line), emits one output byte for every completed macroblock (64 luma
// words), and after align_VALID emits three more bytes followed by a
// one-cycle tobytes_DONE.  Bytes are numbered 0, 1, 2 ... so the output
// stream can be checked.
//
// Origin: a behavioural stand-in for an external part; its timing is this
// design's own choice, only its ports follow the original.
module h264_core_model #(
  parameter int READY_PCT = 70
) (
  input  logic        clk,
  input  logic        clk2,
  input  logic        rst_n,
  input  logic        newslice,
  input  logic        newline,
  input  logic [5:0]  qp,
  input  logic        intra4x4_strobei,
  input  logic [31:0] intra4x4_datai,
  output logic        intra4x4_readyi,
  input  logic        intra8x8cc_strobei,
  input  logic [31:0] intra8x8cc_datai,
  output logic        intra8x8cc_readyi,
  input  logic        align_valid,
  output logic        xbuffer_done,
  output logic [7:0]  tobytes_byte,
  output logic        tobytes_strobe,
  output logic        tobytes_done
);
  logic [31:0] y_q [$];
  logic [31:0] uv_q [$];
  int unsigned n_y, n_uv, n_mb, n_newline, n_newslice, n_align, n_bytes;
  int          ready_pct = READY_PCT;
  int          busy;
  int          tail;
  logic        aligning;
  logic [5:0]  last_qp;

  always @(posedge clk2 or negedge rst_n) begin
    if (!rst_n) begin
      intra4x4_readyi <= 1'b0; intra8x8cc_readyi <= 1'b0;
      n_y = 0; n_uv = 0; n_mb = 0;
      y_q.delete(); uv_q.delete();
    end else begin
      intra4x4_readyi   <= ($urandom % 100) < ready_pct;
      intra8x8cc_readyi <= ($urandom % 100) < ready_pct;
      if (intra4x4_strobei) begin
        y_q.push_back(intra4x4_datai);
        n_y++;
        if (n_y % 64 == 0) n_mb++;
      end
      if (intra8x8cc_strobei) begin
        uv_q.push_back(intra8x8cc_datai);
        n_uv++;
      end
    end
  end

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xbuffer_done <= 1'b0; tobytes_strobe <= 1'b0; tobytes_done <= 1'b0; tobytes_byte <= '0;
      busy = 0; tail = 0; aligning = 1'b0;
      n_newline = 0; n_newslice = 0; n_align = 0; n_bytes = 0; last_qp = '0;
    end else begin
      tobytes_strobe <= 1'b0;
      tobytes_done   <= 1'b0;
      if (newline) begin n_newline++; busy = 4; end
      if (newslice) n_newslice++;
      last_qp = qp;
      if (busy != 0) busy--;
      xbuffer_done <= (busy == 0) && !newline;
      if (align_valid) begin n_align++; aligning = 1'b1; tail = 3; end
      if (n_bytes < n_mb) begin
        tobytes_byte <= 8'(n_bytes); tobytes_strobe <= 1'b1; n_bytes++;
      end else if (aligning && tail != 0) begin
        tobytes_byte <= 8'(n_bytes); tobytes_strobe <= 1'b1; n_bytes++; n_mb++; tail--;
      end else if (aligning) begin
        tobytes_done <= 1'b1; aligning = 1'b0;
      end
    end
  end
endmodule
