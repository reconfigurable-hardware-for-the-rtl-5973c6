// tb_enc_acquisition: checks the encoder's data acquisition and delivery.
//
// Frames of 64x32 pixels (two bands of four macroblocks) are streamed in as
// 256-bit YUYV 4:2:2 beats with 10-bit samples; every sample value is a
// known function of frame, line and position, and chroma differs between
// even and odd lines.  A behavioural core model accepts the words.  The
// testbench rebuilds, independently of the block, the 8-bit 4:2:0 words the
// core must receive: per macroblock 64 luma words (16 rows of 4 words,
// four pixels per word, first pixel in the low byte) and 16 U then 16 V
// words taken from the even lines, and compares them in order.  It counts
// NEWSLICE per frame, NEWLINE per band and align_VALID per frame, checks
// that TREADY is withdrawn while both band halves wait for a slow core,
// and, with the core always ready, that a band of n macroblocks is
// delivered in about 64 n clk2 cycles (one luma word per clk2 cycle).
//
// Origin: the expected values are computed here independently of the RTL,
// from the behaviour the original design specifies; the stimulus sizes are
// this testbench's own choice.
module tb_enc_acquisition;
  import vc_pkg::*;
  localparam int TDATA_W = 256, MAX_W = 64, W = 64, H = 32, BPL = W / 8;
  localparam int NMB = W / 16, NBAND = H / 16;
  logic clk = 0, clk2 = 1, rst_n = 0, restart = 0, enable = 0;
  enc_cfg_t cfg;
  logic [TDATA_W-1:0] tdata = 0; logic tvalid = 0, tready, tuser = 0, tlast = 0;
  logic newslice, newline, align_valid, xbuffer_done, tobytes_done;
  logic y_strobe, uv_strobe, y_ready, uv_ready;
  logic [31:0] y_data, uv_data;
  logic frame_start;
  enc_main_state_e mstate;
  enc_comp_state_e ystate, uvstate;
  logic [7:0] tob_byte; logic tob_strobe;
  int checks = 0, failures = 0;
  int n_stall = 0, n_fs = 0;
  longint c2 = 0, enc_c2 = 0;

  always #10 clk = ~clk;
  always #5 clk2 = ~clk2;

  enc_acquisition #(.TDATA_W(TDATA_W), .MAX_W(MAX_W)) dut (
    .clk, .clk2, .rst_n, .i_restart(restart), .i_enable(enable), .i_cfg(cfg),
    .s_axis_tdata(tdata), .s_axis_tvalid(tvalid), .s_axis_tready(tready),
    .s_axis_tuser(tuser), .s_axis_tlast(tlast),
    .o_newslice(newslice), .o_newline(newline), .o_align_valid(align_valid),
    .i_xbuffer_done(xbuffer_done), .i_tobytes_done(tobytes_done),
    .o_intra4x4_strobe(y_strobe), .o_intra4x4_data(y_data), .i_intra4x4_readyi(y_ready),
    .o_intra8x8cc_strobe(uv_strobe), .o_intra8x8cc_data(uv_data),
    .i_intra8x8cc_readyi(uv_ready),
    .o_frame_start(frame_start), .o_main_state(mstate), .o_y_state(ystate),
    .o_uv_state(uvstate));

  h264_core_model #(.READY_PCT(20)) u_core (
    .clk, .clk2, .rst_n, .newslice, .newline, .qp(6'd28),
    .intra4x4_strobei(y_strobe), .intra4x4_datai(y_data), .intra4x4_readyi(y_ready),
    .intra8x8cc_strobei(uv_strobe), .intra8x8cc_datai(uv_data),
    .intra8x8cc_readyi(uv_ready), .align_valid, .xbuffer_done,
    .tobytes_byte(tob_byte), .tobytes_strobe(tob_strobe), .tobytes_done);

  always_ff @(posedge clk) if (rst_n) begin
    if (tvalid && !tready) n_stall <= n_stall + 1;
    if (frame_start) n_fs <= n_fs + 1;
  end
  always_ff @(posedge clk2) begin
    c2 <= c2 + 1;
    if (rst_n && mstate == EM_ENCODE_LINE) enc_c2 <= enc_c2 + 1;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [9:0] y10(int f, int x, int y);
    return 10'(x * 5 + y * 3 + f * 11 + 1);
  endfunction
  function automatic logic [9:0] u10(int f, int cx, int y);
    return 10'(cx * 7 + y * 2 + f * 13 + 100);
  endfunction
  function automatic logic [9:0] v10(int f, int cx, int y);
    return 10'(cx * 3 + y * 9 + f * 17 + 200);
  endfunction

  task automatic send_frame(int f, int gap);
    for (int y = 0; y < H; y++)
      for (int j = 0; j < BPL; j++) begin
        logic [TDATA_W-1:0] d;
        for (int p = 0; p < 4; p++) begin
          int x0 = 8 * j + 2 * p;
          d[64*p +: 16]      = {6'd0, y10(f, x0, y)};
          d[64*p + 16 +: 16] = {6'd0, u10(f, x0 / 2, y)};
          d[64*p + 32 +: 16] = {6'd0, y10(f, x0 + 1, y)};
          d[64*p + 48 +: 16] = {6'd0, v10(f, x0 / 2, y)};
        end
        @(negedge clk);
        while (($urandom % 100) < gap) @(negedge clk);
        tdata = d; tuser = (y == 0 && j == 0); tlast = (j == BPL - 1); tvalid = 1;
        do @(posedge clk); while (!tready);
        #1 tvalid = 0; tuser = 0; tlast = 0;
      end
  endtask

  // expected words of a frame, in delivery order
  task automatic check_frame(int f);
    int bad_y = 0, bad_uv = 0;
    for (int b = 0; b < NBAND; b++)
      for (int m = 0; m < NMB; m++) begin
        for (int r = 0; r < 16; r++)
          for (int w = 0; w < 4; w++) begin
            logic [31:0] e;
            for (int k = 0; k < 4; k++) e[8*k +: 8] = y10(f, m*16 + w*4 + k, b*16 + r)[9:2];
            if (u_core.y_q.size() == 0) bad_y++;
            else if (u_core.y_q.pop_front() != e) bad_y++;
          end
        for (int c = 0; c < 2; c++)
          for (int r = 0; r < 8; r++)
            for (int w = 0; w < 2; w++) begin
              logic [31:0] e;
              for (int k = 0; k < 4; k++)
                e[8*k +: 8] = (c == 0) ? u10(f, m*8 + w*4 + k, b*16 + 2*r)[9:2]
                                       : v10(f, m*8 + w*4 + k, b*16 + 2*r)[9:2];
              if (u_core.uv_q.size() == 0) bad_uv++;
              else if (u_core.uv_q.pop_front() != e) bad_uv++;
            end
      end
    checks += 2;
    if (bad_y != 0)  begin failures++; $display("FAIL frame %0d: %0d bad luma words", f, bad_y); end
    if (bad_uv != 0) begin failures++; $display("FAIL frame %0d: %0d bad chroma words", f, bad_uv); end
  endtask

  task automatic expect_eq(longint got, longint e, string what);
    checks++;
    if (got != e) begin failures++; $display("FAIL %s: %0d expected %0d", what, got, e); end
  endtask

  longint t0;
  initial begin
    cfg = '{hres: 16'(W), vres: 16'(H), fps: 16'd60};
    repeat (3) @(posedge clk);
    rst_n = 1;
    enable = 1;
    @(negedge clk); restart = 1; @(negedge clk); restart = 0;
    // a partial frame before the first start of frame is ignored
    for (int j = 0; j < 3; j++) begin
      @(negedge clk); tdata = '1; tvalid = 1; tlast = 0;
      @(posedge clk); #1 tvalid = 0;
    end
    // slow core: the input must be held back
    for (int f = 0; f < 3; f++) send_frame(f, 10);
    wait (u_core.n_align == 3 && mstate == EM_PREPARE_NEXT_FRAME);
    repeat (20) @(posedge clk);
    for (int f = 0; f < 3; f++) check_frame(f);
    expect_eq(u_core.n_newslice, 3, "NEWSLICE per frame");
    expect_eq(u_core.n_newline, 3 * NBAND, "NEWLINE per band");
    expect_eq(u_core.n_align, 3, "align_VALID per frame");
    expect_eq(n_fs, 3, "frame starts");
    checks++;
    if (n_stall == 0) begin failures++; $display("FAIL input was never held back"); end
    expect_eq(u_core.y_q.size(), 0, "no extra luma words");
    expect_eq(u_core.uv_q.size(), 0, "no extra chroma words");
    // fast core: delivery rate
    u_core.ready_pct = 100;
    enc_c2 = 0;
    send_frame(3, 0);
    wait (u_core.n_align == 4 && mstate == EM_PREPARE_NEXT_FRAME);
    check_frame(3);
    checks++;
    if (enc_c2 > NBAND * NMB * (64 + 8) + 40) begin
      failures++; $display("FAIL delivery took %0d clk2 cycles", enc_c2);
    end
    $display("delivery of %0d macroblocks: %0d clk2 cycles", NBAND * NMB, enc_c2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
