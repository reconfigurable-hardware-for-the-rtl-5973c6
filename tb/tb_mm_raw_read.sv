// tb_mm_raw_read: checks the raw video read subsystem against a memory model.
//
// Frames are placed in the memory model at the addresses the write side
// would use (consecutive, back to the start of the region when the next
// one would not fit) and announced one by one with i_frame_written.  With
// FRAMES_DELAY = 2 the reader must stay idle until two frames are stored,
// then stream every frame in order: the words, start of frame on the first
// word and end of line on the last word of each line are compared with the
// expected values while the video sink applies random back-pressure and
// the memory stalls at random.  The frames counter must follow written
// minus read frames, and with neither side stalling a frame must stream
// at close to one word per clock.
//
// Origin: the expected values are computed here independently of the RTL,
// from the behaviour the original design specifies; the stimulus sizes are
// this testbench's own choice.
module tb_mm_raw_read;
  import vc_pkg::*;
  localparam int DATA_W = 64, ADDR_W = 32, BL = 8, FD = 2;
  localparam int WPL = 6, VRES = 4, FB = WPL * VRES * 8, NWF = WPL * VRES;
  localparam longint START = 64'h2000, SIZE = 3 * FB + 50;

  logic clk = 0, rst_n = 0, restart = 0, enable = 0, frame_written = 0;
  mm_raw_cfg_t cfg;
  logic frame_read;
  logic [3:0] frames_pending;
  rd_state_e state;
  logic [ADDR_W-1:0] araddr; logic [7:0] arlen; logic [2:0] arsize; logic [1:0] arburst;
  logic arvalid, arready, rlast, rvalid, rready;
  logic [DATA_W-1:0] rdata; logic [1:0] rresp;
  logic [DATA_W-1:0] tdata; logic tvalid, tready = 0, tuser, tlast;
  logic awready, wready, bvalid; logic [1:0] bresp;
  int checks = 0, failures = 0;
  int sink_stall = 30;
  int n_words = 0, n_read = 0, n_bad = 0, n_sof = 0, n_eol = 0;
  int exp_frame = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;

  mm_raw_read #(.DATA_W(DATA_W), .ADDR_W(ADDR_W), .BURST_LEN(BL), .FRAMES_DELAY(FD)) dut (
    .clk, .rst_n, .i_restart(restart), .i_enable(enable), .i_cfg(cfg),
    .i_frame_written(frame_written), .o_frame_read(frame_read),
    .o_frames_pending(frames_pending), .o_state(state),
    .m_axi_araddr(araddr), .m_axi_arlen(arlen), .m_axi_arsize(arsize), .m_axi_arburst(arburst),
    .m_axi_arvalid(arvalid), .m_axi_arready(arready), .m_axi_rdata(rdata), .m_axi_rresp(rresp),
    .m_axi_rlast(rlast), .m_axi_rvalid(rvalid), .m_axi_rready(rready),
    .m_axis_tdata(tdata), .m_axis_tvalid(tvalid), .m_axis_tready(tready),
    .m_axis_tuser(tuser), .m_axis_tlast(tlast));

  axi_mem_model #(.DATA_W(DATA_W), .ADDR_W(ADDR_W), .STALL(20)) u_mem (
    .clk, .rst_n,
    .awaddr('0), .awlen('0), .awvalid(1'b0), .awready, .wdata('0), .wstrb('0), .wlast(1'b0),
    .wvalid(1'b0), .wready, .bresp, .bvalid, .bready(1'b0),
    .araddr, .arlen, .arvalid, .arready, .rdata, .rresp, .rlast, .rvalid, .rready);

  function automatic logic [63:0] pat(int f, int w);
    return {32'hF00D0000 | 32'(f), 32'(w)};
  endfunction

  // sink: random back-pressure, compares every word
  int widx = 0;
  always @(negedge clk) tready <= ($urandom % 100) >= sink_stall;
  always_ff @(posedge clk) if (rst_n) begin
    if (tvalid && tready) begin
      n_words <= n_words + 1;
      if (tdata != pat(exp_frame, widx)) n_bad <= n_bad + 1;
      if (tuser != (widx == 0)) n_bad <= n_bad + 1;
      if (tlast != (widx % WPL == WPL - 1)) n_bad <= n_bad + 1;
      if (tuser) n_sof <= n_sof + 1;
      if (tlast) n_eol <= n_eol + 1;
      if (widx == NWF - 1) begin widx <= 0; exp_frame <= exp_frame + 1; end
      else widx <= widx + 1;
    end
    if (frame_read) n_read <= n_read + 1;
    if (arvalid && (arsize != 3 || arburst != 2'b01 || int'(arlen) >= BL)) begin
      failures <= failures + 1; $display("FAIL AR attributes");
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(longint got, longint e, string what);
    checks++;
    if (got != e) begin failures++; $display("FAIL %s: %0d expected %0d", what, got, e); end
  endtask

  longint base = START;
  task automatic store(int f);
    for (int w = 0; w < NWF; w++) u_mem.poke(base + w * 8, pat(f, w));
    if (base + 2 * FB > START + SIZE) base = START; else base = base + FB;
    @(negedge clk); frame_written = 1; @(negedge clk); frame_written = 0;
  endtask

  longint t0;
  initial begin
    cfg = '{start_addr: START, mem_size: SIZE, hres_bytes: WPL * 8, vres: VRES};
    repeat (3) @(posedge clk);
    rst_n = 1;
    enable = 1;
    @(negedge clk); restart = 1; @(negedge clk); restart = 0;
    // first frame alone must not be read (two frames of delay)
    store(0);
    repeat (200) @(posedge clk);
    expect_eq(n_words, 0, "nothing read before the delay");
    expect_eq(frames_pending, 1, "one frame pending");
    store(1);
    repeat (400) @(posedge clk);
    expect_eq(n_read, 1, "first frame read after the second is stored");
    expect_eq(frames_pending, 1, "one frame still pending");
    // more frames, wrapping around the region
    for (int f = 2; f < 6; f++) begin
      store(f);
      repeat (400) @(posedge clk);
    end
    expect_eq(n_read, 5, "frames read");
    expect_eq(n_words, 5 * NWF, "words read");
    expect_eq(n_bad, 0, "word, start of frame and end of line checks");
    expect_eq(n_sof, 5, "start of frame count");
    expect_eq(n_eol, 5 * VRES, "end of line count");
    // throughput without stalls
    sink_stall = 0; u_mem.stall_pct = 0;
    store(6);
    t0 = cyc;
    wait (n_read == 6);
    checks++;
    if (cyc - t0 > NWF + 3 * 8) begin
      failures++; $display("FAIL frame streamed in %0d cycles", cyc - t0);
    end
    // disabling the reader holds the stream
    enable = 0;
    store(7);
    repeat (300) @(posedge clk);
    expect_eq(n_read, 6, "disabled reader is idle");
    enable = 1;
    repeat (300) @(posedge clk);
    expect_eq(n_read, 7, "re-enabled reader resumes");
    expect_eq(n_bad, 0, "all words correct");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
