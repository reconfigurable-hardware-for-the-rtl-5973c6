// tb_mm_raw_write: checks the raw video write subsystem against a memory model.
//
// Small frames (6 words per line, 4 lines, 8-byte words, 8-word bursts) are
// streamed in with random gaps while the memory model stalls at random.
// For every frame the testbench predicts the base address itself (start of
// the region, then consecutive frames, back to the start when the next
// frame would not fit) and compares the memory with the words sent.  It
// then provokes, one at a time and each followed by a restart: a line that
// ends early, a line that ends late, a start of frame in the middle of a
// frame, a memory too slow for the stream (unwritten data), and an error
// with halting enabled, and checks the status bit each one sets, that the
// frame following a wrongly sized one is written at its proper address,
// and that a halted writer issues no more bursts.  The time from a burst's
// address to its response is checked against the burst length.
//
// Origin: the expected values are computed here independently of the RTL,
// from the behaviour the original design specifies; the stimulus sizes are
// this testbench's own choice.
module tb_mm_raw_write;
  import vc_pkg::*;
  localparam int DATA_W = 64, ADDR_W = 32, BL = 8;
  localparam int WPL = 6, VRES = 4, FB = WPL * VRES * 8;
  localparam longint START = 64'h1000, SIZE = 3 * FB + 50;

  logic clk = 0, rst_n = 0, restart = 0, enable = 0, halt_en = 0;
  mm_raw_cfg_t cfg;
  logic [DATA_W-1:0] tdata = 0;
  logic tvalid = 0, tready, tuser = 0, tlast = 0;
  logic [4:0] status;
  logic frame_written, rectified;
  logic [1:0] check_counter;
  logic [ADDR_W-1:0] awaddr; logic [7:0] awlen; logic [2:0] awsize; logic [1:0] awburst;
  logic awvalid, awready, wlast, wvalid, wready, bvalid, bready;
  logic [DATA_W-1:0] wdata; logic [DATA_W/8-1:0] wstrb; logic [1:0] bresp;
  logic arready, rlast, rvalid; logic [DATA_W-1:0] rdata; logic [1:0] rresp;
  int checks = 0, failures = 0;
  int n_written = 0, n_rect = 0, n_wrap = 0;
  longint cyc = 0, aw_t = 0;
  int max_burst_cycles = 0;

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;

  mm_raw_write #(.DATA_W(DATA_W), .ADDR_W(ADDR_W), .BURST_LEN(BL)) dut (
    .clk, .rst_n, .i_restart(restart), .i_enable(enable), .i_halt_en(halt_en), .i_cfg(cfg),
    .s_axis_tdata(tdata), .s_axis_tvalid(tvalid), .s_axis_tready(tready),
    .s_axis_tuser(tuser), .s_axis_tlast(tlast),
    .o_status(status), .o_frame_written(frame_written), .o_rectified(rectified),
    .o_check_counter(check_counter),
    .m_axi_awaddr(awaddr), .m_axi_awlen(awlen), .m_axi_awsize(awsize), .m_axi_awburst(awburst),
    .m_axi_awvalid(awvalid), .m_axi_awready(awready), .m_axi_wdata(wdata), .m_axi_wstrb(wstrb),
    .m_axi_wlast(wlast), .m_axi_wvalid(wvalid), .m_axi_wready(wready), .m_axi_bresp(bresp),
    .m_axi_bvalid(bvalid), .m_axi_bready(bready));

  axi_mem_model #(.DATA_W(DATA_W), .ADDR_W(ADDR_W), .STALL(10)) u_mem (
    .clk, .rst_n,
    .awaddr, .awlen, .awvalid, .awready, .wdata, .wstrb, .wlast, .wvalid, .wready,
    .bresp, .bvalid, .bready,
    .araddr('0), .arlen('0), .arvalid(1'b0), .arready, .rdata, .rresp, .rlast, .rvalid,
    .rready(1'b0));

  always_ff @(posedge clk) if (rst_n) begin
    if (frame_written) n_written <= n_written + 1;
    if (rectified) n_rect <= n_rect + 1;
    if (awvalid && awready) aw_t <= cyc;
    if (bvalid && bready && int'(cyc - aw_t) > max_burst_cycles)
      max_burst_cycles <= int'(cyc - aw_t);
    if (check_counter > 2) begin
      failures <= failures + 1;
      $display("FAIL check counter %0d", check_counter);
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] pattern(int f, int l, int c);
    return {16'hA5A5, 16'(f), 16'(l), 16'(c)};
  endfunction

  // send one beat, with a random gap before it
  task automatic beat(input logic [63:0] d, input logic u, input logic l, input int gap = 75);
    @(negedge clk);
    tvalid = 0;
    while (($urandom % 100) < gap) @(negedge clk);
    tdata = d; tuser = u; tlast = l; tvalid = 1;
    @(posedge clk);
    #1 tvalid = 0; tuser = 0; tlast = 0;
  endtask

  // a frame; bad_line/bad_kind inject an early (1) or late (2) line end,
  // sof_at_line > 0 cuts the frame short there
  task automatic send_frame(int f, int bad_line = -1, int bad_kind = 0, int gap = 75);
    for (int l = 0; l < VRES; l++)
      for (int c = 0; c < WPL; c++) begin
        logic last;
        last = (c == WPL - 1);
        if (l == bad_line && bad_kind == 1 && c == WPL - 3) begin
          beat(pattern(f, l, c), l == 0 && c == 0, 1'b1, gap);
          break;
        end
        if (l == bad_line && bad_kind == 2) last = 1'b0;
        beat(pattern(f, l, c), l == 0 && c == 0, last, gap);
      end
  endtask

  task automatic expect_frame(longint base, int f, string what);
    int bad = 0;
    for (int l = 0; l < VRES; l++)
      for (int c = 0; c < WPL; c++)
        if (u_mem.peek(base + (l * WPL + c) * 8) != pattern(f, l, c)) bad++;
    checks++;
    if (bad != 0) begin
      failures++;
      $display("FAIL %s: frame %0d at %h has %0d wrong words", what, f, base, bad);
    end
  endtask

  task automatic expect_eq(longint got, longint e, string what);
    checks++;
    if (got != e) begin failures++; $display("FAIL %s: %0d expected %0d", what, got, e); end
  endtask

  task automatic do_restart();
    @(negedge clk); restart = 1; @(negedge clk); restart = 0;
  endtask

  task automatic wait_idle();
    repeat (600) @(posedge clk);
  endtask

  longint base;
  int nw0;
  int unsigned aw0;

  initial begin
    cfg = '{start_addr: START, mem_size: SIZE, hres_bytes: WPL * 8, vres: VRES};
    repeat (3) @(posedge clk);
    rst_n = 1;
    enable = 1;
    do_restart();
    // words before the first start of frame are ignored
    beat(64'hdead, 0, 0); beat(64'hdead, 0, 1);
    // ---- five good frames: consecutive placement and wrap-around
    base = START;
    for (int f = 0; f < 5; f++) begin
      send_frame(f);
      wait_idle();
      expect_frame(base, f, "good frame");
      expect_eq(n_written, f + 1, "frames written");
      if (base + 2 * FB > START + SIZE) begin base = START; n_wrap++; end
      else base = base + FB;
    end
    expect_eq(n_wrap, 1, "region wrapped");
    expect_eq(status, 0, "no errors");
    expect_eq(u_mem.peek(START - 8), 0, "nothing below the region");
    checks++;
    if (max_burst_cycles > BL + 40 || max_burst_cycles < BL) begin
      failures++; $display("FAIL burst time %0d", max_burst_cycles);
    end
    // ---- early line end: flagged, next frame at the expected address
    do_restart();
    send_frame(10, 1, 1);
    send_frame(11);
    wait_idle();
    expect_eq(status, 5'b00010, "EOL early flagged");
    expect_frame(START + FB, 11, "frame after short frame");
    expect_eq(n_rect, 1, "address rectified once");
    // ---- late line end
    do_restart();
    send_frame(12, 2, 2);
    send_frame(13);
    wait_idle();
    expect_eq(status[2], 1, "EOL late flagged");
    expect_frame(START + FB, 13, "frame after long line");
    // ---- start of frame inside a frame
    do_restart();
    for (int c = 0; c < 2 * WPL; c++) beat(pattern(14, c / WPL, c % WPL), c == 0, c % WPL == WPL - 1);
    send_frame(15);
    wait_idle();
    expect_eq(status[3:0], 4'b1000, "SOF error flagged");
    expect_frame(START + FB, 15, "frame after cut frame");
    // ---- memory too slow: unwritten data
    do_restart();
    u_mem.stall_pct = 97;
    for (int f = 0; f < 3; f++) send_frame(20 + f, -1, 0, 0);
    u_mem.stall_pct = 10;
    wait_idle(); wait_idle();
    expect_eq(status, 5'b10000, "unwritten data flagged");
    // ---- halt on error
    do_restart();
    halt_en = 1;
    send_frame(30);
    wait_idle();
    expect_eq(status, 0, "no error before halt");
    send_frame(31, 0, 1);
    wait_idle();
    aw0 = u_mem.n_aw;
    nw0 = n_written;
    send_frame(32);
    wait_idle();
    expect_eq(status[0], 1, "halted");
    expect_eq(status[1], 1, "halt cause");
    expect_eq(u_mem.n_aw, aw0, "no bursts while halted");
    halt_en = 0;
    do_restart();
    expect_eq(status, 0, "restart clears status");
    send_frame(33);
    wait_idle();
    expect_frame(START, 33, "frame after restart");
    expect_eq(u_mem.wlast_err, 0, "WLAST placement");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
