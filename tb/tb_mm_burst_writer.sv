// tb_mm_burst_writer: checks the double-buffered AXI4 burst writer.
//
// Frames of 21 words (two full 8-word buffers and a 5-word tail whose last
// word has only its low bytes enabled) are fed with random gaps; the
// testbench supplies the frame base address and compares the memory model
// with what was sent, including the bytes the strobe must leave untouched.
// It also checks: a frame start flushes a half-filled buffer, a memory that
// stalls almost always makes the writer drop a buffer and report overflow,
// the rectification flag rises when the running address differs from the
// expected one, halting parks the writer in its error state until restart,
// and no burst takes longer than its length plus a small overhead when the
// memory never stalls.
//
// Origin: the expected values are computed here independently of the RTL,
// from the behaviour the original design specifies; the stimulus sizes are
// this testbench's own choice.
module tb_mm_burst_writer;
  import vc_pkg::*;
  localparam int DATA_W = 64, ADDR_W = 32, BL = 8, NW = 21;
  logic clk = 0, rst_n = 0, restart = 0, halt = 0;
  logic valid = 0, first = 0, last = 0, check = 0;
  logic [DATA_W-1:0] data = 0;
  logic [DATA_W/8-1:0] strb = '1;
  logic [ADDR_W-1:0] next_base = 0, expected = 0;
  logic frame_start, rectified, rxn_done, txn_done, frame_done, overflow;
  logic [1:0] check_counter;
  wr_state_e state;
  logic [ADDR_W-1:0] awaddr; logic [7:0] awlen; logic [2:0] awsize; logic [1:0] awburst;
  logic awvalid, awready, wlast, wvalid, wready, bvalid, bready;
  logic [DATA_W-1:0] wdata; logic [DATA_W/8-1:0] wstrb; logic [1:0] bresp;
  logic arready, rlast, rvalid; logic [DATA_W-1:0] rdata; logic [1:0] rresp;
  int checks = 0, failures = 0;
  int n_frames = 0, n_ovf = 0, n_rect = 0, n_rxn = 0, n_txn = 0;
  longint cyc = 0, aw_t = 0;
  int max_burst = 0;

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;

  mm_burst_writer #(.DATA_W(DATA_W), .ADDR_W(ADDR_W), .BURST_LEN(BL)) dut (
    .clk, .rst_n, .i_restart(restart), .i_halt(halt), .i_valid(valid), .i_data(data),
    .i_strb(strb), .i_first(first), .i_last(last), .i_next_base(next_base),
    .i_expected(expected), .i_check(check),
    .o_frame_start(frame_start), .o_rectified(rectified), .o_rxn_done(rxn_done),
    .o_txn_done(txn_done), .o_frame_done(frame_done), .o_overflow(overflow),
    .o_check_counter(check_counter), .o_state(state),
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
    if (frame_done) n_frames <= n_frames + 1;
    if (overflow)   n_ovf    <= n_ovf + 1;
    if (rectified)  n_rect   <= n_rect + 1;
    if (rxn_done)   n_rxn    <= n_rxn + 1;
    if (txn_done)   n_txn    <= n_txn + 1;
    if (awvalid && awready) aw_t <= cyc;
    if (bvalid && bready && int'(cyc - aw_t) > max_burst) max_burst <= int'(cyc - aw_t);
    if (check_counter > 2) begin failures <= failures + 1; $display("FAIL check counter"); end
    if (awvalid && (awsize != 3 || awburst != 2'b01)) begin
      failures <= failures + 1; $display("FAIL awsize/awburst");
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] pat(int f, int w);
    return {32'hC0DE0000 | 32'(f), 32'(w)};
  endfunction

  task automatic word(input logic [63:0] d, input logic f, input logic l, input int gap);
    @(negedge clk);
    while (($urandom % 100) < gap) @(negedge clk);
    data = d; first = f; last = l; valid = 1;
    strb = l ? 8'h0f : 8'hff;
    @(negedge clk);
    valid = 0; first = 0; last = 0;
  endtask

  task automatic send(int f, int n = NW, int gap = 75);
    for (int w = 0; w < n; w++) word(pat(f, w), w == 0, w == n - 1, gap);
  endtask

  task automatic expect_eq(longint got, longint e, string what);
    checks++;
    if (got != e) begin failures++; $display("FAIL %s: %0d expected %0d", what, got, e); end
  endtask

  task automatic expect_frame(longint base, int f, int n, string what);
    int bad = 0;
    for (int w = 0; w < n - 1; w++) if (u_mem.peek(base + w * 8) != pat(f, w)) bad++;
    // last word: only the low four bytes are enabled
    if (u_mem.peek(base + (n - 1) * 8) != {32'h0, pat(f, n - 1)[31:0]}) bad++;
    checks++;
    if (bad != 0) begin failures++; $display("FAIL %s: %0d bad words", what, bad); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // ---- two frames at chosen addresses
    next_base = 32'h4000;
    send(1);
    repeat (100) @(posedge clk);
    expect_frame(32'h4000, 1, NW, "frame 1");
    expect_eq(n_frames, 1, "frame done");
    expect_eq(n_rxn, 3, "three buffers received");
    expect_eq(n_txn, 3, "three bursts sent");
    next_base = 32'h8000; expected = 32'h8000; check = 1;
    send(2);
    repeat (100) @(posedge clk);
    expect_frame(32'h8000, 2, NW, "frame 2 at new base");
    expect_eq(n_rect, 1, "running address differs from expected");
    // ---- a frame start flushes the half-filled buffer of a short frame
    next_base = 32'hA000; expected = 32'hA000;
    for (int w = 0; w < 11; w++) word(pat(3, w), w == 0, 1'b0, 75);
    repeat (40) @(posedge clk);
    next_base = 32'hC000; expected = 32'hA000 + 11 * 8;
    send(4);
    repeat (100) @(posedge clk);
    checks++;
    if (u_mem.peek(32'hA000 + 10 * 8) != pat(3, 10)) begin
      failures++; $display("FAIL flushed tail missing");
    end
    expect_frame(32'hC000, 4, NW, "frame after short frame");
    expect_eq(n_rect, 2, "rectified after short frame");
    // ---- timing without stalls
    u_mem.stall_pct = 0;
    max_burst = 0;
    next_base = 32'hE000; expected = 32'hE000 + 32'h1000; check = 0;
    send(5, NW, 0);
    repeat (100) @(posedge clk);
    checks++;
    if (max_burst > BL + 6) begin failures++; $display("FAIL burst took %0d cycles", max_burst); end
    // ---- overflow
    u_mem.stall_pct = 97;
    send(6, 40, 0);
    u_mem.stall_pct = 10;
    repeat (2000) @(posedge clk);
    checks++;
    if (n_ovf == 0) begin failures++; $display("FAIL no overflow reported"); end
    // ---- halt
    halt = 1;
    repeat (20) @(posedge clk);
    expect_eq(state, WR_ERROR, "halted writer in error state");
    send(7, 16, 0);
    repeat (100) @(posedge clk);
    expect_eq(state, WR_ERROR, "stays halted");
    halt = 0;
    @(negedge clk); restart = 1; @(negedge clk); restart = 0;
    repeat (3) @(posedge clk);
    expect_eq(state, WR_IDLE, "restart leaves error state");
    next_base = 32'h2000;
    send(8);
    repeat (200) @(posedge clk);
    expect_frame(32'h2000, 8, NW, "frame after restart");
    expect_eq(u_mem.wlast_err, 0, "WLAST placement");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
