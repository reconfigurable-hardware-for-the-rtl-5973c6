// tb_mm_enc_write: checks the encoded video write subsystem.
//
// Encoded frames of assorted byte lengths (ending with TLAST) are streamed
// in with random gaps.  Each must appear in the memory model packed
// little-endian into 8-byte words, starting at its own slot: slots are one
// sixteenth of a raw frame (here 4096 / 16 = 256 bytes) and wrap to the
// start of the encoded region when the next slot would not fit.  Bytes of
// a partly filled last word that are not part of the frame must be left
// untouched.  After each frame the "last frame" address must point at it.
// A memory that almost never accepts data must raise the overflow status.
//
// Origin: the expected values are computed here independently of the RTL,
// from the behaviour the original design specifies; the stimulus sizes are
// this testbench's own choice.
module tb_mm_enc_write;
  import vc_pkg::*;
  localparam int DATA_W = 64, ADDR_W = 32, BL = 4;
  localparam int SLOT = 256;
  localparam longint START = 64'h8000, SIZE = 3 * SLOT + 10;
  logic clk = 0, rst_n = 0, restart = 0, enable = 0;
  mm_raw_cfg_t raw_cfg;
  mm_enc_cfg_t cfg;
  logic [7:0] tdata = 0; logic tvalid = 0, tready, tlast = 0;
  logic status, frame_written;
  logic [ADDR_W-1:0] last_addr;
  logic [ADDR_W-1:0] awaddr; logic [7:0] awlen; logic [2:0] awsize; logic [1:0] awburst;
  logic awvalid, awready, wlast, wvalid, wready, bvalid, bready;
  logic [DATA_W-1:0] wdata; logic [DATA_W/8-1:0] wstrb; logic [1:0] bresp;
  logic arready, rlast, rvalid; logic [DATA_W-1:0] rdata; logic [1:0] rresp;
  int checks = 0, failures = 0, n_written = 0;

  always #5 clk = ~clk;

  mm_enc_write #(.DATA_W(DATA_W), .ADDR_W(ADDR_W), .BURST_LEN(BL)) dut (
    .clk, .rst_n, .i_restart(restart), .i_enable(enable), .i_raw_cfg(raw_cfg), .i_cfg(cfg),
    .s_axis_tdata(tdata), .s_axis_tvalid(tvalid), .s_axis_tready(tready), .s_axis_tlast(tlast),
    .o_status(status), .o_last_addr(last_addr), .o_frame_written(frame_written),
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

  always_ff @(posedge clk) if (rst_n && frame_written) n_written <= n_written + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] pat(int f, int i);
    return 8'(f * 37 + i * 5 + 1);
  endfunction

  task automatic send(int f, int n, int gap = 50);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      while (($urandom % 100) < gap) @(negedge clk);
      tdata = pat(f, i); tlast = (i == n - 1); tvalid = 1;
      @(negedge clk);
      tvalid = 0; tlast = 0;
    end
  endtask

  task automatic expect_eq(longint got, longint e, string what);
    checks++;
    if (got != e) begin failures++; $display("FAIL %s: %h expected %h", what, got, e); end
  endtask

  task automatic expect_frame(longint base, int f, int n);
    int bad = 0;
    for (int i = 0; i < ((n + 7) / 8) * 8; i++) begin
      logic [63:0] w;
      logic [7:0] e;
      w = u_mem.peek(base + (i / 8) * 8);
      e = (i < n) ? pat(f, i) : 8'hEE;
      if (w[(i % 8) * 8 +: 8] != e) bad++;
    end
    checks++;
    if (bad != 0) begin failures++; $display("FAIL frame %0d at %h: %0d bad bytes", f, base, bad); end
  endtask

  int lens[6] = '{37, 256, 8, 129, 1, 200};
  longint base;
  initial begin
    raw_cfg = '{start_addr: 0, mem_size: 0, hres_bytes: 256, vres: 16};
    cfg = '{start_addr: START, mem_size: SIZE};
    // background pattern shows which bytes were written
    for (int i = 0; i < 160; i++) u_mem.mem[(START >> 3) + i] = {8{8'hEE}};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 160; i++) u_mem.mem[(START >> 3) + i] = {8{8'hEE}};
    enable = 1;
    @(negedge clk); restart = 1; @(negedge clk); restart = 0;
    base = START;
    foreach (lens[f]) begin
      for (int i = 0; i < SLOT / 8; i++) u_mem.poke(base + i * 8, {8{8'hEE}});
      send(f, lens[f]);
      repeat (100) @(posedge clk);
      expect_frame(base, f, lens[f]);
      expect_eq(last_addr, base, "last frame address");
      expect_eq(n_written, f + 1, "frames written");
      if (base + 2 * SLOT > START + SIZE) base = START; else base = base + SLOT;
    end
    expect_eq(status, 0, "no overflow");
    // slow memory: overflow
    u_mem.stall_pct = 98;
    send(9, 256, 0);
    send(10, 256, 0);
    u_mem.stall_pct = 10;
    repeat (3000) @(posedge clk);
    expect_eq(status, 1, "overflow flagged");
    @(negedge clk); restart = 1; @(negedge clk); restart = 0;
    expect_eq(status, 0, "restart clears the status");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
