// tb_enc_header_tx: checks the encoded stream header and byte transmission.
//
// For each frame the testbench pulses the frame start, lets a byte source
// play the encoder core (bytes at random, tobytes_DONE either with the last
// byte or a few cycles after it) and reads the AXI4-Stream with random
// back-pressure.  The expected stream is built independently: start code,
// a sequence parameter set written bit by bit from its syntax elements
// (baseline profile, level 60, Exp-Golomb picture width and height in
// macroblocks minus one, stop bit, zero padding to 10 bytes), start code,
// the picture parameter set 68 CE 3C 80, then the core's bytes with TLAST on
// the last one.  Frame sizes 640x480, 1920x1088, 3840x2160 and 8192x4320 are
// used.  A sink that stops reading while the core keeps producing must
// raise the overflow flag.
//
// Origin: the expected values are computed here independently of the RTL,
// from the behaviour the original design specifies; the stimulus sizes are
// this testbench's own choice.
module tb_enc_header_tx;
  import vc_pkg::*;
  logic clk = 0, rst_n = 0, restart = 0, frame_start = 0;
  logic [15:0] hres = 0, vres = 0;
  logic [7:0] cbyte = 0; logic cstrobe = 0, cdone = 0;
  logic [7:0] tdata; logic tvalid, tready = 0, tlast;
  logic overflow;
  tx_state_e state;
  int checks = 0, failures = 0;
  int sink_stall = 30;
  logic [7:0] got [$];
  logic       got_last [$];

  always #5 clk = ~clk;

  enc_header_tx dut (
    .clk, .rst_n, .i_restart(restart), .i_hres(hres), .i_vres(vres),
    .i_frame_start(frame_start), .i_tobytes_byte(cbyte), .i_tobytes_strobe(cstrobe),
    .i_tobytes_done(cdone), .m_axis_tdata(tdata), .m_axis_tvalid(tvalid),
    .m_axis_tready(tready), .m_axis_tlast(tlast), .o_overflow(overflow), .o_state(state));

  always @(negedge clk) tready <= ($urandom % 100) >= sink_stall;
  always_ff @(posedge clk) if (rst_n && tvalid && tready) begin
    got.push_back(tdata);
    got_last.push_back(tlast);
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- bit writer for the expected SPS
  logic bits [$];
  task automatic put(int unsigned v, int n);
    for (int i = n - 1; i >= 0; i--) bits.push_back(v[i]);
  endtask
  task automatic put_ue(int unsigned v);
    int unsigned c = v + 1;
    int n = 0;
    while ((c >> n) > 1) n++;
    put(0, n);
    put(c, n + 1);
  endtask

  task automatic expected(int w, int h, int nbytes, int first, output logic [7:0] e [$]);
    e.delete();
    bits.delete();
    put(8'h67, 8); put(66, 8); put(0, 8); put(60, 8);
    put_ue(0); put_ue(0); put_ue(0); put_ue(0); put_ue(0); put(0, 1);
    put_ue(w / 16 - 1); put_ue(h / 16 - 1);
    put(1, 1); put(1, 1); put(0, 1); put(0, 1);
    put(1, 1);                                   // stop bit
    while (bits.size() < 80) bits.push_back(1'b0);
    e.push_back(8'h00); e.push_back(8'h00); e.push_back(8'h00); e.push_back(8'h01);
    for (int i = 0; i < 10; i++) begin
      logic [7:0] b;
      for (int k = 0; k < 8; k++) b[7 - k] = bits[i * 8 + k];
      e.push_back(b);
    end
    e.push_back(8'h00); e.push_back(8'h00); e.push_back(8'h00); e.push_back(8'h01);
    e.push_back(8'h68); e.push_back(8'hCE); e.push_back(8'h3C); e.push_back(8'h80);
    for (int i = 0; i < nbytes; i++) e.push_back(8'(first + i));
  endtask

  task automatic frame(int w, int h, int nbytes, int first, bit late_done);
    @(negedge clk);
    hres = 16'(w); vres = 16'(h);
    frame_start = 1;
    @(negedge clk);
    frame_start = 0;
    for (int i = 0; i < nbytes; i++) begin
      while (($urandom % 100) < 40) @(negedge clk);
      cbyte = 8'(first + i); cstrobe = 1;
      cdone = (i == nbytes - 1) && !late_done;
      @(negedge clk);
      cstrobe = 0; cdone = 0;
    end
    if (late_done) begin
      repeat ($urandom % 4) @(negedge clk);
      cdone = 1; @(negedge clk); cdone = 0;
    end
  endtask

  task automatic check(int w, int h, int nbytes, int first);
    logic [7:0] e [$];
    int bad = 0;
    expected(w, h, nbytes, first, e);
    wait (got.size() >= e.size());
    repeat (50) @(posedge clk);
    checks++;
    if (got.size() != e.size()) begin
      failures++; $display("FAIL %0dx%0d: %0d bytes expected %0d", w, h, got.size(), e.size());
    end
    foreach (e[i]) begin
      if (i < got.size()) begin
        if (got[i] != e[i]) bad++;
        if (got_last[i] != (i == e.size() - 1)) bad++;
      end
    end
    checks++;
    if (bad != 0) begin
      failures++;
      $display("FAIL %0dx%0d: %0d bad bytes/TLAST", w, h, bad);
      foreach (e[i]) if (i < 16) $display("  %0d: got %h exp %h", i, got[i], e[i]);
    end
    got.delete(); got_last.delete();
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); restart = 1; @(negedge clk); restart = 0;
    frame(640, 480, 20, 8'h10, 0);     check(640, 480, 20, 8'h10);
    frame(1920, 1088, 50, 8'h40, 1);   check(1920, 1088, 50, 8'h40);
    frame(3840, 2160, 1, 8'h90, 1);    check(3840, 2160, 1, 8'h90);
    frame(8192, 4320, 30, 8'hA0, 0);   check(8192, 4320, 30, 8'hA0);
    checks++;
    if (overflow) begin failures++; $display("FAIL spurious overflow"); end
    // sink stops: the FIFO fills up
    sink_stall = 100;
    frame(640, 480, 200, 0, 0);
    checks++;
    if (!overflow) begin failures++; $display("FAIL overflow not reported"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
