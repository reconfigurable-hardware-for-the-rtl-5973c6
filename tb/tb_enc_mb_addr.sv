// tb_enc_mb_addr: checks the macroblock-order band buffer addressing.
//
// A reference address is computed by walking the band the way the encoder
// consumes it: macroblock by macroblock, 16 luma rows of 4 words (8 chroma
// rows of 2 words), and compared with the block for several frame widths.
// Two worked cases are checked by value: the 70th luma word of a 64-pixel
// wide band lies at word 22, and for an 8192-pixel wide band luma words
// 48..52 lie at 24576..24579, 26624 and chroma words 16..19 at 2, 3, 1026,
// 1027.
//
// Origin: the expected values are computed here independently of the RTL,
// from the behaviour the original design specifies; the stimulus sizes are
// this testbench's own choice.
module tb_enc_mb_addr;
  localparam int CW = 20, AW = 15;
  logic [CW-1:0] yc, uvc;
  logic [15:0]   yfw, uvfw;
  logic [AW-1:0] ya, uva;
  int checks = 0, failures = 0;

  enc_mb_addr #(.CW(CW), .AW(AW)) dut (
    .i_y_count(yc), .i_uv_count(uvc), .i_y_frame_width(yfw),
    .i_uv_frame_width(uvfw), .o_y_addr(ya), .o_uv_addr(uva));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_y(int c, int a);
    yc = CW'(c); #1; checks++;
    if (int'(ya) != a) begin failures++; $display("FAIL y count %0d: %0d exp %0d", c, ya, a); end
  endtask
  task automatic expect_uv(int c, int a);
    uvc = CW'(c); #1; checks++;
    if (int'(uva) != a) begin failures++; $display("FAIL uv count %0d: %0d exp %0d", c, uva, a); end
  endtask

  initial begin
    int widths[4] = '{64, 640, 1920, 8192};
    foreach (widths[k]) begin
      int px = widths[k], n;
      yfw  = 16'(px / 4);
      uvfw = 16'(px / 8);
      // luma: walk macroblocks, rows, words
      n = 0;
      for (int mb = 0; mb < px / 16; mb++)
        for (int row = 0; row < 16; row++)
          for (int w = 0; w < 4; w++) begin
            if (px <= 640 || (n % 37) == 0) expect_y(n, row * (px / 4) + mb * 4 + w);
            n++;
          end
      n = 0;
      for (int mb = 0; mb < px / 16; mb++)
        for (int row = 0; row < 8; row++)
          for (int w = 0; w < 2; w++) begin
            if (px <= 640 || (n % 13) == 0) expect_uv(n, row * (px / 8) + mb * 2 + w);
            n++;
          end
    end
    yfw = 16; uvfw = 8;
    expect_y(70, 22);
    yfw = 2048; uvfw = 1024;
    expect_y(48, 24576); expect_y(49, 24577); expect_y(50, 24578);
    expect_y(51, 24579); expect_y(52, 26624);
    expect_uv(16, 2); expect_uv(17, 3); expect_uv(18, 1026); expect_uv(19, 1027);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
