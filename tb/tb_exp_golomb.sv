// tb_exp_golomb: checks the unsigned Exp-Golomb encoder.
//
// For every value 0..4095 and for random 16-bit values, the expected code
// is built independently (leading zeros, then value+1 in binary) and
// compared with the block's right-aligned code and length.  Known codes
// such as ue(39) = 00000101000 (width of a 640-pixel frame in macroblocks
// minus one) are checked by value.
//
// Origin: the expected values are computed here independently of the RTL,
// from the behaviour the original design specifies; the stimulus sizes are
// this testbench's own choice.
module tb_exp_golomb;
  localparam int W = 16;
  logic [W-1:0]             value;
  logic [2*W:0]             code;
  logic [$clog2(2*W+2)-1:0] len;
  int checks = 0, failures = 0;

  exp_golomb #(.W(W)) dut (.i_value(value), .o_code(code), .o_len(len));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int unsigned v);
    int unsigned n, bits, exp_len;
    logic [2*W:0] exp_code;
    n = v + 1;
    bits = 0;
    while ((n >> bits) != 0) bits++;
    exp_len  = 2 * bits - 1;
    exp_code = (2*W+1)'(n);
    value = W'(v);
    #1;
    checks++;
    if (code !== exp_code || int'(len) != exp_len) begin
      failures++;
      $display("FAIL ue(%0d): code=%0h len=%0d expected code=%0h len=%0d",
               v, code, len, exp_code, exp_len);
    end
  endtask

  initial begin
    for (int v = 0; v < 4096; v++) check(v);
    for (int i = 0; i < 2000; i++) check($urandom % 65535);
    check(65534);
    // ue(39) = 00000 101000, 11 bits
    value = 16'd39; #1;
    checks++;
    if (len != 11 || code[10:0] != 11'b00000101000) begin
      failures++; $display("FAIL ue(39)");
    end
    // ue(511) = 000000000 1000000000, 19 bits (8192 pixels / 16 - 1)
    value = 16'd511; #1;
    checks++;
    if (len != 19 || code[18:0] != 19'b0000000001000000000) begin
      failures++; $display("FAIL ue(511)");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
