// tb_enc_config: checks the encoder wrapper register file over AXI4-Lite.
//
// Writes the control, width, height and frame-rate registers, reads them
// back, checks that the enable follows the control register at once, that
// the frame size reaches the encoder only on a restart, that restart is a
// one-cycle pulse whose bit then reads back as 0, and that byte strobes
// are honoured.
//
// Origin: the expected values are computed here independently of the RTL,
// from the behaviour the original design specifies; the stimulus sizes are
// this testbench's own choice.
module tb_enc_config;
  import vc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0]  awaddr = 0, araddr = 0;
  logic        awvalid = 0, wvalid = 0, bready = 0, arvalid = 0, rready = 0;
  logic [63:0] wdata = 0;
  logic [7:0]  wstrb = 0;
  logic        awready, wready, bvalid, arready, rvalid;
  logic [1:0]  bresp, rresp;
  logic [63:0] rdata;
  logic        restart, enable;
  enc_cfg_t    cfg;
  int checks = 0, failures = 0, pulses = 0;

  always #5 clk = ~clk;

  enc_config dut (
    .clk, .rst_n,
    .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready),
    .s_axil_wdata(wdata), .s_axil_wstrb(wstrb), .s_axil_wvalid(wvalid),
    .s_axil_wready(wready), .s_axil_bresp(bresp), .s_axil_bvalid(bvalid),
    .s_axil_bready(bready), .s_axil_araddr(araddr), .s_axil_arvalid(arvalid),
    .s_axil_arready(arready), .s_axil_rdata(rdata), .s_axil_rresp(rresp),
    .s_axil_rvalid(rvalid), .s_axil_rready(rready),
    .o_restart(restart), .o_enable(enable), .o_cfg(cfg));

  always_ff @(posedge clk) if (rst_n && restart) pulses <= pulses + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [7:0] a, input logic [63:0] d, input logic [7:0] s = 8'hff);
    @(negedge clk);
    awaddr = a; awvalid = 1; wdata = d; wstrb = s; wvalid = 1; bready = 1;
    do @(posedge clk); while (!awready);
    @(negedge clk);
    awvalid = 0; wvalid = 0;
    while (!bvalid) @(posedge clk);
    @(negedge clk);
    bready = 0;
  endtask

  task automatic rd(input logic [7:0] a, output logic [63:0] d);
    @(negedge clk);
    araddr = a; arvalid = 1; rready = 1;
    do @(posedge clk); while (!arready);
    @(negedge clk);
    arvalid = 0;
    while (!rvalid) @(posedge clk);
    d = rdata;
    @(negedge clk);
    rready = 0;
  endtask

  task automatic expect_rd(input logic [7:0] a, input logic [63:0] e, input string what);
    logic [63:0] d;
    rd(a, d);
    checks++;
    if (d !== e) begin failures++; $display("FAIL %s: read %h expected %h", what, d, e); end
  endtask

  task automatic expect_eq(input logic [63:0] got, input logic [63:0] e, input string what);
    checks++;
    if (got !== e) begin failures++; $display("FAIL %s: %h expected %h", what, got, e); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wr(ENC_HRES, 64'd640);
    wr(ENC_VRES, 64'd480);
    wr(ENC_FPS,  64'd60);
    expect_rd(ENC_HRES, 64'd640, "hres");
    expect_rd(ENC_VRES, 64'd480, "vres");
    expect_rd(ENC_FPS,  64'd60, "fps");
    expect_eq(cfg.hres, 0, "cfg before restart");
    expect_eq(enable, 0, "disabled");
    wr(ENC_CTRL, 64'h2);
    expect_eq(enable, 1, "enabled");
    expect_eq(pulses, 0, "no pulse without restart");
    wr(ENC_CTRL, 64'h3);
    repeat (2) @(negedge clk);
    expect_eq(pulses, 1, "one restart pulse");
    expect_eq(cfg.hres, 640, "cfg hres");
    expect_eq(cfg.vres, 480, "cfg vres");
    expect_eq(cfg.fps, 60, "cfg fps");
    expect_rd(ENC_CTRL, 64'h2, "restart self-clears");
    wr(ENC_HRES, 64'h0000_0000_0000_2000, 8'b0000_0010);
    expect_rd(ENC_HRES, 64'h2080, "strobed hres");
    expect_eq(cfg.hres, 640, "shadow held");
    wr(ENC_HRES, 64'd8192);
    wr(ENC_VRES, 64'd4320);
    wr(ENC_CTRL, 64'h1);
    repeat (2) @(negedge clk);
    expect_eq(cfg.hres, 8192, "8k hres");
    expect_eq(cfg.vres, 4320, "8k vres");
    expect_eq(enable, 0, "disabled again");
    expect_eq(pulses, 2, "two restart pulses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
