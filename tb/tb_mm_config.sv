// tb_mm_config: checks the Memory Manager register file over AXI4-Lite.
//
// Writes every configuration register and reads it back, checks that a
// partial byte-strobe write changes only the enabled bytes, that the
// write/read/halt/encode enables follow the control registers at once,
// that the frame configuration reaches the datapath only when the restart
// bit is written, that restart is a single-cycle pulse after which the bit
// reads back as 0, and that the status and last-address registers show
// the datapath inputs and ignore writes.
//
// Origin: the expected values are computed here independently of the RTL,
// from the behaviour the original design specifies; the stimulus sizes are
// this testbench's own choice.
module tb_mm_config;
  import vc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0]  awaddr = 0, araddr = 0;
  logic        awvalid = 0, wvalid = 0, bready = 0, arvalid = 0, rready = 0;
  logic [63:0] wdata = 0;
  logic [7:0]  wstrb = 0;
  logic        awready, wready, bvalid, arready, rvalid;
  logic [1:0]  bresp, rresp;
  logic [63:0] rdata;
  logic [4:0]  raw_status = 0;
  logic        enc_status = 0;
  logic [63:0] enc_last = 0;
  logic raw_restart, enc_restart, wr_en, rd_en, halt_en, enc_en;
  mm_raw_cfg_t raw_cfg;
  mm_enc_cfg_t enc_cfg;
  int checks = 0, failures = 0;
  int raw_pulses = 0, enc_pulses = 0;

  always #5 clk = ~clk;

  mm_config dut (
    .clk, .rst_n,
    .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready),
    .s_axil_wdata(wdata), .s_axil_wstrb(wstrb), .s_axil_wvalid(wvalid),
    .s_axil_wready(wready), .s_axil_bresp(bresp), .s_axil_bvalid(bvalid),
    .s_axil_bready(bready), .s_axil_araddr(araddr), .s_axil_arvalid(arvalid),
    .s_axil_arready(arready), .s_axil_rdata(rdata), .s_axil_rresp(rresp),
    .s_axil_rvalid(rvalid), .s_axil_rready(rready),
    .i_raw_status(raw_status), .i_enc_status(enc_status), .i_enc_last_addr(enc_last),
    .o_raw_restart(raw_restart), .o_enc_restart(enc_restart), .o_wr_en(wr_en),
    .o_rd_en(rd_en), .o_halt_en(halt_en), .o_enc_en(enc_en),
    .o_raw_cfg(raw_cfg), .o_enc_cfg(enc_cfg));

  always_ff @(posedge clk) begin
    if (rst_n && raw_restart) raw_pulses <= raw_pulses + 1;
    if (rst_n && enc_restart) enc_pulses <= enc_pulses + 1;
  end

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
    checks++;
    if (bresp != 2'b00) begin failures++; $display("FAIL bresp"); end
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
    wr(MM_RAW_START,  64'h0000_0000_1000_0000);
    wr(MM_RAW_SIZE,   64'h0000_0000_0100_0000);
    wr(MM_HRES_BYTES, 64'd2560);
    wr(MM_VRES,       64'd480);
    wr(MM_ENC_START,  64'h0000_0000_2000_0000);
    wr(MM_ENC_SIZE,   64'h0000_0000_0040_0000);
    expect_rd(MM_RAW_START,  64'h1000_0000, "raw start");
    expect_rd(MM_RAW_SIZE,   64'h0100_0000, "raw size");
    expect_rd(MM_HRES_BYTES, 64'd2560, "hres");
    expect_rd(MM_VRES,       64'd480, "vres");
    expect_rd(MM_ENC_START,  64'h2000_0000, "enc start");
    expect_rd(MM_ENC_SIZE,   64'h0040_0000, "enc size");
    // nothing applied before restart
    expect_eq(raw_cfg.start_addr, 0, "raw cfg before restart");
    expect_eq(enc_cfg.mem_size, 0, "enc cfg before restart");
    // byte strobes
    wr(MM_VRES, 64'hffff_ffff_ffff_0000, 8'b0000_0100);
    expect_rd(MM_VRES, 64'h0000_0000_00ff_01e0, "strobed vres");
    wr(MM_VRES, 64'd480);
    // enables act immediately, restart applies the shadow registers
    wr(MM_RAW_CTRL, 64'h2 | 64'h4 | 64'h8);
    expect_eq({61'd0, wr_en, rd_en, halt_en}, 3'b111, "enables");
    expect_eq(raw_pulses, 0, "no restart yet");
    wr(MM_RAW_CTRL, 64'hf);
    repeat (2) @(negedge clk);
    expect_eq(raw_pulses, 1, "one raw restart pulse");
    expect_eq(raw_cfg.start_addr, 64'h1000_0000, "raw cfg start");
    expect_eq(raw_cfg.mem_size, 64'h0100_0000, "raw cfg size");
    expect_eq(raw_cfg.hres_bytes, 2560, "raw cfg hres");
    expect_eq(raw_cfg.vres, 480, "raw cfg vres");
    expect_rd(MM_RAW_CTRL, 64'he, "restart bit self-clears");
    // a later register change is held back until the next restart
    wr(MM_RAW_START, 64'h3000_0000);
    expect_eq(raw_cfg.start_addr, 64'h1000_0000, "shadow held");
    wr(MM_RAW_CTRL, 64'h3);
    repeat (2) @(negedge clk);
    expect_eq(raw_cfg.start_addr, 64'h3000_0000, "shadow applied");
    expect_eq({61'd0, wr_en, rd_en, halt_en}, 3'b100, "only write enabled");
    expect_eq(raw_pulses, 2, "two raw restart pulses");
    // encoded region
    expect_eq(enc_en, 0, "enc disabled");
    wr(MM_ENC_CTRL, 64'h3);
    repeat (2) @(negedge clk);
    expect_eq(enc_pulses, 1, "one enc restart pulse");
    expect_eq(enc_en, 1, "enc enabled");
    expect_eq(enc_cfg.start_addr, 64'h2000_0000, "enc cfg start");
    expect_eq(enc_cfg.mem_size, 64'h0040_0000, "enc cfg size");
    // status registers are read-only views of the datapath
    raw_status = 5'b10110; enc_status = 1; enc_last = 64'h2001_2340;
    expect_rd(MM_RAW_STATUS, 64'h16, "raw status");
    expect_rd(MM_ENC_STATUS, 64'h1, "enc status");
    expect_rd(MM_ENC_LAST_ADDR, 64'h2001_2340, "enc last address");
    wr(MM_RAW_STATUS, 64'h0);
    expect_rd(MM_RAW_STATUS, 64'h16, "status ignores writes");
    expect_rd(8'hf8, 64'h0, "unmapped reads zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
