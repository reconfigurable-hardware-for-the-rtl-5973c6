// axil_slave: AXI4-Lite slave front end for a small register file.
//
// Turns AXI4-Lite transactions into single-cycle register write and read
// strobes.  A write is taken when both the address and the data channel are
// valid; the module then raises AWREADY/WREADY for one cycle, presents
// reg_wr/reg_waddr/reg_wdata/reg_wstrb for that same cycle and answers with
// an OKAY response on the B channel.  A read raises ARREADY for one cycle,
// samples reg_rdata in that cycle and returns it on the R channel the next
// cycle.  One transaction per address phase, as AXI4-Lite allows.  Reset is
// active low and synchronous.  The register meaning lives in the module that
// instantiates this one.
//
// Origin: the 64-bit AXI4-Lite register interface follows the original
// cores; the one-outstanding-transaction handshake is this design's own
// choice.
module axil_slave #(
  parameter int ADDR_W = 8,
  parameter int DATA_W = 64
) (
  input  logic                clk,
  input  logic                rst_n,
  // AXI4-Lite slave
  input  logic [ADDR_W-1:0]   s_awaddr,
  input  logic                s_awvalid,
  output logic                s_awready,
  input  logic [DATA_W-1:0]   s_wdata,
  input  logic [DATA_W/8-1:0] s_wstrb,
  input  logic                s_wvalid,
  output logic                s_wready,
  output logic [1:0]          s_bresp,
  output logic                s_bvalid,
  input  logic                s_bready,
  input  logic [ADDR_W-1:0]   s_araddr,
  input  logic                s_arvalid,
  output logic                s_arready,
  output logic [DATA_W-1:0]   s_rdata,
  output logic [1:0]          s_rresp,
  output logic                s_rvalid,
  input  logic                s_rready,
  // register file side
  output logic                reg_wr,
  output logic [ADDR_W-1:0]   reg_waddr,
  output logic [DATA_W-1:0]   reg_wdata,
  output logic [DATA_W/8-1:0] reg_wstrb,
  output logic [ADDR_W-1:0]   reg_raddr,
  input  logic [DATA_W-1:0]   reg_rdata
);

  // a write is accepted in the cycle both channels are valid and no response is pending
  assign reg_wr    = s_awvalid && s_wvalid && !s_bvalid;
  assign s_awready = reg_wr;
  assign s_wready  = reg_wr;
  assign reg_waddr = s_awaddr;
  assign reg_wdata = s_wdata;
  assign reg_wstrb = s_wstrb;
  assign s_bresp   = 2'b00;
  assign s_rresp   = 2'b00;

  logic rd_take;
  assign rd_take   = s_arvalid && !s_rvalid;
  assign s_arready = rd_take;
  assign reg_raddr = s_araddr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_bvalid <= 1'b0;
      s_rvalid <= 1'b0;
      s_rdata  <= '0;
    end else begin
      if (reg_wr)                    s_bvalid <= 1'b1;
      else if (s_bvalid && s_bready) s_bvalid <= 1'b0;
      if (rd_take) begin
        s_rvalid <= 1'b1;
        s_rdata  <= reg_rdata;
      end else if (s_rvalid && s_rready) begin
        s_rvalid <= 1'b0;
      end
    end
  end

  // AXI rule: once valid, a response stays until it is taken
  a_b_hold: assert property (@(posedge clk) disable iff (!rst_n)
                             s_bvalid && !s_bready |=> s_bvalid);
  a_r_hold: assert property (@(posedge clk) disable iff (!rst_n)
                             s_rvalid && !s_rready |=> s_rvalid && $stable(s_rdata));

endmodule
