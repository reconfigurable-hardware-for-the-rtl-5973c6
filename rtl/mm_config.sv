// mm_config: configuration subsystem of the Memory Manager.
//
// An AXI4-Lite register file (64-bit registers, 8-byte spacing) with the
// register map of vc_pkg: raw video control, region start and size, line
// length in bytes, lines per frame, raw status, encoded video control,
// encoded region start and size, encoded status and the address of the last
// encoded frame saved.  Every register resets to zero.
//
// Bit 0 of each control register is a restart request.  Software writes a 1;
// in the following cycle the bit is cleared by hardware and a one-cycle
// restart pulse is produced.  Region, line and frame sizes written by
// software are shadow values: they are copied into raw_cfg / enc_cfg only on
// the matching restart pulse, so the datapaths never see a half-written
// configuration while video keeps flowing.  The enable and halt bits act at
// once.  Status registers mirror the datapath inputs every cycle; writes to
// them are ignored.
//
// Timing: restart pulses and the copied configuration appear one cycle after
// the AXI4-Lite write that sets bit 0.
//
// Origin: the registers, their offsets and bits, the self-clearing restart
// bit and applying sizes only on a restart all follow the original design;
// the 64-bit struct hand-over to the datapaths is this design's own choice.
module mm_config
  import vc_pkg::*;
#(
  parameter int ADDR_W = 8,
  parameter int DATA_W = 64
) (
  input  logic                clk,
  input  logic                rst_n,
  // AXI4-Lite slave
  input  logic [ADDR_W-1:0]   s_axil_awaddr,
  input  logic                s_axil_awvalid,
  output logic                s_axil_awready,
  input  logic [DATA_W-1:0]   s_axil_wdata,
  input  logic [DATA_W/8-1:0] s_axil_wstrb,
  input  logic                s_axil_wvalid,
  output logic                s_axil_wready,
  output logic [1:0]          s_axil_bresp,
  output logic                s_axil_bvalid,
  input  logic                s_axil_bready,
  input  logic [ADDR_W-1:0]   s_axil_araddr,
  input  logic                s_axil_arvalid,
  output logic                s_axil_arready,
  output logic [DATA_W-1:0]   s_axil_rdata,
  output logic [1:0]          s_axil_rresp,
  output logic                s_axil_rvalid,
  input  logic                s_axil_rready,
  // status from the datapaths
  input  logic [4:0]          i_raw_status,
  input  logic                i_enc_status,
  input  logic [63:0]         i_enc_last_addr,
  // control to the datapaths
  output logic                o_raw_restart,
  output logic                o_enc_restart,
  output logic                o_wr_en,
  output logic                o_rd_en,
  output logic                o_halt_en,
  output logic                o_enc_en,
  output mm_raw_cfg_t         o_raw_cfg,
  output mm_enc_cfg_t         o_enc_cfg
);

  logic                reg_wr;
  logic [ADDR_W-1:0]   reg_waddr, reg_raddr;
  logic [DATA_W-1:0]   reg_wdata, reg_rdata;
  logic [DATA_W/8-1:0] reg_wstrb;

  axil_slave #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_axil (
    .clk, .rst_n,
    .s_awaddr(s_axil_awaddr), .s_awvalid(s_axil_awvalid), .s_awready(s_axil_awready),
    .s_wdata(s_axil_wdata), .s_wstrb(s_axil_wstrb), .s_wvalid(s_axil_wvalid),
    .s_wready(s_axil_wready), .s_bresp(s_axil_bresp), .s_bvalid(s_axil_bvalid),
    .s_bready(s_axil_bready), .s_araddr(s_axil_araddr), .s_arvalid(s_axil_arvalid),
    .s_arready(s_axil_arready), .s_rdata(s_axil_rdata), .s_rresp(s_axil_rresp),
    .s_rvalid(s_axil_rvalid), .s_rready(s_axil_rready),
    .reg_wr, .reg_waddr, .reg_wdata, .reg_wstrb, .reg_raddr, .reg_rdata
  );

  logic [63:0] raw_ctrl, raw_start, raw_size, hres_bytes, vres;
  logic [63:0] enc_ctrl, enc_start, enc_size;

  // byte-strobed update of a 64-bit register
  function automatic logic [63:0] merge(input logic [63:0] old, input logic [63:0] nw,
                                        input logic [7:0] strb);
    logic [63:0] r;
    for (int b = 0; b < 8; b++) r[b*8 +: 8] = strb[b] ? nw[b*8 +: 8] : old[b*8 +: 8];
    return r;
  endfunction

  // restart request is acted on once the bus is no longer writing
  assign o_raw_restart = raw_ctrl[CTRL_RESTART] && !reg_wr;
  assign o_enc_restart = enc_ctrl[CTRL_RESTART] && !reg_wr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      raw_ctrl   <= '0; raw_start <= '0; raw_size <= '0;
      hres_bytes <= '0; vres      <= '0;
      enc_ctrl   <= '0; enc_start <= '0; enc_size <= '0;
      o_raw_cfg  <= '0; o_enc_cfg <= '0;
    end else begin
      if (reg_wr) begin
        unique case (reg_waddr)
          MM_RAW_CTRL:   raw_ctrl   <= merge(raw_ctrl,   reg_wdata, reg_wstrb);
          MM_RAW_START:  raw_start  <= merge(raw_start,  reg_wdata, reg_wstrb);
          MM_RAW_SIZE:   raw_size   <= merge(raw_size,   reg_wdata, reg_wstrb);
          MM_HRES_BYTES: hres_bytes <= merge(hres_bytes, reg_wdata, reg_wstrb);
          MM_VRES:       vres       <= merge(vres,       reg_wdata, reg_wstrb);
          MM_ENC_CTRL:   enc_ctrl   <= merge(enc_ctrl,   reg_wdata, reg_wstrb);
          MM_ENC_START:  enc_start  <= merge(enc_start,  reg_wdata, reg_wstrb);
          MM_ENC_SIZE:   enc_size   <= merge(enc_size,   reg_wdata, reg_wstrb);
          default: ;
        endcase
      end
      // hardware clears the restart bit and applies the shadow configuration
      if (o_raw_restart) begin
        raw_ctrl[CTRL_RESTART] <= 1'b0;
        o_raw_cfg <= '{start_addr: raw_start, mem_size: raw_size,
                       hres_bytes: hres_bytes[31:0], vres: vres[31:0]};
      end
      if (o_enc_restart) begin
        enc_ctrl[CTRL_RESTART] <= 1'b0;
        o_enc_cfg <= '{start_addr: enc_start, mem_size: enc_size};
      end
    end
  end

  assign o_wr_en   = raw_ctrl[CTRL_WR_EN];
  assign o_rd_en   = raw_ctrl[CTRL_RD_EN];
  assign o_halt_en = raw_ctrl[CTRL_HALT_EN];
  assign o_enc_en  = enc_ctrl[CTRL_ENC_EN];

  always_comb begin
    unique case (reg_raddr)
      MM_RAW_CTRL:      reg_rdata = raw_ctrl;
      MM_RAW_START:     reg_rdata = raw_start;
      MM_RAW_SIZE:      reg_rdata = raw_size;
      MM_HRES_BYTES:    reg_rdata = hres_bytes;
      MM_VRES:          reg_rdata = vres;
      MM_RAW_STATUS:    reg_rdata = {59'd0, i_raw_status};
      MM_ENC_CTRL:      reg_rdata = enc_ctrl;
      MM_ENC_START:     reg_rdata = enc_start;
      MM_ENC_SIZE:      reg_rdata = enc_size;
      MM_ENC_STATUS:    reg_rdata = {63'd0, i_enc_status};
      MM_ENC_LAST_ADDR: reg_rdata = i_enc_last_addr;
      default:          reg_rdata = '0;
    endcase
  end

endmodule
