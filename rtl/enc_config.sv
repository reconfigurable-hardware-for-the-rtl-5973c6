// enc_config: configuration subsystem of the H.264 encoder wrapper.
//
// AXI4-Lite register file, 64-bit registers, all resetting to zero:
//   0x00 control   bit 0 restart (cleared by hardware), bit 1 core enable
//   0x08 horizontal resolution in pixels (plain integer, not bytes)
//   0x10 vertical resolution in lines
//   0x18 frames per second
// Written resolutions are copied to o_cfg on the restart pulse, one cycle
// after the write that sets bit 0, together with a one-cycle o_restart.
// The enable bit acts at once.
//
// Origin: the four registers, their offsets and the restart and enable bits
// follow the original encoder register tables; the 16-bit width of the
// copied sizes is this design's own choice.
module enc_config
  import vc_pkg::*;
#(
  parameter int ADDR_W = 8,
  parameter int DATA_W = 64
) (
  input  logic                clk,
  input  logic                rst_n,
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
  output logic                o_restart,
  output logic                o_enable,
  output enc_cfg_t            o_cfg
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

  logic [63:0] ctrl, hres, vres, fps;

  function automatic logic [63:0] merge(input logic [63:0] old, input logic [63:0] nw,
                                        input logic [7:0] strb);
    logic [63:0] r;
    for (int b = 0; b < 8; b++) r[b*8 +: 8] = strb[b] ? nw[b*8 +: 8] : old[b*8 +: 8];
    return r;
  endfunction

  assign o_restart = ctrl[CTRL_RESTART] && !reg_wr;
  assign o_enable  = ctrl[CTRL_ENC_EN];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ctrl <= '0; hres <= '0; vres <= '0; fps <= '0; o_cfg <= '0;
    end else begin
      if (reg_wr) begin
        unique case (reg_waddr)
          ENC_CTRL: ctrl <= merge(ctrl, reg_wdata, reg_wstrb);
          ENC_HRES: hres <= merge(hres, reg_wdata, reg_wstrb);
          ENC_VRES: vres <= merge(vres, reg_wdata, reg_wstrb);
          ENC_FPS:  fps  <= merge(fps,  reg_wdata, reg_wstrb);
          default: ;
        endcase
      end
      if (o_restart) begin
        ctrl[CTRL_RESTART] <= 1'b0;
        o_cfg <= '{hres: hres[15:0], vres: vres[15:0], fps: fps[15:0]};
      end
    end
  end

  always_comb begin
    unique case (reg_raddr)
      ENC_CTRL: reg_rdata = ctrl;
      ENC_HRES: reg_rdata = hres;
      ENC_VRES: reg_rdata = vres;
      ENC_FPS:  reg_rdata = fps;
      default:  reg_rdata = '0;
    endcase
  end

endmodule
