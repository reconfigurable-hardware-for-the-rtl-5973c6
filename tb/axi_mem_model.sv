// axi_mem_model: behavioural model of external memory with one AXI4 write
// port and one AXI4 read port (INCR bursts only), for testbenches.
//
// Storage is a sparse associative array of DATA_W-bit words indexed by the
// word address.  Writes honour WSTRB; a B response is returned one cycle
// after the WLAST beat.  Reads return the burst after a one-cycle delay.
// AWREADY, WREADY, ARREADY and RVALID are withheld at random for STALL
// percent of the cycles, so the masters see back-pressure.  The model counts
// write bursts and remembers the last AW address; peek()/poke() give the
// testbench direct access to the storage.
//
// Origin: a behavioural stand-in for an external part; its timing is this
// design's own choice, only its ports follow the original.
module axi_mem_model #(
  parameter int DATA_W = 256,
  parameter int ADDR_W = 64,
  parameter int STALL  = 30
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [ADDR_W-1:0]   awaddr,
  input  logic [7:0]          awlen,
  input  logic                awvalid,
  output logic                awready,
  input  logic [DATA_W-1:0]   wdata,
  input  logic [DATA_W/8-1:0] wstrb,
  input  logic                wlast,
  input  logic                wvalid,
  output logic                wready,
  output logic [1:0]          bresp,
  output logic                bvalid,
  input  logic                bready,
  input  logic [ADDR_W-1:0]   araddr,
  input  logic [7:0]          arlen,
  input  logic                arvalid,
  output logic                arready,
  output logic [DATA_W-1:0]   rdata,
  output logic [1:0]          rresp,
  output logic                rlast,
  output logic                rvalid,
  input  logic                rready
);
  localparam int BSH = $clog2(DATA_W/8);

  logic [DATA_W-1:0] mem [longint];
  longint unsigned   aw_q [$];
  int                awlen_q [$];
  longint unsigned   wr_ptr;
  int                wr_left;
  logic              wr_busy;
  int                b_pend;
  int unsigned       n_aw, n_wbeats, n_rbeats, n_ar;
  logic [ADDR_W-1:0] last_awaddr;
  int                wlast_err;

  longint unsigned   rd_ptr;
  int                rd_left;
  logic              rd_busy;

  function automatic logic [DATA_W-1:0] peek(longint unsigned byte_addr);
    longint unsigned a = byte_addr >> BSH;
    return mem.exists(a) ? mem[a] : '0;
  endfunction

  function automatic void poke(longint unsigned byte_addr, logic [DATA_W-1:0] d);
    mem[byte_addr >> BSH] = d;
  endfunction

  int stall_pct = STALL;   // testbenches may change this at run time

  function automatic bit stall();
    return ($urandom % 100) < stall_pct;
  endfunction

  assign bresp = 2'b00;
  assign rresp = 2'b00;

  // Model state is kept in blocking variables; the bus outputs are
  // registered with non-blocking assignments.
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      awready <= 1'b0; wready <= 1'b0; bvalid <= 1'b0; arready <= 1'b0;
      rvalid <= 1'b0; rlast <= 1'b0; rdata <= '0;
      wr_busy = 1'b0; wr_left = 0; wr_ptr = 0; b_pend = 0;
      rd_busy = 1'b0; rd_left = 0; rd_ptr = 0;
      n_aw = 0; n_wbeats = 0; n_rbeats = 0; n_ar = 0; last_awaddr = '0;
      wlast_err = 0;
      aw_q.delete(); awlen_q.delete();
    end else begin
      // ---------------- write address
      if (awvalid && awready) begin
        aw_q.push_back(longint'(awaddr));
        awlen_q.push_back(int'(awlen));
        n_aw++;
        last_awaddr = awaddr;
      end
      awready <= !stall();
      // ---------------- write data
      if (wvalid && wready) begin
        logic [DATA_W-1:0] old;
        if (!wr_busy) begin
          wr_ptr  = aw_q[0] >> BSH;
          wr_left = awlen_q[0];
          wr_busy = 1'b1;
          aw_q.pop_front(); awlen_q.pop_front();
        end
        old = mem.exists(wr_ptr) ? mem[wr_ptr] : '0;
        for (int b = 0; b < DATA_W/8; b++)
          if (wstrb[b]) old[b*8 +: 8] = wdata[b*8 +: 8];
        mem[wr_ptr] = old;
        n_wbeats++;
        if (wlast != (wr_left == 0)) wlast_err++;
        if (wr_left == 0) begin
          wr_busy = 1'b0;
          b_pend++;
        end else begin
          wr_ptr++;
          wr_left--;
        end
      end
      wready <= !stall() && (aw_q.size() != 0 || wr_busy);
      // ---------------- write response
      if (bvalid && bready) begin
        bvalid <= 1'b0;
      end else if (!bvalid && b_pend != 0) begin
        bvalid <= 1'b1;
        b_pend--;
      end
      // ---------------- read
      if (rvalid && rready) begin
        n_rbeats++;
        if (rlast) rd_busy = 1'b0;
      end
      if (arvalid && arready) begin
        rd_busy = 1'b1;
        rd_ptr  = longint'(araddr) >> BSH;
        rd_left = int'(arlen) + 1;
        n_ar++;
      end
      arready <= !rd_busy && !(arvalid && arready) && !stall();
      if (!rvalid || rready) begin
        if (rd_busy && rd_left != 0 && !stall()) begin
          rdata  <= mem.exists(rd_ptr) ? mem[rd_ptr] : '0;
          rlast  <= rd_left == 1;
          rvalid <= 1'b1;
          rd_ptr++;
          rd_left--;
        end else begin
          rvalid <= 1'b0;
        end
      end
    end
  end
endmodule
