// mm_burst_writer: double buffer and AXI4 memory-mapped write master.
//
// Incoming words are collected in one of two buffers, each holding one
// burst (BURST_LEN words of DATA_W bits), kept in a single simple dual-port
// RAM with a registered read port.  A buffer is handed over ("committed")
// when it is full, when the beat carrying i_last has been written (end of a
// frame), or when a beat carrying i_first arrives while the buffer already
// holds words (the partial buffer is committed first so that every frame
// starts at the first word of a burst).  On a commit the filler moves to the
// other buffer.  A complete buffer whose partner has not yet been sent to
// memory is held until the partner is free.  If a new word arrives while a
// buffer is still held, the external memory is congested: the new data is
// written into the same buffer again, the held data is lost and o_overflow
// pulses (the "unwritten data" condition).  A frame start that finds the
// partner busy drops the partial buffer the same way.  The filler never
// stalls: video cannot wait.
//
// The dispatch state machine (RESET, IDLE, READ_BUFFER, READ_BUFFER_DONE,
// ERROR) sends committed buffers in order as one INCR burst each.  AW and W
// are issued together; the buffer is freed when its last W beat is taken and
// the burst is complete when B arrives.  A running address advances by the
// burst length after every accepted AW.  When a buffer that starts a frame
// is dispatched, the owner's next frame address is loaded instead
// (o_frame_start pulses); if the running address differs from the owner's
// expected, unrotated address, o_rectified pulses.  i_halt moves the
// machine to ERROR, where it stays until restart.
//
// Pulses: o_rxn_done per committed buffer, o_txn_done per completed burst,
// o_frame_done when the burst holding the end of a frame completes.
// o_check_counter counts committed buffers whose burst has not completed.
//
// Note: a 256-beat burst of 32-byte words spans 8 KiB, so it crosses the
// AXI 4 KiB boundary rule; set BURST_LEN to 128 for strict compliance.
//
// Origin: two burst-sized buffers, the dispatch states and rewriting the
// same buffer when memory is congested follow the original design; holding a
// complete buffer until its partner is free and flushing partial buffers at
// frame starts are this design's own choices.
module mm_burst_writer
  import vc_pkg::*;
#(
  parameter int DATA_W    = 256,
  parameter int ADDR_W    = 64,
  parameter int BURST_LEN = 256
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                i_restart,
  input  logic                i_halt,
  // fill side
  input  logic                i_valid,
  input  logic [DATA_W-1:0]   i_data,
  input  logic [DATA_W/8-1:0] i_strb,     // byte enables of a word carrying i_last
  input  logic                i_first,
  input  logic                i_last,
  // frame address control
  input  logic [ADDR_W-1:0]   i_next_base,
  input  logic [ADDR_W-1:0]   i_expected,
  input  logic                i_check,
  output logic                o_frame_start,
  output logic                o_rectified,
  // events
  output logic                o_rxn_done,
  output logic                o_txn_done,
  output logic                o_frame_done,
  output logic                o_overflow,
  output logic [1:0]          o_check_counter,
  output wr_state_e           o_state,
  // AXI4 write master
  output logic [ADDR_W-1:0]   m_axi_awaddr,
  output logic [7:0]          m_axi_awlen,
  output logic [2:0]          m_axi_awsize,
  output logic [1:0]          m_axi_awburst,
  output logic                m_axi_awvalid,
  input  logic                m_axi_awready,
  output logic [DATA_W-1:0]   m_axi_wdata,
  output logic [DATA_W/8-1:0] m_axi_wstrb,
  output logic                m_axi_wlast,
  output logic                m_axi_wvalid,
  input  logic                m_axi_wready,
  input  logic [1:0]          m_axi_bresp,
  input  logic                m_axi_bvalid,
  output logic                m_axi_bready
);

  localparam int PW    = $clog2(BURST_LEN);   // word index inside a buffer
  localparam int CW    = PW + 1;              // word count 0..BURST_LEN
  localparam int BYTES = DATA_W / 8;
  localparam int BSH   = $clog2(BYTES);

  // ---------------- buffer RAM ----------------
  logic [DATA_W-1:0] mem [2*BURST_LEN];
  logic              ram_we, ram_re;
  logic [PW:0]       ram_waddr, ram_raddr;
  logic [DATA_W-1:0] ram_q;

  always_ff @(posedge clk) begin
    if (ram_we) mem[ram_waddr] <= i_data;
    if (ram_re) ram_q <= mem[ram_raddr];
  end

  // ---------------- fill side ----------------
  logic              wb;                // buffer being filled
  logic [CW-1:0]     fill;              // words in it
  logic              cur_sof;           // it holds a frame start
  logic              hold;              // it is complete, waiting for the other one
  logic [1:0]        pend;              // committed, not yet read out
  logic [CW-1:0]     bcnt  [2];
  logic              bsof  [2];
  logic              beof  [2];
  logic [BYTES-1:0]  bstrb [2];
  logic [1:0]        pend_clr;          // from the dispatch side
  logic [1:0]        pend_free;         // pend with the buffer now emptied
  // combinational next state of the filler, in three steps:
  //   0: a held buffer is committed once the other buffer is free, or
  //      overwritten when a new word arrives first (overflow)
  //   a: a frame start flushes a partly filled buffer
  //   b: the word is stored; a full buffer or a frame end completes it
  logic              rel_h, drop_h, flush, commit_a, drop_a, commit_b, full_b;
  logic              wb0, sof0, hold0, wb_a, sof_a, sof_b;
  logic [CW-1:0]     fill0, fill_a, fill_b;
  logic [1:0]        pend0, pend_a;
  always_comb begin
    pend_free = pend & ~pend_clr;
    rel_h  = hold && !pend_free[~wb];
    drop_h = hold &&  pend_free[~wb] && i_valid;
    wb0    = rel_h ? ~wb : wb;
    fill0  = (rel_h || drop_h) ? '0 : fill;
    sof0   = rel_h ? 1'b0 : (drop_h ? bsof[wb] : cur_sof);
    hold0  = hold && !rel_h && !drop_h;
    pend0  = pend_free;
    if (rel_h) pend0[wb] = 1'b1;
    flush    = i_valid && i_first && (fill0 != '0);
    commit_a = flush && !pend0[~wb0];
    drop_a   = flush &&  pend0[~wb0];
    wb_a     = commit_a ? ~wb0 : wb0;
    fill_a   = flush ? '0 : fill0;
    sof_a    = commit_a ? 1'b0 : sof0;
    pend_a   = pend0;
    if (commit_a) pend_a[wb0] = 1'b1;
    fill_b   = fill_a + CW'(1);
    sof_b    = sof_a | i_first;
    full_b   = i_valid && ((fill_b == CW'(BURST_LEN)) || i_last);
    commit_b = full_b && !pend_a[~wb_a];
    ram_we    = i_valid;
    ram_waddr = {wb_a, fill_a[PW-1:0]};
  end

  always_ff @(posedge clk) begin
    if (!rst_n || i_restart) begin
      wb <= 1'b0; fill <= '0; cur_sof <= 1'b0; hold <= 1'b0; pend <= '0;
      for (int i = 0; i < 2; i++) begin
        bcnt[i] <= '0; bsof[i] <= 1'b0; beof[i] <= 1'b0; bstrb[i] <= '1;
      end
    end else begin
      logic [1:0] p;
      p = pend_a;
      if (commit_a) begin
        bcnt[wb0] <= fill0; bsof[wb0] <= sof0; beof[wb0] <= 1'b0; bstrb[wb0] <= '1;
      end
      if (full_b) begin
        bcnt[wb_a] <= fill_b; bsof[wb_a] <= sof_b; beof[wb_a] <= i_last;
        bstrb[wb_a] <= i_last ? i_strb : '1;
      end
      if (!i_valid) begin
        wb <= wb_a; fill <= fill_a; cur_sof <= sof_a; hold <= hold0;
      end else if (commit_b) begin
        p[wb_a] = 1'b1;
        wb <= ~wb_a; fill <= '0; cur_sof <= 1'b0; hold <= 1'b0;
      end else if (full_b) begin
        wb <= wb_a; fill <= fill_b; cur_sof <= sof_b; hold <= 1'b1;
      end else begin
        wb <= wb_a; fill <= fill_b; cur_sof <= sof_b; hold <= 1'b0;
      end
      pend <= p;
    end
  end

  assign o_rxn_done = rel_h || commit_a || commit_b;
  assign o_overflow = drop_h || drop_a;

  // ---------------- dispatch side ----------------
  wr_state_e         state;
  logic              rb;                 // buffer being read out
  logic [ADDR_W-1:0] addr_run;
  logic [CW-1:0]     beat, rptr, cur_cnt;
  logic [BYTES-1:0]  cur_strb;
  logic              cur_eof, aw_done, w_done;
  logic              start, w_hs, last_beat;

  assign start     = (state == WR_IDLE) && !i_halt && pend[rb];
  assign w_hs      = m_axi_wvalid && m_axi_wready;
  assign last_beat = (beat == cur_cnt - CW'(1));
  assign ram_re    = start || (w_hs && !last_beat);
  assign ram_raddr = start ? {rb, {PW{1'b0}}} : {rb, rptr[PW-1:0]};

  assign o_frame_start = start && bsof[rb];
  assign o_rectified   = o_frame_start && i_check && (addr_run != i_expected);

  always_ff @(posedge clk) begin
    if (!rst_n || i_restart) begin
      state <= WR_RESET; rb <= 1'b0; addr_run <= '0;
      beat <= '0; rptr <= '0; cur_cnt <= '0; cur_strb <= '1; cur_eof <= 1'b0;
      aw_done <= 1'b0; w_done <= 1'b0;
      m_axi_awvalid <= 1'b0; m_axi_wvalid <= 1'b0; m_axi_awaddr <= '0; m_axi_awlen <= '0;
    end else begin
      unique case (state)
        WR_RESET: state <= WR_IDLE;
        WR_IDLE: begin
          if (i_halt) state <= WR_ERROR;
          else if (start) begin
            m_axi_awaddr  <= bsof[rb] ? i_next_base : addr_run;
            m_axi_awlen   <= 8'(bcnt[rb] - CW'(1));
            m_axi_awvalid <= 1'b1;
            m_axi_wvalid  <= 1'b1;
            cur_cnt  <= bcnt[rb];
            cur_strb <= bstrb[rb];
            cur_eof  <= beof[rb];
            beat <= '0; rptr <= CW'(1);
            aw_done <= 1'b0; w_done <= 1'b0;
            state <= WR_READ_BUFFER;
          end
        end
        WR_READ_BUFFER: begin
          if (m_axi_awvalid && m_axi_awready) begin
            m_axi_awvalid <= 1'b0;
            aw_done  <= 1'b1;
            addr_run <= m_axi_awaddr + (ADDR_W'(cur_cnt) << BSH);
          end
          if (w_hs) begin
            if (last_beat) begin
              m_axi_wvalid <= 1'b0;
              w_done <= 1'b1;
            end else begin
              beat <= beat + CW'(1);
              rptr <= rptr + CW'(1);
            end
          end
          if (m_axi_bvalid && m_axi_bready) state <= WR_READ_BUFFER_DONE;
        end
        WR_READ_BUFFER_DONE: begin
          rb    <= ~rb;
          state <= i_halt ? WR_ERROR : WR_IDLE;
        end
        WR_ERROR: ;
        default: state <= WR_RESET;
      endcase
    end
  end

  // the buffer may be refilled as soon as its last word has left the RAM
  assign pend_clr = (state == WR_READ_BUFFER && w_hs && last_beat) ?
                    (rb ? 2'b10 : 2'b01) : 2'b00;
  // B is only taken once the whole burst has been sent
  assign m_axi_bready  = (state == WR_READ_BUFFER) && aw_done && w_done;
  assign m_axi_wdata   = ram_q;
  assign m_axi_wlast   = last_beat;
  assign m_axi_wstrb   = last_beat ? cur_strb : '1;
  assign m_axi_awsize  = 3'(BSH);
  assign m_axi_awburst = 2'b01;

  assign o_txn_done   = (state == WR_READ_BUFFER_DONE);
  assign o_frame_done = o_txn_done && cur_eof;
  assign o_state      = state;

  // committed minus completed bursts (the data flow counter)
  always_ff @(posedge clk) begin
    if (!rst_n || i_restart) o_check_counter <= '0;
    else o_check_counter <= o_check_counter + 2'(o_rxn_done) - 2'(o_txn_done);
  end

  a_aw_hold: assert property (@(posedge clk) disable iff (!rst_n || i_restart)
      m_axi_awvalid && !m_axi_awready |=> m_axi_awvalid && $stable(m_axi_awaddr));
  a_w_hold:  assert property (@(posedge clk) disable iff (!rst_n || i_restart)
      m_axi_wvalid && !m_axi_wready |=> m_axi_wvalid && $stable(m_axi_wdata));

  wire unused_bresp = ^m_axi_bresp;

endmodule
