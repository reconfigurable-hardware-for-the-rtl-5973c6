// enc_mb_addr: macroblock-order addressing of the encoder band buffers.
//
// The band buffers hold 16 luma lines (8 chroma lines) in raster order, one
// 32-bit word = 4 pixels of one component.  The encoder wants them one
// macroblock at a time: 16 rows of 4 luma words, and for each chroma
// component 8 rows of 2 words.  For the n-th luma word delivered (y_count)
//   width  = y_count % 4, height = (y_count % 64) / 4, mb = y_count / 64
//   y_addr = width + height * y_frame_width + mb * 4
// and for the n-th word of one chroma component (uv_count)
//   width  = uv_count % 2, height = (uv_count % 16) / 2, mb = uv_count / 16
//   uv_addr = width + height * uv_frame_width + mb * 2
// where y_frame_width = pixels per line / 4 and uv_frame_width = pixels per
// line / 8 are the buffer words per line.  Purely combinational; the
// divisions are by powers of two.
//
// Origin: the address equations are the original design's; the counter and
// address widths are parameters of this design.
module enc_mb_addr #(
  parameter int CW = 20,           // counter width
  parameter int AW = 15            // address width (one band buffer)
) (
  input  logic [CW-1:0] i_y_count,
  input  logic [CW-1:0] i_uv_count,
  input  logic [15:0]   i_y_frame_width,
  input  logic [15:0]   i_uv_frame_width,
  output logic [AW-1:0] o_y_addr,
  output logic [AW-1:0] o_uv_addr
);
  logic [CW-1:0] y_w, y_h, y_n, uv_w, uv_h, uv_n;
  logic [CW+15:0] y_full, uv_full;

  always_comb begin
    y_w  = i_y_count % CW'(4);
    y_h  = (i_y_count % CW'(64)) / CW'(4);
    y_n  = i_y_count / CW'(64);
    uv_w = i_uv_count % CW'(2);
    uv_h = (i_uv_count % CW'(16)) / CW'(2);
    uv_n = i_uv_count / CW'(16);
    y_full  = (CW+16)'(y_w)  + (CW+16)'(y_h)  * (CW+16)'(i_y_frame_width)  + (CW+16)'(y_n)  * 4;
    uv_full = (CW+16)'(uv_w) + (CW+16)'(uv_h) * (CW+16)'(i_uv_frame_width) + (CW+16)'(uv_n) * 2;
    o_y_addr  = AW'(y_full);
    o_uv_addr = AW'(uv_full);
  end
endmodule
