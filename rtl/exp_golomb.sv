// exp_golomb: unsigned Exponential-Golomb encoder (ue(v) of H.264).
//
// The code word of v is v+1 written in binary, preceded by as many zeros as
// there are bits after its leading one: 0 -> 1, 1 -> 010, 2 -> 011,
// 3 -> 00100, ...  o_code holds the code word right-aligned (its leading
// zeros are the upper bits of the field) and o_len its length in bits,
// 2*floor(log2(v+1)) + 1.  Purely combinational.
//
// Origin: the unsigned Exp-Golomb code is the standard H.264 ue(v) code; the
// leading-one search is this design's own.
module exp_golomb #(
  parameter int W = 16            // width of the value
) (
  input  logic [W-1:0]        i_value,
  output logic [2*W:0]        o_code,
  output logic [$clog2(2*W+2)-1:0] o_len
);
  localparam int LW = $clog2(2*W+2);
  logic [W:0] v1;
  int         msb;

  always_comb begin
    v1  = {1'b0, i_value} + (W+1)'(1);
    msb = 0;
    for (int i = 0; i <= W; i++) if (v1[i]) msb = i;
    o_code = (2*W+1)'(v1);
    o_len  = LW'(2*msb + 1);
  end
endmodule
