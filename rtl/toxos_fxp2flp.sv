// toxos_fxp2flp -- signed fixed point to IEEE-754 single precision.
//
// Converts q_i * 2^(adj_i), q_i being a two's-complement word with FRAC_W
// fraction bits, into a single-precision float.  The magnitude is normalised
// with a leading-one search; the exponent is (position of the leading one -
// FRAC_W + adj_i).  With W <= 24 the conversion is exact; wider words are
// truncated.  Zero gives +0.  Choices of this design: results below the
// normal range flush to signed zero and results above it become signed
// infinity.  Combinational.
module toxos_fxp2flp #(
  parameter int unsigned INT_W  = 4,
  parameter int unsigned FRAC_W = 20,
  parameter int unsigned W      = INT_W + FRAC_W
) (
  input  logic signed [W-1:0] q_i,
  input  logic signed [9:0]   adj_i,
  output logic [31:0]         f_o
);

  logic              sign;
  logic [W-1:0]      mag;
  int                p;
  logic [63:0]       norm;
  logic signed [12:0] be;     // biased exponent

  always_comb begin
    sign = q_i[W-1];
    mag  = sign ? W'(-q_i) : W'(q_i);
    p    = -1;
    for (int i = 0; i < W; i++) if (mag[i]) p = i;
    norm = 64'(mag) << (63 - p);             // leading one at bit 63
    be   = 13'(p) - 13'(FRAC_W) + 13'(adj_i) + 13'sd127;
    if (p < 0)            f_o = 32'h0000_0000;
    else if (be <= 0)     f_o = {sign, 31'h0};
    else if (be >= 255)   f_o = {sign, 8'hFF, 23'h0};
    else                  f_o = {sign, be[7:0], norm[62:40]};
  end

endmodule
