// toxos_flp2fxp -- IEEE-754 single precision to signed fixed point.
//
// Converts a_i * 2^(-shift_i) into a two's-complement word of W = INT_W +
// FRAC_W bits (INT_W integer bits including the sign, FRAC_W fraction bits;
// 4 + 20 by default, as published).  shift_i lets the input handler bring two
// operands to a common exponent (the "global floating-point" scheme), so that
// only the ratio of the operands has to fit the fixed-point range.
// Combinational.  Choices of this design: bits below the LSB are truncated
// (magnitude truncation, symmetric about zero); zero and subnormal inputs give
// 0; values with magnitude >= 2^(INT_W-1), infinities and NaNs saturate to
// +/-(2^(W-1)-1) and raise sat_o.
module toxos_flp2fxp #(
  parameter int unsigned INT_W  = 4,
  parameter int unsigned FRAC_W = 20,
  parameter int unsigned W      = INT_W + FRAC_W
) (
  input  logic [31:0]         a_i,
  input  logic signed [9:0]   shift_i,
  output logic signed [W-1:0] q_o,
  output logic                sat_o
);

  localparam int unsigned WIDE = W + 24;

  logic              sign;
  logic [7:0]        expf;
  logic [23:0]       mant;
  logic signed [11:0] e;      // unbiased exponent after the shift
  logic signed [11:0] sh;     // left shift of the 24-bit integer mantissa
  logic [WIDE-1:0]   mag;
  logic [W-1:0]      magw;

  always_comb begin
    sign  = a_i[31];
    expf  = a_i[30:23];
    mant  = {1'b1, a_i[22:0]};
    e     = 12'(signed'({4'b0, expf})) - 12'sd127 - 12'(shift_i);
    sh    = e - 12'sd23 + 12'(signed'(FRAC_W));
    mag   = '0;
    sat_o = 1'b0;
    if (expf == 8'hFF || (expf != 8'h00 && e >= 12'(signed'(INT_W - 1)))) begin
      sat_o = 1'b1;
    end else if (expf != 8'h00) begin
      if (sh >= 0)       mag = WIDE'(mant) << sh;
      else if (sh > -24) mag = WIDE'(mant) >> (-sh);
      else               mag = '0;
    end
    if (sat_o) magw = {1'b0, {(W-1){1'b1}}};
    else       magw = mag[W-1:0];
    q_o = sign ? -signed'(magw) : signed'(magw);
  end

endmodule
