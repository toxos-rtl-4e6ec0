// toxos_addshift -- one micro-rotation of the unified CORDIC algorithm.
//
// Purely combinational.  With shift S, elementary angle alpha and direction
// sigma (+1/-1) it computes
//     x' = x - m*sigma*(y >>> S)
//     y' = y +   sigma*(x >>> S)
//     z' = z -   sigma*alpha
// for m = +1 (circular), 0 (linear) or -1 (hyperbolic).  sigma is sign(z) in
// rotation mode and -sign(x)*sign(y) in vectoring mode; a zero value counts as
// positive.  The z update is written without the factor m (the textbook
// unified form), which is what makes the linear system usable for division.
// Shifts are arithmetic; the dropped bits are truncated.  W is the width of
// the signed fixed-point words.  Several of these units are chained inside
// toxos_cordic_core to perform ITER/LATENCY iterations per clock cycle.
module toxos_addshift
  import toxos_pkg::*;
#(
  parameter int unsigned W  = 24,
  parameter int unsigned SW = 5
) (
  input  coord_e               coord_i,
  input  mode_e                mode_i,
  input  logic [SW-1:0]        shift_i,
  input  logic signed [W-1:0]  alpha_i,
  input  logic signed [W-1:0]  x_i,
  input  logic signed [W-1:0]  y_i,
  input  logic signed [W-1:0]  z_i,
  output logic signed [W-1:0]  x_o,
  output logic signed [W-1:0]  y_o,
  output logic signed [W-1:0]  z_o
);

  logic              neg;     // sigma = -1
  logic signed [W-1:0] xs, ys;

  always_comb begin
    if (mode_i == MODE_ROT) neg = z_i[W-1];
    else                    neg = ~(x_i[W-1] ^ y_i[W-1]);  // -sign(x)sign(y) < 0
    xs = x_i >>> shift_i;
    ys = y_i >>> shift_i;

    y_o = neg ? (y_i - xs) : (y_i + xs);
    z_o = neg ? (z_i + alpha_i) : (z_i - alpha_i);
    case (coord_i)
      COORD_CIRC: x_o = neg ? (x_i + ys) : (x_i - ys);
      COORD_HYP:  x_o = neg ? (x_i - ys) : (x_i + ys);
      default:    x_o = x_i;
    endcase
  end

endmodule
