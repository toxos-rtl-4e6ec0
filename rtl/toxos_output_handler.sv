// toxos_output_handler -- turns the CORDIC result into the float result.
//
// It picks the coordinate that carries the op's result (x for cos, cosh, exp
// and hypot; y for sin and sinh; z for the inverse functions, atan2 and div),
// applies the two fix-ups that need no CORDIC iteration (hypot: times 1/K to
// remove the circular gain; acos: pi/2 - asin), converts to single precision
// with the exponent offset from the input handler, and registers the value
// when load_i is high.  f_o is the registered result (one cycle after
// load_i).  Reset clears it.  An op that FUNC_EN leaves out selects nothing
// of its own, so its fix-up logic is not built.  The coordinate choice
// follows the Walther result table; the fix-ups are this design's way of
// completing hypot and acos.
module toxos_output_handler
  import toxos_pkg::*;
#(
  parameter int unsigned ITER   = 20,
  parameter int unsigned INT_W  = 4,
  parameter int unsigned FRAC_W = 20,
  parameter int unsigned W      = INT_W + FRAC_W,
  parameter logic [12:0] FUNC_EN = 13'h1FFE
) (
  input  logic                clk_i,
  input  logic                rst_ni,
  input  logic                load_i,
  input  op_e                 op_i,
  input  logic signed [W-1:0] x_i,
  input  logic signed [W-1:0] y_i,
  input  logic signed [W-1:0] z_i,
  input  logic signed [9:0]   adj_i,
  output logic [31:0]         f_o
);

  // a disabled op is treated as no op, so its logic is removed
  localparam logic [15:0] EN16 = {3'b0, FUNC_EN};
  op_e op_en;
  assign op_en = EN16[op_i] ? op_i : OP_NONE;

  localparam logic signed [W-1:0] INV_K   = W'(to_fx(inv_gain_circ(ITER), FRAC_W));
  localparam logic signed [W-1:0] HALF_PI = W'(to_fx(PI_R / 2.0, FRAC_W));

  logic signed [W-1:0]   sel;
  logic signed [2*W-1:0] prod;
  logic [31:0]           f;
  logic [31:0]           f_q;

  assign prod = (2*W)'(x_i) * (2*W)'(INV_K);

  always_comb begin
    case (op_en)
      OP_COS, OP_COSH, OP_EXP: sel = x_i;
      OP_SIN, OP_SINH:         sel = y_i;
      OP_HYPOT:                sel = W'(prod >>> FRAC_W);
      OP_ACOS:                 sel = HALF_PI - z_i;
      default:                 sel = z_i;
    endcase
  end

  toxos_fxp2flp #(.INT_W(INT_W), .FRAC_W(FRAC_W), .W(W)) u_cvt (
    .q_i(sel), .adj_i(adj_i), .f_o(f)
  );

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)     f_q <= '0;
    else if (load_i) f_q <= f;
  end

  assign f_o = f_q;

endmodule
