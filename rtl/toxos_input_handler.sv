// toxos_input_handler -- prepares one CORDIC pass for an operation.
//
// From the op, the two float operands a_i (rs1) and b_i (rs2) and, for the
// second pass, the x result of the first pass, it selects the coordinate
// system m and the mode (rotation/vectoring), and builds the fixed-point start
// vector (x0, y0, z0) through two float-to-fixed converters.  It also gives
// the exponent offset the output converter must add back (out_adj_o) and
// whether the op needs a second pass.  Combinational.  An op that FUNC_EN
// leaves out is handled as no op, so its mapping is not built.
//
//   op      pass  m     mode  x0            y0             z0
//   sin/cos  0    circ  rot   1/K           0              a
//   cosh/sinh 0   hyp   rot   1/AH          0              a
//   exp      0    hyp   rot   1/AH          1/AH           a
//   atanh    0    hyp   vec   1             a              0
//   atan     0    circ  vec   1*2^-e        a*2^-e         0      e = max(ea,0)
//   atan2    0    circ  vec   b*2^-e        a*2^-e         0      e = max(ea,eb)
//                 (b < 0: x0,y0 negated and z0 = +/-pi, full-circle result)
//   hypot    0    circ  vec   |b|*2^-e      a*2^-e         0      out_adj = e
//   div      0    lin   vec   b*2^-eb       a*2^-(ea+1)    0      out_adj = ea+1-eb
//   asin/acos 0   hyp   vec   1/AH          a/AH           0      -> x = sqrt(1-a^2)
//   asin/acos 1   circ  vec   x (pass 0)    a              0      -> z = asin(a)
// ea, eb are the unbiased exponents of a and b.  Bringing two operands to a
// common exponent keeps only their ratio inside the fixed-point range.
// The operand roles, the common-exponent scaling, the quadrant extension of
// atan2 and the two-pass arcsine are this design's choices: the published
// description names the functions, the Walther modes and the global
// floating-point scheme, not these mappings.
module toxos_input_handler
  import toxos_pkg::*;
#(
  parameter int unsigned ITER   = 20,
  parameter int unsigned INT_W  = 4,
  parameter int unsigned FRAC_W = 20,
  parameter int unsigned W      = INT_W + FRAC_W,
  parameter logic [12:0] FUNC_EN = 13'h1FFE
) (
  input  op_e                 op_i,
  input  logic                pass_i,
  input  logic [31:0]         a_i,
  input  logic [31:0]         b_i,
  input  logic signed [W-1:0] xprev_i,
  output coord_e              coord_o,
  output mode_e               mode_o,
  output logic signed [W-1:0] x0_o,
  output logic signed [W-1:0] y0_o,
  output logic signed [W-1:0] z0_o,
  output logic signed [9:0]   out_adj_o,
  output logic                two_pass_o
);

  // a disabled op is treated as no op, so its logic is removed
  localparam logic [15:0] EN16 = {3'b0, FUNC_EN};
  op_e op_en;
  assign op_en = EN16[op_i] ? op_i : OP_NONE;

  localparam logic signed [W-1:0] ONE    = W'(longint'(1) << FRAC_W);
  localparam logic signed [W-1:0] INV_K  = W'(to_fx(inv_gain_circ(ITER), FRAC_W));
  localparam logic signed [W-1:0] INV_AH = W'(to_fx(inv_gain_hyp(ITER), FRAC_W));
  localparam logic signed [W-1:0] PI_FX  = W'(to_fx(PI_R, FRAC_W));

  logic signed [9:0] ea, eb, emax, e_at;
  logic signed [9:0] sh_a, sh_b;
  logic [31:0]       b_src;
  logic signed [W-1:0] aq, bq;
  logic              sat_a, sat_b;
  logic signed [2*W-1:0] a_scaled;

  assign ea    = 10'(signed'({2'b0, a_i[30:23]})) - 10'sd127;
  assign eb    = 10'(signed'({2'b0, b_i[30:23]})) - 10'sd127;
  assign emax  = (ea > eb) ? ea : eb;
  assign e_at  = (ea > 0) ? ea : 10'sd0;
  assign b_src = (op_en == OP_ATAN) ? 32'h3F80_0000 : b_i;   // 1.0f

  always_comb begin
    sh_a = '0;
    sh_b = '0;
    case (op_en)
      OP_ATAN:            begin sh_a = e_at;        sh_b = e_at; end
      OP_ATAN2, OP_HYPOT: begin sh_a = emax;        sh_b = emax; end
      OP_DIV:             begin sh_a = ea + 10'sd1; sh_b = eb;   end
      default: ;
    endcase
  end

  toxos_flp2fxp #(.INT_W(INT_W), .FRAC_W(FRAC_W), .W(W)) u_cvt_a (
    .a_i(a_i), .shift_i(sh_a), .q_o(aq), .sat_o(sat_a)
  );
  toxos_flp2fxp #(.INT_W(INT_W), .FRAC_W(FRAC_W), .W(W)) u_cvt_b (
    .a_i(b_src), .shift_i(sh_b), .q_o(bq), .sat_o(sat_b)
  );

  assign a_scaled = (2*W)'(aq) * (2*W)'(INV_AH);

  always_comb begin
    coord_o    = COORD_CIRC;
    mode_o     = MODE_ROT;
    x0_o       = '0;
    y0_o       = '0;
    z0_o       = '0;
    out_adj_o  = '0;
    two_pass_o = 1'b0;
    case (op_en)
      OP_SIN, OP_COS: begin
        x0_o = INV_K;
        z0_o = aq;
      end
      OP_COSH, OP_SINH, OP_EXP: begin
        coord_o = COORD_HYP;
        x0_o    = INV_AH;
        y0_o    = (op_en == OP_EXP) ? INV_AH : '0;
        z0_o    = aq;
      end
      OP_ATANH: begin
        coord_o = COORD_HYP;
        mode_o  = MODE_VEC;
        x0_o    = ONE;
        y0_o    = aq;
      end
      OP_ATAN: begin
        mode_o = MODE_VEC;
        x0_o   = bq;
        y0_o   = aq;
      end
      OP_ATAN2: begin
        mode_o = MODE_VEC;
        if (b_i[31]) begin
          x0_o = -bq;
          y0_o = -aq;
          z0_o = a_i[31] ? -PI_FX : PI_FX;
        end else begin
          x0_o = bq;
          y0_o = aq;
        end
      end
      OP_HYPOT: begin
        mode_o    = MODE_VEC;
        x0_o      = b_i[31] ? -bq : bq;
        y0_o      = aq;
        out_adj_o = emax;
      end
      OP_DIV: begin
        coord_o   = COORD_LIN;
        mode_o    = MODE_VEC;
        x0_o      = bq;
        y0_o      = aq;
        out_adj_o = ea + 10'sd1 - eb;
      end
      OP_ASIN, OP_ACOS: begin
        mode_o     = MODE_VEC;
        two_pass_o = 1'b1;
        if (!pass_i) begin
          coord_o = COORD_HYP;
          x0_o    = INV_AH;
          y0_o    = W'(a_scaled >>> FRAC_W);
        end else begin
          x0_o    = xprev_i;
          y0_o    = aq;
        end
      end
      default: ;
    endcase
  end

endmodule
