// toxos_pkg -- shared types and constants of the TOXOS CORDIC coprocessor.
//
// TOXOS evaluates transcendental functions of IEEE-754 single-precision
// operands with a unified (Walther) CORDIC engine working in fixed point
// ("global floating point": operands are converted to fixed point once at the
// input and back to float once at the output).
//
// This package holds:
//   * the x-cordic instruction encoding: custom opcode 0001011 and the func7
//     value of each of the twelve operations (as published for the design);
//   * the operation, coordinate-system and mode enums used between blocks;
//   * packed structs for the CV-X-IF issue / commit / result channels.  The
//     channel subset and the field widths (ID width 4, two source registers)
//     are this design's choice, modelled on the CV32E40PX X-interface;
//   * constant functions that compute the CORDIC tables (elementary angles,
//     hyperbolic shift sequence, gain factors) at elaboration time from their
//     formulas, so that the tables follow ITER and FRAC_W:
//       circular   : S_i = i,                 alpha_i = atan(2^-i)
//       linear     : S_i = i,                 alpha_i = 2^-i
//       hyperbolic : S = 1,2,3,4,4,5,..,13,13,.. (3k+1 repeated), alpha = atanh(2^-S)
//       K  = prod sqrt(1 + 2^-2S)  (circular gain),  AH = prod sqrt(1 - 2^-2S)
//     Values are rounded to FRAC_W fractional bits.
package toxos_pkg;

  // ---------------------------------------------------------------- encoding
  localparam logic [6:0] OPC_XCORDIC = 7'b0001011;

  typedef enum logic [3:0] {
    OP_NONE  = 4'd0,
    OP_SIN   = 4'd1,
    OP_COS   = 4'd2,
    OP_ATAN  = 4'd3,
    OP_ASIN  = 4'd4,
    OP_ACOS  = 4'd5,
    OP_COSH  = 4'd6,
    OP_SINH  = 4'd7,
    OP_ATANH = 4'd8,
    OP_EXP   = 4'd9,
    OP_ATAN2 = 4'd10,
    OP_HYPOT = 4'd11,
    OP_DIV   = 4'd12
  } op_e;
  // func7 field equals the op_e code (func7 = 0000001 .. 0001100).

  typedef enum logic [1:0] {
    COORD_CIRC = 2'd0,   // m = +1
    COORD_LIN  = 2'd1,   // m =  0
    COORD_HYP  = 2'd2    // m = -1
  } coord_e;

  typedef enum logic {
    MODE_ROT = 1'b0,     // sigma = sign(z)
    MODE_VEC = 1'b1      // sigma = -sign(x)*sign(y)
  } mode_e;

  // ------------------------------------------------------------- CV-X-IF
  localparam int unsigned X_ID_W = 4;

  typedef struct packed {
    logic [31:0]       instr;
    logic [X_ID_W-1:0] id;
    logic [1:0][31:0]  rs;        // rs[0] = rs1, rs[1] = rs2
    logic [1:0]        rs_valid;
  } x_issue_req_t;

  typedef struct packed {
    logic accept;
    logic writeback;
  } x_issue_resp_t;

  typedef struct packed {
    logic [X_ID_W-1:0] id;
    logic              commit_kill;
  } x_commit_t;

  typedef struct packed {
    logic [X_ID_W-1:0] id;
    logic [31:0]       data;
    logic [4:0]        rd;
    logic              we;
  } x_result_t;

  // coordinate systems used by the operations enabled in a FUNC_EN mask
  // (bit n enables the op with code n); bit c of the result is coord_e c.
  // asin/acos use both the hyperbolic and the circular system.
  function automatic logic [2:0] coord_en(input logic [12:0] f);
    logic [2:0] c;
    c[COORD_CIRC] = f[OP_SIN] | f[OP_COS] | f[OP_ATAN] | f[OP_ASIN] | f[OP_ACOS]
                  | f[OP_ATAN2] | f[OP_HYPOT];
    c[COORD_LIN]  = f[OP_DIV];
    c[COORD_HYP]  = f[OP_COSH] | f[OP_SINH] | f[OP_ATANH] | f[OP_EXP]
                  | f[OP_ASIN] | f[OP_ACOS];
    return c;
  endfunction

  // ------------------------------------------------- constant real helpers
  localparam real PI_R = 3.14159265358979323846;

  function automatic real pow2_neg(input int s);
    real r;
    r = 1.0;
    for (int k = 0; k < s; k++) r = r / 2.0;
    return r;
  endfunction

  // atan(x) and atanh(x) for 0 <= x <= 0.5 by their power series
  function automatic real atan_series(input real x, input bit hyp);
    real term, acc;
    acc  = 0.0;
    term = x;
    for (int k = 0; k < 40; k++) begin
      if (hyp || (k % 2 == 0)) acc = acc + term / real'(2 * k + 1);
      else                     acc = acc - term / real'(2 * k + 1);
      term = term * x * x;
    end
    return acc;
  endfunction

  function automatic real sqrt_r(input real a);
    real g;
    g = (a > 1.0) ? a : 1.0;
    for (int k = 0; k < 60; k++) g = 0.5 * (g + a / g);
    return g;
  endfunction

  // k-th shift of the hyperbolic sequence (shifts 4, 13, 40 .. repeated)
  function automatic int hyp_shift(input int k);
    int s, rep, idx;
    s = 1; rep = 4; idx = 0;
    while (idx < k) begin
      if (s == rep) begin
        idx++;                 // repeated entry
        rep = 3 * rep + 1;
        if (idx >= k) break;
      end
      s++;
      idx++;
    end
    return s;
  endfunction

  function automatic int coord_shift(input coord_e c, input int k);
    return (c == COORD_HYP) ? hyp_shift(k) : k;
  endfunction

  function automatic real coord_angle(input coord_e c, input int k);
    int  s;
    real t;
    s = coord_shift(c, k);
    t = pow2_neg(s);
    case (c)
      COORD_CIRC: return (s == 0) ? PI_R / 4.0 : atan_series(t, 1'b0);
      COORD_HYP:  return atan_series(t, 1'b1);
      default:    return t;
    endcase
  endfunction

  // round a real to a signed fixed-point integer with frac_w fractional bits
  function automatic longint to_fx(input real v, input int frac_w);
    real sc;
    sc = v;
    for (int k = 0; k < frac_w; k++) sc = sc * 2.0;
    return (sc >= 0.0) ? longint'($rtoi(sc + 0.5)) : -longint'($rtoi(-sc + 0.5));
  endfunction

  // 1/K for the circular system over `iter` iterations
  function automatic real inv_gain_circ(input int iter);
    real p;
    p = 1.0;
    for (int k = 0; k < iter; k++) p = p * (1.0 + pow2_neg(2 * k));
    return 1.0 / sqrt_r(p);
  endfunction

  // 1/AH for the hyperbolic system over `iter` iterations
  function automatic real inv_gain_hyp(input int iter);
    real p;
    p = 1.0;
    for (int k = 0; k < iter; k++) p = p * (1.0 - pow2_neg(2 * hyp_shift(k)));
    return 1.0 / sqrt_r(p);
  endfunction

endpackage
