// tb_toxos_input_handler -- checks, for every operation, the coordinate
// system, mode, start vector, output exponent offset and two-pass flag that
// the input handler derives from random float operands.  Expected values are
// computed with real arithmetic from the mapping table of the design.
module tb_toxos_input_handler;
  import toxos_pkg::*;
  import toxos_tb_pkg::*;

  localparam real SC = 1048576.0;
  int checks = 0, failures = 0;
  op_e  op;
  logic pass;
  logic [31:0] a, b;
  logic signed [23:0] xprev, x0, y0, z0;
  coord_e coord;
  mode_e  mode;
  logic signed [9:0] adj;
  logic two;
  real inv_k, inv_ah;
  int hyp_seq [20] = '{1,2,3,4,4,5,6,7,8,9,10,11,12,13,13,14,15,16,17,18};

  toxos_input_handler dut (.op_i(op), .pass_i(pass), .a_i(a), .b_i(b), .xprev_i(xprev),
    .coord_o(coord), .mode_o(mode), .x0_o(x0), .y0_o(y0), .z0_o(z0),
    .out_adj_o(adj), .two_pass_o(two));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit near(input logic signed [23:0] got, input real v);
    real d;
    d = real'(got) - v * SC;
    return d < 3.5 && d > -3.5;   // truncation chain: up to 3 LSB
  endfunction

  function automatic int ex(input logic [31:0] f);
    return int'(f[30:23]) - 127;
  endfunction

  initial begin
    real p;
    p = 1.0;
    for (int i = 0; i < 20; i++) p = p * $sqrt(1.0 + 2.0 ** (-2 * i));
    inv_k = 1.0 / p;
    p = 1.0;
    for (int i = 0; i < 20; i++) p = p * $sqrt(1.0 - 2.0 ** (-2 * hyp_seq[i]));
    inv_ah = 1.0 / p;

    for (int i = 0; i < 600; i++) begin
      real ar, br, ex0, ey0, ez0;
      int  e, eadj;
      coord_e ec;
      mode_e  em;
      bit  etwo;
      op    = op_e'(1 + (i % 12));
      pass  = 1'b0;
      ar    = urand(-50.0, 50.0);
      br    = urand(-50.0, 50.0);
      if (op inside {OP_SIN, OP_COS, OP_COSH, OP_SINH, OP_EXP, OP_ATANH, OP_ASIN, OP_ACOS})
        ar = urand(-1.0, 1.0);
      a     = r2f(ar);
      b     = r2f(br);
      ar    = f2r(a);
      br    = f2r(b);
      xprev = 24'($urandom % 1048576);
      ec = COORD_CIRC; em = MODE_ROT; ex0 = 0.0; ey0 = 0.0; ez0 = 0.0; eadj = 0; etwo = 0;
      case (op)
        OP_SIN, OP_COS: begin ex0 = inv_k; ez0 = ar; end
        OP_COSH, OP_SINH: begin ec = COORD_HYP; ex0 = inv_ah; ez0 = ar; end
        OP_EXP: begin ec = COORD_HYP; ex0 = inv_ah; ey0 = inv_ah; ez0 = ar; end
        OP_ATANH: begin ec = COORD_HYP; em = MODE_VEC; ex0 = 1.0; ey0 = ar; end
        OP_ATAN: begin
          e = (ex(a) > 0) ? ex(a) : 0;
          em = MODE_VEC; ex0 = 2.0 ** (-e); ey0 = ar * 2.0 ** (-e);
        end
        OP_ATAN2: begin
          e = (ex(a) > ex(b)) ? ex(a) : ex(b);
          em = MODE_VEC; ex0 = br * 2.0 ** (-e); ey0 = ar * 2.0 ** (-e);
          if (br < 0) begin ex0 = -ex0; ey0 = -ey0; ez0 = (ar < 0) ? -3.14159265358979 : 3.14159265358979; end
        end
        OP_HYPOT: begin
          e = (ex(a) > ex(b)) ? ex(a) : ex(b);
          em = MODE_VEC; ex0 = ((br < 0) ? -br : br) * 2.0 ** (-e); ey0 = ar * 2.0 ** (-e); eadj = e;
        end
        OP_DIV: begin
          ec = COORD_LIN; em = MODE_VEC;
          ex0 = br * 2.0 ** (-ex(b)); ey0 = ar * 2.0 ** (-(ex(a) + 1)); eadj = ex(a) + 1 - ex(b);
        end
        default: begin // asin, acos: pass 0
          ec = COORD_HYP; em = MODE_VEC; ex0 = inv_ah; ey0 = ar * inv_ah; etwo = 1;
        end
      endcase
      #1;
      check(coord == ec && mode == em && two == etwo && int'(adj) == eadj,
            $sformatf("%s control", op.name()));
      check(near(x0, ex0) && near(y0, ey0) && near(z0, ez0),
            $sformatf("%s start vector %f %f %f / %f %f %f", op.name(),
                      real'(x0)/SC, real'(y0)/SC, real'(z0)/SC, ex0, ey0, ez0));
      if (op == OP_ASIN || op == OP_ACOS) begin
        pass = 1'b1;
        #1;
        check(coord == COORD_CIRC && mode == MODE_VEC && x0 == xprev && near(y0, ar) && z0 == 0,
              "second pass vector");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
