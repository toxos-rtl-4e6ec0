// tb_toxos_cordic_core -- checks the rolled CORDIC engine at its default
// configuration (20 iterations in 4 cycles, Q4.20) in all six Walther modes:
// circular rotation (cos/sin), hyperbolic rotation (cosh/sinh), linear
// rotation (multiply-add), circular vectoring (magnitude*K and atan),
// hyperbolic vectoring (atanh) and linear vectoring (division).  done must
// rise exactly LATENCY cycles after start.
module tb_toxos_cordic_core;
  import toxos_pkg::*;
  import toxos_tb_pkg::*;

  localparam int LAT = 4, ITER = 20;
  localparam real SC = 1048576.0;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  coord_e coord;
  mode_e  mode;
  logic signed [23:0] x0, y0, z0, x, y, z;
  logic busy, done;
  real inv_k, inv_ah;
  int hyp_seq [ITER] = '{1,2,3,4,4,5,6,7,8,9,10,11,12,13,13,14,15,16,17,18};

  toxos_cordic_core dut (.clk_i(clk), .rst_ni(rst_n), .start_i(start), .coord_i(coord),
    .mode_i(mode), .x0_i(x0), .y0_i(y0), .z0_i(z0), .busy_o(busy), .done_o(done),
    .x_o(x), .y_o(y), .z_o(z));

  always #5 clk = ~clk;

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

  function automatic logic signed [23:0] fx(input real v);
    return 24'($rtoi(v * SC + ((v < 0) ? -0.5 : 0.5)));
  endfunction

  function automatic bit near(input logic signed [23:0] got, input real ref_v, input real tol);
    real g;
    g = real'(got) / SC;
    return (g - ref_v <= tol) && (ref_v - g <= tol);
  endfunction

  task automatic pass(input coord_e c, input mode_e m, input real xi, input real yi, input real zi);
    int n;
    @(negedge clk);
    coord = c; mode = m; x0 = fx(xi); y0 = fx(yi); z0 = fx(zi);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    coord = COORD_LIN; mode = MODE_ROT; x0 = '0; y0 = '0; z0 = '0;   // must be ignored
    n = 1;
    while (!done && n < 20) begin
      @(negedge clk);
      n++;
    end
    check(n == LAT, $sformatf("pass took %0d cycles", n));
  endtask

  initial begin
    real p;
    p = 1.0;
    for (int i = 0; i < ITER; i++) p = p * $sqrt(1.0 + 2.0 ** (-2 * i));
    inv_k = 1.0 / p;
    p = 1.0;
    for (int i = 0; i < ITER; i++) p = p * $sqrt(1.0 - 2.0 ** (-2 * hyp_seq[i]));
    inv_ah = 1.0 / p;

    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 40; i++) begin
      real a, b;
      a = urand(-1.5, 1.5);
      pass(COORD_CIRC, MODE_ROT, inv_k, 0.0, a);
      check(near(x, $cos(a), 3e-5) && near(y, $sin(a), 3e-5) && near(z, 0.0, 3e-5),
            $sformatf("circular rotation %f", a));
      a = urand(-1.1, 1.1);
      pass(COORD_HYP, MODE_ROT, inv_ah, 0.0, a);
      check(near(x, $cosh(a), 5e-5) && near(y, $sinh(a), 5e-5), $sformatf("hyperbolic rotation %f", a));
      a = urand(-0.9, 0.9); b = urand(-2.0, 2.0);
      pass(COORD_LIN, MODE_ROT, b, 0.25, a);
      check(near(x, b, 1e-6) && near(y, 0.25 + a * b, 5e-5), "linear rotation");
      a = urand(0.1, 2.0); b = urand(-2.0, 2.0);
      pass(COORD_CIRC, MODE_VEC, a, b, 0.0);
      check(near(x, $sqrt(a * a + b * b) / inv_k, 1e-4) && near(z, $atan(b / a), 3e-5),
            "circular vectoring");
      a = urand(-0.8, 0.8);
      pass(COORD_HYP, MODE_VEC, 1.0, a, 0.0);
      check(near(z, $atanh(a), 1e-4) && near(x, $sqrt(1.0 - a * a) / inv_ah, 1e-4), "hyperbolic vectoring");
      a = urand(1.0, 2.0); b = urand(-1.0, 1.0);
      pass(COORD_LIN, MODE_VEC, a, b, 0.0);
      check(near(z, b / a, 3e-5), "linear vectoring");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
