// tb_toxos_output_handler -- checks result selection, the hypot and acos
// fix-ups, the exponent offset and the result register (value appears one
// clock after load and holds while load is low).
module tb_toxos_output_handler;
  import toxos_pkg::*;
  import toxos_tb_pkg::*;

  localparam real SC = 1048576.0;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  op_e  op;
  logic signed [23:0] x, y, z;
  logic signed [9:0]  adj;
  logic [31:0] f;
  real inv_k;

  toxos_output_handler dut (.clk_i(clk), .rst_ni(rst_n), .load_i(load), .op_i(op),
    .x_i(x), .y_i(y), .z_i(z), .adj_i(adj), .f_o(f));

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

  initial begin
    real p;
    p = 1.0;
    for (int i = 0; i < 20; i++) p = p * $sqrt(1.0 + 2.0 ** (-2 * i));
    inv_k = 1.0 / p;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 600; i++) begin
      real v, r, tol;
      logic [31:0] prev;
      op  = op_e'(1 + (i % 12));
      x   = 24'($urandom) >>> 2;
      y   = 24'($urandom) >>> 2;
      z   = 24'($urandom) >>> 2;
      adj = 10'(int'($urandom % 21) - 10);
      case (op)
        OP_COS, OP_COSH, OP_EXP: v = real'(x) / SC;
        OP_SIN, OP_SINH:         v = real'(y) / SC;
        OP_HYPOT:                v = real'(x) / SC * inv_k;
        OP_ACOS:                 v = 3.14159265358979 / 2.0 - real'(z) / SC;
        default:                 v = real'(z) / SC;
      endcase
      v    = v * (2.0 ** adj);
      tol  = ((v < 0) ? -v : v) * 1e-6 + 3.0 / SC * (2.0 ** adj);
      prev = f;
      load = 1'b1;
      #1;
      check(f == prev, "register holds until the clock edge");
      @(negedge clk);
      load = 1'b0;
      r = f2r(f);
      check((r - v <= tol) && (v - r <= tol), $sformatf("%s: %g vs %g", op.name(), r, v));
      x = ~x;
      @(negedge clk);
      check(f2r(f) == r, "register holds while load is low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
