// tb_toxos_activations -- the activation-function workloads: tanh, sigmoid,
// GELU and softmax on arrays of 64 FP32 elements, computed as a program on
// the host core would compute them, with TOXOS (default configuration) doing
// the nonlinear parts and the host's FPU modelled by real arithmetic rounded
// to FP32:
//   tanh(x)    = sinh.q(x) / cosh.q(x)                 (div.qq)
//   sigmoid(x) = 1 / (1 + exp.q(-x))                   (add on the FPU, div.qq)
//   gelu(x)    = 0.5 x (1 + tanh(0.79788 (x + 0.044715 x^3)))
//   softmax(x) = exp.q(x_i) / sum_j exp.q(x_j)         (sum on the FPU, div.qq)
// Inputs stay inside the hyperbolic range of convergence (|arg| < 1.1).
// Every result is compared with double-precision math; every TOXOS
// operation must take LATENCY+2 = 6 cycles; the coprocessor cycles spent on
// each 64-element array are reported.
// The four functions and the array size follow the published evaluation;
// how each formula is split between TOXOS and the FPU is this testbench's
// own choice.
module tb_toxos_activations;
  import toxos_pkg::*;
  import toxos_tb_pkg::*;

  localparam int NEL = 64, LAT = 4;
  logic          clk = 1'b0, rst_n = 1'b0;
  logic          issue_valid, issue_ready, commit_valid, result_valid, stall;
  x_issue_req_t  issue_req;
  x_issue_resp_t issue_resp;
  x_commit_t     commit;
  x_result_t     result;
  int cyc = 0, checks = 0, failures = 0, xcycles = 0, nops = 0;

  toxos dut (
    .clk_i(clk), .rst_ni(rst_n),
    .x_issue_valid_i(issue_valid), .x_issue_ready_o(issue_ready),
    .x_issue_req_i(issue_req), .x_issue_resp_o(issue_resp),
    .x_commit_valid_i(commit_valid), .x_commit_i(commit),
    .x_result_valid_o(result_valid), .x_result_ready_i(1'b1), .x_result_o(result),
    .stall_o(stall));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one TOXOS instruction; returns the FP32 result as a real
  task automatic xop(input op_e op, input real a, input real b, output real r);
    int t;
    @(negedge clk);
    issue_valid        = 1'b1;
    issue_req.instr    = {3'b0, 4'(op), 5'd11, 5'd10, 3'd0, 5'd10, OPC_XCORDIC};
    issue_req.id       = 4'(nops);
    issue_req.rs[0]    = r2f(a);
    issue_req.rs[1]    = r2f(b);
    issue_req.rs_valid = 2'b11;
    commit_valid       = 1'b1;
    commit.id          = 4'(nops);
    #1;
    while (!issue_ready) begin @(negedge clk); #1; end
    t = cyc + 1;
    @(negedge clk);
    issue_valid = 1'b0; commit_valid = 1'b0;
    #1;
    while (!result_valid) begin @(negedge clk); #1; end
    check(cyc + 1 - t == LAT + 2, $sformatf("%s latency %0d", op.name(), cyc + 1 - t));
    xcycles += cyc + 1 - t;
    nops++;
    r = f2r(result.data);
  endtask

  function automatic real fp(input real v);   // round to FP32, as the FPU would
    return f2r(r2f(v));
  endfunction

  task automatic xtanh(input real x, output real r);
    real s, c;
    xop(OP_SINH, x, 0.0, s);
    xop(OP_COSH, x, 0.0, c);
    xop(OP_DIV, s, c, r);
  endtask

  function automatic bit close(input real a, input real b, input real tol);
    return (a - b <= tol) && (b - a <= tol);
  endfunction

  initial begin
    real x [NEL], e [NEL];
    real r, sum, u;
    int  c0;
    issue_valid = 1'b0; issue_req = '0; commit_valid = 1'b0; commit = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NEL; i++) x[i] = fp(urand(-1.05, 1.05));

    c0 = xcycles;
    for (int i = 0; i < NEL; i++) begin
      xtanh(x[i], r);
      check(close(r, $tanh(x[i]), 1e-4), $sformatf("tanh(%f) = %f", x[i], r));
    end
    $display("tanh    : %0d coprocessor cycles for %0d elements", xcycles - c0, NEL);

    c0 = xcycles;
    for (int i = 0; i < NEL; i++) begin
      xop(OP_EXP, -x[i], 0.0, r);
      xop(OP_DIV, 1.0, fp(1.0 + r), r);
      check(close(r, 1.0 / (1.0 + $exp(-x[i])), 1e-4), $sformatf("sigmoid(%f) = %f", x[i], r));
    end
    $display("sigmoid : %0d coprocessor cycles for %0d elements", xcycles - c0, NEL);

    c0 = xcycles;
    for (int i = 0; i < NEL; i++) begin
      real g;
      u = fp(0.7978845608 * fp(x[i] + fp(0.044715 * x[i] * x[i] * x[i])));
      xtanh(u, r);
      g = fp(0.5 * x[i] * fp(1.0 + r));
      check(close(g, 0.5 * x[i] * (1.0 + $tanh(0.7978845608 * (x[i] + 0.044715 * x[i] ** 3))), 1e-4),
            $sformatf("gelu(%f) = %f", x[i], g));
    end
    $display("gelu    : %0d coprocessor cycles for %0d elements", xcycles - c0, NEL);

    c0 = xcycles;
    sum = 0.0;
    for (int i = 0; i < NEL; i++) begin
      xop(OP_EXP, x[i], 0.0, e[i]);
      sum = fp(sum + e[i]);
    end
    begin
      real ref_sum;
      ref_sum = 0.0;
      for (int i = 0; i < NEL; i++) ref_sum += $exp(x[i]);
      for (int i = 0; i < NEL; i++) begin
        xop(OP_DIV, e[i], sum, r);
        check(close(r, $exp(x[i]) / ref_sum, 1e-4 * $exp(x[i]) / ref_sum),
              $sformatf("softmax[%0d] = %e", i, r));
      end
    end
    $display("softmax : %0d coprocessor cycles for %0d elements", xcycles - c0, NEL);
    check(nops == NEL * 10, "operation count");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
