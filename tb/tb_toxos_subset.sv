// tb_toxos_subset -- builds of TOXOS with a reduced function set.  The
// function mask FUNC_EN removes the logic of every disabled operation and of
// every coordinate system no enabled operation uses (a division-only build
// keeps only the linear system, for example).  Four builds are run side by
// side, each through toxos_tb_subset_probe, which checks that enabled
// operations still give correct results at the usual latency and that
// disabled ones are refused:
//   division only      13'h1000   (linear system)
//   sin and cos        13'h0006   (circular system)
//   hyperbolic group   13'h03C0   (cosh, sinh, atanh, exp)
//   asin and acos      13'h0030   (hyperbolic and circular systems)
module tb_toxos_subset;

  localparam int N = 4;

  function automatic logic [12:0] mask(input int g);
    case (g)
      0:       return 13'h1000;
      1:       return 13'h0006;
      2:       return 13'h03C0;
      default: return 13'h0030;
    endcase
  endfunction

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] done;
  int checks_g [N];
  int fail_g [N];

  always #5 clk = ~clk;

  for (genvar g = 0; g < N; g++) begin : g_cfg
    toxos_tb_subset_probe #(.FUNC_EN(mask(g))) u_probe (
      .clk_i(clk), .rst_ni(rst_n), .done_o(done[g]),
      .checks_o(checks_g[g]), .failures_o(fail_g[g]));
  end

  initial begin : watchdog
    int checks, failures;
    repeat (20000) @(posedge clk);
    checks = 0; failures = 1;
    for (int g = 0; g < N; g++) begin checks += checks_g[g]; failures += fail_g[g]; end
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int checks, failures;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (&done);
    checks = 0; failures = 0;
    for (int g = 0; g < N; g++) begin
      $display("FUNC_EN=%h: %0d checks, %0d failures", mask(g), checks_g[g], fail_g[g]);
      checks += checks_g[g];
      failures += fail_g[g];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
