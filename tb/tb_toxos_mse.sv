// tb_toxos_mse -- accuracy sweep over the configuration space (the error
// study of the design: sin as benchmark, varying CORDIC iterations, fraction
// bits and latency).  Each configuration is a separate TOXOS instance run on
// 200 points in [-1.5, 1.5].  Checked:
//   * every operation completes in LATENCY+2 cycles;
//   * with 24 fraction bits the MSE falls as iterations go 8 -> 12 -> 16 -> 20;
//   * at 8 iterations the MSE is in the 1e-6 .. 1e-4 band (about 1e-5,
//     limited by the 8-iteration angle resolution);
//   * at 20 iterations the MSE falls as fraction bits go 12 -> 16 -> 20;
//   * changing LATENCY at 20 iterations (1, 2, 4, 5, 10, 20 cycles, i.e.
//     20 .. 1 add-shift units) gives bit-identical results: the trade is
//     purely area against cycles;
//   * with 4 add-shift units kept, going from 16 iterations in 4 cycles to
//     24 iterations in 6 cycles cuts the MSE by more than 100 times (the
//     published example of buying accuracy with latency, not area);
//   * past 24 iterations a 24-bit fraction stops helping (28 iterations give
//     no lower MSE than 24), while 28 fraction bits reach the single-precision
//     floor (below 1e-14);
//   * at 20 iterations, 28 fraction bits are no worse than 24.
module tb_toxos_mse;

  localparam int N = 17;
  // configuration table: ITER, LATENCY, FRAC_W
  function automatic int cfg(input int g, input int k);
    int t [N][3];
    t = '{'{ 8, 4, 24}, '{12, 4, 24}, '{16, 4, 24}, '{20, 4, 24}, '{24, 4, 24},
          '{20, 4, 12}, '{20, 4, 16}, '{20, 4, 20},
          '{20, 1, 20}, '{20, 2, 20}, '{20, 5, 20}, '{20, 10, 20}, '{20, 20, 20},
          '{24, 6, 24}, '{28, 4, 24}, '{28, 4, 28}, '{20, 4, 28}};
    return t[g][k];
  endfunction

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] done;
  logic [63:0]  mse_bits [N];
  int           lat_err [N];
  real          mse [N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar g = 0; g < N; g++) begin : g_cfg
    toxos_tb_sin_probe #(.ITER(cfg(g, 0)), .LATENCY(cfg(g, 1)), .FRAC_W(cfg(g, 2))) u_probe (
      .clk_i(clk), .rst_ni(rst_n), .done_o(done[g]), .mse_o(mse_bits[g]), .lat_err_o(lat_err[g]));
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (&done);
    for (int g = 0; g < N; g++) begin
      mse[g] = $bitstoreal(mse_bits[g]);
      $display("ITER=%2d LATENCY=%2d FRAC_W=%2d  MSE=%e", cfg(g, 0), cfg(g, 1), cfg(g, 2), mse[g]);
      check(lat_err[g] == 0, $sformatf("latency errors in config %0d: %0d", g, lat_err[g]));
    end
    check(mse[0] > mse[1] && mse[1] > mse[2] && mse[2] > mse[3], "MSE falls with iterations");
    check(mse[0] > 1e-6 && mse[0] < 1e-4, "MSE at 8 iterations");
    check(mse[5] > mse[6] && mse[6] > mse[7], "MSE falls with fraction bits");
    for (int g = 8; g < 13; g++)
      check(mse[g] == mse[7], $sformatf("LATENCY=%0d changes the result", cfg(g, 1)));
    check(mse[13] == mse[4], "24 iterations: LATENCY 6 and 4 differ");
    check(mse[2] > 100.0 * mse[13], "16 -> 24 iterations on 4 units: MSE not cut 100x");
    check(mse[14] >= 0.5 * mse[4], "28 iterations on 24 fraction bits improved past the 24-bit limit");
    check(mse[15] < 1e-14, "28 iterations, 28 fraction bits: MSE above the float floor");
    check(mse[16] <= mse[3], "20 iterations: 28 fraction bits worse than 24");
    $display("MSE ratio 16 -> 24 iterations on 4 units: %0.0f", mse[2] / mse[13]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
