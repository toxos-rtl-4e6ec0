// tb_toxos_latency_counter -- checks the pass counter: after a start pulse it
// must be active for exactly LATENCY cycles, with first on cycle 0, last on
// cycle LATENCY-1 and base = cycle*UNITS, then idle until the next start.
module tb_toxos_latency_counter;
  localparam int LAT = 4, UNITS = 5;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic active, first, last;
  logic [4:0] base;

  toxos_latency_counter #(.LATENCY(LAT), .UNITS(UNITS)) dut (
    .clk_i(clk), .rst_ni(rst_n), .start_i(start),
    .active_o(active), .first_o(first), .last_o(last), .base_o(base));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!active && !last, "idle after reset");
    for (int r = 0; r < 5; r++) begin
      start = 1'b1;
      for (int c = 0; c < LAT; c++) begin
        #1;
        check(active, "active");
        check(first == (c == 0), "first");
        check(last == (c == LAT - 1), $sformatf("last at cycle %0d", c));
        check(int'(base) == c * UNITS, $sformatf("base %0d at cycle %0d", base, c));
        @(negedge clk);
        start = 1'b0;
      end
      repeat (r) begin
        #1;
        check(!active, "idle between passes");
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
