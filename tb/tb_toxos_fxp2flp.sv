// tb_toxos_fxp2flp -- checks fixed-to-float conversion: random Q4.20 words
// and exponent offsets must convert exactly (q * 2^(adj-20)), plus zero, the
// most negative word, overflow to infinity and underflow to zero.
module tb_toxos_fxp2flp;
  import toxos_tb_pkg::*;

  int checks = 0, failures = 0;
  logic signed [23:0] q;
  logic signed [9:0]  adj;
  logic [31:0]        f;

  toxos_fxp2flp dut (.q_i(q), .adj_i(adj), .f_o(f));

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
    for (int i = 0; i < 3000; i++) begin
      real r;
      int  s;
      s   = int'($urandom % 61) - 30;
      q   = 24'($urandom);
      if (i % 3 == 0) q = q >>> ($urandom % 20);
      adj = 10'(s);
      #1;
      r = real'(q) / 1048576.0 * (2.0 ** s);
      check(f2r(f) == r, $sformatf("q=%0d adj=%0d f=%h (%g) ref %g", q, s, f, f2r(f), r));
    end
    q = 0; adj = 0; #1; check(f == 32'h0, "zero");
    q = 24'sh800000; #1; check(f == 32'hC100_0000, "-8.0");
    q = 24'sd1048576; #1; check(f == 32'h3F80_0000, "1.0");
    q = 24'sd1048576; adj = 10'sd200; #1; check(f == 32'h7F80_0000, "overflow to inf");
    q = -24'sd1048576; adj = -10'sd200; #1; check(f == 32'h8000_0000, "underflow to -0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
