// tb_toxos_flp2fxp -- checks float-to-fixed conversion (Q4.20 default):
// random values and exponent offsets against a truncated real reference,
// zero and subnormal inputs, and saturation of large values, infinities and
// NaNs.
module tb_toxos_flp2fxp;
  import toxos_tb_pkg::*;

  int checks = 0, failures = 0;
  logic [31:0]        a;
  logic signed [9:0]  sh;
  logic signed [23:0] q;
  logic               sat;

  toxos_flp2fxp dut (.a_i(a), .shift_i(sh), .q_o(q), .sat_o(sat));

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

  function automatic longint ref_fx(input real v);
    real s;
    s = ((v < 0) ? -v : v) * 1048576.0;
    return (v < 0) ? -longint'($rtoi(s)) : longint'($rtoi(s));
  endfunction

  initial begin
    for (int i = 0; i < 2000; i++) begin
      real v, vs;
      int  s;
      s  = int'($urandom % 21) - 10;
      v  = urand(-7.99, 7.99) * (2.0 ** s);
      a  = r2f(v);
      sh = 10'(s);
      #1;
      vs = f2r(a) / (2.0 ** s);
      check(!sat && longint'(q) == ref_fx(vs),
            $sformatf("a=%h sh=%0d q=%0d ref=%0d", a, s, q, ref_fx(vs)));
    end
    // zero, negative zero, subnormal
    a = 32'h0000_0000; sh = 0; #1; check(q == 0 && !sat, "zero");
    a = 32'h8000_0000; #1; check(q == 0 && !sat, "-zero");
    a = 32'h0000_1234; #1; check(q == 0 && !sat, "subnormal");
    // exact values
    a = 32'h3F80_0000; #1; check(q == 24'sd1048576, "1.0");
    a = 32'hC0490FDB; #1; check(q == -24'sd3294198, "-pi");
    // saturation
    a = 32'h4100_0000; #1; check(sat && q == 24'sh7FFFFF, "8.0 saturates");
    a = 32'hC2C8_0000; #1; check(sat && q == -24'sh7FFFFF, "-100 saturates");
    a = 32'h7F80_0000; #1; check(sat, "inf saturates");
    a = 32'h7FC0_0000; #1; check(sat, "nan saturates");
    a = 32'h4100_0000; sh = 10'sd2; #1; check(!sat && q == 24'sd2097152, "8.0 * 2^-2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
