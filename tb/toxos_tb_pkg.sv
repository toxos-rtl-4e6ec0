// toxos_tb_pkg -- testbench helpers: IEEE-754 single <-> real conversion,
// written out field by field so that reference values do not depend on the
// design's own converters.
package toxos_tb_pkg;

  function automatic real f2r(input logic [31:0] f);
    real m, r;
    int  e;
    if (f[30:23] == 8'h00) return 0.0;
    m = 1.0 + real'(f[22:0]) / 8388608.0;
    e = int'(f[30:23]) - 127;
    r = m * (2.0 ** e);
    return f[31] ? -r : r;
  endfunction

  function automatic logic [31:0] r2f(input real v);
    real a;
    int  e;
    longint fr;
    if (v == 0.0) return 32'h0;
    a = (v < 0.0) ? -v : v;
    e = 0;
    while (a >= 2.0) begin a = a / 2.0; e++; end
    while (a < 1.0)  begin a = a * 2.0; e--; end
    fr = longint'($rtoi((a - 1.0) * 8388608.0 + 0.5));
    if (fr >= 64'd8388608) begin fr = 0; e++; end
    return {(v < 0.0), 8'(e + 127), fr[22:0]};
  endfunction

  // uniform real in [lo, hi)
  function automatic real urand(input real lo, input real hi);
    return lo + (hi - lo) * (real'($urandom % 1000000) / 1000000.0);
  endfunction

endpackage
