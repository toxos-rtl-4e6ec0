// tb_toxos_addshift -- checks one micro-rotation against an integer model of
// the unified CORDIC equations for random vectors, all three coordinate
// systems, both modes and shifts 0..20.
module tb_toxos_addshift;
  import toxos_pkg::*;

  int checks = 0, failures = 0;
  coord_e coord;
  mode_e  mode;
  logic [4:0] sh;
  logic signed [23:0] al, x, y, z, xo, yo, zo;

  toxos_addshift dut (.coord_i(coord), .mode_i(mode), .shift_i(sh), .alpha_i(al),
                      .x_i(x), .y_i(y), .z_i(z), .x_o(xo), .y_o(yo), .z_o(zo));

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
      longint lx, ly, lz, ex, ey, ez, m, sg;
      coord = coord_e'($urandom % 3);
      mode  = mode_e'($urandom % 2);
      sh    = 5'($urandom % 21);
      al    = 24'($urandom % 1000000);
      x     = 24'($urandom) >>> 2;
      y     = 24'($urandom) >>> 2;
      z     = 24'($urandom) >>> 2;
      #1;
      lx = longint'(x); ly = longint'(y); lz = longint'(z);
      m  = (coord == COORD_CIRC) ? 1 : (coord == COORD_HYP) ? -1 : 0;
      if (mode == MODE_ROT) sg = (lz < 0) ? -1 : 1;
      else                  sg = (((lx < 0) ? -1 : 1) * ((ly < 0) ? -1 : 1) > 0) ? -1 : 1;
      ex = lx - m * sg * (ly >>> sh);
      ey = ly + sg * (lx >>> sh);
      ez = lz - sg * longint'(al);
      check(longint'(xo) == ex && longint'(yo) == ey && longint'(zo) == ez,
            $sformatf("c=%0d m=%0d s=%0d", coord, mode, sh));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
