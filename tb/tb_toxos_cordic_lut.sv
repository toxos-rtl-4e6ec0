// tb_toxos_cordic_lut -- checks every LUT entry (20 iterations, 5 units)
// against the simulator's atan/atanh and the expected shift sequences
// (circular/linear: S = i; hyperbolic: 1,2,3,4,4,5,..,13,13,14,..).
module tb_toxos_cordic_lut;
  import toxos_pkg::*;

  localparam int ITER = 20, UNITS = 5;
  int checks = 0, failures = 0;
  coord_e coord;
  logic [4:0] base;
  logic [UNITS-1:0][4:0]  shift;
  logic [UNITS-1:0][23:0] alpha;

  toxos_cordic_lut #(.ITER(ITER), .UNITS(UNITS)) dut (
    .coord_i(coord), .base_i(base), .shift_o(shift), .alpha_o(alpha));

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

  int hyp_seq [ITER] = '{1,2,3,4,4,5,6,7,8,9,10,11,12,13,13,14,15,16,17,18};

  initial begin
    for (int c = 0; c < 3; c++) begin
      for (int b = 0; b < ITER; b += UNITS) begin
        coord = coord_e'(c);
        base  = 5'(b);
        #1;
        for (int u = 0; u < UNITS; u++) begin
          int  k, s;
          real ang, got;
          k = b + u;
          s = (c == 2) ? hyp_seq[k] : k;
          case (c)
            0: ang = $atan(2.0 ** (-s));
            1: ang = 2.0 ** (-s);
            default: ang = $atanh(2.0 ** (-s));
          endcase
          got = real'(alpha[u]) / 1048576.0;
          check(int'(shift[u]) == s, $sformatf("shift c=%0d k=%0d got %0d exp %0d", c, k, shift[u], s));
          check((got - ang) < 0.51 / 1048576.0 && (ang - got) < 0.51 / 1048576.0,
                $sformatf("angle c=%0d k=%0d got %f exp %f", c, k, got, ang));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
