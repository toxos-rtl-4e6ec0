// toxos_cordic_lut -- shift amounts and elementary angles of the CORDIC.
//
// For a coordinate system and the index of the first iteration handled in
// the current cycle (base_i), it returns the shift S and the angle alpha of
// the UNITS consecutive iterations base_i .. base_i+UNITS-1.  The three
// tables (circular, linear, hyperbolic; ITER entries each) are constants
// computed at elaboration from the formulas in toxos_pkg, rounded to FRAC_W
// fractional bits.  The hyperbolic sequence repeats shifts 4, 13, 40, .. so
// that the hyperbolic iterations converge.  Indices past ITER-1 read the last
// entry (never used when ITER is a multiple of UNITS).  Combinational.
module toxos_cordic_lut
  import toxos_pkg::*;
#(
  parameter int unsigned ITER   = 20,
  parameter int unsigned UNITS  = 5,
  parameter int unsigned FRAC_W = 20,
  parameter int unsigned W      = 24,
  parameter int unsigned SW     = 5,
  parameter int unsigned IW     = 5
) (
  input  coord_e                          coord_i,
  input  logic [IW-1:0]                   base_i,
  output logic [UNITS-1:0][SW-1:0]        shift_o,
  output logic [UNITS-1:0][W-1:0]         alpha_o
);

  logic [SW-1:0] shift_tab [3][ITER];
  logic [W-1:0]  angle_tab [3][ITER];

  for (genvar c = 0; c < 3; c++) begin : g_coord
    for (genvar k = 0; k < ITER; k++) begin : g_iter
      localparam logic [SW-1:0] S = SW'(coord_shift(coord_e'(c), k));
      localparam logic [W-1:0]  A = W'(to_fx(coord_angle(coord_e'(c), k), FRAC_W));
      assign shift_tab[c][k] = S;
      assign angle_tab[c][k] = A;
    end
  end

  // table index of unit u: base_i + u, clamped to the last entry
  localparam int unsigned KW = (ITER > 1) ? $clog2(ITER) : 1;

  for (genvar u = 0; u < UNITS; u++) begin : g_out
    localparam logic [IW:0] LAST = (IW+1)'(ITER - 1);
    logic [IW:0]   sum;
    logic [KW-1:0] k;
    assign sum        = (IW+1)'(base_i) + (IW+1)'(u);
    assign k          = KW'((sum > LAST) ? LAST : sum);
    assign shift_o[u] = shift_tab[coord_i][k];
    assign alpha_o[u] = angle_tab[coord_i][k];
  end

endmodule
