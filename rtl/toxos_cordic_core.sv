// toxos_cordic_core -- rolled fixed-point CORDIC engine.
//
// ITER iterations of the unified CORDIC are folded onto UNITS = ITER/LATENCY
// chained add-shift units.  In the first cycle of a pass (start_i) the chain
// takes the initial vector (x0, y0, z0); in each following cycle it takes the
// loop register, which captures the chain output every cycle of the pass.
// The latency counter selects, through the LUT, the shifts and angles of the
// UNITS iterations done in that cycle.  After LATENCY cycles the loop register
// holds the result and done_o is high for one cycle (the cycle after the last
// iteration cycle); x_o/y_o/z_o stay valid until the next start.
// coord_i and mode_i are sampled with start_i and held for the pass.
// COORD_EN (bit per coord_e) lists the coordinate systems to build; a
// system left out is never selected, so its angles and datapath are removed.
// Latency: start in cycle t, done_o and result in cycle t+LATENCY.
// UNITS = ITER/LATENCY and the loop register are as published; chaining the
// units combinationally inside one cycle is how this design reads that.
module toxos_cordic_core
  import toxos_pkg::*;
#(
  parameter int unsigned ITER    = 20,
  parameter int unsigned LATENCY = 4,
  parameter int unsigned FRAC_W  = 20,
  parameter int unsigned INT_W   = 4,
  parameter int unsigned W       = INT_W + FRAC_W,
  parameter logic [2:0]  COORD_EN = 3'b111
) (
  input  logic                clk_i,
  input  logic                rst_ni,
  input  logic                start_i,
  input  coord_e              coord_i,
  input  mode_e               mode_i,
  input  logic signed [W-1:0] x0_i,
  input  logic signed [W-1:0] y0_i,
  input  logic signed [W-1:0] z0_i,
  output logic                busy_o,
  output logic                done_o,
  output logic signed [W-1:0] x_o,
  output logic signed [W-1:0] y_o,
  output logic signed [W-1:0] z_o
);

  localparam int unsigned UNITS = ITER / LATENCY;
  localparam int unsigned SW    = $clog2(ITER + 1);
  localparam int unsigned IW    = $clog2(ITER + 1);

  // configuration check
  if (UNITS * LATENCY != ITER) begin : g_bad_cfg
    $error("toxos_cordic_core: ITER must be a multiple of LATENCY");
  end

  logic                active, first, last;
  logic [IW-1:0]       base;
  coord_e              coord_q, coord_in, coord;
  mode_e               mode_q, mode;
  logic signed [W-1:0] x_q, y_q, z_q;
  logic                done_q;

  logic [UNITS-1:0][SW-1:0] shift;
  logic [UNITS-1:0][W-1:0]  alpha;
  logic signed [W-1:0] xc [UNITS+1];
  logic signed [W-1:0] yc [UNITS+1];
  logic signed [W-1:0] zc [UNITS+1];

  toxos_latency_counter #(.LATENCY(LATENCY), .UNITS(UNITS), .IW(IW)) u_cnt (
    .clk_i, .rst_ni, .start_i,
    .active_o (active),
    .first_o  (first),
    .last_o   (last),
    .base_o   (base)
  );

  // A coordinate system left out of COORD_EN is mapped onto one that is
  // built, so that synthesis drops its angles and datapath; with a single
  // system the choice becomes a constant.
  localparam coord_e COORD_DEF = COORD_EN[COORD_CIRC] ? COORD_CIRC :
                                 COORD_EN[COORD_HYP]  ? COORD_HYP  : COORD_LIN;
  localparam logic [3:0] CEN4 = {1'b0, COORD_EN};

  assign coord_in = first ? coord_i : coord_q;
  assign coord    = CEN4[coord_in] ? coord_in : COORD_DEF;
  assign mode  = first ? mode_i  : mode_q;

  toxos_cordic_lut #(
    .ITER(ITER), .UNITS(UNITS), .FRAC_W(FRAC_W), .W(W), .SW(SW), .IW(IW)
  ) u_lut (
    .coord_i (coord),
    .base_i  (base),
    .shift_o (shift),
    .alpha_o (alpha)
  );

  assign xc[0] = first ? x0_i : x_q;
  assign yc[0] = first ? y0_i : y_q;
  assign zc[0] = first ? z0_i : z_q;

  for (genvar u = 0; u < UNITS; u++) begin : g_unit
    toxos_addshift #(.W(W), .SW(SW)) u_as (
      .coord_i (coord),
      .mode_i  (mode),
      .shift_i (shift[u]),
      .alpha_i (alpha[u]),
      .x_i     (xc[u]),
      .y_i     (yc[u]),
      .z_i     (zc[u]),
      .x_o     (xc[u+1]),
      .y_o     (yc[u+1]),
      .z_o     (zc[u+1])
    );
  end

  // loop register
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      x_q     <= '0;
      y_q     <= '0;
      z_q     <= '0;
      coord_q <= COORD_CIRC;
      mode_q  <= MODE_ROT;
      done_q  <= 1'b0;
    end else begin
      done_q <= last;
      if (active) begin
        x_q <= xc[UNITS];
        y_q <= yc[UNITS];
        z_q <= zc[UNITS];
      end
      if (first) begin
        coord_q <= coord_i;
        mode_q  <= mode_i;
      end
    end
  end

  assign busy_o = active;
  assign done_o = done_q;
  assign x_o    = x_q;
  assign y_o    = y_q;
  assign z_o    = z_q;

endmodule
