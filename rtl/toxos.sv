// toxos -- CORDIC coprocessor for nonlinear functions, CV-X-IF attached.
//
// TOXOS executes the x-cordic instructions (custom opcode 0001011, func7
// selects sin, cos, atan, asin, acos, cosh, sinh, atanh, exp, atan2, hypot,
// div) offloaded by a RISC-V core over the CORE-V eXtension Interface.
// Operands arrive as IEEE-754 single-precision bit patterns in integer
// registers; the result is written back the same way.
//
// Structure (operation decoder, input handler, CORDIC core, output handler):
//   issue -> toxos_op_decoder -> toxos_controller (operand registers)
//         -> toxos_input_handler (float->fixed, m, mode, start vector)
//         -> toxos_cordic_core (ITER iterations on ITER/LATENCY add-shift
//            units, LATENCY cycles per pass, loop register)
//         -> toxos_output_handler (fixed->float, result register) -> result
// Defaults are the published configuration: 20 iterations, latency 4 cycles
// (5 add-shift units), fixed point with 4 integer and 20 fraction bits.
// Timing: result_valid_o LATENCY+2 cycles after the issue handshake
// (2*LATENCY+2 for asin/acos, which take two CORDIC passes in this design);
// one operation at a time.  Port structs are defined in toxos_pkg.
// FUNC_EN selects the functions built (bit n = func7 n), as the published
// design allows: disabled instructions are refused, and the logic of
// disabled operations and of unused coordinate systems is left out.
// Inputs are expected inside the CORDIC ranges of convergence: |x| < 1.74
// for sin/cos, |x| < 1.11 for sinh/cosh/exp, |x| < 0.8 for atanh/asin/acos;
// there is no argument reduction.
module toxos
  import toxos_pkg::*;
#(
  parameter int unsigned ITER    = 20,
  parameter int unsigned LATENCY = 4,
  parameter int unsigned INT_W   = 4,
  parameter int unsigned FRAC_W  = 20,
  parameter logic [12:0] FUNC_EN = 13'h1FFE
) (
  input  logic          clk_i,
  input  logic          rst_ni,
  input  logic          x_issue_valid_i,
  output logic          x_issue_ready_o,
  input  x_issue_req_t  x_issue_req_i,
  output x_issue_resp_t x_issue_resp_o,
  input  logic          x_commit_valid_i,
  input  x_commit_t     x_commit_i,
  output logic          x_result_valid_o,
  input  logic          x_result_ready_i,
  output x_result_t     x_result_o,
  output logic          stall_o
);

  localparam int unsigned W = INT_W + FRAC_W;

  logic        dec_valid, dec_two_ops;
  op_e         dec_op, op;
  logic [4:0]  dec_rd;
  logic        pass, two_pass, start, core_done, load, core_busy;
  logic [31:0] a, b, res;
  coord_e      coord;
  mode_e       mode;
  logic signed [W-1:0] x0, y0, z0, xr, yr, zr;
  logic signed [9:0]   adj;

  toxos_op_decoder #(.FUNC_EN(FUNC_EN)) u_dec (
    .instr_i   (x_issue_req_i.instr),
    .valid_o   (dec_valid),
    .op_o      (dec_op),
    .two_ops_o (dec_two_ops),
    .rd_o      (dec_rd)
  );

  toxos_controller u_ctrl (
    .clk_i, .rst_ni,
    .issue_valid_i  (x_issue_valid_i),
    .issue_ready_o  (x_issue_ready_o),
    .issue_req_i    (x_issue_req_i),
    .issue_resp_o   (x_issue_resp_o),
    .commit_valid_i (x_commit_valid_i),
    .commit_i       (x_commit_i),
    .result_valid_o (x_result_valid_o),
    .result_ready_i (x_result_ready_i),
    .result_o       (x_result_o),
    .dec_valid_i    (dec_valid),
    .dec_op_i       (dec_op),
    .dec_two_ops_i  (dec_two_ops),
    .dec_rd_i       (dec_rd),
    .op_o           (op),
    .pass_o         (pass),
    .a_o            (a),
    .b_o            (b),
    .two_pass_i     (two_pass),
    .start_o        (start),
    .core_done_i    (core_done),
    .load_o         (load),
    .res_data_i     (res),
    .stall_o        (stall_o)
  );

  toxos_input_handler #(
    .ITER(ITER), .INT_W(INT_W), .FRAC_W(FRAC_W), .W(W), .FUNC_EN(FUNC_EN)
  ) u_in (
    .op_i       (op),
    .pass_i     (pass),
    .a_i        (a),
    .b_i        (b),
    .xprev_i    (xr),
    .coord_o    (coord),
    .mode_o     (mode),
    .x0_o       (x0),
    .y0_o       (y0),
    .z0_o       (z0),
    .out_adj_o  (adj),
    .two_pass_o (two_pass)
  );

  toxos_cordic_core #(
    .ITER(ITER), .LATENCY(LATENCY), .FRAC_W(FRAC_W), .INT_W(INT_W), .W(W),
    .COORD_EN(coord_en(FUNC_EN))
  ) u_core (
    .clk_i, .rst_ni,
    .start_i (start),
    .coord_i (coord),
    .mode_i  (mode),
    .x0_i    (x0),
    .y0_i    (y0),
    .z0_i    (z0),
    .busy_o  (core_busy),
    .done_o  (core_done),
    .x_o     (xr),
    .y_o     (yr),
    .z_o     (zr)
  );

  toxos_output_handler #(
    .ITER(ITER), .INT_W(INT_W), .FRAC_W(FRAC_W), .W(W), .FUNC_EN(FUNC_EN)
  ) u_out (
    .clk_i, .rst_ni,
    .load_i (load),
    .op_i   (op),
    .x_i    (xr),
    .y_i    (yr),
    .z_i    (zr),
    .adj_i  (adj),
    .f_o    (res)
  );

endmodule
