// toxos_op_decoder -- recognises x-cordic instructions.
//
// An offloaded 32-bit instruction is TOXOS's when its opcode is 0001011 and
// its func7 field (bits 31:25) is one of the twelve published codes 1 .. 12
// (sin, cos, atan, asin, acos, cosh, sinh, atanh, exp, atan2, hypot, div).
// FUNC_EN masks operations out (bit n enables the op with func7 = n), the
// configurable function set of the design; by default all are enabled.
// For a recognised op it returns the op, the number of source registers it
// reads (2 for atan2, hypot and div, else 1) and the destination register.
// The funct3 field is not decoded (this design's choice).  Combinational.
module toxos_op_decoder
  import toxos_pkg::*;
#(
  parameter logic [12:0] FUNC_EN = 13'h1FFE
) (
  input  logic [31:0] instr_i,
  output logic        valid_o,
  output op_e         op_o,
  output logic        two_ops_o,
  output logic [4:0]  rd_o
);

  logic [6:0] f7;

  always_comb begin
    f7        = instr_i[31:25];
    valid_o   = 1'b0;
    op_o      = OP_NONE;
    two_ops_o = 1'b0;
    rd_o      = instr_i[11:7];
    if (instr_i[6:0] == OPC_XCORDIC && f7 >= 7'd1 && f7 <= 7'd12 && FUNC_EN[f7[3:0]]) begin
      valid_o   = 1'b1;
      op_o      = op_e'(f7[3:0]);
      two_ops_o = (op_o == OP_ATAN2) || (op_o == OP_HYPOT) || (op_o == OP_DIV);
    end
  end

endmodule
