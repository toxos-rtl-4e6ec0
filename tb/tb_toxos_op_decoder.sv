// tb_toxos_op_decoder -- checks the x-cordic decoder: every func7 value with
// the custom opcode and with a foreign opcode, the two-operand flag, the rd
// field, and a second instance with some functions disabled through FUNC_EN.
module tb_toxos_op_decoder;
  import toxos_pkg::*;

  int checks = 0, failures = 0;
  logic [31:0] instr;
  logic v_all, two_all, v_sub, two_sub;
  op_e  op_all, op_sub;
  logic [4:0] rd_all, rd_sub;

  // only sin/cos (func7 1, 2) and div (12) enabled in the second instance
  localparam logic [12:0] SUB_EN = 13'b1_0000_0000_0110;

  toxos_op_decoder dut_all (.instr_i(instr), .valid_o(v_all), .op_o(op_all),
                            .two_ops_o(two_all), .rd_o(rd_all));
  toxos_op_decoder #(.FUNC_EN(SUB_EN)) dut_sub (.instr_i(instr), .valid_o(v_sub),
                            .op_o(op_sub), .two_ops_o(two_sub), .rd_o(rd_sub));

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
    for (int f7 = 0; f7 < 128; f7++) begin
      for (int k = 0; k < 2; k++) begin
        bit  exp_v, exp_two, exp_sub;
        int  rd;
        rd    = $urandom % 32;
        instr = {7'(f7), 5'($urandom), 5'($urandom), 3'($urandom), 5'(rd),
                 (k == 0) ? 7'b0001011 : 7'b0101011};
        #1;
        exp_v   = (k == 0) && f7 >= 1 && f7 <= 12;
        exp_two = exp_v && (f7 == 10 || f7 == 11 || f7 == 12);
        exp_sub = exp_v && (f7 == 1 || f7 == 2 || f7 == 12);
        check(v_all == exp_v, $sformatf("valid f7=%0d k=%0d", f7, k));
        check(two_all == exp_two, $sformatf("two_ops f7=%0d", f7));
        check(v_sub == exp_sub, $sformatf("FUNC_EN valid f7=%0d", f7));
        check(rd_all == 5'(rd), "rd field");
        if (exp_v) check(int'(op_all) == f7, $sformatf("op f7=%0d", f7));
        else       check(op_all == OP_NONE, "op none");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
