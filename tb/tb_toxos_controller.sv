// tb_toxos_controller -- checks the CV-X-IF control on its own, with a model
// of the CORDIC core that raises done LATENCY cycles after each start.
// Covered: refusal of foreign instructions, operand stall, start one cycle
// after the issue handshake, load on done, result one cycle later with the
// right id/rd/data, no new issue while busy, the second pass of asin (pass
// flag set on the second start), late commit, commit kill and back-pressure.
module tb_toxos_controller;
  import toxos_pkg::*;

  localparam int LAT = 4;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic issue_valid, issue_ready, commit_valid, result_valid, result_ready;
  x_issue_req_t  issue_req;
  x_issue_resp_t issue_resp;
  x_commit_t     commit;
  x_result_t     result;
  logic dec_valid, dec_two, pass, start, done, load, stall;
  op_e  dec_op, op;
  logic [4:0] dec_rd;
  logic [31:0] a, b, res;
  int cyc = 0, t_start [$], t_load [$];
  int done_at = -1;

  toxos_op_decoder u_dec (.instr_i(issue_req.instr), .valid_o(dec_valid), .op_o(dec_op),
                          .two_ops_o(dec_two), .rd_o(dec_rd));

  toxos_controller dut (.clk_i(clk), .rst_ni(rst_n),
    .issue_valid_i(issue_valid), .issue_ready_o(issue_ready), .issue_req_i(issue_req),
    .issue_resp_o(issue_resp), .commit_valid_i(commit_valid), .commit_i(commit),
    .result_valid_o(result_valid), .result_ready_i(result_ready), .result_o(result),
    .dec_valid_i(dec_valid), .dec_op_i(dec_op), .dec_two_ops_i(dec_two), .dec_rd_i(dec_rd),
    .op_o(op), .pass_o(pass), .a_o(a), .b_o(b),
    .two_pass_i(op == OP_ASIN || op == OP_ACOS), .start_o(start), .core_done_i(done),
    .load_o(load), .res_data_i(res), .stall_o(stall));

  always #5 clk = ~clk;

  // core model: done LAT cycles after start; result data derived from a, b
  assign done = (cyc == done_at);
  assign res  = a ^ {b[15:0], b[31:16]} ^ {31'b0, pass};
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (start && rst_n) begin
      done_at <= cyc + LAT;
      t_start.push_back(cyc);
    end
    if (load && rst_n) t_load.push_back(cyc);
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ins(input op_e o, input int rd);
    return {3'b0, 4'(o), 5'd2, 5'd1, 3'b0, 5'(rd), OPC_XCORDIC};
  endfunction

  // one instruction; returns cycle of the issue handshake (-1 if none)
  task automatic issue(input op_e o, input int rd, input int id, input int stall_cyc,
                       input logic [31:0] va, input logic [31:0] vb, output int t_fire);
    int w;
    @(negedge clk);
    issue_valid = 1'b1;
    issue_req.instr = ins(o, rd);
    issue_req.id = 4'(id);
    issue_req.rs[0] = va;
    issue_req.rs[1] = vb;
    issue_req.rs_valid = (stall_cyc > 0) ? 2'b01 : 2'b11;
    w = 0;
    #1;
    while (!issue_ready) begin
      check(stall || stall_cyc == 0, "stall flagged while waiting for operands");
      @(negedge clk);
      w++;
      if (w >= stall_cyc) issue_req.rs_valid = 2'b11;
      #1;
    end
    if (stall_cyc > 0) check(w == stall_cyc, "stalled until operands valid");
    check(issue_resp.accept, "accepted");
    t_fire = cyc;
    @(negedge clk);
    issue_valid = 1'b0;
  endtask

  task automatic take_result(input int rd, input int id, input int t_fire, input int exp_lat,
                             input logic [31:0] exp_data);
    int n;
    n = 0;
    result_ready = 1'b1;
    #1;
    while (!result_valid && n < 40) begin @(negedge clk); n++; #1; end
    check(result_valid && cyc - t_fire == exp_lat,
          $sformatf("result latency %0d, expected %0d", cyc - t_fire, exp_lat));
    check(result.id == 4'(id) && result.rd == 5'(rd) && result.we && result.data == exp_data,
          "result fields");
    @(negedge clk);
    result_ready = 1'b0;
  endtask

  initial begin
    int t;
    issue_valid = 0; issue_req = '0; commit_valid = 0; commit = '0; result_ready = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // foreign instruction: ready, not accepted, nothing started
    @(negedge clk);
    issue_valid = 1'b1;
    issue_req.instr = 32'h0000_0033;
    #1;
    check(issue_ready && !issue_resp.accept, "foreign refused");
    @(negedge clk);
    issue_valid = 1'b0;
    check(t_start.size() == 0, "no start for foreign instruction");

    // plain op with commit together with the issue
    commit_valid = 1'b1; commit.id = 4'd3; commit.commit_kill = 1'b0;
    issue(OP_SIN, 7, 3, 0, 32'h1234_5678, 32'h0, t);
    commit_valid = 1'b0;
    @(negedge clk);
    #1;
    check(!issue_ready, "not ready while busy");
    take_result(7, 3, t, LAT + 2, 32'h1234_5678);
    check(t_start.size() == 1 && t_start[0] == t + 1, "start one cycle after issue");
    check(t_load.size() == 1 && t_load[0] == t + LAT + 1, "load on done");

    // two-operand op with operand stall and late commit, back-pressure
    issue(OP_DIV, 9, 4, 3, 32'hAAAA_0000, 32'h0000_5555, t);
    repeat (LAT + 4) @(negedge clk);
    #1;
    check(!result_valid, "no result before commit");
    commit_valid = 1'b1; commit.id = 4'd4; commit.commit_kill = 1'b0;
    @(negedge clk);
    commit_valid = 1'b0;
    #1;
    check(result_valid, "result after late commit");
    repeat (3) begin
      @(negedge clk);
      #1;
      check(result_valid && result.data == (32'hAAAA_0000 ^ 32'h5555_0000), "held under back-pressure");
    end
    // taken 1 + (LAT+4) + 1 (commit) + 3 (held) cycles after the issue
    take_result(9, 4, t, LAT + 9, 32'hAAAA_0000 ^ 32'h5555_0000);

    // asin: two passes, second start when the first is done
    t_start.delete();
    commit_valid = 1'b1; commit.id = 4'd5; commit.commit_kill = 1'b0;
    issue(OP_ASIN, 1, 5, 0, 32'h0F0F_0F0F, 32'h0, t);
    commit_valid = 1'b0;
    take_result(1, 5, t, 2 * LAT + 2, 32'h0F0F_0F0F ^ 32'h1);
    check(t_start.size() == 2 && t_start[1] == t + 1 + LAT, "second pass start");

    // killed op: no result, back to idle
    issue(OP_EXP, 2, 6, 0, 32'h1, 32'h0, t);
    commit_valid = 1'b1; commit.id = 4'd6; commit.commit_kill = 1'b1;
    @(negedge clk);
    commit_valid = 1'b0;
    repeat (3 * LAT) begin
      @(negedge clk);
      #1;
      check(!result_valid, "no result after kill");
    end
    issue_valid = 1'b1;
    issue_req.instr = ins(OP_COS, 3);
    issue_req.rs_valid = 2'b11;
    #1;
    check(issue_ready, "idle again after kill");
    issue_valid = 1'b0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
