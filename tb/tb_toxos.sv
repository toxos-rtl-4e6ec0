// tb_toxos -- end-to-end test of the TOXOS coprocessor at its default
// configuration (20 iterations, latency 4, Q4.20).
//
// A host-core model offloads x-cordic instructions over the CV-X-IF issue,
// commit and result channels.  Every one of the twelve operations is run on
// random operands inside its range of convergence and compared against the
// real-valued math functions of the simulator (absolute tolerance for bounded
// results, relative tolerance for hypot and div).  The test also exercises and
// counts: operand stalls (rs_valid low), result back-pressure (result_ready
// low), late commits, killed instructions (no result may appear), foreign
// instructions (accept must be 0) and the two-pass asin/acos.  Undisturbed
// operations must deliver their result LATENCY+2 cycles (2*LATENCY+2 for
// asin/acos) after the issue handshake.
module tb_toxos;
  import toxos_pkg::*;
  import toxos_tb_pkg::*;

  localparam int LAT = 4;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          issue_valid;
  logic          issue_ready;
  x_issue_req_t  issue_req;
  x_issue_resp_t issue_resp;
  logic          commit_valid;
  x_commit_t     commit;
  logic          result_valid, result_ready;
  x_result_t     result;
  logic          stall;

  int checks = 0, failures = 0;
  int cyc = 0;
  int n_stall = 0, n_backpressure = 0, n_late_commit = 0, n_kill = 0;
  int n_reject = 0, n_two_pass = 0, n_stall_cycles = 0;
  logic [X_ID_W-1:0] next_id = '0;
  real max_err [13];   // worst |error| per op (relative for hypot and div)

  toxos dut (
    .clk_i            (clk),
    .rst_ni           (rst_n),
    .x_issue_valid_i  (issue_valid),
    .x_issue_ready_o  (issue_ready),
    .x_issue_req_i    (issue_req),
    .x_issue_resp_o   (issue_resp),
    .x_commit_valid_i (commit_valid),
    .x_commit_i       (commit),
    .x_result_valid_o (result_valid),
    .x_result_ready_i (result_ready),
    .x_result_o       (result),
    .stall_o          (stall)
  );

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (stall) n_stall_cycles <= n_stall_cycles + 1;
  end

  initial begin : watchdog
    wait (cyc >= 20000);
    failures++;
    $display("watchdog expired at cycle %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  function automatic logic [31:0] mk_instr(input int f7, input int rd);
    return {7'(f7), 5'd11, 5'd10, 3'b000, 5'(rd), OPC_XCORDIC};
  endfunction

  function automatic real ref_val(input op_e op, input real a, input real b);
    case (op)
      OP_SIN:   return $sin(a);
      OP_COS:   return $cos(a);
      OP_ATAN:  return $atan(a);
      OP_ASIN:  return $asin(a);
      OP_ACOS:  return $acos(a);
      OP_COSH:  return $cosh(a);
      OP_SINH:  return $sinh(a);
      OP_ATANH: return $atanh(a);
      OP_EXP:   return $exp(a);
      OP_ATAN2: return $atan2(a, b);
      OP_HYPOT: return $hypot(a, b);
      OP_DIV:   return a / b;
      default:  return 0.0;
    endcase
  endfunction

  // Issue one instruction.  stall_cyc: cycles with rs_valid low first;
  // commit_delay: cycles after issue before the commit (0 = with the issue);
  // kill: commit with commit_kill; bp: cycles of result_ready low.
  task automatic run(input int f7, input real a, input real b, input int stall_cyc,
                     input int commit_delay, input bit kill, input int bp,
                     output logic [31:0] res, output int lat);
    int t_fire, w;
    logic [X_ID_W-1:0] id;
    id = next_id;
    next_id++;
    @(negedge clk);
    issue_valid        = 1'b1;
    issue_req.instr    = mk_instr(f7, 5);
    issue_req.id       = id;
    issue_req.rs[0]    = r2f(a);
    issue_req.rs[1]    = r2f(b);
    issue_req.rs_valid = (stall_cyc > 0) ? 2'b00 : 2'b11;
    commit_valid       = (commit_delay == 0);
    commit.id          = id;
    commit.commit_kill = kill;
    w = 0;
    #1;
    while (!issue_ready) begin
      @(negedge clk);
      w++;
      if (w >= stall_cyc) issue_req.rs_valid = 2'b11;
      #1;
    end
    check(issue_resp.accept && issue_resp.writeback, "issue accept");
    t_fire = cyc + 1;
    @(negedge clk);
    issue_valid  = 1'b0;
    issue_req.rs_valid = 2'b00;
    if (commit_delay == 0) commit_valid = 1'b0;
    else begin
      repeat (commit_delay - 1) @(negedge clk);
      commit_valid = 1'b1;
      @(negedge clk);
      commit_valid = 1'b0;
    end
    res = 32'h0;
    lat = -1;
    if (kill) begin
      repeat (3 * LAT + 10) begin
        @(negedge clk);
        #1;
        check(!result_valid, "no result after kill");
      end
      n_kill++;
      return;
    end
    result_ready = (bp == 0);
    w = 0;
    forever begin
      #1;
      if (result_valid && !result_ready) begin
        w++;
        if (w > bp) result_ready = 1'b1;
      end
      if (result_valid && result_ready) break;
      @(negedge clk);
    end
    if (bp > 0) n_backpressure++;
    if (stall_cyc > 0) n_stall++;
    if (commit_delay > 0) n_late_commit++;
    check(result.id == id && result.rd == 5'd5 && result.we, "result id/rd/we");
    res = result.data;
    lat = cyc + 1 - t_fire;
    @(negedge clk);
    result_ready = 1'b0;
  endtask

  task automatic do_op(input op_e op, input real a, input real b, input int mech);
    logic [31:0] res;
    int          lat, exp_lat;
    real         r, ref_r, tol;
    bit          two;
    two     = (op == OP_ASIN) || (op == OP_ACOS);
    exp_lat = two ? 2 * LAT + 2 : LAT + 2;
    case (mech)
      1: run(int'(op), a, b, 3, 0, 0, 0, res, lat);
      2: run(int'(op), a, b, 0, 0, 0, 3, res, lat);
      3: run(int'(op), a, b, 0, 9, 0, 0, res, lat);
      default: run(int'(op), a, b, 0, 0, 0, 0, res, lat);
    endcase
    r     = f2r(res);
    ref_r = ref_val(op, a, b);
    if (op == OP_HYPOT || op == OP_DIV) tol = 2e-4 * ((ref_r < 0) ? -ref_r : ref_r);
    else                                tol = 2e-4;
    begin
      real e;
      e = (r > ref_r) ? r - ref_r : ref_r - r;
      if (op == OP_HYPOT || op == OP_DIV) e = e / ((ref_r < 0) ? -ref_r : ref_r);
      if (e > max_err[int'(op)]) max_err[int'(op)] = e;
    end
    check((r - ref_r <= tol) && (ref_r - r <= tol),
          $sformatf("%s(%f,%f) = %f, expected %f", op.name(), a, b, r, ref_r));
    if (mech == 0)
      check(lat == exp_lat, $sformatf("%s latency %0d, expected %0d", op.name(), lat, exp_lat));
    if (two) n_two_pass++;
  endtask

  initial begin
    logic [31:0] res;
    int lat;
    real a, b;
    issue_valid  = 1'b0;
    issue_req    = '0;
    commit_valid = 1'b0;
    commit       = '0;
    result_ready = 1'b0;
    foreach (max_err[i]) max_err[i] = 0.0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    for (int rep = 0; rep < 40; rep++) begin
      for (int o = 1; o <= 12; o++) begin
        op_e op;
        op = op_e'(o);
        case (op)
          OP_SIN, OP_COS:           begin a = urand(-1.5, 1.5);  b = 0.0; end
          OP_COSH, OP_SINH, OP_EXP: begin a = urand(-1.05, 1.05); b = 0.0; end
          OP_ATANH, OP_ASIN, OP_ACOS: begin a = urand(-0.78, 0.78); b = 0.0; end
          OP_ATAN:                  begin a = urand(-50.0, 50.0); b = 0.0; end
          OP_ATAN2:                 begin a = urand(-20.0, 20.0); b = urand(-20.0, 20.0); end
          OP_HYPOT:                 begin a = urand(-1e3, 1e3);   b = urand(-1e3, 1e3); end
          default:                  begin a = urand(-1e4, 1e4);   b = urand(0.01, 100.0);
                                          if (rep % 2 == 1) b = -b; end
        endcase
        do_op(op, a, b, (rep + o) % 4);
      end
    end

    // killed instruction: no result, and the next one still works
    run(int'(OP_SIN), 0.5, 0.0, 0, 0, 1, 0, res, lat);
    run(int'(OP_EXP), 0.5, 0.0, 0, 4, 1, 0, res, lat);
    do_op(OP_COS, 0.25, 0.0, 0);

    // foreign instructions are refused without blocking the interface
    @(negedge clk);
    issue_valid     = 1'b1;
    issue_req.instr = 32'h00B5_0533;            // add a0, a0, a1
    #1;
    check(issue_ready && !issue_resp.accept, "foreign instruction refused");
    issue_req.instr = mk_instr(13, 5);          // unused func7
    #1;
    check(issue_ready && !issue_resp.accept, "unknown func7 refused");
    n_reject += 2;
    @(negedge clk);
    issue_valid = 1'b0;

    // every mechanism must have been seen
    check(n_stall > 0 && n_stall_cycles > 0, "operand stall exercised");
    check(n_backpressure > 0, "result back-pressure exercised");
    check(n_late_commit > 0, "late commit exercised");
    check(n_kill > 0, "commit kill exercised");
    check(n_reject > 0, "refusal exercised");
    check(n_two_pass > 0, "two-pass op exercised");
    for (int o = 1; o <= 12; o++) $display("worst error %-8s %e", op_e'(o), max_err[o]);
    $display("mechanisms: stall=%0d (%0d cycles) backpressure=%0d late_commit=%0d kill=%0d reject=%0d two_pass=%0d",
             n_stall, n_stall_cycles, n_backpressure, n_late_commit, n_kill, n_reject, n_two_pass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
