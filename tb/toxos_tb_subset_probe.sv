// toxos_tb_subset_probe -- testbench helper: one TOXOS instance built with
// the function set FUNC_EN (bit n enables the op with func7 = n), driven as a
// host core would drive it.  Every func7 from 1 to 12 is issued NREP times
// with random operands inside the ranges of convergence:
//   * an enabled op must be accepted, return its result in LATENCY+2 cycles
//     (2*LATENCY+2 for asin/acos) and agree with double-precision math to
//     3e-5 (relative above 1);
//   * a disabled op must be refused at once (ready high, accept low) and
//     produce no result.
// checks_o/failures_o count the outcome; done_o rises at the end.
module toxos_tb_subset_probe
  import toxos_pkg::*;
  import toxos_tb_pkg::*;
#(
  parameter logic [12:0] FUNC_EN = 13'h1FFE,
  parameter int          NREP    = 8
) (
  input  logic clk_i,
  input  logic rst_ni,
  output logic done_o,
  output int   checks_o,
  output int   failures_o
);

  localparam int LAT = 4;

  logic          issue_valid, issue_ready, commit_valid, result_valid, stall;
  x_issue_req_t  issue_req;
  x_issue_resp_t issue_resp;
  x_commit_t     commit;
  x_result_t     result;
  int            cyc = 0;

  toxos #(.FUNC_EN(FUNC_EN)) dut (
    .clk_i, .rst_ni,
    .x_issue_valid_i(issue_valid), .x_issue_ready_o(issue_ready),
    .x_issue_req_i(issue_req), .x_issue_resp_o(issue_resp),
    .x_commit_valid_i(commit_valid), .x_commit_i(commit),
    .x_result_valid_o(result_valid), .x_result_ready_i(1'b1), .x_result_o(result),
    .stall_o(stall));

  always @(posedge clk_i) cyc <= cyc + 1;

  task automatic check(input bit ok, input string msg);
    checks_o++;
    if (!ok) begin failures_o++; $display("FAIL (FUNC_EN=%h): %s", FUNC_EN, msg); end
  endtask

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

  initial begin
    real a, b, r, ref_r, err;
    int  t, lat;
    bit  seen;
    done_o = 1'b0; checks_o = 0; failures_o = 0;
    issue_valid = 1'b0; issue_req = '0; commit_valid = 1'b0; commit = '0;
    @(posedge rst_ni);
    for (int o = 1; o <= 12; o++) begin
      for (int rep = 0; rep < NREP; rep++) begin
        op_e op;
        op = op_e'(o);
        case (op)
          OP_SIN, OP_COS:             a = urand(-1.5, 1.5);
          OP_COSH, OP_SINH, OP_EXP:   a = urand(-1.05, 1.05);
          OP_ATANH, OP_ASIN, OP_ACOS: a = urand(-0.78, 0.78);
          default:                    a = urand(-20.0, 20.0);
        endcase
        b = urand(0.5, 20.0);
        a = f2r(r2f(a));
        b = f2r(r2f(b));
        @(negedge clk_i);
        issue_valid        = 1'b1;
        issue_req.instr    = {7'(o), 5'd11, 5'd10, 3'd0, 5'd10, OPC_XCORDIC};
        issue_req.id       = 4'(rep);
        issue_req.rs[0]    = r2f(a);
        issue_req.rs[1]    = r2f(b);
        issue_req.rs_valid = 2'b11;
        commit_valid       = 1'b1;
        commit.id          = 4'(rep);
        #1;
        if (!FUNC_EN[o]) begin
          check(issue_ready && !issue_resp.accept, $sformatf("%s refused", op.name()));
          @(negedge clk_i);
          issue_valid = 1'b0; commit_valid = 1'b0;
          seen = 1'b0;
          repeat (2 * LAT + 4) begin @(negedge clk_i); #1; seen |= result_valid; end
          check(!seen, $sformatf("%s gives no result", op.name()));
        end else begin
          while (!issue_ready) begin @(negedge clk_i); #1; end
          check(issue_resp.accept, $sformatf("%s accepted", op.name()));
          t = cyc + 1;
          @(negedge clk_i);
          issue_valid = 1'b0; commit_valid = 1'b0;
          #1;
          while (!result_valid) begin @(negedge clk_i); #1; end
          lat = cyc + 1 - t;
          check(lat == ((op == OP_ASIN || op == OP_ACOS) ? 2 * LAT + 2 : LAT + 2),
                $sformatf("%s latency %0d", op.name(), lat));
          r     = f2r(result.data);
          ref_r = ref_val(op, a, b);
          err   = (r > ref_r) ? r - ref_r : ref_r - r;
          if (ref_r > 1.0)  err = err / ref_r;
          if (ref_r < -1.0) err = -err / ref_r;
          check(err < 3e-5, $sformatf("%s(%f, %f) = %f, expected %f", op.name(), a, b, r, ref_r));
        end
      end
    end
    done_o = 1'b1;
  end

endmodule
