// toxos_tb_sin_probe -- testbench helper: one TOXOS instance with the given
// configuration, driven as a host core would drive it, running sin.q on
// NPTS evenly spaced inputs in [-1.5, 1.5].  It accumulates the mean square
// error against the simulator's sin() and counts operations whose latency
// differs from LATENCY+2 cycles.  done_o rises when all points are done;
// mse_o carries the MSE as the bits of a real.
module toxos_tb_sin_probe
  import toxos_pkg::*;
  import toxos_tb_pkg::*;
#(
  parameter int ITER    = 20,
  parameter int LATENCY = 4,
  parameter int FRAC_W  = 20,
  parameter int NPTS    = 200
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  output logic        done_o,
  output logic [63:0] mse_o,
  output int          lat_err_o
);

  logic          issue_valid, issue_ready, commit_valid, result_valid, stall;
  x_issue_req_t  issue_req;
  x_issue_resp_t issue_resp;
  x_commit_t     commit;
  x_result_t     result;
  int            cyc = 0;

  toxos #(.ITER(ITER), .LATENCY(LATENCY), .FRAC_W(FRAC_W)) dut (
    .clk_i, .rst_ni,
    .x_issue_valid_i(issue_valid), .x_issue_ready_o(issue_ready),
    .x_issue_req_i(issue_req), .x_issue_resp_o(issue_resp),
    .x_commit_valid_i(commit_valid), .x_commit_i(commit),
    .x_result_valid_o(result_valid), .x_result_ready_i(1'b1), .x_result_o(result),
    .stall_o(stall));

  always @(posedge clk_i) cyc <= cyc + 1;

  initial begin
    real acc, v, d;
    int  t;
    done_o = 1'b0; mse_o = '0; lat_err_o = 0;
    issue_valid = 1'b0; issue_req = '0; commit_valid = 1'b0; commit = '0;
    acc = 0.0;
    @(posedge rst_ni);
    for (int i = 0; i < NPTS; i++) begin
      @(negedge clk_i);
      v = -1.5 + 3.0 * real'(i) / real'(NPTS - 1);
      issue_valid        = 1'b1;
      issue_req.instr    = {7'd1, 5'd0, 5'd10, 3'd0, 5'd10, OPC_XCORDIC};
      issue_req.id       = 4'(i);
      issue_req.rs[0]    = r2f(v);
      issue_req.rs_valid = 2'b11;
      commit_valid       = 1'b1;
      commit.id          = 4'(i);
      #1;
      while (!issue_ready) begin @(negedge clk_i); #1; end
      t = cyc + 1;
      @(negedge clk_i);
      issue_valid = 1'b0; commit_valid = 1'b0;
      #1;
      while (!result_valid) begin @(negedge clk_i); #1; end
      if (cyc + 1 - t != LATENCY + 2) lat_err_o++;
      d   = f2r(result.data) - $sin(f2r(issue_req.rs[0]));
      acc = acc + d * d;
    end
    mse_o  = $realtobits(acc / real'(NPTS));
    done_o = 1'b1;
  end

endmodule
