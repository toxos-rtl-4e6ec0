// toxos_controller -- CV-X-IF control of the TOXOS coprocessor.
//
// The host core offers every instruction it cannot decode on the issue
// channel, with the values of rs1/rs2 and their valid bits.  When idle, the
// controller accepts an x-cordic instruction (decoded by toxos_op_decoder)
// as soon as the source registers it needs are valid; until then it holds
// issue_ready low, which stalls the core (operands not yet in the register
// file).  Other instructions are answered at once with accept = 0.  Only one
// operation is in flight: issue_ready stays low while busy.
//
// Sequence for an accepted op (cycle 0 = issue handshake):
//   cycle 1            start_o: first cycle of the CORDIC pass
//   cycle LATENCY+1    core done: load_o (output handler registers result)
//                      -- or, for asin/acos after pass 0, start of pass 1
//   cycle LATENCY+2    result_valid_o (2*LATENCY+2 for asin/acos)
// The result is held until result_ready_i.  The commit channel tells whether
// the instruction really executes: the result is offered only after a commit
// with commit_kill = 0 for its id; a kill drops it silently.
// The channel subset, the single op in flight and the cycle plan are this
// design's reading of the published integration over CV-X-IF.
module toxos_controller
  import toxos_pkg::*;
(
  input  logic          clk_i,
  input  logic          rst_ni,
  // issue channel
  input  logic          issue_valid_i,
  output logic          issue_ready_o,
  input  x_issue_req_t  issue_req_i,
  output x_issue_resp_t issue_resp_o,
  // commit channel
  input  logic          commit_valid_i,
  input  x_commit_t     commit_i,
  // result channel
  output logic          result_valid_o,
  input  logic          result_ready_i,
  output x_result_t     result_o,
  // decoder
  input  logic          dec_valid_i,
  input  op_e           dec_op_i,
  input  logic          dec_two_ops_i,
  input  logic [4:0]    dec_rd_i,
  // datapath
  output op_e           op_o,
  output logic          pass_o,
  output logic [31:0]   a_o,
  output logic [31:0]   b_o,
  input  logic          two_pass_i,
  output logic          start_o,
  input  logic          core_done_i,
  output logic          load_o,
  input  logic [31:0]   res_data_i,
  // status
  output logic          stall_o
);

  typedef enum logic [1:0] {
    S_IDLE,
    S_START,
    S_RUN,
    S_RESULT
  } state_e;

  state_e            state_q;
  op_e               op_q;
  logic              pass_q;
  logic [31:0]       a_q, b_q;
  logic [X_ID_W-1:0] id_q;
  logic [4:0]        rd_q;
  logic              committed_q, killed_q;
  logic              ops_ready, issue_fire, commit_hit, fin_kill, start2;

  assign ops_ready  = issue_req_i.rs_valid[0] && (!dec_two_ops_i || issue_req_i.rs_valid[1]);
  assign issue_ready_o = (state_q == S_IDLE) && (!dec_valid_i || ops_ready);
  assign issue_fire = issue_valid_i && issue_ready_o && dec_valid_i;
  assign stall_o    = (state_q == S_IDLE) && issue_valid_i && dec_valid_i && !ops_ready;

  assign issue_resp_o.accept    = dec_valid_i;
  assign issue_resp_o.writeback = dec_valid_i;

  // commit for the op in flight (or the one being issued this cycle)
  assign commit_hit = commit_valid_i &&
                      (commit_i.id == (issue_fire ? issue_req_i.id : id_q));

  // second pass of asin/acos starts in the cycle the first pass is done
  assign start2  = (state_q == S_RUN) && core_done_i && two_pass_i && !pass_q;
  assign start_o = (state_q == S_START) || start2;
  assign load_o  = (state_q == S_RUN) && core_done_i && !(two_pass_i && !pass_q);

  assign fin_kill = killed_q || (commit_hit && commit_i.commit_kill);
  assign result_valid_o  = (state_q == S_RESULT) && committed_q && !killed_q;
  assign result_o.id     = id_q;
  assign result_o.data   = res_data_i;
  assign result_o.rd     = rd_q;
  assign result_o.we     = 1'b1;

  assign op_o   = op_q;
  assign pass_o = pass_q | start2;
  assign a_o    = a_q;
  assign b_o    = b_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q     <= S_IDLE;
      op_q        <= OP_NONE;
      pass_q      <= 1'b0;
      a_q         <= '0;
      b_q         <= '0;
      id_q        <= '0;
      rd_q        <= '0;
      committed_q <= 1'b0;
      killed_q    <= 1'b0;
    end else begin
      if (commit_hit && state_q != S_IDLE) begin
        committed_q <= 1'b1;
        killed_q    <= commit_i.commit_kill;
      end
      case (state_q)
        S_IDLE: if (issue_fire) begin
          state_q     <= S_START;
          op_q        <= dec_op_i;
          pass_q      <= 1'b0;
          a_q         <= issue_req_i.rs[0];
          b_q         <= issue_req_i.rs[1];
          id_q        <= issue_req_i.id;
          rd_q        <= dec_rd_i;
          committed_q <= commit_hit;
          killed_q    <= commit_hit && commit_i.commit_kill;
        end
        S_START: state_q <= S_RUN;
        S_RUN: if (core_done_i) begin
          if (two_pass_i && !pass_q) pass_q  <= 1'b1;
          else                       state_q <= S_RESULT;
        end
        S_RESULT: begin
          if (fin_kill || (result_valid_o && result_ready_i)) state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // A result once offered stays offered, unchanged, until taken.
  a_result_stable: assert property (@(posedge clk_i) disable iff (!rst_ni)
    (result_valid_o && !result_ready_i) |=> (result_valid_o && $stable(result_o)));

  // Only one operation is in flight.
  a_no_accept_when_busy: assert property (@(posedge clk_i) disable iff (!rst_ni)
    (state_q != S_IDLE) |-> !issue_ready_o);

endmodule
