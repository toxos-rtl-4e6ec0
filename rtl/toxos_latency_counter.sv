// toxos_latency_counter -- cycle counter of one CORDIC pass.
//
// A pass lasts LATENCY cycles; in cycle c (0 .. LATENCY-1) the add-shift chain
// performs iterations c*UNITS .. c*UNITS+UNITS-1.  start_i (one cycle) begins
// a pass: that cycle is cycle 0 (first_o = 1).  The counter then advances
// every cycle; last_o marks cycle LATENCY-1, after which the counter is idle
// until the next start.  base_o is the iteration index c*UNITS.
module toxos_latency_counter #(
  parameter int unsigned LATENCY = 4,
  parameter int unsigned UNITS   = 5,
  parameter int unsigned IW      = 5
) (
  input  logic          clk_i,
  input  logic          rst_ni,
  input  logic          start_i,
  output logic          active_o,
  output logic          first_o,
  output logic          last_o,
  output logic [IW-1:0] base_o
);

  localparam int unsigned CW = (LATENCY > 1) ? $clog2(LATENCY) : 1;

  logic [CW-1:0] cnt_q;
  logic          run_q;
  logic [CW-1:0] cyc;

  assign cyc      = start_i ? '0 : cnt_q;
  assign active_o = start_i | run_q;
  assign first_o  = start_i;
  assign last_o   = active_o && (int'(cyc) == LATENCY - 1);
  assign base_o   = IW'(int'(cyc) * UNITS);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      cnt_q <= '0;
      run_q <= 1'b0;
    end else if (active_o) begin
      if (last_o) begin
        cnt_q <= '0;
        run_q <= 1'b0;
      end else begin
        cnt_q <= cyc + 1'b1;
        run_q <= 1'b1;
      end
    end
  end

endmodule
