// ctx_ctrl: context switch controller of the eCPLD.
//
// All configuration memories must change context together. A request (req,
// req_ctx) in the IDLE state pulses start to every memory (the memories take
// the target context from the same request bus). The controller then
// waits until every memory reports ready (its new context is staged) and
// pulses commit to all of them in the same cycle, after which cur_ctx shows the
// new context. With distributed memories ready is always high and the new
// context is already active after the start edge; with block RAM memories the
// wait covers the word-by-word load. busy is high from the start pulse to the
// commit pulse; requests while busy are ignored. The two-phase start/commit
// scheme is this design's choice.
//
// Timing: req seen at edge 0 (start), commit during the first cycle after
// that in which all_ready is high, cur_ctx updated at that commit edge.
module ctx_ctrl #(
  parameter int unsigned CW = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          req,
  input  logic [CW-1:0] req_ctx,
  input  logic          all_ready,
  output logic          start,
  output logic          commit,
  output logic          busy,
  output logic [CW-1:0] cur_ctx
);

  typedef enum logic [0:0] {S_IDLE, S_WAIT} state_e;

  state_e        state;
  logic [CW-1:0] pend;

  always_comb begin
    start     = (state == S_IDLE) && req;
    commit    = (state == S_WAIT) && all_ready;
    busy      = (state == S_WAIT);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state   <= S_IDLE;
      pend    <= '0;
      cur_ctx <= '0;
    end else begin
      if (start) begin
        state <= S_WAIT;
        pend  <= req_ctx;
      end
      if (commit) begin
        state   <= S_IDLE;
        cur_ctx <= pend;
      end
    end

  a_commit_ready : assert property (@(posedge clk) disable iff (!rst_n)
                                    commit |-> all_ready);

endmodule
