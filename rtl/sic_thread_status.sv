// sic_thread_status: the special register that holds a core's thread mask.
//
// A thread's mask is its distance from the non-speculative thread: 0 for the
// non-speculative thread, 1..NCORES-1 for its speculative successors. start
// loads a new mask and marks the core active. When another core's thread
// commits (commit_other), every active thread with a nonzero mask moves one
// step closer to non-speculative, so the non-speculative status passes to
// the immediate successor. When this core's own thread commits
// (commit_self) the core becomes idle. Threads commit strictly in order, so
// only the non-speculative thread may commit; an assertion checks that.
//
// Timing: all inputs act at the next rising clock edge. Reset: idle, mask 0.
//
// The mask encoding follows the protocol description. Passing the status
// on with a broadcast commit, and the idle flag, are this design's choices.
module sic_thread_status
  import sic_pkg::*;
#(
  parameter int unsigned NCORES = NCORES_DEF,
  localparam int unsigned MW    = $clog2(NCORES)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [MW-1:0] start_mask,
  input  logic          commit_other,
  input  logic          commit_self,
  output logic [MW-1:0] mask,
  output logic          active,
  output logic          nonspec
);

  logic [MW-1:0] mask_q;
  logic          active_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mask_q   <= '0;
      active_q <= 1'b0;
    end else if (start) begin
      mask_q   <= start_mask;
      active_q <= 1'b1;
    end else if (commit_self) begin
      active_q <= 1'b0;
    end else if (commit_other && active_q && mask_q != '0) begin
      mask_q <= mask_q - MW'(1);
    end
  end

  assign mask    = mask_q;
  assign active  = active_q;
  assign nonspec = active_q && (mask_q == '0);

  a_commit_in_order: assert property (@(posedge clk) disable iff (!rst_n)
    commit_self |-> nonspec);

endmodule
