// sic_mask_arb: one core's share of the distributed arbitration on the
// wired-OR mask lines.
//
// During the response phase of a BusR, every core that can supply the
// register (a predecessor of the requester holding it in a state that may
// be forwarded) posts its thread mask on the mask lines. The mask is posted
// decoded, one line per thread position, so that the wired-OR of all posts
// still shows every candidate. Each candidate then decides for itself: it
// wins if no line between its own position and the requester's is raised,
// that is, if it is the closest predecessor. Every core, requester
// included, can also read from the lines whether any supplier exists and
// which position won (needed for read snarfing).
//
// Timing: purely combinational. line_drv goes to the bus, which ORs the
// drives of all cores into lines.
//
// Posting the mask on wired-OR lines and choosing the closest predecessor
// follow the protocol description; the one-line-per-position coding, which
// settles in a single bus cycle, is this design's choice.
module sic_mask_arb
  import sic_pkg::*;
#(
  parameter int unsigned NCORES = NCORES_DEF,
  localparam int unsigned MW    = $clog2(NCORES)
) (
  input  logic              cand,        // this core can supply
  input  logic [MW-1:0]     my_mask,
  input  logic [MW-1:0]     req_mask,    // requester's mask (from the bus)
  output logic [NCORES-1:0] line_drv,    // this core's post on the lines
  input  logic [NCORES-1:0] lines,       // wired-OR of all posts
  output logic              win,         // this core supplies
  output logic              any,         // some supplier exists
  output logic [MW-1:0]     win_mask     // position of the supplier
);

  always_comb begin
    line_drv = '0;
    if (cand) line_drv[my_mask] = 1'b1;

    // Closest raised line below the requester.
    any      = 1'b0;
    win_mask = '0;
    for (int p = 0; p < NCORES; p++) begin
      if (lines[p] && MW'(p) < req_mask) begin
        any      = 1'b1;
        win_mask = MW'(p);
      end
    end

    win = cand && any && (win_mask == my_mask);
  end

endmodule
