// sic_scoreboard: local scoreboard of one core.
//
// For each register it holds the value and three status bits: A0 marks a
// loop-live register, A1A2 its SIC state (sic_state_e). Two combinational
// read ports serve the processor side and the bus (snoop) side. One write
// port updates a register's state and, if wval is set, its value. A load of
// the loop-live classification (ll_load) sets A0 for every register at
// once; an invalidate (inv_ll) sets every loop-live register to INV, as
// thread initiation requires, and leaves other registers as they are. The
// lc vector flags every register in LC state, for the last-copy search at
// thread completion.
//
// Timing: reads are combinational; writes, ll_load and inv_ll take effect
// at the next rising clock edge. If a write and inv_ll fall in one cycle the
// write wins for its register. Reset makes every register an INV other
// register with value 0.
//
// The three bits per register follow the protocol description. Keeping the
// register values here, rather than in the core, is this design's choice:
// the bus side needs them to supply and load values.
module sic_scoreboard
  import sic_pkg::*;
#(
  parameter int unsigned NREGS = NREGS_DEF,
  parameter int unsigned XLEN  = XLEN_DEF,
  localparam int unsigned RW   = $clog2(NREGS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor-side read port
  input  logic [RW-1:0]     p_addr,
  output logic [XLEN-1:0]   p_data,
  output sic_state_e        p_state,
  output logic              p_ll,
  // bus-side read port
  input  logic [RW-1:0]     s_addr,
  output logic [XLEN-1:0]   s_data,
  output sic_state_e        s_state,
  output logic              s_ll,
  // write port
  input  logic              we,
  input  logic [RW-1:0]     waddr,
  input  logic              wval,
  input  logic [XLEN-1:0]   wdata,
  input  sic_state_e        wstate,
  // loop-live classification and thread initiation
  input  logic              ll_load,
  input  logic [NREGS-1:0]  ll_mask,
  input  logic              inv_ll,
  // registers in LC state
  output logic [NREGS-1:0]  lc
);

  logic [XLEN-1:0] val_q [NREGS];
  sic_state_e      st_q  [NREGS];
  logic [NREGS-1:0] ll_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ll_q <= '0;
      for (int i = 0; i < NREGS; i++) begin
        val_q[i] <= '0;
        st_q[i]  <= ST_INV;
      end
    end else begin
      if (ll_load) ll_q <= ll_mask;
      for (int i = 0; i < NREGS; i++) begin
        if (we && waddr == RW'(i)) begin
          st_q[i] <= wstate;
          if (wval) val_q[i] <= wdata;
        end else if (inv_ll && ll_q[i]) begin
          st_q[i] <= ST_INV;
        end
      end
    end
  end

  always_comb begin
    p_data  = val_q[p_addr];
    p_state = st_q[p_addr];
    p_ll    = ll_q[p_addr];
    s_data  = val_q[s_addr];
    s_state = st_q[s_addr];
    s_ll    = ll_q[s_addr];
    for (int i = 0; i < NREGS; i++) lc[i] = (st_q[i] == ST_LC);
  end

endmodule
