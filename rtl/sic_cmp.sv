// sic_cmp: register-level communication for a four-core speculative chip
// multiprocessor.
//
// Each core has a SIC node (bus interface logic, local scoreboard, thread
// status register) and all nodes share one snoopy bus that carries register
// values between threads. The cores themselves, their private L1 caches and
// the shared L2 cache are outside this block: each core's register
// operations (read, non-final write, final write, thread start, thread
// completion) arrive on the op_* ports, one array element per core, and the
// loop-live classification found by the binary annotator is loaded into
// every scoreboard at once through ll_load/ll_mask.
//
// Timing: see sic_node for the per-operation latency and sic_bus for the
// three-cycle bus transaction. ev reports one-cycle event pulses per core,
// and thread_mask/thread_active show each core's thread status.
//
// The four cores on a shared bus with per-core scoreboards follow the
// protocol description; the port set is this design's choice.
module sic_cmp
  import sic_pkg::*;
#(
  parameter int unsigned NCORES = NCORES_DEF,
  parameter int unsigned NREGS  = NREGS_DEF,
  parameter int unsigned XLEN   = XLEN_DEF,
  localparam int unsigned MW    = $clog2(NCORES),
  localparam int unsigned RW    = $clog2(NREGS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NCORES-1:0] op_valid,
  output logic [NCORES-1:0] op_ready,
  input  sic_op_e           op        [NCORES],
  input  logic [RW-1:0]     op_reg    [NCORES],
  input  logic [XLEN-1:0]   op_wdata  [NCORES],
  output logic [NCORES-1:0] op_done,
  output logic [XLEN-1:0]   op_rdata  [NCORES],
  input  logic              ll_load,
  input  logic [NREGS-1:0]  ll_mask,
  output logic [MW-1:0]     thread_mask   [NCORES],
  output logic [NCORES-1:0] thread_active,
  output sic_event_t        ev        [NCORES]
);

  logic [NCORES-1:0] bus_req;
  bus_cmd_e          bus_req_cmd  [NCORES];
  logic [RW-1:0]     bus_req_reg  [NCORES];
  logic [XLEN-1:0]   bus_req_data [NCORES];
  logic [NCORES-1:0] line_drv     [NCORES];
  logic [NCORES-1:0] shared_drv;
  logic [XLEN-1:0]   rdata_drv    [NCORES];

  bus_phase_e        b_phase;
  bus_cmd_e          b_cmd;
  logic [MW-1:0]     b_master, b_mask;
  logic [RW-1:0]     b_reg;
  logic [XLEN-1:0]   b_data, b_rdata;
  logic [NCORES-1:0] b_lines;
  logic              b_shared;

  for (genvar c = 0; c < NCORES; c++) begin : g_node
    sic_node #(.NCORES(NCORES), .NREGS(NREGS), .XLEN(XLEN), .CORE_ID(c)) u_node (
      .clk, .rst_n,
      .op_valid(op_valid[c]), .op_ready(op_ready[c]), .op(op[c]),
      .op_reg(op_reg[c]), .op_wdata(op_wdata[c]),
      .op_done(op_done[c]), .op_rdata(op_rdata[c]),
      .ll_load, .ll_mask,
      .mask(thread_mask[c]), .active(thread_active[c]),
      .bus_req(bus_req[c]), .bus_req_cmd(bus_req_cmd[c]),
      .bus_req_reg(bus_req_reg[c]), .bus_req_data(bus_req_data[c]),
      .b_phase, .b_cmd, .b_master, .b_reg, .b_data, .b_mask,
      .b_lines, .b_shared, .b_rdata,
      .line_drv(line_drv[c]), .shared_drv(shared_drv[c]),
      .rdata_drv(rdata_drv[c]),
      .ev(ev[c])
    );
  end

  sic_bus #(.NCORES(NCORES), .NREGS(NREGS), .XLEN(XLEN)) u_bus (
    .clk, .rst_n,
    .req(bus_req), .req_cmd(bus_req_cmd), .req_reg(bus_req_reg),
    .req_data(bus_req_data), .core_mask(thread_mask),
    .line_drv, .shared_drv, .rdata_drv,
    .phase(b_phase), .cmd(b_cmd), .master(b_master), .breg(b_reg),
    .bdata(b_data), .bmask(b_mask), .lines(b_lines), .shared(b_shared),
    .rdata(b_rdata)
  );

endmodule
