// sic_bus: the snoopy shared bus that carries register values between the
// cores.
//
// The bus has a control part (command BusR / BusW / BusC, the mask lines
// and the Shared line), a register-number field, the master's thread mask
// and two data paths: one for the value the master sends with BusW, one
// for the value a supplier returns to a BusR. The mask lines, the Shared
// line and the supply data are wired-OR: this module ORs the drives of all
// cores, and asserts that at most one core drives supply data.
//
// Each transaction takes three cycles:
//   PH_IDLE  cores with a pending request compete; the one running the
//            oldest thread (lowest mask) becomes master, ties go to the
//            lowest core index;
//   PH_ADDR  command, register, master mask and BusW data are broadcast;
//            snooping cores look up their scoreboards;
//   PH_RESP  snoopers drive the mask lines, the supply data and Shared;
//            the master takes the answer at the end of the cycle.
// A master keeps its request raised until the end of its PH_RESP cycle.
//
// The wired-OR BusR, BusW, Mask and Shared lines follow the protocol
// description. The commit command, the phase structure, the oldest-first
// choice of master and the reset to PH_IDLE are this design's choices.
module sic_bus
  import sic_pkg::*;
#(
  parameter int unsigned NCORES = NCORES_DEF,
  parameter int unsigned NREGS  = NREGS_DEF,
  parameter int unsigned XLEN   = XLEN_DEF,
  localparam int unsigned MW    = $clog2(NCORES),
  localparam int unsigned RW    = $clog2(NREGS)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // requests from the cores
  input  logic [NCORES-1:0]     req,
  input  bus_cmd_e              req_cmd   [NCORES],
  input  logic [RW-1:0]         req_reg   [NCORES],
  input  logic [XLEN-1:0]       req_data  [NCORES],
  input  logic [MW-1:0]         core_mask [NCORES],
  // wired-OR drives from the cores
  input  logic [NCORES-1:0]     line_drv  [NCORES],
  input  logic [NCORES-1:0]     shared_drv,
  input  logic [XLEN-1:0]       rdata_drv [NCORES],
  // broadcast bus state
  output bus_phase_e            phase,
  output bus_cmd_e              cmd,
  output logic [MW-1:0]         master,
  output logic [RW-1:0]         breg,
  output logic [XLEN-1:0]       bdata,
  output logic [MW-1:0]         bmask,
  output logic [NCORES-1:0]     lines,
  output logic                  shared,
  output logic [XLEN-1:0]       rdata
);

  bus_phase_e      phase_q;
  bus_cmd_e        cmd_q;
  logic [MW-1:0]   master_q, bmask_q;
  logic [RW-1:0]   reg_q;
  logic [XLEN-1:0] data_q;

  // Oldest requesting thread wins mastership.
  logic          gnt_any;
  logic [MW-1:0] gnt_idx;
  always_comb begin
    gnt_any = 1'b0;
    gnt_idx = '0;
    for (int c = NCORES - 1; c >= 0; c--) begin
      if (req[c] && (!gnt_any || core_mask[c] <= core_mask[gnt_idx])) begin
        gnt_any = 1'b1;
        gnt_idx = MW'(c);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q  <= PH_IDLE;
      cmd_q    <= BUS_NONE;
      master_q <= '0;
      bmask_q  <= '0;
      reg_q    <= '0;
      data_q   <= '0;
    end else begin
      unique case (phase_q)
        PH_IDLE: if (gnt_any) begin
          phase_q  <= PH_ADDR;
          cmd_q    <= req_cmd[gnt_idx];
          master_q <= gnt_idx;
          bmask_q  <= core_mask[gnt_idx];
          reg_q    <= req_reg[gnt_idx];
          data_q   <= req_data[gnt_idx];
        end
        PH_ADDR: phase_q <= PH_RESP;
        PH_RESP: begin
          phase_q <= PH_IDLE;
          cmd_q   <= BUS_NONE;
        end
        default: phase_q <= PH_IDLE;
      endcase
    end
  end

  // Wired-OR lines.
  always_comb begin
    lines  = '0;
    rdata  = '0;
    for (int c = 0; c < NCORES; c++) begin
      lines = lines | line_drv[c];
      rdata = rdata | rdata_drv[c];
    end
    shared = |shared_drv;
  end

  assign phase  = phase_q;
  assign cmd    = cmd_q;
  assign master = master_q;
  assign breg   = reg_q;
  assign bdata  = data_q;
  assign bmask  = bmask_q;

  // At most one supplier drives the data lines.
  logic [NCORES-1:0] drv_on;
  always_comb for (int c = 0; c < NCORES; c++) drv_on[c] = |rdata_drv[c];

  a_one_supplier: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(drv_on));
  a_master_holds_req: assert property (@(posedge clk) disable iff (!rst_n)
    phase_q != PH_IDLE |-> req[master_q]);

endmodule
