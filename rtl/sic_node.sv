// sic_node: the SIC bus interface logic of one core, with its local
// scoreboard, thread-status register and arbitration cell.
//
// Processor side. The core hands over one operation at a time with
// op_valid/op_ready and gets op_done (with op_rdata for reads) when it has
// been carried out. The protocol for a loop-live register:
//   R   hit in VU, VS or LC: answered locally, state unchanged.
//   R   miss in INV: BusR with the thread's mask. The closest predecessor
//       holding the register in VS or LC supplies it, and the value is
//       loaded as VU. With no supplier the thread blocks until its
//       immediate predecessor pushes the value with a BusW.
//   NFW INV -> VU (write miss, no bus traffic), VU stays VU.
//   FW  INV or VU -> VS, and a BusW sends the value to the immediate
//       successor. Shared high: it was taken, state stays VS. Shared low:
//       state becomes LC.
// For an other register: R hits in VS; R in INV misses and issues a BusR
// that the closest predecessor in VS answers; the value is loaded as VS.
// Writes to other registers (only outside loops) make them VS locally.
// OP_START initiates a thread with the mask in op_wdata; a speculative
// thread (mask not 0) first invalidates every loop-live register.
// OP_COMPLETE waits until the thread is non-speculative, sends every LC
// register on the bus as with a final write, and then commits with a BusC,
// which hands the non-speculative status to the successor.
//
// Bus side (snooping transactions of other cores, while active):
//   BusR   a predecessor of the requester holding the register (VS or LC
//          for loop-live, VS for other) posts its mask; the closest one
//          drives the value and goes LC -> VS. A successor of the supplier
//          holding that other register as INV loads it as VS (read
//          snarfing).
//   BusW   the immediate successor loads the value as VU if its copy is
//          INV, and raises Shared whenever it is running.
//   BusC   the thread moves one step towards non-speculative.
//
// Timing: a read hit or a write without bus traffic finishes one cycle
// after acceptance. A bus operation takes a request cycle plus the three
// bus cycles (more if the bus is busy); a read miss or final write ends
// with op_done in the cycle after the response phase. Operations are not
// accepted in a cycle in which the bus side writes the scoreboard.
//
// The states, transitions, Shared line, snarfing and the completion search
// follow the protocol description. The operation interface, the rule for
// waking a blocked consumer, loading pushed values only into INV copies,
// raising Shared for a running successor that already has its own copy,
// writes to VS/LC registers keeping their state, and the commit broadcast
// are this design's choices.
module sic_node
  import sic_pkg::*;
#(
  parameter int unsigned NCORES  = NCORES_DEF,
  parameter int unsigned NREGS   = NREGS_DEF,
  parameter int unsigned XLEN    = XLEN_DEF,
  parameter int unsigned CORE_ID = 0,
  localparam int unsigned MW     = $clog2(NCORES),
  localparam int unsigned RW     = $clog2(NREGS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor side
  input  logic              op_valid,
  output logic              op_ready,
  input  sic_op_e           op,
  input  logic [RW-1:0]     op_reg,
  input  logic [XLEN-1:0]   op_wdata,
  output logic              op_done,
  output logic [XLEN-1:0]   op_rdata,
  // loop-live classification from the binary annotator
  input  logic              ll_load,
  input  logic [NREGS-1:0]  ll_mask,
  // thread status
  output logic [MW-1:0]     mask,
  output logic              active,
  // bus request
  output logic              bus_req,
  output bus_cmd_e          bus_req_cmd,
  output logic [RW-1:0]     bus_req_reg,
  output logic [XLEN-1:0]   bus_req_data,
  // bus broadcast
  input  bus_phase_e        b_phase,
  input  bus_cmd_e          b_cmd,
  input  logic [MW-1:0]     b_master,
  input  logic [RW-1:0]     b_reg,
  input  logic [XLEN-1:0]   b_data,
  input  logic [MW-1:0]     b_mask,
  input  logic [NCORES-1:0] b_lines,
  input  logic              b_shared,
  input  logic [XLEN-1:0]   b_rdata,
  // wired-OR drives
  output logic [NCORES-1:0] line_drv,
  output logic              shared_drv,
  output logic [XLEN-1:0]   rdata_drv,
  // event pulses
  output sic_event_t        ev
);

  typedef enum logic [2:0] {
    C_IDLE, C_BUS, C_BLOCKED, C_WAIT_NS, C_FLUSH
  } cstate_e;

  typedef enum logic [1:0] {
    K_READ, K_FW, K_FLUSH, K_COMMIT
  } kind_e;

  localparam logic [MW-1:0] MY_ID = MW'(CORE_ID);

  cstate_e         cst_q;
  kind_e           kind_q;
  logic [RW-1:0]   reg_q;
  logic [RW:0]     fptr_q;
  logic            done_q;
  logic [XLEN-1:0] rdata_q;

  // ---------------------------------------------------------------- parts
  logic [RW-1:0]    p_addr;
  logic [XLEN-1:0]  p_data, s_data;
  sic_state_e       p_state, s_state;
  logic             p_ll, s_ll;
  logic             sb_we, sb_wval, sb_inv;
  logic [RW-1:0]    sb_waddr;
  logic [XLEN-1:0]  sb_wdata;
  sic_state_e       sb_wstate;
  logic [NREGS-1:0] lc;

  sic_scoreboard #(.NREGS(NREGS), .XLEN(XLEN)) u_sb (
    .clk, .rst_n,
    .p_addr, .p_data, .p_state, .p_ll,
    .s_addr(b_reg), .s_data, .s_state, .s_ll,
    .we(sb_we), .waddr(sb_waddr), .wval(sb_wval), .wdata(sb_wdata),
    .wstate(sb_wstate),
    .ll_load, .ll_mask, .inv_ll(sb_inv),
    .lc
  );

  logic          ts_start, ts_commit_self, ts_commit_other, nonspec;
  logic [MW-1:0] ts_start_mask;

  sic_thread_status #(.NCORES(NCORES)) u_ts (
    .clk, .rst_n,
    .start(ts_start), .start_mask(ts_start_mask),
    .commit_other(ts_commit_other), .commit_self(ts_commit_self),
    .mask, .active, .nonspec
  );

  logic          cand_q, snarf_q, slc_q, shared_q;
  logic [XLEN-1:0] sdata_q;
  logic          arb_win, arb_any;
  logic [MW-1:0] arb_win_mask;

  sic_mask_arb #(.NCORES(NCORES)) u_arb (
    .cand(cand_q), .my_mask(mask), .req_mask(b_mask),
    .line_drv, .lines(b_lines),
    .win(arb_win), .any(arb_any), .win_mask(arb_win_mask)
  );

  // ------------------------------------------------------------ bus side
  logic own_txn, snoop_txn;
  assign own_txn   = (b_phase != PH_IDLE) && (b_master == MY_ID);
  assign snoop_txn = (b_phase != PH_IDLE) && (b_master != MY_ID) && active;

  logic s_fwd_ok;      // snooped copy may be forwarded
  logic is_succ;       // this thread is the BusW master's immediate successor
  assign s_fwd_ok = s_ll ? (s_state == ST_VS || s_state == ST_LC)
                         : (s_state == ST_VS);
  assign is_succ  = ({1'b0, mask} == {1'b0, b_mask} + (MW+1)'(1));

  logic            snp_we, snp_wval;
  sic_state_e      snp_wstate;
  logic [XLEN-1:0] snp_wdata;
  logic            snp_push, snp_snarf, snp_supply_lc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cand_q   <= 1'b0;
      snarf_q  <= 1'b0;
      slc_q    <= 1'b0;
      shared_q <= 1'b0;
      sdata_q  <= '0;
    end else begin
      cand_q   <= 1'b0;
      snarf_q  <= 1'b0;
      slc_q    <= 1'b0;
      shared_q <= 1'b0;
      if (snoop_txn && b_phase == PH_ADDR) begin
        if (b_cmd == BUS_R) begin
          cand_q  <= s_fwd_ok && (mask < b_mask);
          snarf_q <= !s_ll && (s_state == ST_INV);
          slc_q   <= s_ll && (s_state == ST_LC);
          sdata_q <= s_data;
        end
        if (b_cmd == BUS_W) shared_q <= is_succ;
      end
    end
  end

  always_comb begin
    snp_we        = 1'b0;
    snp_wval      = 1'b0;
    snp_wstate    = ST_INV;
    snp_wdata     = b_data;
    snp_push      = 1'b0;
    snp_snarf     = 1'b0;
    snp_supply_lc = 1'b0;
    if (snoop_txn && b_phase == PH_ADDR && b_cmd == BUS_W &&
        is_succ && s_state == ST_INV) begin
      snp_push   = 1'b1;
      snp_we     = 1'b1;
      snp_wval   = 1'b1;
      snp_wstate = s_ll ? ST_VU : ST_VS;
      snp_wdata  = b_data;
    end
    if (snoop_txn && b_phase == PH_RESP && b_cmd == BUS_R) begin
      if (arb_win && slc_q) begin
        snp_supply_lc = 1'b1;
        snp_we        = 1'b1;
        snp_wstate    = ST_VS;
      end else if (snarf_q && arb_any && mask > arb_win_mask &&
                   s_state == ST_INV) begin
        snp_snarf  = 1'b1;
        snp_we     = 1'b1;
        snp_wval   = 1'b1;
        snp_wstate = ST_VS;
        snp_wdata  = b_rdata;
      end
    end
  end

  assign rdata_drv  = (snoop_txn && b_phase == PH_RESP && b_cmd == BUS_R && arb_win)
                      ? sdata_q : '0;
  assign shared_drv = snoop_txn && b_phase == PH_RESP && b_cmd == BUS_W && shared_q;
  assign ts_commit_other = snoop_txn && b_phase == PH_ADDR && b_cmd == BUS_C;

  // ------------------------------------------------------ processor side
  logic accept, own_resp, hit;
  assign op_ready = (cst_q == C_IDLE) && !snp_we;
  assign accept   = op_valid && op_ready;
  assign own_resp = own_txn && b_phase == PH_RESP;
  assign p_addr   = (cst_q == C_IDLE) ? op_reg : reg_q;
  assign hit      = p_ll ? (p_state != ST_INV) : (p_state == ST_VS);

  // Next LC register at or above the flush pointer.
  logic          lc_found;
  logic [RW-1:0] lc_idx;
  always_comb begin
    lc_found = 1'b0;
    lc_idx   = '0;
    for (int i = NREGS - 1; i >= 0; i--) begin
      if (lc[i] && (RW+1)'(i) >= fptr_q) begin
        lc_found = 1'b1;
        lc_idx   = RW'(i);
      end
    end
  end

  // Controller writes to the scoreboard (never in a cycle the bus side
  // writes: operations are not accepted then, and the bus side is silent
  // during this node's own transaction).
  logic            c_we, c_wval;
  sic_state_e      c_wstate;
  always_comb begin
    c_we     = 1'b0;
    c_wval   = 1'b0;
    c_wstate = p_state;
    ts_start = 1'b0;
    ts_start_mask  = op_wdata[MW-1:0];
    ts_commit_self = 1'b0;
    sb_inv   = 1'b0;
    if (accept) begin
      unique case (op)
        OP_NFW: begin
          c_we = 1'b1; c_wval = 1'b1;
          if (!p_ll)                       c_wstate = ST_VS;
          else if (p_state == ST_INV)      c_wstate = ST_VU;
          else                             c_wstate = p_state;
        end
        OP_FW: begin
          c_we = 1'b1; c_wval = 1'b1; c_wstate = ST_VS;
        end
        OP_START: begin
          ts_start = 1'b1;
          sb_inv   = (op_wdata[MW-1:0] != '0);
        end
        default: ;
      endcase
    end else if (own_resp && cst_q == C_BUS) begin
      unique case (kind_q)
        K_READ: if (arb_any) begin
          c_we = 1'b1; c_wval = 1'b1;
          c_wstate = p_ll ? ST_VU : ST_VS;
        end
        K_FW, K_FLUSH: begin
          c_we = 1'b1;
          c_wstate = b_shared ? ST_VS : ST_LC;
        end
        K_COMMIT: ts_commit_self = 1'b1;
        default: ;
      endcase
    end
  end

  always_comb begin
    if (snp_we) begin
      sb_we = 1'b1; sb_waddr = b_reg; sb_wval = snp_wval;
      sb_wdata = snp_wdata; sb_wstate = snp_wstate;
    end else begin
      sb_we = c_we; sb_waddr = p_addr; sb_wval = c_wval;
      sb_wdata = (cst_q == C_BUS) ? b_rdata : op_wdata; sb_wstate = c_wstate;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cst_q   <= C_IDLE;
      kind_q  <= K_READ;
      reg_q   <= '0;
      fptr_q  <= '0;
      done_q  <= 1'b0;
      rdata_q <= '0;
    end else begin
      done_q <= 1'b0;
      unique case (cst_q)
        C_IDLE: if (accept) begin
          reg_q <= op_reg;
          unique case (op)
            OP_R: if (hit) begin
              done_q  <= 1'b1;
              rdata_q <= p_data;
            end else begin
              cst_q  <= C_BUS;
              kind_q <= K_READ;
            end
            OP_FW: if (p_ll) begin
              cst_q  <= C_BUS;
              kind_q <= K_FW;
            end else begin
              done_q <= 1'b1;
            end
            OP_COMPLETE: cst_q <= C_WAIT_NS;
            default: done_q <= 1'b1;
          endcase
        end
        C_BUS: if (own_resp) begin
          unique case (kind_q)
            K_READ: if (arb_any) begin
              cst_q   <= C_IDLE;
              done_q  <= 1'b1;
              rdata_q <= b_rdata;
            end else begin
              cst_q <= C_BLOCKED;
            end
            K_FW: begin
              cst_q  <= C_IDLE;
              done_q <= 1'b1;
            end
            K_FLUSH: cst_q <= C_FLUSH;
            default: begin          // K_COMMIT
              cst_q  <= C_IDLE;
              done_q <= 1'b1;
            end
          endcase
        end
        C_BLOCKED: if (snp_we && snp_wval && b_reg == reg_q) begin
          cst_q   <= C_IDLE;
          done_q  <= 1'b1;
          rdata_q <= snp_wdata;
        end
        C_WAIT_NS: if (nonspec) begin
          cst_q  <= C_FLUSH;
          fptr_q <= '0;
        end
        C_FLUSH: begin
          cst_q <= C_BUS;
          if (lc_found) begin
            kind_q <= K_FLUSH;
            reg_q  <= lc_idx;
            fptr_q <= {1'b0, lc_idx} + (RW+1)'(1);
          end else begin
            kind_q <= K_COMMIT;
          end
        end
        default: cst_q <= C_IDLE;
      endcase
    end
  end

  assign bus_req      = (cst_q == C_BUS);
  assign bus_req_cmd  = (kind_q == K_READ)   ? BUS_R :
                        (kind_q == K_COMMIT) ? BUS_C : BUS_W;
  assign bus_req_reg  = reg_q;
  assign bus_req_data = p_data;
  assign op_done      = done_q;
  assign op_rdata     = rdata_q;

  // ---------------------------------------------------------------- events
  always_comb begin
    ev = '0;
    ev.read_hit    = accept && op == OP_R && hit;
    ev.read_miss   = accept && op == OP_R && !hit;
    ev.write_miss  = accept && (op == OP_NFW || op == OP_FW) && p_state == ST_INV;
    ev.write_hit   = accept && (op == OP_NFW || op == OP_FW) && p_state != ST_INV;
    ev.start       = ts_start;
    ev.blocked     = own_resp && cst_q == C_BUS && kind_q == K_READ && !arb_any;
    ev.unblocked   = cst_q == C_BLOCKED && snp_we && snp_wval && b_reg == reg_q;
    ev.fw_shared   = own_resp && cst_q == C_BUS && (kind_q == K_FW || kind_q == K_FLUSH) && b_shared;
    ev.fw_lastcopy = own_resp && cst_q == C_BUS && (kind_q == K_FW || kind_q == K_FLUSH) && !b_shared;
    ev.supplied    = snoop_txn && b_phase == PH_RESP && b_cmd == BUS_R && arb_win;
    ev.supplied_lc = snp_supply_lc;
    ev.push_load   = snp_push;
    ev.snarf       = snp_snarf;
    ev.flush       = cst_q == C_FLUSH && lc_found;
    ev.commit      = ts_commit_self;
  end

  // A blocked or busy node accepts nothing.
  a_no_accept_busy: assert property (@(posedge clk) disable iff (!rst_n)
    accept |-> cst_q == C_IDLE);
  // The bus side and the controller never write the scoreboard together.
  a_one_writer: assert property (@(posedge clk) disable iff (!rst_n)
    !(snp_we && c_we));

endmodule
