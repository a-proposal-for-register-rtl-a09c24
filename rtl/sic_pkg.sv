// sic_pkg: shared types and default sizes of the Snoopy Inter-register
// Communication (SIC) hardware.
//
// The chip has four cores, so a thread mask is two bits: 00 is the
// non-speculative thread, 01..11 its first, second and third speculative
// successors. Each register carries three status bits in the local
// scoreboard: A0 tells loop-live from other registers, A1A2 hold one of the
// four SIC states. The state codes, the register count, the data width, the
// processor operation codes and the bus command codes are this design's own
// choices; the four cores, the four states and the three status bits follow
// the protocol description.
package sic_pkg;

  // Default sizes. Four cores follow the protocol; 32 registers of 32 bits
  // are an assumed MIPS-like register file.
  localparam int unsigned NCORES_DEF = 4;
  localparam int unsigned NREGS_DEF  = 32;
  localparam int unsigned XLEN_DEF   = 32;

  // A1A2: SIC state of one register. Other (non loop-live) registers only
  // ever use ST_INV and ST_VS.
  typedef enum logic [1:0] {
    ST_INV = 2'b00,   // Invalid
    ST_VU  = 2'b01,   // Valid-Unsafe: valid for this thread, not final
    ST_VS  = 2'b10,   // Valid-Safe: final value, may be forwarded
    ST_LC  = 2'b11    // Last Copy: the only copy of a final value
  } sic_state_e;

  // Operations a core hands to its SIC node.
  typedef enum logic [2:0] {
    OP_R        = 3'd0,   // register read
    OP_NFW      = 3'd1,   // non-final write
    OP_FW       = 3'd2,   // final write
    OP_START    = 3'd3,   // initiate a thread, mask in wdata[1:0]
    OP_COMPLETE = 3'd4    // complete the thread (waits until non-speculative)
  } sic_op_e;

  // Bus commands. BusR and BusW follow the protocol; BusC (commit) passes
  // the non-speculative status on to the successor threads.
  typedef enum logic [1:0] {
    BUS_NONE = 2'b00,
    BUS_R    = 2'b01,
    BUS_W    = 2'b10,
    BUS_C    = 2'b11
  } bus_cmd_e;

  // Phase of the bus transaction in flight.
  typedef enum logic [1:0] {
    PH_IDLE = 2'b00,   // no transaction, mastership is arbitrated
    PH_ADDR = 2'b01,   // command, register number, master mask, data
    PH_RESP = 2'b10    // mask lines, supplied data and Shared line
  } bus_phase_e;

  // One-cycle event pulses from a node, for observation.
  typedef struct packed {
    logic read_hit;     // read satisfied locally
    logic read_miss;    // BusR issued
    logic blocked;      // BusR found no supplier, consumer blocks
    logic unblocked;    // blocked consumer received its value
    logic write_miss;   // NFW or FW to an INV register
    logic write_hit;    // NFW or FW to a valid register
    logic fw_shared;    // BusW answered with Shared high (stay VS)
    logic fw_lastcopy;  // BusW with Shared low (VS -> LC)
    logic supplied;     // this node supplied a BusR
    logic supplied_lc;  // ... from LC, going to VS
    logic push_load;    // loaded a value pushed by the immediate predecessor
    logic snarf;        // loaded an other register by read snarfing
    logic flush;        // sent an LC register on completion
    logic commit;       // thread committed
    logic start;        // thread initiated
  } sic_event_t;

endpackage
