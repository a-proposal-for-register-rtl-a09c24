// tb_sic_node: directed test of one SIC node on a real bus.
//
// The node under test sits in bus slot 1. The testbench plays the other
// three cores: it raises their bus requests and drives their mask lines,
// supply data and Shared line. It walks the node through every transition
// of the protocol (read miss with supplier, read hit, write miss and hit,
// final write with Shared low and high, supplying from LC and VS, ignoring
// a BusR from a predecessor, loading a pushed value, blocking and being
// woken, read snarfing, completion with last-copy flush and commit) and
// checks the read data, the bus fields the node drives, its event pulses
// and the read-hit and idle-bus read-miss latencies.
module tb_sic_node;
  import sic_pkg::*;

  localparam int NC = 4;
  localparam int NR = 32;
  localparam int XL = 32;
  localparam int ME = 1;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  // node ports
  logic          op_valid, op_ready, op_done;
  sic_op_e       op;
  logic [4:0]    op_reg;
  logic [XL-1:0] op_wdata, op_rdata;
  logic          ll_load;
  logic [NR-1:0] ll_mask;
  logic [1:0]    mask;
  logic          active;
  sic_event_t    ev;

  // bus
  logic [NC-1:0] req;
  bus_cmd_e      req_cmd   [NC];
  logic [4:0]    req_reg   [NC];
  logic [XL-1:0] req_data  [NC];
  logic [1:0]    core_mask [NC];
  logic [NC-1:0] line_drv  [NC];
  logic [NC-1:0] shared_drv;
  logic [XL-1:0] rdata_drv [NC];
  bus_phase_e    b_phase;
  bus_cmd_e      b_cmd;
  logic [1:0]    b_master, b_mask;
  logic [4:0]    b_reg;
  logic [XL-1:0] b_data, b_rdata;
  logic [NC-1:0] b_lines;
  logic          b_shared;

  sic_node #(.CORE_ID(ME)) dut (
    .clk, .rst_n, .op_valid, .op_ready, .op, .op_reg, .op_wdata,
    .op_done, .op_rdata, .ll_load, .ll_mask, .mask, .active,
    .bus_req(req[ME]), .bus_req_cmd(req_cmd[ME]), .bus_req_reg(req_reg[ME]),
    .bus_req_data(req_data[ME]),
    .b_phase, .b_cmd, .b_master, .b_reg, .b_data, .b_mask,
    .b_lines, .b_shared, .b_rdata,
    .line_drv(line_drv[ME]), .shared_drv(shared_drv[ME]), .rdata_drv(rdata_drv[ME]),
    .ev
  );

  sic_bus u_bus (
    .clk, .rst_n, .req, .req_cmd, .req_reg, .req_data, .core_mask,
    .line_drv, .shared_drv, .rdata_drv,
    .phase(b_phase), .cmd(b_cmd), .master(b_master), .breg(b_reg),
    .bdata(b_data), .bmask(b_mask), .lines(b_lines), .shared(b_shared),
    .rdata(b_rdata)
  );

  logic [1:0] om [NC];   // masks of the cores the testbench plays
  always_comb for (int c = 0; c < NC; c++) core_mask[c] = (c == ME) ? mask : om[c];

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cyc, what); end
  endtask

  // Responses the other cores give in the RESP phase (all through slot 0).
  logic [NC-1:0] cfg_lines;
  logic [XL-1:0] cfg_data;
  logic          cfg_shared;
  always_comb begin
    line_drv[0] = '0; rdata_drv[0] = '0; shared_drv[0] = 1'b0;
    if (b_phase == PH_RESP) begin
      if (b_cmd == BUS_R && int'(b_master) == ME) begin
        line_drv[0]  = cfg_lines;
        rdata_drv[0] = cfg_data;
      end
      if (b_cmd == BUS_R && int'(b_master) != ME) begin
        line_drv[0]  = cfg_lines;
        rdata_drv[0] = dut.arb_win ? '0 : cfg_data;
      end
      if (b_cmd == BUS_W) shared_drv[0] = cfg_shared;
    end
  end
  for (genvar c = 2; c < NC; c++) begin : g_quiet
    assign line_drv[c] = '0; assign rdata_drv[c] = '0; assign shared_drv[c] = 1'b0;
  end

  // Event accumulation.
  sic_event_t seen;
  always @(posedge clk) if (rst_n) seen <= seen | ev;

  // Node operation.
  task automatic node_op(input sic_op_e o, input int r, input logic [XL-1:0] wd,
                         output logic [XL-1:0] rd, output int lat);
    int t0;
    @(negedge clk);
    op_valid = 1'b1; op = o; op_reg = 5'(r); op_wdata = wd;
    while (!op_ready) @(negedge clk);
    @(posedge clk);
    t0 = cyc + 1;
    #1 op_valid = 1'b0;
    @(negedge clk);
    while (!op_done) @(negedge clk);
    rd = op_rdata; lat = cyc - t0;
  endtask

  // Transaction from another core (slot s) with thread mask m.
  task automatic other_txn(input int s, input bus_cmd_e c, input int r,
                           input logic [XL-1:0] d, input logic [1:0] m);
    @(negedge clk);
    om[s] = m; req_cmd[s] = c; req_reg[s] = 5'(r); req_data[s] = d;
    req[s] = 1'b1;
    do @(negedge clk); while (!(b_phase == PH_RESP && int'(b_master) == s));
    @(posedge clk);
    #1 req[s] = 1'b0;
  endtask

  // Watch the node's own BusW transactions.
  logic [4:0]    w_reg;
  logic [XL-1:0] w_data;
  logic [1:0]    w_mask;
  int            n_busw = 0;
  always @(negedge clk)
    if (b_phase == PH_ADDR && int'(b_master) == ME && b_cmd == BUS_W) begin
      w_reg = b_reg; w_data = b_data; w_mask = b_mask; n_busw++;
    end

  logic [XL-1:0] rd;
  int lat;
  logic [NC-1:0] resp_lines;

  initial begin
    op_valid = 0; op = OP_R; op_reg = '0; op_wdata = '0;
    ll_load = 0; ll_mask = '0; seen = '0;
    for (int c = 0; c < NC; c++) if (c != ME) begin
      req[c] = 0; req_cmd[c] = BUS_NONE; req_reg[c] = '0; req_data[c] = '0;
      om[c] = 2'(c);
    end
    cfg_lines = '0; cfg_data = '0; cfg_shared = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // r1, r3, r5, r6, r7 loop-live; r9, r10 other.
    @(negedge clk); ll_load = 1; ll_mask = 32'b1110_1010;
    @(negedge clk); ll_load = 0;
    node_op(OP_START, 0, 32'd2, rd, lat);
    check(active && mask == 2, "started with mask 2");

    // Read miss: positions 0 and 1 can supply, 1 is closest.
    cfg_lines = 4'b0011; cfg_data = 32'hAAAA_0001;
    node_op(OP_R, 1, '0, rd, lat);
    check(rd == 32'hAAAA_0001, "read miss data");
    check(lat == 3, $sformatf("read miss latency %0d", lat));
    check(dut.u_sb.st_q[1] == ST_VU, "loaded as VU");
    node_op(OP_R, 1, '0, rd, lat);
    check(rd == 32'hAAAA_0001 && lat == 0, "read hit");

    // Write miss then write hit on r3.
    node_op(OP_NFW, 3, 32'h33, rd, lat);
    check(dut.u_sb.st_q[3] == ST_VU, "NFW INV -> VU");
    node_op(OP_NFW, 3, 32'h34, rd, lat);
    check(dut.u_sb.st_q[3] == ST_VU, "NFW VU -> VU");

    // Final write with Shared low: VS then LC.
    cfg_shared = 0;
    node_op(OP_FW, 1, 32'h1111, rd, lat);
    check(w_reg == 1 && w_data == 32'h1111 && w_mask == 2, "BusW fields");
    check(dut.u_sb.st_q[1] == ST_LC, "FW with Shared low -> LC");

    // A successor (mask 3) misses on r1: node supplies from LC, goes VS.
    cfg_lines = 4'b0001; cfg_data = 32'h0;
    other_txn(0, BUS_R, 1, '0, 2'd3);
    check(seen.supplied_lc, "supplied from LC");
    check(dut.u_sb.st_q[1] == ST_VS, "LC -> VS after supply");
    // A predecessor (mask 1... requester 1) misses on r1: node is no predecessor.
    seen = '0;
    other_txn(0, BUS_R, 1, '0, 2'd1);
    check(!seen.supplied, "no supply to a predecessor");

    // Final write with Shared high stays VS.
    cfg_shared = 1;
    node_op(OP_FW, 3, 32'h3333, rd, lat);
    check(dut.u_sb.st_q[3] == ST_VS, "FW with Shared high -> VS");

    // Push from the immediate predecessor (mask 1) into INV r5.
    seen = '0; cfg_shared = 0;
    other_txn(0, BUS_W, 5, 32'h5555, 2'd1);
    check(seen.push_load && dut.u_sb.st_q[5] == ST_VU, "push loaded as VU");
    node_op(OP_R, 5, '0, rd, lat);
    check(rd == 32'h5555 && lat == 0, "pushed value read");
    // Push from mask 0 (not the immediate predecessor) is ignored.
    seen = '0;
    other_txn(0, BUS_W, 6, 32'h6666, 2'd0);
    check(!seen.push_load && dut.u_sb.st_q[6] == ST_INV, "non-adjacent push ignored");

    // Blocked read of r7, woken by the predecessor's push.
    cfg_lines = 4'b0000;
    fork
      node_op(OP_R, 7, '0, rd, lat);
      begin
        wait (seen.blocked);
        repeat (5) @(negedge clk);
        check(!op_ready, "blocked node accepts nothing");
        other_txn(2, BUS_W, 7, 32'h7777, 2'd1);
      end
    join
    check(rd == 32'h7777 && seen.unblocked, "woken with pushed value");

    // Read snarfing of other register r9 (requester mask 3, supplier 0).
    cfg_lines = 4'b0001; cfg_data = 32'h9999;
    other_txn(3, BUS_R, 9, '0, 2'd3);
    check(seen.snarf && dut.u_sb.st_q[9] == ST_VS, "snarfed as VS");
    node_op(OP_R, 9, '0, rd, lat);
    check(rd == 32'h9999 && lat == 0, "snarfed value hit");

    // Read miss on other register r10: loaded as VS.
    cfg_lines = 4'b0001; cfg_data = 32'h1010;
    node_op(OP_R, 10, '0, rd, lat);
    check(rd == 32'h1010 && dut.u_sb.st_q[10] == ST_VS, "other read miss -> VS");

    // Make r6 LC, then complete: flush r6, then commit.
    cfg_shared = 0;
    node_op(OP_FW, 6, 32'h6060, rd, lat);
    check(dut.u_sb.st_q[6] == ST_LC, "r6 LC");
    cfg_shared = 1;
    fork
      node_op(OP_COMPLETE, 0, '0, rd, lat);
      begin
        repeat (10) @(negedge clk);
        check(n_busw == 3, "no flush while speculative");
        other_txn(0, BUS_C, 0, '0, 2'd0);
        om[2] = 2'd0;
        other_txn(2, BUS_C, 0, '0, 2'd0);
      end
    join
    check(n_busw == 4 && w_reg == 6 && w_data == 32'h6060 && w_mask == 0, "LC flushed");
    check(dut.u_sb.st_q[6] == ST_VS, "flushed reg VS after Shared");
    check(seen.flush && seen.commit && !active, "committed");

    // A new speculative thread invalidates loop-live, keeps other regs.
    node_op(OP_START, 0, 32'd3, rd, lat);
    check(dut.u_sb.st_q[1] == ST_INV && dut.u_sb.st_q[5] == ST_INV, "loop-live invalidated");
    check(dut.u_sb.st_q[9] == ST_VS && dut.u_sb.st_q[10] == ST_VS, "other regs kept");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
