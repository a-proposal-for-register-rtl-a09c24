// tb_sic_cmp: end-to-end test of the four-core SIC design at its default
// sizes (4 cores, 32 registers of 32 bits).
//
// Four behavioural cores run a loop whose iterations are speculative
// threads, iteration k on core k mod 4. Register 1 is a loop-live
// accumulator: each iteration reads it and final-writes acc + C + k.
// Register 2 is an other register holding the loop constant C, written by
// the sequential code on core 0 before the loop. Register 3 is a loop-live
// temporary (two non-final writes and a read) and register 4 a loop-live
// register every iteration final-writes and nobody reads. Iterations 1..3
// read the accumulator before iteration 0 has produced it, so they block and
// are woken one after another by the pushes of their predecessors; later
// iterations read it after their immediate predecessor's final write (the
// value then comes by push, from a Last-Copy or from a Valid-Safe copy).
// Each read is compared with the sequential value worked out here. After
// the loop the last value is read back as a sequential thread and as a
// speculative read miss. Read-hit and idle-bus read-miss latencies are
// checked, and every protocol event must occur at least once.
module tb_sic_cmp;
  import sic_pkg::*;

  localparam int NC    = 4;
  localparam int NR    = 32;
  localparam int XL    = 32;
  localparam int NITER = 24;
  localparam logic [XL-1:0] C    = 32'h0000_0105;
  localparam logic [XL-1:0] INIT = 32'h0001_0000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NC-1:0] op_valid;
  logic [NC-1:0] op_ready;
  sic_op_e       op       [NC];
  logic [4:0]    op_reg   [NC];
  logic [XL-1:0] op_wdata [NC];
  logic [NC-1:0] op_done;
  logic [XL-1:0] op_rdata [NC];
  logic          ll_load;
  logic [NR-1:0] ll_mask;
  logic [1:0]    thread_mask [NC];
  logic [NC-1:0] thread_active;
  sic_event_t    ev [NC];

  sic_cmp dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // Sequential value of the accumulator seen by iteration k.
  function automatic logic [XL-1:0] acc(input int k);
    logic [XL-1:0] a = INIT;
    for (int j = 0; j < k; j++) a = a + C + XL'(j);
    return a;
  endfunction

  // ------------------------------------------------------ event counting
  localparam int NEV = 15;
  string ev_name [NEV] = '{"read_hit", "read_miss", "blocked", "unblocked",
    "write_miss", "write_hit", "fw_shared", "fw_lastcopy", "supplied",
    "supplied_lc", "push_load", "snarf", "flush", "commit", "start"};
  int ev_cnt [NEV];
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < NC; c++) begin
      ev_cnt[0]  += int'(ev[c].read_hit);
      ev_cnt[1]  += int'(ev[c].read_miss);
      ev_cnt[2]  += int'(ev[c].blocked);
      ev_cnt[3]  += int'(ev[c].unblocked);
      ev_cnt[4]  += int'(ev[c].write_miss);
      ev_cnt[5]  += int'(ev[c].write_hit);
      ev_cnt[6]  += int'(ev[c].fw_shared);
      ev_cnt[7]  += int'(ev[c].fw_lastcopy);
      ev_cnt[8]  += int'(ev[c].supplied);
      ev_cnt[9]  += int'(ev[c].supplied_lc);
      ev_cnt[10] += int'(ev[c].push_load);
      ev_cnt[11] += int'(ev[c].snarf);
      ev_cnt[12] += int'(ev[c].flush);
      ev_cnt[13] += int'(ev[c].commit);
      ev_cnt[14] += int'(ev[c].start);
    end
  end

  // ------------------------------------------------- behavioural core ops
  // Issue one operation on core c; returns the read data and the number of
  // cycles from the acceptance edge to the cycle op_done is seen.
  task automatic do_op(input int c, input sic_op_e o, input int r,
                       input logic [XL-1:0] wd,
                       output logic [XL-1:0] rd, output int lat);
    int t0;
    @(negedge clk);
    op_valid[c] = 1'b1;
    op[c]       = o;
    op_reg[c]   = 5'(r);
    op_wdata[c] = wd;
    while (!op_ready[c]) @(negedge clk);
    @(posedge clk);
    t0 = cyc + 1;
    #1 op_valid[c] = 1'b0;
    @(negedge clk);
    while (!op_done[c]) @(negedge clk);
    rd  = op_rdata[c];
    lat = cyc - t0;
  endtask

  bit fw_done [NITER];
  logic [XL-1:0] dummy;
  int lat;

  task automatic run_core(input int c);
    logic [XL-1:0] rd;
    logic [XL-1:0] v2;
    int l;
    for (int k = c; k < NITER; k += NC) begin
      if (k >= NC) do_op(c, OP_START, 0, XL'(NC - 1), rd, l);
      // other register: miss with supplier or snarfed, later hits
      do_op(c, OP_R, 2, '0, rd, l);
      check(rd == C, $sformatf("iter %0d r2=%h", k, rd));
      // wait for the producer order described above
      if (k == 0) wait (ev_cnt[2] >= NC - 1);
      else if (k >= NC) wait (fw_done[k-1]);
      do_op(c, OP_R, 1, '0, rd, l);
      check(rd == acc(k), $sformatf("iter %0d r1=%h exp %h", k, rd, acc(k)));
      // temporary: write miss, write hit, read hit
      v2 = $urandom;
      do_op(c, OP_NFW, 3, $urandom, dummy, l);
      do_op(c, OP_NFW, 3, v2, dummy, l);
      do_op(c, OP_R, 3, '0, rd, l);
      check(rd == v2, $sformatf("iter %0d r3", k));
      check(l == 0, $sformatf("read hit latency %0d", l));
      repeat ($urandom_range(0, 20)) @(posedge clk);
      do_op(c, OP_FW, 1, acc(k) + C + XL'(k), dummy, l);
      fw_done[k] = 1'b1;
      do_op(c, OP_FW, 4, XL'(k), dummy, l);
      repeat ($urandom_range(0, 10)) @(posedge clk);
      do_op(c, OP_COMPLETE, 0, '0, dummy, l);
    end
  endtask

  initial begin
    op_valid = '0;
    for (int c = 0; c < NC; c++) begin
      op[c] = OP_R; op_reg[c] = '0; op_wdata[c] = '0;
    end
    ll_load = 1'b0;
    ll_mask = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // Sequential section on core 0.
    do_op(0, OP_START, 0, '0, dummy, lat);
    do_op(0, OP_NFW, 2, C, dummy, lat);         // other register -> VS
    // Loop entry: annotator marks r1, r3, r4 as loop-live.
    @(negedge clk);
    ll_load = 1'b1;
    ll_mask = NR'(32'b1_1010);
    @(negedge clk);
    ll_load = 1'b0;
    do_op(0, OP_NFW, 1, INIT, dummy, lat);      // loop-live INV -> VU
    for (int c = 1; c < NC; c++) do_op(c, OP_START, 0, XL'(c), dummy, lat);

    fork
      run_core(0);
      run_core(1);
      run_core(2);
      run_core(3);
    join

    // Sequential code continues on the core that ran the last iteration.
    begin
      int f, g;
      logic [XL-1:0] rd;
      f = (NITER - 1) % NC;
      g = (f + 1) % NC;
      check(thread_active == '0, "all threads committed");
      do_op(f, OP_START, 0, '0, dummy, lat);
      do_op(f, OP_R, 1, '0, rd, lat);
      check(rd == acc(NITER), $sformatf("final r1=%h exp %h", rd, acc(NITER)));
      do_op(g, OP_START, 0, XL'(1), dummy, lat);
      do_op(g, OP_R, 1, '0, rd, lat);
      check(rd == acc(NITER), $sformatf("final miss r1=%h", rd));
      check(lat == 3, $sformatf("idle-bus read miss latency %0d", lat));
    end

    for (int e = 0; e < NEV; e++) begin
      $display("event %-12s %0d", ev_name[e], ev_cnt[e]);
      check(ev_cnt[e] > 0, {"event never seen: ", ev_name[e]});
    end
    check(ev_cnt[2] == NC - 1, "exactly three consumers blocked at loop start");
    check(ev_cnt[13] == NITER, "one commit per iteration");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
