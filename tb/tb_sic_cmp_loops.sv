// tb_sic_cmp_loops: randomized multi-loop test of the four-core SIC design
// at its default sizes.
//
// Several loops run one after another, with random trip counts (including
// loops shorter than the number of cores) and random delays. Each loop
// starts on the core that ran the previous loop's last iteration, which
// continues as the non-speculative thread. Two loop-live accumulators
// (r1: a + C + k, r5: 3a ^ k) and one loop-live temporary are used, with a
// loop constant in the other register r2, written by the sequential code
// before every loop. The first loop's first iterations read before their producers and
// block; in later loops each read waits for the immediate predecessor's
// final write. Every value read is compared with the sequential result,
// and the final values are read back after each loop.
module tb_sic_cmp_loops;
  import sic_pkg::*;

  localparam int NC     = 4;
  localparam int NR     = 32;
  localparam int XL     = 32;
  localparam int NLOOPS = 6;
  localparam int MAXIT  = 40;

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

  int n_blocked = 0;
  always @(posedge clk) if (rst_n)
    for (int c = 0; c < NC; c++) n_blocked += int'(ev[c].blocked);

  task automatic do_op(input int c, input sic_op_e o, input int r,
                       input logic [XL-1:0] wd, output logic [XL-1:0] rd);
    @(negedge clk);
    op_valid[c] = 1'b1;
    op[c]       = o;
    op_reg[c]   = 5'(r);
    op_wdata[c] = wd;
    while (!op_ready[c]) @(negedge clk);
    @(posedge clk);
    #1 op_valid[c] = 1'b0;
    @(negedge clk);
    while (!op_done[c]) @(negedge clk);
    rd = op_rdata[c];
  endtask

  // Sequential values: a1[k], a5[k] are what iteration k reads.
  logic [XL-1:0] a1 [MAXIT+1];
  logic [XL-1:0] a5 [MAXIT+1];
  logic [XL-1:0] cst;
  bit            fw1 [MAXIT];
  bit            fw5 [MAXIT];
  int            niter, first, loopno;

  task automatic run_core(input int c);
    logic [XL-1:0] rd, v;
    int k0;
    k0 = (c - first + NC) % NC;
    for (int k = k0; k < niter; k += NC) begin
      if (k != 0) do_op(c, OP_START, 0, XL'(k < NC ? k : NC - 1), rd);
      do_op(c, OP_R, 2, '0, rd);
      check(rd == cst, $sformatf("loop %0d iter %0d r2", loopno, k));
      if (k == 0 && loopno == 0) wait (n_blocked >= ((niter < NC ? niter : NC) - 1));
      else if (k > 0 && !(loopno == 0 && k < NC)) wait (fw1[k-1]);
      do_op(c, OP_R, 1, '0, rd);
      check(rd == a1[k], $sformatf("loop %0d iter %0d r1 %h exp %h", loopno, k, rd, a1[k]));
      v = $urandom;
      do_op(c, OP_NFW, 3, v, rd);
      repeat ($urandom_range(0, 8)) @(posedge clk);
      do_op(c, OP_R, 3, '0, rd);
      check(rd == v, "temporary");
      do_op(c, OP_FW, 1, a1[k] + cst + XL'(k), rd);
      fw1[k] = 1'b1;
      if (k > 0) wait (fw5[k-1]);
      do_op(c, OP_R, 5, '0, rd);
      check(rd == a5[k], $sformatf("loop %0d iter %0d r5 %h exp %h", loopno, k, rd, a5[k]));
      repeat ($urandom_range(0, 12)) @(posedge clk);
      do_op(c, OP_FW, 5, (a5[k] * 3) ^ XL'(k), rd);
      fw5[k] = 1'b1;
      repeat ($urandom_range(0, 6)) @(posedge clk);
      do_op(c, OP_COMPLETE, 0, '0, rd);
    end
  endtask

  logic [XL-1:0] dummy;

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

    first = 0;
    cst   = $urandom;
    for (loopno = 0; loopno < NLOOPS; loopno++) begin
      niter = (loopno == 1) ? 2 : (loopno == 2) ? 1 : $urandom_range(3, MAXIT);
      for (int k = 0; k < MAXIT; k++) begin fw1[k] = 0; fw5[k] = 0; end
      // Sequential code on core 'first': classification, loop constant
      // and (first loop only) initial accumulator values.
      do_op(first, OP_START, 0, '0, dummy);
      @(negedge clk);
      ll_load = 1'b1;
      ll_mask = NR'(32'b10_1010) | (NR'($urandom) & ~NR'(32'b100));
      @(negedge clk);
      ll_load = 1'b0;
      do_op(first, OP_NFW, 2, cst, dummy);
      if (loopno == 0) begin
        a1[0] = 32'h1234;
        a5[0] = 32'h0005;
        do_op(first, OP_NFW, 1, a1[0], dummy);
        do_op(first, OP_NFW, 5, a5[0], dummy);
      end
      for (int k = 0; k < niter; k++) begin
        a1[k+1] = a1[k] + cst + XL'(k);
        a5[k+1] = (a5[k] * 3) ^ XL'(k);
      end
      fork
        run_core(0); run_core(1); run_core(2); run_core(3);
      join
      check(thread_active == '0, "all threads committed");
      first = (first + niter - 1) % NC;
      a1[0] = a1[niter];
      a5[0] = a5[niter];
      begin
        logic [XL-1:0] rd;
        do_op(first, OP_START, 0, '0, dummy);
        do_op(first, OP_R, 1, '0, rd);
        check(rd == a1[0], $sformatf("loop %0d final r1", loopno));
        do_op(first, OP_R, 5, '0, rd);
        check(rd == a5[0], $sformatf("loop %0d final r5", loopno));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
