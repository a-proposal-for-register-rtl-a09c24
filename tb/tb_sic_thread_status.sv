// tb_sic_thread_status: self-checking test of the thread mask register.
//
// Starts threads with every mask, applies commits of other threads and of
// this thread, and compares mask, active and nonspec with a reference
// model: a commit of another thread moves an active speculative thread one
// step towards non-speculative, never below 0; an idle thread keeps its
// mask.
module tb_sic_thread_status;
  import sic_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       start, commit_other, commit_self, active, nonspec;
  logic [1:0] start_mask, mask;

  sic_thread_status dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [1:0] r_mask;
  logic       r_act;

  initial begin
    start = 0; commit_other = 0; commit_self = 0; start_mask = '0;
    r_mask = '0; r_act = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!active && mask == 0, "reset");
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      start        = ($urandom_range(0, 5) == 0);
      start_mask   = 2'($urandom);
      commit_other = !start && ($urandom_range(0, 1) == 0);
      commit_self  = !start && !commit_other && r_act && r_mask == 0 &&
                     ($urandom_range(0, 3) == 0);
      @(posedge clk);
      if (start) begin r_mask = start_mask; r_act = 1; end
      else if (commit_self) r_act = 0;
      else if (commit_other && r_act && r_mask != 0) r_mask = r_mask - 1;
      @(negedge clk);
      start = 0; commit_other = 0; commit_self = 0;
      #1;
      check(mask == r_mask && active == r_act && nonspec == (r_act && r_mask == 0),
            $sformatf("n=%0d mask %0d exp %0d act %0d exp %0d", n, mask, r_mask, active, r_act));
    end
    // Directed: mask 3 reaches non-speculative after three commits.
    @(negedge clk); start = 1; start_mask = 2'd3;
    @(negedge clk); start = 0;
    for (int i = 0; i < 3; i++) begin
      check(!nonspec, "still speculative");
      commit_other = 1; @(negedge clk); commit_other = 0; @(negedge clk);
    end
    check(nonspec && mask == 0, "non-speculative after three commits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
