// tb_sic_scoreboard: self-checking test of the local scoreboard.
//
// Random writes, loop-live classification loads and loop-live
// invalidations are applied to the scoreboard and to a reference copy kept
// here; both read ports and the LC vector are compared with the reference
// after every cycle. A directed part checks that invalidation touches only
// loop-live registers and that a write wins over a same-cycle invalidate.
module tb_sic_scoreboard;
  import sic_pkg::*;

  localparam int NR = 32;
  localparam int XL = 32;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [4:0]    p_addr, s_addr, waddr;
  logic [XL-1:0] p_data, s_data, wdata;
  sic_state_e    p_state, s_state, wstate;
  logic          p_ll, s_ll, we, wval, ll_load, inv_ll;
  logic [NR-1:0] ll_mask, lc;

  sic_scoreboard dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [XL-1:0] r_val [NR];
  sic_state_e    r_st  [NR];
  logic [NR-1:0] r_ll;

  task automatic compare();
    logic [NR-1:0] exp_lc;
    for (int i = 0; i < NR; i++) exp_lc[i] = (r_st[i] == ST_LC);
    check(p_data == r_val[p_addr] && p_state == r_st[p_addr] && p_ll == r_ll[p_addr],
          $sformatf("p port reg %0d", p_addr));
    check(s_data == r_val[s_addr] && s_state == r_st[s_addr] && s_ll == r_ll[s_addr],
          $sformatf("s port reg %0d", s_addr));
    check(lc == exp_lc, "lc vector");
  endtask

  initial begin
    we = 0; wval = 0; ll_load = 0; inv_ll = 0; ll_mask = '0;
    waddr = '0; wdata = '0; wstate = ST_INV; p_addr = '0; s_addr = '0;
    for (int i = 0; i < NR; i++) begin r_val[i] = '0; r_st[i] = ST_INV; end
    r_ll = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int i = 0; i < NR; i++) begin p_addr = 5'(i); s_addr = 5'(NR-1-i); #1 compare(); end

    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we      = ($urandom_range(0, 3) != 0);
      waddr   = 5'($urandom);
      wval    = $urandom_range(0, 1);
      wdata   = $urandom;
      wstate  = sic_state_e'($urandom_range(0, 3));
      ll_load = ($urandom_range(0, 15) == 0);
      ll_mask = $urandom;
      inv_ll  = ($urandom_range(0, 15) == 0);
      @(posedge clk);
      // reference update, same order of precedence as documented
      for (int i = 0; i < NR; i++) begin
        if (we && waddr == 5'(i)) begin
          r_st[i] = wstate;
          if (wval) r_val[i] = wdata;
        end else if (inv_ll && r_ll[i]) r_st[i] = ST_INV;
      end
      if (ll_load) r_ll = ll_mask;
      @(negedge clk);
      we = 0; ll_load = 0; inv_ll = 0;
      p_addr = 5'($urandom); s_addr = 5'($urandom);
      #1 compare();
    end

    // Directed: invalidate spares other registers.
    @(negedge clk);
    ll_load = 1; ll_mask = 32'h0000_00F0;
    @(negedge clk);
    ll_load = 0;
    for (int i = 0; i < 8; i++) begin
      we = 1; waddr = 5'(i); wval = 1; wdata = XL'(i * 7); wstate = ST_VS;
      @(negedge clk);
    end
    we = 0; inv_ll = 1;
    @(negedge clk);
    inv_ll = 0;
    for (int i = 0; i < 8; i++) begin
      p_addr = 5'(i);
      #1 check(p_state == ((i >= 4) ? ST_INV : ST_VS), $sformatf("inv_ll reg %0d", i));
      check(p_data == XL'(i * 7), "value kept by inv_ll");
    end
    // A write in the same cycle as invalidate wins.
    @(negedge clk);
    we = 1; waddr = 5'd5; wval = 0; wstate = ST_LC; inv_ll = 1;
    @(negedge clk);
    we = 0; inv_ll = 0; p_addr = 5'd5;
    #1 check(p_state == ST_LC && lc[5] && p_ll, "write beats invalidate");

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
