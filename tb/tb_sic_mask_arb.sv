// tb_sic_mask_arb: exhaustive test of the distributed arbitration.
//
// Four arbitration cells, one per thread position, are wired to a common
// OR of their line drives. For every requester position and every set of
// candidates, the test checks that exactly the closest predecessor of the
// requester among the candidates wins, that every cell reports whether a
// supplier exists and its position, and that candidates at or after the
// requester never win.
module tb_sic_mask_arb;
  import sic_pkg::*;

  localparam int NC = 4;

  logic [NC-1:0] cand;
  logic [1:0]    req_mask;
  logic [NC-1:0] line_drv [NC];
  logic [NC-1:0] lines;
  logic [NC-1:0] win, any;
  logic [1:0]    win_mask [NC];

  for (genvar p = 0; p < NC; p++) begin : g_cell
    sic_mask_arb u_arb (
      .cand(cand[p]), .my_mask(2'(p)), .req_mask,
      .line_drv(line_drv[p]), .lines,
      .win(win[p]), .any(any[p]), .win_mask(win_mask[p])
    );
  end
  always_comb begin
    lines = '0;
    for (int p = 0; p < NC; p++) lines |= line_drv[p];
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int r = 0; r < NC; r++) begin
      for (int s = 0; s < (1 << NC); s++) begin
        int exp_w;
        cand = NC'(s);
        req_mask = 2'(r);
        // closest predecessor: highest candidate position below r
        exp_w = -1;
        for (int p = 0; p < r; p++) if (s[p]) exp_w = p;
        #1;
        for (int p = 0; p < NC; p++) begin
          check(win[p] == (p == exp_w), $sformatf("req %0d cand %b win[%0d]", r, s, p));
          check(any[p] == (exp_w >= 0), $sformatf("req %0d cand %b any", r, s));
          if (exp_w >= 0) check(win_mask[p] == 2'(exp_w), "win_mask");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
