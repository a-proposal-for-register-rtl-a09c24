// tb_sic_bus: self-checking test of the snoopy shared bus.
//
// Four requester processes, one per core slot, each with a random thread
// mask, issue random transactions and hold their request until the end of
// their response phase. The test checks that each grant goes to the
// requester running the oldest thread (lowest mask, then lowest index),
// that a transaction takes exactly ADDR then RESP then IDLE, that command,
// register, data and master mask are broadcast unchanged, and that the
// mask lines, Shared and supply data are the OR of all drives.
module tb_sic_bus;
  import sic_pkg::*;

  localparam int NC = 4;
  localparam int XL = 32;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NC-1:0] req;
  bus_cmd_e      req_cmd   [NC];
  logic [4:0]    req_reg   [NC];
  logic [XL-1:0] req_data  [NC];
  logic [1:0]    core_mask [NC];
  logic [NC-1:0] line_drv  [NC];
  logic [NC-1:0] shared_drv;
  logic [XL-1:0] rdata_drv [NC];
  bus_phase_e    phase;
  bus_cmd_e      cmd;
  logic [1:0]    master, bmask;
  logic [4:0]    breg;
  logic [XL-1:0] bdata, rdata;
  logic [NC-1:0] lines;
  logic          shared;

  sic_bus dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int ntxn = 0;
  int exp_gnt;
  bus_phase_e prev_phase;

  // Expected grant, computed from the requests seen in an idle cycle.
  always @(posedge clk) if (rst_n) begin
    if (phase == PH_IDLE && req != '0) begin
      exp_gnt = -1;
      for (int c = 0; c < NC; c++)
        if (req[c] && (exp_gnt < 0 || core_mask[c] < core_mask[exp_gnt])) exp_gnt = c;
    end
  end

  always @(negedge clk) if (rst_n) begin
    // phase sequence
    if (prev_phase == PH_ADDR) check(phase == PH_RESP, "ADDR -> RESP");
    if (prev_phase == PH_RESP) check(phase == PH_IDLE, "RESP -> IDLE");
    if (phase == PH_ADDR && prev_phase == PH_IDLE) begin
      ntxn++;
      check(int'(master) == exp_gnt, $sformatf("grant %0d exp %0d", master, exp_gnt));
      check(cmd == req_cmd[master] && breg == req_reg[master] &&
            bdata == req_data[master] && bmask == core_mask[master], "broadcast fields");
    end
    prev_phase = phase;
  end

  // Wired-OR checks with random drives (only one supply-data driver).
  always @(negedge clk) if (rst_n) begin
    logic [NC-1:0] l;
    int d;
    l = '0;
    d = $urandom_range(0, NC - 1);
    for (int c = 0; c < NC; c++) begin
      line_drv[c]  = NC'($urandom);
      rdata_drv[c] = (c == d) ? XL'($urandom) : '0;
      l |= line_drv[c];
    end
    shared_drv = NC'($urandom);
    #1;
    check(lines == l, "mask lines OR");
    check(rdata == rdata_drv[d], "supply data");
    check(shared == |shared_drv, "shared OR");
  end

  task automatic requester(input int c);
    for (int n = 0; n < 60; n++) begin
      repeat ($urandom_range(0, 6)) @(negedge clk);
      req_cmd[c]  = bus_cmd_e'($urandom_range(1, 3));
      req_reg[c]  = 5'($urandom);
      req_data[c] = $urandom;
      req[c]      = 1'b1;
      do @(negedge clk); while (!(phase == PH_RESP && int'(master) == c));
      @(posedge clk);
      #1 req[c] = 1'b0;
      if ($urandom_range(0, 3) == 0) core_mask[c] = 2'($urandom);
    end
  endtask

  initial begin
    req = '0;
    prev_phase = PH_IDLE;
    for (int c = 0; c < NC; c++) begin
      req_cmd[c] = BUS_NONE; req_reg[c] = '0; req_data[c] = '0;
      core_mask[c] = 2'(c); line_drv[c] = '0; rdata_drv[c] = '0;
    end
    shared_drv = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    fork
      requester(0); requester(1); requester(2); requester(3);
    join
    repeat (4) @(posedge clk);
    check(ntxn == 4 * 60, $sformatf("transactions %0d", ntxn));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
