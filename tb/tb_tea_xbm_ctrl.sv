// tb_tea_xbm_ctrl: runs the controller from a free-running clock on ct with a
// testbench model of the round counter providing CMP. Checks: no clock request
// while waiting for START; bt = !ct while busy; one data-path load; 43
// register loads per round (the operations of one round); the number of
// subtractions per round in each mode; DONE exactly 90 edges after START for
// eight rounds; DONE held while START is high; return to idle after START
// falls.
module tb_tea_xbm_ctrl;
  timeunit 1ns;
  timeprecision 1ps;
  import tea_pkg::*;

  logic  ct = 1'b0;
  logic  rst_n;
  logic  start;
  logic  cmp [2];
  logic  bt [2];
  logic  done [2];
  ctrl_t ctrl [2];
  int checks = 0, failures = 0;

  tea_xbm_ctrl #(.MODE(TEA_ENCRYPT)) dut_e (.ct(ct), .rst_n(rst_n), .start(start), .cmp(cmp[0]),
                                            .bt(bt[0]), .done(done[0]), .ctrl(ctrl[0]));
  tea_xbm_ctrl #(.MODE(TEA_DECRYPT)) dut_d (.ct(ct), .rst_n(rst_n), .start(start), .cmp(cmp[1]),
                                            .bt(bt[1]), .done(done[1]), .ctrl(ctrl[1]));

  always #5 ct = ~ct;

  initial begin
    #50000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // Subtractions issued in a control word (only when some register loads).
  function automatic int count_subs(ctrl_t c);
    int k = 0;
    if (c.reg_en != '0)
      for (int u = 0; u < NUM_ALU; u++) if (c.alu[u].op == OP_SUB) k++;
    return k;
  endfunction

  // Round-counter model standing in for the data-path's R14/R12.
  int n [2];
  int loads [2], regloads [2], subs [2], edges;
  for (genvar m = 0; m < 2; m++) begin : g_model
    always @(posedge ct) begin
      if (ctrl[m].load_init) begin n[m] <= 8; loads[m] <= loads[m] + 1; end
      if (ctrl[m].reg_en[R_N]) n[m] <= n[m] - 1;
      if (ctrl[m].reg_en[R_CMP]) cmp[m] <= (n[m] > 0);
      regloads[m] <= regloads[m] + $countones(ctrl[m].reg_en);
      subs[m] <= subs[m] + count_subs(ctrl[m]);
    end
  end

  initial begin
    rst_n = 1'b0;
    start = 1'b0; cmp = '{1'b0, 1'b0};
    #1 rst_n = 1'b1;
    #1 rst_n = 1'b0;   // a falling edge, so the asynchronous reset acts
    n = '{0, 0}; loads = '{0, 0}; regloads = '{0, 0}; subs = '{0, 0};
    #22 rst_n = 1'b1;
    repeat (5) @(negedge ct);
    check(bt[0] == 1'b0 && bt[1] == 1'b0 && !done[0], "clock requested while idle");
    @(posedge ct); #1 check(bt[0] == 1'b0, "bt high while ct high");
    // request
    @(negedge ct); start = 1'b1; #1;
    check(bt[0] == 1'b1 && bt[1] == 1'b1, "no clock request after START rose");
    edges = 0;
    while (!done[0]) begin
      @(posedge ct); edges++; #1;
      if (!done[0]) check(bt[0] == 1'b0, "bt not low with ct high");
      if (edges > 200) break;
    end
    check(edges == 90, $sformatf("START to DONE took %0d edges, expected 90", edges));
    check(done[1], "decryptor controller not done together");
    check(loads[0] == 1 && loads[1] == 1, "data-path not loaded exactly once");
    check(regloads[0] == 8 * 43, $sformatf("%0d register loads, expected 8*43", regloads[0]));
    check(regloads[1] == 8 * 43, "decrypt register loads");
    // encrypt: N-1 is the only subtraction; decrypt: 3 copies of B-F, B, A, SUM, N
    check(subs[0] == 8 * 1, $sformatf("encrypt subtractions %0d", subs[0]));
    check(subs[1] == 8 * 7, $sformatf("decrypt subtractions %0d", subs[1]));
    // DONE held while START stays high, with no clock request
    repeat (6) @(negedge ct);
    check(done[0] && bt[0] == 1'b0, "DONE not held or clock running while waiting");
    start = 1'b0; #1;
    check(bt[0] == 1'b1, "no clock request after START fell");
    @(posedge ct); #1 check(!done[0], "DONE not lowered after START fell");
    @(posedge ct); #1;
    repeat (3) @(negedge ct);
    check(bt[0] == 1'b0 && !done[0], "not back in IDLE");
    check(loads[0] == 1, "reloaded without request");
    // second operation starts cleanly
    start = 1'b1; edges = 0;
    while (!done[0] && edges < 200) begin @(posedge ct); edges++; #1; end
    check(edges == 90, "second operation length");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
