// tb_tea_datapath: drives two data-paths (encrypt with the default key,
// decrypt with a second, arbitrary key) with a controller on a free-running clock and
// compares Y/Z after every round, and the final result, with the reference
// model. Also checks SUM and N after each round and that CMP ends at 0.
module tb_tea_datapath;
  timeunit 1ns;
  timeprecision 1ps;
  import tea_pkg::*;
  import tb_tea_ref_pkg::*;

  localparam logic [31:0] DK0 = 32'h0123_4567, DK1 = 32'h89AB_CDEF,
                          DK2 = 32'hFEDC_BA98, DK3 = 32'h7654_3210;
  logic clk = 1'b0, rst_n, start;
  word_t v0 [2], v1 [2], y1 [2], z1 [2];
  logic  cmp [2], done [2], bt [2];
  ctrl_t ctrl [2];
  word_t regs_e [NUM_REG], regs_d [NUM_REG];
  int checks = 0, failures = 0;

  tea_xbm_ctrl #(.MODE(TEA_ENCRYPT)) c_e (.ct(clk), .rst_n(rst_n), .start(start), .cmp(cmp[0]),
                                          .bt(bt[0]), .done(done[0]), .ctrl(ctrl[0]));
  tea_datapath #(.MODE(TEA_ENCRYPT)) dut_e (.clk(clk), .rst_n(rst_n), .ctrl(ctrl[0]),
      .v0(v0[0]), .v1(v1[0]), .y1(y1[0]), .z1(z1[0]), .cmp(cmp[0]), .regs(regs_e));
  tea_xbm_ctrl #(.MODE(TEA_DECRYPT)) c_d (.ct(clk), .rst_n(rst_n), .start(start), .cmp(cmp[1]),
                                          .bt(bt[1]), .done(done[1]), .ctrl(ctrl[1]));
  tea_datapath #(.MODE(TEA_DECRYPT), .KEY0(DK0), .KEY1(DK1), .KEY2(DK2), .KEY3(DK3)) dut_d (
      .clk(clk), .rst_n(rst_n), .ctrl(ctrl[1]),
      .v0(v0[1]), .v1(v1[1]), .y1(y1[1]), .z1(z1[1]), .cmp(cmp[1]), .regs(regs_d));

  always #5 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  u32 ke [4] = '{32'd10, 32'd15, 32'd20, 32'd25};
  u32 kd [4] = '{DK0, DK1, DK2, DK3};

  task automatic run(input u32 a0, input u32 a1, input u32 b0, input u32 b1);
    u32 ey, ez, dy, dz;
    v0 = '{a0, b0}; v1 = '{a1, b1};
    @(negedge clk) start = 1'b1;
    @(posedge clk); @(posedge clk);   // IDLE -> LOAD -> S1 (data loaded)
    for (int r = 1; r <= 8; r++) begin
      repeat (11) @(posedge clk);     // S1..S10, TEST
      #1;
      encrypt(a0, a1, ke, DELTA_DEFAULT, r, ey, ez);
      decrypt(b0, b1, kd, DELTA_DEFAULT, 8, r, dy, dz);
      check(y1[0] == ey && z1[0] == ez,
            $sformatf("enc round %0d: got %h %h exp %h %h", r, y1[0], z1[0], ey, ez));
      check(y1[1] == dy && z1[1] == dz,
            $sformatf("dec round %0d: got %h %h exp %h %h", r, y1[1], z1[1], dy, dz));
      check(regs_e[R_SUM] == DELTA_DEFAULT * (r + 1) && regs_e[R_N] == 32'(8 - r),
            $sformatf("enc SUM/N after round %0d: %h %0d", r, regs_e[R_SUM], regs_e[R_N]));
      check(regs_d[R_SUM] == DELTA_DEFAULT * (8 - r) && regs_d[R_N] == 32'(8 - r),
            $sformatf("dec SUM/N after round %0d: %h %0d", r, regs_d[R_SUM], regs_d[R_N]));
      check(cmp[0] == (r < 8), $sformatf("CMP after round %0d", r));
    end
    check(done[0] && done[1], "not done after 8 rounds");
    @(negedge clk) start = 1'b0;
    repeat (3) @(posedge clk);
  endtask

  initial begin
    rst_n = 1'b0;
    start = 1'b0; v0 = '{0, 0}; v1 = '{0, 0};
    #1 rst_n = 1'b1;
    #1 rst_n = 1'b0;   // a falling edge, so the asynchronous reset acts
    #22 rst_n = 1'b1;
    // the vector of the published simulation, then random ones
    run(32'h007B2D45, 32'h00012C8B, 32'hDA8F3440, 32'h82EEF7C0);
    check(y1[0] == 32'hDA8F3440 && z1[0] == 32'h82EEF7C0, "published ciphertext");
    for (int i = 0; i < 20; i++) run($urandom, $urandom, $urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
