// tb_tea_async_core: self-timed operation of one encryptor and one decryptor
// core with their own delay elements. Checks results against the reference
// model, the start-to-done latency (179 delays: 1502 ns and 1546 ns with the
// default delays), that the local clock is silent between operations and the
// four-phase return to zero.
module tb_tea_async_core;
  timeunit 1ns;
  timeprecision 1ps;
  import tea_pkg::*;
  import tb_tea_ref_pkg::*;

  localparam int unsigned DE = 8391, DD = 8637;
  logic  rst_n, start_e, start_d, done_e, done_d;
  word_t v0_e, v1_e, v0_d, v1_d, y_e, z_e, y_d, z_d;
  int checks = 0, failures = 0;
  int ct_edges_e = 0;

  tea_async_core #(.MODE(TEA_ENCRYPT), .DELAY_PS(DE)) dut_e (
    .rst_n(rst_n), .start(start_e), .v0(v0_e), .v1(v1_e), .done(done_e), .y1(y_e), .z1(z_e));
  tea_async_core #(.MODE(TEA_DECRYPT), .DELAY_PS(DD)) dut_d (
    .rst_n(rst_n), .start(start_d), .v0(v0_d), .v1(v1_d), .done(done_d), .y1(y_d), .z1(z_d));

  always @(posedge dut_e.ct) ct_edges_e++;

  initial begin
    #200000;
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

  u32 k [4] = '{32'd10, 32'd15, 32'd20, 32'd25};

  task automatic op_enc(input u32 a, input u32 b, output realtime lat);
    realtime t0;
    v0_e = a; v1_e = b;
    #3 start_e = 1'b1; t0 = $realtime;
    wait (done_e);
    lat = $realtime - t0;
    #20 start_e = 1'b0;
    wait (!done_e);
  endtask

  task automatic op_dec(input u32 a, input u32 b, output realtime lat);
    realtime t0;
    v0_d = a; v1_d = b;
    #3 start_d = 1'b1; t0 = $realtime;
    wait (done_d);
    lat = $realtime - t0;
    #20 start_d = 1'b0;
    wait (!done_d);
  endtask

  initial begin
    realtime lat;
    u32 ey, ez, dy, dz, a, b;
    int e0;
    rst_n = 1'b0;
    start_e = 1'b0; start_d = 1'b0;
    #1 rst_n = 1'b1;
    #1 rst_n = 1'b0;   // a falling edge, so the asynchronous reset acts
    v0_e = 0; v1_e = 0; v0_d = 0; v1_d = 0;
    #30 rst_n = 1'b1;
    #20 ct_edges_e = 0;   // edges left over from the power-up state
    #100;
    check(ct_edges_e == 0, "local clock ran before any request");
    op_enc(32'h007B2D45, 32'h00012C8B, lat);
    check(y_e == 32'hDA8F3440 && z_e == 32'h82EEF7C0,
          $sformatf("published vector: got %h %h", y_e, z_e));
    check(lat > 1501.0 && lat < 1503.0, $sformatf("encrypt latency %0.3f ns", lat));
    op_dec(32'hDA8F3440, 32'h82EEF7C0, lat);
    check(y_d == 32'h007B2D45 && z_d == 32'h00012C8B,
          $sformatf("published vector decrypted: got %h %h", y_d, z_d));
    check(lat > 1545.0 && lat < 1547.0, $sformatf("decrypt latency %0.3f ns", lat));
    for (int i = 0; i < 10; i++) begin
      a = $urandom; b = $urandom;
      op_enc(a, b, lat);
      encrypt(a, b, k, DELTA_DEFAULT, 8, ey, ez);
      check(y_e == ey && z_e == ez, $sformatf("enc %h %h: got %h %h exp %h %h", a, b, y_e, z_e, ey, ez));
      op_dec(a, b, lat);
      decrypt(a, b, k, DELTA_DEFAULT, 8, 8, dy, dz);
      check(y_d == dy && z_d == dz, $sformatf("dec %h %h: got %h %h", a, b, y_d, z_d));
      // clock silent between operations
      e0 = ct_edges_e;
      #500;
      check(ct_edges_e == e0, "local clock ran while idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
