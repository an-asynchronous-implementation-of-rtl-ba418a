// tb_tea_async_top: end-to-end test of the whole cryptosystem at its default
// parameters. Plaintexts are encrypted by the encryptor; each ciphertext is
// handed to the decryptor, which runs while the encryptor already works on the
// next block, and must return the plaintext. Also checks the published
// vector, both latencies, and counts the mechanisms of the design: round
// loop-back and loop exit in the controller, the local clock stopping while
// waiting for START to rise and while holding DONE, and the return to zero.
module tb_tea_async_top;
  timeunit 1ns;
  timeprecision 1ps;
  import tea_pkg::*;
  import tb_tea_ref_pkg::*;

  localparam int N_BLOCKS = 12;
  logic  rst_n, enc_start, dec_start, enc_done, dec_done;
  word_t enc_v0, enc_v1, enc_y1, enc_z1, dec_v0, dec_v1, dec_y1, dec_z1;
  int checks = 0, failures = 0;

  tea_async_top dut (.*);

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

  // Mechanism counters, from the controllers' state (4'd12 = TEST).
  int loop_back = 0, loop_exit = 0, idle_stops = 0, done_stops = 0, rtz = 0;
  always @(posedge dut.u_enc.ct) begin
    if (dut.u_enc.u_ctrl.state == 4'd12) begin
      if (dut.u_enc.cmp) loop_back++; else loop_exit++;
    end
  end
  always @(posedge dut.u_dec.ct) begin
    if (dut.u_dec.u_ctrl.state == 4'd12) begin
      if (dut.u_dec.cmp) loop_back++; else loop_exit++;
    end
  end
  always @(negedge dec_done) if (rst_n) rtz++;
  always @(negedge enc_done) if (rst_n) rtz++;

  u32 k [4] = '{32'd10, 32'd15, 32'd20, 32'd25};
  u32 pt0 [N_BLOCKS], pt1 [N_BLOCKS];
  realtime enc_lat, dec_lat;

  // Check that a core's clock is stopped for a while; returns 1 if it is.
  task automatic quiet(input bit which_dec, output bit ok);
    int e0;
    logic c0;
    #40;   // let the last edge of the previous transition pass (two delays)
    c0 = which_dec ? dut.u_dec.ct : dut.u_enc.ct;
    ok = 1'b1;
    repeat (50) begin
      #10;
      if ((which_dec ? dut.u_dec.ct : dut.u_enc.ct) != c0 ||
          (which_dec ? dut.u_dec.bt : dut.u_enc.bt)) ok = 1'b0;
    end
  endtask

  initial begin
    realtime t0, t1;
    bit ok;
    u32 ey, ez;
    rst_n = 1'b0;
    enc_start = 1'b0; dec_start = 1'b0;
    #1 rst_n = 1'b1;
    #1 rst_n = 1'b0;   // a falling edge, so the asynchronous reset acts
    enc_v0 = 0; enc_v1 = 0; dec_v0 = 0; dec_v1 = 0;
    #30 rst_n = 1'b1;
    pt0[0] = 32'h007B2D45; pt1[0] = 32'h00012C8B;
    for (int i = 1; i < N_BLOCKS; i++) begin pt0[i] = $urandom; pt1[i] = $urandom; end

    fork
      // encryptor: one block after the other
      begin
        for (int i = 0; i < N_BLOCKS; i++) begin
          quiet(1'b0, ok); check(ok, "encryptor clock running while idle"); if (ok) idle_stops++;
          enc_v0 = pt0[i]; enc_v1 = pt1[i];
          #2 enc_start = 1'b1; t0 = $realtime;
          wait (enc_done);
          if (i == 0) enc_lat = $realtime - t0;
          encrypt(pt0[i], pt1[i], k, DELTA_DEFAULT, 8, ey, ez);
          check(enc_y1 == ey && enc_z1 == ez, $sformatf("block %0d ciphertext %h %h", i, enc_y1, enc_z1));
          if (i == 0) check(enc_y1 == 32'hDA8F3440 && enc_z1 == 32'h82EEF7C0, "published ciphertext");
          // hand over to the decryptor (it waits for its previous block)
          wait (!dec_start && !dec_done);
          dec_v0 = enc_y1; dec_v1 = enc_z1;
          #2 dec_start = 1'b1;
          // hold START: DONE must stay up and the clock stopped
          quiet(1'b0, ok); check(ok && enc_done, "encryptor clock running while holding DONE");
          if (ok) done_stops++;
          enc_start = 1'b0;
          wait (!enc_done);
        end
      end
      // decryptor: checks every block it receives
      begin
        for (int i = 0; i < N_BLOCKS; i++) begin
          wait (dec_start);
          t1 = $realtime;
          wait (dec_done);
          if (i == 0) dec_lat = $realtime - t1;
          check(dec_y1 == pt0[i] && dec_z1 == pt1[i],
                $sformatf("block %0d round trip: %h %h exp %h %h", i, dec_y1, dec_z1, pt0[i], pt1[i]));
          #15 dec_start = 1'b0;
          wait (!dec_done);
        end
      end
    join
    #50;

    check(enc_lat > 1501.0 && enc_lat < 1503.0, $sformatf("encrypt latency %0.3f ns", enc_lat));
    check(dec_lat > 1545.0 && dec_lat < 1547.0, $sformatf("decrypt latency %0.3f ns", dec_lat));
    $display("latency: encrypt %0.3f ns, decrypt %0.3f ns", enc_lat, dec_lat);
    $display("mechanisms: loop_back=%0d loop_exit=%0d idle_stops=%0d done_stops=%0d return_to_zero=%0d",
             loop_back, loop_exit, idle_stops, done_stops, rtz);
    check(loop_back == 2 * N_BLOCKS * 7, "round loop-back count");
    check(loop_exit == 2 * N_BLOCKS, "loop exit count");
    check(idle_stops > 0, "local clock never seen stopped while idle");
    check(done_stops > 0, "local clock never seen stopped while holding DONE");
    check(rtz == 2 * N_BLOCKS, "return-to-zero count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
