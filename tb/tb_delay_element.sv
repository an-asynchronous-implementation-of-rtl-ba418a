// tb_delay_element: checks that every edge of the input appears on the output
// exactly DELAY_PS later, also for pulses shorter than the delay.
module tb_delay_element;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned D = 8391;
  logic a, y;
  int checks = 0, failures = 0;
  time t_in [$];

  delay_element #(.DELAY_PS(D)) dut (.a(a), .y(y));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(a) t_in.push_back($time);
  bit armed = 1'b0;
  always @(y) if (armed) begin
    time t0;
    checks++;
    if (t_in.size() == 0) begin
      failures++;
      $display("output edge without input edge at %0t", $time);
    end else begin
      t0 = t_in.pop_front();
      if ($time - t0 != D) begin
        failures++;
        $display("edge delayed by %0t, expected %0d", $time - t0, D);
      end
    end
  end

  initial begin
    a = 1'b0;
    #(3 * D);
    checks++;
    if (y !== 1'b0) failures++;   // starts low
    t_in.delete();
    armed = 1'b1;
    repeat (40) begin
      #($urandom_range(D + 100, 3 * D)) a = ~a;
    end
    #(2 * D);
    checks++;
    if (y !== a || t_in.size() != 0) begin
      failures++;
      $display("output did not settle: y=%b a=%b pending=%0d", y, a, t_in.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
