// tb_tea_alu: checks every ALU operation on random and corner operands
// against expressions computed in the testbench.
module tb_tea_alu;
  timeunit 1ns;
  timeprecision 1ps;
  import tea_pkg::*;

  word_t   a, b, y, exp_y;
  alu_op_e op;
  int checks = 0, failures = 0;

  tea_alu dut (.a(a), .b(b), .op(op), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      a  = (i < 6) ? 32'hFFFF_FFFF : $urandom;
      b  = (i % 7 == 0) ? ($urandom % 32) : $urandom;
      if (i < 6) b = (i < 3) ? 32'd1 : 32'hFFFF_FFFF;
      op = alu_op_e'(i % 6);
      case (i % 6)
        0: exp_y = a + b;
        1: exp_y = a + (~b + 1);
        2: exp_y = (a | b) & ~(a & b);
        3: exp_y = a * (33'd1 << b[4:0]);
        4: exp_y = a / (33'd1 << b[4:0]);
        default: exp_y = ({1'b0, a} - {1'b0, b}) >> 32 == 0 && a != b ? 32'd1 : 32'd0;
      endcase
      #1;
      checks++;
      if (y !== exp_y) begin
        failures++;
        if (failures < 10) $display("op %0d a=%h b=%h got %h exp %h", op, a, b, y, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
