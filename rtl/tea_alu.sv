// tea_alu: the 32-bit ALU used five times in the TEA data-path.
//
// Purely combinational. It adds, subtracts, exclusive-ORs, shifts left or right
// by b[4:0] (logical shifts, zeros shifted in), or compares a > b unsigned and
// returns 1 or 0. These are the operations the round's data-flow graph uses:
// additions, XORs and the shifts <<4 and >>5 of TEA, plus N-1 and N>0 for the
// round counter. Subtraction is also what the decryptor needs. The set of
// operations and their encoding (tea_pkg::alu_op_e) are this design's choice;
// the result settles within one step of the local clock.
module tea_alu
  import tea_pkg::*;
(
  input  word_t   a,
  input  word_t   b,
  input  alu_op_e op,
  output word_t   y
);
  timeunit 1ns;
  timeprecision 1ps;

  always_comb begin
    unique case (op)
      OP_ADD:  y = a + b;
      OP_SUB:  y = a - b;
      OP_XOR:  y = a ^ b;
      OP_SHL:  y = a << b[4:0];
      OP_SHR:  y = a >> b[4:0];
      OP_GT:   y = {{(W-1){1'b0}}, (a > b)};
      default: y = '0;
    endcase
  end

endmodule
