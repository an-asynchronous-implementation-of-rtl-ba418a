// tea_pkg: types and constants shared by the TEA data-path and its controller.
//
// The data-path has five ALUs, each fed by a left and a right input multiplexer,
// and sixteen 32-bit registers R1..R16. A control word (ctrl_t) selects, for
// every ALU, one input of each multiplexer and an operation, and gives one load
// enable per register. The multiplexer contents (MUXL_SRC / MUXR_SRC), the ALU
// that writes each register (REG_ALU) and the ten-step schedule of one TEA round
// (step_ctrl) all live here so that the data-path and controller agree on them.
//
// What follows the document: five ALUs, sixteen registers in the same ALU
// groups, the constants each ALU can take on its right input, the register roles
// (R13 = SUM, R14 = N, R15 = Y, R16 = Z, R12 = CMP) and a round of ten control
// steps that executes every node of the round's data-flow graph (43 operations,
// duplicated sub-expressions included). The binding of operations to ALUs and
// registers inside those limits is this design's own.
//
// Decryption reuses the same schedule with the roles of the two data words
// swapped: the word read by the first half of the round (called A, register
// R16) is Z when encrypting and Y when decrypting; the other word (B, R15) is Y
// or Z. Key roles KA0/KA1 feed the first half and KB0/KB1 the second half.
package tea_pkg;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned W       = 32;  // data width
  localparam int unsigned NUM_ALU = 5;
  localparam int unsigned NUM_REG = 16;
  localparam int unsigned MUX_IN  = 8;   // inputs per multiplexer (3-bit select)
  localparam int unsigned STEPS   = 10;  // control steps per round

  localparam logic [W-1:0] DELTA_DEFAULT = 32'h9E37_79B9;  // (sqrt(5)-1) * 2^31

  typedef logic [W-1:0] word_t;

  typedef enum logic {TEA_ENCRYPT = 1'b0, TEA_DECRYPT = 1'b1} tea_mode_e;

  typedef enum logic [2:0] {
    OP_ADD = 3'd0,
    OP_SUB = 3'd1,
    OP_XOR = 3'd2,
    OP_SHL = 3'd3,
    OP_SHR = 3'd4,
    OP_GT  = 3'd5    // unsigned a > b, result in bit 0
  } alu_op_e;

  // Sources a multiplexer input can be wired to.
  typedef enum logic [4:0] {
    SRC_R1, SRC_R2, SRC_R3, SRC_R4, SRC_R5, SRC_R6, SRC_R7, SRC_R8,
    SRC_R9, SRC_R10, SRC_R11, SRC_R12, SRC_R13, SRC_R14, SRC_R15, SRC_R16,
    SRC_C4,     // shift amount 4
    SRC_C5,     // shift amount 5
    SRC_KA0,    // key added after <<4 in the first half of the round
    SRC_KA1,    // key added after >>5 in the first half
    SRC_KB0,    // key added after <<4 in the second half
    SRC_KB1,    // key added after >>5 in the second half
    SRC_DELTA,
    SRC_ONE,
    SRC_ZERO
  } src_e;

  // Register indices (0-based) with a fixed role.
  localparam int unsigned R_CMP = 11;  // R12
  localparam int unsigned R_SUM = 12;  // R13
  localparam int unsigned R_N   = 13;  // R14
  localparam int unsigned R_B   = 14;  // R15: Y when encrypting, Z when decrypting
  localparam int unsigned R_A   = 15;  // R16: Z when encrypting, Y when decrypting

  typedef struct packed {
    logic [2:0] lsel;
    logic [2:0] rsel;
    alu_op_e    op;
  } alu_ctrl_t;

  typedef struct packed {
    alu_ctrl_t [NUM_ALU-1:0] alu;
    logic [NUM_REG-1:0]      reg_en;
    logic                    load_init;  // MUX_Reg13..16 select their initial value
  } ctrl_t;

  localparam ctrl_t CTRL_IDLE = '0;

  localparam src_e MUXL_SRC [NUM_ALU][MUX_IN] = '{
    '{SRC_R1, SRC_R4, SRC_R10, SRC_R11, SRC_R16, SRC_ZERO, SRC_ZERO, SRC_ZERO},
    '{SRC_R2, SRC_R3, SRC_R7, SRC_R15, SRC_R16, SRC_ZERO, SRC_ZERO, SRC_ZERO},
    '{SRC_R3, SRC_R4, SRC_R16, SRC_ZERO, SRC_ZERO, SRC_ZERO, SRC_ZERO, SRC_ZERO},
    '{SRC_R1, SRC_R7, SRC_R13, SRC_R15, SRC_R16, SRC_ZERO, SRC_ZERO, SRC_ZERO},
    '{SRC_R2, SRC_R6, SRC_R8, SRC_R11, SRC_R14, SRC_R16, SRC_ZERO, SRC_ZERO}
  };
  localparam src_e MUXR_SRC [NUM_ALU][MUX_IN] = '{
    '{SRC_R2, SRC_R9, SRC_C4, SRC_C5, SRC_KA0, SRC_KB1, SRC_ZERO, SRC_ZERO},
    '{SRC_R4, SRC_R6, SRC_R9, SRC_R13, SRC_KA0, SRC_ZERO, SRC_ZERO, SRC_ZERO},
    '{SRC_R5, SRC_R13, SRC_C4, SRC_KA1, SRC_KB0, SRC_ZERO, SRC_ZERO, SRC_ZERO},
    '{SRC_R5, SRC_R8, SRC_R11, SRC_C5, SRC_DELTA, SRC_KA0, SRC_ZERO, SRC_ZERO},
    '{SRC_R1, SRC_C4, SRC_C5, SRC_KA1, SRC_ONE, SRC_ZERO, SRC_ZERO, SRC_ZERO}
  };

  // ALU (0-based) whose result each register R1..R16 can load.
  localparam int unsigned REG_ALU [NUM_REG] = '{0, 4, 3, 2, 1, 4, 3, 2, 1, 1, 0, 4, 3, 4, 1, 0};

  // Nodes of one round (A, B, SUM and N are the registers named above; "+/-"
  // adds when encrypting and subtracts when decrypting):
  //   9,18,28,36: A<<4        8,17,27,35: (A<<4)+KA0     10,19,29,37: A+SUM
  //   12,21,31,39: A>>5       11,20,30,38: (A>>5)+KA1
  //   7,16,26,34: first XOR   6,15,25,33: second XOR  -> FA = F(A, SUM, KA0, KA1)
  //   5,14,24: copies of B +/- FA used inside the round; 32: B <= B +/- FA
  //   4: B'<<4   3: (B'<<4)+KB0   13: B'+SUM   23: B'>>5   22: (B'>>5)+KB1
  //   2, 1: the two XORs -> FB;   0: A <= A +/- FB
  //   40: SUM <= SUM +/- DELTA    41: N <= N-1    42: CMP <= (N > 0)
  //
  // Control word of step s (1..STEPS) of a round. 'upd' is the operation that
  // adds (encrypt) or subtracts (decrypt) a round function to a data word;
  // 'sumupd' steps SUM by DELTA in the same direction.
  function automatic ctrl_t step_ctrl(int unsigned s, tea_mode_e mode);
    ctrl_t   c;
    alu_op_e upd;
    alu_op_e sumupd;
    upd    = (mode == TEA_ENCRYPT) ? OP_ADD : OP_SUB;
    sumupd = upd;
    c = CTRL_IDLE;
    case (s)
      1: begin
        c.alu[0] = '{lsel: 3'd4, rsel: 3'd2, op: OP_SHL}; c.reg_en[0] = 1'b1; // node 9
        c.alu[1] = '{lsel: 3'd4, rsel: 3'd3, op: OP_ADD}; c.reg_en[4] = 1'b1; // node 10
        c.alu[2] = '{lsel: 3'd2, rsel: 3'd2, op: OP_SHL}; c.reg_en[3] = 1'b1; // node 28
        c.alu[3] = '{lsel: 3'd4, rsel: 3'd3, op: OP_SHR}; c.reg_en[2] = 1'b1; // node 12
        c.alu[4] = '{lsel: 3'd5, rsel: 3'd1, op: OP_SHL}; c.reg_en[1] = 1'b1; // node 18
      end
      2: begin
        c.alu[0] = '{lsel: 3'd4, rsel: 3'd3, op: OP_SHR}; c.reg_en[10] = 1'b1; // node 31
        c.alu[1] = '{lsel: 3'd4, rsel: 3'd3, op: OP_ADD}; c.reg_en[8] = 1'b1; // node 19
        c.alu[2] = '{lsel: 3'd2, rsel: 3'd1, op: OP_ADD}; c.reg_en[7] = 1'b1; // node 29
        c.alu[3] = '{lsel: 3'd0, rsel: 3'd5, op: OP_ADD}; c.reg_en[6] = 1'b1; // node 8
        c.alu[4] = '{lsel: 3'd5, rsel: 3'd2, op: OP_SHR}; c.reg_en[5] = 1'b1; // node 21
      end
      3: begin
        c.alu[0] = '{lsel: 3'd1, rsel: 3'd4, op: OP_ADD}; c.reg_en[0] = 1'b1; // node 27
        c.alu[1] = '{lsel: 3'd0, rsel: 3'd4, op: OP_ADD}; c.reg_en[9] = 1'b1; // node 17
        c.alu[2] = '{lsel: 3'd0, rsel: 3'd3, op: OP_ADD}; c.reg_en[3] = 1'b1; // node 11
        c.alu[3] = '{lsel: 3'd1, rsel: 3'd0, op: OP_XOR}; c.reg_en[2] = 1'b1; // node 7
        c.alu[4] = '{lsel: 3'd1, rsel: 3'd3, op: OP_ADD}; c.reg_en[1] = 1'b1; // node 20
      end
      4: begin
        c.alu[0] = '{lsel: 3'd2, rsel: 3'd1, op: OP_XOR}; c.reg_en[0] = 1'b1; // node 16
        c.alu[1] = '{lsel: 3'd1, rsel: 3'd0, op: OP_XOR}; c.reg_en[4] = 1'b1; // node 6
        c.alu[2] = '{lsel: 3'd2, rsel: 3'd2, op: OP_SHL}; c.reg_en[3] = 1'b1; // node 36
        c.alu[3] = '{lsel: 3'd0, rsel: 3'd1, op: OP_XOR}; c.reg_en[6] = 1'b1; // node 26
        c.alu[4] = '{lsel: 3'd3, rsel: 3'd3, op: OP_ADD}; c.reg_en[5] = 1'b1; // node 30
      end
      5: begin
        c.alu[0] = '{lsel: 3'd0, rsel: 3'd0, op: OP_XOR}; c.reg_en[10] = 1'b1; // node 15
        c.alu[1] = '{lsel: 3'd2, rsel: 3'd1, op: OP_XOR}; c.reg_en[8] = 1'b1; // node 25
        c.alu[2] = '{lsel: 3'd2, rsel: 3'd1, op: OP_ADD}; c.reg_en[7] = 1'b1; // node 37
        c.alu[3] = '{lsel: 3'd3, rsel: 3'd0, op: upd}; c.reg_en[2] = 1'b1; // node 5
        c.alu[4] = '{lsel: 3'd5, rsel: 3'd2, op: OP_SHR}; c.reg_en[1] = 1'b1; // node 39
      end
      6: begin
        c.alu[0] = '{lsel: 3'd1, rsel: 3'd4, op: OP_ADD}; c.reg_en[0] = 1'b1; // node 35
        c.alu[1] = '{lsel: 3'd3, rsel: 3'd2, op: upd}; c.reg_en[9] = 1'b1; // node 24
        c.alu[2] = '{lsel: 3'd0, rsel: 3'd2, op: OP_SHL}; c.reg_en[3] = 1'b1; // node 4
        c.alu[3] = '{lsel: 3'd3, rsel: 3'd2, op: upd}; c.reg_en[6] = 1'b1; // node 14
        c.alu[4] = '{lsel: 3'd0, rsel: 3'd3, op: OP_ADD}; c.reg_en[5] = 1'b1; // node 38
      end
      7: begin
        c.alu[0] = '{lsel: 3'd2, rsel: 3'd3, op: OP_SHR}; c.reg_en[10] = 1'b1; // node 23
        c.alu[1] = '{lsel: 3'd2, rsel: 3'd3, op: OP_ADD}; c.reg_en[4] = 1'b1; // node 13
        c.alu[2] = '{lsel: 3'd1, rsel: 3'd4, op: OP_ADD}; c.reg_en[3] = 1'b1; // node 3
        c.alu[3] = '{lsel: 3'd0, rsel: 3'd1, op: OP_XOR}; c.reg_en[2] = 1'b1; // node 34
        c.alu[4] = '{lsel: 3'd4, rsel: 3'd4, op: OP_SUB}; c.reg_en[13] = 1'b1; // node 41
      end
      8: begin
        c.alu[0] = '{lsel: 3'd3, rsel: 3'd5, op: OP_ADD}; c.reg_en[0] = 1'b1; // node 22
        c.alu[1] = '{lsel: 3'd1, rsel: 3'd1, op: OP_XOR}; c.reg_en[8] = 1'b1; // node 33
        c.alu[2] = '{lsel: 3'd1, rsel: 3'd0, op: OP_XOR}; c.reg_en[7] = 1'b1; // node 2
        c.alu[3] = '{lsel: 3'd2, rsel: 3'd4, op: sumupd}; c.reg_en[12] = 1'b1; // node 40
        c.alu[4] = '{lsel: 3'd4, rsel: 3'd5, op: OP_GT}; c.reg_en[11] = 1'b1; // node 42
      end
      9: begin
        c.alu[1] = '{lsel: 3'd3, rsel: 3'd2, op: upd}; c.reg_en[14] = 1'b1; // node 32
        c.alu[4] = '{lsel: 3'd2, rsel: 3'd0, op: OP_XOR}; c.reg_en[1] = 1'b1; // node 1
      end
      10: begin
        c.alu[0] = '{lsel: 3'd4, rsel: 3'd0, op: upd}; c.reg_en[15] = 1'b1; // node 0
      end
      default: c = CTRL_IDLE;
    endcase
    return c;
  endfunction

endpackage
