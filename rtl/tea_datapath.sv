// tea_datapath: single-rail ("synchronous") data-path of the TEA cryptosystem.
//
// Five ALUs, each fed by a left multiplexer (MUXL) and a right multiplexer
// (MUXR), write sixteen 32-bit registers R1..R16. Every register belongs to one
// ALU (tea_pkg::REG_ALU) and loads that ALU's result when its enable in the
// control word is set, on the rising edge of clk. In a round of ten control
// steps the controller plays the schedule of tea_pkg::step_ctrl through this
// hardware; one round of TEA is then complete in R15/R16, SUM has moved by
// DELTA and N has been decremented.
//
// Registers with a fixed role: R12 = CMP (N > 0), R13 = SUM, R14 = N, R15 = B,
// R16 = A (see tea_pkg). With ctrl.load_init set, the init multiplexers load
// R13 with DELTA (encrypt) or DELTA*ROUNDS (decrypt), R14 with ROUNDS, and
// R15/R16 with the input words: encrypting, R15 = Y = V0 and R16 = Z = V1;
// decrypting, the roles swap. y1/z1 are taken from R15/R16 accordingly.
//
// Interface: clk is the local clock Ct, rst_n clears every register
// asynchronously. ctrl must be stable for the whole step before the edge that
// ends it; results are visible one edge later. regs brings the register file
// out for observation.
//
// Following the document: ALU count, register count and ALU grouping, register
// roles, the right-multiplexer constants and the initial values 8 and Delta.
// This design's own: which register feeds which multiplexer input, and the
// decryption mode.
module tea_datapath
  import tea_pkg::*;
#(
  parameter tea_mode_e   MODE   = TEA_ENCRYPT,
  parameter logic [31:0] KEY0   = 32'd10,
  parameter logic [31:0] KEY1   = 32'd15,
  parameter logic [31:0] KEY2   = 32'd20,
  parameter logic [31:0] KEY3   = 32'd25,
  parameter logic [31:0] DELTA  = DELTA_DEFAULT,
  parameter int unsigned ROUNDS = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  ctrl_t ctrl,
  input  word_t v0,
  input  word_t v1,
  output word_t y1,
  output word_t z1,
  output logic  cmp,
  output word_t regs [NUM_REG]
);
  timeunit 1ns;
  timeprecision 1ps;

  // Key roles: the first half of an encryption round mixes Z with K0/K1 and
  // the second half mixes Y with K2/K3; decryption undoes the second half first.
  localparam word_t KA0 = (MODE == TEA_ENCRYPT) ? KEY0 : KEY2;
  localparam word_t KA1 = (MODE == TEA_ENCRYPT) ? KEY1 : KEY3;
  localparam word_t KB0 = (MODE == TEA_ENCRYPT) ? KEY2 : KEY0;
  localparam word_t KB1 = (MODE == TEA_ENCRYPT) ? KEY3 : KEY1;
  localparam word_t SUM_INIT = (MODE == TEA_ENCRYPT) ? DELTA : word_t'(DELTA * ROUNDS);

  word_t r [NUM_REG];
  word_t alu_a [NUM_ALU];
  word_t alu_b [NUM_ALU];
  word_t alu_y [NUM_ALU];

  function automatic word_t source(src_e s, const ref word_t rf [NUM_REG]);
    case (s)
      SRC_C4:    return word_t'(4);
      SRC_C5:    return word_t'(5);
      SRC_KA0:   return KA0;
      SRC_KA1:   return KA1;
      SRC_KB0:   return KB0;
      SRC_KB1:   return KB1;
      SRC_DELTA: return DELTA;
      SRC_ONE:   return word_t'(1);
      SRC_ZERO:  return '0;
      default:   return rf[int'(s)];   // SRC_R1..SRC_R16
    endcase
  endfunction

  for (genvar u = 0; u < NUM_ALU; u++) begin : g_alu
    always_comb begin
      alu_a[u] = source(MUXL_SRC[u][ctrl.alu[u].lsel], r);
      alu_b[u] = source(MUXR_SRC[u][ctrl.alu[u].rsel], r);
    end

    tea_alu u_alu (
      .a  (alu_a[u]),
      .b  (alu_b[u]),
      .op (ctrl.alu[u].op),
      .y  (alu_y[u])
    );
  end

  // Register file. R13..R16 have the init multiplexers MUX_Reg13..MUX_Reg16.
  for (genvar i = 0; i < NUM_REG; i++) begin : g_reg
    word_t init_val;
    always_comb begin
      case (i)
        R_SUM:   init_val = SUM_INIT;
        R_N:     init_val = word_t'(ROUNDS);
        R_B:     init_val = (MODE == TEA_ENCRYPT) ? v0 : v1;
        R_A:     init_val = (MODE == TEA_ENCRYPT) ? v1 : v0;
        default: init_val = '0;
      endcase
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)
        r[i] <= '0;
      else if (ctrl.load_init && i >= R_SUM)
        r[i] <= init_val;
      else if (ctrl.reg_en[i])
        r[i] <= alu_y[REG_ALU[i]];
    end
  end

  assign y1   = (MODE == TEA_ENCRYPT) ? r[R_B] : r[R_A];
  assign z1   = (MODE == TEA_ENCRYPT) ? r[R_A] : r[R_B];
  assign cmp  = r[R_CMP][0];
  assign regs = r;

endmodule
