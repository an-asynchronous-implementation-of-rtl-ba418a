// tea_xbm_ctrl: locally clocked extended-burst-mode (XBM) controller of the
// TEA cryptosystem.
//
// The controller sequences the data-path and makes its own clock. While it has
// work to do it raises bt; bt passes through a matched delay element and comes
// back as ct, whose rising edge moves the state register and the data-path
// registers; ct high drops bt, which returns as ct low a delay later, and so on.
// bt = active & ~ct therefore runs a local clock of period twice the delay, and
// the clock stops whenever the controller waits for an input burst: START
// rising in IDLE, START falling in DONE. No clock runs between operations.
//
// States (15) and transitions (16):
//   IDLE  --START+-->  LOAD  -->  S1 --> S2 --> ... --> S10  -->  TEST
//   TEST --CMP=1--> S1          (another round)
//   TEST --CMP=0--> DONE        (DONE raised)
//   DONE --START- --> CLEAR --> IDLE   (DONE lowered, return to zero)
// LOAD has the data-path load V0, V1, SUM and N; S1..S10 issue the ten
// control steps of one round (tea_pkg::step_ctrl); TEST waits one edge for the
// CMP register written in S8 and branches on it. A round takes 11 edges of ct
// and a whole operation of ROUNDS rounds takes 2 + 11*ROUNDS edges from START
// rising to DONE rising (90 for eight rounds).
//
// START/DONE form a four-phase handshake: START rises with V0/V1 stable, DONE
// rises with the result, START falls, DONE falls. Inputs are START, CMP and the
// asynchronous reset rst_n.
//
// Following the document: an XBM machine with 15 states, 16 transitions and 3
// inputs that drives a data-path through ten single-cycle steps per iteration,
// with a delay element closing the Bt/Ct loop. The exact state graph, the
// TEST state and the Bt/Ct protocol are this design's own; the machine is
// written as a state register clocked by ct, not as hazard-free two-level
// logic. bt is combinational from ct by construction: together with the delay
// element it forms the intended oscillator loop.
module tea_xbm_ctrl
  import tea_pkg::*;
#(
  parameter tea_mode_e MODE = TEA_ENCRYPT
) (
  input  logic  ct,
  input  logic  rst_n,
  input  logic  start,
  input  logic  cmp,
  output logic  bt,
  output logic  done,
  output ctrl_t ctrl
);
  timeunit 1ns;
  timeprecision 1ps;

  typedef enum logic [3:0] {
    IDLE  = 4'd0,
    LOAD  = 4'd1,
    S1    = 4'd2,
    S2    = 4'd3,
    S3    = 4'd4,
    S4    = 4'd5,
    S5    = 4'd6,
    S6    = 4'd7,
    S7    = 4'd8,
    S8    = 4'd9,
    S9    = 4'd10,
    S10   = 4'd11,
    TEST  = 4'd12,
    DONE  = 4'd13,
    CLEAR = 4'd14
  } state_e;

  state_e state, state_n;
  logic   active;

  always_comb begin
    state_n = state;
    unique case (state)
      IDLE:    if (start) state_n = LOAD;
      TEST:    state_n = cmp ? S1 : DONE;
      DONE:    if (!start) state_n = CLEAR;
      CLEAR:   state_n = IDLE;
      default: state_n = state_e'(state + 4'd1);   // LOAD, S1..S10 in sequence
    endcase
  end

  always_ff @(posedge ct or negedge rst_n) begin
    if (!rst_n) state <= IDLE;
    else        state <= state_n;
  end

  // Local clock request: held low while waiting for an input burst.
  always_comb begin
    unique case (state)
      IDLE:    active = start;
      DONE:    active = !start;
      default: active = 1'b1;
    endcase
  end
  assign bt   = active && !ct;
  assign done = (state == DONE);

  // Output burst of each state: the data-path control word.
  always_comb begin
    ctrl = CTRL_IDLE;
    if (state == LOAD) ctrl.load_init = 1'b1;
    else if (state >= S1 && state <= S10) ctrl = step_ctrl(int'(state) - int'(S1) + 1, MODE);
  end

  // Burst-mode rules: DONE is held until START falls, and the controller never
  // leaves IDLE without a request.
  a_done_held: assert property (@(posedge ct) disable iff (!rst_n)
                                (state == DONE && start) |=> state == DONE);
  a_idle_wait: assert property (@(posedge ct) disable iff (!rst_n)
                                (state == IDLE && !start) |=> state == IDLE);

endmodule
