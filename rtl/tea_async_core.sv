// tea_async_core: one asynchronous TEA engine in the decomposition style.
//
// A bundled-data system: the XBM controller (tea_xbm_ctrl) drives a
// conventional single-rail data-path (tea_datapath) through its control word,
// and produces its own clock through a delay element (delay_element): the
// controller's request bt comes back, delayed, as ct, which clocks both the
// controller and the data-path. The data-path returns the status variable CMP
// (rounds left) to the controller. The delay must exceed the slowest step of
// the data-path; it then sets the cycle time of every state transition.
//
// MODE selects an encryptor (TEA_E) or a decryptor (TEA_D). Both use the same
// hardware and schedule; the decryptor subtracts where the encryptor adds,
// starts SUM at DELTA*ROUNDS and counts it down.
//
// Interface: four-phase handshake. Drive v0/v1, raise start; after
// 179*DELAY_PS done rises with the result on y1/z1 (held until the next
// operation loads new inputs); lower start; done falls two delays later. V0/V1
// must stay stable until done rises, which the bundling constraint of a
// bundled-data channel demands. rst_n is an asynchronous, active-low reset;
// hold start low while it is asserted.
//
// Following the document: the controller / delay / data-path structure and its
// signals Bt, Ct, Done and the status feedback. This design's own: the
// handshake discipline, the single delay value for all steps and the
// decryption mode.
module tea_async_core
  import tea_pkg::*;
#(
  parameter tea_mode_e   MODE     = TEA_ENCRYPT,
  parameter logic [31:0] KEY0     = 32'd10,
  parameter logic [31:0] KEY1     = 32'd15,
  parameter logic [31:0] KEY2     = 32'd20,
  parameter logic [31:0] KEY3     = 32'd25,
  parameter logic [31:0] DELTA    = DELTA_DEFAULT,
  parameter int unsigned ROUNDS   = 8,
  parameter int unsigned DELAY_PS = 8391
) (
  input  logic  rst_n,
  input  logic  start,
  input  word_t v0,
  input  word_t v1,
  output logic  done,
  output word_t y1,
  output word_t z1
);
  timeunit 1ns;
  timeprecision 1ps;

  logic  bt;
  logic  ct;
  logic  cmp;
  ctrl_t ctrl;
  word_t regs [NUM_REG];

  tea_xbm_ctrl #(.MODE(MODE)) u_ctrl (
    .ct    (ct),
    .rst_n (rst_n),
    .start (start),
    .cmp   (cmp),
    .bt    (bt),
    .done  (done),
    .ctrl  (ctrl)
  );

  delay_element #(.DELAY_PS(DELAY_PS)) u_delay (
    .a (bt),
    .y (ct)
  );

  tea_datapath #(
    .MODE   (MODE),
    .KEY0   (KEY0),
    .KEY1   (KEY1),
    .KEY2   (KEY2),
    .KEY3   (KEY3),
    .DELTA  (DELTA),
    .ROUNDS (ROUNDS)
  ) u_dp (
    .clk   (ct),
    .rst_n (rst_n),
    .ctrl  (ctrl),
    .v0    (v0),
    .v1    (v1),
    .y1    (y1),
    .z1    (z1),
    .cmp   (cmp),
    .regs  (regs)
  );

  // Four-phase rules of the START/DONE channel.
  always @(posedge start) if (rst_n) a_req_rise: assert (!done)
    else $error("start raised while done is still high");
  always @(negedge start) if (rst_n) a_req_fall: assert (done)
    else $error("start lowered before done");

endmodule
