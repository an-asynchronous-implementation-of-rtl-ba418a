// delay_element: behavioural model of the matched delay that closes the
// controller's local-clock loop (Bt in, Ct out).
//
// This is a behavioural model, not synthesizable logic: a delay line has no
// logic function of its own. On an FPGA it would be a chain of LUTs or
// buffers sized to exceed the slowest data-path step (multiplexer, ALU,
// register setup). Here every edge of a is reproduced on y exactly DELAY_PS
// picoseconds later (transport delay, so pulses are not swallowed). y starts
// low.
//
// The default of 8391 ps is chosen so that one encryption (179 traversals of
// the delay from START to DONE, see tea_xbm_ctrl) takes 1502 ns, the latency
// reported for the asynchronous encryptor; it is not a number of the original
// design.
module delay_element #(
  parameter int unsigned DELAY_PS = 8391
) (
  input  logic a,
  output logic y
);
  timeunit 1ps;
  timeprecision 1ps;

  logic y_q;

  initial y_q = 1'b0;

  always @(a) y_q <= #(DELAY_PS) a;

  assign y = y_q;

endmodule
