// tea_async_top: the asynchronous TEA cryptosystem, an encryptor and a
// decryptor side by side.
//
// Each half is a complete tea_async_core (XBM controller + delay element +
// data-path) with its own four-phase START/DONE channel, its own local clock
// and its own inputs and outputs; they share only the reset and the key. With
// the default key, DELTA and eight rounds, encrypting V0 = 007B2D45,
// V1 = 00012C8B gives Y1 = DA8F3440, Z1 = 82EEF7C0, and the decryptor turns
// that back into the plaintext.
//
// Latency from start rising to done rising is 179 delays of the delay element:
// about 1502 ns for the encryptor and 1546 ns for the decryptor with the
// default delays, the figures reported for the original asynchronous designs.
// The two delay values are parameters and must be re-derived for any real
// implementation from the data-path's slowest step.
module tea_async_top
  import tea_pkg::*;
#(
  parameter logic [31:0] KEY0         = 32'd10,
  parameter logic [31:0] KEY1         = 32'd15,
  parameter logic [31:0] KEY2         = 32'd20,
  parameter logic [31:0] KEY3         = 32'd25,
  parameter logic [31:0] DELTA        = DELTA_DEFAULT,
  parameter int unsigned ROUNDS       = 8,
  parameter int unsigned ENC_DELAY_PS = 8391,
  parameter int unsigned DEC_DELAY_PS = 8637
) (
  input  logic  rst_n,
  // encryptor (TEA_E)
  input  logic  enc_start,
  input  word_t enc_v0,
  input  word_t enc_v1,
  output logic  enc_done,
  output word_t enc_y1,
  output word_t enc_z1,
  // decryptor (TEA_D)
  input  logic  dec_start,
  input  word_t dec_v0,
  input  word_t dec_v1,
  output logic  dec_done,
  output word_t dec_y1,
  output word_t dec_z1
);
  timeunit 1ns;
  timeprecision 1ps;

  tea_async_core #(
    .MODE(TEA_ENCRYPT), .KEY0(KEY0), .KEY1(KEY1), .KEY2(KEY2), .KEY3(KEY3),
    .DELTA(DELTA), .ROUNDS(ROUNDS), .DELAY_PS(ENC_DELAY_PS)
  ) u_enc (
    .rst_n (rst_n),
    .start (enc_start),
    .v0    (enc_v0),
    .v1    (enc_v1),
    .done  (enc_done),
    .y1    (enc_y1),
    .z1    (enc_z1)
  );

  tea_async_core #(
    .MODE(TEA_DECRYPT), .KEY0(KEY0), .KEY1(KEY1), .KEY2(KEY2), .KEY3(KEY3),
    .DELTA(DELTA), .ROUNDS(ROUNDS), .DELAY_PS(DEC_DELAY_PS)
  ) u_dec (
    .rst_n (rst_n),
    .start (dec_start),
    .v0    (dec_v0),
    .v1    (dec_v1),
    .done  (dec_done),
    .y1    (dec_y1),
    .z1    (dec_z1)
  );

endmodule
