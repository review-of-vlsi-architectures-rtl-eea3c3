// Shared types for the two bi-phase line encoders (FM0 and Manchester).
//
// Both encoders run on one system clock at twice the bit rate, so every
// bit occupies two clock cycles: the first half-bit, during which the bit
// clock is high, and the second half-bit, during which it is low.
//
// Manchester FSM state codes (S0..S3 = 00..11) and FM0 FSM state codes
// (S1 = 11, S2 = 10, S3 = 01, S4 = 00) are the ones the encoders are
// specified with. An FM0 state code is the pair of half-bit levels it
// transmits: bit 1 is the first half-bit, bit 0 the second half-bit.
package line_code_pkg;

  // Manchester FSM states, binary encoded.
  typedef enum logic [1:0] {
    MAN_S0 = 2'b00,
    MAN_S1 = 2'b01,
    MAN_S2 = 2'b10,
    MAN_S3 = 2'b11
  } man_state_t;

  // FM0 FSM states. The code is {first half-bit, second half-bit}.
  typedef enum logic [1:0] {
    FM0_S1 = 2'b11,
    FM0_S2 = 2'b10,
    FM0_S3 = 2'b01,
    FM0_S4 = 2'b00
  } fm0_state_t;

  // Level of the bit clock during the first half of a bit.
  localparam logic FIRST_HALF = 1'b1;

endpackage
