// Top level: an FM0 encoder and a Manchester encoder side by side.
//
// The two bi-phase encoders are independent designs. They share only the
// system clock (two cycles per bit) and the synchronous active-high reset;
// each has its own data input, bit clock and outputs, brought out here
// unchanged. See fm0_encoder and manchester_encoder for the coding rules
// and the timing of each.
//
//   fm0_x / fm0_take      FM0 data bit, sampled at the end of the cycle in
//                         which fm0_take is high
//   fm0_out               FM0 line output, one bit period after sampling
//   fm0_state             FM0 FSM state {first half, second half}
//   man_x                 Manchester data bit, held for both half-bits
//   man_out               Manchester line output (man_x XOR bit clock)
//   man_code              Manchester code word {first half, second half}
//   man_state             Manchester FSM state
//
// Combining the two encoders into one shared datapath is not part of this
// design; they are kept as two separate circuits.
module line_code_top
  import line_code_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  // FM0 encoder
  input  logic       fm0_x,
  output logic       fm0_bit_clk,
  output logic       fm0_take,
  output logic       fm0_out,
  output fm0_state_t fm0_state,
  output fm0_state_t fm0_next_state,
  // Manchester encoder
  input  logic       man_x,
  output logic       man_bit_clk,
  output logic       man_out,
  output logic [1:0] man_code,
  output man_state_t man_state,
  output man_state_t man_next_state
);

  fm0_encoder u_fm0 (
    .clk        (clk),
    .rst        (rst),
    .x          (fm0_x),
    .bit_clk    (fm0_bit_clk),
    .x_take     (fm0_take),
    .fm0_out    (fm0_out),
    .state      (fm0_state),
    .next_state (fm0_next_state)
  );

  manchester_encoder u_man (
    .clk        (clk),
    .rst        (rst),
    .x          (man_x),
    .bit_clk    (man_bit_clk),
    .z          (man_out),
    .code       (man_code),
    .state      (man_state),
    .next_state (man_next_state)
  );

endmodule
