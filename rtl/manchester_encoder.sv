// Manchester encoder with its four-state tracking FSM.
//
// Manchester code sends every bit as two half-bits with a transition in
// the middle: a 0 is high then low (falling edge), a 1 is low then high
// (rising edge). The line output is simply the data XOR the bit clock,
// where the bit clock is high during the first half of every bit:
//
//   x  bit_clk | z
//   0     0    | 0
//   0     1    | 1
//   1     0    | 1
//   1     1    | 0
//
// Alongside the XOR, a binary-encoded FSM with states S0..S3 steps once per
// half-bit on the data input, with this transition table:
//
//   state | x=0  x=1
//   S0    | S2   S1
//   S1    | S3   S0
//   S2    | S0   S3
//   S3    | S1   S0
//
// With data held steady for a whole bit the FSM sits in S0 during every
// first half-bit and in S1 (for a 1) or S2 (for a 0) during every second
// half-bit. It reaches S3 only when the data changes in the middle of a
// bit, i.e. when the input violates the bit timing.
//
// Interface and timing
//   clk      system clock, two cycles per bit (one per half-bit)
//   rst      synchronous, active high; FSM to S0, bit clock to first half
//   x        data bit; must be held for both cycles of a bit. The first
//            cycle after reset is the first half of the first bit.
//   bit_clk  the bit clock: high in the first half-bit, low in the second
//   z        serial Manchester output, x XOR bit_clk (combinational from
//            x, no latency)
//   code     the two half-bit levels of the current bit, {first, second}
//            = {~x, x}; 00 while reset is asserted
//   state    present FSM state; next_state is the state after this edge
//
// The XOR encoding, the FSM table and its binary state codes, the code
// word and its all-zero value in reset follow the encoder's description.
// Generating the bit clock as a register on a double-rate system clock,
// instead of using a clock net as a logic input, and the synchronous
// active-high reset are choices of this implementation.
module manchester_encoder
  import line_code_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       x,
  output logic       bit_clk,
  output logic       z,
  output logic [1:0] code,
  output man_state_t state,
  output man_state_t next_state
);

  localparam man_state_t MAN_RESET_STATE = MAN_S0;

  // Bit clock: toggles every half-bit, high in the first half.
  always_ff @(posedge clk) begin
    if (rst) bit_clk <= FIRST_HALF;
    else     bit_clk <= ~bit_clk;
  end

  // FSM next-state logic.
  always_comb begin
    unique case (state)
      MAN_S0:  next_state = x ? MAN_S1 : MAN_S2;
      MAN_S1:  next_state = x ? MAN_S0 : MAN_S3;
      MAN_S2:  next_state = x ? MAN_S3 : MAN_S0;
      MAN_S3:  next_state = x ? MAN_S0 : MAN_S1;
      default: next_state = MAN_RESET_STATE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) state <= MAN_RESET_STATE;
    else     state <= next_state;
  end

  // Line output and code word.
  assign z    = x ^ bit_clk;
  assign code = rst ? 2'b00 : {~x, x};

endmodule
