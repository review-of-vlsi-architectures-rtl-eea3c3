// FM0 (bi-phase space) encoder built from its four-state FSM.
//
// FM0 sends every bit as two half-bits. The level always changes at the
// start of a bit; a 0 adds a second change in the middle of the bit, a 1
// does not. The encoder therefore depends on the data and on the level the
// previous bit ended with. Its FSM has four states whose codes are the two
// half-bit levels they transmit, {first half, second half}:
//
//   S1 = 11, S2 = 10, S3 = 01, S4 = 00
//
//   state | x=0  x=1
//   S1    | S3   S4
//   S2    | S2   S1
//   S3    | S3   S4
//   S4    | S2   S1
//
// The table reduces to two flip-flops. DFF1 holds the second half-bit and
// is loaded with x XOR (its own previous value); DFF2 holds the first
// half-bit and is loaded with the inverse of DFF1's previous value. A 2:1
// multiplexer selected by the bit clock sends DFF2 to the line while the
// bit clock is high (first half) and DFF1 while it is low (second half).
//
// Interface and timing
//   clk       system clock, two cycles per bit (one per half-bit)
//   rst       synchronous, active high; state to S1 (both half-bits high),
//             bit clock to first half
//   x         data bit, sampled at the clock edge that ends a second
//             half-bit (the rising edge of the bit clock); x_take is high
//             in the cycle that ends with that edge
//   bit_clk   the bit clock: high in the first half-bit, low in the second
//   fm0_out   serial FM0 output; a bit sampled at one rising edge of the
//             bit clock is transmitted over the two cycles that follow,
//             so the latency is one bit period
//   state     present state {DFF2, DFF1}; next_state is what the flip-flops
//             load at the next rising edge of the bit clock
//
// The XOR/DFF1, inverter/DFF2 and clock-selected multiplexer structure,
// the state codes and the transition table follow the encoder's
// description. The reset state S1 is taken from the state sequence shown
// after reset in its simulation. The double-rate system clock with the bit
// clock as a register, the data sampling strobe x_take and the synchronous
// active-high reset are choices of this implementation.
module fm0_encoder
  import line_code_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       x,
  output logic       bit_clk,
  output logic       x_take,
  output logic       fm0_out,
  output fm0_state_t state,
  output fm0_state_t next_state
);

  localparam fm0_state_t FM0_RESET_STATE = FM0_S1;

  logic dff1_q;   // second half-bit
  logic dff2_q;   // first half-bit
  logic dff1_d;
  logic dff2_d;

  // Bit clock: toggles every half-bit, high in the first half.
  always_ff @(posedge clk) begin
    if (rst) bit_clk <= FIRST_HALF;
    else     bit_clk <= ~bit_clk;
  end

  // The flip-flops load at the rising edge of the bit clock, i.e. at the
  // system clock edge that ends a second half-bit.
  assign x_take = (bit_clk != FIRST_HALF);

  assign dff1_d = x ^ dff1_q;
  assign dff2_d = ~dff1_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      {dff2_q, dff1_q} <= FM0_RESET_STATE;
    end else if (x_take) begin
      dff1_q <= dff1_d;
      dff2_q <= dff2_d;
    end
  end

  assign state      = fm0_state_t'({dff2_q, dff1_q});
  assign next_state = fm0_state_t'({dff2_d, dff1_d});

  // Output multiplexer: bit clock 1 selects DFF2, 0 selects DFF1.
  assign fm0_out = bit_clk ? dff2_q : dff1_q;

  // Every bit starts with a level change.
  a_boundary_transition: assert property (
    @(posedge clk) disable iff (rst) x_take |=> (fm0_out != $past(fm0_out))
  );

  // A 0 changes level in the middle of the bit, a 1 does not.
  a_center_rule: assert property (
    @(posedge clk) disable iff (rst)
      x_take |=> ##1 (fm0_out == ($past(fm0_out) ^ ~$past(x, 2)))
  );

endmodule
