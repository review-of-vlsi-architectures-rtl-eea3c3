// Self-checking testbench for manchester_encoder.
//
// Sends random bits, each held for two half-bit cycles, and now and then
// changes the data in the middle of a bit so that the FSM also leaves its
// normal S0 -> S1/S2 -> S0 cycle and visits S3. A reset is applied in the
// middle of the run. Checked every half-bit against references written
// here: the bit clock phase (high in even cycles after reset), the line
// level (first half-bit is the inverse of the data, second half-bit the
// data), the code word {~x, x} and 00 in reset, and the FSM state and next
// state against the S0..S3 transition table. Every one of the eight
// (state, bit) transitions must be taken at least once.
module tb_manchester_encoder;
  import line_code_pkg::*;

  localparam int NBITS = 400;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       x   = 1'b0;
  logic       bit_clk, z;
  logic [1:0] code;
  man_state_t state, next_state;

  int checks   = 0;
  int failures = 0;

  manchester_encoder dut (
    .clk, .rst, .x, .bit_clk, .z, .code, .state, .next_state
  );

  always #5 clk = ~clk;

  initial begin
    repeat (4 * NBITS + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference transition table, indexed [state][bit].
  logic [1:0] tbl [4][2];
  initial begin
    tbl[0][0] = 2'd2;  tbl[0][1] = 2'd1;
    tbl[1][0] = 2'd3;  tbl[1][1] = 2'd0;
    tbl[2][0] = 2'd0;  tbl[2][1] = 2'd3;
    tbl[3][0] = 2'd1;  tbl[3][1] = 2'd0;
  end

  int unsigned seen [4][2];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic run(input int nbits);
    logic [1:0] ref_st;
    logic       b;
    ref_st = 2'd0;
    b      = 1'b0;
    for (int c = 0; c < 2 * nbits; c++) begin
      // mid-cycle c: new bit in even cycles, mostly held in odd cycles
      if (c % 2 == 0 || $urandom_range(7) == 0) b = 1'($urandom);
      x = b;
      #1;
      check(bit_clk == (c % 2 == 0), "bit clock phase");
      check(z == ((c % 2 == 0) ? ~b : b), "line level");
      check(code == {~b, b}, "code word");
      check(state == man_state_t'(ref_st), "state");
      check(next_state == man_state_t'(tbl[ref_st][b]), "next state");
      seen[ref_st][b]++;
      ref_st = tbl[ref_st][b];
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    #1;
    check(code == 2'b00, "code word in reset");
    rst = 1'b0;
    run(NBITS / 2);
    rst = 1'b1;
    #1;
    check(code == 2'b00, "code word in reset");
    @(negedge clk);
    check(state == MAN_S0, "state in reset");
    rst = 1'b0;
    run(NBITS / 2);
    for (int s = 0; s < 4; s++)
      for (int v = 0; v < 2; v++)
        check(seen[s][v] > 0, $sformatf("transition from S%0d on %0d taken", s, v));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
