// Self-checking testbench for fm0_encoder.
//
// Drives a directed bit sequence that takes every one of the eight
// (state, bit) transitions, then random bits, with a reset in the middle.
// Two independent references are checked every half-bit:
//   - a transition table for the state codes (S1=11, S2=10, S3=01, S4=00),
//     which gives the expected state, next state and output level;
//   - the FM0 coding rules applied to the recorded output stream: a level
//     change at every bit boundary, and a change in the middle of the bit
//     exactly when the bit is 0.
// Timing checked: the bit clock is high in even cycles after reset, data
// is sampled at the end of odd cycles, and a bit appears on the line in
// the two cycles right after it is sampled (one bit period of latency).
module tb_fm0_encoder;
  import line_code_pkg::*;

  localparam int NBITS = 400;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       x   = 1'b0;
  logic       bit_clk, x_take, fm0_out;
  fm0_state_t state, next_state;

  int checks   = 0;
  int failures = 0;

  fm0_encoder dut (
    .clk, .rst, .x, .bit_clk, .x_take, .fm0_out, .state, .next_state
  );

  always #5 clk = ~clk;

  initial begin
    repeat (4 * NBITS + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference transition table, indexed [state code][bit].
  logic [1:0] tbl [4][2];
  initial begin
    tbl[2'b11][0] = 2'b01;  tbl[2'b11][1] = 2'b00;   // S1 -> S3 / S4
    tbl[2'b10][0] = 2'b10;  tbl[2'b10][1] = 2'b11;   // S2 -> S2 / S1
    tbl[2'b01][0] = 2'b01;  tbl[2'b01][1] = 2'b00;   // S3 -> S3 / S4
    tbl[2'b00][0] = 2'b10;  tbl[2'b00][1] = 2'b11;   // S4 -> S2 / S1
  end

  int unsigned seen [4][2];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Runs ncyc half-bit cycles from just after a reset release. bits[] are
  // the data bits to send, one per bit period.
  task automatic run(input int nbits, input logic directed [], input bit use_directed);
    logic [1:0] ref_st;
    logic       lvl [$];
    logic       sent [$];
    logic       b;
    ref_st = 2'b11;
    lvl.delete();
    sent.delete();
    for (int c = 0; c < 2 * nbits + 2; c++) begin
      // mid-cycle c
      if (c % 2 == 1) begin
        int k = c / 2;
        b = (use_directed && k < directed.size()) ? directed[k] : 1'($urandom);
      end else begin
        b = 1'($urandom);   // not sampled in even cycles
      end
      x = b;
      #1;
      check(bit_clk == (c % 2 == 0), "bit clock phase");
      check(x_take  == (c % 2 == 1), "sampling strobe");
      check(state == fm0_state_t'(ref_st), "state");
      check(fm0_out == ((c % 2 == 0) ? ref_st[1] : ref_st[0]), "output level");
      lvl.push_back(fm0_out);
      if (c % 2 == 1) begin
        check(next_state == fm0_state_t'(tbl[ref_st][b]), "next state");
        seen[ref_st][b]++;
        ref_st = tbl[ref_st][b];
        sent.push_back(b);
      end
      @(negedge clk);
    end
    // Rule check on the recorded stream. Bit k is on the line in cycles
    // 2k+2 and 2k+3.
    for (int k = 0; k + 1 < sent.size(); k++) begin
      check(lvl[2*k+2] != lvl[2*k+1], "rule: change at bit boundary");
      check((lvl[2*k+3] == lvl[2*k+2]) == (sent[k] == 1'b1), "rule: centre change only for 0");
    end
    // Idle after reset: both half-bits of the reset state are high.
    check(lvl[0] == 1'b1 && lvl[1] == 1'b1, "reset state S1 on the line");
  endtask

  initial begin
    logic dir [];
    dir = '{1'b0, 1'b0, 1'b1, 1'b0, 1'b0, 1'b1, 1'b1, 1'b1};
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    run(NBITS / 2, dir, 1'b1);
    // reset in the middle of operation
    rst = 1'b1;
    #1;
    @(negedge clk);
    check(state == FM0_S1, "state in reset");
    @(negedge clk);
    rst = 1'b0;
    run(NBITS / 2, dir, 1'b0);
    for (int s = 0; s < 4; s++)
      for (int v = 0; v < 2; v++)
        check(seen[s][v] > 0, $sformatf("transition from %b on %0d taken", 2'(s), v));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
