// End-to-end testbench for line_code_top (both encoders, default build).
//
// Part 1 replays two reference runs: after reset the FM0 encoder is sent
// 0,1,1,0,1,0,1 and must step through the states 01,00,11,01,00,10,11;
// the Manchester encoder is sent 1,0,1 and its FSM must step through
// S0,S1,S0,S2,S0,S1 with code words 01,10,01.
// Part 2 streams random bits through both encoders and decodes the two
// line signals with simple receiver models written here (FM0: a bit is 1
// when its two half-bits are equal; Manchester: a bit is its second
// half-bit, and its first half-bit must be the inverse), comparing the
// decoded bits with the bits sent. FM0 bits are checked to come out one
// bit period after they are sampled, Manchester bits in the same period.
// Some Manchester bits change in mid-bit to drive the FSM into S3.
// Mechanisms counted, each must occur: FM0 centre transition (bit 0), FM0
// bit without centre transition (bit 1), each FM0 and Manchester state,
// a Manchester timing violation (S3), and a reset in mid-stream.
module tb_line_code_top;
  import line_code_pkg::*;

  localparam int NBITS = 2000;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  logic       fm0_x = 1'b0;
  logic       man_x = 1'b0;
  logic       fm0_bit_clk, fm0_take, fm0_out;
  fm0_state_t fm0_state, fm0_next_state;
  logic       man_bit_clk, man_out;
  logic [1:0] man_code;
  man_state_t man_state, man_next_state;

  int checks   = 0;
  int failures = 0;

  int n_fm0_zero, n_fm0_one, n_man_violation, n_reset;
  int unsigned fm0_visits [4];
  int unsigned man_visits [4];

  line_code_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (4 * NBITS + 400) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (!rst) begin
    fm0_visits[fm0_state]++;
    man_visits[man_state]++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic do_reset();
    rst = 1'b1;
    repeat (2) @(negedge clk);
    check(fm0_state == FM0_S1 && man_state == MAN_S0, "reset states");
    check(man_code == 2'b00, "Manchester code word in reset");
    rst = 1'b0;
    n_reset++;
  endtask

  // Part 1: the two reference runs, side by side.
  task automatic replay();
    logic       fbits [7] = '{0, 1, 1, 0, 1, 0, 1};
    logic [1:0] fstates [7] = '{2'b01, 2'b00, 2'b11, 2'b01, 2'b00, 2'b10, 2'b11};
    logic       mbits [3] = '{1, 0, 1};
    logic [1:0] mstates [6] = '{2'd0, 2'd1, 2'd0, 2'd2, 2'd0, 2'd1};
    logic [1:0] mcodes [3] = '{2'b01, 2'b10, 2'b01};
    do_reset();
    for (int c = 0; c < 16; c++) begin
      fm0_x = (c % 2 == 1 && c / 2 < 7) ? fbits[c / 2] : 1'b0;
      man_x = (c / 2 < 3) ? mbits[c / 2] : 1'b1;
      #1;
      if (c < 6) begin
        check(man_state == man_state_t'(mstates[c]), "replay: Manchester state");
        check(man_code == mcodes[c / 2], "replay: Manchester code word");
      end
      // bit k is sampled at the end of cycle 2k+1 and shown from 2k+2
      if (c >= 2 && c % 2 == 0 && c / 2 - 1 < 7)
        check(fm0_state == fm0_state_t'(fstates[c / 2 - 1]), "replay: FM0 state");
      @(negedge clk);
    end
  endtask

  // Part 2: random streams through both encoders, decoded and compared.
  task automatic stream(input int nbits);
    logic fsent [$];
    logic fprev, ffirst, mfirst, mb;
    bit   violated;
    do_reset();
    fprev = 1'b1;
    for (int c = 0; c < 2 * nbits; c++) begin
      int k = c / 2;
      // FM0 data: a new bit every odd cycle
      fm0_x = 1'($urandom);
      if (c % 2 == 1) fsent.push_back(fm0_x);
      // Manchester data: a new bit every even cycle, rarely changed mid-bit
      if (c % 2 == 0) begin
        mb = 1'($urandom);
        man_x = mb;
        violated = 1'b0;
      end else if ($urandom_range(15) == 0) begin
        man_x = ~man_x;
        violated = 1'b1;
      end
      #1;
      // FM0 receiver: bit k-1 is on the line in cycles 2k and 2k+1
      if (c % 2 == 0) begin
        ffirst = fm0_out;
        if (c > 0) check(ffirst != fprev, "FM0 level change at bit boundary");
      end else begin
        fprev = fm0_out;
        if (k >= 1) begin
          check((ffirst == fm0_out) == fsent[k - 1], "FM0 decoded bit");
          if (fsent[k - 1]) n_fm0_one++; else n_fm0_zero++;
        end
      end
      // Manchester receiver
      if (c % 2 == 0) begin
        mfirst = man_out;
      end else if (!violated) begin
        check(mfirst == ~man_out, "Manchester mid-bit transition");
        check(man_out == mb, "Manchester decoded bit");
      end else begin
        // the data changed mid-bit: the FSM leaves its normal cycle
        // S1 on 0 and S2 on 1 lead to S3; S1 on 1 and S2 on 0 to S0
        if (man_state == MAN_S1 || man_state == MAN_S2) begin
          check(man_next_state == (((man_state == MAN_S1) == man_x) ? MAN_S0 : MAN_S3),
                "Manchester FSM sees the violation");
          if (man_next_state == MAN_S3) n_man_violation++;
        end
      end
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    replay();
    stream(NBITS / 2);
    stream(NBITS / 2);
    $display("fm0 zeros=%0d ones=%0d man violations=%0d resets=%0d",
             n_fm0_zero, n_fm0_one, n_man_violation, n_reset);
    check(n_fm0_zero > 0, "FM0 centre transition occurred");
    check(n_fm0_one > 0, "FM0 bit without centre transition occurred");
    check(n_man_violation > 0, "Manchester FSM reached S3");
    check(n_reset >= 3, "reset in mid-stream occurred");
    for (int s = 0; s < 4; s++) begin
      check(fm0_visits[s] > 0, $sformatf("FM0 state %b visited", 2'(s)));
      check(man_visits[s] > 0, $sformatf("Manchester state S%0d visited", s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
