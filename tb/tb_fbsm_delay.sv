// Self-checking testbench of the latch buffer fbsm_delay.
//
// Drives a random bit stream into buffers of 16 (the default, N latches),
// 5 and 1 latches and checks that each output equals the input of exactly
// DEPTH cycles earlier, and that a synchronous clear empties the buffer (the
// next DEPTH outputs are zero). The reference is a history array kept by
// the testbench.
module tb_fbsm_delay;

  logic clk = 1'b0;
  logic clr;
  logic d;
  logic q16, q5, q1;
  int   checks = 0;
  int   failures = 0;

  // Input history: hist[i] is the input of i cycles ago (0 after a clear).
  logic [31:0] hist;

  fbsm_delay                u16 (.clk, .clr, .d, .q(q16));
  fbsm_delay #(.DEPTH(5))   u5  (.clk, .clr, .d, .q(q5));
  fbsm_delay #(.DEPTH(1))   u1  (.clk, .clr, .d, .q(q1));

  always #5 clk = ~clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    clr  = 1'b1;
    d    = 1'b0;
    hist = '0;
    @(posedge clk);
    #1 clr = 1'b0;
    for (int cyc = 0; cyc < 400; cyc++) begin
      d   = 1'($urandom);
      // Clear now and then: the clear takes the place of a shift.
      clr = (cyc % 97 == 60);
      @(posedge clk);
      hist = clr ? '0 : {hist[30:0], d};
      #1;
      check(q16, hist[15], "depth 16");
      check(q5,  hist[4],  "depth 5");
      check(q1,  hist[0],  "depth 1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
