// Self-checking testbench of the sequencer fbsm_ctrl.
//
// Runs the sequencer with LA = 6, N = 3 for several operand-b lengths
// (0, 1, 5 and 9 bits), back to back, and checks cycle by cycle against a
// schedule computed here: relative cycle c = N*l + u after start, time
// instance u = c mod N, b_take only at u = 0 of iterations l < lb, the
// broadcast b bit equal to b[l] for the N cycles of iteration l < lb and 0
// afterwards, p_valid at u = N-1 of iterations 1 .. LA+lb, done on the
// last of them, busy for exactly N*(LA+lb+1) cycles, and clr only in the
// start cycle.
module tb_fbsm_ctrl;
  import fbsm_pkg::*;

  localparam int unsigned LA  = 6;
  localparam int unsigned N   = 3;
  localparam int unsigned LBW = 4;

  logic           clk = 1'b0;
  logic           rst_n;
  logic           start;
  logic [LBW-1:0] lb;
  logic           b_in;
  logic           b_take, b_bc, clr, busy, p_valid, done;
  logic [cnt_width(N)-1:0] slot;
  int             checks = 0;
  int             failures = 0;

  fbsm_ctrl #(.LA(LA), .N(N), .LBW(LBW)) dut (
    .clk, .rst_n, .start, .lb, .b_in, .b_take, .b_bc, .slot, .clr, .busy, .p_valid, .done
  );

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic run(input int len);
    logic [15:0] bits;
    int          total;
    int          l, u;
    bits  = 16'($urandom);
    total = N * (LA + len + 1);
    // Start cycle.
    start = 1'b1;
    lb    = LBW'(len);
    #1;
    check(clr && !busy && !b_take && !p_valid, "start cycle");
    @(posedge clk);
    #1 start = 1'b0;
    for (int c = 0; c < total; c++) begin
      l    = c / N;
      u    = c % N;
      b_in = (l < len) ? bits[l] : 1'($urandom);
      #1;
      check(busy && !clr, "busy during product");
      check(int'(slot) == u, "time instance");
      check(b_take == (u == 0 && l < len), "b_take");
      check(b_bc == ((l < len) ? bits[l] : 1'b0), "broadcast b");
      check(p_valid == (u == N - 1 && l >= 1), "p_valid");
      check(done == (c == total - 1), "done");
      @(posedge clk);
      #1;
      // Keep the input stable only in the cycle it is taken.
      b_in = 1'($urandom);
    end
    check(!busy && !p_valid && !done, "idle after done");
  endtask

  initial begin
    rst_n = 1'b0;
    start = 1'b0;
    lb    = '0;
    b_in  = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    run(5);
    run(0);
    run(1);
    @(posedge clk);
    #1;
    run(9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
