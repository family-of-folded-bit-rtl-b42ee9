// End-to-end testbench of the folded bit-serial multiplier, in the
// two-PE configuration K = 2, N = 2 (4-bit operand a).
//
// Multiplies directed and random operands with operand-b lengths from 0
// to 12 bits and compares the serial product with a * b computed here. It
// also checks the timing: the first product bit 2N cycles after the start
// cycle (2N-1 after the first operation), one bit every N cycles, LA+lb
// bits in all, and a new product started in the cycle after done.
//
// It then counts how often each mechanism of the folded datapath acted,
// and counts a failure for any that never did: a PE adding its own
// recycled sum (time instances 0..N-2) with that sum set, a PE adding its
// left neighbour's sum (time instance N-1) with it set, the leftmost PE
// taking '0', a carry set on a carry-recycling path, a b request, a flush
// iteration with b forced to zero, and back-to-back products.
//
// Latch-level data flow: for the first 7 cycles of a product, the three
// sum latches D<n>.1 .. D<n>.3 behind each PE n are compared with the
// sums of partial products of the unfolded multiplier. D<n>.1 in cycle
// t = N*l + u holds the sum of operation i = nN+u in iteration l,
// sum over m <= l of a[i+l-m]*b[m], and D<n>.m holds D<n>.1 of m-1 cycles
// earlier. With a one-hot b no cell holds more than one term, so no carry
// arises and the bits equal these sums exactly.
module tb_fbsm;

  localparam int unsigned K   = 2;
  localparam int unsigned N   = 2;
  localparam int unsigned LBW = 4;
  localparam int unsigned LA  = K * N;

  logic           clk = 1'b0;
  logic           rst_n;
  logic           start;
  logic [LA-1:0]  a;
  logic [LBW-1:0] lb;
  logic           b_in;
  logic           b_take, busy, p, p_valid, done;

  int checks = 0;
  int failures = 0;
  int cycle = 0;

  // Mechanism counters.
  int n_own = 0, n_left = 0, n_zero = 0, n_carry = 0, n_take = 0, n_flush = 0, n_b2b = 0;

  fbsm #(.K(K), .N(N), .LBW(LBW)) dut (
    .clk, .rst_n, .start, .a, .lb, .b_in, .b_take, .busy, .p, .p_valid, .done
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // Observe the datapath.
  for (genvar j = 0; j < K; j++) begin : g_mon
    always @(negedge clk) begin
      if (busy) begin
        if (!dut.g_pe[j].u_pe.take_left && dut.g_pe[j].u_pe.sum_own) n_own++;
        if (dut.g_pe[j].u_pe.take_left && dut.g_pe[j].u_pe.sum_left && j != K - 1) n_left++;
        if (dut.g_pe[j].u_pe.take_left && j == K - 1) n_zero++;
        if (dut.g_pe[j].u_pe.carry_in) n_carry++;
      end
    end
  end
  always @(negedge clk) begin
    if (b_take) n_take++;
    if (busy && dut.slot == '0 && !b_take) n_flush++;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  // One product; start is raised in the current cycle. With chain set,
  // the next start is raised in the cycle of done.
  task automatic multiply(input logic [LA-1:0] av, input logic [15:0] bv, input int len,
                          input bit chain);
    logic [31:0] prod, got;
    int          nbits, bidx, t0, tlast;
    prod  = 32'(av) * 32'(bv & 16'((32'h1 << len) - 1));
    got   = '0;
    nbits = 0;
    bidx  = 0;
    a     = av;
    lb    = LBW'(len);
    start = 1'b1;
    #1;
    check(!busy || done, "idle or done at start");
    t0 = cycle;
    @(posedge clk);
    #1 start = 1'b0;
    a = 'x;
    forever begin
      b_in = b_take ? bv[bidx] : 1'($urandom);
      if (b_take) bidx++;
      if (p_valid) begin
        got[nbits] = p;
        if (nbits == 0) check(cycle - t0 == 2 * N, "first product bit latency");
        else            check(cycle - tlast == N, "product bit spacing");
        tlast = cycle;
        nbits++;
      end
      if (done) begin
        if (chain) begin
          start = 1'b1;
          n_b2b++;
        end
        break;
      end
      @(posedge clk);
      #1;
    end
    check(nbits == LA + len, "number of product bits");
    check(bidx == len, "number of b bits taken");
    check(got == prod, "product");
    if (got != prod) $display("  a=%0d b=%0d lb=%0d: got %0d expected %0d", av, bv, len, got, prod);
    if (!chain) begin
      @(posedge clk);
      #1;
    end
  endtask

  // Sum of partial products of operation i in iteration l (no carries).
  function automatic int pp_sum(input logic [LA-1:0] av, input logic [3:0] bv, input int i,
                                input int l);
    int acc = 0;
    for (int m = 0; m <= l; m++)
      if (i + l - m < int'(LA) && m < 4) if (av[i + l - m] && bv[m]) acc++;
    return acc;
  endfunction

  // Expected content of latch D<n>.<k> (k = 1..3) after cycle t.
  function automatic logic latch_exp(input logic [LA-1:0] av, input logic [3:0] bv, input int n,
                                     input int k, input int t);
    int tt;
    tt = t - (k - 1);
    if (tt < 0) return 1'b0;
    return 1'(pp_sum(av, bv, n * int'(N) + tt % int'(N), tt / int'(N)));
  endfunction

  task automatic dataflow(input logic [LA-1:0] av, input logic [3:0] bv);
    logic [2:0] d [K];
    int         bidx;
    bidx  = 0;
    a     = av;
    lb    = LBW'(4);
    start = 1'b1;
    @(posedge clk);
    #1 start = 1'b0;
    for (int t = 0; t < 7; t++) begin
      b_in = b_take ? bv[bidx] : 1'b0;
      if (b_take) bidx++;
      @(posedge clk);
      #1;
      d[1] = {dut.g_pe[1].u_sum_right.g_shift.sr[1], dut.g_pe[1].u_sum_right.g_shift.sr[0],
              dut.g_pe[1].u_sum_own.g_shift.sr[0]};
      d[0] = {dut.g_pe[0].u_sum_right.g_shift.sr[1], dut.g_pe[0].u_sum_right.g_shift.sr[0],
              dut.g_pe[0].u_sum_own.g_shift.sr[0]};
      for (int n = 0; n < int'(K); n++)
        for (int k = 1; k <= 3; k++) begin
          check(d[n][k-1] == latch_exp(av, bv, n, k, t), "data-flow latch");
          if (d[n][k-1] != latch_exp(av, bv, n, k, t))
            $display("  a=%b b=%b t=%0d D%0d.%0d=%0b", av, bv, t, n, k, d[n][k-1]);
        end
    end
    // Let the product finish.
    while (!done) begin
      b_in = b_take ? bv[bidx] : 1'b0;
      if (b_take) bidx++;
      @(posedge clk);
      #1;
    end
    @(posedge clk);
    #1;
  endtask

  initial begin
    rst_n = 1'b0;
    start = 1'b0;
    a     = '0;
    lb    = '0;
    b_in  = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk);
    #1;
    // Latch contents of the two-PE example, 4-bit operands.
    for (int i = 0; i < 16; i++) dataflow(4'(i), 4'(1 << (i % 4)));
    dataflow(4'hF, 4'h1);
    dataflow(4'hF, 4'h8);
    multiply(4'b0001, 16'hB, 4, 1'b0);
    multiply(4'hF, 16'hF, 4, 1'b0);
    multiply(4'hA, 16'h5, 4, 1'b1);
    multiply(4'h9, 16'h3, 2, 1'b0);
    multiply(4'h7, 16'h0, 0, 1'b0);
    multiply(4'hF, 16'hFFF, 12, 1'b0);
    for (int i = 0; i < 60; i++)
      multiply(4'($urandom), 16'($urandom), int'($urandom_range(1, 12)), 1'(i % 3 == 0));
    if (!start) begin
      @(posedge clk);
      #1;
    end
    start = 1'b0;
    check(n_own   > 0, "own sum recycling used");
    check(n_left  > 0, "left neighbour sum used");
    check(n_zero  > 0, "leftmost PE takes 0");
    check(n_carry > 0, "carry recycled");
    check(n_take  > 0, "b requested");
    check(n_flush > 0, "flush iteration");
    check(n_b2b   > 0, "back-to-back products");
    $display("mechanisms: own=%0d left=%0d zero=%0d carry=%0d take=%0d flush=%0d b2b=%0d",
             n_own, n_left, n_zero, n_carry, n_take, n_flush, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
