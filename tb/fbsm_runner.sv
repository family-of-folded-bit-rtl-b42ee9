// Test driver for one folded bit-serial multiplier instance.
//
// Drives the multiplier's start / a / lb / b_in inputs, watches b_take,
// p_valid, done and p, and compares each serial product with a * b worked
// out here on wide vectors. Every product is checked for its value, its
// number of bits (LA+lb), the latency of its first bit (2N cycles after
// the start cycle) and the spacing of the bits (N cycles). It runs
// directed operands (all ones, lb = 1, lb = LA) and then NMUL random
// products with lb = LA (operands of equal length) or, where RANDLEN is
// set, random lb in 1..MAXLB; every third product starts in the cycle of
// the previous one's done. The run ends with finished high; checks and
// failures hold the counts. rst_n comes from the enclosing testbench.
module fbsm_runner #(
  parameter int unsigned LA      = 4,
  parameter int unsigned N       = 2,
  parameter int unsigned LBW     = 16,
  parameter int unsigned MAXLB   = 8,
  parameter int unsigned NMUL    = 4,
  parameter bit          RANDLEN = 1'b0
) (
  input  logic           clk,
  input  logic           rst_n,
  output logic           start,
  output logic [LA-1:0]  a,
  output logic [LBW-1:0] lb,
  output logic           b_in,
  input  logic           b_take,
  input  logic           busy,
  input  logic           p,
  input  logic           p_valid,
  input  logic           done,
  output int             checks,
  output int             failures,
  output logic           finished,
  output int             cycles_per_product  // of the last product, start cycle included
);

  localparam int unsigned PW = LA + MAXLB;

  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL [LA=%0d N=%0d] %s at cycle %0d", LA, N, what, cycle);
    end
  endtask

  function automatic logic [PW-1:0] rand_bits(input int unsigned nb);
    logic [PW-1:0] v;
    for (int i = 0; i < PW; i++) v[i] = (i < int'(nb)) ? 1'($urandom) : 1'b0;
    return v;
  endfunction

  task automatic multiply(input logic [LA-1:0] av, input logic [PW-1:0] bv, input int len,
                          input bit chain);
    logic [PW-1:0] prod, got;
    int            nbits, bidx, t0, tlast;
    prod  = PW'(av) * bv;
    got   = '0;
    nbits = 0;
    bidx  = 0;
    tlast = 0;
    a     = av;
    lb    = LBW'(len);
    start = 1'b1;
    #1;
    check(!busy || done, "idle or done at start");
    t0 = cycle;
    @(posedge clk);
    #1 start = 1'b0;
    forever begin
      b_in = b_take ? bv[bidx] : 1'($urandom);
      if (b_take) bidx++;
      if (p_valid) begin
        if (nbits < PW) got[nbits] = p;
        if (nbits == 0) check(cycle - t0 == 2 * int'(N), "first product bit latency");
        else            check(cycle - tlast == int'(N), "product bit spacing");
        tlast = cycle;
        nbits++;
      end
      if (done) begin
        cycles_per_product = cycle - t0 + 1;
        if (chain) start = 1'b1;
        break;
      end
      @(posedge clk);
      #1;
    end
    check(nbits == int'(LA) + len, "number of product bits");
    check(bidx == len, "number of b bits taken");
    check(got == prod, "product");
    if (got != prod) $display("  [LA=%0d N=%0d] lb=%0d: got %h expected %h", LA, N, len, got, prod);
    if (!chain) begin
      @(posedge clk);
      #1;
    end
  endtask

  initial begin
    checks   = 0;
    failures = 0;
    finished = 1'b0;
    cycles_per_product = 0;
    start    = 1'b0;
    a        = '0;
    lb       = '0;
    b_in     = 1'b0;
    @(posedge rst_n);
    @(posedge clk);
    #1;
    multiply('1, rand_bits(LA) | ~(~PW'(0) << LA), int'(LA), 1'b0);
    multiply(LA'(rand_bits(LA)), PW'(1), 1, 1'b0);
    multiply(LA'(rand_bits(LA)), rand_bits(MAXLB), int'(MAXLB), 1'b0);
    for (int i = 0; i < int'(NMUL); i++) begin
      int len;
      len = RANDLEN ? int'($urandom_range(1, MAXLB)) : int'(LA);
      multiply(LA'(rand_bits(LA)), rand_bits(len), len, 1'(i % 3 == 2));
    end
    if (start) begin
      @(posedge clk);
      #1 start = 1'b0;
    end
    finished = 1'b1;
  end

endmodule
