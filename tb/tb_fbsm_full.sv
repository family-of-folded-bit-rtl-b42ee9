// Full-size testbench of the folded bit-serial multiplier: the top with
// its default parameters, K = 8 processing elements and folding factor
// N = 16, so a 128-bit operand a.
//
// Multiplies 128-bit operands by b operands of 128 bits (the operand
// length of the largest configuration in the implementation table), and
// also 1-bit and 200-bit b operands, through the driver fbsm_runner,
// which checks every product bit, the product length, the 2N-cycle
// latency of the first bit and the N-cycle spacing of the rest. A
// 128 x 128-bit product takes N*(128+128+1)+1 = 4113 cycles.
module tb_fbsm_full;

  localparam int unsigned LA = 128;

  logic          clk = 1'b0;
  logic          rst_n;
  logic          start;
  logic [LA-1:0] a;
  logic [15:0]   lb;
  logic          b_in, b_take, busy, p, p_valid, done;
  int            checks, failures, cpp;
  logic          finished;

  fbsm dut (.clk, .rst_n, .start, .a, .lb, .b_in, .b_take, .busy, .p, .p_valid, .done);

  fbsm_runner #(.LA(LA), .N(16), .LBW(16), .MAXLB(200), .NMUL(6), .RANDLEN(1'b0)) u_run (
    .clk, .rst_n, .start, .a, .lb, .b_in, .b_take, .busy, .p, .p_valid, .done,
    .checks, .failures, .finished, .cycles_per_product(cpp)
  );

  always #5 clk = ~clk;

  initial begin
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (finished);
    $display("cycles for one 128 x 128-bit product: %0d", cpp);
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + int'(cpp != 16 * 257 + 1));
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
