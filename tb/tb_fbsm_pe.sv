// Self-checking testbench of the folded processing element fbsm_pe.
//
// Exhaustive over every input combination for folding factors 4 and 16
// (the default, with random a bits) and for the unfolded case N = 1. The
// expected result is worked out arithmetically: the partial product
// a[u] & b plus the selected sum bit plus the carry, where the selected sum
// is the left neighbour's in the last time instance (N-1) and the PE's own
// in all others, and the left one always when N = 1.
module tb_fbsm_pe;

  int checks = 0;
  int failures = 0;

  logic [3:0]  a4;
  logic [1:0]  slot4;
  logic [15:0] a16;
  logic [3:0]  slot16;
  logic [0:0]  a1;
  logic [0:0]  slot1;
  logic        b, own, left, cin;
  logic        s4, c4, s16, c16, s1, c1;

  fbsm_pe #(.N(4)) u4  (.a_bits(a4),  .slot(slot4),  .b, .sum_own(own), .sum_left(left),
                        .carry_in(cin), .sum_out(s4),  .carry_out(c4));
  fbsm_pe          u16 (.a_bits(a16), .slot(slot16), .b, .sum_own(own), .sum_left(left),
                        .carry_in(cin), .sum_out(s16), .carry_out(c16));
  fbsm_pe #(.N(1)) u1  (.a_bits(a1),  .slot(slot1),  .b, .sum_own(own), .sum_left(left),
                        .carry_in(cin), .sum_out(s1),  .carry_out(c1));

  function automatic int b2i(input logic x);
    return x ? 1 : 0;
  endfunction

  task automatic check(input logic [1:0] got, input int exp, input string what);
    checks++;
    if (int'(got) != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (own=%0b left=%0b b=%0b cin=%0b)",
               what, got, exp, own, left, b, cin);
    end
  endtask

  initial begin
    for (int rep = 0; rep < 16; rep++) begin
      a4  = 4'(rep);
      a16 = 16'($urandom);
      a1  = 1'(rep);
      for (int u = 0; u < 16; u++) begin
        for (int v = 0; v < 16; v++) begin
          {b, own, left, cin} = 4'(v);
          slot4  = 2'(u);
          slot16 = 4'(u);
          slot1  = 1'b0;
          #1;
          if (u < 4)
            check({c4, s4}, b2i(a4[u] & b) + b2i(u == 3 ? left : own) + b2i(cin), "N=4");
          check({c16, s16}, b2i(a16[u] & b) + b2i(u == 15 ? left : own) + b2i(cin), "N=16");
          check({c1, s1}, b2i(a1[0] & b) + b2i(left) + b2i(cin), "N=1");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
