// Workload testbench: every folded configuration of the implementation
// table (operand lengths 8 to 128 bits, folding factors 1 to 64, 2 to 8
// processing elements), each an fbsm instance driven by fbsm_runner.
//
// Each instance multiplies operands of its length (lb = LA) at random and
// directed values; the driver checks every product bit, the product
// length, the 2N-cycle latency of the first bit and the N-cycle bit
// spacing. The testbench also checks that one LA x LA product takes
// N*(2LA+1)+1 cycles, start cycle included, i.e. N times the
// 2LA+2 cycles of the unfolded multiplier (N = 1), less N-1.
module tb_fbsm_workloads;

  localparam int NCFG = 15;
  // Operand length, folding factor N; K = LA / N.
  localparam int CFG_LA[NCFG] = '{8, 8, 8, 16, 16, 16, 32, 32, 32, 64, 64, 64, 128, 128, 128};
  localparam int CFG_N [NCFG] = '{1, 2, 4, 2, 4, 8, 4, 8, 16, 8, 16, 32, 16, 32, 64};

  logic clk = 1'b0;
  logic rst_n;
  int   checks [NCFG];
  int   failures [NCFG];
  int   cpp [NCFG];
  logic [NCFG-1:0] finished;

  always #5 clk = ~clk;

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam int unsigned LA = CFG_LA[c];
    localparam int unsigned N  = CFG_N[c];
    logic          start;
    logic [LA-1:0] a;
    logic [15:0]   lb;
    logic          b_in, b_take, busy, p, p_valid, done;

    fbsm #(.K(LA / N), .N(N), .LBW(16)) dut (
      .clk, .rst_n, .start, .a, .lb, .b_in, .b_take, .busy, .p, .p_valid, .done
    );

    fbsm_runner #(.LA(LA), .N(N), .LBW(16), .MAXLB(LA), .NMUL(3), .RANDLEN(1'b0)) u_run (
      .clk, .rst_n, .start, .a, .lb, .b_in, .b_take, .busy, .p, .p_valid, .done,
      .checks(checks[c]), .failures(failures[c]), .finished(finished[c]),
      .cycles_per_product(cpp[c])
    );
  end

  initial begin
    int tc, tf;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (&finished);
    tc = 0;
    tf = 0;
    for (int c = 0; c < NCFG; c++) begin
      tc += checks[c] + 1;
      tf += failures[c];
      if (cpp[c] != CFG_N[c] * (2 * CFG_LA[c] + 1) + 1) begin
        tf++;
        $display("FAIL LA=%0d N=%0d: %0d cycles per product", CFG_LA[c], CFG_N[c], cpp[c]);
      end
      $display("LA=%3d N=%2d K=%2d: %0d cycles per LA x LA product, %0d checks, %0d failures",
               CFG_LA[c], CFG_N[c], CFG_LA[c] / CFG_N[c], cpp[c], checks[c], failures[c]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", tc, tf);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end

endmodule
