// Sequencer of the folded bit-serial multiplier.
//
// It steps through the folding schedule: every cycle is time instance
// u = 0..N-1 of iteration l, and iteration l processes bit b[l] of the
// serial operand (each b bit is used N times in a row, once per
// operation folded onto a PE). The sequencer
//   * accepts a start pulse while idle or in the cycle of done (so that
//     products follow each other without a gap), clears the latches of the
//     datapath in that same cycle (clr) and captures the length lb of
//     operand b;
//   * requests one b bit at time instance 0 of iterations 0..lb-1
//     (b_take high: b_in is consumed in that cycle) and holds it on the
//     broadcast line (b_bc) for the remaining N-1 time instances;
//   * drives b_bc = 0 for iterations lb .. LA, which shift the upper half
//     of the product out, as the unfolded serial multiplier does after its
//     last operand bit;
//   * marks the product bits: bit m leaves the datapath 2N-1 cycles after
//     it was computed at time instance 0 of iteration m, which is time
//     instance N-1 of iteration m+1, so p_valid is high in time instance
//     N-1 of iterations 1..LA+lb. done accompanies the last one (product
//     bit LA+lb-1), after which the sequencer is idle again unless start
//     was raised with done.
//
// A product thus takes N*(LA+lb+1) cycles from the cycle after start to
// done; the first product bit appears 2N-1 cycles after the first
// operation, then one every N cycles, as the document states. rst_n is a
// synchronous, active-low reset.
//
// The document gives the time instances and the switching, but no control
// logic, handshake or operand-length input: those are this design's
// choices.
module fbsm_ctrl import fbsm_pkg::*; #(
  parameter int unsigned LA  = 128,  // operand a length, K*N
  parameter int unsigned N   = 16,   // folding factor
  parameter int unsigned LBW = 16    // width of the operand-b length input
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [LBW-1:0]          lb,      // length of operand b in bits
  input  logic                    b_in,    // serial operand b, LSB first
  output logic                    b_take,  // b_in is consumed this cycle
  output logic                    b_bc,    // broadcast b bit
  output logic [cnt_width(N)-1:0] slot,    // time instance u
  output logic                    clr,     // clear the datapath latches
  output logic                    busy,
  output logic                    p_valid, // datapath output is a product bit
  output logic                    done     // last product bit
);

  localparam int unsigned SW = cnt_width(N);
  localparam int unsigned IW = $clog2(LA + (2 ** LBW) + 1);

  fbsm_state_e     state;
  logic [SW-1:0]   slot_q;
  logic [IW-1:0]   iter_q;   // iteration l
  logic [LBW-1:0]  lb_q;
  logic            b_hold;
  logic            last_slot;
  logic            last_iter;

  assign last_slot = (slot_q == SW'(N - 1));
  assign last_iter = (iter_q == IW'(LA) + IW'(lb_q));

  assign busy    = (state == FBSM_RUN);
  // A new product may start while idle or in the cycle of done.
  assign clr     = start && ((state == FBSM_IDLE) || done);
  assign slot    = slot_q;
  assign b_take  = busy && (slot_q == '0) && (iter_q < IW'(lb_q));
  assign b_bc    = (slot_q == '0) ? (b_take & b_in) : b_hold;
  assign p_valid = busy && last_slot && (iter_q != '0);
  assign done    = busy && last_slot && last_iter;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= FBSM_IDLE;
      slot_q <= '0;
      iter_q <= '0;
      lb_q   <= '0;
      b_hold <= 1'b0;
    end else begin
      b_hold <= b_bc;
      case (state)
        FBSM_IDLE: begin
          slot_q <= '0;
          iter_q <= '0;
          if (start) begin
            lb_q  <= lb;
            state <= FBSM_RUN;
          end
        end
        FBSM_RUN: begin
          if (last_slot) begin
            slot_q <= '0;
            iter_q <= iter_q + 1'b1;
            if (last_iter) begin
              iter_q <= '0;
              if (start) lb_q  <= lb;
              else       state <= FBSM_IDLE;
            end
          end else begin
            slot_q <= slot_q + 1'b1;
          end
        end
        default: state <= FBSM_IDLE;
      endcase
    end
  end

  // Time instance never leaves 0..N-1.
  a_slot_range: assert property (@(posedge clk) disable iff (!rst_n) slot_q <= SW'(N - 1));
  // b is requested only while running.
  a_take_busy: assert property (@(posedge clk) disable iff (!rst_n) b_take |-> busy);

endmodule
