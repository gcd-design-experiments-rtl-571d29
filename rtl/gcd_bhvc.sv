// gcd_bhvc: GCD in the clocked behavioural style, as an explicit machine
// whose states are the four clock waits of a sequential process
// (1 clock step per subtraction).
//
// The behavioural form is a loop: wait while rst = 1; load x, y and clear
// rdy; subtract the smaller from the larger once per clock while x /= y;
// publish xo = x and set rdy; start over. Each clock wait of that loop is a
// state here:
//   W_HOLD (1) : rst = 1 -> stay; rst = 0 -> x <= xi, y <= yi, rdy <= 0,
//                -> W_LOAD.
//   W_LOAD (2) : x /= y -> y <= y - x if x < y, else x <= x - y, -> W_CALC;
//                x = y  -> xo <= x, rdy <= 1, -> W_DONE.
//   W_CALC (3) : same actions as W_LOAD; x /= y stays in W_CALC.
//   W_DONE (4) : rst = 1 -> W_HOLD; rst = 0 -> load at once, -> W_LOAD.
// Unlike gcd_bfsm there is no idle state after completion: with rst held
// at 0 the next operands are loaded on the edge after the result appears.
//
// Timing: from the load edge, xo is valid with rdy = 1 after n + 1 edges for
// n subtractions; rdy stays 1 until the next load. The data path (two
// subtractors, two comparators) is left to synthesis. The four states and
// their transitions follow the original description. This design's
// choices: the machine is written out explicitly (a process with several
// clock waits is not accepted by synthesis tools), it starts in W_HOLD after
// arst_n rather than loading at time zero, and zero operands never finish,
// as in the original.
module gcd_bhvc #(
  parameter int unsigned WIDTH = gcd_pkg::GCD_WIDTH
) (
  input  logic             clk,
  input  logic             arst_n,
  input  logic             rst,
  input  logic [WIDTH-1:0] xi,
  input  logic [WIDTH-1:0] yi,
  output logic [WIDTH-1:0] xo,
  output logic             rdy
);

  typedef enum logic [1:0] {W_HOLD, W_LOAD, W_CALC, W_DONE} wait_e;

  wait_e            state;
  logic [WIDTH-1:0] x, y;

  always_ff @(posedge clk or negedge arst_n) begin
    if (!arst_n) begin
      state <= W_HOLD;
      x     <= '0;
      y     <= '0;
      xo    <= '0;
      rdy   <= 1'b0;
    end else begin
      unique case (state)
        W_HOLD, W_DONE: begin
          if (rst) begin
            state <= W_HOLD;
          end else begin
            x     <= xi;
            y     <= yi;
            rdy   <= 1'b0;
            state <= W_LOAD;
          end
        end
        W_LOAD, W_CALC: begin
          if (x != y) begin
            if (x < y) y <= y - x;
            else       x <= x - y;
            state <= W_CALC;
          end else begin
            xo    <= x;
            rdy   <= 1'b1;
            state <= W_DONE;
          end
        end
        default: state <= W_HOLD;
      endcase
    end
  end

  a_ready_equal: assert property (@(posedge clk) disable iff (!arst_n)
    $rose(rdy) |-> (xo == x && x == y));

endmodule
