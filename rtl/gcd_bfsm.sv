// gcd_bfsm: GCD as a three-state machine with an implicit data path
// (1 clock step per subtraction).
//
// Only the registers (x, y, xo, rdy, state) are written out; the
// arithmetic is left as expressions inside the clocked process, which
// synthesis turns into two subtractors (x - y, y - x) and two comparators
// (x < y, x /= y).
//   S_WAIT  : while rst = 1 stay; on rst = 0 x <= xi, y <= yi, rdy <= 0,
//             -> S_START.
//   S_START : x /= y -> subtract the smaller from the larger (y <= y - x if
//             x < y, else x <= x - y), stay; x = y -> xo <= x, rdy <= 1,
//             -> S_READY.
//   S_READY : -> S_WAIT (one idle cycle).
//
// Timing: from the load edge, xo is valid with rdy = 1 after n + 1 edges for
// n subtractions. rdy is written only at load (0) and at completion (1), so
// it stays 1 until the next operands are loaded. States and transitions
// follow the original description; arst_n (asynchronous initialisation to
// S_WAIT with registers cleared) is this design's addition. Zero operands
// never finish, as in the original.
module gcd_bfsm #(
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

  typedef enum logic [1:0] {S_WAIT, S_START, S_READY} state_e;

  state_e           state;
  logic [WIDTH-1:0] x, y;

  always_ff @(posedge clk or negedge arst_n) begin
    if (!arst_n) begin
      state <= S_WAIT;
      x     <= '0;
      y     <= '0;
      xo    <= '0;
      rdy   <= 1'b0;
    end else begin
      unique case (state)
        S_WAIT: if (!rst) begin
          x     <= xi;
          y     <= yi;
          rdy   <= 1'b0;
          state <= S_START;
        end
        S_START: begin
          if (x != y) begin
            if (x < y) y <= y - x;
            else       x <= x - y;
          end else begin
            xo    <= x;
            rdy   <= 1'b1;
            state <= S_READY;
          end
        end
        S_READY: state <= S_WAIT;
        default: state <= S_WAIT;
      endcase
    end
  end

  a_ready_equal: assert property (@(posedge clk) disable iff (!arst_n)
    $rose(rdy) |-> (xo == x && x == y));

endmodule
