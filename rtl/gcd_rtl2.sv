// gcd_rtl2: GCD with one universal ALU and a five-state controller
// (2 clock steps per subtraction).
//
// Same data path as gcd_rtl1: registers x and y loaded from the inputs or
// from the single ALU output, operand multiplexers selecting x - y or y - x,
// and an ALU that also gives alu_ne and alu_lt. The compare step of gcd_rtl1
// is folded into S_START, which looks at both flags of x - y at once:
//   S_WAIT    : while rst = 1 stay; on rst = 0 load x <= xi, y <= yi.
//   S_START   : alu_ne = 0 -> S_READY; alu_ne = 1 and alu_lt = 1 ->
//               S_SUB_Y_X; alu_ne = 1 and alu_lt = 0 -> S_SUB_X_Y.
//   S_SUB_Y_X : y <= y - x, back to S_START.
//   S_SUB_X_Y : x <= x - y, back to S_START.
//   S_READY   : xo <= x, rdy <= 1 (for one cycle), -> S_WAIT.
// All control signals default to 0.
//
// Timing: from the edge that loads the operands, xo is valid with rdy = 1
// after 2*n + 2 edges for n subtractions; rdy is a one-cycle pulse. States
// and data path follow the original description; arst_n (asynchronous
// initialisation) and the borrow-based alu_lt (see gcd_alu) are this
// design's additions. Zero operands never finish, as in the original.
module gcd_rtl2 #(
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

  typedef enum logic [2:0] {
    S_WAIT, S_START, S_SUB_X_Y, S_SUB_Y_X, S_READY
  } state_e;

  state_e           state, next_state;
  logic [WIDTH-1:0] x, y;
  logic [WIDTH-1:0] alu_1, alu_2, alu_o, x_i, y_i;
  logic             alu_lt, alu_ne;
  logic             ena_x, ena_y, ena_r, set_rdy, xi_yi_sel, sub_y_x;

  // Controller outputs: they depend on the state (and rst) only, so the
  // ALU flags, which depend on sub_y_x, feed nothing but the next state.
  always_comb begin
    ena_x     = 1'b0;
    ena_y     = 1'b0;
    ena_r     = 1'b0;
    set_rdy   = 1'b0;
    xi_yi_sel = 1'b0;
    sub_y_x   = 1'b0;
    unique case (state)
      S_WAIT: if (!rst) begin
        xi_yi_sel = 1'b1;
        ena_x     = 1'b1;
        ena_y     = 1'b1;
      end
      S_SUB_Y_X: begin ena_y = 1'b1; sub_y_x = 1'b1; end
      S_SUB_X_Y: ena_x = 1'b1;
      S_READY:   begin ena_r = 1'b1; set_rdy = 1'b1; end
      default: ;
    endcase
  end

  // Controller: next state
  always_comb begin
    next_state = state;
    unique case (state)
      S_WAIT: if (!rst) next_state = S_START;
      S_START: begin
        if (!alu_ne)     next_state = S_READY;
        else if (alu_lt) next_state = S_SUB_Y_X;
        else             next_state = S_SUB_X_Y;
      end
      S_SUB_Y_X: next_state = S_START;
      S_SUB_X_Y: next_state = S_START;
      S_READY:   next_state = S_WAIT;
      default:   next_state = S_WAIT;
    endcase
  end

  // Data path multiplexers and the shared ALU
  assign alu_1 = sub_y_x ? y : x;
  assign alu_2 = sub_y_x ? x : y;
  assign x_i   = xi_yi_sel ? xi : alu_o;
  assign y_i   = xi_yi_sel ? yi : alu_o;

  gcd_alu #(.WIDTH(WIDTH)) u_alu (
    .alu_1 (alu_1),
    .alu_2 (alu_2),
    .alu_o (alu_o),
    .alu_lt(alu_lt),
    .alu_ne(alu_ne)
  );

  // Registers
  always_ff @(posedge clk or negedge arst_n) begin
    if (!arst_n) begin
      state <= S_WAIT;
      x     <= '0;
      y     <= '0;
      xo    <= '0;
      rdy   <= 1'b0;
    end else begin
      state <= next_state;
      if (ena_x) x  <= x_i;
      if (ena_y) y  <= y_i;
      if (ena_r) xo <= x;
      rdy <= set_rdy;
    end
  end

  a_ready_equal: assert property (@(posedge clk) disable iff (!arst_n)
    set_rdy |-> (x == y));

endmodule
