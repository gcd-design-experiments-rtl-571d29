// gcd_rtl3: GCD where a comparator steers one subtracting ALU
// (1 clock step per subtraction).
//
// Data path: a comparator gives sub_y_x = (x < y). It drives the operand
// multiplexers, so the ALU always forms larger minus smaller (y - x or
// x - y), and it picks which register takes the difference:
//   ena_x = (!sub_y_x & ena_xy) | xi_yi_sel
//   ena_y = ( sub_y_x & ena_xy) | xi_yi_sel
// The ALU's alu_ne (difference non-zero, i.e. x /= y) is the only status the
// controller needs; its alu_lt output is not used.
//
// Controller, three states, control signals default to 0:
//   S_WAIT  : while rst = 1 stay; on rst = 0 load both registers -> S_START.
//   S_START : alu_ne = 1 -> ena_xy (one subtraction), stay;
//             alu_ne = 0 -> xo <= x, rdy <= 1, -> S_READY.
//   S_READY : xo <= x, rdy <= 1 again, -> S_WAIT.
//
// Timing: from the edge that loads the operands, xo is valid with rdy = 1
// after n + 1 edges for n subtractions, and rdy stays 1 for two cycles
// because both S_START and S_READY raise set_rdy. The structure follows the
// original description; arst_n (asynchronous initialisation) is this
// design's addition. Zero operands never finish, as in the original.
module gcd_rtl3 #(
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

  state_e           state, next_state;
  logic [WIDTH-1:0] x, y;
  logic [WIDTH-1:0] alu_1, alu_2, alu_o, x_i, y_i;
  logic             alu_ne, alu_lt_unused;
  logic             ena_xy, ena_x, ena_y, ena_r, set_rdy, xi_yi_sel, sub_y_x;

  // Controller: next state and control signals
  always_comb begin
    ena_xy     = 1'b0;
    ena_r      = 1'b0;
    set_rdy    = 1'b0;
    xi_yi_sel  = 1'b0;
    next_state = state;
    unique case (state)
      S_WAIT: if (!rst) begin
        xi_yi_sel  = 1'b1;
        ena_xy     = 1'b1;
        next_state = S_START;
      end
      S_START: begin
        if (alu_ne) begin
          ena_xy = 1'b1;
        end else begin
          ena_r      = 1'b1;
          set_rdy    = 1'b1;
          next_state = S_READY;
        end
      end
      S_READY: begin
        ena_r      = 1'b1;
        set_rdy    = 1'b1;
        next_state = S_WAIT;
      end
      default: next_state = S_WAIT;
    endcase
  end

  // Comparator (less-than) and the subtracting ALU
  assign sub_y_x = (x < y);
  assign alu_1   = sub_y_x ? y : x;
  assign alu_2   = sub_y_x ? x : y;

  gcd_alu #(.WIDTH(WIDTH)) u_alu (
    .alu_1 (alu_1),
    .alu_2 (alu_2),
    .alu_o (alu_o),
    .alu_lt(alu_lt_unused),
    .alu_ne(alu_ne)
  );

  // Input multiplexers and register enables
  assign x_i   = xi_yi_sel ? xi : alu_o;
  assign y_i   = xi_yi_sel ? yi : alu_o;
  assign ena_x = (!sub_y_x && ena_xy) || xi_yi_sel;
  assign ena_y = ( sub_y_x && ena_xy) || xi_yi_sel;

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
