// gcd_pkg: constants and types shared by the GCD units.
//
// All seven GCD units compute the greatest common divisor of two unsigned
// operands by repeated subtraction (while x /= y, subtract the smaller from
// the larger). They differ only in how the work is split between data path
// and controller, and therefore in clock steps per iteration. GCD_WIDTH is
// the operand width of the original design (16 bits). variant_e numbers the
// seven units in the order they are usually presented, from the most
// behavioural description to the most hand-built data path; gcd_top uses it
// to index its per-unit port arrays.
package gcd_pkg;

  parameter int unsigned GCD_WIDTH = 16;

  typedef enum logic [2:0] {
    V_BHVC = 3'd0,  // clocked behavioural, four wait-states
    V_BFSM = 3'd1,  // behavioural three-state FSM
    V_RTL1 = 3'd2,  // one universal ALU, 3 steps per iteration
    V_RTL2 = 3'd3,  // one universal ALU, 2 steps per iteration
    V_RTL3 = 3'd4,  // comparator steers one subtracting ALU, 1 step
    V_RTL4 = 3'd5,  // x-y and y-x side by side, ALU gives /=
    V_RTL5 = 3'd6   // two subtractors and a separate /= comparator
  } variant_e;

  parameter int unsigned N_VARIANTS = 7;

endpackage
