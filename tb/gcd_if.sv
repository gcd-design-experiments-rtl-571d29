// gcd_if: the pin bundle shared by all GCD units, as seen by a testbench.
// Carries the per-unit signals (rst, xi, yi, xo, rdy) together with the
// clock, so a driver class can reach any unit through a virtual interface.
interface gcd_if #(
  parameter int unsigned WIDTH = 16
) (
  input logic clk
);
  logic             rst;
  logic [WIDTH-1:0] xi;
  logic [WIDTH-1:0] yi;
  logic [WIDTH-1:0] xo;
  logic             rdy;
endinterface
