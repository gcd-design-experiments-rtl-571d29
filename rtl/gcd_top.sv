// gcd_top: the seven GCD units side by side.
//
// The seven units compute the same function - the greatest common divisor
// of two unsigned WIDTH-bit operands by repeated subtraction - and share
// one port list (clk, rst, xi, yi, xo, rdy). They trade area for clock steps
// per subtraction: gcd_rtl1 (3 steps, one ALU), gcd_rtl2 (2 steps, one ALU),
// and gcd_bhvc, gcd_bfsm, gcd_rtl3, gcd_rtl4, gcd_rtl5 (1 step, with two to
// four arithmetic units). They are independent: each has its own rst, xi, yi,
// xo and rdy, collected here in packed arrays indexed by gcd_pkg::variant_e
// (0 bhvc, 1 bfsm, 2 rtl1, 3 rtl2, 4 rtl3, 5 rtl4, 6 rtl5). clk and the
// active-low asynchronous initialisation arst_n are shared. Placing them in
// one top is this design's choice; it lets one test or one synthesis run
// compare them.
module gcd_top #(
  parameter int unsigned WIDTH = gcd_pkg::GCD_WIDTH
) (
  input  logic                                          clk,
  input  logic                                          arst_n,
  input  logic [gcd_pkg::N_VARIANTS-1:0]                rst,
  input  logic [gcd_pkg::N_VARIANTS-1:0][WIDTH-1:0]     xi,
  input  logic [gcd_pkg::N_VARIANTS-1:0][WIDTH-1:0]     yi,
  output logic [gcd_pkg::N_VARIANTS-1:0][WIDTH-1:0]     xo,
  output logic [gcd_pkg::N_VARIANTS-1:0]                rdy
);

  import gcd_pkg::*;

  gcd_bhvc #(.WIDTH(WIDTH)) u_bhvc (
    .clk(clk), .arst_n(arst_n), .rst(rst[V_BHVC]),
    .xi(xi[V_BHVC]), .yi(yi[V_BHVC]), .xo(xo[V_BHVC]), .rdy(rdy[V_BHVC]));

  gcd_bfsm #(.WIDTH(WIDTH)) u_bfsm (
    .clk(clk), .arst_n(arst_n), .rst(rst[V_BFSM]),
    .xi(xi[V_BFSM]), .yi(yi[V_BFSM]), .xo(xo[V_BFSM]), .rdy(rdy[V_BFSM]));

  gcd_rtl1 #(.WIDTH(WIDTH)) u_rtl1 (
    .clk(clk), .arst_n(arst_n), .rst(rst[V_RTL1]),
    .xi(xi[V_RTL1]), .yi(yi[V_RTL1]), .xo(xo[V_RTL1]), .rdy(rdy[V_RTL1]));

  gcd_rtl2 #(.WIDTH(WIDTH)) u_rtl2 (
    .clk(clk), .arst_n(arst_n), .rst(rst[V_RTL2]),
    .xi(xi[V_RTL2]), .yi(yi[V_RTL2]), .xo(xo[V_RTL2]), .rdy(rdy[V_RTL2]));

  gcd_rtl3 #(.WIDTH(WIDTH)) u_rtl3 (
    .clk(clk), .arst_n(arst_n), .rst(rst[V_RTL3]),
    .xi(xi[V_RTL3]), .yi(yi[V_RTL3]), .xo(xo[V_RTL3]), .rdy(rdy[V_RTL3]));

  gcd_rtl4 #(.WIDTH(WIDTH)) u_rtl4 (
    .clk(clk), .arst_n(arst_n), .rst(rst[V_RTL4]),
    .xi(xi[V_RTL4]), .yi(yi[V_RTL4]), .xo(xo[V_RTL4]), .rdy(rdy[V_RTL4]));

  gcd_rtl5 #(.WIDTH(WIDTH)) u_rtl5 (
    .clk(clk), .arst_n(arst_n), .rst(rst[V_RTL5]),
    .xi(xi[V_RTL5]), .yi(yi[V_RTL5]), .xo(xo[V_RTL5]), .rdy(rdy[V_RTL5]));

endmodule
