// tb_gcd_bfsm: self-checking testbench for gcd_bfsm at WIDTH = 16.
//
// Runs directed cases (equal operands, 1, operands above 2^15, both orders)
// and random operand pairs through gcd_tb_pkg::gcd_driver, which compares
// each result with Euclid's algorithm, checks the clock-edge count from load
// to rdy against the unit's timing (gcd_tb_pkg::latency), how long rdy
// stays up, and the result period with rst held at 0. A watchdog ends the
// run with a failure if it hangs.
module tb_gcd_bfsm;
  import gcd_pkg::*;
  import gcd_tb_pkg::*;

  localparam int unsigned WATCHDOG_CYCLES = 200_000;

  logic clk = 1'b0;
  logic arst_n = 1'b0;
  always #5 clk = ~clk;

  gcd_if #(.WIDTH(16)) bus (.clk(clk));

  gcd_bfsm #(.WIDTH(16)) dut (
    .clk   (clk),
    .arst_n(arst_n),
    .rst   (bus.rst),
    .xi    (bus.xi),
    .yi    (bus.yi),
    .xo    (bus.xo),
    .rdy   (bus.rdy)
  );

  gcd_driver drv;

  initial begin
    bus.rst = 1'b1;
    bus.xi  = '0;
    bus.yi  = '0;
    drv = new(bus, V_BFSM);
    repeat (2) @(negedge clk);
    drv.check(bus.rdy == 1'b0 && bus.xo == '0, "outputs cleared by arst_n");
    arst_n = 1'b1;
    drv.run_suite(60);
    $display("TB_RESULT checks=%0d failures=%0d", drv.checks, drv.failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG_CYCLES) @(posedge clk);
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", drv.checks, drv.failures + 1);
    $finish;
  end
endmodule
