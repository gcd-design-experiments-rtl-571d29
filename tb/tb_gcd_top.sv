// tb_gcd_top: end-to-end testbench for gcd_top at its default parameters.
//
// Drives all seven GCD units at once, each through its own slice of the top's
// port arrays and its own gcd_tb_pkg::gcd_driver running the full suite of
// directed and random operations (result against Euclid's algorithm, clock
// edges from load to rdy against each unit's timing, rdy shape, result
// period with rst held at 0). It then checks that every mechanism was
// exercised in every unit: waiting with rst = 1, x - y steps, y - x steps,
// operands equal at load, operands above 2^15, results delivered, and
// back-to-back restarts; plus, observed inside the units, the separate
// compare state of gcd_rtl1 and the two-cycle rdy of gcd_rtl3..5.
module tb_gcd_top;
  import gcd_pkg::*;
  import gcd_tb_pkg::*;

  localparam int unsigned NV = N_VARIANTS;
  localparam int unsigned WATCHDOG_CYCLES = 300_000;

  logic clk = 1'b0;
  logic arst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NV-1:0]         rst;
  logic [NV-1:0][15:0]   xi, yi, xo;
  logic [NV-1:0]         rdy;

  gcd_top dut (
    .clk   (clk),
    .arst_n(arst_n),
    .rst   (rst),
    .xi    (xi),
    .yi    (yi),
    .xo    (xo),
    .rdy   (rdy)
  );

  gcd_driver drv [NV];

  for (genvar i = 0; i < NV; i++) begin : g_unit
    gcd_if #(.WIDTH(16)) bus (.clk(clk));
    assign rst[i]  = bus.rst;
    assign xi[i]   = bus.xi;
    assign yi[i]   = bus.yi;
    assign bus.xo  = xo[i];
    assign bus.rdy = rdy[i];
    initial begin
      bus.rst = 1'b1;
      bus.xi  = '0;
      bus.yi  = '0;
      drv[i] = new(bus, variant_e'(i));
    end
  end

  // Mechanisms observed inside the units
  int unsigned n_comp_state = 0;  // gcd_rtl1 in its separate compare state
  int unsigned n_rdy_two    = 0;  // rdy of gcd_rtl3 high two cycles running
  always @(posedge clk) begin
    if (arst_n && dut.u_rtl1.state.name() == "S_COMP") n_comp_state++;
    if (arst_n && dut.u_rtl3.rdy && dut.u_rtl3.state.name() == "S_WAIT") n_rdy_two++;
  end

  int unsigned checks = 0, failures = 0;

  function automatic void need(int unsigned count, string what);
    checks++;
    $display("  %-36s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    arst_n = 1'b1;
    for (int i = 0; i < int'(NV); i++) begin
      fork
        automatic int k = i;
        drv[k].run_suite(30);
      join_none
    end
    wait fork;
    for (int i = 0; i < int'(NV); i++) begin
      $display("%s:", drv[i].v.name());
      need(drv[i].n_hold,    "wait cycles with rst = 1");
      need(drv[i].n_sub_xy,  "x <= x - y steps");
      need(drv[i].n_sub_yx,  "y <= y - x steps");
      need(drv[i].n_equal,   "operations with x = y at load");
      need(drv[i].n_wide,    "operations with operands >= 2^15");
      need(drv[i].n_ready,   "results delivered");
      need(drv[i].n_restart, "restarts with rst held at 0");
      checks   += drv[i].checks;
      failures += drv[i].failures;
    end
    need(n_comp_state, "gcd_rtl1 compare-state cycles");
    need(n_rdy_two,    "gcd_rtl3 second rdy cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG_CYCLES) @(posedge clk);
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
