// tb_gcd_worst: longest 16-bit operations on all seven units of gcd_top.
//
// gcd(65535, 1) and gcd(1, 65535) need 65534 subtractions each, the most any
// pair of non-zero 16-bit operands needs; gcd(65535, 65534) needs 65534 too,
// ending at (1, 1). Each unit gets the three operations through its own
// gcd_tb_pkg::gcd_driver, which checks the result, the exact edge count from
// load to rdy (up to 3 * 65534 + 2 for gcd_rtl1) and the rdy shape. All units
// run in parallel at gcd_top's default parameters.
module tb_gcd_worst;
  import gcd_pkg::*;
  import gcd_tb_pkg::*;

  localparam int unsigned NV = N_VARIANTS;
  localparam int unsigned WATCHDOG_CYCLES = 700_000;

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

  int unsigned checks = 0, failures = 0;

  initial begin
    repeat (2) @(negedge clk);
    arst_n = 1'b1;
    for (int i = 0; i < int'(NV); i++) begin
      fork
        automatic int k = i;
        begin
          drv[k].idle(2);
          drv[k].run_op(16'hFFFF, 16'h0001);
          drv[k].run_op(16'h0001, 16'hFFFF);
          drv[k].run_op(16'hFFFF, 16'hFFFE);
        end
      join_none
    end
    wait fork;
    for (int i = 0; i < int'(NV); i++) begin
      checks++;
      if (drv[i].n_sub_xy + drv[i].n_sub_yx != 3 * 65534) begin
        failures++;
        $display("FAIL %s: %0d subtractions counted", drv[i].v.name(),
                 drv[i].n_sub_xy + drv[i].n_sub_yx);
      end
      checks   += drv[i].checks;
      failures += drv[i].failures;
    end
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
