// gcd_tb_pkg: reference model and driver used by all GCD testbenches.
//
// Reference: gcd_ref() uses Euclid's remainder algorithm, and sub_count()
// gives the number of subtractions the hardware's subtract-the-smaller loop
// performs, from the quotients of the same remainder sequence: each step
// a = q*b + r costs q subtractions, except the last (r = 0), which stops at
// x = y after q - 1. Neither repeats the hardware's loop.
//
// Timing model, in clock edges counted from the edge that loads xi/yi:
//   latency(v, n)    edges until rdy = 1 with the result in xo
//   rdy_cycles(v)    how long rdy stays 1 (0 = until the next load)
//   period(v, n)     edges between results when rst is held at 0
//
// gcd_driver runs one operation on a unit through a virtual gcd_if and
// checks result, latency and the shape of rdy, counting checks and
// failures. It also counts how often each mechanism was exercised.
package gcd_tb_pkg;

  import gcd_pkg::*;

  localparam int unsigned W = 16;

  function automatic longint unsigned gcd_ref(logic [W-1:0] x, logic [W-1:0] y);
    longint unsigned a = 64'(x), b = 64'(y), t;
    while (b != 0) begin
      t = a % b;
      a = b;
      b = t;
    end
    return a;
  endfunction

  function automatic int unsigned sub_count(logic [W-1:0] x, logic [W-1:0] y);
    longint unsigned a = 64'(x), b = 64'(y), t;
    int unsigned     n = 0;
    if (a < b) begin t = a; a = b; b = t; end
    while (b != 0) begin
      n += int'(a / b);
      t = a % b;
      a = b;
      b = t;
    end
    return n - 1;
  endfunction

  function automatic int unsigned latency(variant_e v, int unsigned n);
    case (v)
      V_RTL1:  return 3 * n + 2;
      V_RTL2:  return 2 * n + 2;
      default: return n + 1;
    endcase
  endfunction

  function automatic int unsigned rdy_cycles(variant_e v);
    case (v)
      V_BHVC, V_BFSM: return 0;
      V_RTL1, V_RTL2: return 1;
      default:        return 2;
    endcase
  endfunction

  function automatic int unsigned period(variant_e v, int unsigned n);
    // one extra edge to load again; bfsm and rtl3..5 also pass S_READY
    case (v)
      V_BHVC, V_RTL1, V_RTL2: return latency(v, n) + 1;
      default:                return latency(v, n) + 2;
    endcase
  endfunction

  class gcd_driver;
    virtual gcd_if #(W) vif;
    variant_e          v;
    int unsigned       checks;
    int unsigned       failures;
    // mechanism counters
    int unsigned       n_hold;      // cycles spent waiting with rst = 1
    int unsigned       n_sub_xy;    // x <= x - y steps
    int unsigned       n_sub_yx;    // y <= y - x steps
    int unsigned       n_equal;     // operations with x = y at load
    int unsigned       n_ready;     // results delivered
    int unsigned       n_restart;   // back-to-back loads with rst held at 0
    int unsigned       n_wide;      // operands with the top bit set

    function new(virtual gcd_if #(W) vif, variant_e v);
      this.vif = vif;
      this.v   = v;
    endfunction

    function void check(bit ok, string what);
      checks++;
      if (!ok) begin
        failures++;
        $display("FAIL [%s] %s", v.name(), what);
      end
    endfunction

    // Count the subtraction kinds the reference loop would perform.
    function void count_steps(logic [W-1:0] a, logic [W-1:0] b);
      while (a != b) begin
        if (a < b) begin b -= a; n_sub_yx++; end
        else       begin a -= b; n_sub_xy++; end
      end
    endfunction

    task automatic idle(int unsigned cycles);
      vif.rst = 1'b1;
      repeat (cycles) begin
        @(negedge vif.clk);
        n_hold++;
      end
    endtask

    // One operation: the unit must be in its wait state. Loads a, b on the
    // next edge, then checks latency, result and how long rdy stays up.
    task automatic run_op(logic [W-1:0] a, logic [W-1:0] b);
      int unsigned n, cnt, hi;
      longint unsigned g;
      n = sub_count(a, b);
      g = gcd_ref(a, b);
      @(negedge vif.clk);
      vif.xi  = a;
      vif.yi  = b;
      vif.rst = 1'b0;
      @(negedge vif.clk);          // load edge has passed
      vif.rst = 1'b1;
      vif.xi  = W'($urandom);      // inputs must not matter after the load
      vif.yi  = W'($urandom);
      cnt = 0;
      while (!vif.rdy && cnt < 4 * n + 16) begin
        @(negedge vif.clk);
        cnt++;
      end
      check(vif.rdy == 1'b1, $sformatf("rdy for gcd(%0d,%0d)", a, b));
      check(vif.xo == W'(g), $sformatf("gcd(%0d,%0d) = %0d, expected %0d", a, b, vif.xo, g));
      check(cnt == latency(v, n), $sformatf("gcd(%0d,%0d): %0d edges, expected %0d",
                                            a, b, cnt, latency(v, n)));
      hi = 0;
      while (vif.rdy && hi < 6) begin
        @(negedge vif.clk);
        hi++;
        if (vif.rdy) check(vif.xo == W'(g), "xo held while rdy");
      end
      if (rdy_cycles(v) == 0) check(hi == 6, $sformatf("rdy held until next load (%0d)", hi));
      else                    check(hi == rdy_cycles(v), $sformatf("rdy high %0d cycles", hi));
      if (a == b) n_equal++;
      if (a[W-1] || b[W-1]) n_wide++;
      count_steps(a, b);
      n_ready++;
      idle(2);
    endtask

    // Hold rst at 0 with fixed operands: the unit restarts by itself and
    // delivers a result every period(v, n) edges.
    task automatic free_run(logic [W-1:0] a, logic [W-1:0] b, int unsigned results);
      int unsigned n, cnt, got;
      bit          last;
      n = sub_count(a, b);
      @(negedge vif.clk);
      vif.xi  = a;
      vif.yi  = b;
      vif.rst = 1'b0;
      got  = 0;
      cnt  = 0;
      last = vif.rdy;
      while (got <= results && cnt < 8 * (n + 4) * (results + 2)) begin
        @(negedge vif.clk);
        cnt++;
        if (vif.rdy && !last) begin
          if (got > 0) begin
            check(cnt == period(v, n), $sformatf("free-run period %0d, expected %0d",
                                                 cnt, period(v, n)));
            check(vif.xo == W'(gcd_ref(a, b)), "free-run result");
            n_restart++;
          end
          got++;
          cnt = 0;
        end
        last = vif.rdy;
      end
      check(got > results, "free-run produced results");
      // let the unit finish and settle back in its wait state
      vif.rst = 1'b1;
      while (!vif.rdy) @(negedge vif.clk);
      idle(8);
    endtask

    // A mix of directed and random operations.
    task automatic run_suite(int unsigned n_random);
      logic [W-1:0] a, b;
      idle(3);
      run_op(16'd12, 16'd18);
      run_op(16'd18, 16'd12);
      run_op(16'd7, 16'd7);         // x = y at once: no subtraction
      run_op(16'd1, 16'd1);
      run_op(16'd1, 16'd9);
      run_op(16'd100, 16'd1);
      run_op(16'hF000, 16'h9000);   // operands above 2^15
      run_op(16'hFFFF, 16'hFFFF);
      run_op(16'h9000, 16'h1000);
      run_op(16'h1000, 16'h9000);
      run_op(16'd270, 16'd192);
      idle(5);                       // a longer wait with rst = 1
      for (int i = 0; i < int'(n_random); i++) begin
        // keep the subtraction count bounded: the smaller operand is at
        // least 2^(W-8) unless the draw is a small one
        a = W'($urandom);
        b = W'($urandom);
        if (i % 3 == 0) begin a = W'($urandom_range(1, 255)); b = W'($urandom_range(1, 255)); end
        else begin
          if (a < 16'h0100) a = a | 16'h0100;
          if (b < 16'h0100) b = b | 16'h0100;
        end
        run_op(a, b);
      end
      free_run(16'd21, 16'd6, 3);
    endtask

  endclass

endpackage
