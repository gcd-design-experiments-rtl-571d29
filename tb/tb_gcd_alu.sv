// tb_gcd_alu: self-checking testbench for the combinational gcd_alu.
// Applies corner values (0, 1, 2^15 - 1, 2^15, 2^16 - 1 in all pairs) and
// random pairs, and compares alu_o, alu_lt and alu_ne with the difference,
// less-than and not-equal worked out with 32-bit integer arithmetic.
module tb_gcd_alu;
  localparam int unsigned WIDTH = 16;

  logic [WIDTH-1:0] a, b, o;
  logic             lt, ne;
  int unsigned      checks = 0, failures = 0;

  gcd_alu #(.WIDTH(WIDTH)) dut (.alu_1(a), .alu_2(b), .alu_o(o), .alu_lt(lt), .alu_ne(ne));

  task automatic apply(int unsigned va, int unsigned vb);
    int unsigned exp_o;
    a = WIDTH'(va);
    b = WIDTH'(vb);
    #1;
    exp_o = (va + 32'h1_0000 - vb) & 32'hFFFF;
    checks++;
    if (o != WIDTH'(exp_o) || lt != (va < vb) || ne != (va != vb)) begin
      failures++;
      $display("FAIL a=%0d b=%0d: o=%0d lt=%0b ne=%0b", va, vb, o, lt, ne);
    end
  endtask

  initial begin
    automatic int unsigned corners[5] = '{0, 1, 32'h7FFF, 32'h8000, 32'hFFFF};
    foreach (corners[i]) foreach (corners[j]) apply(corners[i], corners[j]);
    repeat (5000) apply($urandom & 32'hFFFF, $urandom & 32'hFFFF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
