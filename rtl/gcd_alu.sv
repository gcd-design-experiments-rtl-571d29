// gcd_alu: the universal subtract / less-than / not-equal unit of the GCD
// data paths.
//
// alu_o = alu_1 - alu_2 (modulo 2^WIDTH). The subtraction is done one bit
// wider than the operands, with both operands zero-extended, so the extra top
// bit is the borrow and alu_lt = (alu_1 < alu_2) holds for every operand
// value. (Taking the top bit of a WIDTH-bit difference, as a sign, is only
// right while both operands are below 2^(WIDTH-1); the wider subtractor is
// this design's choice.) alu_ne = (alu_1 /= alu_2) is the OR of all
// difference bits, so the same subtractor also serves as the not-equal
// comparator. Purely combinational; no clock.
//
// Used as the shared ALU of gcd_rtl1 and gcd_rtl2 (all three outputs) and as
// the '-' / '/=' unit of gcd_rtl3 and gcd_rtl4 (alu_lt unused there).
module gcd_alu #(
  parameter int unsigned WIDTH = gcd_pkg::GCD_WIDTH
) (
  input  logic [WIDTH-1:0] alu_1,
  input  logic [WIDTH-1:0] alu_2,
  output logic [WIDTH-1:0] alu_o,
  output logic             alu_lt,
  output logic             alu_ne
);

  logic [WIDTH:0] diff;

  always_comb begin
    diff   = {1'b0, alu_1} - {1'b0, alu_2};
    alu_o  = diff[WIDTH-1:0];
    alu_lt = diff[WIDTH];
    alu_ne = |diff[WIDTH-1:0];
  end

endmodule
