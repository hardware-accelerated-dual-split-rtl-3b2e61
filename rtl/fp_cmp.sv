// fp_cmp: combinational single-precision floating-point comparator.
//
// Implements the FP>= / FP<= comparison units of the plane comparison logic. Each operand is
// mapped to an unsigned key that orders all non-NaN floats (negative values bit-inverted,
// positive values with the top bit set, both zeros sharing one key), so the comparison is a
// single 32-bit unsigned compare. IEEE rules: -0 equals +0, and a NaN operand makes lt, eq
// and gt all 0 and sets unordered. The document names the unit only; this realisation is
// this design's choice. No clock, no state.
module fp_cmp
  import dst_pkg::*;
(
  input  f32_t a,
  input  f32_t b,
  output logic lt,
  output logic eq,
  output logic gt,
  output logic unordered
);

  logic [31:0] ka, kb;

  always_comb begin
    ka        = f32_key(a);
    kb        = f32_key(b);
    unordered = f32_is_nan(a) || f32_is_nan(b);
    lt        = !unordered && (ka <  kb);
    eq        = !unordered && (ka == kb);
    gt        = !unordered && (ka >  kb);
  end

endmodule
