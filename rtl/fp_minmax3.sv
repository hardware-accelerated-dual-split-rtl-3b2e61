// fp_minmax3: combinational 3-input floating-point maximum (IS_MAX = 1) or minimum (IS_MAX = 0).
//
// The 3-way FPMAX and FPMIN units of the plane comparison logic, which trim the ray range
// against up to two planes and the current tmin / tmax at once (a dual-axis carving node can
// move tmin past two entry planes, or tmax before two exit planes). Built as two cascaded
// compare-and-select stages using fp_cmp: y = sel(sel(a, b), c). On a tie the earlier operand
// is kept. A NaN operand is never preferred over a number in a stage where the other operand
// is a number and is the first one; NaN inputs are not expected from the pipeline's finite
// planes. The document gives only the unit's function; the cascade is this design's choice.
module fp_minmax3
  import dst_pkg::*;
#(
  parameter bit IS_MAX = 1'b1
) (
  input  f32_t a,
  input  f32_t b,
  input  f32_t c,
  output f32_t y
);

  logic lt_ab, eq_ab, gt_ab, un_ab;
  logic lt_mc, eq_mc, gt_mc, un_mc;
  f32_t m;

  fp_cmp u_cmp_ab (.a(a), .b(b), .lt(lt_ab), .eq(eq_ab), .gt(gt_ab), .unordered(un_ab));
  assign m = (IS_MAX ? lt_ab : gt_ab) ? b : a;

  fp_cmp u_cmp_mc (.a(m), .b(c), .lt(lt_mc), .eq(eq_mc), .gt(gt_mc), .unordered(un_mc));
  assign y = (IS_MAX ? lt_mc : gt_mc) ? c : m;

endmodule
