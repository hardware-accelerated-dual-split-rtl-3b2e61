// plane_compare: plane comparison and return value logic, the last three stages of the
// dual-split intersection pipeline.
//
// Inputs are the two ray-plane distances t1 (near plane) and t2 (far plane), the ray range
// [tmin, tmax], the node type, the ray-relative corner case and the header's leaf bit.
//   Stage 1: two comparators give near_hit = (t1 >= tmin) and far_hit = (t2 <= tmax), and a
//            select block routes each distance either into the 3-way max (an entry plane, it
//            can raise tmin) or into the 3-way min (an exit plane, it can lower tmax); unused
//            inputs are filled with tmin or tmax themselves.
//              split          near child kept if near_hit: t1 bounds its tmax;
//                             far child kept if far_hit:   t2 bounds its tmin
//              single carve   t1 entry, t2 exit
//              dual carve     per the corner case (bit 0: plane 1 entry, bit 1: plane 2 entry)
//              leaf           neither (range passes through unchanged)
//   Stage 2: the 3-way FPMAX and FPMIN give tmin_out and tmax_out.
//   Stage 3: a third comparator tests tmin_out <= tmax_out (an empty range culls a carving
//            node) and return_value_logic forms the 2-bit return code.
// For a split node hitting both children, tmin_out is the far child's tmin and tmax_out the
// near child's tmax; each child shares its other end with the parent range. The data flow
// follows the document; the placement of the two stage registers is this design's choice.
// Latency 3 cycles, one new set of inputs per cycle, no enable, no reset.
module plane_compare
  import dst_pkg::*;
(
  input  logic       clk,
  input  f32_t       t1,
  input  f32_t       t2,
  input  f32_t       tmin,
  input  f32_t       tmax,
  input  node_type_e node_type,
  input  corner_e    corner,
  input  logic       leaf_bit,
  output f32_t       tmin_out,
  output f32_t       tmax_out,
  output logic       near_hit,
  output logic [1:0] ret
);

  // ---------------- stage 1: comparison flags and 3-way input selection ----------------
  logic lt1, eq1, gt1, un1, lt2, eq2, gt2, un2;
  logic ge1, le2;
  logic t1_entry, t1_exit, t2_entry, t2_exit;

  fp_cmp u_cmp_t1 (.a(t1), .b(tmin), .lt(lt1), .eq(eq1), .gt(gt1), .unordered(un1));
  fp_cmp u_cmp_t2 (.a(t2), .b(tmax), .lt(lt2), .eq(eq2), .gt(gt2), .unordered(un2));

  always_comb begin
    ge1 = gt1 | eq1;
    le2 = lt2 | eq2;
    t1_entry = 1'b0; t1_exit = 1'b0; t2_entry = 1'b0; t2_exit = 1'b0;
    unique case (node_type)
      NODE_SPLIT:  begin t1_exit = ge1; t2_entry = le2; end
      NODE_CARVE1: begin t1_entry = 1'b1; t2_exit = 1'b1; end
      NODE_CARVE2: begin
        t1_entry = corner[0];  t1_exit = !corner[0];
        t2_entry = corner[1];  t2_exit = !corner[1];
      end
      default: ;
    endcase
  end

  f32_t       s1_max_a, s1_max_b, s1_max_c, s1_min_a, s1_min_b, s1_min_c;
  node_type_e s1_type;
  logic       s1_leaf, s1_near, s1_far;

  always_ff @(posedge clk) begin
    s1_max_a <= tmin;
    s1_max_b <= t1_entry ? t1 : tmin;
    s1_max_c <= t2_entry ? t2 : tmin;
    s1_min_a <= tmax;
    s1_min_b <= t1_exit ? t1 : tmax;
    s1_min_c <= t2_exit ? t2 : tmax;
    s1_type  <= node_type;
    s1_leaf  <= leaf_bit;
    s1_near  <= ge1;
    s1_far   <= le2;
  end

  // ---------------- stage 2: 3-way FPMAX / FPMIN ----------------
  f32_t max_y, min_y;
  fp_minmax3 #(.IS_MAX(1'b1)) u_max3 (.a(s1_max_a), .b(s1_max_b), .c(s1_max_c), .y(max_y));
  fp_minmax3 #(.IS_MAX(1'b0)) u_min3 (.a(s1_min_a), .b(s1_min_b), .c(s1_min_c), .y(min_y));

  f32_t       s2_tmin, s2_tmax;
  node_type_e s2_type;
  logic       s2_leaf, s2_near, s2_far;

  always_ff @(posedge clk) begin
    s2_tmin <= max_y;
    s2_tmax <= min_y;
    s2_type <= s1_type;
    s2_leaf <= s1_leaf;
    s2_near <= s1_near;
    s2_far  <= s1_far;
  end

  // ---------------- stage 3: culling test and return value ----------------
  logic       lt3, eq3, gt3, un3;
  logic [1:0] ret_d;

  fp_cmp u_cmp_range (.a(s2_tmin), .b(s2_tmax), .lt(lt3), .eq(eq3), .gt(gt3), .unordered(un3));

  return_value_logic u_ret (
    .node_type (s2_type),
    .near_hit  (s2_near),
    .far_hit   (s2_far),
    .range_ok  (lt3 | eq3),
    .leaf_bit  (s2_leaf),
    .ret       (ret_d)
  );

  always_ff @(posedge clk) begin
    tmin_out <= s2_tmin;
    tmax_out <= s2_tmax;
    near_hit <= s2_near;
    ret      <= ret_d;
  end

endmodule
