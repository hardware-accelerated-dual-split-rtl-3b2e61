// dst_pipeline: hardware dual-split intersection pipeline.
//
// One node test of a dual-split tree traversal per clock. A test takes the node's
// header-offset word and its two planes together with the ray (inverse direction, origin,
// current range [tmin, tmax]) and, 8 cycles later, returns
//   out_ret           0 = miss (pop the stack), 1 = one child, 2 = both children, 3 = leaf
//   out_offset        next node to visit (or, for a leaf / carving leaf, its triangle list)
//   out_offset_stack  child to push when both children are hit (the far child)
//   out_tmin/out_tmax the updated ray range (for 2: far child's tmin / near child's tmax)
// Every node type runs through the same datapath, so the traversal loop has no branch on the
// node type:
//   cycle 1     ray_plane_select: header decode, component and plane selection, corner case
//   cycles 2-3  two FP subtractors: plane - origin
//   cycles 4-5  two FP multipliers: (plane - origin) * invdir = t1, t2
//   cycles 6-8  plane_compare: comparisons, 3-way min/max, culling test, return value
// offset_compute turns the header offset, left child size, ray sign and the t1 >= tmin flag
// into the two offsets at the output. Unit count and the 8-cycle latency follow the document;
// the valid/tag interface, the absence of back-pressure and the placement of the non-FP
// stage registers are this design's own. Only the valid bits are reset.
//
// Interface: present a test with in_valid = 1 for one cycle (any number of consecutive
// cycles); out_valid rises exactly LATENCY cycles later with the same in_tag.
module dst_pipeline
  import dst_pkg::*;
#(
  parameter int TAG_W = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [TAG_W-1:0] in_tag,
  input  logic [31:0]      in_header_offset,
  input  f32_t             in_plane1,
  input  f32_t             in_plane2,
  input  vec3_t            in_invdir,
  input  vec3_t            in_origin,
  input  f32_t             in_tmin,
  input  f32_t             in_tmax,
  output logic             out_valid,
  output logic [TAG_W-1:0] out_tag,
  output logic [1:0]       out_ret,
  output logic [31:0]      out_offset,
  output logic [31:0]      out_offset_stack,
  output f32_t             out_tmin,
  output f32_t             out_tmax
);

  localparam int LATENCY = 8;

  // data that rides alongside the floating-point units
  typedef struct packed {
    logic [TAG_W-1:0] tag;
    logic [OFS_W-1:0] offset;
    logic [1:0]       left_size;
    logic             ray_sign1;
    logic             leaf_bit;
    node_type_e       ntype;
    corner_e          corner;
    f32_t             tmin;
    f32_t             tmax;
  } side_t;

  // ---------------- cycle 1: selection ----------------
  f32_t       sel_inv1, sel_inv2, sel_org1, sel_org2, sel_near, sel_far;
  logic       sel_sign1, sel_leaf;
  node_type_e sel_type;
  corner_e    sel_corner;
  logic [1:0] sel_size;

  ray_plane_select u_select (
    .header     (in_header_offset[31:26]),
    .plane1     (in_plane1),
    .plane2     (in_plane2),
    .invdir     (in_invdir),
    .origin     (in_origin),
    .invdir1    (sel_inv1),
    .invdir2    (sel_inv2),
    .origin1    (sel_org1),
    .origin2    (sel_org2),
    .near_plane (sel_near),
    .far_plane  (sel_far),
    .ray_sign1  (sel_sign1),
    .node_type  (sel_type),
    .corner     (sel_corner),
    .left_size  (sel_size),
    .leaf_bit   (sel_leaf)
  );

  f32_t  r1_inv1, r1_inv2, r1_org1, r1_org2, r1_near, r1_far;
  side_t side_d;
  side_t side_q [1:LATENCY];
  logic  valid_q [1:LATENCY];

  always_comb begin
    side_d.tag       = in_tag;
    side_d.offset    = in_header_offset[OFS_W-1:0];
    side_d.left_size = sel_size;
    side_d.ray_sign1 = sel_sign1;
    side_d.leaf_bit  = sel_leaf;
    side_d.ntype     = sel_type;
    side_d.corner    = sel_corner;
    side_d.tmin      = in_tmin;
    side_d.tmax      = in_tmax;
  end

  always_ff @(posedge clk) begin
    r1_inv1 <= sel_inv1;
    r1_inv2 <= sel_inv2;
    r1_org1 <= sel_org1;
    r1_org2 <= sel_org2;
    r1_near <= sel_near;
    r1_far  <= sel_far;
    side_q[1] <= side_d;
    for (int i = 2; i <= LATENCY; i++) side_q[i] <= side_q[i-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i <= LATENCY; i++) valid_q[i] <= 1'b0;
    end else begin
      valid_q[1] <= in_valid;
      for (int i = 2; i <= LATENCY; i++) valid_q[i] <= valid_q[i-1];
    end
  end

  // ---------------- cycles 2-3: plane - origin ----------------
  f32_t d1, d2;
  fp_add u_add1 (.clk(clk), .a(r1_near), .b(r1_org1), .sub(1'b1), .y(d1));
  fp_add u_add2 (.clk(clk), .a(r1_far),  .b(r1_org2), .sub(1'b1), .y(d2));

  f32_t r2_inv1, r2_inv2, r3_inv1, r3_inv2;
  always_ff @(posedge clk) begin
    r2_inv1 <= r1_inv1;
    r2_inv2 <= r1_inv2;
    r3_inv1 <= r2_inv1;
    r3_inv2 <= r2_inv2;
  end

  // ---------------- cycles 4-5: distances t1, t2 ----------------
  f32_t t1, t2;
  fp_mul u_mul1 (.clk(clk), .a(d1), .b(r3_inv1), .y(t1));
  fp_mul u_mul2 (.clk(clk), .a(d2), .b(r3_inv2), .y(t2));

  // ---------------- cycles 6-8: plane comparison and return value ----------------
  logic near_hit;
  plane_compare u_compare (
    .clk       (clk),
    .t1        (t1),
    .t2        (t2),
    .tmin      (side_q[5].tmin),
    .tmax      (side_q[5].tmax),
    .node_type (side_q[5].ntype),
    .corner    (side_q[5].corner),
    .leaf_bit  (side_q[5].leaf_bit),
    .tmin_out  (out_tmin),
    .tmax_out  (out_tmax),
    .near_hit  (near_hit),
    .ret       (out_ret)
  );

  // ---------------- offsets ----------------
  offset_compute u_offset (
    .offset       (side_q[LATENCY].offset),
    .left_size    (side_q[LATENCY].left_size),
    .ray_sign     (side_q[LATENCY].ray_sign1),
    .near_hit     (near_hit),
    .is_split     (side_q[LATENCY].ntype == NODE_SPLIT),
    .offset_out   (out_offset),
    .offset_stack (out_offset_stack)
  );

  assign out_valid = valid_q[LATENCY];
  assign out_tag   = side_q[LATENCY].tag;

endmodule
