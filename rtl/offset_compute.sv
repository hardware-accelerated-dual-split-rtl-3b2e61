// offset_compute: child offsets of a dual-split node test.
//
// The left child sits at the header's 26-bit offset; because siblings are stored next to each
// other in depth-first order, the right child sits at offset + left child size (an integer
// adder on the 2-bit size field). The ray sign along the split axis maps left/right to
// near/far: a positive direction (sign bit 0) visits the left child first. The far child is
// always reported as offset_stack (used when both children are hit). offset_out is the near
// child when the near child is hit (t1 >= tmin), else the far child; for any node that is not
// a split node (carving nodes and leaves) it is the header offset itself, which then points to
// the single child or to the leaf's triangle list. The structure follows the document; the
// offset unit (same as the size unit) is an assumption. Combinational; offsets are returned
// zero-extended to 32 bits.
module offset_compute
  import dst_pkg::*;
(
  input  logic [OFS_W-1:0] offset,
  input  logic [1:0]       left_size,
  input  logic             ray_sign,
  input  logic             near_hit,
  input  logic             is_split,
  output logic [31:0]      offset_out,
  output logic [31:0]      offset_stack
);

  logic [31:0] left_ofs, right_ofs, near_ofs, far_ofs;

  always_comb begin
    left_ofs     = 32'(offset);
    right_ofs    = left_ofs + 32'(left_size);
    near_ofs     = ray_sign ? right_ofs : left_ofs;
    far_ofs      = ray_sign ? left_ofs  : right_ofs;
    offset_stack = far_ofs;
    offset_out   = !is_split ? left_ofs : (near_hit ? near_ofs : far_ofs);
  end

endmodule
