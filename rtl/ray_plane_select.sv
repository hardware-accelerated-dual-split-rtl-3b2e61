// ray_plane_select: ray component and plane selection, the first stage of the dual-split
// intersection pipeline.
//
// Every internal node type is tested the same way: two ray-plane distances
//   t1 = (near_plane - origin1) * invdir1,   t2 = (far_plane - origin2) * invdir2.
// This block decodes the 6-bit header into a node type and one or two axes and feeds that
// common datapath:
//   * two multiplexers per ray vector pick component 1 and component 2 of invdir and origin
//     (both the same axis for split and single-axis carving nodes, two different axes for a
//     dual-axis carving node);
//   * for the 1D nodes the planes are swapped when the ray runs in the negative direction, so
//     near_plane is the one the ray meets first (plane1 is the lower plane in the tree);
//   * for a dual-axis carving node the planes stay in order and the stored corner bits are
//     XORed with the two ray signs, giving the ray-relative corner case (which planes are
//     entries, which are exits) used by the plane comparison logic.
// The structure follows the document; field codes are those of dst_pkg. Combinational.
module ray_plane_select
  import dst_pkg::*;
(
  input  logic [HDR_W-1:0] header,
  input  f32_t             plane1,
  input  f32_t             plane2,
  input  vec3_t            invdir,
  input  vec3_t            origin,
  output f32_t             invdir1,
  output f32_t             invdir2,
  output f32_t             origin1,
  output f32_t             origin2,
  output f32_t             near_plane,
  output f32_t             far_plane,
  output logic             ray_sign1,
  output node_type_e       node_type,
  output corner_e          corner,
  output logic [1:0]       left_size,
  output logic             leaf_bit
);

  function automatic f32_t pick(input vec3_t v, input logic [1:0] axis);
    unique case (axis)
      2'd0:    return v.x;
      2'd1:    return v.y;
      default: return v.z;
    endcase
  endfunction

  hdr_info_t info;
  logic      ray_sign2;
  logic      swap;

  always_comb begin
    info       = dst_decode(header);
    node_type  = info.ntype;
    left_size  = info.left_size;
    leaf_bit   = info.leaf_bit;

    invdir1    = pick(invdir, info.axis1);
    invdir2    = pick(invdir, info.axis2);
    origin1    = pick(origin, info.axis1);
    origin2    = pick(origin, info.axis2);
    ray_sign1  = invdir1[31];
    ray_sign2  = invdir2[31];

    swap       = ray_sign1 && (info.ntype == NODE_SPLIT || info.ntype == NODE_CARVE1);
    near_plane = swap ? plane2 : plane1;
    far_plane  = swap ? plane1 : plane2;

    // 0 = plane is an exit for this ray, 1 = an entry (normal opposite to the ray direction)
    corner     = corner_e'({info.corner_bits[1] ^ ray_sign2, info.corner_bits[0] ^ ray_sign1});
  end

endmodule
