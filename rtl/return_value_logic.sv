// return_value_logic: forms the 2-bit traversal return code of a dual-split node test.
//
// Return codes: 0 = no intersection (pop the traversal stack), 1 = one child to visit,
// 2 = both children hit (visit one, push the other), 3 = leaf (visit its triangles).
// For a split node the code is the number of children hit, from the two plane comparisons
// near_hit (t1 >= tmin) and far_hit (t2 <= tmax). For a carving node it is 0 when the
// trimmed range is empty (range_ok = tmin_out <= tmax_out is false), otherwise 3 when the
// header's leaf bit says the carving node points straight at triangles, else 1. A leaf node
// always returns 3. This follows the document's description; the module is combinational.
module return_value_logic
  import dst_pkg::*;
(
  input  node_type_e node_type,
  input  logic       near_hit,
  input  logic       far_hit,
  input  logic       range_ok,
  input  logic       leaf_bit,
  output logic [1:0] ret
);

  logic [1:0] split_ret;

  always_comb begin
    split_ret = 2'(near_hit) + 2'(far_hit);
    unique case (node_type)
      NODE_SPLIT:               ret = split_ret;
      NODE_CARVE1, NODE_CARVE2: ret = !range_ok ? 2'd0 : (leaf_bit ? 2'd3 : 2'd1);
      default:                  ret = 2'd3;
    endcase
  end

endmodule
