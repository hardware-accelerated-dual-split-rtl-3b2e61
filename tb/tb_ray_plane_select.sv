// tb_ray_plane_select: self-checking test of header decode and ray/plane selection.
//
// For every node type, every axis / axis pair, every stored corner and random ray directions
// (both signs on every axis), headers are assembled field by field and the expected selected
// components, near/far plane order, node type, ray sign and ray-relative corner are worked
// out from the header format directly.
module tb_ray_plane_select;
  import dst_pkg::*;
  import tb_fp_pkg::*;

  logic [5:0] header;
  f32_t p1, p2, inv1, inv2, org1, org2, nearp, farp;
  vec3_t invdir, origin;
  logic sign1, leaf_bit;
  node_type_e ntype;
  corner_e corner;
  logic [1:0] lsize;
  int checks = 0, failures = 0;

  ray_plane_select dut (.header(header), .plane1(p1), .plane2(p2), .invdir(invdir), .origin(origin),
    .invdir1(inv1), .invdir2(inv2), .origin1(org1), .origin2(org2), .near_plane(nearp),
    .far_plane(farp), .ray_sign1(sign1), .node_type(ntype), .corner(corner),
    .left_size(lsize), .leaf_bit(leaf_bit));

  function automatic f32_t comp(input vec3_t v, input int ax);
    return (ax == 0) ? v.x : (ax == 1) ? v.y : v.z;
  endfunction

  task automatic expect_eq(input string what, input logic [31:0] got, input logic [31:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 20) $display("FAIL %s header=%b got=%h want=%h", what, header, got, want);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ax1, ax2, pair;
    logic s1, s2, lf;
    logic [1:0] sz, cb;
    node_type_e t;
    repeat (3000) begin
      invdir = {rnd_float(100, 150), rnd_float(100, 150), rnd_float(100, 150)};
      origin = {rnd_float(100, 150), rnd_float(100, 150), rnd_float(100, 150)};
      p1 = rnd_float(100, 150);
      p2 = rnd_float(100, 150);
      t  = node_type_e'($urandom % 4);
      lf = 1'($urandom);
      sz = 2'($urandom);
      cb = 2'($urandom);
      ax1 = $urandom % 3;
      ax2 = ax1;
      case (t)
        NODE_LEAF:   begin header = {1'b0, 4'($urandom), 1'b1}; lf = 1'b1; ax1 = 0; ax2 = 0; end
        NODE_SPLIT:  begin header = {1'b0, 2'(ax1), sz, 1'b0}; lf = 1'b0; end
        NODE_CARVE1: header = {3'b110, 2'(ax1), lf};
        default: begin
          pair = $urandom % 3;                    // 00 xy, 01 yz, 11 xz
          ax1 = (pair == 1) ? 1 : 0;
          ax2 = (pair == 0) ? 1 : 2;
          header = {1'b1, (pair == 2) ? 2'b11 : 2'(pair), cb, lf};
        end
      endcase
      #1;
      s1 = comp(invdir, ax1) >> 31;
      s2 = comp(invdir, ax2) >> 31;
      expect_eq("type", 32'(ntype), 32'(t));
      expect_eq("leaf", 32'(leaf_bit), 32'(lf));
      if (t != NODE_LEAF) begin
        expect_eq("inv1", inv1, comp(invdir, ax1));
        expect_eq("inv2", inv2, comp(invdir, ax2));
        expect_eq("org1", org1, comp(origin, ax1));
        expect_eq("org2", org2, comp(origin, ax2));
        expect_eq("sign1", 32'(sign1), 32'(s1));
      end
      if (t == NODE_SPLIT) expect_eq("size", 32'(lsize), 32'(sz));
      if (t == NODE_SPLIT || t == NODE_CARVE1) begin
        expect_eq("near", nearp, s1 ? p2 : p1);
        expect_eq("far",  farp,  s1 ? p1 : p2);
      end
      if (t == NODE_CARVE2) begin
        expect_eq("near", nearp, p1);
        expect_eq("far",  farp,  p2);
        // plane i is an entry when its normal (cb[i] = 1: negative) opposes the ray direction
        expect_eq("corner", 32'(corner), {30'd0, (cb[1] != s2), (cb[0] != s1)});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
