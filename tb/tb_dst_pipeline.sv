// tb_dst_pipeline: end-to-end test of the dual-split intersection pipeline.
//
// Part 1 - node stream. Random node tests of every node type, axis, corner and ray direction
// are issued back to back (one per cycle, random tags). A reference model written
// independently of the RTL decodes the header, computes t1 = (near - o) * invdir and
// t2 = (far - o) * invdir with single-precision rounding after each operation, and derives
// the trimmed range, return code and offsets case by case. Each result must appear exactly
// 8 cycles after issue with the issuing tag.
//
// Part 2 - traversal. A small dual-split tree (scene box [0,8]^3) is laid out in word-addressed
// memory in depth-first order (leaf = 1 word, internal node = 3 words):
//     0  split x, planes 4 | 5 (empty gap between the children), children at 3 and 6
//     3  dual-axis carve xy: x >= 1, y <= 6, carving leaf -> triangles 100
//     6  single-axis carve z in [2, 7] -> child at 9
//     9  split y, planes 3 | 3, children at 12 (leaf) and 13
//    12  leaf -> triangles 200
//    13  dual-axis carve yz: y >= 4, z <= 6, carving leaf -> triangles 300
// The testbench plays the thread processor: it clips each ray to the scene box, issues the
// root, and follows the return codes (0 pop, 1 next, 2 next + push, 3 record the leaf, pop).
// The set of leaves reached must equal the set found by clipping the ray against every
// leaf region with the same single-precision distances.
//
// Mechanisms counted (each must occur): every return code, every node type, every
// ray-relative dual corner case, negative ray direction at a split (plane swap), near-only
// and far-only split hits, pushes and pops, back-to-back issue.
module tb_dst_pipeline;
  import dst_pkg::*;
  import tb_fp_pkg::*;

  localparam int LAT = 8;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;

  logic        in_valid;
  logic [4:0]  in_tag;
  logic [31:0] in_ho;
  f32_t        in_p1, in_p2, in_tmin, in_tmax;
  vec3_t       in_inv, in_org;
  logic        out_valid;
  logic [4:0]  out_tag;
  logic [1:0]  out_ret;
  logic [31:0] out_ofs, out_ofs_stack;
  f32_t        out_tmin, out_tmax;

  dst_pipeline dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_tag(in_tag), .in_header_offset(in_ho),
    .in_plane1(in_p1), .in_plane2(in_p2), .in_invdir(in_inv), .in_origin(in_org),
    .in_tmin(in_tmin), .in_tmax(in_tmax), .out_valid(out_valid), .out_tag(out_tag),
    .out_ret(out_ret), .out_offset(out_ofs), .out_offset_stack(out_ofs_stack),
    .out_tmin(out_tmin), .out_tmax(out_tmax));

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // mechanism counters
  int n_ret [4];
  int n_type [4];
  int n_corner [4];
  int n_split_neg, n_near_only, n_far_only, n_push, n_pop, n_back_to_back, n_leaves;

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (cycle %0d)", what, cycle);
    end
  endtask

  // ---------------- reference model ----------------
  typedef struct {
    logic [4:0]  tag;
    longint      issue;
    logic [1:0]  ret;
    logic [31:0] ofs;
    logic [31:0] ofs_stack;
    real         lo, hi;
    bit          care_range;
    bit          care_stack;
  } res_t;

  function automatic f32_t comp(input vec3_t v, input int ax);
    return (ax == 0) ? v.x : (ax == 1) ? v.y : v.z;
  endfunction

  // t = (plane - origin) * invdir, rounded to single after each step
  function automatic real plane_dist(input f32_t p, input f32_t o, input f32_t inv);
    return f2r(r2f(f2r(r2f(f2r(p) - f2r(o))) * f2r(inv)));
  endfunction

  function automatic real rmax(input real a, input real b); return (a > b) ? a : b; endfunction
  function automatic real rmin(input real a, input real b); return (a < b) ? a : b; endfunction

  function automatic res_t model(input logic [31:0] ho, input f32_t p1, input f32_t p2,
                                 input vec3_t inv, input vec3_t org, input f32_t tmn, input f32_t tmx);
    res_t r;
    logic [5:0] h;
    int ax1, ax2;
    bit neg1, neg2, en1, en2, nh, fh;
    real a, b, lo, hi;
    logic [31:0] left, right;
    h = ho[31:26];
    lo = f2r(tmn); hi = f2r(tmx);
    left = {6'd0, ho[25:0]};
    r.care_range = 1; r.care_stack = 0;
    r.ofs = left; r.ofs_stack = 0;
    if (h[5] == 0 && h[0] == 1) begin                     // leaf
      r.ret = 3; r.lo = lo; r.hi = hi;
      return r;
    end
    if (h[5] == 0) begin                                  // split
      ax1 = int'(h[4:3]);
      neg1 = comp(inv, ax1) >> 31;
      right = left + 32'(h[2:1]);
      a = plane_dist(neg1 ? p2 : p1, comp(org, ax1), comp(inv, ax1));   // near plane
      b = plane_dist(neg1 ? p1 : p2, comp(org, ax1), comp(inv, ax1));   // far plane
      nh = (a >= lo); fh = (b <= hi);
      r.ret = 2'(int'(nh) + int'(fh));
      r.lo = fh ? rmax(lo, b) : lo;
      r.hi = nh ? rmin(hi, a) : hi;
      r.care_range = nh || fh;
      r.ofs_stack = neg1 ? left : right;
      r.care_stack = 1;
      r.ofs = nh ? (neg1 ? right : left) : (neg1 ? left : right);
      return r;
    end
    if (h[4:3] == 2'b10) begin                            // single-axis carve: lower, upper
      ax1 = int'(h[2:1]);
      neg1 = comp(inv, ax1) >> 31;
      a = plane_dist(neg1 ? p2 : p1, comp(org, ax1), comp(inv, ax1));
      b = plane_dist(neg1 ? p1 : p2, comp(org, ax1), comp(inv, ax1));
      r.lo = rmax(lo, a); r.hi = rmin(hi, b);
    end else begin                                        // dual-axis carve
      ax1 = (h[4:3] == 2'b01) ? 1 : 0;
      ax2 = (h[4:3] == 2'b00) ? 1 : 2;
      neg1 = comp(inv, ax1) >> 31;
      neg2 = comp(inv, ax2) >> 31;
      a = plane_dist(p1, comp(org, ax1), comp(inv, ax1));
      b = plane_dist(p2, comp(org, ax2), comp(inv, ax2));
      en1 = (h[1] != neg1);    // normal negative (bit set) while ray positive: entry
      en2 = (h[2] != neg2);
      r.lo = lo; r.hi = hi;
      if (en1) r.lo = rmax(r.lo, a); else r.hi = rmin(r.hi, a);
      if (en2) r.lo = rmax(r.lo, b); else r.hi = rmin(r.hi, b);
    end
    r.ret = (r.lo <= r.hi) ? (h[0] ? 2'd3 : 2'd1) : 2'd0;
    return r;
  endfunction

  // ---------------- result checking ----------------
  res_t exp_q[$];
  bit   in_traversal = 0;
  logic [1:0]  last_ret;
  logic [31:0] last_ofs, last_stack;
  f32_t        last_tmin, last_tmax;
  bit          got_result = 0;

  always @(posedge clk) begin
    #1;
    if (out_valid) begin
      res_t e;
      if (exp_q.size() == 0) begin
        check("result without issue", 0);
      end else begin
        e = exp_q.pop_front();
        check("latency", (cycle - e.issue) == LAT);
        check("tag", out_tag == e.tag);
        check("ret", out_ret == e.ret);
        check("offset", out_ofs == e.ofs);
        if (e.care_stack && e.ret == 2) check("offset_stack", out_ofs_stack == e.ofs_stack);
        if (e.care_range) check("range", f2r(out_tmin) == e.lo && f2r(out_tmax) == e.hi);
        if (failures > 0 && failures < 5) $display("  exp ret=%0d ofs=%h lo=%g hi=%g got ret=%0d ofs=%h lo=%g hi=%g",
            e.ret, e.ofs, e.lo, e.hi, out_ret, out_ofs, f2r(out_tmin), f2r(out_tmax));
        n_ret[out_ret]++;
      end
      last_ret = out_ret; last_ofs = out_ofs; last_stack = out_ofs_stack;
      last_tmin = out_tmin; last_tmax = out_tmax;
      got_result = 1;
    end
  end

  logic prev_valid = 0;
  always @(posedge clk) begin
    if (in_valid && prev_valid) n_back_to_back++;
    prev_valid <= in_valid;
  end

  task automatic issue(input logic [4:0] tag, input logic [31:0] ho, input f32_t p1, input f32_t p2,
                       input vec3_t inv, input vec3_t org, input f32_t tmn, input f32_t tmx);
    res_t e;
    logic [5:0] h;
    in_valid = 1; in_tag = tag; in_ho = ho; in_p1 = p1; in_p2 = p2;
    in_inv = inv; in_org = org; in_tmin = tmn; in_tmax = tmx;
    e = model(ho, p1, p2, inv, org, tmn, tmx);
    e.tag = tag;
    e.issue = cycle;
    exp_q.push_back(e);
    // classify for the mechanism counters
    h = ho[31:26];
    if (!h[5] && h[0]) n_type[3]++;
    else if (!h[5]) begin
      n_type[0]++;
      if (comp(inv, int'(h[4:3])) >> 31) n_split_neg++;
      if (e.ret == 1 && e.ofs != e.ofs_stack) n_near_only++;
      if (e.ret == 1 && e.ofs == e.ofs_stack) n_far_only++;
    end else if (h[4:3] == 2'b10) n_type[1]++;
    else begin
      int ax1, ax2;
      ax1 = (h[4:3] == 2'b01) ? 1 : 0;
      ax2 = (h[4:3] == 2'b00) ? 1 : 2;
      n_type[2]++;
      n_corner[{h[2] != (comp(inv, ax2) >> 31), h[1] != (comp(inv, ax1) >> 31)}]++;
    end
    @(posedge clk); #2;
    in_valid = 0;
  endtask

  // ---------------- part 2: the tree ----------------
  logic [31:0] mem [0:15];
  localparam f32_t F0 = 32'h0000_0000, F1 = 32'h3F80_0000, F2 = 32'h4000_0000,
                   F3 = 32'h4040_0000, F4 = 32'h4080_0000, F5 = 32'h40A0_0000,
                   F6 = 32'h40C0_0000, F7 = 32'h40E0_0000, F8 = 32'h4100_0000;

  task automatic build_tree();
    mem[0]  = {6'b0_00_11_0, 26'd3};  mem[1]  = F4; mem[2]  = F5;   // split x, left size 3
    mem[3]  = {6'b1_00_01_1, 26'd100}; mem[4] = F1; mem[5]  = F6;   // carve x>=1 (neg), y<=6 (pos)
    mem[6]  = {6'b1_10_10_0, 26'd9};  mem[7]  = F2; mem[8]  = F7;   // single carve z in [2,7]
    mem[9]  = {6'b0_01_01_0, 26'd12}; mem[10] = F3; mem[11] = F3;   // split y, left size 1
    mem[12] = {6'b0_0000_1, 26'd200};                                // leaf
    mem[13] = {6'b1_01_01_1, 26'd300}; mem[14] = F4; mem[15] = F6;  // carve y>=4 (neg), z<=6 (pos)
  endtask

  // leaf regions, as [lo, hi] per axis
  typedef struct { real lo[3]; real hi[3]; int tri_ofs; } region_t;
  region_t regions [3];

  task automatic build_regions();
    regions[0] = '{lo: '{1.0, 0.0, 0.0}, hi: '{4.0, 6.0, 8.0}, tri_ofs: 100};
    regions[1] = '{lo: '{5.0, 0.0, 2.0}, hi: '{8.0, 3.0, 7.0}, tri_ofs: 200};
    regions[2] = '{lo: '{5.0, 4.0, 2.0}, hi: '{8.0, 8.0, 6.0}, tri_ofs: 300};
  endtask

  // clip [lo, hi] against a box using the design's rounding; returns whether non-empty
  function automatic bit clip_box(input real blo[3], input real bhi[3], input vec3_t inv,
                                  input vec3_t org, inout real lo, inout real hi);
    for (int ax = 0; ax < 3; ax++) begin
      real tl, th;
      bit neg;
      neg = comp(inv, ax) >> 31;
      tl = plane_dist(r2f(blo[ax]), comp(org, ax), comp(inv, ax));
      th = plane_dist(r2f(bhi[ax]), comp(org, ax), comp(inv, ax));
      if (neg) begin lo = rmax(lo, th); hi = rmin(hi, tl); end
      else     begin lo = rmax(lo, tl); hi = rmin(hi, th); end
    end
    return lo <= hi;
  endfunction

  task automatic wait_result();
    got_result = 0;
    while (!got_result) @(posedge clk);
    #2;
  endtask

  typedef struct { logic [31:0] ofs; f32_t tmn; f32_t tmx; } entry_t;

  task automatic traverse(input vec3_t inv, input vec3_t org, input real t0lo, input real t0hi);
    entry_t stack[$];
    logic [31:0] node;
    f32_t tmn, tmx;
    bit reached [3] = '{0, 0, 0};
    bit want [3];
    int steps = 0;
    node = 0; tmn = r2f(t0lo); tmx = r2f(t0hi);
    forever begin
      issue(5'd7, mem[node], mem[node + 1], mem[node + 2], inv, org, tmn, tmx);
      wait_result();
      steps++;
      case (last_ret)
        2'd1: begin node = last_ofs; tmn = last_tmin; tmx = last_tmax; end
        2'd2: begin
          // near child keeps [tmin, tmax_out]; far child gets [tmin_out, tmax]
          stack.push_back('{last_stack, last_tmin, tmx});
          n_push++;
          node = last_ofs; tmx = last_tmax;
        end
        default: begin
          if (last_ret == 2'd3) begin
            n_leaves++;
            for (int i = 0; i < 3; i++) if (regions[i].tri_ofs == int'(last_ofs)) reached[i] = 1;
          end
          if (stack.size() == 0) break;
          begin
            entry_t e;
            e = stack.pop_back();
            n_pop++;
            node = e.ofs; tmn = e.tmn; tmx = e.tmx;
          end
        end
      endcase
      if (steps > 50) begin check("traversal terminates", 0); break; end
    end
    for (int i = 0; i < 3; i++) begin
      real lo, hi;
      lo = t0lo; hi = t0hi;
      want[i] = clip_box(regions[i].lo, regions[i].hi, inv, org, lo, hi);
      check($sformatf("leaf %0d reached", regions[i].tri_ofs), reached[i] == want[i]);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec3_t inv, org;
    in_valid = 0; in_tag = 0; in_ho = 0; in_p1 = 0; in_p2 = 0;
    in_inv = '0; in_org = '0; in_tmin = 0; in_tmax = 0;
    foreach (n_ret[i]) begin n_ret[i] = 0; n_type[i] = 0; n_corner[i] = 0; end
    n_split_neg = 0; n_near_only = 0; n_far_only = 0; n_push = 0; n_pop = 0;
    n_back_to_back = 0; n_leaves = 0;
    rst_n = 0;
    repeat (3) @(posedge clk);
    #2 rst_n = 1;
    @(posedge clk); #2;

    // ---- part 1: random node stream, one test per cycle ----
    for (int n = 0; n < 20000; n++) begin
      logic [5:0] h;
      int kind;
      f32_t p1, p2, tmn, tmx, lowp, highp;
      kind = $urandom % 4;
      case (kind)
        0: h = {1'b0, 4'($urandom), 1'b1};                           // leaf
        1: h = {1'b0, 2'($urandom % 3), 2'($urandom), 1'b0};         // split
        2: h = {3'b110, 2'($urandom % 3), 1'($urandom)};             // single-axis carve
        default: begin
          int pair;
          pair = $urandom % 3;
          h = {1'b1, (pair == 2) ? 2'b11 : 2'(pair), 2'($urandom), 1'($urandom)};
        end
      endcase
      org = {rnd_float(120, 130), rnd_float(120, 130), rnd_float(120, 130)};
      inv = {rnd_float(122, 130), rnd_float(122, 130), rnd_float(122, 130)};
      lowp  = rnd_float(120, 130);
      highp = rnd_float(120, 130);
      // split / single carve keep plane1 <= plane2 as the tree builder would
      if (kind != 3 && f2r(lowp) > f2r(highp)) begin p1 = highp; p2 = lowp; end
      else begin p1 = lowp; p2 = highp; end
      tmn = {1'b0, 8'(118 + $urandom % 12), 23'($urandom)};
      tmx = {1'b0, 8'(118 + $urandom % 14), 23'($urandom)};
      if (f2r(tmn) > f2r(tmx)) begin f32_t s; s = tmn; tmn = tmx; tmx = s; end
      issue(5'($urandom), {h, 26'($urandom)}, p1, p2, inv, org, tmn, tmx);
    end
    repeat (LAT + 2) @(posedge clk);
    #2;
    check("all results returned", exp_q.size() == 0);

    // ---- part 2: traversals of the small tree ----
    build_tree();
    build_regions();
    for (int n = 0; n < 400; n++) begin
      real o[3], tgt[3], d[3], lo, hi;
      for (int k = 0; k < 3; k++) begin
        o[k]   = -4.0 + 16.0 * ($urandom % 65536) / 65536.0;
        tgt[k] = 8.0 * ($urandom % 65536) / 65536.0;
        d[k]   = tgt[k] - o[k];
        if (d[k] == 0.0) d[k] = 0.001;
      end
      org = {r2f(o[0]), r2f(o[1]), r2f(o[2])};
      inv = {r2f(1.0 / d[0]), r2f(1.0 / d[1]), r2f(1.0 / d[2])};
      lo = 0.0; hi = 1.0e30;
      if (clip_box('{0.0, 0.0, 0.0}, '{8.0, 8.0, 8.0}, inv, org, lo, hi)) traverse(inv, org, lo, hi);
    end
    repeat (LAT + 2) @(posedge clk);
    #2;

    for (int i = 0; i < 4; i++) begin
      check($sformatf("return code %0d occurred", i), n_ret[i] > 0);
      check($sformatf("node type %0d occurred", i), n_type[i] > 0);
      check($sformatf("dual corner case %0d occurred", i), n_corner[i] > 0);
    end
    check("negative ray at split (plane swap)", n_split_neg > 0);
    check("near-only split hit", n_near_only > 0);
    check("far-only split hit", n_far_only > 0);
    check("stack push", n_push > 0);
    check("stack pop", n_pop > 0);
    check("back-to-back issue", n_back_to_back > 0);
    check("leaf reached", n_leaves > 0);
    $display("ret %0d/%0d/%0d/%0d types %0d/%0d/%0d/%0d corners %0d/%0d/%0d/%0d swap %0d near-only %0d far-only %0d push %0d pop %0d b2b %0d leaves %0d",
      n_ret[0], n_ret[1], n_ret[2], n_ret[3], n_type[0], n_type[1], n_type[2], n_type[3],
      n_corner[0], n_corner[1], n_corner[2], n_corner[3], n_split_neg, n_near_only, n_far_only,
      n_push, n_pop, n_back_to_back, n_leaves);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
