// tb_dst_traversal: many-thread traversal of a generated dual-split tree through one pipeline.
//
// This models how the pipeline is used: 32 threads share one dual-split pipeline, as the
// threads of one multiprocessor would. Three ray sets are run in turn, one per kind of
// rendering load:
//   - path tracing: incoherent rays, random origin inside the scene and random direction,
//     much like diffuse bounces; all hits are collected;
//   - ray casting: coherent camera rays from a pinhole outside the scene, one per pixel in
//     scanline order, so that neighbouring threads trace neighbouring pixels; some miss the
//     scene entirely and never reach the pipeline;
//   - shadow rays: from random points in the scene towards a point light, with range [0, 1].
//     Traversal stops at the first leaf (any hit), as shadow rays do.
//
// Scene and tree. NBOX random axis-aligned boxes stand in for primitives, with coordinates on
// a 1/4 grid so that they are exact in single precision. A binary BVH is built over them top
// down: median split on the longest axis of the centroid bounds. The BVH is then converted to
// a dual-split tree with identical bounds. Walking down, each BVH node's box is first carved
// out of the region its parent leaves it:
//   - two faces on one axis -> a single-axis carving node;
//   - leftover faces are paired into dual-axis carving nodes (with the corner bits set from
//     which side is empty);
//   - a last odd face -> a single-axis carve that repeats the region's other bound.
// Then an inner node gets a split node on the BVH split axis (plane 1 = left box's upper
// bound, plane 2 = right box's lower bound). A leaf becomes a carving leaf when carving was
// needed, else a plain leaf node. Nodes are laid out depth-first with siblings adjacent:
// 1 word per leaf, 3 per internal node. The left child size is the size of the left sibling's
// first node.
//
// Checking. The traversal is driven by the return codes only. For each ray, the set of leaves
// reported must equal the set of boxes that a slab test of the ray hits, where the slab test
// uses the same single-precision distances. For shadow rays, only boxes the ray hits may be
// reported, and a hit must be reported exactly when the slab test finds one. Every result must return after exactly 8 cycles
// to the thread that issued it. The run also reports pipeline occupancy (node tests per cycle).
//
// Interface and timing: no ports. A behavioural thread model issues at most one node test per
// clock (round robin over threads that have a node ready), tagged with the thread number. It
// consumes each tagged result 8 clocks later: pop or finish on 0, follow on 1, push the far
// child on 2, record the leaf on 3 (and, for a shadow ray, end the ray). Traversal stacks
// hold (offset, tmin, tmax).
//
// What follows the document: the node formats; identical-bounds conversion through carving
// and split nodes; traversal driven by the return codes and the offset / offset-stack / tmin /
// tmax outputs; 32 threads per multiprocessor sharing one pipeline; the 8-cycle latency.
// This testbench's own choices: the synthetic box scene, the BVH builder, the order in which
// faces are grouped into carving nodes, the round-robin issue, the ray generators and the
// number of rays in each set.
module tb_dst_traversal;
  import dst_pkg::*;
  import tb_fp_pkg::*;

  localparam int LAT     = 8;
  localparam int NBOX    = 96;
  // rays per phase: 0 path tracing, 1 ray casting (camera rays), 2 shadow rays
  localparam int NRAYS [3] = '{3000, 1024, 2000};
  localparam int CAM_RES   = 32;
  localparam int THREADS = 32;
  localparam int MEMW    = 8192;
  localparam int DEPTH   = 64;

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
  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // ---------------- scene: boxes and BVH ----------------
  real box_lo [NBOX][3];
  real box_hi [NBOX][3];

  // BVH nodes: leaves hold one box
  localparam int NBVH = 2 * NBOX;
  real bv_lo [NBVH][3];
  real bv_hi [NBVH][3];
  int  bv_left [NBVH];
  int  bv_right [NBVH];
  int  bv_box [NBVH];        // -1 for inner nodes
  int  bv_axis [NBVH];
  int  nbvh = 0;
  int  perm [NBOX];

  function automatic real center(input int b, input int ax);
    return 0.5 * (box_lo[b][ax] + box_hi[b][ax]);
  endfunction

  task automatic build_bvh();
    // work list of (node, first, count) over perm[]
    int wn [$], wf [$], wc [$];
    for (int i = 0; i < NBOX; i++) perm[i] = i;
    nbvh = 1;
    wn.push_back(0); wf.push_back(0); wc.push_back(NBOX);
    while (wn.size() > 0) begin
      int n, f, c, ax;
      real cl [3], ch [3];
      n = wn.pop_front(); f = wf.pop_front(); c = wc.pop_front();
      for (int k = 0; k < 3; k++) begin
        bv_lo[n][k] = 1.0e9; bv_hi[n][k] = -1.0e9; cl[k] = 1.0e9; ch[k] = -1.0e9;
      end
      for (int i = f; i < f + c; i++) for (int k = 0; k < 3; k++) begin
        if (box_lo[perm[i]][k] < bv_lo[n][k]) bv_lo[n][k] = box_lo[perm[i]][k];
        if (box_hi[perm[i]][k] > bv_hi[n][k]) bv_hi[n][k] = box_hi[perm[i]][k];
        if (center(perm[i], k) < cl[k]) cl[k] = center(perm[i], k);
        if (center(perm[i], k) > ch[k]) ch[k] = center(perm[i], k);
      end
      if (c == 1) begin
        bv_box[n] = perm[f]; bv_left[n] = -1; bv_right[n] = -1; bv_axis[n] = 0;
        continue;
      end
      ax = 0;
      if (ch[1] - cl[1] > ch[ax] - cl[ax]) ax = 1;
      if (ch[2] - cl[2] > ch[ax] - cl[ax]) ax = 2;
      // insertion sort of the range by centroid on ax
      for (int i = f + 1; i < f + c; i++) begin
        int j, v;
        v = perm[i]; j = i - 1;
        while (j >= f && center(perm[j], ax) > center(v, ax)) begin perm[j + 1] = perm[j]; j--; end
        perm[j + 1] = v;
      end
      bv_box[n] = -1; bv_axis[n] = ax;
      bv_left[n] = nbvh; bv_right[n] = nbvh + 1; nbvh += 2;
      wn.push_back(bv_left[n]);  wf.push_back(f);         wc.push_back(c / 2);
      wn.push_back(bv_right[n]); wf.push_back(f + c / 2); wc.push_back(c - c / 2);
    end
  endtask

  // ---------------- conversion to a dual-split tree ----------------
  logic [31:0] mem [MEMW];
  int mem_top = 0;
  int n_split = 0, n_carve1 = 0, n_carve2 = 0, n_leafnode = 0, n_carveleaf = 0;

  // carving plan of a BVH node inside a region: faces where the box is strictly inside
  typedef struct { int kind; int ax1; int ax2; real p1; real p2; logic [1:0] cb; } carve_t; // kind 1 single, 2 dual

  real rg_lo [NBVH][3];      // region a BVH node's first dual-split node starts from
  real rg_hi [NBVH][3];

  function automatic int plan_carves(input int n, output carve_t c [6]);
    int nc = 0;
    int single_ax [$];
    bit single_up [$];
    for (int ax = 0; ax < 3; ax++) begin
      bit lo_in, hi_in;
      lo_in = bv_lo[n][ax] > rg_lo[n][ax];
      hi_in = bv_hi[n][ax] < rg_hi[n][ax];
      if (lo_in && hi_in) begin
        c[nc] = '{1, ax, ax, bv_lo[n][ax], bv_hi[n][ax], 2'b00}; nc++;
      end else if (lo_in) begin single_ax.push_back(ax); single_up.push_back(0); end
      else if (hi_in)     begin single_ax.push_back(ax); single_up.push_back(1); end
    end
    while (single_ax.size() >= 2) begin
      int a1, a2;
      bit u1, u2;
      a1 = single_ax.pop_front(); u1 = single_up.pop_front();
      a2 = single_ax.pop_front(); u2 = single_up.pop_front();
      // a lower face keeps x >= p: empty space on the negative side (corner bit 1)
      c[nc] = '{2, a1, a2, u1 ? bv_hi[n][a1] : bv_lo[n][a1], u2 ? bv_hi[n][a2] : bv_lo[n][a2],
                {!u2, !u1}};
      nc++;
    end
    if (single_ax.size() == 1) begin
      int a;
      a = single_ax.pop_front();
      c[nc] = '{1, a, a, single_up[0] ? rg_lo[n][a] : bv_lo[n][a], single_up[0] ? bv_hi[n][a] : rg_hi[n][a], 2'b00};
      nc++;
    end
    return nc;
  endfunction

  function automatic int first_size(input int n);
    carve_t c [6];
    int nc;
    nc = plan_carves(n, c);
    return (nc == 0 && bv_box[n] >= 0) ? 1 : 3;
  endfunction

  function automatic logic [1:0] pair_code(input int a1, input int a2);
    if (a1 == 0 && a2 == 1) return 2'b00;
    if (a1 == 1 && a2 == 2) return 2'b01;
    return 2'b11;
  endfunction

  function automatic int tri_of(input int b);
    return 1000 + 4 * b;
  endfunction

  task automatic build_tree();
    // work list: (slot address, BVH node); the node's region is in rg_lo/rg_hi
    int ws [$], wn [$];
    for (int k = 0; k < 3; k++) begin rg_lo[0][k] = bv_lo[0][k]; rg_hi[0][k] = bv_hi[0][k]; end
    ws.push_back(0); wn.push_back(0);
    mem_top = first_size(0);
    while (ws.size() > 0) begin
      int addr, n, nc, a, l, r, sl, sr, ch;
      carve_t c [6];
      addr = ws.pop_front(); n = wn.pop_front();
      nc = plan_carves(n, c);
      for (int i = 0; i < nc; i++) begin
        logic [5:0] h;
        bit last_leaf;
        last_leaf = (i == nc - 1) && (bv_box[n] >= 0);
        if (c[i].kind == 1) begin h = {3'b110, 2'(c[i].ax1), last_leaf}; n_carve1++; end
        else                begin h = {1'b1, pair_code(c[i].ax1, c[i].ax2), c[i].cb, last_leaf}; n_carve2++; end
        mem[addr + 1] = r2f(c[i].p1);
        mem[addr + 2] = r2f(c[i].p2);
        if (last_leaf) begin
          mem[addr] = {h, 26'(tri_of(bv_box[n]))};
          n_carveleaf++;
        end else begin
          // the next node in the chain is another carve or a split: 3 words
          mem[addr] = {h, 26'(mem_top)};
          addr = mem_top;
          mem_top += 3;
        end
      end
      if (bv_box[n] >= 0) begin
        if (nc == 0) begin
          mem[addr] = {6'b0_0000_1, 26'(tri_of(bv_box[n]))};
          n_leafnode++;
        end
        continue;
      end
      // split node: children start from this node's box, cut at the split planes
      a = bv_axis[n]; l = bv_left[n]; r = bv_right[n];
      for (int k = 0; k < 3; k++) begin
        rg_lo[l][k] = bv_lo[n][k]; rg_hi[l][k] = bv_hi[n][k];
        rg_lo[r][k] = bv_lo[n][k]; rg_hi[r][k] = bv_hi[n][k];
      end
      rg_hi[l][a] = bv_hi[l][a];
      rg_lo[r][a] = bv_lo[r][a];
      sl = first_size(l);
      sr = first_size(r);
      ch = mem_top;
      mem_top += sl + sr;
      mem[addr]     = {1'b0, 2'(a), 2'(sl), 1'b0, 26'(ch)};
      mem[addr + 1] = r2f(rg_hi[l][a]);
      mem[addr + 2] = r2f(rg_lo[r][a]);
      n_split++;
      ws.push_back(ch);      wn.push_back(l);
      ws.push_back(ch + sl); wn.push_back(r);
    end
  endtask

  // ---------------- reference ----------------
  function automatic f32_t comp(input vec3_t v, input int ax);
    return (ax == 0) ? v.x : (ax == 1) ? v.y : v.z;
  endfunction

  function automatic real plane_dist(input real p, input f32_t o, input f32_t inv);
    return f2r(r2f(f2r(r2f(f2r(r2f(p)) - f2r(o))) * f2r(inv)));
  endfunction

  function automatic bit clip(input real blo [3], input real bhi [3], input vec3_t inv,
                              input vec3_t org, inout real lo, inout real hi);
    for (int ax = 0; ax < 3; ax++) begin
      real tl, th;
      tl = plane_dist(blo[ax], comp(org, ax), comp(inv, ax));
      th = plane_dist(bhi[ax], comp(org, ax), comp(inv, ax));
      if (comp(inv, ax) >> 31) begin if (th > lo) lo = th; if (tl < hi) hi = tl; end
      else                     begin if (tl > lo) lo = tl; if (th < hi) hi = th; end
    end
    return lo <= hi;
  endfunction

  // ---------------- threads ----------------
  vec3_t       t_inv [THREADS];
  vec3_t       t_org [THREADS];
  real         t_lo0 [THREADS], t_hi0 [THREADS];
  bit          t_active [THREADS];
  bit          t_ready [THREADS];      // has a node to issue
  logic [31:0] t_node [THREADS];
  f32_t        t_tmin [THREADS], t_tmax [THREADS];
  logic [31:0] s_ofs [THREADS][DEPTH];
  f32_t        s_tmin [THREADS][DEPTH], s_tmax [THREADS][DEPTH];
  int          t_sp [THREADS];
  longint      t_issue [THREADS];
  bit          t_hit [THREADS][NBOX];
  int          t_steps [THREADS];

  int phase = 0;
  int rays_started = 0, rays_done = 0, rays_missing_scene = 0, shadow_blocked = 0;
  longint cycle = 0, issued = 0, busy_cycles = 0;
  int n_ret [4] = '{0, 0, 0, 0};
  int max_sp = 0, total_leaves = 0;

  task automatic finish_ray(input int t);
    bit any_want, any_got;
    any_want = 0; any_got = 0;
    for (int b = 0; b < NBOX; b++) begin
      real lo, hi, blo [3], bhi [3];
      bit want;
      lo = t_lo0[t]; hi = t_hi0[t];
      for (int k = 0; k < 3; k++) begin blo[k] = box_lo[b][k]; bhi[k] = box_hi[b][k]; end
      want = clip(blo, bhi, t_inv[t], t_org[t], lo, hi);
      any_want |= want;
      any_got |= t_hit[t][b];
      if (phase != 2)
        check($sformatf("phase %0d ray %0d box %0d reached=%0d expected=%0d", phase, rays_done, b,
                        t_hit[t][b], want), t_hit[t][b] == want);
      else if (t_hit[t][b])
        check($sformatf("shadow ray %0d reached box %0d that it misses", rays_done, b), want);
    end
    if (phase == 2) begin
      check($sformatf("shadow ray %0d blocked=%0d expected=%0d", rays_done, any_got, any_want),
            any_got == any_want);
      if (any_got) shadow_blocked++;
    end
    rays_done++;
    t_active[t] = 0;
  endtask

  // Ray generators. Path tracing: random origin inside the scene, random direction.
  // Ray casting: a pinhole camera outside the scene, one ray per pixel in scanline order.
  // Shadow: random point inside the scene towards a point light above it, range [0, 1].
  task automatic make_ray(input int idx, output real o [3], output real d [3], output real tmax);
    real mid [3], ext [3];
    for (int k = 0; k < 3; k++) begin
      mid[k] = 0.5 * (bv_lo[0][k] + bv_hi[0][k]);
      ext[k] = bv_hi[0][k] - bv_lo[0][k];
    end
    tmax = 1.0e30;
    if (phase == 1) begin
      int px, py;
      px = idx % CAM_RES; py = idx / CAM_RES;
      o[0] = bv_lo[0][0] - 0.75 * ext[0]; o[1] = mid[1] + 0.3; o[2] = mid[2] + 0.3;
      d[0] = 1.0;
      d[1] = 1.6 * (real'(px) + 0.5 - real'(CAM_RES) / 2.0) / real'(CAM_RES);
      d[2] = 1.6 * (real'(py) + 0.5 - real'(CAM_RES) / 2.0) / real'(CAM_RES);
    end else begin
      for (int k = 0; k < 3; k++) begin
        int ro, rd;
        ro = int'($urandom % 65536);
        rd = int'($urandom % 65536) - 32768;
        o[k] = bv_lo[0][k] + ext[k] * real'(ro) / 65536.0;
        d[k] = real'(rd) / 32768.0;
      end
      if (phase == 2) begin
        d[0] = mid[0] + 0.3 - o[0];
        d[1] = mid[1] + 0.3 - o[1];
        d[2] = bv_hi[0][2] + 0.5 * ext[2] - o[2];
        tmax = 1.0;
      end
    end
    for (int k = 0; k < 3; k++) if (d[k] == 0.0) d[k] = 0.5;
  endtask

  // Starts the next ray on thread t. Rays that miss the whole scene are finished at once
  // (no box may be expected for them) without using the pipeline.
  task automatic start_ray(input int t);
    real o [3], d [3], lo, hi, tmax;
    real root_lo [3], root_hi [3];
    for (int k = 0; k < 3; k++) begin root_lo[k] = bv_lo[0][k]; root_hi[k] = bv_hi[0][k]; end
    while (rays_started < NRAYS[phase]) begin
      make_ray(rays_started, o, d, tmax);
      rays_started++;
      t_org[t] = {r2f(o[0]), r2f(o[1]), r2f(o[2])};
      t_inv[t] = {r2f(1.0 / d[0]), r2f(1.0 / d[1]), r2f(1.0 / d[2])};
      lo = 0.0; hi = f2r(r2f(tmax));
      for (int b = 0; b < NBOX; b++) t_hit[t][b] = 0;
      if (!clip(root_lo, root_hi, t_inv[t], t_org[t], lo, hi)) begin
        t_lo0[t] = 0.0; t_hi0[t] = f2r(r2f(tmax));
        rays_missing_scene++;
        finish_ray(t);
        continue;
      end
      t_lo0[t] = 0.0; t_hi0[t] = f2r(r2f(tmax));
      t_sp[t] = 0;
      t_node[t] = 0;
      t_tmin[t] = r2f(lo); t_tmax[t] = r2f(hi);
      t_active[t] = 1;
      t_ready[t] = 1;
      t_steps[t] = 0;
      break;
    end
  endtask

  task automatic pop_or_finish(input int t);
    if (t_sp[t] == 0) begin
      finish_ray(t);
      start_ray(t);
    end else begin
      t_sp[t]--;
      t_node[t] = s_ofs[t][t_sp[t]];
      t_tmin[t] = s_tmin[t][t_sp[t]];
      t_tmax[t] = s_tmax[t][t_sp[t]];
      t_ready[t] = 1;
    end
  endtask

  // results
  always @(posedge clk) begin
    #1;
    if (out_valid) begin
      int t;
      t = int'(out_tag);
      if (!t_active[t] || t_ready[t]) check("result for a thread with no test in flight", 0);
      else begin
        check("latency", cycle + 1 - t_issue[t] == LAT);
        n_ret[out_ret]++;
        t_steps[t]++;
        case (out_ret)
          2'd0: pop_or_finish(t);
          2'd1: begin t_node[t] = out_ofs; t_tmin[t] = out_tmin; t_tmax[t] = out_tmax; t_ready[t] = 1; end
          2'd2: begin
            s_ofs[t][t_sp[t]] = out_ofs_stack;
            s_tmin[t][t_sp[t]] = out_tmin;
            s_tmax[t][t_sp[t]] = t_tmax[t];
            t_sp[t]++;
            if (t_sp[t] > max_sp) max_sp = t_sp[t];
            if (t_sp[t] >= DEPTH) begin check("stack depth", 0); t_sp[t] = DEPTH - 1; end
            t_node[t] = out_ofs; t_tmax[t] = out_tmax; t_ready[t] = 1;
          end
          default: begin
            int b;
            b = (int'(out_ofs) - 1000) / 4;
            total_leaves++;
            if (b < 0 || b >= NBOX || tri_of(b) != int'(out_ofs)) check("leaf offset", 0);
            else t_hit[t][b] = 1;
            if (phase == 2) t_sp[t] = 0;   // shadow rays stop at the first hit
            pop_or_finish(t);
          end
        endcase
      end
    end
  end

  // issue: round-robin over threads with a node ready
  int rr = 0;
  always @(posedge clk) begin
    #2;
    cycle++;
    in_valid = 0;
    for (int k = 0; k < THREADS; k++) begin
      int t;
      t = (rr + k) % THREADS;
      if (t_active[t] && t_ready[t]) begin
        in_valid = 1;
        in_tag = 5'(t);
        in_ho = mem[t_node[t]];
        in_p1 = mem[t_node[t] + 1];
        in_p2 = mem[t_node[t] + 2];
        in_inv = t_inv[t];
        in_org = t_org[t];
        in_tmin = t_tmin[t];
        in_tmax = t_tmax[t];
        t_ready[t] = 0;
        t_issue[t] = cycle;
        issued++;
        rr = (t + 1) % THREADS;
        break;
      end
    end
  end

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint start_cycle;
    in_valid = 0; in_tag = 0; in_ho = 0; in_p1 = 0; in_p2 = 0;
    in_inv = '0; in_org = '0; in_tmin = 0; in_tmax = 0;
    for (int t = 0; t < THREADS; t++) begin t_active[t] = 0; t_ready[t] = 0; end
    for (int i = 0; i < MEMW; i++) mem[i] = 0;
    for (int b = 0; b < NBOX; b++) for (int k = 0; k < 3; k++) begin
      int r1, r2;
      r1 = int'($urandom % 224);
      r2 = int'($urandom % 40);
      box_lo[b][k] = 0.25 * real'(r1);
      box_hi[b][k] = box_lo[b][k] + 0.25 * real'(1 + r2);
    end
    build_bvh();
    build_tree();
    $display("tree: %0d words, %0d split, %0d single carve, %0d dual carve, %0d leaf nodes, %0d carving leaves",
             mem_top, n_split, n_carve1, n_carve2, n_leafnode, n_carveleaf);
    check("tree fits in memory", mem_top <= MEMW);
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int ph = 0; ph < 3; ph++) begin
      longint issued0;
      real occ;
      phase = ph;
      rays_started = 0; rays_done = 0; rays_missing_scene = 0; shadow_blocked = 0;
      start_cycle = cycle;
      issued0 = issued;
      for (int t = 0; t < THREADS; t++) start_ray(t);
      while (rays_done < NRAYS[ph]) @(posedge clk);
      repeat (LAT + 2) @(posedge clk);
      occ = real'(issued - issued0) / real'(cycle - start_cycle);
      $display("%s: rays %0d (%0d miss the scene, %0d shadow rays blocked), node tests %0d, cycles %0d, occupancy %0.3f",
               ph == 0 ? "path tracing" : ph == 1 ? "ray casting" : "shadow rays", rays_done,
               rays_missing_scene, shadow_blocked, issued - issued0, cycle - start_cycle, occ);
      check("32 threads keep the pipeline busy", occ > 0.9);
      if (ph == 2) check("some shadow rays blocked and some not", shadow_blocked > 0 && shadow_blocked < rays_done);
      if (ph == 1) check("camera rays hit the scene", rays_missing_scene < rays_done);
    end
    $display("leaves reached %0d, max stack %0d", total_leaves, max_sp);
    $display("return codes 0:%0d 1:%0d 2:%0d 3:%0d", n_ret[0], n_ret[1], n_ret[2], n_ret[3]);
    for (int i = 0; i < 4; i++) check($sformatf("return code %0d occurred", i), n_ret[i] > 0);
    check("single-axis carve in tree", n_carve1 > 0);
    check("dual-axis carve in tree", n_carve2 > 0);
    check("carving leaf in tree", n_carveleaf > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
