// tb_plane_compare: self-checking test of the plane comparison and return value stages.
//
// Random distances t1, t2 and ray ranges are fed one per cycle for every node type and every
// dual-axis corner case. The expected trimmed range and return code are written out case by
// case from the geometry (split: near child [tmin, min(tmax,t1)] if t1 >= tmin, far child
// [max(tmin,t2), tmax] if t2 <= tmax; carving: clip the range by the entry and exit planes of
// the case, cull when empty) on doubles, and compared on the third clock edge that samples each input.
module tb_plane_compare;
  import dst_pkg::*;
  import tb_fp_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  f32_t t1, t2, tmin, tmax, tmin_o, tmax_o;
  node_type_e nt;
  corner_e corner;
  logic leaf_bit, near_hit;
  logic [1:0] ret;
  int checks = 0, failures = 0;
  int seen_ret [4] = '{0, 0, 0, 0};

  plane_compare dut (.clk(clk), .t1(t1), .t2(t2), .tmin(tmin), .tmax(tmax), .node_type(nt),
    .corner(corner), .leaf_bit(leaf_bit), .tmin_out(tmin_o), .tmax_out(tmax_o),
    .near_hit(near_hit), .ret(ret));

  typedef struct { real lo; real hi; logic [1:0] r; logic nh; logic care_range; } exp_t;

  function automatic real rmax(input real a, input real b); return (a > b) ? a : b; endfunction
  function automatic real rmin(input real a, input real b); return (a < b) ? a : b; endfunction

  function automatic exp_t model();
    exp_t e;
    real a, b, lo, hi;
    bit nearh, farh;
    a = f2r(t1); b = f2r(t2); lo = f2r(tmin); hi = f2r(tmax);
    nearh = (a >= lo);
    farh  = (b <= hi);
    e.nh = nearh;
    e.care_range = 1;
    case (nt)
      NODE_SPLIT: begin
        e.r  = 2'(int'(nearh) + int'(farh));
        e.lo = farh  ? rmax(lo, b) : lo;
        e.hi = nearh ? rmin(hi, a) : hi;
        if (!nearh && !farh) e.care_range = 0;
      end
      NODE_LEAF: begin e.r = 3; e.lo = lo; e.hi = hi; end
      default: begin
        if (nt == NODE_CARVE1) begin e.lo = rmax(lo, a); e.hi = rmin(hi, b); end
        else case (corner)
          CORNER_EXIT_EXIT:   begin e.lo = lo;                  e.hi = rmin(rmin(a, b), hi); end
          CORNER_ENTRY_EXIT:  begin e.lo = rmax(lo, a);         e.hi = rmin(hi, b);          end
          CORNER_EXIT_ENTRY:  begin e.lo = rmax(lo, b);         e.hi = rmin(hi, a);          end
          default:            begin e.lo = rmax(rmax(a, b), lo); e.hi = hi;                  end
        endcase
        e.r = (e.lo <= e.hi) ? (leaf_bit ? 2'd3 : 2'd1) : 2'd0;
      end
    endcase
    return e;
  endfunction

  exp_t q[$];
  always @(posedge clk) begin
    q.push_back(model());
    if (q.size() > 2) begin
      exp_t e;
      e = q.pop_front();
      #1;
      checks++;
      seen_ret[ret]++;
      if (ret !== e.r || near_hit !== e.nh ||
          (e.care_range && (f2r(tmin_o) != e.lo || f2r(tmax_o) != e.hi))) begin
        failures++;
        if (failures < 10) $display("FAIL ret=%0d/%0d nh=%b/%b lo=%g/%g hi=%g/%g", ret, e.r,
                                    near_hit, e.nh, f2r(tmin_o), e.lo, f2r(tmax_o), e.hi);
      end
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    t1 = 0; t2 = 0; tmin = 0; tmax = 0; nt = NODE_LEAF; corner = CORNER_EXIT_EXIT; leaf_bit = 0;
    repeat (40000) begin
      // values around 1.0 .. 16.0 with both signs so every ordering occurs
      t1   = rnd_float(124, 131);
      t2   = rnd_float(124, 131);
      tmin = rnd_float(124, 130);
      tmax = {1'b0, 8'(127 + $urandom % 5), 23'($urandom)};
      if ($urandom % 8 == 0) t1 = tmin;       // equality edges
      if ($urandom % 8 == 0) t2 = tmax;
      nt = node_type_e'($urandom % 4);
      corner = corner_e'($urandom % 4);
      leaf_bit = 1'($urandom);
      @(posedge clk); #2;
    end
    repeat (4) @(posedge clk);
    #2;
    for (int i = 0; i < 4; i++) if (seen_ret[i] == 0) begin
      failures++;
      $display("return code %0d never produced", i);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
