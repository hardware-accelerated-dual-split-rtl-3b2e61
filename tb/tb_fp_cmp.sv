// tb_fp_cmp: self-checking test of the combinational floating-point comparator.
//
// Compares random floats of all magnitudes and signs, equal pairs, +0/-0, infinities and
// NaNs. The expected lt/eq/gt come from comparing the same values as doubles in the
// simulator (NaN makes all three false and sets unordered).
module tb_fp_cmp;
  import dst_pkg::*;
  import tb_fp_pkg::*;

  f32_t a, b;
  logic lt, eq, gt, un;
  int   checks = 0, failures = 0;

  fp_cmp dut (.a(a), .b(b), .lt(lt), .eq(eq), .gt(gt), .unordered(un));

  task automatic check(input f32_t x, input f32_t z);
    real  rx, rz;
    logic e_un, e_lt, e_eq, e_gt;
    a = x; b = z;
    #1;
    rx = f2r(x); rz = f2r(z);
    e_un = is_nan(x) || is_nan(z);
    e_lt = !e_un && (rx <  rz);
    e_eq = !e_un && (rx == rz);
    e_gt = !e_un && (rx >  rz);
    checks++;
    if ({lt, eq, gt, un} !== {e_lt, e_eq, e_gt, e_un}) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h exp=%b got=%b", x, z, {e_lt, e_eq, e_gt, e_un}, {lt, eq, gt, un});
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
    f32_t x;
    f32_t specials [8] = '{32'h0000_0000, 32'h8000_0000, 32'h7F80_0000, 32'hFF80_0000,
                           32'h7FC0_0000, 32'h3F80_0000, 32'hBF80_0000, 32'h0080_0000};
    foreach (specials[i]) foreach (specials[j]) check(specials[i], specials[j]);
    repeat (20000) check(rnd_float(1, 254), rnd_float(1, 254));
    repeat (5000) begin
      x = rnd_float(100, 150);
      check(x, x);
      check(x, x + 32'd1);
      check(x, {~x[31], x[30:0]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
