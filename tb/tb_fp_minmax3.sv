// tb_fp_minmax3: self-checking test of the 3-input floating-point max and min units.
//
// One instance of each flavour sees the same random operands (with deliberate ties and
// infinities); the expected value is the largest / smallest of the three computed on doubles
// in the simulator, compared as a value (so +0 and -0 count as equal).
module tb_fp_minmax3;
  import dst_pkg::*;
  import tb_fp_pkg::*;

  f32_t a, b, c, ymax, ymin;
  int   checks = 0, failures = 0;

  fp_minmax3 #(.IS_MAX(1'b1)) dut_max (.a(a), .b(b), .c(c), .y(ymax));
  fp_minmax3 #(.IS_MAX(1'b0)) dut_min (.a(a), .b(b), .c(c), .y(ymin));

  task automatic check(input f32_t x, input f32_t z, input f32_t w);
    real rx, rz, rw, emax, emin;
    a = x; b = z; c = w;
    #1;
    rx = f2r(x); rz = f2r(z); rw = f2r(w);
    emax = rx; if (rz > emax) emax = rz; if (rw > emax) emax = rw;
    emin = rx; if (rz < emin) emin = rz; if (rw < emin) emin = rw;
    checks += 2;
    if (f2r(ymax) != emax) begin
      failures++;
      if (failures < 10) $display("FAIL max %h %h %h got %h", x, z, w, ymax);
    end
    if (f2r(ymin) != emin) begin
      failures++;
      if (failures < 10) $display("FAIL min %h %h %h got %h", x, z, w, ymin);
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
    check(32'h0000_0000, 32'h8000_0000, 32'h3F80_0000);
    check(32'h7F80_0000, 32'h3F80_0000, 32'hFF80_0000);
    check(32'hFF80_0000, 32'h7F80_0000, 32'h0000_0000);
    repeat (20000) check(rnd_float(1, 254), rnd_float(1, 254), rnd_float(1, 254));
    repeat (3000) begin
      x = rnd_float(100, 150);
      check(x, rnd_float(100, 150), x);
      check(rnd_float(100, 150), x, x);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
