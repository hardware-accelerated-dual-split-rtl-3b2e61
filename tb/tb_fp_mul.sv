// tb_fp_mul: self-checking test of the 2-cycle single-precision multiplier.
//
// Random normal operands (exponent range chosen so products stay normal), random operands
// that overflow or underflow, and a table of special cases (zeros, infinities, NaN, 0 x inf,
// rounding ties). Expected values: the exact product in double precision rounded once to
// single (tb_fp_pkg). Each result is checked on the second clock edge after its operands.
module tb_fp_mul;
  import dst_pkg::*;
  import tb_fp_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  f32_t a, b, y;
  int   checks = 0, failures = 0;

  fp_mul dut (.clk(clk), .a(a), .b(b), .y(y));

  function automatic f32_t ref_mul(input f32_t x, input f32_t z);
    real r;
    if (is_nan(x) || is_nan(z)) return F32_QNAN;
    r = f2r(x) * f2r(z);
    if (r != r) return F32_QNAN;
    if (r == 0.0) return {x[31] ^ z[31], 31'd0};
    return r2f(r);
  endfunction

  task automatic apply(input f32_t x, input f32_t z);
    a = x; b = z;
    @(posedge clk); #1;
  endtask

  f32_t exp_q[$], in_a_q[$], in_b_q[$];
  always @(posedge clk) begin
    exp_q.push_back(ref_mul(a, b));
    in_a_q.push_back(a); in_b_q.push_back(b);
    if (exp_q.size() > 1) begin
      f32_t e, xa, xb;
      e = exp_q.pop_front(); xa = in_a_q.pop_front(); xb = in_b_q.pop_front();
      #1;
      checks++;
      if (y !== e) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h exp=%h got=%h", xa, xb, e, y);
      end
    end
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 32'h3F80_0000; b = 32'h3F80_0000;
    apply(32'h0000_0000, 32'h4000_0000);
    apply(32'h8000_0000, 32'h4000_0000);
    apply(32'h7F80_0000, 32'h0000_0000);   // inf x 0 = NaN
    apply(32'h7F80_0000, 32'hC000_0000);   // -inf
    apply(32'h4120_0000, 32'hFF80_0000);
    apply(32'h7FC0_0000, 32'h3F80_0000);
    apply(32'h7F00_0000, 32'h4000_0000);   // overflow to inf
    apply(32'h0080_0000, 32'h3F00_0000);   // underflow to zero
    apply(32'h3F80_0001, 32'h3F80_0001);
    apply(32'h3FFF_FFFF, 32'h3FFF_FFFF);   // carry and rounding
    apply(32'h3FC0_0000, 32'h3FC0_0000);
    apply(32'h3F80_0800, 32'h3F80_0800);   // exact tie, stays even
    apply(32'h3F80_0800, 32'hBF80_1800);
    apply(32'h4040_0000, 32'h3EAA_AAAB);
    repeat (30000) apply(rnd_float(70, 185), rnd_float(70, 185));
    repeat (3000)  apply(rnd_float(1, 254), rnd_float(1, 254));
    repeat (3) @(posedge clk);
    #2;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
