// tb_fp_add: self-checking test of the 2-cycle single-precision adder/subtractor.
//
// Operands are random normal floats (exponents kept where no result can underflow), nearby
// values that cancel, signs mixed, plus a table of special cases (zeros, infinities, NaN).
// The expected value comes from the simulator's own arithmetic: the exact difference of two
// floats computed in double precision and rounded once to single, which is the correctly
// rounded single result. Each result is checked on the second clock edge after its operands are sampled.
module tb_fp_add;
  import dst_pkg::*;
  import tb_fp_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  f32_t a, b, y;
  logic sub;
  int   checks = 0, failures = 0;

  fp_add dut (.clk(clk), .a(a), .b(b), .sub(sub), .y(y));

  function automatic f32_t ref_add(input f32_t x, input f32_t z, input logic s);
    real  r;
    f32_t o;
    if (is_nan(x) || is_nan(z)) return F32_QNAN;
    r = s ? f2r(x) - f2r(z) : f2r(x) + f2r(z);
    if (r != r) return F32_QNAN;
    o = r2f(r);
    // an exact zero from opposite signs is +0; from equal signs it keeps the sign
    if (r == 0.0) o = {x[31] & (z[31] ^ s), 31'd0};
    return o;
  endfunction

  task automatic apply(input f32_t x, input f32_t z, input logic s);
    a = x; b = z; sub = s;
    @(posedge clk); #1;
  endtask

  // expected queue, checked against y two edges after application
  f32_t exp_q[$];
  f32_t in_a_q[$], in_b_q[$];
  always @(posedge clk) begin
    exp_q.push_back(ref_add(a, b, sub));
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
    f32_t x;
    a = 32'h3F80_0000; b = 32'h3F80_0000; sub = 0;
    // special cases
    apply(32'h0000_0000, 32'h0000_0000, 1'b0);
    apply(32'h8000_0000, 32'h8000_0000, 1'b0);
    apply(32'h8000_0000, 32'h0000_0000, 1'b1);
    apply(32'h3F80_0000, 32'h3F80_0000, 1'b1);   // 1 - 1 = +0
    apply(32'h7F80_0000, 32'h3F80_0000, 1'b1);   // inf - 1
    apply(32'h7F80_0000, 32'h7F80_0000, 1'b1);   // inf - inf = NaN
    apply(32'h7F80_0000, 32'hFF80_0000, 1'b1);   // inf - -inf = inf
    apply(32'h4120_0000, 32'hFF80_0000, 1'b0);   // 10 + -inf
    apply(32'h7FC0_0000, 32'h3F80_0000, 1'b0);   // NaN
    apply(32'h7F7F_FFFF, 32'h7F7F_FFFF, 1'b0);   // overflow
    apply(32'h3F80_0000, 32'h3380_0000, 1'b0);   // 1 + 2^-24: tie, even
    apply(32'h3F80_0001, 32'h3380_0000, 1'b0);   // tie, round up
    apply(32'h3F80_0000, 32'h3380_0000, 1'b1);   // 1 - 2^-24
    apply(32'h4B7F_FFFF, 32'h3F00_0000, 1'b0);   // carry-out with rounding
    apply(32'h4000_0000, 32'h0000_0000, 1'b1);
    apply(32'h0000_0000, 32'h4000_0000, 1'b1);
    repeat (20000) begin
      apply(rnd_float(40, 210), rnd_float(40, 210), 1'($urandom));
    end
    repeat (20000) begin
      // close exponents: alignment, cancellation, normalisation
      x = rnd_float(60, 190);
      apply(x, {1'($urandom), 8'(x[30:23] + ($urandom % 5) - 2), 23'($urandom)}, 1'($urandom));
    end
    repeat (2000) begin
      x = rnd_float(60, 190);
      apply(x, {x[31:8], 8'($urandom)}, 1'b1);
    end
    repeat (3) @(posedge clk);
    #2;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
