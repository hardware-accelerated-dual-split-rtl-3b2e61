// fp_mul: IEEE-754 single-precision multiplier, pipelined over 2 cycles.
//
// Used by the dual-split pipeline to scale (plane - origin) by the ray's inverse direction,
// giving the ray-plane distances t1 and t2. Stage 1 classifies the operands, adds the
// exponents and forms the 48-bit significand product. Stage 2 normalises (the product of two
// significands in [1,2) lies in [1,4), so at most one right shift), rounds to nearest-even
// and packs. The document specifies only a two-cycle pipelined FP multiplier; the insides are
// this design's choice: subnormal inputs are read as zero, results below the smallest normal
// flush to a signed zero, overflow gives infinity, 0 x inf and NaN operands give the quiet
// NaN 0x7FC00000. An infinite inverse direction (axis-parallel ray) therefore yields +-inf.
//
// Interface: a and b are sampled every cycle; y is valid 2 clock edges later. No enable,
// no reset.
module fp_mul
  import dst_pkg::*;
(
  input  logic clk,
  input  f32_t a,
  input  f32_t b,
  output f32_t y
);

  logic        s;
  logic        za, zb, ia, ib, na, nb;
  logic        special_d;
  f32_t        special_res_d;

  always_comb begin
    s  = a[31] ^ b[31];
    za = (a[30:23] == 8'd0);
    zb = (b[30:23] == 8'd0);
    ia = (a[30:23] == 8'hFF) && (a[22:0] == 23'd0);
    ib = (b[30:23] == 8'hFF) && (b[22:0] == 23'd0);
    na = (a[30:23] == 8'hFF) && (a[22:0] != 23'd0);
    nb = (b[30:23] == 8'hFF) && (b[22:0] != 23'd0);
    special_d     = 1'b1;
    special_res_d = '0;
    if (na || nb || (ia && zb) || (ib && za)) special_res_d = F32_QNAN;
    else if (ia || ib)                        special_res_d = {s, 8'hFF, 23'd0};
    else if (za || zb)                        special_res_d = {s, 31'd0};
    else                                      special_d = 1'b0;
  end

  logic              s1_special;
  f32_t              s1_special_res;
  logic              s1_sign;
  logic signed [9:0] s1_exp;
  logic [47:0]       s1_prod;

  always_ff @(posedge clk) begin
    s1_special     <= special_d;
    s1_special_res <= special_res_d;
    s1_sign        <= s;
    s1_exp         <= 10'(a[30:23]) + 10'(b[30:23]) - 10'sd127;
    s1_prod        <= {1'b1, a[22:0]} * {1'b1, b[22:0]};
  end

  logic [23:0]       mant;
  logic              g, st, round_up;
  logic [24:0]       mant_r;
  logic signed [9:0] exp_n, exp_r;
  f32_t              y_d;

  always_comb begin
    if (s1_prod[47]) begin
      mant  = s1_prod[47:24];
      g     = s1_prod[23];
      st    = |s1_prod[22:0];
      exp_n = s1_exp + 10'sd1;
    end else begin
      mant  = s1_prod[46:23];
      g     = s1_prod[22];
      st    = |s1_prod[21:0];
      exp_n = s1_exp;
    end
    round_up = g & (st | mant[0]);
    mant_r   = {1'b0, mant} + 25'(round_up);
    exp_r    = mant_r[24] ? exp_n + 10'sd1 : exp_n;

    if (s1_special)              y_d = s1_special_res;
    else if (exp_n <= 10'sd0)    y_d = {s1_sign, 31'd0};
    else if (exp_r >= 10'sd255)  y_d = {s1_sign, 8'hFF, 23'd0};
    else                         y_d = {s1_sign, exp_r[7:0], mant_r[24] ? 23'd0 : mant_r[22:0]};
  end

  always_ff @(posedge clk) y <= y_d;

endmodule
