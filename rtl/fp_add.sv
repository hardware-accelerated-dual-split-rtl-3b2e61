// fp_add: IEEE-754 single-precision adder/subtractor, pipelined over 2 cycles.
//
// Used by the dual-split pipeline to form (plane - ray origin) for both planes. Stage 1
// classifies the operands, orders them by magnitude and right-aligns the smaller significand
// (three extra bits: guard, round and a sticky bit that collects everything shifted out).
// Stage 2 adds or subtracts, normalises with a leading-zero count, rounds to nearest-even and
// packs the result. The document specifies only a two-cycle pipelined FP adder; everything
// inside is this design's choice: subnormal inputs are read as zero, results below the
// smallest normal flush to a signed zero, overflow gives infinity, and every NaN result is
// the quiet NaN 0x7FC00000.
//
// Interface: a, b, sub (1 = a - b) are sampled every cycle; y is valid 2 clock edges later.
// There is no enable and no reset: the pipeline always advances.
module fp_add
  import dst_pkg::*;
(
  input  logic clk,
  input  f32_t a,
  input  f32_t b,
  input  logic sub,
  output f32_t y
);

  // ---------------- stage 1: classify, swap, align ----------------
  logic        sa, sb;
  logic [7:0]  ea, eb;
  logic        za, zb, ia, ib, na, nb;
  logic [23:0] ma, mb;

  always_comb begin
    sa = a[31];
    sb = b[31] ^ sub;
    ea = a[30:23];
    eb = b[30:23];
    za = (ea == 8'd0);
    zb = (eb == 8'd0);
    ia = (ea == 8'hFF) && (a[22:0] == 23'd0);
    ib = (eb == 8'hFF) && (b[22:0] == 23'd0);
    na = (ea == 8'hFF) && (a[22:0] != 23'd0);
    nb = (eb == 8'hFF) && (b[22:0] != 23'd0);
    ma = {1'b1, a[22:0]};
    mb = {1'b1, b[22:0]};
  end

  // special results decided in stage 1
  logic        s1_special_d;
  f32_t        s1_special_res_d;
  logic        s1_swap;
  logic        s1_sl_d;          // sign of the larger operand
  logic [7:0]  s1_el_d;          // exponent of the larger operand
  logic [26:0] s1_ml_d, s1_ms_d; // larger and aligned smaller significand, with G/R/S
  logic        s1_effsub_d;
  logic [7:0]  shamt;
  logic [26:0] ms_ext;
  logic [26:0] ms_shifted;
  logic        sticky;

  always_comb begin
    s1_special_d     = 1'b1;
    s1_special_res_d = '0;
    if (na || nb || (ia && ib && (sa != sb))) begin
      s1_special_res_d = F32_QNAN;
    end else if (ia) begin
      s1_special_res_d = {sa, 8'hFF, 23'd0};
    end else if (ib) begin
      s1_special_res_d = {sb, 8'hFF, 23'd0};
    end else if (za && zb) begin
      s1_special_res_d = {sa & sb, 31'd0};
    end else if (za) begin
      s1_special_res_d = {sb, b[30:0]};
    end else if (zb) begin
      s1_special_res_d = {sa, a[30:0]};
    end else begin
      s1_special_d = 1'b0;
    end

    s1_swap     = (eb > ea) || ((eb == ea) && (mb > ma));
    s1_sl_d     = s1_swap ? sb : sa;
    s1_el_d     = s1_swap ? eb : ea;
    s1_ml_d     = {(s1_swap ? mb : ma), 3'b000};
    ms_ext      = {(s1_swap ? ma : mb), 3'b000};
    shamt       = s1_swap ? (eb - ea) : (ea - eb);
    s1_effsub_d = (sa != sb);

    if (shamt >= 8'd27) begin
      ms_shifted = 27'd0;
      sticky     = |ms_ext;
    end else begin
      ms_shifted = ms_ext >> shamt;
      sticky     = |(ms_ext & ((27'd1 << shamt) - 27'd1));
    end
    s1_ms_d = {ms_shifted[26:1], ms_shifted[0] | sticky};
  end

  logic        s1_special;
  f32_t        s1_special_res;
  logic        s1_sl;
  logic [7:0]  s1_el;
  logic [26:0] s1_ml, s1_ms;
  logic        s1_effsub;

  always_ff @(posedge clk) begin
    s1_special     <= s1_special_d;
    s1_special_res <= s1_special_res_d;
    s1_sl          <= s1_sl_d;
    s1_el          <= s1_el_d;
    s1_ml          <= s1_ml_d;
    s1_ms          <= s1_ms_d;
    s1_effsub      <= s1_effsub_d;
  end

  // ---------------- stage 2: add, normalise, round, pack ----------------
  logic [27:0] sum;
  logic [26:0] norm;
  logic signed [9:0] exp_n;
  logic [4:0]  lz;
  logic [24:0] mant_r;
  logic        round_up;
  logic signed [9:0] exp_r;
  f32_t        y_d;

  always_comb begin
    sum = s1_effsub ? ({1'b0, s1_ml} - {1'b0, s1_ms}) : ({1'b0, s1_ml} + {1'b0, s1_ms});

    // leading-zero count over sum[26:0]
    lz = 5'd0;
    for (int i = 0; i <= 26; i++) begin
      if (sum[i]) lz = 5'(26 - i);
    end

    if (sum[27]) begin
      norm  = {sum[27:2], sum[1] | sum[0]};
      exp_n = 10'(s1_el) + 10'sd1;
    end else begin
      norm  = sum[26:0] << lz;
      exp_n = 10'(s1_el) - 10'(lz);
    end

    round_up = norm[2] & (norm[1] | norm[0] | norm[3]);
    mant_r   = {1'b0, norm[26:3]} + 25'(round_up);
    exp_r    = exp_n;
    if (mant_r[24]) exp_r = exp_n + 10'sd1;   // mantissa is then 1.000..., bits [23:1] zero

    if (s1_special) begin
      y_d = s1_special_res;
    end else if (sum == 28'd0) begin
      y_d = 32'd0;                            // exact cancellation: +0 in round-to-nearest
    end else if (exp_n <= 10'sd0) begin
      y_d = {s1_sl, 31'd0};                   // flush to zero
    end else if (exp_r >= 10'sd255) begin
      y_d = {s1_sl, 8'hFF, 23'd0};
    end else begin
      y_d = {s1_sl, exp_r[7:0], mant_r[24] ? 23'd0 : mant_r[22:0]};
    end
  end

  always_ff @(posedge clk) y <= y_d;

endmodule
