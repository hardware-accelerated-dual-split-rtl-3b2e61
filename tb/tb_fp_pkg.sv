// tb_fp_pkg: reference conversions between single-precision bit patterns and the simulator's
// double-precision real, used by the testbenches to compute expected results independently
// of the design. f2r widens exactly (subnormals read as zero, like the design). r2f rounds a
// double to single precision, nearest-even, flushing results below the smallest normal to a
// signed zero. A sum, difference or product of two singles computed in double and rounded
// once to single is the correctly rounded single result, so these give exact expectations.
package tb_fp_pkg;

  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) begin
      d = {f[31], 63'd0};
    end else if (f[30:23] == 8'hFF) begin
      d = {f[31], 11'h7FF, (f[22:0] != 0) ? 52'h8_0000_0000_0000 : 52'd0};
    end else begin
      d = {f[31], 11'(f[30:23]) + 11'd896, f[22:0], 29'd0};
    end
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    logic [10:0] e;
    int          fe;
    logic [23:0] m;
    logic        g, st;
    d = $realtobits(r);
    e = d[62:52];
    if (e == 11'h7FF) return (d[51:0] != 0) ? 32'h7FC0_0000 : {d[63], 8'hFF, 23'd0};
    if (e == 11'd0) return {d[63], 31'd0};
    fe = int'(e) - 1023 + 127;
    if (fe <= 0) return {d[63], 31'd0};
    m  = {1'b0, d[51:29]};
    g  = d[28];
    st = |d[27:0];
    if (g && (st || m[0])) m = m + 24'd1;
    if (m[23]) begin
      fe = fe + 1;
      m  = 24'd0;
    end
    if (fe >= 255) return {d[63], 8'hFF, 23'd0};
    return {d[63], 8'(fe), m[22:0]};
  endfunction

  function automatic logic is_nan(input logic [31:0] f);
    return (f[30:23] == 8'hFF) && (f[22:0] != 0);
  endfunction

  // random normal float with biased exponent in [emin, emax]
  function automatic logic [31:0] rnd_float(input int emin, input int emax);
    logic [7:0] e;
    e = 8'(emin + int'($urandom % 32'(emax - emin + 1)));
    return {1'($urandom), e, 23'($urandom)};
  endfunction

endpackage
