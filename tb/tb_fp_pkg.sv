// tb_fp_pkg: reference helpers for the testbenches. Conversions between
// IEEE-754 single precision bit patterns and SystemVerilog reals (double),
// with round to nearest even and subnormals flushed to zero, and a distance
// in units in the last place between two single precision numbers.
package tb_fp_pkg;

  function automatic logic [31:0] r2f(real r);
    logic [63:0] b;
    int e;
    logic [23:0] m;
    logic g, s;
    b = $realtobits(r);
    if (b[62:52] == 11'd0) return {b[63], 31'd0};
    e = int'(b[62:52]) - 1023 + 127;
    m = {1'b0, b[51:29]};
    g = b[28];
    s = |b[27:0];
    if (g && (s || m[0])) m = m + 24'd1;
    if (m[23]) begin
      m = '0;
      e = e + 1;
    end
    if (e >= 255) return {b[63], 8'hFF, 23'd0};
    if (e <= 0) return {b[63], 31'd0};
    return {b[63], e[7:0], m[22:0]};
  endfunction

  function automatic real f2r(logic [31:0] f);
    logic [10:0] e;
    if (f[30:23] == 8'd0) return 0.0;
    e = 11'(f[30:23]) - 11'd127 + 11'd1023;
    return $bitstoreal({f[31], e, f[22:0], 29'd0});
  endfunction

  function automatic longint ordered(logic [31:0] f);
    longint v;
    v = longint'(f[30:0]);
    if (f[30:23] == 8'd0) v = 0;
    return f[31] ? -v : v;
  endfunction

  function automatic longint ulps(logic [31:0] a, logic [31:0] b);
    longint d;
    d = ordered(a) - ordered(b);
    return d < 0 ? -d : d;
  endfunction

  // a random float with exponent field in [elo, ehi]
  function automatic logic [31:0] rand_f(int elo, int ehi);
    logic [31:0] f;
    int e;
    e = elo + int'($urandom_range(ehi - elo));
    f = {1'($urandom), e[7:0], 23'($urandom)};
    return f;
  endfunction

  function automatic real rel_err(real a, real b);
    real d, m;
    d = a - b;
    if (d < 0) d = -d;
    m = b < 0 ? -b : b;
    if (m < 1e-30) return d;
    return d / m;
  endfunction

endpackage
