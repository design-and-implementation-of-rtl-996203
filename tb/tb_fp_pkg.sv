// tb_fp_pkg: reference arithmetic for the testbenches, independent of the
// RTL. Floats are converted to and from the simulator's double-precision
// real through the IEEE-754 bit patterns: f2r widens a single exactly,
// r2f rounds a double to the nearest single (ties to even), flushing results
// below the normal range to zero and overflowing to infinity, as the RTL
// units do. Also random-stimulus helpers.
package tb_fp_pkg;

  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'h00) return 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    if (f[30:23] == 8'hFF) d[62:52] = 11'h7FF;
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    int          e;
    logic [24:0] m;
    logic        g, st;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {2'b01, d[51:29]};
    g  = d[28];
    st = |d[27:0];
    if (g && (st || m[0])) m = m + 25'd1;
    if (m[24]) begin
      e = e + 1;
      m = m >> 1;
    end
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    if (e <= 0)   return {d[63], 31'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  // random normal float with biased exponent in [emin, emax]
  function automatic logic [31:0] rand_float(input int emin, input int emax);
    logic [31:0] f;
    f[31]    = 1'($urandom);
    f[30:23] = 8'(emin + int'($urandom % (emax - emin + 1)));
    f[22:0]  = 23'($urandom);
    return f;
  endfunction

  // uniform real in [lo, hi)
  function automatic real rand_real(input real lo, input real hi);
    return lo + (hi - lo) * (real'($urandom % 1000000) / 1000000.0);
  endfunction

  function automatic real absr(input real v);
    return v < 0.0 ? -v : v;
  endfunction

endpackage
