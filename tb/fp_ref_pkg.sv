// fp_ref_pkg: reference conversions between IEEE single bits and real numbers,
// used by testbenches to compute expected floating point results independently of
// the design. from_real rounds a double to single with round to nearest even and
// flushes results below the normal range to zero.
package fp_ref_pkg;
  function automatic real to_real(logic [31:0] f);
    logic [10:0] e;
    if (f[30:23] == 0) return 0.0;
    e = 11'(int'(f[30:23]) - 127 + 1023);
    return $bitstoreal({f[31], e, f[22:0], 29'd0});
  endfunction

  function automatic logic [31:0] from_real(real r);
    logic [63:0] b;
    logic [24:0] m;
    int          e;
    b = $realtobits(r);
    if (b[62:0] == 0) return 32'd0;
    e = int'(b[62:52]) - 1023 + 127;
    m = {2'b01, b[51:29]};
    if (b[28] && ((|b[27:0]) || b[29])) m = m + 1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e <= 0) return {b[63], 31'd0};
    if (e >= 255) return {b[63], 8'hff, 23'd0};
    return {b[63], e[7:0], m[22:0]};
  endfunction

  // a random float with exponent in 2^lo .. 2^hi
  function automatic logic [31:0] rand_float(int lo, int hi);
    int e;
    e = lo + int'($urandom % 32'(hi - lo + 1));
    return {1'($urandom), 8'(e + 127), 23'($urandom)};
  endfunction
endpackage
