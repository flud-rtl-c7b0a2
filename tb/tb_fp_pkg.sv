// tb_fp_pkg: reference conversions between binary32 bit patterns and real,
// used by the testbenches to compute expected values independently of the
// RTL arithmetic.  Subnormals are treated as zero, like the RTL.
package tb_fp_pkg;

  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  // round a real to the nearest binary32 (ties to even)
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
    if (g && (st || m[0])) m = m + 1'b1;
    if (m[24]) begin m = m >> 1; e = e + 1; end
    if (e >= 255) return {d[63], 8'hff, 23'd0};
    if (e <= 0)   return {d[63], 31'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  // distance in units in the last place (large when signs differ)
  function automatic int unsigned ulp_diff(input logic [31:0] a, input logic [31:0] b);
    if (a[30:0] == 31'd0 && b[30:0] == 31'd0) return 0;
    if (a[31] != b[31]) return 32'hffff_ffff;
    return (a[30:0] > b[30:0]) ? a[30:0] - b[30:0] : b[30:0] - a[30:0];
  endfunction

  // random binary32 with exponent in [127-span, 127+span]
  function automatic logic [31:0] rand_f(input int span);
    int e;
    e = 127 - span + int'($urandom_range(2 * span, 0));
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

endpackage
