// fp_ref_pkg: reference single-precision arithmetic for the testbenches.
//
// Converts binary32 bit patterns to and from SystemVerilog reals (doubles).
// A binary32 sum, difference or product computed in double precision and
// then rounded once to binary32 equals the correctly rounded binary32 result,
// so these functions give expected values independently of the RTL. r2f
// rounds to nearest, ties to even, and flushes subnormal results to zero like
// the hardware.
package fp_ref_pkg;

  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    // exponent rebias: e_d = e_s - 127 + 1023
    d = {f[31], 11'(f[30:23]) + 11'd896, f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    logic        s, g, st, lsb;
    int          e;
    logic [23:0] m;
    d = $realtobits(r);
    s = d[63];
    if (d[62:52] == 11'h7FF) return (d[51:0] != 0) ? 32'h7FC0_0000 : {s, 8'hFF, 23'd0};
    if (d[62:52] == 11'd0) return {s, 31'd0};
    e   = int'(d[62:52]) - 1023 + 127;
    m   = {1'b0, d[51:29]};
    lsb = d[29];
    g   = d[28];
    st  = (d[27:0] != 0);
    if (g && (st || lsb)) m = m + 24'd1;
    if (m[23]) begin
      m = 24'd0;
      e = e + 1;
    end
    if (e >= 255) return {s, 8'hFF, 23'd0};
    if (e <= 0) return {s, 31'd0};
    return {s, 8'(e), m[22:0]};
  endfunction

  function automatic logic [31:0] fadd(input logic [31:0] a, input logic [31:0] b);
    return r2f(f2r(a) + f2r(b));
  endfunction

  function automatic logic [31:0] fsub(input logic [31:0] a, input logic [31:0] b);
    return r2f(f2r(a) - f2r(b));
  endfunction

  function automatic logic [31:0] fmul(input logic [31:0] a, input logic [31:0] b);
    return r2f(f2r(a) * f2r(b));
  endfunction

  // random normal number with exponent in [127-span, 127+span]
  function automatic logic [31:0] frand(input int span);
    logic [7:0] e;
    e = 8'(127 - span + int'($urandom_range(2 * span, 0)));
    return {1'($urandom), e, 23'($urandom)};
  endfunction

endpackage
