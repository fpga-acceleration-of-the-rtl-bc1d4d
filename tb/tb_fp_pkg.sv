// tb_fp_pkg: reference arithmetic for the testbenches, independent of the
// RTL floating-point units. Single-precision values are widened exactly to
// double and computed with the simulator's IEEE double arithmetic; results
// are rounded back to single precision (nearest even) by to_sp. Also holds
// the reference evaluation of the piecewise log polynomial.
package tb_fp_pkg;
  function automatic real sp2r(input logic [31:0] s);
    logic [63:0] d;
    if (s[30:23] == 0) d = {s[31], 63'd0};
    else d = {s[31], 11'(s[30:23]) + 11'd896, s[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  // round a double to single precision, nearest even; tiny values -> 0
  function automatic logic [31:0] to_sp(input real r);
    logic [63:0] d;
    logic [24:0] m;
    int e;
    d = $realtobits(r);
    e = int'(d[62:52]) - 896;
    m = {2'b01, d[51:29]};
    if (d[28] && ((|d[27:0]) || d[29])) m = m + 1'b1;
    if (m[24]) begin m = m >> 1; e = e + 1; end
    if (d[62:52] == 0 || e <= 0) return {d[63], 31'd0};
    if (e >= 255) return {d[63], 8'hff, 23'd0};
    return {d[63], e[7:0], m[22:0]};
  endfunction

  function automatic logic [31:0] sp_add(input logic [31:0] a, input logic [31:0] b);
    return to_sp(sp2r(a) + sp2r(b));
  endfunction
  function automatic logic [31:0] sp_mul(input logic [31:0] a, input logic [31:0] b);
    return to_sp(sp2r(a) * sp2r(b));
  endfunction
  function automatic logic [31:0] sp_div(input logic [31:0] a, input logic [31:0] b);
    return to_sp(sp2r(a) / sp2r(b));
  endfunction

  // distance in units in the last place between two same-width words
  function automatic longint ulps(input logic [63:0] a, input logic [63:0] b, input int w);
    longint ia, ib, d;
    ia = (w == 32) ? longint'(a[30:0]) : longint'(a[62:0]);
    ib = (w == 32) ? longint'(b[30:0]) : longint'(b[62:0]);
    if (((w == 32) ? a[31] : a[63]) != ((w == 32) ? b[31] : b[63])) return ia + ib;
    d = ia - ib;
    return (d < 0) ? -d : d;
  endfunction

  // a random single-precision value in [lo, hi) of magnitude, log-uniform
  function automatic logic [31:0] rand_sp(input int elo, input int ehi);
    logic [7:0] e;
    e = 8'(elo + int'($urandom_range(0, ehi - elo)));
    return {1'b0, e, 23'($urandom)};
  endfunction

  // segment of the piecewise log: k with 10^(-32+2k) <= x, clamped to 0..15
  function automatic int log_seg(input real x);
    int k;
    k = 0;
    for (int i = 1; i < 16; i++) if (x >= 10.0 ** (-32 + 2*i)) k = i;
    return k;
  endfunction

  // polynomial of one segment in the order of the hardware's adder tree
  function automatic real cheb_eval(input real x, input logic [319:0] row);
    real c [5];
    real x2, x3, x4;
    for (int i = 0; i < 5; i++) c[i] = $bitstoreal(row[64*i +: 64]);
    x2 = x * x; x4 = x2 * x2; x3 = x2 * x;
    return ((c[4] * x4 + c[3] * x3) + (c[2] * x2 + c[1] * x)) + c[0];
  endfunction
endpackage
