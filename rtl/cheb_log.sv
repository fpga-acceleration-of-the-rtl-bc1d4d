// cheb_log: double-precision natural logarithm for 1e-32 <= x <= 1 by a
// piecewise degree-4 polynomial, after Figure 2 of the design.
//
// (a) Segment select. A radix-2 comparison network of four comparators, one
//     per pipeline stage, resolves x into one of 16 two-decade segments
//     (Table 1: segment k covers 10^(-32+2k) <= x < 10^(-30+2k)). The first
//     comparator tests 1e-16 and gives address bit A3; the second tests 1e-24
//     or 1e-8 chosen by A3 and gives A2; the third picks one of 1e-28, 1e-20,
//     1e-12, 1e-4 by {A3,A2} (A1); the fourth one of the eight odd decades
//     by {A3,A2,A1} (A0). {A3,A2,A1,A0} addresses the coefficient memory.
//     A bit is set when x is at or above the threshold, as Table 1 bounds
//     each segment below with "<=".
// (b) Powers. Three multipliers form x^2, then x^4 = x^2*x^2 and
//     x^3 = x^2*x, with x and x^2 delayed alongside.
// (c) Polynomial. Four multipliers form c_i*x^i, a three-level adder tree
//     sums them and c_0 (delayed) is added last: seven multipliers, four
//     adders, four comparators.
//
// The coefficients are this design's: the first-kind Chebyshev series of
// ln(x) on each segment truncated after T_4 and expanded into powers of x,
// c_0..c_4 per segment, held in a 16-entry ROM of 5 doubles read from
// rtl/cheb_coef.hex (one line per segment, c4 first). Their largest error,
// about 0.52 at the lower end of every segment, repeats in every segment.
// x below 1e-32 uses segment 0 and x above 1 segment 15, both extrapolated.
//
// Timing: one x per cycle; LATENCY = max(2*MUL_LAT, 5) + MUL_LAT + 3*ADD_LAT
// cycles from in_valid to out_valid. The coefficient fetch (4 comparator
// stages and a ROM read) runs in parallel with the powers of x.
module cheb_log #(
  parameter int unsigned MUL_LAT   = plf_pkg::DP_MUL_LAT,
  parameter int unsigned ADD_LAT   = plf_pkg::DP_ADD_LAT,
  parameter string       COEF_FILE = "rtl/cheb_coef.hex"
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  logic [63:0] x,
  output logic        out_valid,
  output logic [63:0] y
);
  import plf_pkg::*;

  localparam int unsigned FETCH_LAT = 5;
  localparam int unsigned POW_LAT   = 2 * MUL_LAT;
  localparam int unsigned ALIGN     = (POW_LAT > FETCH_LAT) ? POW_LAT : FETCH_LAT;
  localparam int unsigned LATENCY   = ALIGN + MUL_LAT + 3 * ADD_LAT;

  // thresholds 10^e as double bit patterns
  localparam fp64_t T16 = 64'h3c9cd2b297d889bc;
  localparam fp64_t T2 [2] = '{64'h3af357c299a88ea7, 64'h3e45798ee2308c3a};          // 1e-24, 1e-8
  localparam fp64_t T1 [4] = '{64'h3a1fb0f6be506019, 64'h3bc79ca10c924223,           // 1e-28, 1e-20
                               64'h3d719799812dea11, 64'h3f1a36e2eb1c432d};          // 1e-12, 1e-4
  localparam fp64_t T0 [8] = '{64'h39b4484bfeebc2a0, 64'h3a88c240c4aecb14,           // 1e-30, 1e-26
                               64'h3b5e392010175ee6, 64'h3c32725dd1d243ac,           // 1e-22, 1e-18
                               64'h3d06849b86a12b9b, 64'h3ddb7cdfd9d7bdbb,           // 1e-14, 1e-10
                               64'h3eb0c6f7a0b5ed8d, 64'h3f847ae147ae147b};          // 1e-6,  1e-2

  // x >= t for x, t positive: an unsigned compare of the bit patterns
  function automatic logic ge(input fp64_t a, input fp64_t t);
    return !a[63] && (a[62:0] >= t[62:0]);
  endfunction

  // ---------------- (a) comparison network and coefficient memory
  logic [319:0] coef_rom [16];
  initial $readmemh(COEF_FILE, coef_rom);

  fp64_t      cx1, cx2, cx3;
  logic       a3_1;
  logic [1:0] a_2;
  logic [2:0] a_3;
  logic [3:0] addr;
  logic [319:0] coef_q;

  always_ff @(posedge clk) begin
    cx1  <= x;
    a3_1 <= ge(x, T16);
    cx2  <= cx1;
    a_2  <= {a3_1, ge(cx1, T2[a3_1])};
    cx3  <= cx2;
    a_3  <= {a_2, ge(cx2, T1[a_2])};
    addr <= {a_3, ge(cx3, T0[a_3])};
    coef_q <= coef_rom[addr];
  end

  logic [319:0] coef_al;
  pipe_delay #(.W(320), .N(ALIGN - FETCH_LAT)) u_cdly (.clk, .rst, .d(coef_q), .q(coef_al));

  fp64_t c0, c1, c2, c3, c4;
  assign {c4, c3, c2, c1, c0} = coef_al;

  // ---------------- (b) powers of x
  fp64_t x2, x4, x3, x_1, x_2, x2_1;
  fp_mul #(.EW(11), .MW(52), .LAT(MUL_LAT)) u_sq  (.clk, .rst, .a(x),  .b(x),   .y(x2));
  pipe_delay #(.W(64), .N(MUL_LAT)) u_xd1 (.clk, .rst, .d(x),   .q(x_1));
  fp_mul #(.EW(11), .MW(52), .LAT(MUL_LAT)) u_p4  (.clk, .rst, .a(x2), .b(x2),  .y(x4));
  fp_mul #(.EW(11), .MW(52), .LAT(MUL_LAT)) u_p3  (.clk, .rst, .a(x2), .b(x_1), .y(x3));
  pipe_delay #(.W(64), .N(MUL_LAT + ALIGN - POW_LAT)) u_xd2 (.clk, .rst, .d(x_1), .q(x_2));
  pipe_delay #(.W(64), .N(MUL_LAT + ALIGN - POW_LAT)) u_x2d (.clk, .rst, .d(x2),  .q(x2_1));

  // powers aligned with the coefficients at ALIGN
  fp64_t x4a, x3a;
  pipe_delay #(.W(64), .N(ALIGN - POW_LAT)) u_x4d (.clk, .rst, .d(x4), .q(x4a));
  pipe_delay #(.W(64), .N(ALIGN - POW_LAT)) u_x3d (.clk, .rst, .d(x3), .q(x3a));

  // ---------------- (c) polynomial
  fp64_t t4, t3, t2, t1, s43, s21, s4321, c0d, yv;
  fp_mul #(.EW(11), .MW(52), .LAT(MUL_LAT)) u_m4 (.clk, .rst, .a(c4), .b(x4a),  .y(t4));
  fp_mul #(.EW(11), .MW(52), .LAT(MUL_LAT)) u_m3 (.clk, .rst, .a(c3), .b(x3a),  .y(t3));
  fp_mul #(.EW(11), .MW(52), .LAT(MUL_LAT)) u_m2 (.clk, .rst, .a(c2), .b(x2_1), .y(t2));
  fp_mul #(.EW(11), .MW(52), .LAT(MUL_LAT)) u_m1 (.clk, .rst, .a(c1), .b(x_2),  .y(t1));
  pipe_delay #(.W(64), .N(MUL_LAT + 2 * ADD_LAT)) u_c0d (.clk, .rst, .d(c0), .q(c0d));
  fp_add #(.EW(11), .MW(52), .LAT(ADD_LAT)) u_a43 (.clk, .rst, .a(t4), .b(t3), .y(s43));
  fp_add #(.EW(11), .MW(52), .LAT(ADD_LAT)) u_a21 (.clk, .rst, .a(t2), .b(t1), .y(s21));
  fp_add #(.EW(11), .MW(52), .LAT(ADD_LAT)) u_a4  (.clk, .rst, .a(s43), .b(s21), .y(s4321));
  fp_add #(.EW(11), .MW(52), .LAT(ADD_LAT)) u_a0  (.clk, .rst, .a(s4321), .b(c0d), .y(yv));

  assign y = yv;
  pipe_delay #(.W(1), .N(LATENCY)) u_vd (.clk, .rst, .d(in_valid), .q(out_valid));
endmodule
