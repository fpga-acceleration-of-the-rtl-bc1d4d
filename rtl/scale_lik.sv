// scale_lik: scaling, normalisation and likelihood pipeline (Equations 3-6,
// Figure 5), one character per cycle.
//
// Scaling: a tree of three comparators finds m = max_N L_N(c); four
// dividers give the normalised values L_N(c)/m (Equation 3), which leave on
// norm_*. In parallel m is widened to double, its natural log taken by the
// Chebyshev log unit and narrowed back to single precision: that is
// scP(c) = log m (Equation 4), and lnScaler(c) + scP(c) is the updated
// lnScaler (Equation 5); both leave on scl_*.
// Likelihood: the normalised values, widened to double, are multiplied by the
// base frequencies pi_A..pi_T, summed by a two-level adder tree, and passed
// through a second log unit. The updated lnScaler is added, the result
// multiplied by numSites(c) and accumulated over all characters by
// lik_accum; the node's log-likelihood leaves on lnl_valid/lnl some 70
// cycles after the last character's term. The likelihood is formed for every
// node; the caller keeps it only for the root.
//
// The document describes the log of Equation 4 as single precision and the
// one of Equation 6 as double, but says only a double-precision log unit was
// built, with conversions for the single-precision case; both logs here are
// cheb_log with conversions around it.
// Inputs lnscaler_in and numsites_in come with the same character as l_in.
// Latencies at the defaults: NORM_LAT = 32, SCL_LAT = 84, LIK_LAT = 162
// cycles to the term entering the accumulator.
module scale_lik #(
  parameter int unsigned SMUL = plf_pkg::SP_MUL_LAT,
  parameter int unsigned SADD = plf_pkg::SP_ADD_LAT,
  parameter int unsigned SDIV = plf_pkg::SP_DIV_LAT,
  parameter int unsigned SMAX = plf_pkg::SP_MAX_LAT,
  parameter int unsigned DMUL = plf_pkg::DP_MUL_LAT,
  parameter int unsigned DADD = plf_pkg::DP_ADD_LAT,
  parameter int unsigned CVT  = plf_pkg::CVT_LAT
) (
  input  logic           clk,
  input  logic           rst,
  input  plf_pkg::fp64_t priors [4],
  input  logic           in_valid,
  input  logic           in_last,
  input  plf_pkg::fp32_t l_in [4],
  input  plf_pkg::fp32_t lnscaler_in,
  input  plf_pkg::fp32_t numsites_in,
  output logic           norm_valid,
  output plf_pkg::fp32_t norm [4],
  output logic           scl_valid,
  output plf_pkg::fp32_t lnscaler_out,
  output plf_pkg::fp32_t scp_out,
  output logic           lnl_valid,
  output plf_pkg::fp64_t lnl,
  output logic           accum_busy
);
  import plf_pkg::*;

  localparam int unsigned LOG_LAT  = ((2*DMUL > 5) ? 2*DMUL : 5) + DMUL + 3*DADD;
  localparam int unsigned MAX_LAT  = 2 * SMAX;
  localparam int unsigned NORM_LAT = MAX_LAT + SDIV;
  localparam int unsigned SCP_LAT  = MAX_LAT + CVT + LOG_LAT + CVT;
  localparam int unsigned SCL_LAT  = SCP_LAT + SADD;
  localparam int unsigned SUM_LAT  = NORM_LAT + CVT + DMUL + 2*DADD;
  localparam int unsigned LOGL_LAT = SUM_LAT + LOG_LAT;
  localparam int unsigned LIK_LAT  = LOGL_LAT + DADD + DMUL;

  // ---------------- max tree and normalisation
  fp32_t m_ac, m_gt, m, l_d [4];
  fp_max #(.LAT(SMAX)) u_max0 (.clk, .rst, .a(l_in[0]), .b(l_in[1]), .y(m_ac));
  fp_max #(.LAT(SMAX)) u_max1 (.clk, .rst, .a(l_in[2]), .b(l_in[3]), .y(m_gt));
  fp_max #(.LAT(SMAX)) u_max2 (.clk, .rst, .a(m_ac),    .b(m_gt),    .y(m));
  for (genvar n = 0; n < 4; n++) begin : g_norm
    pipe_delay #(.W(32), .N(MAX_LAT)) u_ld (.clk, .rst, .d(l_in[n]), .q(l_d[n]));
    fp_div #(.LAT(SDIV)) u_div (.clk, .rst, .a(l_d[n]), .b(m), .y(norm[n]));
  end

  // ---------------- scP = log(max), lnScaler += scP
  fp64_t m_dp, scp_dp;
  fp32_t scp_sp, scp_al, lns_al;
  fp_s2d #(.LAT(CVT)) u_mcv (.clk, .rst, .a(m), .y(m_dp));
  cheb_log #(.MUL_LAT(DMUL), .ADD_LAT(DADD)) u_log_scp (
    .clk, .rst, .in_valid(1'b0), .x(m_dp), .out_valid(), .y(scp_dp));
  fp_d2s #(.LAT(CVT)) u_scv (.clk, .rst, .a(scp_dp), .y(scp_sp));
  pipe_delay #(.W(32), .N(SCP_LAT)) u_lnsd (.clk, .rst, .d(lnscaler_in), .q(lns_al));
  fp_add #(.LAT(SADD)) u_lns (.clk, .rst, .a(lns_al), .b(scp_sp), .y(lnscaler_out));
  pipe_delay #(.W(32), .N(SADD)) u_scpd (.clk, .rst, .d(scp_sp), .q(scp_al));
  assign scp_out = scp_al;

  // ---------------- likelihood term
  fp64_t nd [4], pl [4], s01, s23, s4, logl, lns_dp, lns_dp_al, t_ln, ns_dp, term;
  fp32_t ns_al;
  for (genvar n = 0; n < 4; n++) begin : g_lik
    fp_s2d #(.LAT(CVT)) u_ncv (.clk, .rst, .a(norm[n]), .y(nd[n]));
    fp_mul #(.EW(11), .MW(52), .LAT(DMUL)) u_pm (.clk, .rst, .a(nd[n]), .b(priors[n]), .y(pl[n]));
  end
  fp_add #(.EW(11), .MW(52), .LAT(DADD)) u_s01 (.clk, .rst, .a(pl[0]), .b(pl[1]), .y(s01));
  fp_add #(.EW(11), .MW(52), .LAT(DADD)) u_s23 (.clk, .rst, .a(pl[2]), .b(pl[3]), .y(s23));
  fp_add #(.EW(11), .MW(52), .LAT(DADD)) u_s4  (.clk, .rst, .a(s01),   .b(s23),   .y(s4));
  cheb_log #(.MUL_LAT(DMUL), .ADD_LAT(DADD)) u_log_lik (
    .clk, .rst, .in_valid(1'b0), .x(s4), .out_valid(), .y(logl));
  fp_s2d #(.LAT(CVT)) u_lcv (.clk, .rst, .a(lnscaler_out), .y(lns_dp));
  pipe_delay #(.W(64), .N(LOGL_LAT - SCL_LAT - CVT)) u_lnsd2 (.clk, .rst, .d(lns_dp), .q(lns_dp_al));
  fp_add #(.EW(11), .MW(52), .LAT(DADD)) u_al (.clk, .rst, .a(logl), .b(lns_dp_al), .y(t_ln));
  pipe_delay #(.W(32), .N(LOGL_LAT + DADD - CVT)) u_nsd (.clk, .rst, .d(numsites_in), .q(ns_al));
  fp_s2d #(.LAT(CVT)) u_nscv (.clk, .rst, .a(ns_al), .y(ns_dp));
  fp_mul #(.EW(11), .MW(52), .LAT(DMUL)) u_ns (.clk, .rst, .a(t_ln), .b(ns_dp), .y(term));

  // ---------------- tags and accumulator
  logic lik_v, lik_l;
  pipe_delay #(.W(1), .N(NORM_LAT)) u_nv (.clk, .rst, .d(in_valid), .q(norm_valid));
  pipe_delay #(.W(1), .N(SCL_LAT))  u_sv (.clk, .rst, .d(in_valid), .q(scl_valid));
  pipe_delay #(.W(2), .N(LIK_LAT))  u_lv (.clk, .rst, .d({in_valid, in_last}), .q({lik_v, lik_l}));

  lik_accum #(.LAT(DADD)) u_acc (.clk, .rst, .in_valid(lik_v), .in_last(lik_l), .x(term),
                                 .out_valid(lnl_valid), .sum(lnl), .busy(accum_busy));
endmodule
