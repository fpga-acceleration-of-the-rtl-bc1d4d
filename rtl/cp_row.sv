// cp_row: one row of the conditional probability update (Figure 4): for one
// nucleotide N of the parent node k,
//   L_N(k) = (sum_S P_NS(i) * L_S(i)) * (sum_S P_NS(j) * L_S(j)),  S in A,C,G,T
// with eight single-precision multipliers, two two-level adder trees and a
// final multiplier. Fully pipelined: one character per cycle, result
// 2*MUL_LAT + 2*ADD_LAT cycles after its operands (38 at the defaults).
module cp_row #(
  parameter int unsigned MUL_LAT = plf_pkg::SP_MUL_LAT,
  parameter int unsigned ADD_LAT = plf_pkg::SP_ADD_LAT
) (
  input  logic          clk,
  input  logic          rst,
  input  plf_pkg::fp32_t pi [4],   // P_NS(i), S = A, C, G, T
  input  plf_pkg::fp32_t li [4],   // L_S(i)(c)
  input  plf_pkg::fp32_t pj [4],   // P_NS(j)
  input  plf_pkg::fp32_t lj [4],   // L_S(j)(c)
  output plf_pkg::fp32_t lk        // L_N(k)(c)
);
  import plf_pkg::*;
  fp32_t mi [4], mj [4], si [2], sj [2], ti, tj;

  for (genvar s = 0; s < 4; s++) begin : g_m
    fp_mul #(.LAT(MUL_LAT)) u_mi (.clk, .rst, .a(pi[s]), .b(li[s]), .y(mi[s]));
    fp_mul #(.LAT(MUL_LAT)) u_mj (.clk, .rst, .a(pj[s]), .b(lj[s]), .y(mj[s]));
  end
  for (genvar h = 0; h < 2; h++) begin : g_a
    fp_add #(.LAT(ADD_LAT)) u_ai (.clk, .rst, .a(mi[2*h]), .b(mi[2*h+1]), .y(si[h]));
    fp_add #(.LAT(ADD_LAT)) u_aj (.clk, .rst, .a(mj[2*h]), .b(mj[2*h+1]), .y(sj[h]));
  end
  fp_add #(.LAT(ADD_LAT)) u_ti (.clk, .rst, .a(si[0]), .b(si[1]), .y(ti));
  fp_add #(.LAT(ADD_LAT)) u_tj (.clk, .rst, .a(sj[0]), .b(sj[1]), .y(tj));
  fp_mul #(.LAT(MUL_LAT)) u_p  (.clk, .rst, .a(ti), .b(tj), .y(lk));
endmodule
