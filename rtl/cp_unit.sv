// cp_unit: conditional probability pipeline (Equation 2, Figure 4 replicated
// four times). For every character c it combines the four conditional
// probabilities of the left child i and the right child j through their
// 4x4 transition matrices P(i), P(j) into the four values of the parent k.
// The matrices are held by the caller for the whole node (index N*4+S holds
// P_NS). A valid and a last-character tag travel with the data.
// Timing: one character per cycle, LATENCY = 2*MUL_LAT + 2*ADD_LAT cycles
// (38 with the default units, the Virtex-2 Pro figure of the document).
module cp_unit #(
  parameter int unsigned MUL_LAT = plf_pkg::SP_MUL_LAT,
  parameter int unsigned ADD_LAT = plf_pkg::SP_ADD_LAT
) (
  input  logic           clk,
  input  logic           rst,
  input  plf_pkg::fp32_t p_left  [16],
  input  plf_pkg::fp32_t p_right [16],
  input  logic           in_valid,
  input  logic           in_last,
  input  plf_pkg::fp32_t l_left  [4],
  input  plf_pkg::fp32_t l_right [4],
  output logic           out_valid,
  output logic           out_last,
  output plf_pkg::fp32_t l_out   [4]
);
  import plf_pkg::*;
  localparam int unsigned LATENCY = 2 * MUL_LAT + 2 * ADD_LAT;

  for (genvar n = 0; n < 4; n++) begin : g_row
    fp32_t pi [4], pj [4];
    for (genvar s = 0; s < 4; s++) begin : g_s
      assign pi[s] = p_left[n*4+s];
      assign pj[s] = p_right[n*4+s];
    end
    cp_row #(.MUL_LAT(MUL_LAT), .ADD_LAT(ADD_LAT)) u_row (
      .clk, .rst, .pi, .li(l_left), .pj, .lj(l_right), .lk(l_out[n]));
  end

  pipe_delay #(.W(2), .N(LATENCY)) u_tag (.clk, .rst, .d({in_valid, in_last}),
                                          .q({out_valid, out_last}));
endmodule
