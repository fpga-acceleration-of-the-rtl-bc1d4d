// fp_s2d: single to double precision conversion, exact, registered over LAT
// cycles. Zero and subnormal inputs give zero; infinity and NaN keep their
// class. Used between the normalisation and likelihood pipelines and in front
// of the double-precision log unit.
module fp_s2d #(
  parameter int unsigned LAT = 1
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] a,
  output logic [63:0] y
);
  logic [63:0] s;
  always_comb begin
    if (a[30:23] == 8'h00)      s = {a[31], 63'd0};
    else if (a[30:23] == 8'hff) s = {a[31], 11'h7ff, a[22:0], 29'd0};
    else                        s = {a[31], 11'(a[30:23]) + 11'd896, a[22:0], 29'd0};
  end
  pipe_delay #(.W(64), .N(LAT)) u_lat (.clk, .rst, .d(s), .q(y));
endmodule
