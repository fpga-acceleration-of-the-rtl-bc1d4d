// fp_d2s: double to single precision conversion with round to nearest even,
// registered over LAT cycles. Results below the single-precision normal range
// flush to zero and results above it saturate to infinity. Used after the
// double-precision log unit, whose result feeds the single-precision scP and
// lnScaler vectors.
module fp_d2s #(
  parameter int unsigned LAT = 1
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [63:0] a,
  output logic [31:0] y
);
  logic [31:0] s;
  always_comb begin
    logic [24:0] m;
    int          e;
    logic        rnd;
    e   = int'(a[62:52]) - 896;
    rnd = a[28] & ((|a[27:0]) | a[29]);
    m   = {2'b01, a[51:29]} + 25'(rnd);
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (a[62:52] == 11'h7ff)  s = {a[63], 8'hff, a[51:29]};
    else if (a[62:52] == 0)   s = {a[63], 31'd0};
    else if (e <= 0)          s = {a[63], 31'd0};
    else if (e >= 255)        s = {a[63], 8'hff, 23'd0};
    else                      s = {a[63], e[7:0], m[22:0]};
  end
  pipe_delay #(.W(32), .N(LAT)) u_lat (.clk, .rst, .d(s), .q(y));
endmodule
