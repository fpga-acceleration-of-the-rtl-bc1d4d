// fp_max: pipelined maximum of two IEEE-754 values of width W (the "max"
// boxes of Figure 5). Each operand is mapped to an unsigned key that orders
// like the real number (sign bit set: invert all bits; clear: set the sign
// bit) and the larger operand is registered. LAT cycles of latency, one
// comparison per cycle.
module fp_max #(
  parameter int unsigned W   = 32,
  parameter int unsigned LAT = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);
  logic [W-1:0] ka, kb, m;
  assign ka = a[W-1] ? ~a : {1'b1, a[W-2:0]};
  assign kb = b[W-1] ? ~b : {1'b1, b[W-2:0]};
  assign m  = (ka >= kb) ? a : b;
  pipe_delay #(.W(W), .N(LAT)) u_lat (.clk, .rst, .d(m), .q(y));
endmodule
