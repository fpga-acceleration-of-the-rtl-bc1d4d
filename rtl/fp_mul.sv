// fp_mul: pipelined IEEE-754 multiplier, y = a * b, any exponent/fraction
// width. The product of the two significands is normalised and rounded to
// nearest even in one combinational step, followed by LAT registers: one
// operation per cycle, result LAT cycles later. As in fp_add, subnormals are
// flushed to zero, overflow saturates to infinity and an infinite/NaN operand
// passes through (this design's simplification).
module fp_mul #(
  parameter int unsigned EW  = 8,
  parameter int unsigned MW  = 23,
  parameter int unsigned LAT = 8
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [EW+MW:0]  a,
  input  logic [EW+MW:0]  b,
  output logic [EW+MW:0]  y
);
  localparam int unsigned N    = EW + MW + 1;
  localparam int          BIAS = (1 << (EW - 1)) - 1;
  localparam logic [EW-1:0] EMAX = '1;

  logic [N-1:0] s;

  always_comb begin
    logic              sr, g, st, rnd;
    logic [EW-1:0]     ea, eb;
    logic [2*MW+1:0]   p;
    logic [MW+1:0]     mr;
    int                er;
    sr = a[N-1] ^ b[N-1];
    ea = a[N-2:MW];
    eb = b[N-2:MW];
    p  = {1'b1, a[MW-1:0]} * {1'b1, b[MW-1:0]};
    er = int'(ea) + int'(eb) - BIAS;
    g = 1'b0; st = 1'b0; mr = '0; rnd = 1'b0;
    if (ea == EMAX)      s = a;
    else if (eb == EMAX) s = b;
    else if (ea == '0 || eb == '0) s = '0;
    else begin
      if (p[2*MW+1]) begin
        er = er + 1;
        g  = p[MW];
        st = |p[MW-1:0];
        mr = {1'b0, p[2*MW+1:MW+1]};
      end else begin
        g  = p[MW-1];
        st = |p[MW-2:0];
        mr = {1'b0, p[2*MW:MW]};
      end
      rnd = g & (st | mr[0]);
      mr = mr + (MW+2)'(rnd);
      if (mr[MW+1]) begin
        mr = mr >> 1;
        er = er + 1;
      end
      if (er <= 0)                s = '0;
      else if (er >= int'(EMAX))  s = {sr, EMAX, {MW{1'b0}}};
      else                        s = {sr, er[EW-1:0], mr[MW-1:0]};
    end
  end

  pipe_delay #(.W(N), .N(LAT)) u_lat (.clk, .rst, .d(s), .q(y));
endmodule
