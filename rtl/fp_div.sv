// fp_div: pipelined IEEE-754 divider, y = a / b, any exponent/fraction width
// (single precision in this design, for the normalisation of Figure 5). The
// significand quotient is computed with two extra bits plus a sticky bit from
// the remainder and rounded to nearest even, then delayed by LAT registers:
// one division per cycle, result LAT cycles later. Zero divided by anything
// is zero; division by zero or an infinite/NaN operand gives infinity. The
// divider's internal structure is this design's choice.
module fp_div #(
  parameter int unsigned EW  = 8,
  parameter int unsigned MW  = 23,
  parameter int unsigned LAT = 30
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [EW+MW:0]  a,
  input  logic [EW+MW:0]  b,
  output logic [EW+MW:0]  y
);
  localparam int unsigned N    = EW + MW + 1;
  localparam int unsigned QW   = 2*MW + 4;
  localparam int          BIAS = (1 << (EW - 1)) - 1;
  localparam logic [EW-1:0] EMAX = '1;

  logic [N-1:0] s;

  always_comb begin
    logic              sr, g, st, rnd;
    logic [EW-1:0]     ea, eb;
    logic [QW-1:0]     num, den, q, r;
    logic [MW+1:0]     mr;
    int                er;
    sr  = a[N-1] ^ b[N-1];
    ea  = a[N-2:MW];
    eb  = b[N-2:MW];
    num = QW'({1'b1, a[MW-1:0]}) << (MW + 3);
    den = QW'({1'b1, b[MW-1:0]});
    q   = num / den;
    r   = num % den;
    er  = int'(ea) - int'(eb) + BIAS;
    g = 1'b0; st = 1'b0; mr = '0; rnd = 1'b0;
    if (ea == EMAX || eb == EMAX || eb == '0) s = {sr, EMAX, {MW{1'b0}}};
    else if (ea == '0) s = '0;
    else begin
      if (q[MW+3]) begin
        mr = {1'b0, q[MW+3:3]};
        g  = q[2];
        st = q[1] | q[0] | (r != '0);
      end else begin
        er = er - 1;
        mr = {1'b0, q[MW+2:2]};
        g  = q[1];
        st = q[0] | (r != '0);
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
