// fp_add: pipelined IEEE-754 adder, y = a + b, for any exponent/fraction width
// (EW=8, MW=23 single; EW=11, MW=52 double). The sum is formed in one
// combinational step (align with guard/round/sticky bits, add or subtract,
// normalise, round to nearest even) and then passes through LAT registers, so
// a new operand pair is accepted every cycle and its sum appears LAT cycles
// later. Subnormal inputs and results are flushed to zero, an infinite or NaN
// operand is passed through and overflow gives infinity: a simplification of
// this design, which the document does not discuss (it uses vendor cores).
module fp_add #(
  parameter int unsigned EW  = 8,
  parameter int unsigned MW  = 23,
  parameter int unsigned LAT = 11
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [EW+MW:0]  a,
  input  logic [EW+MW:0]  b,
  output logic [EW+MW:0]  y
);
  localparam int unsigned N  = EW + MW + 1;
  localparam int unsigned XW = MW + 5;              // carry, hidden, frac, G, R, S
  localparam logic [EW-1:0] EMAX = '1;

  logic [N-1:0] s;

  always_comb begin
    logic          sa, sb, sr;
    logic [EW-1:0] ea, eb;
    logic [MW:0]   ma, mb;
    logic [XW-1:0] xa, xb, sum;
    logic [EW+1:0] er;                              // signed headroom
    logic          sticky, rnd;
    int unsigned   d, lz;
    logic [MW+1:0] mr;
    // order so that |a| >= |b|
    if (a[N-2:0] >= b[N-2:0]) begin
      sa = a[N-1]; ea = a[N-2:MW]; ma = {1'b1, a[MW-1:0]};
      sb = b[N-1]; eb = b[N-2:MW]; mb = {1'b1, b[MW-1:0]};
    end else begin
      sa = b[N-1]; ea = b[N-2:MW]; ma = {1'b1, b[MW-1:0]};
      sb = a[N-1]; eb = a[N-2:MW]; mb = {1'b1, a[MW-1:0]};
    end
    s = '0;
    sr = sa;
    er = '0; sum = '0; sticky = 1'b0; rnd = 1'b0; lz = 0; mr = '0;
    xa = '0; xb = '0;
    d = int'(ea) - int'(eb);
    if (ea == EMAX) begin
      s = {sa, ea, ma[MW-1:0]};                     // inf / NaN passes through
    end else if (ea == '0) begin
      s = '0;                                       // both zero (or subnormal)
    end else if (eb == '0) begin
      s = {sa, ea, ma[MW-1:0]};
    end else begin
      xa = {1'b0, ma, 3'b000};
      xb = {1'b0, mb, 3'b000};
      if (d > MW + 4) begin
        sticky = 1'b1;
        xb = '0;
      end else begin
        for (int i = 0; i < XW; i++)
          if (i < d && xb[i]) sticky = 1'b1;
        xb = xb >> d;
      end
      xb[0] = xb[0] | sticky;
      er = {2'b00, ea};
      if (sa == sb) sum = xa + xb;
      else          sum = xa - xb;
      if (sum == '0) begin
        s = '0;
      end else begin
        if (sum[XW-1]) begin                        // carry out: shift right
          sum = {1'b0, sum[XW-1:2], sum[1] | sum[0]};
          er = er + 1'b1;
        end else begin
          lz = 0;
          for (int i = XW - 2; i >= 0; i--) begin
            if (sum[i]) break;
            lz++;
          end
          sum = sum << lz;
          er = er - (EW+2)'(lz);
        end
        // sum[MW+3] is the hidden one, sum[2:0] are G, R, S
        rnd = sum[2] & (sum[1] | sum[0] | sum[3]);
        mr = {1'b0, sum[MW+3:3]} + (MW+2)'(rnd);
        if (mr[MW+1]) begin
          mr = mr >> 1;
          er = er + 1'b1;
        end
        if ($signed(er) <= 0)
          s = '0;                                   // flush underflow
        else if (er >= {2'b00, EMAX})
          s = {sr, EMAX, {MW{1'b0}}};
        else
          s = {sr, er[EW-1:0], mr[MW-1:0]};
      end
    end
  end

  pipe_delay #(.W(N), .N(LAT)) u_lat (.clk, .rst, .d(s), .q(y));
endmodule
