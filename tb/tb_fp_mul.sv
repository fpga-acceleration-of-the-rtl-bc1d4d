// tb_fp_mul: random single- and double-precision multiplications (mixed signs,
// zeros, wide exponent ranges) against the simulator's
// IEEE double arithmetic. A result must appear exactly LAT cycles after its
// operands. Double results must match bit for bit; single results may differ
// by one ulp (double rounding in the reference).
module tb_fp_mul;
  import tb_fp_pkg::*;
  localparam int SL = 8, DL = 9, N = 3000;
  logic clk = 0, rst = 1;
  logic [31:0] sa, sb, sy;
  logic [63:0] da, db, dy;
  logic [31:0] sah [N+64], sbh [N+64];
  logic [63:0] dah [N+64], dbh [N+64];
  int checks = 0, failures = 0, cyc = 0;

  fp_mul #(.EW(8),  .MW(23), .LAT(SL)) u_s (.clk, .rst, .a(sa), .b(sb), .y(sy));
  fp_mul #(.EW(11), .MW(52), .LAT(DL)) u_d (.clk, .rst, .a(da), .b(db), .y(dy));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [63:0] rand_dp();
    logic [10:0] e = 11'(900 + $urandom_range(0, 200));
    return {1'b0, e, 20'($urandom), 32'($urandom)};
  endfunction

  initial begin
    sa = 0; sb = 0; da = 0; db = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (cyc = 0; cyc < N + 40; cyc++) begin
      if (cyc < N) begin
        case ($urandom_range(0, 5))
          0: begin sa = rand_sp(120, 134); sb = {~sa[31], sa[30:3], 3'($urandom)}; end
          1: begin sa = rand_sp(60, 190); sb = 32'd0; end
          2: begin sa = rand_sp(100, 140); sb = rand_sp(100, 140) | 32'h8000_0000; end
          default: begin sa = rand_sp(110, 140); sb = rand_sp(110, 140); end
        endcase
        if ($urandom_range(0, 1)) sa[31] = ~sa[31];
        da = rand_dp(); db = rand_dp();
        if ($urandom_range(0, 3) == 0) db = {~da[63], da[62:4], 4'($urandom)};
        if ($urandom_range(0, 1)) db[63] = ~db[63];
        sah[cyc] = sa; sbh[cyc] = sb; dah[cyc] = da; dbh[cyc] = db;
      end
      @(negedge clk);
      if (cyc >= SL - 1 && cyc - (SL - 1) < N) begin
        int k;
        logic [31:0] e;
        k = cyc - (SL - 1);
        e = to_sp(sp2r(sah[k]) * sp2r(sbh[k]));
        checks++;
        if (ulps(64'(sy), 64'(e), 32) > 0) begin
          failures++;
          if (failures < 10) $display("SP %h * %h = %h expected %h", sah[k], sbh[k], sy, e);
        end
      end
      if (cyc >= DL - 1 && cyc - (DL - 1) < N) begin
        int k;
        logic [63:0] e;
        k = cyc - (DL - 1);
        e = $realtobits($bitstoreal(dah[k]) * $bitstoreal(dbh[k]));
        if (e[62:52] == 0) e = {e[63], 63'd0};
        checks++;
        if (dy != e && !(dy[62:0] == 0 && e[62:0] == 0)) begin
          failures++;
          if (failures < 10) $display("DP %h * %h = %h expected %h", dah[k], dbh[k], dy, e);
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
