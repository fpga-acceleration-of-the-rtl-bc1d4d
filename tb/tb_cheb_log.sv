// tb_cheb_log: natural log of log-uniformly random x in [1e-32, 1], plus the
// segment boundaries 10^-30 .. 10^-2 and 1.0. Each result must (a) equal bit
// for bit the segment polynomial evaluated here in the same order of
// operations, with the segment chosen here from Table 1's bounds, and (b) be
// within 0.52 of ln(x), the error bound of the approximation. The result
// must leave 69 cycles after in_valid (default unit latencies) and every one
// of the 16 segments must be exercised.
module tb_cheb_log;
  import tb_fp_pkg::*;
  localparam int LAT = 69, N = 3000;
  logic clk = 0, rst = 1, iv = 0, ov;
  logic [63:0] x, y, xh [N+100];
  logic [319:0] rom [16];
  int checks = 0, failures = 0, cyc, k, seg_hits [16], out_cnt = 0;
  cheb_log dut (.clk, .rst, .in_valid(iv), .x, .out_valid(ov), .y);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    $readmemh("rtl/cheb_coef.hex", rom);
    foreach (seg_hits[i]) seg_hits[i] = 0;
    x = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (cyc = 0; cyc < N + LAT + 4; cyc++) begin
      iv = (cyc < N);
      if (cyc < N) begin
        if (cyc < 15)       x = $realtobits(10.0 ** (-30 + 2 * cyc));
        else if (cyc == 15) x = $realtobits(1.0);
        else x = {1'b0, 11'(917 + $urandom_range(0, 105)), 20'($urandom), 32'($urandom)};
        if ($bitstoreal(x) < 1.0e-32) x = $realtobits(1.0e-32);
        xh[cyc] = x;
      end
      @(negedge clk);
      if (cyc >= LAT - 1 && cyc - (LAT - 1) < N) begin
        real xr, e;
        int s;
        k = cyc - (LAT - 1);
        xr = $bitstoreal(xh[k]);
        s = log_seg(xr);
        seg_hits[s]++;
        e = cheb_eval(xr, rom[s]);
        checks += 3;
        if (!ov) begin failures++; $display("out_valid low at %0d", k); end
        if ($realtobits(e) != y) begin
          failures++;
          if (failures < 10) $display("log(%g) seg %0d = %h expected %h", xr, s, y, $realtobits(e));
        end
        if ($bitstoreal(y) - $ln(xr) > 0.52 || $ln(xr) - $bitstoreal(y) > 0.52) begin
          failures++;
          if (failures < 10) $display("log(%g) = %g error too large", xr, $bitstoreal(y));
        end
      end else if (ov) begin
        failures++; $display("out_valid at wrong time, cycle %0d", cyc);
      end
      @(posedge clk);
    end
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (seg_hits[i] == 0) begin failures++; $display("segment %0d never used", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
