// tb_fp_cvt: single-to-double conversion must be exact and
// double-to-single conversion must round to nearest even (checked against
// the reference rounding to_sp), both one cycle after the input. Includes
// zero, values that overflow or underflow single precision, and halfway
// cases.
module tb_fp_cvt;
  import tb_fp_pkg::*;
  localparam int N = 2000;
  logic clk = 0, rst = 1;
  logic [31:0] s_in, s_out, sh [N+8];
  logic [63:0] d_in, d_out, dh [N+8];
  int checks = 0, failures = 0, cyc, k;
  fp_s2d #(.LAT(1)) u_s2d (.clk, .rst, .a(s_in), .y(d_out));
  fp_d2s #(.LAT(1)) u_d2s (.clk, .rst, .a(d_in), .y(s_out));
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    s_in = 0; d_in = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (cyc = 0; cyc < N + 4; cyc++) begin
      if (cyc < N) begin
        s_in = rand_sp(1, 254);
        if ($urandom_range(0, 1)) s_in[31] = 1'b1;
        if (cyc == 0) s_in = 0;
        d_in = {1'($urandom), 11'(800 + $urandom_range(0, 450)), 20'($urandom), 32'($urandom)};
        if ($urandom_range(0, 5) == 0) d_in[28:0] = 29'h1000_0000;   // halfway
        if (cyc == 1) d_in = 64'd0;
        sh[cyc] = s_in; dh[cyc] = d_in;
      end
      @(negedge clk);
      if (cyc >= 0 && cyc < N) begin
        k = cyc;
        checks += 2;
        if ($bitstoreal(d_out) != sp2r(sh[k])) begin
          failures++; $display("s2d %h -> %h", sh[k], d_out);
        end
        if (s_out != to_sp($bitstoreal(dh[k]))) begin
          failures++; $display("d2s %h -> %h expected %h", dh[k], s_out, to_sp($bitstoreal(dh[k])));
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
