// tb_fp_max: random pairs of single-precision values of both signs,
// including equal magnitudes and zeros, against a comparison of their real
// values; the larger must appear one cycle (LAT) later.
module tb_fp_max;
  import tb_fp_pkg::*;
  localparam int LAT = 1, N = 2000;
  logic clk = 0, rst = 1;
  logic [31:0] a, b, y, ah [N+8], bh [N+8];
  int checks = 0, failures = 0, cyc, k;
  fp_max #(.W(32), .LAT(LAT)) dut (.clk, .rst, .a, .b, .y);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    a = 0; b = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (cyc = 0; cyc < N + 4; cyc++) begin
      if (cyc < N) begin
        a = rand_sp(90, 130); b = rand_sp(90, 130);
        if ($urandom_range(0, 1)) a[31] = 1'b1;
        if ($urandom_range(0, 1)) b[31] = 1'b1;
        if ($urandom_range(0, 7) == 0) b = {b[31], a[30:0]};
        if ($urandom_range(0, 7) == 0) a = 32'd0;
        ah[cyc] = a; bh[cyc] = b;
      end
      @(negedge clk);
      if (cyc >= LAT - 1 && cyc - (LAT - 1) < N) begin
        real ra, rb;
        k = cyc - (LAT - 1);
        ra = sp2r(ah[k]); rb = sp2r(bh[k]);
        checks++;
        if (sp2r(y) != ((ra >= rb) ? ra : rb)) begin
          failures++;
          $display("max(%h,%h) = %h", ah[k], bh[k], y);
        end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
