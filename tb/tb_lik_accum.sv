// tb_lik_accum: streams of random doubles of several lengths (1, 2, 13, 14,
// 15, 100 and 1000 values, some with idle cycles in between) into the
// accumulator. Each sum must match the exactly-summed reference within a
// relative 1e-12 (the adder's order of summation differs from a serial sum),
// arrive once, and arrive no later than 6*LAT cycles after the last input.
// Counts how often the feedback path (input plus adder output), the buffer
// capture and the buffer-plus-output coalescing were used; each must occur.
module tb_lik_accum;
  localparam int LAT = 14;
  logic clk = 0, rst = 1, iv = 0, il = 0, ov, busy;
  logic [63:0] x, s;
  int checks = 0, failures = 0, n_fb = 0, n_cap = 0, n_coal = 0, max_red = 0;
  int lens [7] = '{1, 2, 13, 14, 15, 100, 1000};
  lik_accum #(.LAT(LAT)) dut (.clk, .rst, .in_valid(iv), .in_last(il), .x, .out_valid(ov),
                              .sum(s), .busy);
  always #5 clk = ~clk;
  always @(posedge clk) if (!rst) begin
    if (dut.in_valid && dut.o_v) n_fb++;
    if (dut.capture) n_cap++;
    if (!dut.in_valid && dut.use_buf) n_coal++;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    x = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int t = 0; t < 14; t++) begin
      real ref_sum, got;
      int n, cyc, outs;
      bit gaps;
      n = lens[t % 7];
      gaps = (t >= 7);
      ref_sum = 0.0;
      for (int i = 0; i < n; i++) begin
        real v;
        if (gaps) while ($urandom_range(0, 3) == 0) begin
          iv = 0; il = 0; @(posedge clk);
        end
        v = (real'($urandom_range(1, 1000000)) / 1000.0) * (($urandom_range(0, 4) == 0) ? -1.0 : 1.0);
        ref_sum += v;
        x = $realtobits(v); iv = 1; il = (i == n - 1);
        @(posedge clk);
      end
      iv = 0; il = 0;
      cyc = 0; outs = 0; got = 0.0;
      while (busy || cyc < 2) begin
        @(negedge clk);
        if (ov) begin outs++; got = $bitstoreal(s); end
        @(posedge clk);
        cyc++;
      end
      @(negedge clk); if (ov) begin outs++; got = $bitstoreal(s); end
      if (cyc > max_red) max_red = cyc;
      checks += 3;
      if (outs != 1) begin failures++; $display("stream %0d: %0d results", t, outs); end
      if ((got - ref_sum) > 1e-12 * (ref_sum < 0 ? -ref_sum : ref_sum) + 1e-9 ||
          (ref_sum - got) > 1e-12 * (ref_sum < 0 ? -ref_sum : ref_sum) + 1e-9) begin
        failures++; $display("stream %0d (n=%0d): sum %f expected %f", t, n, got, ref_sum);
      end
      if (cyc > 6 * LAT) begin failures++; $display("stream %0d: reduction took %0d cycles", t, cyc); end
      @(posedge clk);
    end
    $display("longest reduction after the last input: %0d cycles", max_red);
    checks += 3;
    if (n_fb == 0)   begin failures++; $display("feedback never used"); end
    if (n_cap == 0)  begin failures++; $display("buffer capture never used"); end
    if (n_coal == 0) begin failures++; $display("coalescing never used"); end
    $display("feedback=%0d capture=%0d coalesce=%0d", n_fb, n_cap, n_coal);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
