// tb_cp_unit: the conditional probability pipeline (and its four cp_row
// copies) on random transition matrices and random child vectors, checked
// bit for bit against Equation 2 evaluated here with single-precision
// rounding after every operation, in the order of Figure 4's adder trees.
// Results and the valid/last tags must appear exactly 38 cycles after the
// inputs; the matrices change between two blocks of characters.
module tb_cp_unit;
  import tb_fp_pkg::*;
  localparam int LAT = 38, N = 1500;
  logic clk = 0, rst = 1, iv = 0, il = 0, ov, ol;
  logic [31:0] pl [16], pr [16], ll [4], lr [4], lo [4];
  logic [31:0] plh [2][16], prh [2][16], llh [N+64][4], lrh [N+64][4];
  int checks = 0, failures = 0, cyc, k, blk;
  cp_unit dut (.clk, .rst, .p_left(pl), .p_right(pr), .in_valid(iv), .in_last(il),
               .l_left(ll), .l_right(lr), .out_valid(ov), .out_last(ol), .l_out(lo));
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic logic [31:0] rprob();
    return rand_sp(100, 126);                // about 1e-8 .. 1
  endfunction
  function automatic logic [31:0] ref_row(input int b, input int n, input int kk);
    logic [31:0] mi [4], mj [4];
    for (int s = 0; s < 4; s++) begin
      mi[s] = sp_mul(plh[b][n*4+s], llh[kk][s]);
      mj[s] = sp_mul(prh[b][n*4+s], lrh[kk][s]);
    end
    return sp_mul(sp_add(sp_add(mi[0], mi[1]), sp_add(mi[2], mi[3])),
                  sp_add(sp_add(mj[0], mj[1]), sp_add(mj[2], mj[3])));
  endfunction
  initial begin
    for (int b = 0; b < 2; b++)
      for (int i = 0; i < 16; i++) begin plh[b][i] = rprob(); prh[b][i] = rprob(); end
    pl = plh[0]; pr = prh[0];
    foreach (ll[i]) begin ll[i] = 0; lr[i] = 0; end
    repeat (3) @(posedge clk);
    rst = 0;
    for (cyc = 0; cyc < N + LAT + 4; cyc++) begin
      iv = (cyc < N) && (cyc != N/2);        // one idle slot between the blocks
      il = (cyc == N - 1);
      if (cyc == N/2) begin pl = plh[1]; pr = prh[1]; end
      if (cyc < N) for (int s = 0; s < 4; s++) begin
        ll[s] = rprob(); lr[s] = rprob();
        llh[cyc][s] = ll[s]; lrh[cyc][s] = lr[s];
      end
      @(negedge clk);
      if (cyc >= LAT - 1 && cyc - (LAT - 1) < N) begin
        k = cyc - (LAT - 1);
        blk = (k > N/2) ? 1 : 0;
        checks++;
        if (ov != (k != N/2) || ol != (k == N - 1)) begin
          failures++; $display("tags wrong for character %0d", k);
        end
        if (k != N/2) for (int n = 0; n < 4; n++) begin
          logic [31:0] e;
          e = ref_row(blk, n, k);
          checks++;
          if (lo[n] != e) begin
            failures++;
            if (failures < 10) $display("char %0d row %0d: %h expected %h", k, n, lo[n], e);
          end
        end
      end else if (ov) begin
        failures++; $display("out_valid at wrong time %0d", cyc);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
