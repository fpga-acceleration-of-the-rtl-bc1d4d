// tb_scale_lik: the scaling, normalisation and likelihood pipeline on two
// nodes of random conditional probabilities (spanning 1e-30 .. 1), random
// incoming lnScaler values and random numSites counts. Checked here,
// independently of the RTL:
//  - normalised values, bit for bit (single-precision division by the max),
//    exactly 32 cycles after the character;
//  - scP = log(max) and the updated lnScaler, bit for bit against the
//    segment polynomial evaluated here, exactly 84 cycles after;
//  - scP within 0.52 of ln(max);
//  - the node log-likelihood, sum_c numSites(c) * (log(sum_N pi_N L_N) +
//    lnScaler(c)), within a relative 1e-12 of the exact sum.
module tb_scale_lik;
  import tb_fp_pkg::*;
  localparam int NORM_LAT = 32, SCL_LAT = 84, N = 400;
  logic clk = 0, rst = 1, iv = 0, il = 0;
  logic [31:0] l_in [4], lns_in, ns_in, norm [4], lns_out, scp_out;
  logic [63:0] priors [4], lnl;
  logic norm_valid, scl_valid, lnl_valid, busy;
  logic [31:0] lh [N][4], lnsh [N], nsh [N];
  logic [319:0] rom [16];
  int checks = 0, failures = 0, seg_hits [16];
  real lnl_ref, lnl_got;
  int  lnl_cnt;

  scale_lik dut (.clk, .rst, .priors, .in_valid(iv), .in_last(il), .l_in, .lnscaler_in(lns_in),
                 .numsites_in(ns_in), .norm_valid, .norm, .scl_valid, .lnscaler_out(lns_out),
                 .scp_out, .lnl_valid, .lnl, .accum_busy(busy));
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // input time of every cycle, to find which character an output belongs to
  int t_in = 0, t_now = 0;
  int hist_idx [int];
  always @(posedge clk) t_now <= t_now + 1;

  always @(negedge clk) if (!rst) begin
    if (norm_valid) begin
      int k;
      logic [31:0] m, e;
      k = hist_idx.exists(t_now - NORM_LAT) ? hist_idx[t_now - NORM_LAT] : -1;
      checks++;
      if (k < 0) begin failures++; $display("norm_valid at wrong time"); end
      else begin
        m = lh[k][0];
        for (int n = 1; n < 4; n++) if (sp2r(lh[k][n]) > sp2r(m)) m = lh[k][n];
        for (int n = 0; n < 4; n++) begin
          e = sp_div(lh[k][n], m);
          checks++;
          if (norm[n] != e) begin
            failures++; if (failures < 10) $display("char %0d norm[%0d] %h expected %h", k, n, norm[n], e);
          end
        end
      end
    end
    if (scl_valid) begin
      int k, s;
      logic [31:0] m, scp, lns;
      k = hist_idx.exists(t_now - SCL_LAT) ? hist_idx[t_now - SCL_LAT] : -1;
      checks++;
      if (k < 0) begin failures++; $display("scl_valid at wrong time"); end
      else begin
        m = lh[k][0];
        for (int n = 1; n < 4; n++) if (sp2r(lh[k][n]) > sp2r(m)) m = lh[k][n];
        s = log_seg(sp2r(m));
        seg_hits[s]++;
        scp = to_sp(cheb_eval(sp2r(m), rom[s]));
        lns = sp_add(lnsh[k], scp);
        checks += 3;
        if (scp_out != scp) begin failures++; if (failures < 10) $display("char %0d scP %h expected %h", k, scp_out, scp); end
        if (lns_out != lns) begin failures++; if (failures < 10) $display("char %0d lnScaler %h expected %h", k, lns_out, lns); end
        if (sp2r(scp_out) - $ln(sp2r(m)) > 0.52 || $ln(sp2r(m)) - sp2r(scp_out) > 0.52) begin
          failures++; $display("char %0d scP too far from ln", k);
        end
      end
    end
    if (lnl_valid) begin lnl_cnt++; lnl_got = $bitstoreal(lnl); end
  end

  // the reference likelihood term of one character
  function automatic real lik_term(input int k);
    logic [31:0] m, lns, nrm [4];
    real s, pl [4];
    m = lh[k][0];
    for (int n = 1; n < 4; n++) if (sp2r(lh[k][n]) > sp2r(m)) m = lh[k][n];
    for (int n = 0; n < 4; n++) begin
      nrm[n] = sp_div(lh[k][n], m);
      pl[n] = sp2r(nrm[n]) * $bitstoreal(priors[n]);
    end
    s = (pl[0] + pl[1]) + (pl[2] + pl[3]);
    lns = sp_add(lnsh[k], to_sp(cheb_eval(sp2r(m), rom[log_seg(sp2r(m))])));
    return (cheb_eval(s, rom[log_seg(s)]) + sp2r(lns)) * sp2r(nsh[k]);
  endfunction

  initial begin
    $readmemh("rtl/cheb_coef.hex", rom);
    foreach (seg_hits[i]) seg_hits[i] = 0;
    priors = '{$realtobits(0.1), $realtobits(0.2), $realtobits(0.3), $realtobits(0.4)};
    foreach (l_in[i]) l_in[i] = 0;
    lns_in = 0; ns_in = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int node = 0; node < 2; node++) begin
      lnl_ref = 0.0; lnl_cnt = 0;
      hist_idx.delete();
      for (int c = 0; c < N; c++) begin
        for (int n = 0; n < 4; n++) begin
          lh[c][n] = rand_sp(28, 126);
          l_in[n] = lh[c][n];
        end
        lnsh[c] = {1'b1, rand_sp(100, 133)};
        nsh[c]  = to_sp(real'($urandom_range(1, 9)));
        lns_in = lnsh[c]; ns_in = nsh[c];
        iv = 1; il = (c == N - 1);
        hist_idx[t_now] = c;
        lnl_ref += lik_term(c);
        @(posedge clk);
      end
      iv = 0; il = 0;
      while (lnl_cnt == 0) @(posedge clk);
      repeat (5) @(posedge clk);
      checks += 2;
      if (lnl_cnt != 1) begin failures++; $display("node %0d: %0d results", node, lnl_cnt); end
      if ((lnl_got - lnl_ref) > 1e-12 * (-lnl_ref) || (lnl_ref - lnl_got) > 1e-12 * (-lnl_ref)) begin
        failures++; $display("node %0d: lnL %f expected %f", node, lnl_got, lnl_ref);
      end
      $display("node %0d: lnL = %f", node, lnl_got);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
