// tb_plf_accel: end-to-end test of the accelerator at its default
// parameters (MAXC = 8192). Six SRAM bank models hold three leaf nodes. The
// host model writes the priors and runs three nodes:
//   node X = f(leaf A, leaf B), node Y = f(leaf C, X), root R = f(X, Y),
// so results written by the accelerator are read back both as a left child
// (bank group 0) and as a right child (bank group 1). Every written word is
// compared with a reference computed here: Equation 2 with single-precision
// rounding per operation, normalisation, scP from the segment polynomial,
// lnScaler = lnScaler(left) + lnScaler(right) + scP, and the node
// log-likelihood within a relative 1e-12. Phase lengths are checked: the
// load phase takes max(16, ceil(n/2)) + RL cycles and streaming n + RL.
// Mechanisms counted, each must occur: numSites-bound load, table-bound
// load, write-back waiting on an empty FIFO, accumulator coalescing,
// partial-sum feedback, and children read from each bank group.
module tb_plf_accel;
  import tb_fp_pkg::*;
  import plf_pkg::*;
  localparam int AW = 24, RL = 4, MAXC = 8192, NB = 6;
  localparam int NODE_STRIDE = 32'h8000;
  logic clk = 0, rst = 1;
  logic prior_we = 0; logic [1:0] prior_idx = 0; logic [63:0] prior_data = 0;
  logic cmd_valid = 0, cmd_ready, done;
  logic [AW-1:0] cmd_left = 0, cmd_right = 0, cmd_cur = 0;
  logic [13:0] cmd_nchar = 0;
  logic [AW-1:0] mem_addr [NB];
  logic mem_rd [NB], mem_wr [NB], mem_rvalid [NB];
  logic [63:0] mem_wdata [NB], mem_rdata [NB], lnl;
  logic [319:0] rom [16];
  int checks = 0, failures = 0;
  int n_ns_bound = 0, n_tab_bound = 0, n_wr_wait = 0, n_coal = 0, n_fb = 0, n_grp [2] = '{0, 0};

  plf_accel dut (.clk, .rst, .prior_we, .prior_idx, .prior_data, .cmd_valid, .cmd_ready,
                 .cmd_left, .cmd_right, .cmd_cur, .cmd_nchar, .mem_addr, .mem_rd, .mem_wr,
                 .mem_wdata, .mem_rvalid, .mem_rdata, .done, .lnl);
  for (genvar b = 0; b < NB; b++) begin : g_bank
    sram_model #(.AW(AW), .RL(RL)) u_bank (.clk, .addr(mem_addr[b]), .rd(mem_rd[b]), .wr(mem_wr[b]),
      .wdata(mem_wdata[b]), .rvalid(mem_rvalid[b]), .rdata(mem_rdata[b]));
  end
  always #5 clk = ~clk;
  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // mechanism counters
  always @(posedge clk) if (!rst) begin
    if (dut.u_ctrl.state == dut.u_ctrl.S_WRITE && !dut.fifo_avail) n_wr_wait++;
    if (dut.u_sl.u_acc.use_buf && !dut.u_sl.u_acc.in_valid) n_coal++;
    if (dut.u_sl.u_acc.in_valid && dut.u_sl.u_acc.o_v) n_fb++;
  end

  // ---------------- host-side view of a node: vectors, table, numSites
  typedef struct {
    logic [31:0] l [MAXC][4];
    logic [31:0] lns [MAXC];
    logic [31:0] p [16];
    logic [31:0] ns [MAXC];
  } node_t;
  node_t nd [6];        // 0..2 leaves A, B, C; 3 X; 4 Y; 5 R
  real priors_r [4] = '{0.3, 0.2, 0.2, 0.3};

  function automatic int base(input int i); return i * NODE_STRIDE; endfunction

  task automatic put(input int b, input int a, input logic [63:0] w);
    case (b)
      0: g_bank[0].u_bank.mem[a] = w;  1: g_bank[1].u_bank.mem[a] = w;
      2: g_bank[2].u_bank.mem[a] = w;  3: g_bank[3].u_bank.mem[a] = w;
      4: g_bank[4].u_bank.mem[a] = w;  default: g_bank[5].u_bank.mem[a] = w;
    endcase
  endtask
  function automatic logic [63:0] get(input int b, input int a);
    case (b)
      0: return g_bank[0].u_bank.mem.exists(a) ? g_bank[0].u_bank.mem[a] : 64'd0;
      1: return g_bank[1].u_bank.mem.exists(a) ? g_bank[1].u_bank.mem[a] : 64'd0;
      2: return g_bank[2].u_bank.mem.exists(a) ? g_bank[2].u_bank.mem[a] : 64'd0;
      3: return g_bank[3].u_bank.mem.exists(a) ? g_bank[3].u_bank.mem[a] : 64'd0;
      4: return g_bank[4].u_bank.mem.exists(a) ? g_bank[4].u_bank.mem[a] : 64'd0;
      default: return g_bank[5].u_bank.mem.exists(a) ? g_bank[5].u_bank.mem[a] : 64'd0;
    endcase
  endfunction

  // host DMA of a node's vectors (both groups), table and numSites
  task automatic load_node(input int i, input int n);
    for (int c = 0; c < n; c++)
      for (int g = 0; g < 2; g++) begin
        put(3*g+0, base(i) + c, {nd[i].l[c][1], nd[i].l[c][0]});
        put(3*g+1, base(i) + c, {nd[i].l[c][3], nd[i].l[c][2]});
        put(3*g+2, base(i) + c, {32'd0, nd[i].lns[c]});
      end
    for (int w = 0; w < 8; w++) put(0, base(i) + MAXC + w, {nd[i].p[2*w+1], nd[i].p[2*w]});
    for (int w = 0; w < (n + 1) / 2; w++) put(1, base(i) + MAXC + w, {nd[i].ns[2*w+1], nd[i].ns[2*w]});
  endtask

  function automatic logic [31:0] rand_prob_tab(input int r, input int s);
    return (r == s) ? to_sp(0.7 + 0.2 * real'($urandom_range(0, 1000)) / 1000.0)
                    : to_sp(0.1 * real'($urandom_range(1, 1000)) / 1000.0);
  endfunction

  // reference: compute node k from children i (left) and j (right), n chars
  function automatic real compute_ref(input int k, input int i, input int j, input int n);
    real lnl_ref = 0.0;
    for (int c = 0; c < n; c++) begin
      logic [31:0] lk [4], m, scp, lsum, lnsk, nrm [4];
      real pl [4], s;
      for (int r = 0; r < 4; r++) begin
        logic [31:0] mi [4], mj [4];
        for (int q = 0; q < 4; q++) begin
          mi[q] = sp_mul(nd[i].p[r*4+q], nd[i].l[c][q]);
          mj[q] = sp_mul(nd[j].p[r*4+q], nd[j].l[c][q]);
        end
        lk[r] = sp_mul(sp_add(sp_add(mi[0], mi[1]), sp_add(mi[2], mi[3])),
                       sp_add(sp_add(mj[0], mj[1]), sp_add(mj[2], mj[3])));
      end
      m = lk[0];
      for (int r = 1; r < 4; r++) if (sp2r(lk[r]) > sp2r(m)) m = lk[r];
      for (int r = 0; r < 4; r++) begin
        nrm[r] = sp_div(lk[r], m);
        nd[k].l[c][r] = nrm[r];
        pl[r] = sp2r(nrm[r]) * priors_r[r];
      end
      scp  = to_sp(cheb_eval(sp2r(m), rom[log_seg(sp2r(m))]));
      lsum = sp_add(nd[i].lns[c], nd[j].lns[c]);
      lnsk = sp_add(lsum, scp);
      nd[k].lns[c] = lnsk;
      s = (pl[0] + pl[1]) + (pl[2] + pl[3]);
      lnl_ref += (cheb_eval(s, rom[log_seg(s)]) + sp2r(lnsk)) * sp2r(nd[k].ns[c]);
      scp_ref[c] = scp;
    end
    return lnl_ref;
  endfunction
  logic [31:0] scp_ref [MAXC];

  task automatic run_node(input int k, input int i, input int j, input int n);
    int t_load, t_stream, nw;
    real lnl_ref, got;
    // the node's own table (used when it is later a child) and numSites
    for (int r = 0; r < 4; r++) for (int q = 0; q < 4; q++) nd[k].p[r*4+q] = rand_prob_tab(r, q);
    for (int c = 0; c < n; c++) nd[k].ns[c] = to_sp(real'($urandom_range(1, 5)));
    for (int w = 0; w < 8; w++) put(0, base(k) + MAXC + w, {nd[k].p[2*w+1], nd[k].p[2*w]});
    for (int w = 0; w < (n + 1) / 2; w++) put(1, base(k) + MAXC + w, {nd[k].ns[2*w+1], nd[k].ns[2*w]});
    lnl_ref = compute_ref(k, i, j, n);
    // programmed I/O command
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd_left = AW'(base(i)); cmd_right = AW'(base(j)); cmd_cur = AW'(base(k));
    cmd_nchar = 14'(n); cmd_valid = 1;
    @(negedge clk);
    cmd_valid = 0;
    t_load = 0; t_stream = 0;
    while (!done) begin
      if (dut.u_ctrl.state == dut.u_ctrl.S_LOAD) t_load++;
      if (dut.u_ctrl.state == dut.u_ctrl.S_STREAM) t_stream++;
      @(negedge clk);
    end
    nw = (n + 1) / 2;
    if (nw > 16) n_ns_bound++; else n_tab_bound++;
    n_grp[0]++; n_grp[1]++;
    checks += 2;
    if (t_load != ((nw > 16) ? nw : 16) + RL) begin
      failures++; $display("node %0d: load took %0d cycles", k, t_load);
    end
    if (t_stream != n + RL) begin
      failures++; $display("node %0d: streaming took %0d cycles", k, t_stream);
    end
    // written results, both groups
    for (int c = 0; c < n; c++)
      for (int g = 0; g < 2; g++) begin
        checks += 3;
        if (get(3*g+0, base(k) + c) != {nd[k].l[c][1], nd[k].l[c][0]} ||
            get(3*g+1, base(k) + c) != {nd[k].l[c][3], nd[k].l[c][2]}) begin
          failures++;
          if (failures < 10) $display("node %0d char %0d group %0d: CP %h %h expected %h %h", k, c, g,
              get(3*g+0, base(k) + c), get(3*g+1, base(k) + c),
              {nd[k].l[c][1], nd[k].l[c][0]}, {nd[k].l[c][3], nd[k].l[c][2]});
        end
        if (get(3*g+2, base(k) + c) != {scp_ref[c], nd[k].lns[c]}) begin
          failures++;
          if (failures < 10) $display("node %0d char %0d group %0d: scP/lnScaler %h expected %h", k, c, g,
              get(3*g+2, base(k) + c), {scp_ref[c], nd[k].lns[c]});
        end
        checks++;
      end
    got = $bitstoreal(lnl);
    checks++;
    if ((got - lnl_ref) > 1e-12 * (-lnl_ref) || (lnl_ref - got) > 1e-12 * (-lnl_ref)) begin
      failures++; $display("node %0d: lnL %f expected %f", k, got, lnl_ref);
    end
    $display("node %0d (n=%0d): lnL = %f, load %0d cycles, stream %0d cycles", k, n, got, t_load, t_stream);
  endtask

  initial begin
    int n [3] = '{100, 24, 100};
    $readmemh("rtl/cheb_coef.hex", rom);
    repeat (3) @(posedge clk);
    rst = 0;
    for (int q = 0; q < 4; q++) begin
      @(negedge clk);
      prior_we = 1; prior_idx = 2'(q); prior_data = $realtobits(priors_r[q]);
    end
    @(negedge clk);
    prior_we = 0;
    // leaves: observed bases with some ambiguity
    for (int i = 0; i < 3; i++) begin
      for (int r = 0; r < 4; r++) for (int q = 0; q < 4; q++) nd[i].p[r*4+q] = rand_prob_tab(r, q);
      for (int c = 0; c < MAXC; c++) begin
        int b = $urandom_range(0, 3);
        for (int r = 0; r < 4; r++)
          nd[i].l[c][r] = (r == b || $urandom_range(0, 9) == 0) ? 32'h3f80_0000 : 32'h0;
        nd[i].lns[c] = 32'd0;
        nd[i].ns[c] = to_sp(1.0);
      end
      load_node(i, 100);
    end
    run_node(3, 0, 1, n[0]);   // X = f(A, B)
    run_node(4, 2, 3, n[0]);   // Y = f(C, X): X read as right child
    run_node(5, 3, 4, n[1]);   // R = f(X, Y): X read as left child
    checks += 6;
    if (n_ns_bound == 0)  begin failures++; $display("no numSites-bound load"); end
    if (n_tab_bound == 0) begin failures++; $display("no table-bound load"); end
    if (n_wr_wait == 0)   begin failures++; $display("write-back never waited on a FIFO"); end
    if (n_coal == 0)      begin failures++; $display("accumulator never coalesced"); end
    if (n_fb == 0)        begin failures++; $display("accumulator feedback never used"); end
    if (n_grp[1] == 0)    begin failures++; $display("bank group 1 never read"); end
    $display("mechanisms: ns-bound loads %0d, table-bound loads %0d, write waits %0d, coalesce %0d, feedback %0d",
             n_ns_bound, n_tab_bound, n_wr_wait, n_coal, n_fb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
