// tb_plf_controller: the controller alone, with six SRAM bank models and a
// stand-in for the pipeline. The stand-in turns every streamed character
// into an output record made from the data of both children and numSites,
// delivers it to the controller's FIFO port after a delay, and returns a
// known log-likelihood after the last character. Checked: the transition
// tables loaded from both children, numSites(c) presented with character c,
// the valid/last tags, the record written to cur+c in both bank groups,
// the log-likelihood returned with done, and the lengths of the load and
// stream phases, for a table-bound (n = 20) and a numSites-bound (n = 301)
// node; a second command must wait for the first (cmd_ready).
module tb_plf_controller;
  import plf_pkg::*;
  localparam int AW = 20, RL = 3, MAXC = 1024, NB = 6, DLY = 40;
  logic clk = 0, rst = 1;
  logic cmd_valid = 0, cmd_ready, done, st_valid, st_last, fifo_avail, fifo_pop, lnl_valid = 0;
  logic [AW-1:0] cmd_left = 0, cmd_right = 0, cmd_cur = 0;
  logic [10:0] cmd_nchar = 0;
  logic [AW-1:0] mem_addr [NB];
  logic mem_rd [NB], mem_wr [NB], mem_rvalid [NB];
  logic [63:0] mem_wdata [NB], mem_rdata [NB], lnl, lnl_in = 0;
  fp32_t p_left [16], p_right [16], st_ns;
  node_rec_t fifo_rec;
  int checks = 0, failures = 0, sidx = 0;

  plf_controller #(.MAXC(MAXC), .AW(AW), .NBANK(NB)) dut (.clk, .rst, .cmd_valid, .cmd_ready,
    .cmd_left, .cmd_right, .cmd_cur, .cmd_nchar, .mem_addr, .mem_rd, .mem_wr, .mem_wdata,
    .mem_rvalid, .mem_rdata, .p_left, .p_right, .st_valid, .st_last, .st_numsites(st_ns),
    .fifo_avail, .fifo_rec, .fifo_pop, .lnl_valid, .lnl_in, .done, .lnl);
  for (genvar b = 0; b < NB; b++) begin : g_bank
    sram_model #(.AW(AW), .RL(RL)) u_bank (.clk, .addr(mem_addr[b]), .rd(mem_rd[b]), .wr(mem_wr[b]),
      .wdata(mem_wdata[b]), .rvalid(mem_rvalid[b]), .rdata(mem_rdata[b]));
  end
  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic node_rec_t mk_rec(input logic [NB-1:0][63:0] d, input fp32_t ns);
    return '{scp: ns, lnscaler: d[2][31:0] ^ d[5][31:0], t: d[4][63:32], g: d[4][31:0],
             c: d[0][63:32] ^ d[3][63:32], a: d[0][31:0] + d[1][31:0]};
  endfunction
  function automatic logic [63:0] word(input int b, input int a);
    return {8'(b), 24'(a), 32'(a * 7 + b)};
  endfunction

  // pipeline stand-in: records appear DLY cycles after the character
  node_rec_t q [$];
  node_rec_t dq [DLY];
  logic      dv [DLY];
  int        last_t = -1, t = 0;
  initial for (int i = 0; i < DLY; i++) dv[i] = 0;
  always @(posedge clk) begin
    t <= t + 1;
    dv[0] <= st_valid;
    dq[0] <= mk_rec(rd_packed, st_ns);
    for (int i = 1; i < DLY; i++) begin dv[i] <= dv[i-1]; dq[i] <= dq[i-1]; end
    if (fifo_pop) void'(q.pop_front());
    if (dv[DLY-1]) q.push_back(dq[DLY-1]);
    fifo_avail = (q.size() > 0);
    fifo_rec   = (q.size() > 0) ? q[0] : '0;
    lnl_valid <= (last_t >= 0 && t == last_t + DLY + 30);
    if (st_last) last_t <= t;
  end
  logic [NB-1:0][63:0] rd_packed;
  for (genvar b = 0; b < NB; b++) begin : g_pk
    assign rd_packed[b] = mem_rdata[b];
  end
  initial begin fifo_avail = 0; fifo_rec = '0; end

  // numSites and tags checked as they are presented
  int cur_n = 0, cur_k = 0;
  always @(negedge clk) if (!rst && st_valid) begin
    logic [63:0] w;
    w = word(1, cur_k + MAXC + sidx / 2);
    checks += 2;
    if (st_ns != ((sidx % 2) ? w[63:32] : w[31:0])) begin
      failures++; $display("numSites(%0d) = %h", sidx, st_ns);
    end
    if (st_last != (sidx == cur_n - 1)) begin failures++; $display("last tag wrong at %0d", sidx); end
    sidx++;
  end

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

  task automatic run(input int l, input int r, input int k, input int n);
    int t_load = 0, t_stream = 0, nw = (n + 1) / 2;
    for (int b = 0; b < NB; b++)
      for (int c = 0; c < n; c++) begin
        put(b, l + c, word(b, l + c));
        put(b, r + c, word(b, r + c));
      end
    for (int w = 0; w < 8; w++) begin
      put(0, l + MAXC + w, word(0, l + MAXC + w));
      put(0, r + MAXC + w, word(0, r + MAXC + w));
    end
    for (int w = 0; w < nw; w++) put(1, k + MAXC + w, word(1, k + MAXC + w));
    cur_n = n; cur_k = k; sidx = 0;
    @(negedge clk);
    checks++;
    if (!cmd_ready) begin failures++; $display("not ready"); end
    cmd_left = AW'(l); cmd_right = AW'(r); cmd_cur = AW'(k); cmd_nchar = 11'(n); cmd_valid = 1;
    @(negedge clk);
    cmd_valid = 0;
    while (!done) begin
      if (dut.state == 3'd1) t_load++;
      if (dut.state == 3'd2) t_stream++;
      checks++;
      if (cmd_ready) begin failures++; $display("ready while busy"); end
      @(negedge clk);
    end
    checks += 5;
    if (t_load != ((nw > 16) ? nw : 16) + RL) begin failures++; $display("load %0d cycles", t_load); end
    if (t_stream != n + RL) begin failures++; $display("stream %0d cycles", t_stream); end
    if (lnl != lnl_in) begin failures++; $display("lnl not returned"); end
    if (sidx != n) begin failures++; $display("%0d characters streamed", sidx); end
    for (int w = 0; w < 8; w++) begin
      logic [63:0] a, b;
      a = word(0, l + MAXC + w); b = word(0, r + MAXC + w);
      if ({p_left[2*w+1], p_left[2*w]} != a || {p_right[2*w+1], p_right[2*w]} != b) begin
        failures++; $display("table word %0d wrong", w);
      end
    end
    for (int c = 0; c < n; c++) begin
      logic [NB-1:0][63:0] d;
      node_rec_t e;
      logic [31:0] ns;
      for (int b = 0; b < NB; b++) d[b] = word(b, ((b < 3) ? l : r) + c);
      ns = (c % 2) ? word(1, k + MAXC + c / 2) >> 32 : 32'(word(1, k + MAXC + c / 2));
      e = mk_rec(d, ns);
      for (int g = 0; g < 2; g++) begin
        checks++;
        if (get(3*g+0, k + c) != {e.c, e.a} || get(3*g+1, k + c) != {e.t, e.g} ||
            get(3*g+2, k + c) != {e.scp, e.lnscaler}) begin
          failures++; if (failures < 10) $display("char %0d group %0d written wrong", c, g);
        end
      end
    end
    $display("n=%0d: load %0d cycles, stream %0d cycles", n, t_load, t_stream);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    lnl_in = 64'hc08f_4000_0000_0000;
    run(32'h0000, 32'h1000, 32'h2000, 20);
    lnl_in = 64'hc0a0_0000_1234_0000;
    run(32'h3000, 32'h4000, 32'h5000, 301);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
