// plf_accel: log-likelihood co-processor for one tree node at a time
// (Figure 3). For each character c of the alignment it reads the four
// conditional probabilities and the lnScaler value of both children from six
// SRAM ports, computes the parent's conditional probabilities (cp_unit),
// normalises them and updates the scaler vectors (scale_lik), and forms and
// accumulates the log-likelihood term. Results for the node (four normalised
// probabilities, lnScaler, scP per character) are buffered in three FIFOs and
// written back to the node's pending address once all input has been read;
// the log-likelihood (double) is returned with done. The host uses it only for
// the root node.
//
// Host interface: priors (base frequencies, four doubles) are written once
// through prior_we/prior_idx/prior_data; each node is started with
// cmd_valid/cmd_ready carrying the base addresses of the left child, right
// child and current node and the sequence length (1..MAXC).
// The two children's lnScaler values are summed in front of the pipeline so
// the node's lnScaler accumulates the scaling of its whole subtree; this
// adder is this design's reading of the document, which streams both
// children's lnScaler but draws a single lnScaler input in its scaling
// figure.
// Timing: a node takes about 16 + nchar/2 cycles to load, nchar cycles to
// stream, then nchar cycles of write-back that overlap the pipeline drain,
// and ends when the accumulator has reduced its partial sums.
module plf_accel #(
  parameter int unsigned MAXC  = 8192,
  parameter int unsigned AW    = 24,
  parameter int unsigned NBANK = 6
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  prior_we,
  input  logic [1:0]            prior_idx,
  input  logic [63:0]           prior_data,
  input  logic                  cmd_valid,
  output logic                  cmd_ready,
  input  logic [AW-1:0]         cmd_left,
  input  logic [AW-1:0]         cmd_right,
  input  logic [AW-1:0]         cmd_cur,
  input  logic [$clog2(MAXC):0] cmd_nchar,
  output logic [AW-1:0]         mem_addr   [NBANK],
  output logic                  mem_rd     [NBANK],
  output logic                  mem_wr     [NBANK],
  output logic [63:0]           mem_wdata  [NBANK],
  input  logic                  mem_rvalid [NBANK],
  input  logic [63:0]           mem_rdata  [NBANK],
  output logic                  done,
  output logic [63:0]           lnl
);
  import plf_pkg::*;

  localparam int unsigned CP_LAT = 2 * SP_MUL_LAT + 2 * SP_ADD_LAT;

  // ---------------- priors
  fp64_t priors [4];
  always_ff @(posedge clk) begin
    if (rst) for (int i = 0; i < 4; i++) priors[i] <= 64'h3fd0000000000000;  // 0.25
    else if (prior_we) priors[prior_idx] <= prior_data;
  end

  // ---------------- controller
  fp32_t      p_left [16], p_right [16], st_ns;
  logic       st_valid, st_last, fifo_avail, fifo_pop, lnl_valid;
  node_rec_t  fifo_rec;
  fp64_t      lnl_pipe;

  plf_controller #(.MAXC(MAXC), .AW(AW), .NBANK(NBANK)) u_ctrl (
    .clk, .rst, .cmd_valid, .cmd_ready, .cmd_left, .cmd_right, .cmd_cur, .cmd_nchar,
    .mem_addr, .mem_rd, .mem_wr, .mem_wdata, .mem_rvalid, .mem_rdata,
    .p_left, .p_right, .st_valid, .st_last, .st_numsites(st_ns),
    .fifo_avail, .fifo_rec, .fifo_pop, .lnl_valid, .lnl_in(lnl_pipe), .done, .lnl);

  // ---------------- stream unpacking: left child banks 0-2, right 3-5
  fp32_t l_left [4], l_right [4], lns_l, lns_r;
  assign l_left[0]  = mem_rdata[0][31:0];  assign l_left[1]  = mem_rdata[0][63:32];
  assign l_left[2]  = mem_rdata[1][31:0];  assign l_left[3]  = mem_rdata[1][63:32];
  assign lns_l      = mem_rdata[2][31:0];
  assign l_right[0] = mem_rdata[3][31:0];  assign l_right[1] = mem_rdata[3][63:32];
  assign l_right[2] = mem_rdata[4][31:0];  assign l_right[3] = mem_rdata[4][63:32];
  assign lns_r      = mem_rdata[5][31:0];

  // ---------------- conditional probability pipeline
  fp32_t l_k [4], lns_sum, lns_al, ns_al;
  logic  cp_valid, cp_last;
  cp_unit u_cp (.clk, .rst, .p_left, .p_right, .in_valid(st_valid), .in_last(st_last),
                .l_left, .l_right, .out_valid(cp_valid), .out_last(cp_last), .l_out(l_k));

  fp_add #(.LAT(SP_ADD_LAT)) u_lns (.clk, .rst, .a(lns_l), .b(lns_r), .y(lns_sum));
  pipe_delay #(.W(32), .N(CP_LAT - SP_ADD_LAT)) u_lnsd (.clk, .rst, .d(lns_sum), .q(lns_al));
  pipe_delay #(.W(32), .N(CP_LAT)) u_nsd (.clk, .rst, .d(st_ns), .q(ns_al));

  // ---------------- scaling and likelihood
  fp32_t norm [4], lns_out, scp_out;
  logic  norm_valid, scl_valid, acc_busy;
  scale_lik u_sl (.clk, .rst, .priors, .in_valid(cp_valid), .in_last(cp_last), .l_in(l_k),
                  .lnscaler_in(lns_al), .numsites_in(ns_al),
                  .norm_valid, .norm, .scl_valid, .lnscaler_out(lns_out), .scp_out,
                  .lnl_valid, .lnl(lnl_pipe), .accum_busy(acc_busy));

  // ---------------- output FIFOs
  logic [127:0] cp_dout;
  logic [31:0]  lns_dout, scp_dout;
  logic         cp_empty, lns_empty, scp_empty;
  out_fifo #(.W(128), .DEPTH(MAXC)) u_fcp (.clk, .rst, .push(norm_valid),
    .din({norm[3], norm[2], norm[1], norm[0]}), .pop(fifo_pop), .dout(cp_dout),
    .empty(cp_empty), .full(), .count());
  out_fifo #(.W(32), .DEPTH(MAXC)) u_flns (.clk, .rst, .push(scl_valid), .din(lns_out),
    .pop(fifo_pop), .dout(lns_dout), .empty(lns_empty), .full(), .count());
  out_fifo #(.W(32), .DEPTH(MAXC)) u_fscp (.clk, .rst, .push(scl_valid), .din(scp_out),
    .pop(fifo_pop), .dout(scp_dout), .empty(scp_empty), .full(), .count());

  assign fifo_avail = !cp_empty && !lns_empty && !scp_empty;
  assign fifo_rec   = '{scp: scp_dout, lnscaler: lns_dout,
                        t: cp_dout[127:96], g: cp_dout[95:64], c: cp_dout[63:32], a: cp_dout[31:0]};
endmodule
