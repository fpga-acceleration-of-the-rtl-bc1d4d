// plf_controller: the accelerator controller. It runs one tree node per host
// command through four phases:
//
//  LOAD   reads the 4x4 transition table of the left child and then of the
//         right child (16 words of two floats) from bank 0, and at the same
//         time the current node's numSites vector (two floats per word) from
//         bank 1 into an on-chip RAM. The phase lasts as long as the longer
//         of the two, which is the numSites read for any real sequence.
//  STREAM issues one read per character on all six banks: banks 0-2 at
//         left+c, banks 3-5 at right+c. Returning data goes straight into
//         the pipeline; the controller tags it valid/last and supplies
//         numSites(c) from the on-chip RAM in the same cycle.
//  WRITE  once every input has returned, pops the three output FIFOs
//         whenever all hold a character and writes it to cur+c in both bank
//         groups (banks 0-2 and 3-5), so the node can later be read as either
//         a left or a right child.
//  DONE   after all writes and the log-likelihood from the accumulator,
//         pulses done with lnl for one cycle and returns to IDLE.
//
// Memory layout (this design's choice; the document says only that the host
// manages addresses and that each child's values are spread over three
// ports): word B+c of banks 3g+0, 3g+1, 3g+2 holds {L_C, L_A}, {L_T, L_G} and
// {scP, lnScaler} of character c of the node at base B; the transition table
// is at B+MAXC.. in bank 0 (word w = {P[2w+1], P[2w]}, P index N*4+S) and
// numSites at B+MAXC.. in bank 1 (word w = {ns[2w+1], ns[2w]}).
// All banks are assumed to answer reads after the same fixed latency, which
// the controller checks (asserted). The host starts a node with
// cmd_valid/cmd_ready (a valid/ready handshake, this design's choice).
module plf_controller #(
  parameter int unsigned MAXC  = 8192,
  parameter int unsigned AW    = 24,
  parameter int unsigned NBANK = 6
) (
  input  logic                    clk,
  input  logic                    rst,
  // host programmed-I/O command
  input  logic                    cmd_valid,
  output logic                    cmd_ready,
  input  logic [AW-1:0]           cmd_left,
  input  logic [AW-1:0]           cmd_right,
  input  logic [AW-1:0]           cmd_cur,
  input  logic [$clog2(MAXC):0]   cmd_nchar,
  // SRAM ports
  output logic [AW-1:0]           mem_addr   [NBANK],
  output logic                    mem_rd     [NBANK],
  output logic                    mem_wr     [NBANK],
  output logic [63:0]             mem_wdata  [NBANK],
  input  logic                    mem_rvalid [NBANK],
  input  logic [63:0]             mem_rdata  [NBANK],
  // to the pipeline
  output plf_pkg::fp32_t          p_left  [16],
  output plf_pkg::fp32_t          p_right [16],
  output logic                    st_valid,
  output logic                    st_last,
  output plf_pkg::fp32_t          st_numsites,
  // output FIFOs
  input  logic                    fifo_avail,
  input  plf_pkg::node_rec_t      fifo_rec,
  output logic                    fifo_pop,
  // accumulator
  input  logic                    lnl_valid,
  input  plf_pkg::fp64_t          lnl_in,
  // result
  output logic                    done,
  output plf_pkg::fp64_t          lnl
);
  import plf_pkg::*;

  localparam int unsigned CW = $clog2(MAXC) + 1;
  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_STREAM, S_WRITE, S_DONE} state_t;
  state_t state;

  logic [AW-1:0] a_left, a_right, a_cur;
  logic [CW-1:0] nchar, nwords, iss0, iss1, ret0, ret1, rd_issued, rd_ret, wr_cnt;
  logic          lnl_got;
  fp32_t         ns_ram [MAXC];

  assign nwords = (nchar + 1'b1) >> 1;
  assign cmd_ready = (state == S_IDLE);

  // ------------------------------------------------ read issue / write port
  always_comb begin
    for (int b = 0; b < int'(NBANK); b++) begin
      mem_addr[b] = '0; mem_rd[b] = 1'b0; mem_wr[b] = 1'b0; mem_wdata[b] = '0;
    end
    fifo_pop = 1'b0;
    case (state)
      S_LOAD: begin
        if (iss0 < CW'(16)) begin
          mem_rd[0]   = 1'b1;
          mem_addr[0] = ((iss0 < CW'(8)) ? a_left : a_right) + AW'(MAXC) + AW'(iss0[2:0]);
        end
        if (iss1 < nwords) begin
          mem_rd[1]   = 1'b1;
          mem_addr[1] = a_cur + AW'(MAXC) + AW'(iss1);
        end
      end
      S_STREAM: begin
        if (rd_issued < nchar) begin
          for (int b = 0; b < int'(NBANK); b++) begin
            mem_rd[b]   = 1'b1;
            mem_addr[b] = ((b < 3) ? a_left : a_right) + AW'(rd_issued);
          end
        end
      end
      S_WRITE: begin
        if (wr_cnt < nchar && fifo_avail) begin
          fifo_pop = 1'b1;
          for (int g = 0; g < 2; g++) begin
            mem_wr[3*g+0] = 1'b1; mem_wdata[3*g+0] = {fifo_rec.c, fifo_rec.a};
            mem_wr[3*g+1] = 1'b1; mem_wdata[3*g+1] = {fifo_rec.t, fifo_rec.g};
            mem_wr[3*g+2] = 1'b1; mem_wdata[3*g+2] = {fifo_rec.scp, fifo_rec.lnscaler};
            for (int k = 0; k < 3; k++) mem_addr[3*g+k] = a_cur + AW'(wr_cnt);
          end
        end
      end
      default: ;
    endcase
  end

  // ------------------------------------------------ stream tags
  assign st_valid    = (state == S_STREAM) && mem_rvalid[0];
  assign st_last     = st_valid && (rd_ret == nchar - 1'b1);
  assign st_numsites = ns_ram[rd_ret[CW-2:0]];

  // ------------------------------------------------ numSites RAM
  always_ff @(posedge clk) begin
    if (state == S_LOAD && mem_rvalid[1]) begin
      ns_ram[{ret1[CW-3:0], 1'b0}] <= mem_rdata[1][31:0];
      ns_ram[{ret1[CW-3:0], 1'b1}] <= mem_rdata[1][63:32];
    end
  end

  // ------------------------------------------------ FSM
  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      a_left <= '0; a_right <= '0; a_cur <= '0; nchar <= '0;
      iss0 <= '0; iss1 <= '0; ret0 <= '0; ret1 <= '0;
      rd_issued <= '0; rd_ret <= '0; wr_cnt <= '0;
      lnl_got <= 1'b0; lnl <= '0; done <= 1'b0;
      for (int i = 0; i < 16; i++) begin p_left[i] <= '0; p_right[i] <= '0; end
    end else begin
      done <= 1'b0;
      if (lnl_valid) begin lnl <= lnl_in; lnl_got <= 1'b1; end
      case (state)
        S_IDLE: if (cmd_valid) begin
          a_left <= cmd_left; a_right <= cmd_right; a_cur <= cmd_cur; nchar <= cmd_nchar;
          iss0 <= '0; iss1 <= '0; ret0 <= '0; ret1 <= '0;
          rd_issued <= '0; rd_ret <= '0; wr_cnt <= '0; lnl_got <= 1'b0;
          state <= S_LOAD;
        end
        S_LOAD: begin
          if (mem_rd[0]) iss0 <= iss0 + 1'b1;
          if (mem_rd[1]) iss1 <= iss1 + 1'b1;
          if (mem_rvalid[0]) begin
            ret0 <= ret0 + 1'b1;
            if (ret0 < CW'(8)) begin
              p_left[{ret0[2:0], 1'b0}]  <= mem_rdata[0][31:0];
              p_left[{ret0[2:0], 1'b1}]  <= mem_rdata[0][63:32];
            end else begin
              p_right[{ret0[2:0], 1'b0}] <= mem_rdata[0][31:0];
              p_right[{ret0[2:0], 1'b1}] <= mem_rdata[0][63:32];
            end
          end
          if (mem_rvalid[1]) ret1 <= ret1 + 1'b1;
          if ((ret0 + CW'(mem_rvalid[0])) == CW'(16) &&
              (ret1 + CW'(mem_rvalid[1])) == nwords)
            state <= S_STREAM;
        end
        S_STREAM: begin
          if (mem_rd[0]) rd_issued <= rd_issued + 1'b1;
          if (st_valid) begin
            rd_ret <= rd_ret + 1'b1;
            if (st_last) state <= S_WRITE;
          end
        end
        S_WRITE: begin
          if (fifo_pop) wr_cnt <= wr_cnt + 1'b1;
          if ((wr_cnt + CW'(fifo_pop)) == nchar && (lnl_got || lnl_valid))
            state <= S_DONE;
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // all banks answer with the same latency while streaming
  always_ff @(posedge clk) begin
    if (!rst) begin
      for (int b = 1; b < int'(NBANK); b++)
        if (state == S_STREAM)
          a_same_lat: assert (mem_rvalid[b] == mem_rvalid[0])
            else $error("plf_controller: banks returned stream data in different cycles");
      if (state == S_IDLE && cmd_valid)
        a_nchar: assert (cmd_nchar != '0 && cmd_nchar <= CW'(MAXC))
          else $error("plf_controller: sequence length out of range");
    end
  end
endmodule
