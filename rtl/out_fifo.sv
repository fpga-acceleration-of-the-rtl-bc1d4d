// out_fifo: synchronous first-word-fall-through FIFO of DEPTH words of W
// bits, one of the output buffers of Figure 3. The node's results are pushed
// as they leave the pipeline and popped while they are written back to the
// SRAM banks, which can only start once every input character has been
// read, because reading keeps all memory ports busy. DEPTH defaults to the
// 8192-character limit of the design. dout shows the oldest word whenever
// empty is low; push and pop may happen in the same cycle. Pushing when full
// or popping when empty is an error (asserted). Storage is a plain array
// (block RAM on an FPGA); the pointers are reset by rst.
module out_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 8192
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         push,
  input  logic [W-1:0] din,
  input  logic         pop,
  output logic [W-1:0] dout,
  output logic         empty,
  output logic         full,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (push) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (pop)  rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  assign dout  = mem[rp];
  assign empty = (count == '0);
  assign full  = (count == (AW+1)'(DEPTH));

  always_ff @(posedge clk) begin
    if (!rst) begin
      a_no_overflow:  assert (!(push && full && !pop)) else $error("out_fifo: push while full");
      a_no_underflow: assert (!(pop && empty))         else $error("out_fifo: pop while empty");
    end
  end
endmodule
