// sram_model: behavioural model of one bank of the card's off-chip SRAM, as
// seen through one 64-bit memory port of the accelerator. A read returns the
// word RL cycles later with rvalid; a write takes effect at the clock edge.
// Storage is sparse (an associative array); unwritten words read as zero.
// The testbench preloads and inspects it through the mem array directly.
module sram_model #(
  parameter int AW = 20,
  parameter int RL = 4
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          rd,
  input  logic          wr,
  input  logic [63:0]   wdata,
  output logic          rvalid,
  output logic [63:0]   rdata
);
  logic [63:0] mem [int];
  logic        vpipe [RL];
  logic [63:0] dpipe [RL];
  initial for (int i = 0; i < RL; i++) begin vpipe[i] = 0; dpipe[i] = 0; end
  always @(posedge clk) begin
    if (wr) mem[int'(addr)] = wdata;
    vpipe[0] <= rd;
    dpipe[0] <= (rd && mem.exists(int'(addr))) ? mem[int'(addr)] : 64'd0;
    for (int i = 1; i < RL; i++) begin vpipe[i] <= vpipe[i-1]; dpipe[i] <= dpipe[i-1]; end
  end
  assign rvalid = vpipe[RL-1];
  assign rdata  = dpipe[RL-1];
endmodule
