// pipe_delay: a W-bit shift register of N stages (N = 0 is a wire). Used to
// line up operands and valid/last tags with the floating-point pipelines.
// No reset: the valid tags that travel through it are reset by their owners
// by feeding zeros, or by resetting the stage registers through rst.
module pipe_delay #(
  parameter int unsigned W = 1,
  parameter int unsigned N = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (N == 0) begin : g_wire
    assign q = d;
  end else begin : g_sr
    logic [W-1:0] sr [N];
    always_ff @(posedge clk) begin
      if (rst) begin
        for (int i = 0; i < int'(N); i++) sr[i] <= '0;
      end else begin
        sr[0] <= d;
        for (int i = 1; i < int'(N); i++) sr[i] <= sr[i-1];
      end
    end
    assign q = sr[N-1];
  end
endmodule
