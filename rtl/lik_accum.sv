// lik_accum: double-precision accumulator built from a single pipelined
// adder (LAT = 14 stages), an output buffer and input multiplexers, a
// simplified form of a DSA-style reduction circuit.
//
// Streaming: while in_valid is high the adder adds the new input to whatever
// leaves the adder that cycle, so LAT partial sums circulate in the pipeline
// and one input is taken every cycle without a hazard.
// Coalescing: in cycles without input, a value leaving the adder is captured
// in the buffer if the buffer is empty; if the buffer is full, the two are
// sent back into the adder together and the buffer is cleared. This repeats
// until one value is left in the buffer and the pipeline is empty; after the
// input marked in_last has been taken, that value is the sum, presented for
// one cycle on out_valid/sum. A valid bit travels with every value in the
// adder; it plays the part of the "non-zero" test of the document's
// description, so a partial sum that happens to be exactly zero is not lost.
// An idle input slot during streaming (a gap) is used to reduce as well.
// busy is high from the first input until the sum is out; a new stream must
// not start before busy falls (asserted).
// With LAT = 14 the reduction takes about five passes through the adder,
// roughly 70 cycles after the last input.
module lik_accum #(
  parameter int unsigned LAT = plf_pkg::DP_ADD_LAT
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  logic        in_last,
  input  logic [63:0] x,
  output logic        out_valid,
  output logic [63:0] sum,
  output logic        busy
);
  import plf_pkg::*;

  fp64_t       add_a, add_b, add_y, buf_q;
  logic        add_v, buf_v, draining, use_buf, capture, fin;
  logic [LAT-1:0] vsr;                     // valid bits inside the adder
  logic        o_v;

  assign o_v = vsr[LAT-1];

  always_comb begin
    add_a = '0; add_b = '0; add_v = 1'b0; use_buf = 1'b0; capture = 1'b0;
    if (in_valid) begin
      add_a = x;
      add_v = 1'b1;
      if (o_v)        add_b = add_y;
      else if (buf_v) begin add_b = buf_q; use_buf = 1'b1; end
    end else if (o_v && buf_v) begin
      add_a = add_y; add_b = buf_q; add_v = 1'b1; use_buf = 1'b1;
    end else if (o_v) begin
      capture = 1'b1;
    end
  end

  // one value left, in the buffer, nothing in flight
  assign fin = draining && !in_valid && buf_v && (vsr == '0);

  fp_add #(.EW(11), .MW(52), .LAT(LAT)) u_add (.clk, .rst, .a(add_a), .b(add_b), .y(add_y));

  always_ff @(posedge clk) begin
    if (rst) begin
      vsr <= '0; buf_v <= 1'b0; buf_q <= '0; draining <= 1'b0;
      out_valid <= 1'b0; sum <= '0;
    end else begin
      vsr <= {vsr[LAT-2:0], add_v};
      out_valid <= fin;
      if (fin) sum <= buf_q;
      if (capture) begin
        buf_q <= add_y; buf_v <= 1'b1;
      end else if (use_buf || fin) begin
        buf_v <= 1'b0;
      end
      if (in_valid && in_last) draining <= 1'b1;
      else if (fin)            draining <= 1'b0;
    end
  end

  assign busy = draining || buf_v || (vsr != '0);

  // a new stream may only start once the previous sum has been delivered
  always_ff @(posedge clk) begin
    if (!rst) begin
      a_no_overlap: assert (!(in_valid && draining))
        else $error("lik_accum: input while the previous sum is being reduced");
    end
  end
endmodule
