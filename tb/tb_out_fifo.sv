// tb_out_fifo: random pushes and pops against a queue model, with a small
// DEPTH so that the FIFO fills up and wraps around; checks data order,
// empty, full and count every cycle, and that full and empty both occur.
module tb_out_fifo;
  localparam int W = 16, D = 8;
  logic clk = 0, rst = 1, push = 0, pop = 0, empty, full;
  logic [W-1:0] din = 0, dout;
  logic [$clog2(D):0] count;
  logic [W-1:0] q [$];
  int checks = 0, failures = 0, n_full = 0, n_empty = 0;
  out_fifo #(.W(W), .DEPTH(D)) dut (.clk, .rst, .push, .din, .pop, .dout, .empty, .full, .count);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      checks++;
      if (empty != (q.size() == 0) || full != (q.size() == D) || int'(count) != q.size() ||
          (q.size() > 0 && dout != q[0])) begin
        failures++;
        if (failures < 10) $display("cycle %0d: size %0d count %0d empty %b full %b", c, q.size(), count, empty, full);
      end
      if (full) n_full++;
      if (empty) n_empty++;
      // bias towards filling in the first half, draining in the second
      push = (q.size() < D) && ($urandom_range(0, 99) < ((c / 500) % 2 == 0 ? 70 : 30));
      pop  = (q.size() > 0) && ($urandom_range(0, 99) < ((c / 500) % 2 == 0 ? 30 : 70));
      din  = W'($urandom);
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(din);
    end
    checks += 2;
    if (n_full == 0)  begin failures++; $display("never full"); end
    if (n_empty == 0) begin failures++; $display("never empty"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
