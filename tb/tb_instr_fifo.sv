// tb_instr_fifo: checks the 32 x 26 circular instruction buffer against a queue model with
// random push/pop traffic, including filling it (full, pushes ignored), draining it (empty)
// and simultaneous push and pop, over several wrap-arounds of the pointers.
module tb_instr_fifo;
  localparam int unsigned IW = 26, AW = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  logic push = 0, pop = 0;
  logic [IW-1:0] din = '0, head;
  logic empty, full;
  logic [IW-1:0] q [$];
  int checks = 0, failures = 0, n_full = 0, n_empty = 0;

  instr_fifo #(.IW(IW), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      int bias;
      @(negedge clk);
      checks++;
      if (empty != (q.size() == 0) || full != (q.size() == 32) ||
          (q.size() > 0 && head != q[0])) begin
        failures++; $display("FAIL t=%0d size %0d", t, q.size());
      end
      if (full) n_full++;
      if (empty) n_empty++;
      bias = ((t / 200) % 2 == 0) ? 75 : 25;     // alternate filling and draining phases
      push = ($urandom_range(0, 99) < bias);
      pop  = ($urandom_range(0, 99) < 100 - bias) && !empty;
      din  = IW'($urandom);
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push && q.size() < 32 + (pop ? 1 : 0) && !full) q.push_back(din);
    end
    checks++;
    if (n_full == 0 || n_empty == 0) begin failures++; $display("FAIL full/empty not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
