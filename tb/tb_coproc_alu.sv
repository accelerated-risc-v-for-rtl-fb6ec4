// tb_coproc_alu: checks the ALU at full size for every security level: that a level write
// loads the right constants (seen through the results), modular add/sub on the shared a/b
// inputs with a two-cycle latency, and multiplications on both slots through load, start
// (on the slot's parity), read and the `sel` result multiplexer, checked bit-exactly against
// the Montgomery product in cycle START + 3n + 3.
module tb_coproc_alu;
  import sike_pkg::*;
  localparam int unsigned DW = 752;
  localparam int BW = 1600;

  logic clk = 1'b0, rst_n = 1'b0;
  logic lvl_we = 0, sub = 0, load1 = 0, load2 = 0, start1 = 0, start2 = 0;
  logic read1 = 0, read2 = 0, sel = 0, odd;
  logic [1:0] lvl = 0;
  logic [DW-1:0] a = '0, b = '0, sum, prod;
  int checks = 0, failures = 0;

  coproc_alu dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [BW-1:0] rand_below(input logic [BW-1:0] lim);
    logic [BW-1:0] r;
    for (int k = 0; k < BW / 32; k++) r[k*32 +: 32] = $urandom;
    return r % lim;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int lvl_i = 0; lvl_i < 4; lvl_i++) begin
      logic [BW-1:0] p, p2, rmask, x, minv, ea, eb, ez;
      int n, kb;
      p  = BW'(prime(2'(lvl_i)));  p2 = p << 1;
      n  = int'(mul_words(2'(lvl_i)));  kb = 17 * n;
      rmask = (BW'(1) << kb) - 1;
      x = 1;
      for (int k = 0; k < 12; k++) x = (x * ((BW'(2) - p * x) & rmask)) & rmask;
      minv = (BW'(1) << kb) - x;
      @(negedge clk); lvl = 2'(lvl_i); lvl_we = 1;
      @(negedge clk); lvl_we = 0; lvl = 2'(3 - lvl_i);   // level input ignored without lvl_we
      // additions and subtractions
      for (int k = 0; k < 20; k++) begin
        @(negedge clk);
        ea = rand_below(p2); eb = rand_below(p2);
        sub = 1'(k % 2);
        a = DW'(ea); b = DW'(eb);
        if (!sub) ez = (ea + eb >= p2) ? ea + eb - p2 : ea + eb;
        else      ez = (ea >= eb) ? ea - eb : ea + p2 - eb;
        @(negedge clk); @(negedge clk);
        checks++;
        if (BW'(sum) != ez) begin failures++; $display("FAIL add lvl %0d k %0d", lvl_i, k); end
      end
      // one multiplication on each slot
      for (int s = 0; s < 2; s++) begin
        int t0;
        @(negedge clk);
        ea = rand_below(p2); eb = rand_below(p2);
        a = DW'(ea); b = DW'(eb);
        if (s == 0) load1 = 1; else load2 = 1;
        @(negedge clk);
        load1 = 0; load2 = 0;
        a = '0; b = '0;
        while (odd != (s == 0)) @(negedge clk);
        if (s == 0) start1 = 1; else start2 = 1;
        t0 = 0;
        @(negedge clk); start1 = 0; start2 = 0; t0++;
        while (t0 < 2 * n + 1) begin @(negedge clk); t0++; end
        if (s == 0) read1 = 1; else read2 = 1;
        @(negedge clk); read1 = 0; read2 = 0; t0++;
        while (t0 < 3 * n + 3) begin @(negedge clk); t0++; end
        sel = 1'(s);
        #1;
        checks++;
        if (BW'(prod) != (((ea * eb) + ((((ea * eb) * minv) & rmask) * p)) >> kb)) begin
          failures++; $display("FAIL mul lvl %0d slot %0d", lvl_i, s + 1);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
