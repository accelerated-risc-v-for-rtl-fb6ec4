// tb_mod_adder: checks modular addition and subtraction mod 2p at full width (752 bits) for
// all four SIKE primes. Operands are random in [0, 2p) plus the extremes 0 and 2p-1; the
// reference is computed with wide integers; one operation enters per cycle and its result is
// expected two cycles later. It also counts that the reduction (a + b >= 2p) and the
// correction (a < b) paths were both taken.
module tb_mod_adder;
  import sike_pkg::*;
  localparam int unsigned DW = 752;
  logic clk = 1'b0;
  logic [DW-1:0] a, b, m2p, res;
  logic sub;
  logic [DW-1:0] expq [3];
  int checks = 0, failures = 0, n_red = 0, n_corr = 0;

  mod_adder #(.DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [DW:0] rnd(input logic [DW:0] lim);
    logic [1023:0] r;
    for (int k = 0; k < 32; k++) r[k*32 +: 32] = $urandom;
    return (DW+1)'(r % 1024'(lim));
  endfunction

  initial begin
    int t = 0;
    for (int lvl = 0; lvl < 4; lvl++) begin
      logic [DW:0] p2;
      p2  = (DW+1)'(prime(2'(lvl))) << 1;
      for (int k = 0; k < 200; k++) begin
        logic [DW:0] x, y, z;
        @(negedge clk);
        m2p = DW'(p2);
        x = rnd(p2); y = rnd(p2);
        if (k == 0) begin x = p2 - 1; y = p2 - 1; end
        if (k == 1) begin x = 0; y = p2 - 1; end
        sub = 1'($urandom_range(0, 1));
        if (k < 2) sub = 1'(k);
        a = DW'(x); b = DW'(y);
        if (!sub) begin z = x + y; if (z >= p2) begin z = z - p2; n_red++; end end
        else if (x >= y) z = x - y;
        else begin z = x + p2 - y; n_corr++; end
        expq[0] = DW'(z);
        if (t >= 2 && k >= 2) begin
          checks++;
          if (res != expq[2]) begin failures++; $display("FAIL lvl %0d k %0d", lvl, k); end
        end
        expq[2] = expq[1]; expq[1] = expq[0];
        t++;
      end
    end
    checks++;
    if (n_red == 0 || n_corr == 0) begin failures++; $display("FAIL paths not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
