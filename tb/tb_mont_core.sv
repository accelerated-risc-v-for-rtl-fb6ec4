// tb_mont_core: self-checking test of the systolic Montgomery core at its full size
// (W = 17, S = 45, SA = 12) for all four SIKE primes.
//
// For each prime it feeds random operands a, b in [0, 2p), a word every second cycle, and
// collects word j of the result in cycle c0 + 2n + 2 + j. The reference check is independent
// of the array: T * 2^(17n) = a * b (mod p) and T < 2p, evaluated with wide integer arithmetic.
// A second operation is interleaved on the odd cycles to show that the two streams do not
// disturb each other.
module tb_mont_core;
  import sike_pkg::*;
  localparam int unsigned W = 17, S = 45, SA = 12;
  localparam int unsigned BW = 1600;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [W-1:0] a_in;
  logic [W-1:0] b [S];
  logic [W-1:0] m [S];
  logic [W-1:0] t_out [S];
  int checks = 0, failures = 0;

  mont_core #(.W(W), .S(S), .SA(SA)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [BW-1:0] rand_below(input logic [BW-1:0] lim);
    logic [BW-1:0] r;
    for (int k = 0; k < BW / 32; k++) r[k*32 +: 32] = $urandom;
    return r % lim;
  endfunction

  // Two operations, x (even slot) and y (odd slot), run together.
  task automatic run_pair(input logic [1:0] lvl);
    logic [BW-1:0] p, p2, ax, bx, ay, by, tx, ty, lhs, rhs;
    int unsigned n;
    logic [BUF_W-1:0] mp1;
    n   = mul_words(lvl);
    mp1 = prime_plus1(lvl);
    p   = BW'(prime(lvl));
    p2  = p << 1;
    ax = rand_below(p2); bx = rand_below(p2);
    ay = rand_below(p2); by = rand_below(p2);
    if (checks == 0) begin ax = p2 - 1; bx = p2 - 1; end   // extreme operands once
    for (int j = 0; j < S; j++) m[j] = (j * W < BUF_W) ? mp1[j*W +: W] : '0;
    tx = '0; ty = '0;
    // Cycle c0 = 0: x starts; cycle 1: y starts.
    for (int cyc = 0; cyc < 2 * n + S + 8; cyc++) begin
      int i;
      @(negedge clk);
      start = (cyc == 0) || (cyc == 1);
      // a_in: x words on even cycles, y words on odd cycles.
      i = cyc / 2;
      if (cyc % 2 == 0) a_in = (i < int'(n)) ? ax[i*W +: W] : '0;
      else              a_in = (i < int'(n)) ? ay[i*W +: W] : '0;
      // b: row j serves x when (cycle - 1 - j) is even, since a reaches row j at c0+1+j.
      for (int j = 0; j < S; j++) begin
        if (((cyc + 1 - j) % 2 + 2) % 2 == 0) b[j] = (j < int'(n)) ? bx[j*W +: W] : '0;
        else                                  b[j] = (j < int'(n)) ? by[j*W +: W] : '0;
      end
      // Collect results in this cycle (registered outputs are stable here).
      for (int j = 0; j < S; j++) begin
        if (cyc == 2 * int'(n) + 2 + j)     tx[j*W +: W] = t_out[j];
        if (cyc == 2 * int'(n) + 3 + j)     ty[j*W +: W] = t_out[j];
      end
    end
    start = 1'b0;
    // Check both results.
    lhs = (tx << (W * n)) % p;  rhs = (ax * bx) % p;
    checks++;
    if (lhs != rhs || tx >= p2) begin
      failures++;
      $display("FAIL lvl %0d x: result wrong", lvl);
    end
    lhs = (ty << (W * n)) % p;  rhs = (ay * by) % p;
    checks++;
    if (lhs != rhs || ty >= p2) begin
      failures++;
      $display("FAIL lvl %0d y: result wrong", lvl);
    end
  endtask

  initial begin
    a_in = '0;
    for (int j = 0; j < S; j++) begin b[j] = '0; m[j] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int lvl = 0; lvl < 4; lvl++)
      for (int r = 0; r < 3; r++) run_pair(2'(lvl));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
