// tb_mont_core_sizes: the systolic Montgomery core in its smaller configurations.
//
// Five cores run side by side:
//   cfg 0   s = 8, s_A = 3, the small array used to explain the row timing, with the modulus
//           m = 2^51 * 3^40 (p = m - 1 is odd and p = -1 mod 2^17, which is all the array
//           needs; it does not have to be prime for the arithmetic check);
//   cfg 1-4 one array per SIKE prime, sized for that prime alone: s = n (26, 30, 36, 45) and
//           s_A = floor(eA / 17) (12, 14, 17, 21). Such an array uses 2s - s_A multipliers:
//           40, 46, 55 and 69, which is checked against those numbers.
// Each core computes random products, two interleaved operations at a time (x on even, y on
// odd cycles), checked as in tb_mont_core: T * 2^(17n) = a*b (mod p) and T < 2p.
// For x it also checks the row alignment cycle by cycle: one cycle after the a word a_i
// enters row j (cycle c0 + 2i + 1 + j), that row's a register holds a_i and, for j >= s_A,
// its reduction register holds q_i * m_j. Here q_i is digit i of the full Montgomery quotient
// Q = a*b*(-p^-1) mod 2^(17n), computed independently. So a_i * b_j and q_i * m_j are formed
// in the same row in the same cycle, and both move down one row per cycle.
module tb_mont_core_sizes;
  import sike_pkg::*;
  localparam int unsigned W = 17;
  localparam int unsigned BW = 1600;
  localparam int NCFG = 5;
  localparam int unsigned S_CFG  [NCFG] = '{8, mul_words(2'd0), mul_words(2'd1),
                                            mul_words(2'd2), mul_words(2'd3)};
  localparam int unsigned SA_CFG [NCFG] = '{3, exp_a(2'd0) / W, exp_a(2'd1) / W,
                                            exp_a(2'd2) / W, exp_a(2'd3) / W};
  localparam int unsigned DSP_DOC [NCFG] = '{13, 40, 46, 55, 69};

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  int done = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [BW-1:0] rand_below(input logic [BW-1:0] lim);
    logic [BW-1:0] r;
    for (int k = 0; k < BW / 32; k++) r[k*32 +: 32] = $urandom;
    return r % lim;
  endfunction

  for (genvar g = 0; g < NCFG; g++) begin : cfg
    localparam int unsigned S  = S_CFG[g];
    localparam int unsigned SA = SA_CFG[g];

    logic         start = 1'b0;
    logic [W-1:0] a_in = '0;
    logic [W-1:0] b [S];
    logic [W-1:0] m [S];
    logic [W-1:0] t_out [S];

    mont_core #(.W(W), .S(S), .SA(SA)) dut (.clk, .rst_n, .start, .a_in, .b, .m, .t_out);

    initial begin
      logic [BW-1:0] mm, p, p2, x, rmask, minv, ax, bx, ay, by, qx, tx, ty;
      int unsigned n;
      for (int j = 0; j < int'(S); j++) begin b[j] = '0; m[j] = '0; end
      if (g == 0) begin
        mm = BW'(1) << 51;
        for (int k = 0; k < 40; k++) mm = mm * 3;
      end else mm = BW'(prime_plus1(2'(g - 1)));
      p  = mm - 1;
      p2 = p << 1;
      n  = S;
      rmask = (BW'(1) << (W * n)) - 1;
      x = 1;
      for (int k = 0; k < 12; k++) x = (x * ((BW'(2) - p * x) & rmask)) & rmask;
      minv = (BW'(1) << (W * n)) - x;
      for (int j = 0; j < int'(S); j++) m[j] = mm[j*W +: W];

      @(posedge rst_n);
      checks++;
      if (2 * S - SA != DSP_DOC[g]) begin
        failures++;
        $display("FAIL cfg %0d: %0d multipliers, expected %0d", g, 2 * S - SA, DSP_DOC[g]);
      end

      for (int r = 0; r < 4; r++) begin
        ax = rand_below(p2); bx = rand_below(p2);
        ay = rand_below(p2); by = rand_below(p2);
        if (r == 0) begin ax = p2 - 1; bx = p2 - 1; end
        qx = ((ax * bx) * minv) & rmask;
        tx = '0; ty = '0;
        for (int cyc = 0; cyc < 2 * int'(n) + int'(S) + 8; cyc++) begin
          int i;
          @(negedge clk);
          // alignment of x's words: registers loaded in cycle cyc - 1
          for (int j = 0; j < int'(S); j++) begin
            int d;
            d = cyc - 1 - j;
            if (d >= 0 && d % 2 == 0 && d / 2 < int'(n)) begin
              logic [W-1:0] ai, qi;
              ai = ax[(d / 2) * W +: W];
              qi = qx[(d / 2) * W +: W];
              checks++;
              if (dut.a_q[j] != ai) begin
                failures++;
                $display("FAIL cfg %0d cycle %0d: row %0d a register %h, want a_%0d = %h",
                         g, cyc, j, dut.a_q[j], d / 2, ai);
              end
              if (j >= int'(SA)) begin
                checks++;
                if (dut.r_q[j] != (2*W)'(qi) * (2*W)'(m[j])) begin
                  failures++;
                  $display("FAIL cfg %0d cycle %0d: row %0d reduction %h, want q_%0d*m_%0d",
                           g, cyc, j, dut.r_q[j], d / 2, j);
                end
              end
            end
          end
          start = (cyc == 0) || (cyc == 1);
          i = cyc / 2;
          if (cyc % 2 == 0) a_in = (i < int'(n)) ? ax[i*W +: W] : '0;
          else              a_in = (i < int'(n)) ? ay[i*W +: W] : '0;
          for (int j = 0; j < int'(S); j++) begin
            if (((cyc + 1 - j) % 2 + 2) % 2 == 0) b[j] = bx[j*W +: W];
            else                                  b[j] = by[j*W +: W];
          end
          for (int j = 0; j < int'(S); j++) begin
            if (cyc == 2 * int'(n) + 2 + j) tx[j*W +: W] = t_out[j];
            if (cyc == 2 * int'(n) + 3 + j) ty[j*W +: W] = t_out[j];
          end
        end
        start = 1'b0;
        checks++;
        if ((tx << (W * n)) % p != (ax * bx) % p || tx >= p2) begin
          failures++;
          $display("FAIL cfg %0d x: result wrong", g);
        end
        checks++;
        if ((ty << (W * n)) % p != (ay * by) % p || ty >= p2) begin
          failures++;
          $display("FAIL cfg %0d y: result wrong", g);
        end
      end
      done++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done == NCFG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
