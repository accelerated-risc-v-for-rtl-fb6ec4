// tb_dual_mont_mult: runs the dual Montgomery multiplier at full size (W = 17, S = 45,
// SA = 12) for all four primes with both slots kept busy: each slot is restarted as soon as
// its read has been issued (every 2n + 2 or 2n + 3 cycles), so two multiplications are always
// interleaved and a slot is reused while its previous product is still being collected.
// Every product is checked bit-exactly, in cycle START + 3n + 3, against the Montgomery
// product (a*b + Q*p) / 2^(17n), Q = -a*b/p mod 2^(17n), computed with wide integers.
module tb_dual_mont_mult;
  import sike_pkg::*;
  localparam int unsigned W = 17, S = 45, SA = 12, KW = W * S;
  localparam int BW = 1600;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [KW-1:0] a1, b1, a2, b2, m, t1, t2;
  logic start1 = 0, start2 = 0, read1 = 0, read2 = 0, odd;
  int checks = 0, failures = 0;

  dual_mont_mult #(.W(W), .S(S), .SA(SA)) dut (.*);

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

  initial begin
    a1 = '0; b1 = '0; a2 = '0; b2 = '0; m = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int lvl = 0; lvl < 4; lvl++) begin
      logic [BW-1:0] p, p2, rmask, x, minv;
      logic [BW-1:0] ea [2], eb [2];
      int n, kb, t_start [2], done_cnt;
      int chk_at [$], chk_slot [$];
      logic [BW-1:0] chk_val [$];
      p  = BW'(prime(2'(lvl)));  p2 = p << 1;
      n  = int'(mul_words(2'(lvl)));  kb = 17 * n;
      rmask = (BW'(1) << kb) - 1;
      x = 1;
      for (int k = 0; k < 12; k++) x = (x * ((BW'(2) - p * x) & rmask)) & rmask;
      minv = (BW'(1) << kb) - x;
      m = KW'(prime_plus1(2'(lvl)));
      t_start = '{-1, -1};
      done_cnt = 0;
      chk_at.delete(); chk_slot.delete(); chk_val.delete();
      for (int c = 0; done_cnt < 8; c++) begin
        @(negedge clk);
        start1 = 0; start2 = 0; read1 = 0; read2 = 0;
        // pending product checks
        for (int e = chk_at.size() - 1; e >= 0; e--)
          if (chk_at[e] == c) begin
            checks++;
            if (((chk_slot[e] == 0) ? BW'(t1) : BW'(t2)) != chk_val[e]) begin
              failures++;
              $display("FAIL lvl %0d slot %0d", lvl, chk_slot[e] + 1);
            end
            done_cnt++;
            chk_at.delete(e); chk_slot.delete(e); chk_val.delete(e);
          end
        for (int k = 0; k < 2; k++) begin
          if (t_start[k] >= 0 && c == t_start[k] + 2 * n + 1) begin
            if (k == 0) read1 = 1; else read2 = 1;
          end
          // restart a slot once its read is out and the parity fits
          if ((t_start[k] < 0 || c > t_start[k] + 2 * n + 1) && (odd == (k == 0))) begin
            ea[k] = rand_below(p2); eb[k] = rand_below(p2);
            if (done_cnt == 0 && k == 0) begin ea[k] = p2 - 1; eb[k] = p2 - 1; end
            chk_at.push_back(c + 3 * n + 3);
            chk_slot.push_back(k);
            chk_val.push_back(((ea[k] * eb[k]) + ((((ea[k] * eb[k]) * minv) & rmask) * p)) >> kb);
            if (k == 0) begin a1 = KW'(ea[k]); b1 = KW'(eb[k]); start1 = 1; end
            else        begin a2 = KW'(ea[k]); b2 = KW'(eb[k]); start2 = 1; end
            t_start[k] = c;
          end
        end
      end
      @(negedge clk);
      start1 = 0; start2 = 0; read1 = 0; read2 = 0;
      repeat (3 * n + 10) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
