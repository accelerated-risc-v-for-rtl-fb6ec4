// tb_sike_isogeny: SIKE workload test. It runs the isogeny-level point arithmetic of the key
// encapsulation and decapsulation on the full-size coprocessor, for all four primes.
//
// The CPU's part is played by tasks that expand F_p^2 operations into coprocessor instructions,
// the way the protocol software does:
//   F_p^2 add/sub     two instructions;
//   F_p^2 multiply    Karatsuba: 3 multiplications, 2 additions, 3 subtractions;
//   F_p^2 square      (a0+a1)(a0-a1) and 2*a0*a1: 2 multiplications, 4 additions/subtractions.
// With these it runs, per prime, the x-only Montgomery-curve routines of SIKE:
//   xDBL twice   (the doubling chain of the 2-isogeny side: (X:Z) -> [4](X:Z) with the
//                 constants A24plus and C24), and
//   xTPL once    (the tripling of the 3-isogeny side, with A24minus and A24plus).
// Inputs are random F_p^2 values, entered in Montgomery form (x*R mod p, sometimes plus p, so
// the redundant range [0, 2p) is used). The results are converted back by a Montgomery
// multiplication with the plain constant 1 on the coprocessor itself.
// Two independent checks are made:
//   - every RAM word against an instruction-level model (exact mod-2p add/sub with correction
//     and the exact Montgomery product (a*b + Q*p) / 2^(17n));
//   - the converted results, reduced mod p, against the same routines computed directly in
//     ordinary F_p^2 arithmetic here, which checks the instruction sequences and the Montgomery
//     form end to end.
// It reports the instruction count and the cycles the controller was active per prime, and
// fails if the two multiplier slots never ran at the same time.
module tb_sike_isogeny;
  import sike_pkg::*;
  localparam int BW = 1600;
  localparam int NREG = 48;

  // RAM map (an F_p^2 value uses two consecutive words: real, imaginary)
  localparam int X = 0, Z = 2, A24P = 4, C24 = 6, A24M = 8, ONE = 10, ZERO = 11;
  localparam int T0 = 12, T1 = 14, T2 = 16, T3 = 18, T4 = 20, T5 = 22, T6 = 24;
  localparam int X2 = 26, Z2 = 28, X3 = 30, Z3 = 32, CONV = 34, TMP = 42;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        psel = 1'b0, penable = 1'b0, pwrite = 1'b0;
  logic [7:0]  paddr = '0;
  logic [31:0] pwdata = '0;
  logic [31:0] prdata;
  logic        pready, pslverr;
  logic        ev_mul_lock, ev_mem_lock, ev_wr_lock;

  sike_coproc dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_active = 0, n_dual = 0, n_instr = 0;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (dut.active) n_active++;
    if (dut.u_ctrl.fr_q[0] == 2 && dut.u_ctrl.fr_q[1] == 2) n_dual++;
  end

  // ---------------- APB ----------------
  task automatic apb(input logic wr, input logic [7:0] a, input logic [31:0] d,
                     output logic [31:0] rd, output logic err);
    @(negedge clk);
    psel = 1'b1; penable = 1'b0; pwrite = wr; paddr = a; pwdata = d;
    @(negedge clk);
    penable = 1'b1;
    #1;
    while (!pready) begin @(negedge clk); #1; end
    rd = prdata; err = pslverr;
    @(posedge clk);
    #1;
    psel = 1'b0; penable = 1'b0;
  endtask

  task automatic wr32(input logic [7:0] a, input logic [31:0] d);
    logic [31:0] rd; logic err;
    apb(1'b1, a, d, rd, err);
    checks++;
    if (err) begin failures++; $display("FAIL unexpected pslverr at %h", a); end
  endtask

  task automatic write_elem(input int addr, input logic [BW-1:0] v);
    for (int k = 0; k < 24; k++) wr32(8'h08, v[k*32 +: 32]);
    wr32(8'h00, 32'(addr));
  endtask

  task automatic read_elem(input int addr, output logic [BW-1:0] v);
    logic [31:0] rd; logic err;
    wr32(8'h04, 32'(addr));
    v = '0;
    for (int k = 0; k < 24; k++) begin
      apb(1'b0, 8'h08, 0, rd, err);
      v[k*32 +: 32] = rd;
    end
  endtask

  function automatic logic [BW-1:0] rand_below(input logic [BW-1:0] lim);
    logic [BW-1:0] r;
    for (int k = 0; k < BW / 32; k++) r[k*32 +: 32] = $urandom;
    return r % lim;
  endfunction

  // ---------------- instruction-level model ----------------
  logic [BW-1:0] P, P2, RMASK, MINV;
  int unsigned   KBITS;
  logic [BW-1:0] model [NREG];

  function automatic logic [BW-1:0] ref_add(input logic [BW-1:0] a, b, input logic s);
    if (!s) return (a + b >= P2) ? a + b - P2 : a + b;
    else    return (a >= b) ? a - b : a + P2 - b;
  endfunction

  function automatic logic [BW-1:0] ref_mul(input logic [BW-1:0] a, b);
    logic [BW-1:0] t, q;
    t = a * b;
    q = (t * MINV) & RMASK;
    return (t + q * P) >> KBITS;
  endfunction

  // ---------------- programs ----------------
  // F_p^2 routines are first written as lists of F_p^2 operations (kind, a, b, d; every
  // address names the real word of a pair), then expanded into coprocessor instructions. One
  // loop sends the instructions and updates the model, another runs the F_p^2 list directly.
  localparam int K_ADD = 0, K_SUB = 1, K_MUL = 2, K_SQR = 3;
  int prog2 [$];     // F_p^2 operations, 4 entries each
  int prog1 [$];     // coprocessor instructions, 4 entries each (a, b, d, op)

  task automatic f2op(input int kind, a, b, d);
    prog2.push_back(kind); prog2.push_back(a); prog2.push_back(b); prog2.push_back(d);
  endtask

  task automatic op(input int sa, sb, d, opc);
    prog1.push_back(sa); prog1.push_back(sb); prog1.push_back(d); prog1.push_back(opc);
  endtask

  // F_p^2 operations as instruction sequences (operand and result may overlap).
  task automatic expand(input int kind, a, b, d);
    case (kind)
      K_ADD, K_SUB: begin op(a, b, d, kind); op(a + 1, b + 1, d + 1, kind); end
      K_MUL: begin                            // Karatsuba
        op(a,       b,       TMP,     2);     // a0*b0
        op(a + 1,   b + 1,   TMP + 1, 2);     // a1*b1
        op(a,       a + 1,   TMP + 2, 0);     // a0+a1
        op(b,       b + 1,   TMP + 3, 0);     // b0+b1
        op(TMP + 2, TMP + 3, TMP + 4, 2);     // (a0+a1)(b0+b1)
        op(TMP,     TMP + 1, d,       1);     // real = a0*b0 - a1*b1
        op(TMP + 4, TMP,     TMP + 5, 1);
        op(TMP + 5, TMP + 1, d + 1,   1);     // imag = (a0+a1)(b0+b1) - a0*b0 - a1*b1
      end
      default: begin                          // square
        op(a,       a + 1,   TMP,     0);     // a0+a1
        op(a,       a + 1,   TMP + 1, 1);     // a0-a1
        op(a,       a,       TMP + 2, 0);     // 2*a0
        op(TMP + 2, a + 1,   TMP + 3, 2);     // 2*a0*a1
        op(TMP,     TMP + 1, d,       2);     // real = a0^2 - a1^2
        op(TMP + 3, ZERO,    d + 1,   0);     // imag
      end
    endcase
  endtask

  // x-only doubling (X:Z) -> (xo:zo) on the curve given by A24plus/C24.
  task automatic xdbl(input int x, z, xo, zo);
    f2op(K_SUB, x, z, T0);      f2op(K_ADD, x, z, T1);
    f2op(K_SQR, T0, T0, T0);    f2op(K_SQR, T1, T1, T1);
    f2op(K_MUL, C24, T0, zo);   f2op(K_MUL, zo, T1, xo);
    f2op(K_SUB, T1, T0, T1);    f2op(K_MUL, A24P, T1, T0);
    f2op(K_ADD, zo, T0, zo);    f2op(K_MUL, zo, T1, zo);
  endtask

  // x-only tripling (X:Z) -> (xo:zo) with A24minus/A24plus.
  task automatic xtpl(input int x, z, xo, zo);
    f2op(K_SUB, x, z, T0);      f2op(K_SQR, T0, T0, T2);    f2op(K_ADD, x, z, T1);
    f2op(K_SQR, T1, T1, T3);    f2op(K_ADD, T1, T0, T4);    f2op(K_SUB, T1, T0, T0);
    f2op(K_SQR, T4, T4, T1);    f2op(K_SUB, T1, T3, T1);    f2op(K_SUB, T1, T2, T1);
    f2op(K_MUL, T3, A24P, T5);  f2op(K_MUL, T5, T3, T3);    f2op(K_MUL, T2, A24M, T6);
    f2op(K_MUL, T2, T6, T2);    f2op(K_SUB, T2, T3, T3);    f2op(K_SUB, T5, T6, T2);
    f2op(K_MUL, T2, T1, T1);    f2op(K_ADD, T3, T1, T2);    f2op(K_SQR, T2, T2, T2);
    f2op(K_MUL, T2, T4, xo);    f2op(K_SUB, T3, T1, T1);    f2op(K_SQR, T1, T1, T1);
    f2op(K_MUL, T1, T0, zo);
  endtask

  // ---------------- direct F_p^2 reference ----------------
  logic [BW-1:0] pr [NREG], pi [NREG];   // plain values, indexed by the real word's address

  task automatic run_direct();
    for (int k = 0; k < prog2.size(); k += 4) begin
      int kind, a, b, d;
      logic [BW-1:0] rr, ri;
      kind = prog2[k]; a = prog2[k+1]; b = prog2[k+2]; d = prog2[k+3];
      case (kind)
        K_ADD: begin rr = (pr[a] + pr[b]) % P;     ri = (pi[a] + pi[b]) % P;     end
        K_SUB: begin rr = (pr[a] + P - pr[b]) % P; ri = (pi[a] + P - pi[b]) % P; end
        default: begin
          rr = ((pr[a] * pr[b]) % P + P - (pi[a] * pi[b]) % P) % P;
          ri = ((pr[a] * pi[b]) % P + (pi[a] * pr[b]) % P) % P;
        end
      endcase
      pr[d] = rr; pi[d] = ri;
    end
  endtask

  // Send the instructions and follow them in the model.
  task automatic run_coproc();
    for (int k = 0; k < prog2.size(); k += 4)
      expand(prog2[k], prog2[k+1], prog2[k+2], prog2[k+3]);
    // leave Montgomery form: multiply by plain 1
    for (int h = 0; h < 2; h++) begin
      op(X2 + h, ONE, CONV + h,     2);
      op(Z2 + h, ONE, CONV + 2 + h, 2);
      op(X3 + h, ONE, CONV + 4 + h, 2);
      op(Z3 + h, ONE, CONV + 6 + h, 2);
    end
    for (int k = 0; k < prog1.size(); k += 4) begin
      int sa, sb, d, opc;
      sa = prog1[k]; sb = prog1[k+1]; d = prog1[k+2]; opc = prog1[k+3];
      wr32(8'h18, {6'b0, 8'(sa), 8'(sb), 8'(d), 2'(opc)});
      n_instr++;
      if (opc == 2) model[d] = ref_mul(model[sa], model[sb]);
      else          model[d] = ref_add(model[sa], model[sb], opc[0]);
    end
    wr32(8'h18, 32'd3);  // END
  endtask

  // ---------------- one prime ----------------
  task automatic run_level(input int lvl);
    logic [BW-1:0] v, x;
    logic [31:0] rd; logic err;
    int act0, ins0;

    P  = BW'(prime(2'(lvl)));
    P2 = P << 1;
    KBITS = 17 * mul_words(2'(lvl));
    RMASK = (BW'(1) << KBITS) - 1;
    x = 1;
    for (int k = 0; k < 12; k++) x = (x * ((BW'(2) - P * x) & RMASK)) & RMASK;
    MINV = (BW'(1) << KBITS) - x;

    wr32(8'h0C, 32'(lvl));
    for (int r = 0; r < NREG; r++) begin
      model[r] = '0; pr[r] = '0; pi[r] = '0;
    end
    // random inputs, entered in Montgomery form
    for (int r = X; r < ONE; r++) begin
      v = rand_below(P);
      if (r % 2 == 0) pr[r] = v; else pi[r - 1] = v;
      model[r] = (v << KBITS) % P;
      if ($urandom_range(0, 3) == 0) model[r] = model[r] + P;
    end
    model[ONE] = 1;
    model[ZERO] = 0;
    for (int r = 0; r < NREG; r++) write_elem(r, model[r]);

    prog2.delete(); prog1.delete();
    xdbl(X, Z, X2, Z2);
    xdbl(X2, Z2, X2, Z2);
    xtpl(X, Z, X3, Z3);
    run_direct();

    act0 = n_active; ins0 = n_instr;
    wr32(8'h10, 0);   // Start
    run_coproc();
    do apb(1'b0, 8'h14, 0, rd, err); while (rd[0]);
    $display("level %0d: %0d instructions, %0d active cycles", lvl, n_instr - ins0,
             n_active - act0);

    // exact contents of every word
    for (int r = 0; r < NREG; r++) begin
      read_elem(r, v);
      checks++;
      if (v != model[r]) begin
        failures++;
        $display("FAIL level %0d r%0d: got %h", lvl, r, v[767:0]);
        $display("                 want %h", model[r][767:0]);
      end
    end
    // results in ordinary form against the direct routines
    for (int k = 0; k < 8; k++) begin
      int base;
      logic [BW-1:0] want;
      base = (k / 2 == 0) ? X2 : (k / 2 == 1) ? Z2 : (k / 2 == 2) ? X3 : Z3;
      want = (k % 2 == 0) ? pr[base] : pi[base];
      checks++;
      if (model[CONV + k] % P != want) begin
        failures++;
        $display("FAIL level %0d output %0d: got %h", lvl, k, model[CONV + k] % P);
        $display("                     want %h", want);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int lvl = 0; lvl < 4; lvl++) run_level(lvl);
    checks++;
    if (n_dual == 0) begin failures++; $display("FAIL slots never overlapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
