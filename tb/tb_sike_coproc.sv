// tb_sike_coproc: end-to-end test of the coprocessor at its default (full) size, driven over
// APB the way the CPU's software drives it.
//
// For each of the four security levels it selects the level, writes 16 random field elements
// in [0, 2p) into the RAM through the data buffer, starts the controller and sends a program:
// an Fp2 multiplication (3 multiplications, 2 additions, 3 subtractions, with the
// dependencies of the Karatsuba form) followed by random add/sub/mul instructions, then END.
// It polls Status, reads every RAM word back and compares it with a reference model computed
// here with wide integers: modular add/sub mod 2p with the conditional correction, and the
// exact Montgomery product (a*b + Q*p) / 2^(17n) with Q = -a*b/p mod 2^(17n).
// It also counts how often each mechanism of the design occurred and fails if one never did:
// multiplier, memory and write locks, both multiplier slots busy at once, instruction buffer
// full, adder reduction and subtraction correction, RAM access refused while busy, Read RAM
// wait states, and all four security levels. One multiplication latency (START to product
// write = 3n+3 cycles) is checked per level.
module tb_sike_coproc;
  import sike_pkg::*;
  localparam int BW = 1600;
  localparam int NREG = 16;
  localparam int NRAND = 48;

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
  int n_mul_lock = 0, n_mem_lock = 0, n_wr_lock = 0, n_dual = 0, n_full = 0;
  int n_add_red = 0, n_sub_corr = 0, n_busy_err = 0, n_rd_wait = 0, n_levels = 0;
  int n_lat_ok = 0;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Event counting from the design's outputs and state.
  always @(posedge clk) if (rst_n) begin
    if (ev_mul_lock) n_mul_lock++;
    if (ev_mem_lock) n_mem_lock++;
    if (ev_wr_lock)  n_wr_lock++;
    if (dut.u_ctrl.fr_q[0] == 2 && dut.u_ctrl.fr_q[1] == 2) n_dual++;
    if (psel && penable && paddr == 8'h18 && !pready) n_full++;
    if (psel && penable && paddr == 8'h04 && !pready) n_rd_wait++;
  end

  // Latency: START of slot 1 to its product write.
  int t_start1 = -1, cyc = 0, exp_lat = 0, lat_seen = 0;
  always @(posedge clk) begin
    cyc++;
    if (dut.start1 && t_start1 < 0) t_start1 = cyc;
    if (t_start1 >= 0 && dut.u_ctrl.bk_q[0] == 2 && !lat_seen) begin
      lat_seen = 1;
      checks++;
      if (cyc - t_start1 != exp_lat) begin
        failures++;
        $display("FAIL latency %0d, expected %0d", cyc - t_start1, exp_lat);
      end else n_lat_ok++;
    end
  end

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

  // Reference arithmetic.
  logic [BW-1:0] P, P2, RMASK, MINV;
  int unsigned   KBITS;

  function automatic logic [BW-1:0] ref_add(input logic [BW-1:0] a, b, input logic s);
    logic [BW-1:0] c;
    if (!s) begin
      c = a + b;
      if (c >= P2) begin c = c - P2; n_add_red++; end
    end else begin
      if (a >= b) c = a - b;
      else begin c = a + P2 - b; n_sub_corr++; end
    end
    return c;
  endfunction

  function automatic logic [BW-1:0] ref_mul(input logic [BW-1:0] a, b);
    logic [BW-1:0] t, q;
    t = a * b;
    q = (t * MINV) & RMASK;
    return (t + q * P) >> KBITS;
  endfunction

  function automatic logic [31:0] instr(input int sa, sb, d, input logic [1:0] op);
    return {6'b0, 8'(sa), 8'(sb), 8'(d), op};
  endfunction

  logic [BW-1:0] model [NREG];

  task automatic exec(input int sa, sb, d, input logic [1:0] op);
    wr32(8'h18, instr(sa, sb, d, op));
    if (op == 2'd2) model[d] = ref_mul(model[sa], model[sb]);
    else            model[d] = ref_add(model[sa], model[sb], op[0]);
  endtask

  task automatic run_level(input int lvl);
    logic [BW-1:0] v, x;
    logic [31:0] rd; logic err;
    P  = BW'(prime(2'(lvl)));
    P2 = P << 1;
    KBITS = 17 * mul_words(2'(lvl));
    RMASK = (BW'(1) << KBITS) - 1;
    // p^-1 mod 2^K by Newton iteration, then negate.
    x = 1;
    for (int k = 0; k < 12; k++) x = (x * ((BW'(2) - P * x) & RMASK)) & RMASK;
    MINV = (BW'(1) << KBITS) - x;
    exp_lat = 3 * int'(mul_words(2'(lvl))) + 3;
    t_start1 = -1; lat_seen = 0;

    wr32(8'h0C, 32'(lvl));
    n_levels++;
    for (int r = 0; r < NREG; r++) begin
      model[r] = rand_below(P2);
      if (r == 0) model[r] = P2 - 1;
      write_elem(r, model[r]);
    end
    wr32(8'h10, 0);   // Start
    // Fp2 multiplication (a0 + a1 i)(b0 + b1 i) with a = r0,r1 and b = r2,r3 into r4,r5.
    exec(0, 2, 6, 2'd2);   // m0 = a0*b0
    exec(1, 3, 7, 2'd2);   // m1 = a1*b1
    exec(0, 1, 8, 2'd0);   // s0 = a0+a1
    exec(2, 3, 9, 2'd0);   // s1 = b0+b1
    exec(8, 9, 10, 2'd2);  // m2 = s0*s1
    exec(6, 7, 4, 2'd1);   // c0 = m0-m1
    exec(10, 6, 11, 2'd1); // t  = m2-m0
    exec(11, 7, 5, 2'd1);  // c1 = t-m1
    // RAM access while running is refused.
    apb(1'b1, 8'h00, 32'd15, rd, err);
    checks++;
    if (!err) begin failures++; $display("FAIL RAM write accepted while busy"); end
    else n_busy_err++;
    // Random program.
    for (int k = 0; k < NRAND; k++) begin
      int sa, sb, d, op;
      sa = $urandom_range(0, NREG - 1);
      sb = $urandom_range(0, NREG - 1);
      d  = $urandom_range(0, NREG - 1);
      op = $urandom_range(0, 2);
      exec(sa, sb, d, 2'(op));
    end
    wr32(8'h18, instr(0, 0, 0, 2'd3));  // END
    do apb(1'b0, 8'h14, 0, rd, err); while (rd[0]);
    for (int r = 0; r < NREG; r++) begin
      read_elem(r, v);
      checks++;
      if (v != model[r]) begin
        failures++;
        $display("FAIL level %0d r%0d: got %h", lvl, r, v[767:0]);
        $display("                 want %h", model[r][767:0]);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int lvl = 0; lvl < 4; lvl++) run_level(lvl);
    $display("events: mul_lock=%0d mem_lock=%0d wr_lock=%0d dual=%0d full=%0d add_red=%0d sub_corr=%0d busy_err=%0d rd_wait=%0d levels=%0d lat_ok=%0d",
             n_mul_lock, n_mem_lock, n_wr_lock, n_dual, n_full, n_add_red, n_sub_corr,
             n_busy_err, n_rd_wait, n_levels, n_lat_ok);
    checks++; if (n_mul_lock == 0) begin failures++; $display("FAIL no multiplier lock"); end
    checks++; if (n_mem_lock == 0) begin failures++; $display("FAIL no memory lock"); end
    checks++; if (n_wr_lock  == 0) begin failures++; $display("FAIL no write lock"); end
    checks++; if (n_dual     == 0) begin failures++; $display("FAIL slots never overlapped"); end
    checks++; if (n_full     == 0) begin failures++; $display("FAIL buffer never full"); end
    checks++; if (n_add_red  == 0) begin failures++; $display("FAIL no add reduction"); end
    checks++; if (n_sub_corr == 0) begin failures++; $display("FAIL no sub correction"); end
    checks++; if (n_busy_err == 0) begin failures++; $display("FAIL no busy refusal"); end
    checks++; if (n_rd_wait  == 0) begin failures++; $display("FAIL no read wait"); end
    checks++; if (n_levels   != 4) begin failures++; $display("FAIL not all levels"); end
    checks++; if (n_lat_ok   != 4) begin failures++; $display("FAIL latency not seen per level"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
