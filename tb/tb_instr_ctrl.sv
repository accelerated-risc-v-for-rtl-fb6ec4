// tb_instr_ctrl: checks the instruction controller on its own (n = 26), with the instruction
// buffer modelled by a queue and `odd` by a toggling bit.
//
// A scoreboard predicts, from the cycle I in which each instruction is issued, every control
// event it must cause: add/sub - sub at I+2 and the port-B write of its destination at I+4;
// mult - load of its slot at I+2, start in the first cycle >= I+3 of the slot's parity (S),
// read at S+2n+1 and the port-A write with `sel` = slot at S+3n+3. Every cycle the actual
// controls are compared with the prediction. Issue itself is checked both ways: no
// instruction may issue while a lock should hold (a source or the destination still pending,
// a RAM write in this cycle, its multiplier slot not yet past stage 1), and one must issue
// whenever none holds. The program is a hand-made dependent sequence followed by random
// instructions on 8 registers, then END; `active` must drop once all is written.
module tb_instr_ctrl;
  import sike_pkg::*;
  localparam int N = 26;
  localparam int MAXC = 20000;

  logic clk = 1'b0, rst_n = 1'b0, go = 0, odd = 0, empty;
  logic [5:0] nwords = 6'(N);
  instr_t head;
  logic active, pop;
  logic [7:0] addr_a, addr_b;
  logic we_a, we_b, sub, load1, load2, start1, start2, read1, read2, sel;
  logic ev_mul_lock, ev_mem_lock, ev_wr_lock;

  instr_ctrl dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  instr_t prog [$];

  // predicted events, indexed by cycle
  logic       e_web [MAXC], e_wea [MAXC], e_sub_v [MAXC], e_sub [MAXC];
  logic [7:0] e_addrb [MAXC], e_addra [MAXC];
  logic       e_sel [MAXC];
  logic       e_ld [2][MAXC], e_st [2][MAXC], e_rd [2][MAXC];
  // pending destinations: (dst, write cycle)
  int         p_dst [$], p_wc [$];
  int         slot_free_at [2];
  int         cur;
  int         n_issue = 0, n_mul = 0, n_lock_cycles = 0;

  initial begin
    repeat (MAXC - 100) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic instr_t mk(input int sa, sb, d, input opcode_e op);
    instr_t i;
    i.src_a = 8'(sa); i.src_b = 8'(sb); i.dst = 8'(d); i.op = op;
    return i;
  endfunction

  initial begin
    for (int c = 0; c < MAXC; c++) begin
      e_web[c] = 0; e_wea[c] = 0; e_sub_v[c] = 0; e_sub[c] = 0; e_addrb[c] = 0; e_addra[c] = 0;
      e_sel[c] = 0;
      for (int k = 0; k < 2; k++) begin e_ld[k][c] = 0; e_st[k][c] = 0; e_rd[k][c] = 0; end
    end
    slot_free_at = '{0, 0};
    cur = 0;
    // hand-made dependent sequence
    prog.push_back(mk(2, 3, 1, OP_ADD));
    prog.push_back(mk(5, 6, 4, OP_MUL));
    prog.push_back(mk(8, 9, 7, OP_MUL));
    prog.push_back(mk(1, 1, 10, OP_MUL));   // slot 1 again, and depends on the add
    prog.push_back(mk(4, 7, 11, OP_SUB));   // waits for both products
    prog.push_back(mk(12, 13, 14, OP_ADD));
    for (int k = 0; k < 40; k++)
      prog.push_back(mk($urandom_range(0, 7), $urandom_range(0, 7), $urandom_range(0, 7),
                        opcode_e'($urandom_range(0, 2))));
    prog.push_back(mk(0, 0, 0, OP_END));
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    odd <= ~odd;
    if (pop) void'(prog.pop_front());
  end

  assign empty = (prog.size() == 0) || !go_done;
  assign head  = (prog.size() > 0) ? prog[0] : '0;
  logic go_done = 0;

  // per-cycle checking, in the middle of the cycle
  always @(negedge clk) if (rst_n && go_done) begin
    int c;
    logic exp_issue, lock;
    c = cyc;
    // control outputs against the prediction
    checks++;
    if (we_b != e_web[c] || (we_b && addr_b != e_addrb[c]) ||
        we_a != e_wea[c] || (we_a && (addr_a != e_addra[c] || sel != e_sel[c])) ||
        (e_sub_v[c] && sub != e_sub[c]) ||
        load1 != e_ld[0][c] || load2 != e_ld[1][c] || start1 != e_st[0][c] ||
        start2 != e_st[1][c] || read1 != e_rd[0][c] || read2 != e_rd[1][c]) begin
      failures++;
      $display("FAIL controls at cycle %0d: we_b %b/%b we_a %b/%b ld %b%b/%b%b st %b%b/%b%b rd %b%b/%b%b",
               c, we_b, e_web[c], we_a, e_wea[c], load1, load2, e_ld[0][c], e_ld[1][c],
               start1, start2, e_st[0][c], e_st[1][c], read1, read2, e_rd[0][c], e_rd[1][c]);
    end
    // expected issue decision
    lock = 0;
    if (prog.size() > 0 && head.op != OP_END) begin
      for (int k = 0; k < p_dst.size(); k++)
        if (p_wc[k] >= c && (p_dst[k] == head.src_a || p_dst[k] == head.src_b || p_dst[k] == head.dst))
          lock = 1;
      if (head.op == OP_MUL && slot_free_at[cur] > c) lock = 1;
    end
    if (e_web[c] || e_wea[c]) lock = 1;
    exp_issue = (prog.size() > 0) && active && !lock && !end_issued;
    checks++;
    if (pop != exp_issue) begin
      failures++;
      $display("FAIL issue at cycle %0d: pop %b expected %b", c, pop, exp_issue);
    end
    if (!pop && prog.size() > 0 && !end_issued) n_lock_cycles++;
    // record predictions for an issued instruction
    if (pop) begin
      n_issue++;
      case (head.op)
        OP_ADD, OP_SUB: begin
          e_sub_v[c + 2] = 1; e_sub[c + 2] = (head.op == OP_SUB);
          e_web[c + 4] = 1; e_addrb[c + 4] = head.dst;
          p_dst.push_back(head.dst); p_wc.push_back(c + 4);
        end
        OP_MUL: begin
          int s;
          s = c + 3;
          // odd in cycle x is (x % 2 == 1) since odd toggles from 0 at cycle 0
          while ((s % 2 == 1) != (cur == 0)) s++;
          e_ld[cur][c + 2] = 1;
          e_st[cur][s] = 1;
          e_rd[cur][s + 2 * N + 1] = 1;
          e_wea[s + 3 * N + 3] = 1; e_addra[s + 3 * N + 3] = head.dst; e_sel[s + 3 * N + 3] = 1'(cur);
          p_dst.push_back(head.dst); p_wc.push_back(s + 3 * N + 3);
          slot_free_at[cur] = s + 2 * N + 2;
          cur = 1 - cur;
          n_mul++;
        end
        default: end_issued = 1;
      endcase
    end
  end
  logic end_issued = 0;

  initial begin
    int last_wc;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk); go = 1;
    @(negedge clk); go = 0; go_done = 1;
    wait (end_issued);
    last_wc = 0;
    foreach (p_wc[k]) if (p_wc[k] > last_wc) last_wc = p_wc[k];
    while (cyc <= last_wc + 1) @(negedge clk);
    checks++;
    if (active) begin failures++; $display("FAIL still active after the last write"); end
    checks++;
    if (n_lock_cycles == 0 || n_mul < 3) begin failures++; $display("FAIL no stalls seen"); end
    $display("issued %0d (mult %0d), stalled %0d cycles", n_issue, n_mul, n_lock_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
