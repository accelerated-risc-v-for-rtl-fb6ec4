// instr_ctrl: instruction controller of the coprocessor.
//
// Once started, it takes instructions from the instruction buffer and runs them on the ALU
// and RAM, several at a time:
//   RAM1    issue: both source addresses go to the RAM read ports and the instruction is
//           popped. Issue waits while a lock holds (below).
//   RAM2    second read cycle of the RAM.
//   add/sub ADD1 (operands on the RAM outputs, enter the adder), ADD2, then the sum is written
//           through RAM port B: RAM1 + 4.
//   mult    the slot chosen at issue (a bit that toggles with every multiplication) is loaded
//           (LOAD), waits for its parity (slot 1 odd cycles, slot 2 even cycles), is started
//           (START), counts the interleave delay 2n (stage 1), pulses READ, counts the rest of
//           the latency (stage 2) and writes the product through RAM port A in cycle
//           START + 3n + 3, with `sel` naming the slot.
//   end     stops issuing; the controller turns inactive when nothing is left in flight.
// Locks (issue stalls while any holds):
//   multiplier lock  the slot to be used still holds a multiplication that has not finished
//                    stage 1 (two multiplications between RAM1 and stage 1);
//   memory lock      a source of the instruction is the destination of an instruction still in
//                    flight (also its destination, so that writes stay in program order);
//   write lock       a RAM write happens in this cycle.
// n (the word count of the prime) comes from the security level. Stage structure, the slot
// bits, the counters and the three locks follow the document; the write-after-write part of
// the memory lock, the instruction layout and the exact counter values are this design's.
module instr_ctrl
  import sike_pkg::*;
#(
  parameter int unsigned AW = RAM_AW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          go,          // Start command
  input  logic [5:0]    nwords,      // n of the selected prime
  output logic          active,
  // instruction buffer
  input  logic          empty,
  input  instr_t        head,
  output logic          pop,
  // RAM
  output logic [AW-1:0] addr_a,
  output logic          we_a,
  output logic [AW-1:0] addr_b,
  output logic          we_b,
  // ALU
  input  logic          odd,
  output logic          sub,
  output logic          load1,
  output logic          load2,
  output logic          start1,
  output logic          start2,
  output logic          read1,
  output logic          read2,
  output logic          sel,
  // event counters for observation
  output logic          ev_mul_lock,
  output logic          ev_mem_lock,
  output logic          ev_wr_lock
);
  typedef struct packed {
    logic              v;
    opcode_e           op;
    logic [AW-1:0]     dst;
    logic              slot;
  } stg_t;

  typedef enum logic [1:0] {F_IDLE, F_WAIT, F_STAGE1} front_e;
  typedef enum logic [1:0] {B_IDLE, B_STAGE2, B_WRITE} back_e;

  stg_t          s2_q, s3_q, s4_q, s5_q;   // RAM2, ADD1/LOAD, ADD2, write add
  front_e        fr_q   [2];
  logic [AW-1:0] fr_dst [2];
  logic [7:0]    fr_cnt [2];
  back_e         bk_q   [2];
  logic [AW-1:0] bk_dst [2];
  logic [7:0]    bk_cnt [2];
  logic          cur_q;                    // slot of the next multiplication
  logic          end_q;                    // end instruction seen
  logic          act_q;

  // ---------------- issue decision ----------------
  logic mul_lock, mem_lock, wr_lock, can_issue, issue;
  logic [AW-1:0] pend [10];
  logic [9:0]    pend_v;
  logic          is_mul;

  always_comb begin
    pend[0] = s2_q.dst;   pend_v[0] = s2_q.v;
    pend[1] = s3_q.dst;   pend_v[1] = s3_q.v;
    pend[2] = s4_q.dst;   pend_v[2] = s4_q.v;
    pend[3] = s5_q.dst;   pend_v[3] = s5_q.v;
    pend[4] = fr_dst[0];  pend_v[4] = (fr_q[0] != F_IDLE);
    pend[5] = fr_dst[1];  pend_v[5] = (fr_q[1] != F_IDLE);
    pend[6] = bk_dst[0];  pend_v[6] = (bk_q[0] != B_IDLE);
    pend[7] = bk_dst[1];  pend_v[7] = (bk_q[1] != B_IDLE);
    pend[8] = '0;         pend_v[8] = 1'b0;
    pend[9] = '0;         pend_v[9] = 1'b0;

    is_mul   = (head.op == OP_MUL);
    mem_lock = 1'b0;
    if (head.op != OP_END)
      for (int k = 0; k < 10; k++)
        if (pend_v[k] && (pend[k] == head.src_a || pend[k] == head.src_b || pend[k] == head.dst))
          mem_lock = 1'b1;
    // Slot busy from RAM1 until the end of stage 1.
    mul_lock = is_mul && ((s2_q.v && s2_q.op == OP_MUL && s2_q.slot == cur_q) ||
                          (s3_q.v && s3_q.op == OP_MUL && s3_q.slot == cur_q) ||
                          (fr_q[cur_q] != F_IDLE));
    wr_lock  = we_a || we_b;
    can_issue = act_q && !end_q && !empty;
    issue     = can_issue && !mul_lock && !mem_lock && !wr_lock;
  end

  assign pop         = issue;
  assign ev_mul_lock = can_issue && mul_lock;
  assign ev_mem_lock = can_issue && mem_lock;
  assign ev_wr_lock  = can_issue && wr_lock;

  // ---------------- RAM and ALU controls ----------------
  logic [1:0] bk_write;
  always_comb begin
    bk_write[0] = (bk_q[0] == B_WRITE);
    bk_write[1] = (bk_q[1] == B_WRITE);
    we_a   = bk_write[0] || bk_write[1];
    sel    = bk_write[1];
    we_b   = s5_q.v;
    addr_b = s5_q.v ? s5_q.dst : head.src_b;
    addr_a = bk_write[1] ? bk_dst[1] : (bk_write[0] ? bk_dst[0] : head.src_a);
    sub    = (s3_q.op == OP_SUB);
    load1  = s3_q.v && s3_q.op == OP_MUL && !s3_q.slot;
    load2  = s3_q.v && s3_q.op == OP_MUL &&  s3_q.slot;
    start1 = (fr_q[0] == F_WAIT) &&  odd;
    start2 = (fr_q[1] == F_WAIT) && !odd;
    read1  = (fr_q[0] == F_STAGE1) && (fr_cnt[0] == 0);
    read2  = (fr_q[1] == F_STAGE1) && (fr_cnt[1] == 0);
  end

  // ---------------- pipeline ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_q   <= '0;
      s3_q   <= '0;
      s4_q   <= '0;
      s5_q   <= '0;
      cur_q  <= 1'b0;
      end_q  <= 1'b0;
      act_q  <= 1'b0;
      for (int k = 0; k < 2; k++) begin
        fr_q[k] <= F_IDLE; fr_dst[k] <= '0; fr_cnt[k] <= '0;
        bk_q[k] <= B_IDLE; bk_dst[k] <= '0; bk_cnt[k] <= '0;
      end
    end else begin
      // RAM1 -> RAM2
      s2_q.v    <= issue && head.op != OP_END;
      s2_q.op   <= head.op;
      s2_q.dst  <= head.dst;
      s2_q.slot <= cur_q;
      if (issue && is_mul) cur_q <= ~cur_q;
      if (issue && head.op == OP_END) end_q <= 1'b1;
      // RAM2 -> ADD1/LOAD -> ADD2 -> write add
      s3_q <= s2_q;
      s4_q <= '0;
      if (s3_q.v && (s3_q.op == OP_ADD || s3_q.op == OP_SUB)) s4_q <= s3_q;
      s5_q <= s4_q;
      // Multiplier slots.
      for (int k = 0; k < 2; k++) begin
        case (fr_q[k])
          F_IDLE: if (s3_q.v && s3_q.op == OP_MUL && s3_q.slot == 1'(k)) begin
            fr_q[k]   <= F_WAIT;
            fr_dst[k] <= s3_q.dst;
          end
          F_WAIT: if ((k == 0) ? odd : !odd) begin
            fr_q[k]   <= F_STAGE1;
            fr_cnt[k] <= 8'(2 * nwords);      // START + 2n cycles, then READ
          end
          default: begin                       // F_STAGE1; count 0 is the READ cycle
            if (fr_cnt[k] == 0) begin
              fr_q[k]   <= F_IDLE;
              bk_q[k]   <= B_STAGE2;
              bk_dst[k] <= fr_dst[k];
              bk_cnt[k] <= 8'(nwords);         // n + 1 cycles of stage 2
            end else begin
              fr_cnt[k] <= fr_cnt[k] - 1'b1;
            end
          end
        endcase
        case (bk_q[k])
          B_STAGE2: if (bk_cnt[k] == 0) bk_q[k] <= B_WRITE;
                    else bk_cnt[k] <= bk_cnt[k] - 1'b1;
          B_WRITE:  bk_q[k] <= B_IDLE;
          default:  ;
        endcase
      end
      // Activity.
      if (go) begin
        act_q <= 1'b1;
        end_q <= 1'b0;
      end else if (act_q && end_q && !s2_q.v && !s3_q.v && !s4_q.v && !s5_q.v &&
                   fr_q[0] == F_IDLE && fr_q[1] == F_IDLE &&
                   bk_q[0] == B_IDLE && bk_q[1] == B_IDLE) begin
        act_q <= 1'b0;
      end
    end
  end

  assign active = act_q;

  // The two product writes can never fall into the same cycle (their starts differ in parity).
  assert property (@(posedge clk) disable iff (!rst_n) !(bk_write[0] && bk_write[1]))
    else $error("instr_ctrl: both multiplier slots write at once");
endmodule
