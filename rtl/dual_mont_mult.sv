// dual_mont_mult: odd/even dual Montgomery multiplier around one mont_core.
//
// The core consumes one word of the serial operand every second cycle, so the free cycles can
// serve a second, independent multiplication. Slot 1 owns the odd cycles and slot 2 the even
// ones; `odd` tells the controller the parity of the current cycle, and start1 may only be
// pulsed when odd = 1, start2 only when odd = 0.
//   a operands   on start_k, a_k is loaded into a word shift register; the register of the slot
//                whose turn it is drives the core's serial input and shifts by one word.
//   b operands   row j of slot k is captured from b_k j cycles after start_k (a delayed start
//                chain), so a new operation can reuse the slot while the old one still runs;
//                a per-row multiplexer alternates rows between the two slots' words and is
//                registered before the core.
//   results      read_k, delayed by two cycles and then by one more per row, captures row j's
//                result word into t_k; t_k is cleared when the capture begins, so words above
//                the prime's length read as zero.
// Timing for slot k with start_k in cycle t0 and an n-word prime: read_k must be pulsed in
// cycle t0 + 2n + 1 (after the interleave delay 2n) and t_k holds the full product from cycle
// t0 + 3n + 3 (the multiplication latency) until the next read_k. The structure (shift
// registers, enabled b registers, start and read delay chains, odd/even multiplexers) follows
// the document's dual-multiplier figure; the exact register counts are this design's choice.
module dual_mont_mult #(
  parameter int unsigned W  = 17,
  parameter int unsigned S  = 45,
  parameter int unsigned SA = 12
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [W*S-1:0] a1,
  input  logic [W*S-1:0] b1,
  input  logic [W*S-1:0] a2,
  input  logic [W*S-1:0] b2,
  input  logic [W*S-1:0] m,       // p + 1
  input  logic           start1,
  input  logic           start2,
  input  logic           read1,
  input  logic           read2,
  output logic           odd,
  output logic [W*S-1:0] t1,
  output logic [W*S-1:0] t2
);
  localparam int unsigned KW = W * S;

  logic           ph_q;                   // 1 in odd cycles
  logic [KW-1:0]  a1_sr, a2_sr;
  logic [W-1:0]   a_in;
  logic           core_start;
  logic [S-2:0]   st1_d, st2_d;           // start chains: bit j = start_k delayed by j + 1
  logic [S-1:0]   rd1_d, rd2_d;           // read chains: bit j = read_k delayed by 2 + j
  logic [S-2:0]   rd1_q, rd2_q;
  logic [1:0]     rd1_pre, rd2_pre;
  logic [W-1:0]   b1_q [S], b2_q [S], b_core [S], m_core [S], t_core [S];

  assign odd = ph_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph_q       <= 1'b0;
      core_start <= 1'b0;
      st1_d      <= '0;
      st2_d      <= '0;
      rd1_pre    <= '0;
      rd2_pre    <= '0;
      rd1_q      <= '0;
      rd2_q      <= '0;
    end else begin
      ph_q       <= ~ph_q;
      core_start <= start1 | start2;
      st1_d      <= {st1_d[S-3:0], start1};
      st2_d      <= {st2_d[S-3:0], start2};
      rd1_pre    <= {rd1_pre[0], read1};
      rd2_pre    <= {rd2_pre[0], read2};
      rd1_q      <= rd1_d[S-2:0];
      rd2_q      <= rd2_d[S-2:0];
    end
  end

  // Serial a operand: slot 1 words in even cycles (its start was in an odd one), slot 2 in odd.
  assign a_in = ph_q ? a2_sr[W-1:0] : a1_sr[W-1:0];

  always_ff @(posedge clk) begin
    if (start1)     a1_sr <= a1;
    else if (!ph_q) a1_sr <= a1_sr >> W;
    if (start2)     a2_sr <= a2;
    else if (ph_q)  a2_sr <= a2_sr >> W;
  end

  // b capture: row j of slot k is written in cycle t0 + j (row 0 directly on start_k).
  always_ff @(posedge clk) begin
    for (int unsigned j = 0; j < S; j++) begin
      if (j == 0) begin
        if (start1) b1_q[j] <= b1[j*W +: W];
        if (start2) b2_q[j] <= b2[j*W +: W];
      end else begin
        if (st1_d[j-1]) b1_q[j] <= b1[j*W +: W];
        if (st2_d[j-1]) b2_q[j] <= b2[j*W +: W];
      end
      // Row j works for slot 1 in the cycle after one where (odd ^ j[0]) = 0.
      b_core[j] <= (ph_q ^ j[0]) ? b2_q[j] : b1_q[j];
    end
  end

  assign rd1_d = {rd1_q, rd1_pre[1]};
  assign rd2_d = {rd2_q, rd2_pre[1]};

  always_comb begin
    for (int unsigned j = 0; j < S; j++) m_core[j] = m[j*W +: W];
  end

  mont_core #(.W(W), .S(S), .SA(SA)) u_core (
    .clk  (clk),
    .rst_n(rst_n),
    .start(core_start),
    .a_in (a_in),
    .b    (b_core),
    .m    (m_core),
    .t_out(t_core)
  );

  // Result capture.
  always_ff @(posedge clk) begin
    for (int unsigned j = 0; j < S; j++) begin
      if (rd1_d[j])      t1[j*W +: W] <= t_core[j];
      else if (rd1_d[0]) t1[j*W +: W] <= '0;
      if (rd2_d[j])      t2[j*W +: W] <= t_core[j];
      else if (rd2_d[0]) t2[j*W +: W] <= '0;
    end
  end
endmodule
