// fast_adder: two-stage pipelined block adder built only from GS carry chains.
//
// The WIDTH-bit operands arrive as a propagate vector P (= A ^ B) and a generate vector G (= A)
// and are split into NB = WIDTH/BLK blocks of BLK bits.
//   Row 1: block 0 is added with the carry-in by a GSc chain, giving result block R0 and its
//          carry g0; every other block j runs through a GS0 chain giving a sum S_j and a block
//          carry g_j.
//   Row 2: each S_j runs through a GS1 chain (p = g = S_j), giving T_j = S_j + 1 and the
//          block-propagate p_j = (S_j is all ones).
//   -- pipeline register (g, p, S, T, R0) --
//   Row 3: one more GSc chain over the block signals (p_j, g_j) with carry-in g0 yields the
//          carry c_j into every block; it is a carry-lookahead made of carry-chain cells.
//   Row 4: a 2:1 multiplexer per block picks T_j when c_j = 1 and S_j otherwise.
//   -- pipeline register (sum, cout) --
// Latency is two clock cycles, throughput one addition per cycle. The rows and the two
// register positions follow the document; the block size BLK is this design's choice (the
// document says only that a single block size is used).
module fast_adder #(
  parameter int unsigned WIDTH = 768,
  parameter int unsigned BLK   = 32
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] p_in,
  input  logic [WIDTH-1:0] g_in,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int unsigned NB = WIDTH / BLK;

  // Row 1 and row 2 outputs.
  logic [BLK-1:0] s_blk [NB];
  logic [BLK-1:0] t_blk [NB];
  logic [NB-1:0]  g_blk;
  logic [NB-1:0]  p_blk;

  // Stage-1 registers.
  logic [BLK-1:0] s_q [NB];
  logic [BLK-1:0] t_q [NB];
  logic [NB-1:0]  g_q;
  logic [NB-1:0]  p_q;

  for (genvar j = 0; j < NB; j++) begin : g_row12
    logic [BLK-1:0] c1_unused;
    gs_chain #(.WIDTH(BLK)) u_row1 (
      .p   (p_in[j*BLK +: BLK]),
      .g   (g_in[j*BLK +: BLK]),
      .cin (j == 0 ? cin : 1'b0),
      .s   (s_blk[j]),
      .cvec(c1_unused),
      .cout(g_blk[j])
    );
    if (j == 0) begin : g_first
      // Block 0 is already final after row 1: it has no T block and no p bit.
      assign t_blk[j] = '0;
      assign p_blk[j] = 1'b0;
    end else begin : g_rest
      logic [BLK-1:0] c2_unused;
      gs_chain #(.WIDTH(BLK)) u_row2 (
        .p   (s_blk[j]),
        .g   (s_blk[j]),
        .cin (1'b1),
        .s   (t_blk[j]),
        .cvec(c2_unused),
        .cout(p_blk[j])
      );
    end
  end

  always_ff @(posedge clk) begin
    s_q <= s_blk;
    t_q <= t_blk;
    g_q <= g_blk;
    p_q <= p_blk;
  end

  // Row 3: block carries. Position k of the chain is block k+1; its carry-in is g0.
  logic [NB-1:0] c_blk;   // c_blk[j] = carry into block j (j >= 1)
  logic          c_out;

  if (NB > 1) begin : g_cla
    logic [NB-2:0] cla_s_unused;
    logic [NB-2:0] cla_c;
    gs_chain #(.WIDTH(NB-1)) u_row3 (
      .p   (p_q[NB-1:1]),
      .g   (g_q[NB-1:1]),
      .cin (g_q[0]),
      .s   (cla_s_unused),
      .cvec(cla_c),
      .cout(c_out)
    );
    assign c_blk = {cla_c, 1'b0};
  end else begin : g_nocla
    assign c_blk = '0;
    assign c_out = g_q[0];
  end

  // Row 4: carry-select multiplexers, then the output register.
  logic [WIDTH-1:0] r_comb;
  always_comb begin
    r_comb[BLK-1:0] = s_q[0];
    for (int unsigned j = 1; j < NB; j++)
      r_comb[j*BLK +: BLK] = c_blk[j] ? t_q[j] : s_q[j];
  end

  always_ff @(posedge clk) begin
    sum  <= r_comb;
    cout <= c_out;
  end
endmodule
