// mod_adder: field addition / subtraction modulo 2p with a two-cycle latency.
//
// Operands a, b lie in [0, 2p). With sub = 0 the result is a + b, reduced by 2p when it
// reaches 2p; with sub = 1 it is a - b, raised by 2p when it is negative. Both candidates are
// computed at once by two fast_adder instances of AW bits:
//   X = a +/- b               (subtraction as a + ~b + 1)
//   Y = a +/- b -/+ 2p        (three operands, first turned into two partial sums: the three
//                              operands are cut into 2-bit pairs and each pair's three 2-bit
//                              values are added into a 4-bit result, which reaches at most into
//                              the next pair; the results of the even pairs never overlap, nor
//                              do those of the odd pairs, so they form the two partial sums,
//                              which the adder then adds)
// Bit DW+1 of each sum is the sign/carry that decides: for addition Y is taken when
// a + b >= 2p, for subtraction X is taken when a >= b. The choice is a multiplexer after the
// adders' second pipeline register.
// Timing: inputs sampled in cycle t, result valid in cycle t+2, one operation per cycle.
// The two parallel candidates, the two pipeline stages and the mod-2p convention follow the
// document, and so does the pair form of the three-operand step; the block size is this
// design's choice. m2p (= 2p) is a quasi-static input set by the security level.
module mod_adder #(
  parameter int unsigned DW  = 752,
  parameter int unsigned BLK = 32
) (
  input  logic          clk,
  input  logic [DW-1:0] a,
  input  logic [DW-1:0] b,
  input  logic          sub,
  input  logic [DW-1:0] m2p,
  output logic [DW-1:0] res
);
  localparam int unsigned N1 = DW + 1;                       // arithmetic width
  localparam int unsigned AW = ((DW + 3 + BLK - 1) / BLK) * BLK;
  localparam int unsigned NP = N1 + N1 % 2;                  // width cut into bit pairs

  logic [N1-1:0] op1, op2, kst;
  logic [NP-1:0] e1, e2, e3;
  logic [AW-1:0] x_p, x_g, y_p, y_g, ps_e, ps_o;
  logic [AW-1:0] x_sum, y_sum;
  logic          x_cout, y_cout;

  always_comb begin
    op1 = N1'(a);
    op2 = sub ? ~N1'(b) : N1'(b);
    // -2p as an N1-bit two's complement for addition, +2p for subtraction.
    kst = sub ? N1'(m2p) : (~N1'(m2p) + 1'b1);
    // X path: plain two-operand add.
    x_p = AW'(op1 ^ op2);
    x_g = AW'(op1);
    // Y path: pair sums into two partial sums, then two-operand add.
    e1 = NP'(op1);
    e2 = NP'(op2);
    e3 = NP'(kst);
    ps_e = '0;
    ps_o = '0;
    for (int unsigned k = 0; k < NP / 2; k++) begin
      logic [3:0] v;
      v = 4'(e1[2*k +: 2]) + 4'(e2[2*k +: 2]) + 4'(e3[2*k +: 2]);
      if (k % 2 == 0) ps_e[2*k +: 4] = v;
      else            ps_o[2*k +: 4] = v;
    end
    y_p = ps_e ^ ps_o;
    y_g = ps_e;
  end

  fast_adder #(.WIDTH(AW), .BLK(BLK)) u_add_x (
    .clk(clk), .p_in(x_p), .g_in(x_g), .cin(sub), .sum(x_sum), .cout(x_cout)
  );
  fast_adder #(.WIDTH(AW), .BLK(BLK)) u_add_y (
    .clk(clk), .p_in(y_p), .g_in(y_g), .cin(sub), .sum(y_sum), .cout(y_cout)
  );

  logic [1:0] sub_q;
  always_ff @(posedge clk) sub_q <= {sub_q[0], sub};

  // Carry-outs of the padded adders are not needed: the decision bit is bit N1.
  logic unused_cout;
  assign unused_cout = x_cout ^ y_cout;

  initial begin
    assert (NP + 2 <= AW) else $error("mod_adder: pair sums exceed the adder width");
  end

  always_comb begin
    if (sub_q[1]) res = x_sum[N1] ? x_sum[DW-1:0] : y_sum[DW-1:0];
    else          res = y_sum[N1] ? y_sum[DW-1:0] : x_sum[DW-1:0];
  end
endmodule
