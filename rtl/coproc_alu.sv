// coproc_alu: arithmetic unit of the coprocessor, one modular adder and one dual Montgomery
// multiplier sharing the prime-dependent constants.
//
// Operands a and b come straight from the two RAM read ports. The adder works on them
// directly (result `sum` two cycles later, `sub` selects subtraction). For the multiplier,
// load1/load2 copy a and b into the operand registers of slot 1/slot 2, and start1/start2,
// read1/read2 drive the dual multiplier (see dual_mont_mult for their timing). `sel` picks
// the slot whose product goes to `prod`. A write of the security level (lvl_we, lvl) loads
// the adder constant 2p and the multiplier constant p + 1 from constant tables computed at
// elaboration; the level register resets to the largest prime. The composition follows the
// document's ALU figure; the reset value of the level is this design's choice.
module coproc_alu
  import sike_pkg::*;
#(
  parameter int unsigned DW  = DATA_W,
  parameter int unsigned W   = W_MUL,
  parameter int unsigned S   = S_MUL,
  parameter int unsigned SA  = SA_MUL,
  parameter int unsigned BLK = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          lvl_we,
  input  logic [1:0]    lvl,
  input  logic [DW-1:0] a,
  input  logic [DW-1:0] b,
  input  logic          sub,
  input  logic          load1,
  input  logic          load2,
  input  logic          start1,
  input  logic          start2,
  input  logic          read1,
  input  logic          read2,
  input  logic          sel,
  output logic          odd,
  output logic [DW-1:0] sum,
  output logic [DW-1:0] prod
);
  localparam int unsigned KW = W * S;

  logic [BUF_W-1:0] p1_sel;
  logic [DW-1:0]    m2p_q;
  logic [KW-1:0]    mp1_q;
  logic [DW-1:0]    a1_q, b1_q, a2_q, b2_q;
  logic [KW-1:0]    t1, t2;

  always_comb begin
    case (lvl)
      2'd0:    p1_sel = P1_P434;
      2'd1:    p1_sel = P1_P503;
      2'd2:    p1_sel = P1_P610;
      default: p1_sel = P1_P751;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m2p_q <= DW'((P1_P751 - 1'b1) << 1);
      mp1_q <= KW'(P1_P751);
    end else if (lvl_we) begin
      m2p_q <= DW'((p1_sel - 1'b1) << 1);
      mp1_q <= KW'(p1_sel);
    end
  end

  always_ff @(posedge clk) begin
    if (load1) begin a1_q <= a; b1_q <= b; end
    if (load2) begin a2_q <= a; b2_q <= b; end
  end

  mod_adder #(.DW(DW), .BLK(BLK)) u_add (
    .clk(clk), .a(a), .b(b), .sub(sub), .m2p(m2p_q), .res(sum)
  );

  dual_mont_mult #(.W(W), .S(S), .SA(SA)) u_mul (
    .clk   (clk),
    .rst_n (rst_n),
    .a1    (KW'(a1_q)),
    .b1    (KW'(b1_q)),
    .a2    (KW'(a2_q)),
    .b2    (KW'(b2_q)),
    .m     (mp1_q),
    .start1(start1),
    .start2(start2),
    .read1 (read1),
    .read2 (read2),
    .odd   (odd),
    .t1    (t1),
    .t2    (t2)
  );

  assign prod = sel ? t2[DW-1:0] : t1[DW-1:0];
endmodule
