// instr_fifo: circular instruction buffer, DEPTH x IW = 32 x 26 by default.
//
// The CPU side pushes instructions (push is ignored while full); the instruction controller
// sees the oldest entry on `head` whenever `empty` is low and removes it with `pop`. Storage
// is a simple dual-port array with one write and one asynchronous read port (distributed
// RAM); read and write pointers carry one extra wrap bit to tell full from empty. Depth,
// width, the circular organisation and the empty/full flags follow the document; the
// show-ahead read is this design's choice.
module instr_fifo #(
  parameter int unsigned IW = 26,
  parameter int unsigned AW = 5
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          push,
  input  logic [IW-1:0] din,
  input  logic          pop,
  output logic [IW-1:0] head,
  output logic          empty,
  output logic          full
);
  logic [IW-1:0] mem [2**AW];
  logic [AW:0]   wp_q, rp_q;

  assign empty = (wp_q == rp_q);
  assign full  = (wp_q[AW-1:0] == rp_q[AW-1:0]) && (wp_q[AW] != rp_q[AW]);
  assign head  = mem[rp_q[AW-1:0]];

  always_ff @(posedge clk) begin
    if (push && !full) mem[wp_q[AW-1:0]] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp_q <= '0;
      rp_q <= '0;
    end else begin
      if (push && !full) wp_q <= wp_q + 1'b1;
      if (pop && !empty) rp_q <= rp_q + 1'b1;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty))
    else $error("instr_fifo: pop while empty");
endmodule
