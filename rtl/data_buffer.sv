// data_buffer: 768-bit staging register between the 32-bit CPU bus and the 752-bit RAM.
//
// A CPU write (wr) shifts the register right by 32 bits and puts the new word on top, so after
// 24 writes the first word written sits in bits [31:0]. A CPU read takes bits [31:0] from
// `word_out` and the read strobe (rd) rotates the register right by 32 bits, so 24 reads
// return the words in order and leave the contents unchanged. `load` copies a RAM word into
// the low DW bits (upper bits cleared); `par_out` presents the low DW bits for a RAM write.
// All operations take effect at the clock edge; load has priority over wr and rd. Width and
// the 32-bit shifting follow the document; the direction of the shift is this design's choice.
module data_buffer #(
  parameter int unsigned BW = 768,
  parameter int unsigned DW = 752
) (
  input  logic          clk,
  input  logic          wr,
  input  logic [31:0]   word_in,
  input  logic          rd,
  output logic [31:0]   word_out,
  input  logic          load,
  input  logic [DW-1:0] par_in,
  output logic [DW-1:0] par_out
);
  logic [BW-1:0] buf_q;

  always_ff @(posedge clk) begin
    if (load)    buf_q <= BW'(par_in);
    else if (wr) buf_q <= {word_in, buf_q[BW-1:32]};
    else if (rd) buf_q <= {buf_q[31:0], buf_q[BW-1:32]};
  end

  assign word_out = buf_q[31:0];
  assign par_out  = buf_q[DW-1:0];
endmodule
