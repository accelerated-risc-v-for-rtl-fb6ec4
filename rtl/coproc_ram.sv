// coproc_ram: true dual-port RAM holding all field elements of the coprocessor
// (DEPTH x DW = 256 x 752 by default).
//
// Each port has an address, a write enable and write data. A read returns its word two cycles
// after the address is presented (address register plus output register), which keeps the
// RAM off the critical path. A port either reads or writes in a given cycle. If both ports
// write the same address in one cycle, port B wins. Size, two ports and the two-cycle read
// latency follow the document; the collision rule is this design's choice. The array maps to
// block RAM; nothing is reset.
module coproc_ram #(
  parameter int unsigned DW    = 752,
  parameter int unsigned AW    = 8
) (
  input  logic          clk,
  input  logic [AW-1:0] addr_a,
  input  logic          we_a,
  input  logic [DW-1:0] wd_a,
  output logic [DW-1:0] rd_a,
  input  logic [AW-1:0] addr_b,
  input  logic          we_b,
  input  logic [DW-1:0] wd_b,
  output logic [DW-1:0] rd_b
);
  logic [DW-1:0] mem [2**AW];
  logic [DW-1:0] ra_q, rb_q;

  always_ff @(posedge clk) begin
    if (we_a) mem[addr_a] <= wd_a;
    if (we_b) mem[addr_b] <= wd_b;
  end

  always_ff @(posedge clk) begin
    ra_q <= mem[addr_a];
    rb_q <= mem[addr_b];
    rd_a <= ra_q;
    rd_b <= rb_q;
  end
endmodule
