// gs_chain: "generate-sum" (GS) block, a Manchester carry chain as found in FPGA carry logic.
//
// Each bit position i takes a propagate bit p[i] and a generate bit g[i]. The carry into the
// next position is c[i+1] = p[i] ? c[i] : g[i] (a 2:1 multiplexer per bit) and the sum bit is
// s[i] = p[i] ^ c[i]. To add A + B one feeds p = A ^ B and g = A. The carry-in selects the
// flavour: 0 gives a GS0 block, 1 a GS1 block, and a live carry a GSc block.
// Interface: purely combinational; WIDTH bits of p, g and sum, a carry-in, the carry into each
// position and the carry-out of the last position. The structure follows the document's carry-chain figure exactly.
module gs_chain #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] p,
  input  logic [WIDTH-1:0] g,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic [WIDTH-1:0] cvec,  // carry into each position
  output logic             cout
);
  logic [WIDTH:0] c;

  assign c[0] = cin;
  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    assign c[i+1] = p[i] ? c[i] : g[i];
    assign s[i]   = p[i] ^ c[i];
  end

  assign cvec = c[WIDTH-1:0];
  assign cout = c[WIDTH];
endmodule
