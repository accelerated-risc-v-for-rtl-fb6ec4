// mont_core: systolic Montgomery multiplier core for moduli p = m - 1 with m = 2^eA * 3^eB.
//
// It computes T = a * b * 2^(-W*n) mod p (result in [0, 2p)) for operands a, b < 2p of n
// words, n <= S. Because p = -1 mod 2^W, the Montgomery quotient of every step is simply the
// low word of T[0] + a_i*b[0], and the reduction multiplies it by m = p + 1, whose low SA
// words are zero, so only rows SA..S-1 have a reduction multiplier (2S - SA multipliers).
//
// Structure (one row per word j):
//   mul block  A[j] is a shift register that moves the serial operand word a_i down one row per
//              cycle; row j forms a_i * b[j].
//   red block  the quotient q_i moves down a delay chain and row j (j >= SA) forms q_i * m[j],
//              registered, and adds it to a_i * b[j]; the sum U[j] is registered.
//   acc block  row j adds T[j] (the S register, taken as 0 on the first step of an operation),
//              U[j] and the carry C[j-1] from the row above. The low W bits go to the S register
//              of row j-1 (row 0's low word is the quotient q), the upper W+1 bits to C[j]. The
//              last row feeds its own carry back into its S register.
//
// Timing: the caller presents a_0 with start = 1 in cycle c0 and a_i in cycle c0 + 2i (the other
// cycles may carry the words of a second, interleaved multiplication, whose b values the
// caller must then present on the alternate cycles, row by row). b[j] must hold the word of the
// operation that row j serves in that cycle. Word j of the result is on t_out[j] during the
// single cycle c0 + 2n + 2 + j; n = number of words of a. The row structure, the bit widths,
// the quotient alignment with row SA and the skipped reduction rows follow the document;
// register positions inside a row are this design's choice.
module mont_core #(
  parameter int unsigned W  = 17,
  parameter int unsigned S  = 45,
  parameter int unsigned SA = 12
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] a_in,
  input  logic [W-1:0] b     [S],
  input  logic [W-1:0] m     [S],
  output logic [W-1:0] t_out [S]
);
  // mul block
  logic [W-1:0]   a_q [S];
  // red block
  logic [W-1:0]   q_d [S-3];     // quotient delay chain; q_d[k] holds q_i in cycle c_i + 3 + k
  logic [2*W-1:0] r_q [S];       // q * m[j], rows SA..S-1
  // acc block
  logic [2*W:0]   u_q [S];       // a*b[j] (+ q*m[j])
  logic [W:0]     c_q [S];       // carries
  logic [W-1:0]   x_q [S];       // S registers, T[j]
  logic [S:0]     st_q;          // start delayed, st_q[k] in cycle c0 + 1 + k

  logic [2*W+1:0] sum [S];
  logic [W-1:0]   q;

  always_comb begin
    for (int unsigned j = 0; j < S; j++) begin
      logic [W-1:0] tin;
      tin = st_q[j+1] ? '0 : x_q[j];
      if (j == 0) sum[j] = (2*W+2)'(tin) + (2*W+2)'(u_q[j]);
      else        sum[j] = (2*W+2)'(tin) + (2*W+2)'(u_q[j]) + (2*W+2)'(c_q[j-1]);
    end
    q = sum[0][W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) st_q <= '0;
    else        st_q <= {st_q[S-1:0], start};
  end

  always_ff @(posedge clk) begin
    for (int unsigned j = 0; j < S; j++) begin
      if (j == 0) a_q[j] <= a_in;
      else        a_q[j] <= a_q[j-1];
      if (j >= SA) begin
        r_q[j] <= q_d[j-3] * m[j];
        u_q[j] <= (2*W+1)'(a_q[j] * b[j]) + (2*W+1)'(r_q[j]);
      end else begin
        r_q[j] <= '0;
        u_q[j] <= (2*W+1)'(a_q[j] * b[j]);
      end
      // The carry of a row fits in W+1 bits (see the bound in the README).
      c_q[j] <= sum[j][2*W:W];
      if (j < S - 1) x_q[j] <= sum[j+1][W-1:0];
      else           x_q[j] <= c_q[j][W-1:0];
    end
    for (int unsigned k = 0; k < S - 3; k++)
      if (k == 0) q_d[k] <= q;
      else        q_d[k] <= q_d[k-1];
  end

  assign t_out = x_q;

  // The design needs the quotient ready before it reaches row SA.
  initial begin
    assert (SA >= 3 && SA < S) else $error("mont_core: need 3 <= SA < S");
  end
endmodule
