// tb_fast_adder: checks the two-stage block adder at its default size (768 bits, 32-bit
// blocks) against the built-in addition, one new operand pair per cycle, with the result
// expected exactly two cycles later. Operands include long carry-propagation cases (all ones
// plus one, block-aligned runs of ones) as well as random ones.
module tb_fast_adder;
  localparam int unsigned WD = 768, BLK = 32;
  logic clk = 1'b0;
  logic [WD-1:0] p_in, g_in, sum;
  logic cin, cout;
  logic [WD:0] expq [3];
  int checks = 0, failures = 0;

  fast_adder #(.WIDTH(WD), .BLK(BLK)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WD-1:0] a, b;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      for (int k = 0; k < WD / 32; k++) begin a[k*32 +: 32] = $urandom; b[k*32 +: 32] = $urandom; end
      case (t % 5)
        0: begin a = '1; b = '0; end
        1: begin a = '1; b = WD'(1); end
        2: begin b = ~a; end                           // all propagate
        3: begin a[WD/2 +: 64] = '1; b[WD/2 +: 64] = '0; b[WD/2 - 1] = 1'b1; a[WD/2 - 1] = 1'b1; end
        default: ;
      endcase
      cin  = 1'(t % 3 == 1);
      p_in = a ^ b;
      g_in = a;
      expq[0] = (WD+1)'(a) + (WD+1)'(b) + (WD+1)'(cin);
      if (t >= 2) begin
        checks++;
        if ({cout, sum} != expq[2]) begin
          failures++;
          $display("FAIL t=%0d", t);
        end
      end
      expq[2] = expq[1];
      expq[1] = expq[0];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
