// tb_gs_chain: checks the GS carry chain as an adder (p = a ^ b, g = a) against a + b + cin,
// including the carry into every position, exhaustively for 6-bit operands, and as the GS1
// incrementer (p = g = x, cin = 1) giving x + 1 and the all-ones flag.
module tb_gs_chain;
  localparam int unsigned WD = 6;
  logic [WD-1:0] p, g, s, cvec;
  logic cin, cout;
  int checks = 0, failures = 0;

  gs_chain #(.WIDTH(WD)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2**WD; a++)
      for (int b = 0; b < 2**WD; b++)
        for (int c = 0; c < 2; c++) begin
          logic [WD:0] ref_sum;
          logic [WD-1:0] ref_c;
          p = WD'(a ^ b); g = WD'(a); cin = 1'(c);
          #1;
          ref_sum = (WD+1)'(a + b + c);
          // carry into position i = bit i of the sum of the lower i bits
          for (int i = 0; i < WD; i++)
            ref_c[i] = 1'(((a % (1 << i)) + (b % (1 << i)) + c) >> i);
          checks++;
          if ({cout, s} != ref_sum || cvec != ref_c) begin
            failures++;
            $display("FAIL add %0d+%0d+%0d: got %0d", a, b, c, {cout, s});
          end
        end
    for (int x = 0; x < 2**WD; x++) begin
      p = WD'(x); g = WD'(x); cin = 1'b1;
      #1;
      checks++;
      if ({cout, s} != (WD+1)'(x + 1) || cout != (x == 2**WD - 1)) begin
        failures++;
        $display("FAIL inc %0d", x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
