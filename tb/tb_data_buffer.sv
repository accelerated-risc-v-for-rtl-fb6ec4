// tb_data_buffer: checks the 768-bit data buffer: 24 bus writes assemble a word that appears
// on the 752-bit parallel output with the first word in the low bits; a parallel load
// followed by 24 bus reads returns the word 32 bits at a time, low part first; and reads
// leave the contents unchanged (rotation).
module tb_data_buffer;
  localparam int unsigned BW = 768, DW = 752;
  logic clk = 1'b0;
  logic wr = 0, rd = 0, load = 0;
  logic [31:0] word_in = '0, word_out;
  logic [DW-1:0] par_in = '0, par_out;
  int checks = 0, failures = 0;

  data_buffer #(.BW(BW), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [BW-1:0] v;
    for (int rep = 0; rep < 5; rep++) begin
      for (int k = 0; k < BW / 32; k++) v[k*32 +: 32] = $urandom;
      for (int k = 0; k < BW / 32; k++) begin
        @(negedge clk); wr = 1; word_in = v[k*32 +: 32];
      end
      @(negedge clk); wr = 0;
      checks++;
      if (par_out != v[DW-1:0]) begin failures++; $display("FAIL write assembly"); end
      // read twice around: rotation keeps the contents
      for (int pass = 0; pass < 2; pass++)
        for (int k = 0; k < BW / 32; k++) begin
          checks++;
          if (word_out != v[k*32 +: 32]) begin failures++; $display("FAIL read %0d", k); end
          @(negedge clk); rd = 1; @(negedge clk); rd = 0;
        end
      // parallel load
      for (int k = 0; k < BW / 32; k++) v[k*32 +: 32] = $urandom;
      @(negedge clk); load = 1; par_in = v[DW-1:0];
      @(negedge clk); load = 0;
      for (int k = 0; k < BW / 32; k++) begin
        checks++;
        if (word_out != ((k < DW / 32) ? v[k*32 +: 32] : {16'b0, (k == DW / 32) ? v[DW-1 -: 16] : 16'b0}) &&
            !(k > DW / 32 && word_out == 0)) begin
          failures++; $display("FAIL load read %0d", k);
        end
        @(negedge clk); rd = 1; @(negedge clk); rd = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
