// tb_coproc_ram: checks the 256 x 752 true dual-port RAM: random writes through both ports
// (port B winning a same-address collision), reads on both ports returning the stored word
// exactly two cycles after the address, and reads issued every cycle (pipelined).
module tb_coproc_ram;
  localparam int unsigned DW = 752, AW = 8;
  logic clk = 1'b0;
  logic [AW-1:0] addr_a = '0, addr_b = '0;
  logic we_a = 0, we_b = 0;
  logic [DW-1:0] wd_a = '0, wd_b = '0, rd_a, rd_b;
  logic [DW-1:0] model [2**AW];
  int checks = 0, failures = 0;

  coproc_ram #(.DW(DW), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [DW-1:0] rnd();
    logic [DW-1:0] r;
    for (int k = 0; k < DW / 16; k++) r[k*16 +: 16] = 16'($urandom);
    return r;
  endfunction

  initial begin
    logic [AW-1:0] qa [3], qb [3];
    // fill every word, half through each port
    for (int i = 0; i < 2**AW; i += 2) begin
      @(negedge clk);
      we_a = 1; addr_a = AW'(i);     wd_a = rnd(); model[i]   = wd_a;
      we_b = 1; addr_b = AW'(i + 1); wd_b = rnd(); model[i+1] = wd_b;
    end
    // collision: port B wins
    @(negedge clk);
    addr_a = 8'd7; addr_b = 8'd7; wd_a = rnd(); wd_b = rnd(); model[7] = wd_b;
    @(negedge clk);
    we_a = 0; we_b = 0;
    // pipelined reads
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      if (t >= 2) begin
        checks += 2;
        if (rd_a != model[qa[1]]) begin failures++; $display("FAIL A addr %0d", qa[1]); end
        if (rd_b != model[qb[1]]) begin failures++; $display("FAIL B addr %0d", qb[1]); end
      end
      qa[2] = qa[1]; qa[1] = qa[0]; qb[2] = qb[1]; qb[1] = qb[0];
      addr_a = AW'($urandom); addr_b = (t == 5) ? 8'd7 : AW'($urandom);
      qa[0] = addr_a; qb[0] = addr_b;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
