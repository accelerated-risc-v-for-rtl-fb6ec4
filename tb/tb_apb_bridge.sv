// tb_apb_bridge: checks the APB command decoder on its own. Each of the seven commands is
// issued as a proper APB transfer (setup, then access) and the strobe it must raise is
// checked, once, in the completing cycle, with its argument: RAM address, level, instruction
// push, data-buffer shift/rotate, status and data read-back. Also checked: Read RAM holds
// pready low for two access cycles; an instruction write waits while the buffer is full;
// RAM commands return pslverr and raise no strobe while the controller is active.
module tb_apb_bridge;
  logic clk = 1'b0, rst_n = 1'b0;
  logic psel = 0, penable = 0, pwrite = 0;
  logic [7:0] paddr = '0;
  logic [31:0] pwdata = '0, prdata, db_word = 32'hCAFE_0123;
  logic pready, pslverr;
  logic db_wr, db_rd, db_load, ram_we, lvl_we, go, ib_push;
  logic [7:0] ram_addr;
  logic [1:0] lvl;
  logic active = 0, ib_full = 0;
  int checks = 0, failures = 0;

  apb_bridge dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Strobe counts over a transfer.
  int c_dbwr, c_dbrd, c_load, c_we, c_lvl, c_go, c_push, waits;
  always @(posedge clk) begin
    if (db_wr) c_dbwr++;
    if (db_rd) c_dbrd++;
    if (db_load) c_load++;
    if (ram_we) begin c_we++; if (ram_addr != pwdata[7:0]) c_we += 100; end
    if (lvl_we) begin c_lvl++; if (lvl != pwdata[1:0]) c_lvl += 100; end
    if (go) c_go++;
    if (ib_push) c_push++;
  end

  task automatic xfer(input logic wr, input logic [7:0] a, input logic [31:0] d,
                      output logic [31:0] rd, output logic err);
    c_dbwr = 0; c_dbrd = 0; c_load = 0; c_we = 0; c_lvl = 0; c_go = 0; c_push = 0; waits = 0;
    @(negedge clk);
    psel = 1; penable = 0; pwrite = wr; paddr = a; pwdata = d;
    @(negedge clk);
    penable = 1;
    #1;
    while (!pready) begin waits++; @(negedge clk); #1; end
    rd = prdata; err = pslverr;
    @(posedge clk);
    #1;
    psel = 0; penable = 0;
  endtask

  task automatic expect_counts(input string name, input int dbwr, dbrd, ld, we, lv, g, pu, w,
                               input logic err, input logic e_err);
    checks++;
    if (c_dbwr != dbwr || c_dbrd != dbrd || c_load != ld || c_we != we || c_lvl != lv ||
        c_go != g || c_push != pu || waits != w || err != e_err) begin
      failures++;
      $display("FAIL %s: wr%0d rd%0d ld%0d we%0d lvl%0d go%0d push%0d waits%0d err%b",
               name, c_dbwr, c_dbrd, c_load, c_we, c_lvl, c_go, c_push, waits, err);
    end
  endtask

  initial begin
    logic [31:0] rd; logic err;
    repeat (2) @(posedge clk);
    rst_n = 1;
    xfer(1, 8'h00, 32'h0000_0042, rd, err); expect_counts("write ram", 0,0,0,1,0,0,0,0, err, 0);
    xfer(1, 8'h04, 32'h0000_0017, rd, err); expect_counts("read ram",  0,0,1,0,0,0,0,2, err, 0);
    xfer(1, 8'h08, 32'h1234_5678, rd, err); expect_counts("dbuf wr",   1,0,0,0,0,0,0,0, err, 0);
    xfer(0, 8'h08, 32'h0,         rd, err); expect_counts("dbuf rd",   0,1,0,0,0,0,0,0, err, 0);
    checks++; if (rd != 32'hCAFE_0123) begin failures++; $display("FAIL dbuf data"); end
    for (int l = 0; l < 4; l++) begin
      xfer(1, 8'h0C, 32'(l), rd, err); expect_counts("level", 0,0,0,0,1,0,0,0, err, 0);
      @(negedge clk);
      checks++; if (lvl != 2'(l)) begin failures++; $display("FAIL level held"); end
    end
    xfer(1, 8'h10, 32'h0, rd, err); expect_counts("start", 0,0,0,0,0,1,0,0, err, 0);
    active = 1;
    xfer(0, 8'h14, 32'h0, rd, err); expect_counts("status", 0,0,0,0,0,0,0,0, err, 0);
    checks++; if (rd != 32'h1) begin failures++; $display("FAIL status"); end
    xfer(1, 8'h18, 32'h0123_4567, rd, err); expect_counts("instr", 0,0,0,0,0,0,1,0, err, 0);
    xfer(1, 8'h00, 32'h0000_0042, rd, err); expect_counts("busy write", 0,0,0,0,0,0,0,0, err, 1);
    xfer(1, 8'h04, 32'h0000_0042, rd, err); expect_counts("busy read",  0,0,0,0,0,0,0,0, err, 1);
    // full buffer: release it after 5 cycles
    ib_full = 1;
    fork
      begin repeat (6) @(negedge clk); ib_full = 0; end
      xfer(1, 8'h18, 32'h0000_0001, rd, err);
    join
    checks++;
    if (waits < 3 || c_push != 1) begin failures++; $display("FAIL full wait %0d push %0d", waits, c_push); end
    active = 0;
    xfer(0, 8'h14, 32'h0, rd, err);
    checks++; if (rd != 32'h0) begin failures++; $display("FAIL status idle"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
