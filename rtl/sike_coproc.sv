// sike_coproc: SIKE field-arithmetic coprocessor, attached to a CPU as an APB slave.
//
// The CPU keeps the protocol in software and sends the coprocessor its Fp additions,
// subtractions and multiplications as three-address instructions on 256 field elements of up
// to 752 bits that live in the coprocessor's own RAM. The pieces:
//   apb_bridge   decodes the seven command addresses;
//   data_buffer  moves field elements between the 32-bit bus and the 752-bit RAM;
//   instr_fifo   32-entry instruction buffer, filled by the CPU, drained by the controller;
//   instr_ctrl   issues instructions, overlaps additions with two interleaved
//                multiplications and resolves hazards with its locks;
//   coproc_ram   256 x 752 true dual-port RAM: port A serves the CPU (when the controller is
//                idle) and multiplication results, port B addition results;
//   coproc_alu   modular adder (mod 2p, 2 cycles) and dual Montgomery multiplier
//                (3n+3 cycles latency, a new product per slot every 2n cycles).
// Interface: clock, active-low reset and the APB slave signals. Timing: see the blocks. The
// partition follows the document's coprocessor figure; the CPU side (processor, its program
// RAM and APB decoder) is outside this module.
module sike_coproc
  import sike_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        psel,
  input  logic        penable,
  input  logic        pwrite,
  input  logic [7:0]  paddr,
  input  logic [31:0] pwdata,
  output logic [31:0] prdata,
  output logic        pready,
  output logic        pslverr,
  // lock events, for observation
  output logic        ev_mul_lock,
  output logic        ev_mem_lock,
  output logic        ev_wr_lock
);
  logic              db_wr, db_rd, db_load;
  logic [31:0]       db_word;
  logic [DATA_W-1:0] db_par;
  logic [RAM_AW-1:0] br_addr;
  logic              br_we;
  logic              lvl_we;
  logic [1:0]        lvl;
  logic              go, active;
  logic              ib_push, ib_full, ib_empty, ib_pop;
  logic [INSTR_W-1:0] ib_head;

  logic [RAM_AW-1:0] c_addr_a, c_addr_b;
  logic              c_we_a, c_we_b;
  logic [RAM_AW-1:0] addr_a;
  logic              we_a;
  logic [DATA_W-1:0] wd_a, rd_a, rd_b;

  logic              odd, sub, load1, load2, start1, start2, read1, read2, sel;
  logic [DATA_W-1:0] sum, prod;
  logic [5:0]        nwords;

  apb_bridge u_bridge (
    .clk, .rst_n, .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready, .pslverr,
    .db_wr, .db_rd, .db_load, .db_word,
    .ram_addr(br_addr), .ram_we(br_we),
    .lvl_we, .lvl, .go, .active, .ib_push, .ib_full
  );

  data_buffer #(.BW(BUF_W), .DW(DATA_W)) u_dbuf (
    .clk, .wr(db_wr), .word_in(pwdata), .rd(db_rd), .word_out(db_word),
    .load(db_load), .par_in(rd_a), .par_out(db_par)
  );

  instr_fifo #(.IW(INSTR_W), .AW(IBUF_AW)) u_ibuf (
    .clk, .rst_n, .push(ib_push), .din(pwdata[INSTR_W-1:0]), .pop(ib_pop),
    .head(ib_head), .empty(ib_empty), .full(ib_full)
  );

  assign nwords = 6'(mul_words(lvl));

  instr_ctrl #(.AW(RAM_AW)) u_ctrl (
    .clk, .rst_n, .go, .nwords, .active,
    .empty(ib_empty), .head(instr_t'(ib_head)), .pop(ib_pop),
    .addr_a(c_addr_a), .we_a(c_we_a), .addr_b(c_addr_b), .we_b(c_we_b),
    .odd, .sub, .load1, .load2, .start1, .start2, .read1, .read2, .sel,
    .ev_mul_lock, .ev_mem_lock, .ev_wr_lock
  );

  // RAM port A belongs to the controller while it runs, to the bus otherwise.
  always_comb begin
    if (active) begin
      addr_a = c_addr_a;
      we_a   = c_we_a;
      wd_a   = prod;
    end else begin
      addr_a = br_addr;
      we_a   = br_we;
      wd_a   = db_par;
    end
  end

  coproc_ram #(.DW(DATA_W), .AW(RAM_AW)) u_ram (
    .clk,
    .addr_a(addr_a), .we_a(we_a), .wd_a(wd_a), .rd_a(rd_a),
    .addr_b(c_addr_b), .we_b(c_we_b), .wd_b(sum), .rd_b(rd_b)
  );

  coproc_alu u_alu (
    .clk, .rst_n, .lvl_we, .lvl, .a(rd_a), .b(rd_b), .sub,
    .load1, .load2, .start1, .start2, .read1, .read2, .sel, .odd, .sum, .prod
  );
endmodule
