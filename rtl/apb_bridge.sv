// apb_bridge: APB slave that turns CPU bus accesses into coprocessor commands.
//
// Seven word addresses (byte offsets) are decoded:
//   0x00 Write RAM   (write) RAM[pwdata[7:0]] <= data buffer (752 bits)
//   0x04 Read RAM    (write) data buffer <= RAM[pwdata[7:0]]; the transfer is extended with
//                    pready = 0 until the RAM's two-cycle read has completed
//   0x08 Data Buffer (write) shift pwdata into the buffer; (read) return its low 32 bits and
//                    rotate it by 32 bits
//   0x0C Sec Level   (write) pwdata[1:0] selects p434/p503/p610/p751: loads the ALU constants
//                    and the controller's cycle counts
//   0x10 Start       (write) lets the instruction controller run; must precede the instructions
//   0x14 Status      (read)  bit 0 = instruction controller active
//   0x18 Instruction (write) pushes pwdata[25:0] into the instruction buffer; pready stays low
//                    while the buffer is full
// A command acts in the APB access phase (psel & penable) on the cycle pready is high. RAM
// commands are refused with pslverr while the controller is active, because the controller
// then owns the RAM ports. Reads of other addresses return 0. The command set and addresses
// follow the document; the argument positions, the full-buffer wait, the error response and
// the reset level (p751) are this design's choices.
module apb_bridge
  import sike_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // APB slave
  input  logic              psel,
  input  logic              penable,
  input  logic              pwrite,
  input  logic [7:0]        paddr,
  input  logic [31:0]       pwdata,
  output logic [31:0]       prdata,
  output logic              pready,
  output logic              pslverr,
  // data buffer
  output logic              db_wr,
  output logic              db_rd,
  output logic              db_load,
  input  logic [31:0]       db_word,
  // RAM port A (used while the controller is idle)
  output logic [RAM_AW-1:0] ram_addr,
  output logic              ram_we,
  // security level
  output logic              lvl_we,
  output logic [1:0]        lvl,
  // instruction controller and buffer
  output logic              go,
  input  logic              active,
  output logic              ib_push,
  input  logic              ib_full
);
  localparam logic [7:0] A_WRRAM = 8'h00, A_RDRAM = 8'h04, A_DBUF = 8'h08, A_LEVEL = 8'h0C,
                         A_START = 8'h10, A_STAT  = 8'h14, A_INSTR = 8'h18;

  logic       access, done;
  logic [1:0] rr_q;
  logic [1:0] lvl_q;
  logic       ram_cmd;

  assign access  = psel && penable;
  assign ram_cmd = (paddr == A_WRRAM) || (paddr == A_RDRAM);

  always_comb begin
    pready  = 1'b1;
    pslverr = 1'b0;
    if (access && ram_cmd && active)            pslverr = 1'b1;
    else if (access && paddr == A_RDRAM)        pready  = (rr_q == 2'd2);
    else if (access && paddr == A_INSTR && pwrite) pready = !ib_full;
    done = access && pready && !pslverr;

    ram_addr = pwdata[RAM_AW-1:0];
    ram_we   = done && pwrite && paddr == A_WRRAM;
    db_load  = done && paddr == A_RDRAM;
    db_wr    = done && pwrite && paddr == A_DBUF;
    db_rd    = done && !pwrite && paddr == A_DBUF;
    lvl_we   = done && pwrite && paddr == A_LEVEL;
    go       = done && pwrite && paddr == A_START;
    ib_push  = done && pwrite && paddr == A_INSTR;

    case (paddr)
      A_DBUF:  prdata = db_word;
      A_STAT:  prdata = {31'b0, active};
      default: prdata = '0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr_q  <= '0;
      lvl_q <= 2'd3;
    end else begin
      if (access && paddr == A_RDRAM && !active) rr_q <= (rr_q == 2'd2) ? 2'd0 : rr_q + 1'b1;
      else                                       rr_q <= '0;
      if (lvl_we) lvl_q <= pwdata[1:0];
    end
  end

  assign lvl = lvl_we ? pwdata[1:0] : lvl_q;

  assert property (@(posedge clk) disable iff (!rst_n) penable |-> psel)
    else $error("apb_bridge: penable without psel");
endmodule
