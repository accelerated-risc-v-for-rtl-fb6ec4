// sike_pkg: shared constants and types of the SIKE field-arithmetic coprocessor.
//
// The coprocessor supports the four SIKE primes p = 2^eA * 3^eB - 1 (p434, p503, p610,
// p751). Field elements are kept redundantly in [0, 2p) and are DATA_W = 752 bits wide,
// enough for 2*p751. The Montgomery multiplier works on NW words of W_MUL = 17 bits; the
// array has S_MUL = 45 processing elements (765 bits) and skips the first SA_MUL = 12
// reduction elements because m = p + 1 has at least 12*17 low zero bits for every prime.
// The per-prime word count NW, multiplication latency 3*NW+3 and interleave delay 2*NW
// follow the published cycle counts (81/52, 93/60, 111/72, 138/90). The prime values are
// computed here by constant functions, so no table of numbers is stored in the source.
// The instruction word layout and opcode encoding are this design's choice.
package sike_pkg;

  localparam int unsigned DATA_W  = 752;  // field element width (2*p751 < 2^752)
  localparam int unsigned BUF_W   = 768;  // data buffer width (24 x 32 bits)
  localparam int unsigned W_MUL   = 17;   // multiplier word size w
  localparam int unsigned S_MUL   = 45;   // processing elements s
  localparam int unsigned SA_MUL  = 12;   // skipped reduction elements s_A
  localparam int unsigned RAM_AW  = 8;    // 256-entry coprocessor RAM
  localparam int unsigned INSTR_W = 26;   // instruction width
  localparam int unsigned IBUF_AW = 5;    // 32-entry instruction buffer

  // Security levels, in the order of the parameter sets.
  typedef enum logic [1:0] {
    LVL_P434 = 2'd0,
    LVL_P503 = 2'd1,
    LVL_P610 = 2'd2,
    LVL_P751 = 2'd3
  } sec_level_e;

  // Instruction opcodes.
  typedef enum logic [1:0] {
    OP_ADD = 2'd0,
    OP_SUB = 2'd1,
    OP_MUL = 2'd2,
    OP_END = 2'd3
  } opcode_e;

  // Instruction word: {srcA[25:18], srcB[17:10], dst[9:2], op[1:0]}.
  typedef struct packed {
    logic [RAM_AW-1:0] src_a;
    logic [RAM_AW-1:0] src_b;
    logic [RAM_AW-1:0] dst;
    opcode_e           op;
  } instr_t;

  // Exponents of each prime.
  function automatic int unsigned exp_a(input logic [1:0] lvl);
    case (lvl)
      2'd0:    return 216;
      2'd1:    return 250;
      2'd2:    return 305;
      default: return 372;
    endcase
  endfunction

  function automatic int unsigned exp_b(input logic [1:0] lvl);
    case (lvl)
      2'd0:    return 137;
      2'd1:    return 159;
      2'd2:    return 192;
      default: return 239;
    endcase
  endfunction

  // Number of 17-bit words of the Montgomery radix R = 2^(17*NW), smallest with p < 2^(17*NW-2).
  function automatic int unsigned mul_words(input logic [1:0] lvl);
    case (lvl)
      2'd0:    return 26;
      2'd1:    return 30;
      2'd2:    return 36;
      default: return 45;
    endcase
  endfunction

  // p + 1 = 2^eA * 3^eB, BUF_W bits wide.
  function automatic logic [BUF_W-1:0] prime_plus1(input logic [1:0] lvl);
    logic [BUF_W-1:0] v;
    v = '0;
    v[0] = 1'b1;
    for (int unsigned k = 0; k < exp_b(lvl); k++) v = (v << 1) + v;
    return v << exp_a(lvl);
  endfunction

  function automatic logic [BUF_W-1:0] prime(input logic [1:0] lvl);
    return prime_plus1(lvl) - 1'b1;
  endfunction

  // Constant tables, one entry per level.
  localparam logic [BUF_W-1:0] P1_P434 = prime_plus1(2'd0);
  localparam logic [BUF_W-1:0] P1_P503 = prime_plus1(2'd1);
  localparam logic [BUF_W-1:0] P1_P610 = prime_plus1(2'd2);
  localparam logic [BUF_W-1:0] P1_P751 = prime_plus1(2'd3);

endpackage
