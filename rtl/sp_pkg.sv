// Shared types and constants of the stream processor.
//
// Every cluster holds the same set of functional units: two ALUs, two
// multipliers and one divide unit (FU-1..FU-5 in that order). Each unit reads
// its operands from the shared stream register file (SRF), the cluster's
// scratch pad (SP) or its own local register files (LRF0 feeds operand 1,
// LRF1 feeds operand 2), and writes its result to the SRF, the SP, its own
// LRF0 or the LRF1 of one of the other four units.
//
// Instruction formats (MSB first), with ADDR_BIT = 6 and DEST_BIT = 3:
//   ALU, 29 bits: src0[28:27] addr0[26:21] src1[20:19] addr1[18:13]
//                 dest[12:10] wbaddr[9:4] opcode[3:0]
//   MUL, 26 bits: same fields, 1-bit opcode
//   DIV, 27 bits: same fields, 2-bit opcode
// so ALU_BIT = 8 + 3*ADDR_BIT + DEST_BIT, MUL_BIT = 5 + ..., DIV_BIT = 6 + ...,
// and the cluster instruction is 2*29 + 2*26 + 27 = 137 bits. The field
// boundaries, the source/destination encodings and the opcode tables follow
// the published format; the order of the five unit slots inside the
// 137-bit word (ALU-1 in the top bits, DIV in the bottom bits) is this
// design's choice.
package sp_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned DATA_W   = 32;  // register width
  localparam int unsigned ADDR_BIT = 6;   // register address field width
  localparam int unsigned NREG     = 1 << ADDR_BIT;  // 64 registers per array

  localparam int unsigned ALU_NUM  = 2;
  localparam int unsigned MUL_NUM  = 2;
  localparam int unsigned DIV_NUM  = 1;
  localparam int unsigned NFU      = ALU_NUM + MUL_NUM + DIV_NUM;  // 5
  // 1..5 units fit a 3-bit DEST field, 6..13 need 4 bits.
  localparam int unsigned DEST_BIT = (NFU <= 5) ? 3 : 4;

  localparam int unsigned ALU_OP_W = 4;
  localparam int unsigned MUL_OP_W = 1;
  localparam int unsigned DIV_OP_W = 2;
  localparam int unsigned ALU_BIT  = 8 + 3 * ADDR_BIT + DEST_BIT;  // 29
  localparam int unsigned MUL_BIT  = 5 + 3 * ADDR_BIT + DEST_BIT;  // 26
  localparam int unsigned DIV_BIT  = 6 + 3 * ADDR_BIT + DEST_BIT;  // 27
  localparam int unsigned VLIW_LEN = ALU_BIT * ALU_NUM + MUL_BIT * MUL_NUM
                                   + DIV_BIT * DIV_NUM;           // 137

  // Pipeline depths (ALU_Time, MUL_Time, DIV_Time).
  localparam int unsigned ALU_LAT  = 2;
  localparam int unsigned MUL_LAT  = 4;
  localparam int unsigned DIV_LAT  = 6;
  localparam int unsigned MAX_LAT  = DIV_LAT;

  // Fraction bits of the fixed-point multiply (design choice: Q16.16).
  localparam int unsigned FRAC_BITS = 16;

  typedef logic [DATA_W-1:0]   word_t;
  typedef logic [ADDR_BIT-1:0] raddr_t;
  typedef logic [VLIW_LEN-1:0] vliw_t;

  // ------------------------------------------------------------ encodings
  // Operand source (Table "data source").
  typedef enum logic [1:0] {
    SRC_NONE = 2'b00,
    SRC_SRF  = 2'b01,
    SRC_SP   = 2'b10,
    SRC_LRF  = 2'b11
  } src_e;

  // Write-back destination, relative to the issuing unit: 011 is the unit's
  // own LRF0, 100..111 the LRF1 of the other four units in ascending order.
  typedef enum logic [DEST_BIT-1:0] {
    DST_NONE  = 3'b000,
    DST_SRF   = 3'b001,
    DST_SP    = 3'b010,
    DST_LRF0  = 3'b011,
    DST_LRF1A = 3'b100,
    DST_LRF1B = 3'b101,
    DST_LRF1C = 3'b110,
    DST_LRF1D = 3'b111
  } dest_e;

  typedef enum logic [ALU_OP_W-1:0] {
    ALU_NOP = 4'b0000,
    ALU_ADD = 4'b0001,
    ALU_SUB = 4'b0010,
    ALU_ABS = 4'b0011,
    ALU_AND = 4'b0100,
    ALU_OR  = 4'b0101,
    ALU_XOR = 4'b0110,
    ALU_NOT = 4'b0111,
    ALU_SLL = 4'b1000,
    ALU_SRL = 4'b1001,
    ALU_SRA = 4'b1010,
    ALU_LT  = 4'b1011,
    ALU_LE  = 4'b1100,
    ALU_EQ  = 4'b1101
  } alu_op_e;

  typedef enum logic [DIV_OP_W-1:0] {
    DIV_NOP = 2'b00,
    DIV_DIV = 2'b01,
    DIV_REM = 2'b10,
    DIV_SQR = 2'b11
  } div_op_e;

  // Host port: which register level an access targets.
  typedef enum logic [1:0] {
    LVL_SRF  = 2'b00,
    LVL_SP   = 2'b01,
    LVL_LRF0 = 2'b10,
    LVL_LRF1 = 2'b11
  } level_e;

  // ------------------------------------------------------------- structs
  // One functional-unit instruction with its opcode widened to 4 bits.
  typedef struct packed {
    src_e                src0;
    raddr_t              addr0;
    src_e                src1;
    raddr_t              addr1;
    dest_e               dest;
    raddr_t              wbaddr;
    logic [ALU_OP_W-1:0] opcode;
  } fu_inst_t;

  // A result leaving a unit's last pipeline stage.
  typedef struct packed {
    logic   valid;
    dest_e  dest;
    raddr_t addr;
    word_t  data;
  } wb_t;

  // A write request into one register array.
  typedef struct packed {
    logic   en;
    raddr_t addr;
    word_t  data;
  } wreq_t;

  // Per-cluster activity counters.
  typedef struct packed {
    logic [31:0] alu_ops;   // ALU instructions executed
    logic [31:0] mul_ops;   // MUL instructions executed
    logic [31:0] div_ops;   // DIV instructions executed
    logic [31:0] srf_acc;   // SRF reads + writes
    logic [31:0] sp_acc;    // SP reads + writes
    logic [31:0] lrf_acc;   // LRF reads + writes
    logic [31:0] sp_used;   // distinct SP registers read or written
    logic [31:0] lrf_used;  // distinct LRF registers read or written
  } perf_t;

  // ----------------------------------------------------------- functions
  // Kind of unit in slot f (0..NFU-1): 0 ALU, 1 MUL, 2 DIV.
  function automatic int unsigned fu_kind(int unsigned f);
    if (f < ALU_NUM) return 0;
    if (f < ALU_NUM + MUL_NUM) return 1;
    return 2;
  endfunction

  function automatic int unsigned fu_bits(int unsigned f);
    case (fu_kind(f))
      0:       return ALU_BIT;
      1:       return MUL_BIT;
      default: return DIV_BIT;
    endcase
  endfunction

  function automatic int unsigned fu_opw(int unsigned f);
    case (fu_kind(f))
      0:       return ALU_OP_W;
      1:       return MUL_OP_W;
      default: return DIV_OP_W;
    endcase
  endfunction

  // Least significant bit of slot f inside the cluster instruction; slot 0
  // occupies the top bits.
  function automatic int unsigned fu_lsb(int unsigned f);
    int unsigned pos;
    pos = VLIW_LEN;
    for (int unsigned i = 0; i <= f; i++) pos -= fu_bits(i);
    return pos;
  endfunction

  // Decode the raw bits of one unit instruction, right-aligned in the
  // widest (ALU) format, whose opcode field is opw bits wide.
  function automatic fu_inst_t fu_decode(logic [ALU_BIT-1:0] raw,
                                         int unsigned opw);
    fu_inst_t fi;
    fi.opcode = '0;
    for (int unsigned b = 0; b < ALU_OP_W; b++)
      if (b < opw) fi.opcode[b] = raw[b];
    fi.wbaddr = raw[opw +: ADDR_BIT];
    fi.dest   = dest_e'(raw[opw + ADDR_BIT +: DEST_BIT]);
    fi.addr1  = raw[opw + ADDR_BIT + DEST_BIT +: ADDR_BIT];
    fi.src1   = src_e'(raw[opw + 2*ADDR_BIT + DEST_BIT +: 2]);
    fi.addr0  = raw[opw + 2*ADDR_BIT + DEST_BIT + 2 +: ADDR_BIT];
    fi.src0   = src_e'(raw[opw + 3*ADDR_BIT + DEST_BIT + 2 +: 2]);
    return fi;
  endfunction

  // Unit that DEST code d of unit f writes the LRF1 of (d >= DST_LRF1A).
  function automatic int unsigned lrf1_target(int unsigned f, int unsigned d);
    int unsigned k;
    k = d - 4;                    // k-th other unit, ascending
    return (k < f) ? k : k + 1;
  endfunction

endpackage
