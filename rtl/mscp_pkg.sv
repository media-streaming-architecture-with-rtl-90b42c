// mscp_pkg: types and constants shared by the ALU cluster IP.
//
// The cluster is a five-slot VLIW machine (ALU0, ALU1, MUL0, MUL1, DIV).
// One instruction is 142 bits wide, the width of the instruction memory
// (four 32-bit segments plus one 14-bit segment). The split of those 142 bits
// into slot fields is this design's own: every slot names its operation, two
// operand sources and one destination. The ALU slots carry a 4-bit opcode
// (13 integer operations plus FP add/sub), the MUL and DIV slots a 3-bit one,
// which makes 2*29 + 3*28 = 142 bits exactly.
//
// Operand sources (2-bit select + 5-bit address):
//   SRC_IRF  - the unit's own intra register file for that input
//   SRC_DMEM - the data-memory bank paired with that input
//   SRC_SPRF - the scratch pad register file
//   SRC_IMM  - the 5-bit address field, zero-extended
// Destination (2-bit select + 4-bit bank + 5-bit address):
//   DST_NONE, DST_IRF (any of the ten IRF banks), DST_DMEM (any of the ten
//   data-memory banks), DST_SPRF.
//
// Unit u owns IRF banks 2u (operand a) and 2u+1 (operand b) and reads the
// data-memory banks with the same numbers.
//
// AHB byte address map of one IP (14-bit HADDR):
//   0x0000-0x0FFF  instruction memory, word = {entry[6:0], segment[2:0]}
//   0x1000-0x17FF  data memory,        word = {bank[3:0], addr[4:0]}
//   0x1800-0x1FFF  IRF banks,          word = {bank[3:0], addr[4:0]}
//   0x2000-0x207F  scratch pad, 32 words
//   0x3000         START: write the end PC value, execution begins at PC 0
//   0x3004         ABORT: clears the end value, the cluster stops
package mscp_pkg;

  localparam int unsigned XLEN      = 32;
  localparam int unsigned NUM_UNITS = 5;
  localparam int unsigned NUM_BANKS = 10;   // IRF banks = data-memory banks
  localparam int unsigned INSTR_W   = 142;
  localparam int unsigned IMEM_DEPTH = 128;
  localparam int unsigned BANK_DEPTH = 32;
  localparam int unsigned SPRF_DEPTH = 32;
  localparam int unsigned HADDR_W    = 14;

  // unit indices
  localparam int unsigned U_ALU0 = 0;
  localparam int unsigned U_ALU1 = 1;
  localparam int unsigned U_MUL0 = 2;
  localparam int unsigned U_MUL1 = 3;
  localparam int unsigned U_DIV  = 4;

  // pipeline depth of each unit (cycles between operands and result)
  localparam int unsigned ALU_LAT = 2;
  localparam int unsigned MUL_LAT = 4;
  localparam int unsigned DIV_LAT = 16;

  typedef enum logic [3:0] {
    ALU_NOP = 4'd0,  ALU_ADD = 4'd1,  ALU_SUB = 4'd2,  ALU_ABS = 4'd3,
    ALU_AND = 4'd4,  ALU_OR  = 4'd5,  ALU_XOR = 4'd6,  ALU_NOT = 4'd7,
    ALU_SLL = 4'd8,  ALU_SRL = 4'd9,  ALU_SRA = 4'd10, ALU_LT  = 4'd11,
    ALU_GT  = 4'd12, ALU_EQ  = 4'd13, ALU_FADD = 4'd14, ALU_FSUB = 4'd15
  } alu_op_e;

  typedef enum logic [2:0] {
    MUL_NOP = 3'd0, MUL_LO = 3'd1, MUL_HI = 3'd2, MUL_FMUL = 3'd3
  } mul_op_e;

  typedef enum logic [2:0] {
    DIV_NOP = 3'd0, DIV_QUO = 3'd1, DIV_REM = 3'd2, DIV_SQRT = 3'd3,
    DIV_FDIV = 3'd4
  } div_op_e;

  typedef enum logic [1:0] {
    SRC_IRF = 2'd0, SRC_DMEM = 2'd1, SRC_SPRF = 2'd2, SRC_IMM = 2'd3
  } src_sel_e;

  typedef enum logic [1:0] {
    DST_NONE = 2'd0, DST_IRF = 2'd1, DST_DMEM = 2'd2, DST_SPRF = 2'd3
  } dst_sel_e;

  typedef struct packed {
    src_sel_e   sel;
    logic [4:0] addr;
  } src_t;

  typedef struct packed {
    dst_sel_e   sel;
    logic [3:0] bank;
    logic [4:0] addr;
  } dst_t;

  // operand/destination part common to all slots (25 bits)
  typedef struct packed {
    dst_t dst;
    src_t b;
    src_t a;
  } slot_body_t;

  typedef struct packed {
    slot_body_t body;
    alu_op_e    op;
  } alu_slot_t;   // 29 bits

  typedef struct packed {
    slot_body_t body;
    mul_op_e    op;
  } mul_slot_t;   // 28 bits

  typedef struct packed {
    slot_body_t body;
    div_op_e    op;
  } div_slot_t;   // 28 bits

  // VLIW word, least significant slot first
  typedef struct packed {
    div_slot_t div;
    mul_slot_t mul1;
    mul_slot_t mul0;
    alu_slot_t alu1;
    alu_slot_t alu0;
  } instr_t;      // 142 bits

  // AHB encodings (AMBA 2.0)
  typedef enum logic [1:0] {
    HT_IDLE = 2'b00, HT_BUSY = 2'b01, HT_NONSEQ = 2'b10, HT_SEQ = 2'b11
  } htrans_e;

  typedef enum logic [1:0] {
    HR_OKAY = 2'b00, HR_ERROR = 2'b01, HR_RETRY = 2'b10, HR_SPLIT = 2'b11
  } hresp_e;

  typedef enum logic [2:0] {
    HB_SINGLE = 3'b000, HB_INCR = 3'b001, HB_WRAP4 = 3'b010, HB_INCR4 = 3'b011,
    HB_WRAP8 = 3'b100, HB_INCR8 = 3'b101, HB_WRAP16 = 3'b110, HB_INCR16 = 3'b111
  } hburst_e;

  // FPU operation codes as printed in the FPU simulation waveforms
  typedef enum logic [2:0] {
    FOP_ADD = 3'd0, FOP_SUB = 3'd1, FOP_MUL = 3'd3, FOP_DIV = 3'd7
  } fpu_op_e;

  // address map
  localparam logic [13:0] A_START = 14'h3000;
  localparam logic [13:0] A_ABORT = 14'h3004;

  // memory-side access port of the cluster (used by the AHB wrapper)
  typedef enum logic [2:0] {
    RGN_IMEM = 3'd0, RGN_DMEM = 3'd1, RGN_IRF = 3'd2, RGN_SPRF = 3'd3,
    RGN_START = 3'd4, RGN_ABORT = 3'd5, RGN_BAD = 3'd7
  } region_e;

  function automatic region_e decode_region(input logic [13:0] a);
    region_e r;
    r = RGN_BAD;
    unique casez (a[13:11])
      3'b00?: r = (a[4:2] <= 3'd4) ? RGN_IMEM : RGN_BAD; // segment 0..4
      3'b010: r = (a[10:7] < 4'd10) ? RGN_DMEM : RGN_BAD;
      3'b011: r = (a[10:7] < 4'd10) ? RGN_IRF : RGN_BAD;
      3'b100: r = (a[10:7] == 4'd0) ? RGN_SPRF : RGN_BAD;
      3'b110: r = (a[10:2] == 9'd0) ? RGN_START :
                  (a[10:2] == 9'd1) ? RGN_ABORT : RGN_BAD;
      default: r = RGN_BAD;
    endcase
    return r;
  endfunction

endpackage
