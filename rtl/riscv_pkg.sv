// riscv_pkg: types and constants shared by the RV32IM core.
// Holds the opcodes of RV32I/RV32M, the 3-bit ALU operation code, the
// load/store size codes and the bundle of control signals that travels
// down the pipeline. Encodings of ALUOP, ToReg, MemWrite and WHB follow the
// control-signal table of the core; the struct layout is this design's own.
package riscv_pkg;

  localparam int XLEN = 32;

  typedef enum logic [6:0] {
    OP_LUI    = 7'b0110111,
    OP_AUIPC  = 7'b0010111,
    OP_JAL    = 7'b1101111,
    OP_JALR   = 7'b1100111,
    OP_BRANCH = 7'b1100011,
    OP_LOAD   = 7'b0000011,
    OP_STORE  = 7'b0100011,
    OP_IMM    = 7'b0010011,
    OP_REG    = 7'b0110011
  } opcode_e;

  // ALU_select
  typedef enum logic [2:0] {
    ALU_ADD = 3'b000,
    ALU_SUB = 3'b001,
    ALU_SLL = 3'b010,
    ALU_XOR = 3'b011,
    ALU_SRL = 3'b100,
    ALU_SRA = 3'b101,
    ALU_OR  = 3'b110,
    ALU_AND = 3'b111
  } alu_sel_e;

  // ALUOP from the control unit
  localparam logic [1:0] ALUOP_REG    = 2'b00;  // decode funct3 and bit 30
  localparam logic [1:0] ALUOP_ADD    = 2'b01;  // address / pc arithmetic
  localparam logic [1:0] ALUOP_BRANCH = 2'b10;  // compare by subtraction
  localparam logic [1:0] ALUOP_IMM    = 2'b11;  // immediate ALU, bit 30 ignored

  // ToReg: write-back source
  localparam logic [1:0] TOREG_PC4 = 2'b00;
  localparam logic [1:0] TOREG_MEM = 2'b01;
  localparam logic [1:0] TOREG_ALU = 2'b10;
  localparam logic [1:0] TOREG_IMM = 2'b11;

  // MemWrite and WHB (load size): 00 none, 01 byte, 10 half, 11 word
  localparam logic [1:0] SZ_NONE = 2'b00;
  localparam logic [1:0] SZ_BYTE = 2'b01;
  localparam logic [1:0] SZ_HALF = 2'b10;
  localparam logic [1:0] SZ_WORD = 2'b11;

  typedef struct packed {
    logic [1:0] aluop;
    logic       alusrc;    // ALU_B = immediate
    logic       pctoalu;   // ALU_A = PC
    logic       regwrite;
    logic [1:0] whb;       // MemRead: load size, 00 = no load
    logic [1:0] memwrite;  // store size, 00 = no store
    logic [1:0] toreg;
    logic       branch;
    logic       uncond;    // JAL
    logic       jmp_i;     // JALR
    logic       ld_sxt;    // sign-extend loads
    logic       cx;        // result = branch-circuit condition (SLT/SLTU)
    logic       muldiv;
    logic       rs1f;      // instruction reads rs1
    logic       rs2f;      // instruction reads rs2
  } ctrl_t;

  localparam ctrl_t CTRL_NOP = '0;

endpackage
