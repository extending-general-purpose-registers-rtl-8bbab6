// cov_pkg: types and constants shared by the carry/overflow-extended RV64 core.
//
// Every general-purpose register is widened from 64 to 66 bits: the 64 data
// bits plus a carry bit and an overflow bit (xreg_t). All units exchange
// operands and results in this form. The package also holds the operation
// enums of the ALU, multiplier/divider, branch and load/store units, the
// decoded-instruction struct produced by cov_decoder, and the encodings
// chosen for the three new instructions and two special registers.
//
// What follows the extension: the widened register, the set of new operations
// (addc, bo, ldx) and the two special registers storeextra and loadextra.
// What is this design's own choice: the bit order {ovf, carry, data}, and all
// opcode/funct/CSR numbers, which the extension leaves open. addc uses the
// custom-0 major opcode, bo the reserved funct3=010 of BRANCH, ldx the
// reserved funct3=111 of LOAD, and storeextra/loadextra the user custom CSR
// numbers 0x800/0x801.
package cov_pkg;

  localparam int unsigned XLEN  = 64;
  localparam int unsigned NREGS = 32;

  typedef logic [XLEN-1:0] word_t;
  typedef logic [4:0]      regidx_t;

  // Extended register: data plus carry and overflow.
  typedef struct packed {
    logic  ovf;
    logic  carry;
    word_t data;
  } xreg_t;

  localparam xreg_t XREG_ZERO = '{ovf: 1'b0, carry: 1'b0, data: '0};

  // Major opcodes (RV64 base plus custom-0 for addc).
  localparam logic [6:0] OPC_LOAD     = 7'b0000011;
  localparam logic [6:0] OPC_CUSTOM0  = 7'b0001011;
  localparam logic [6:0] OPC_MISC_MEM = 7'b0001111;
  localparam logic [6:0] OPC_OP_IMM   = 7'b0010011;
  localparam logic [6:0] OPC_AUIPC    = 7'b0010111;
  localparam logic [6:0] OPC_OP_IMM32 = 7'b0011011;
  localparam logic [6:0] OPC_STORE    = 7'b0100011;
  localparam logic [6:0] OPC_OP       = 7'b0110011;
  localparam logic [6:0] OPC_LUI      = 7'b0110111;
  localparam logic [6:0] OPC_OP32     = 7'b0111011;
  localparam logic [6:0] OPC_BRANCH   = 7'b1100011;
  localparam logic [6:0] OPC_JALR     = 7'b1100111;
  localparam logic [6:0] OPC_JAL      = 7'b1101111;
  localparam logic [6:0] OPC_SYSTEM   = 7'b1110011;

  // funct3 values chosen for the new instructions.
  localparam logic [2:0] F3_ADDC = 3'b000;  // custom-0, funct7 = 0
  localparam logic [2:0] F3_BO   = 3'b010;  // BRANCH
  localparam logic [2:0] F3_LDX  = 3'b111;  // LOAD

  // CSR numbers of the two special registers (user read/write custom range).
  localparam logic [11:0] CSR_STOREEXTRA = 12'h800;
  localparam logic [11:0] CSR_LOADEXTRA  = 12'h801;

  typedef enum logic [4:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR,
    ALU_SLL, ALU_SRL, ALU_SRA, ALU_SLT, ALU_SLTU,
    ALU_ADDW, ALU_SUBW, ALU_SLLW, ALU_SRLW, ALU_SRAW,
    ALU_ADDC, ALU_ADDNF
  } alu_op_e;

  typedef enum logic [3:0] {
    MD_MUL, MD_MULH, MD_MULHSU, MD_MULHU, MD_DIV, MD_DIVU, MD_REM, MD_REMU,
    MD_MULW, MD_DIVW, MD_DIVUW, MD_REMW, MD_REMUW
  } md_op_e;

  typedef enum logic [2:0] {
    BR_EQ, BR_NE, BR_LT, BR_GE, BR_LTU, BR_GEU, BR_BO
  } br_op_e;

  // Memory access size; signedness is separate.
  typedef enum logic [1:0] { SZ_B, SZ_H, SZ_W, SZ_D } mem_size_e;

  typedef enum logic [1:0] { CSR_RW, CSR_RS, CSR_RC } csr_op_e;

  // Where the written-back value comes from.
  typedef enum logic [2:0] {
    WB_ALU, WB_MD, WB_LOAD, WB_PC4, WB_CSR
  } wb_sel_e;

  typedef struct packed {
    logic      legal;
    logic      halt;        // ecall / ebreak
    regidx_t   rd;
    regidx_t   rs1;
    regidx_t   rs2;
    word_t     imm;
    logic      use_imm;     // operand b is the immediate (flags zero)
    logic      a_is_pc;     // operand a is the PC (auipc)
    logic      a_is_zero;   // operand a is zero (lui)
    alu_op_e   alu_op;
    md_op_e    md_op;
    br_op_e    br_op;
    logic      is_branch;
    logic      is_jal;
    logic      is_jalr;
    logic      is_load;
    logic      is_ldx;
    logic      is_store;
    mem_size_e mem_size;
    logic      mem_unsigned;
    logic      is_csr;
    csr_op_e   csr_op;
    logic      csr_uimm;    // source is the zero-extended rs1 field
    logic [11:0] csr_addr;
    logic      reg_write;
    wb_sel_e   wb_sel;
  } decoded_t;

endpackage
