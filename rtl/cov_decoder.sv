// cov_decoder: instruction decoder for RV64IM plus the carry/overflow extension.
//
// Combinational: one 32-bit instruction word in, one decoded_t out. Covers
// the RV64I integer instructions, RV64M, fence (executed as a no-op), ecall
// and ebreak (both halt the core), CSR instructions on the two special
// registers, and the three new instructions:
//   addc rd, rs1, rs2      R-type, custom-0 opcode, funct3 000, funct7 0
//   bo   rs1, rs2, target  B-type, BRANCH opcode, funct3 010
//   ldx  rd, imm(rs1)      I-type, LOAD opcode, funct3 111 (doubleword)
// The extension names these instructions and says they follow the usual
// two-source-register RISC-V formats; the exact opcode, funct3 and funct7
// values above are this design's choice (custom or reserved code points).
// Anything else, including CSR numbers other than storeextra/loadextra and
// the F, D and A extensions, decodes as illegal.
module cov_decoder
  import cov_pkg::*;
(
  input  logic [31:0] instr,
  output decoded_t    d
);

  logic [6:0] opc, f7;
  logic [2:0] f3;
  word_t imm_i, imm_s, imm_b, imm_u, imm_j;

  always_comb begin
    opc = instr[6:0];
    f3  = instr[14:12];
    f7  = instr[31:25];

    imm_i = {{52{instr[31]}}, instr[31:20]};
    imm_s = {{52{instr[31]}}, instr[31:25], instr[11:7]};
    imm_b = {{51{instr[31]}}, instr[31], instr[7], instr[30:25], instr[11:8], 1'b0};
    imm_u = {{32{instr[31]}}, instr[31:12], 12'd0};
    imm_j = {{43{instr[31]}}, instr[31], instr[19:12], instr[20], instr[30:21], 1'b0};

    d = '0;
    d.rd       = instr[11:7];
    d.rs1      = instr[19:15];
    d.rs2      = instr[24:20];
    d.alu_op   = ALU_ADD;
    d.md_op    = MD_MUL;
    d.br_op    = BR_EQ;
    d.mem_size = SZ_D;
    d.csr_op   = CSR_RW;
    d.wb_sel   = WB_ALU;
    d.csr_addr = instr[31:20];

    unique case (opc)
      OPC_LUI: begin
        d.legal = 1'b1; d.reg_write = 1'b1; d.imm = imm_u; d.use_imm = 1'b1;
        d.a_is_zero = 1'b1; d.alu_op = ALU_ADDNF;
      end
      OPC_AUIPC: begin
        d.legal = 1'b1; d.reg_write = 1'b1; d.imm = imm_u; d.use_imm = 1'b1;
        d.a_is_pc = 1'b1; d.alu_op = ALU_ADDNF;
      end
      OPC_JAL: begin
        d.legal = 1'b1; d.reg_write = 1'b1; d.imm = imm_j; d.is_jal = 1'b1;
        d.wb_sel = WB_PC4;
      end
      OPC_JALR: begin
        d.legal = (f3 == 3'b000); d.reg_write = 1'b1; d.imm = imm_i;
        d.is_jalr = 1'b1; d.wb_sel = WB_PC4;
      end
      OPC_BRANCH: begin
        d.imm = imm_b; d.is_branch = 1'b1; d.legal = 1'b1;
        unique case (f3)
          3'b000:  d.br_op = BR_EQ;
          3'b001:  d.br_op = BR_NE;
          F3_BO:   d.br_op = BR_BO;
          3'b100:  d.br_op = BR_LT;
          3'b101:  d.br_op = BR_GE;
          3'b110:  d.br_op = BR_LTU;
          3'b111:  d.br_op = BR_GEU;
          default: d.legal = 1'b0;
        endcase
      end
      OPC_LOAD: begin
        d.imm = imm_i; d.is_load = 1'b1; d.reg_write = 1'b1; d.wb_sel = WB_LOAD;
        d.legal = 1'b1;
        d.mem_size = mem_size_e'(f3[1:0]);
        d.mem_unsigned = f3[2];
        // lb lh lw ld lbu lhu lwu use funct3 0..6; 7 is ldx
        if (f3 == F3_LDX) begin
          d.is_ldx = 1'b1; d.is_load = 1'b0; d.mem_size = SZ_D; d.mem_unsigned = 1'b0;
        end
      end
      OPC_STORE: begin
        d.imm = imm_s; d.is_store = 1'b1; d.legal = !f3[2];
        d.mem_size = mem_size_e'(f3[1:0]);
      end
      OPC_OP_IMM: begin
        d.imm = imm_i; d.use_imm = 1'b1; d.reg_write = 1'b1; d.legal = 1'b1;
        unique case (f3)
          3'b000: d.alu_op = ALU_ADD;
          3'b010: d.alu_op = ALU_SLT;
          3'b011: d.alu_op = ALU_SLTU;
          3'b100: d.alu_op = ALU_XOR;
          3'b110: d.alu_op = ALU_OR;
          3'b111: d.alu_op = ALU_AND;
          3'b001: begin d.alu_op = ALU_SLL; d.legal = (instr[31:26] == 6'b000000); end
          3'b101: begin
            d.alu_op = instr[30] ? ALU_SRA : ALU_SRL;
            d.legal  = (instr[31] == 1'b0) && (instr[29:26] == 4'b0000);
          end
          default: d.legal = 1'b0;
        endcase
      end
      OPC_OP_IMM32: begin
        d.imm = imm_i; d.use_imm = 1'b1; d.reg_write = 1'b1; d.legal = 1'b1;
        unique case (f3)
          3'b000: d.alu_op = ALU_ADDW;
          3'b001: begin d.alu_op = ALU_SLLW; d.legal = (f7 == 7'b0000000); end
          3'b101: begin
            d.alu_op = instr[30] ? ALU_SRAW : ALU_SRLW;
            d.legal  = (f7 == 7'b0000000) || (f7 == 7'b0100000);
          end
          default: d.legal = 1'b0;
        endcase
      end
      OPC_OP: begin
        d.reg_write = 1'b1; d.legal = 1'b1;
        if (f7 == 7'b0000001) begin
          d.wb_sel = WB_MD;
          unique case (f3)
            3'b000: d.md_op = MD_MUL;
            3'b001: d.md_op = MD_MULH;
            3'b010: d.md_op = MD_MULHSU;
            3'b011: d.md_op = MD_MULHU;
            3'b100: d.md_op = MD_DIV;
            3'b101: d.md_op = MD_DIVU;
            3'b110: d.md_op = MD_REM;
            3'b111: d.md_op = MD_REMU;
            default: d.legal = 1'b0;
          endcase
        end else if (f7 == 7'b0000000) begin
          unique case (f3)
            3'b000: d.alu_op = ALU_ADD;
            3'b001: d.alu_op = ALU_SLL;
            3'b010: d.alu_op = ALU_SLT;
            3'b011: d.alu_op = ALU_SLTU;
            3'b100: d.alu_op = ALU_XOR;
            3'b101: d.alu_op = ALU_SRL;
            3'b110: d.alu_op = ALU_OR;
            3'b111: d.alu_op = ALU_AND;
            default: d.legal = 1'b0;
          endcase
        end else if (f7 == 7'b0100000 && f3 == 3'b000) begin
          d.alu_op = ALU_SUB;
        end else if (f7 == 7'b0100000 && f3 == 3'b101) begin
          d.alu_op = ALU_SRA;
        end else begin
          d.legal = 1'b0;
        end
      end
      OPC_OP32: begin
        d.reg_write = 1'b1; d.legal = 1'b1;
        if (f7 == 7'b0000001) begin
          d.wb_sel = WB_MD;
          unique case (f3)
            3'b000: d.md_op = MD_MULW;
            3'b100: d.md_op = MD_DIVW;
            3'b101: d.md_op = MD_DIVUW;
            3'b110: d.md_op = MD_REMW;
            3'b111: d.md_op = MD_REMUW;
            default: d.legal = 1'b0;
          endcase
        end else if (f7 == 7'b0000000 && f3 == 3'b000) d.alu_op = ALU_ADDW;
        else if (f7 == 7'b0100000 && f3 == 3'b000)     d.alu_op = ALU_SUBW;
        else if (f7 == 7'b0000000 && f3 == 3'b001)     d.alu_op = ALU_SLLW;
        else if (f7 == 7'b0000000 && f3 == 3'b101)     d.alu_op = ALU_SRLW;
        else if (f7 == 7'b0100000 && f3 == 3'b101)     d.alu_op = ALU_SRAW;
        else d.legal = 1'b0;
      end
      OPC_CUSTOM0: begin
        d.reg_write = 1'b1; d.alu_op = ALU_ADDC;
        d.legal = (f3 == F3_ADDC) && (f7 == 7'b0000000);
      end
      OPC_MISC_MEM: begin
        d.legal = (f3 == 3'b000) || (f3 == 3'b001);   // fence / fence.i: no-op
        d.rd = '0;
      end
      OPC_SYSTEM: begin
        if (f3 == 3'b000) begin
          d.legal = (instr[31:7] == 25'd0) || (instr[31:7] == {12'd1, 13'd0});
          d.halt  = d.legal;
        end else begin
          d.is_csr = 1'b1; d.reg_write = 1'b1; d.wb_sel = WB_CSR;
          d.csr_uimm = f3[2];
          d.legal = (f3[1:0] != 2'b00) &&
                    ((d.csr_addr == CSR_STOREEXTRA) || (d.csr_addr == CSR_LOADEXTRA));
          unique case (f3[1:0])
            2'b01:   d.csr_op = CSR_RW;
            2'b10:   d.csr_op = CSR_RS;
            default: d.csr_op = CSR_RC;
          endcase
        end
      end
      default: d.legal = 1'b0;
    endcase

    if (!d.legal) begin
      d.reg_write = 1'b0;
      d.is_store  = 1'b0;
      d.is_load   = 1'b0;
      d.is_ldx    = 1'b0;
      d.is_csr    = 1'b0;
      d.is_branch = 1'b0;
      d.is_jal    = 1'b0;
      d.is_jalr   = 1'b0;
    end
  end

endmodule
