// tb_cov_decoder: self-checking test of cov_decoder.
//
// Builds instruction words for every supported instruction with random
// register numbers and immediates, and checks the decoded operation,
// register indices, immediate, memory size and control bits against the
// values the instruction was built from. A set of reserved encodings (other
// funct7 values, unused funct3 values, unknown CSR numbers, the F/D/A major
// opcodes) must decode as illegal with no side effect enabled.
module tb_cov_decoder;
  import cov_pkg::*;

  int checks = 0, failures = 0;
  int n_new = 0;
  logic [31:0] instr;
  decoded_t d;

  cov_decoder dut (.instr, .d);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s instr=%h", what, instr);
    end
  endtask

  function automatic word_t sx12(logic [11:0] v);
    return {{52{v[11]}}, v};
  endfunction

  initial begin
    logic [4:0] rd, rs1, rs2;
    logic [11:0] imm12;
    logic [12:0] boff;
    logic [19:0] imm20;
    alu_op_e rop [8];
    md_op_e  mop [8];
    rop = '{ALU_ADD, ALU_SLL, ALU_SLT, ALU_SLTU, ALU_XOR, ALU_SRL, ALU_OR, ALU_AND};
    mop = '{MD_MUL, MD_MULH, MD_MULHSU, MD_MULHU, MD_DIV, MD_DIVU, MD_REM, MD_REMU};

    for (int it = 0; it < 400; it++) begin
      rd = 5'($urandom()); rs1 = 5'($urandom()); rs2 = 5'($urandom());
      imm12 = 12'($urandom()); imm20 = 20'($urandom());
      boff = {12'($urandom()), 1'b0};

      // R-type OP, funct7 0 and M extension
      for (int f3 = 0; f3 < 8; f3++) begin
        instr = {7'b0, rs2, rs1, 3'(f3), rd, OPC_OP}; #1;
        chk("op", d.legal && d.alu_op == rop[f3] && d.wb_sel == WB_ALU && d.reg_write &&
                  d.rd == rd && d.rs1 == rs1 && d.rs2 == rs2 && !d.use_imm);
        instr = {7'b1, rs2, rs1, 3'(f3), rd, OPC_OP}; #1;
        chk("muldiv", d.legal && d.md_op == mop[f3] && d.wb_sel == WB_MD && d.reg_write);
      end
      instr = {7'b0100000, rs2, rs1, 3'd0, rd, OPC_OP}; #1;
      chk("sub", d.legal && d.alu_op == ALU_SUB);
      instr = {7'b0100000, rs2, rs1, 3'd5, rd, OPC_OP}; #1;
      chk("sra", d.legal && d.alu_op == ALU_SRA);
      instr = {7'b0100000, rs2, rs1, 3'd0, rd, OPC_OP32}; #1;
      chk("subw", d.legal && d.alu_op == ALU_SUBW);
      instr = {7'b0, rs2, rs1, 3'd1, rd, OPC_OP32}; #1;
      chk("sllw", d.legal && d.alu_op == ALU_SLLW);
      instr = {7'b1, rs2, rs1, 3'd0, rd, OPC_OP32}; #1;
      chk("mulw", d.legal && d.md_op == MD_MULW && d.wb_sel == WB_MD);
      instr = {7'b1, rs2, rs1, 3'd7, rd, OPC_OP32}; #1;
      chk("remuw", d.legal && d.md_op == MD_REMUW);

      // I-type arithmetic
      instr = {imm12, rs1, 3'd0, rd, OPC_OP_IMM}; #1;
      chk("addi", d.legal && d.alu_op == ALU_ADD && d.use_imm && d.imm == sx12(imm12) && d.reg_write);
      instr = {imm12, rs1, 3'd4, rd, OPC_OP_IMM}; #1;
      chk("xori", d.legal && d.alu_op == ALU_XOR && d.use_imm && d.imm == sx12(imm12));
      instr = {imm12, rs1, 3'd0, rd, OPC_OP_IMM32}; #1;
      chk("addiw", d.legal && d.alu_op == ALU_ADDW && d.use_imm);
      instr = {6'b010000, imm12[5:0], rs1, 3'd5, rd, OPC_OP_IMM}; #1;
      chk("srai", d.legal && d.alu_op == ALU_SRA && d.imm[5:0] == imm12[5:0]);
      instr = {imm20, rd, OPC_LUI}; #1;
      chk("lui", d.legal && d.alu_op == ALU_ADDNF && d.a_is_zero && d.imm == {{32{imm20[19]}}, imm20, 12'd0});
      instr = {imm20, rd, OPC_AUIPC}; #1;
      chk("auipc", d.legal && d.alu_op == ALU_ADDNF && d.a_is_pc);

      // loads, ldx, stores
      for (int f3 = 0; f3 < 7; f3++) begin
        instr = {imm12, rs1, 3'(f3), rd, OPC_LOAD}; #1;
        chk("load", d.legal && d.is_load && !d.is_ldx && d.mem_size == mem_size_e'(f3 % 4) &&
                    d.mem_unsigned == (f3 >= 4) && d.wb_sel == WB_LOAD && d.imm == sx12(imm12));
      end
      instr = {imm12, rs1, F3_LDX, rd, OPC_LOAD}; #1;
      chk("ldx", d.legal && d.is_ldx && !d.is_load && d.mem_size == SZ_D && d.reg_write &&
                 d.rd == rd && d.wb_sel == WB_LOAD);
      for (int f3 = 0; f3 < 4; f3++) begin
        instr = {imm12[11:5], rs2, rs1, 3'(f3), imm12[4:0], OPC_STORE}; #1;
        chk("store", d.legal && d.is_store && !d.reg_write && d.mem_size == mem_size_e'(f3) &&
                     d.imm == sx12(imm12) && d.rs2 == rs2);
      end

      // branches and bo
      instr = {boff[12], boff[10:5], rs2, rs1, F3_BO, boff[4:1], boff[11], OPC_BRANCH}; #1;
      chk("bo", d.legal && d.is_branch && d.br_op == BR_BO && !d.reg_write &&
                d.imm == {{51{boff[12]}}, boff});
      instr = {boff[12], boff[10:5], rs2, rs1, 3'd6, boff[4:1], boff[11], OPC_BRANCH}; #1;
      chk("bltu", d.legal && d.is_branch && d.br_op == BR_LTU);
      instr = {boff[12], boff[10:5], rs2, rs1, 3'd3, boff[4:1], boff[11], OPC_BRANCH}; #1;
      chk("branch f3=3 illegal", !d.legal && !d.is_branch);

      // addc
      instr = {7'b0, rs2, rs1, F3_ADDC, rd, OPC_CUSTOM0}; #1;
      chk("addc", d.legal && d.alu_op == ALU_ADDC && d.reg_write && !d.use_imm &&
                  d.rs1 == rs1 && d.rs2 == rs2 && d.rd == rd);
      n_new += 3;
      instr = {7'b0000001, rs2, rs1, F3_ADDC, rd, OPC_CUSTOM0}; #1;
      chk("custom-0 other funct7 illegal", !d.legal && !d.reg_write);

      // CSR transfers
      instr = {CSR_STOREEXTRA, rs1, 3'd2, rd, OPC_SYSTEM}; #1;
      chk("csrrs storeextra", d.legal && d.is_csr && d.csr_op == CSR_RS && d.wb_sel == WB_CSR &&
                              d.csr_addr == CSR_STOREEXTRA);
      instr = {CSR_LOADEXTRA, rs1, 3'd5, rd, OPC_SYSTEM}; #1;
      chk("csrrwi loadextra", d.legal && d.is_csr && d.csr_op == CSR_RW && d.csr_uimm);
      instr = {12'h300, rs1, 3'd1, rd, OPC_SYSTEM}; #1;
      chk("unknown csr illegal", !d.legal && !d.is_csr && !d.reg_write);

      // F/D/A major opcodes are not implemented
      instr = {7'b0, rs2, rs1, 3'd3, rd, 7'b0101111}; #1;
      chk("amo illegal", !d.legal && !d.reg_write && !d.is_store);
      instr = {imm12, rs1, 3'd3, rd, 7'b0000111}; #1;
      chk("fld illegal", !d.legal && !d.reg_write && !d.is_load);
    end
    instr = 32'h0010_0073; #1;
    chk("ebreak halts", d.legal && d.halt && !d.reg_write);
    instr = 32'h0000_0073; #1;
    chk("ecall halts", d.legal && d.halt);
    instr = 32'h0000_000F; #1;
    chk("fence no-op", d.legal && !d.reg_write && !d.is_store && !d.halt);
    checks++;
    if (n_new == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
