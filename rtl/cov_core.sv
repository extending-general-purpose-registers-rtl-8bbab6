// cov_core: single-cycle RV64IM core whose registers carry carry and overflow.
//
// Each of the 32 general-purpose registers is 66 bits: 64 data bits plus a
// carry bit and an overflow bit, written together by every instruction that
// has a destination. There is no condition-code register. Arithmetic units
// produce the flags (cov_alu, cov_muldiv), the new instruction addc
// propagates a carry from one register into the 65-bit result in another,
// the new branch bo tests the overflow bits of two registers, and the
// load/store unit (cov_lsu) holds storeextra/loadextra so that context-switch
// code can save and restore all flags, with the new load ldx refilling them.
//
// Structure: fetch -> decode (cov_decoder) -> register read (cov_regfile)
// -> execute (cov_alu, cov_muldiv, cov_branch, cov_lsu) -> write back, all in
// one clock cycle; one instruction retires per cycle. Instruction and data
// memories are outside and read combinationally (imem_rdata for imem_addr,
// dmem_rdata for dmem_addr in the same cycle); stores write on the clock
// edge ending the cycle. An ecall, ebreak or illegal instruction stops the
// core (halted stays high until reset). csrrw/csrrs/csrrc (and their
// immediate forms) on the CSR numbers 0x800 (storeextra) and 0x801
// (loadextra) move values between these registers and the general-purpose
// registers; the read value arrives with carry and overflow clear.
//
// Follows the extension: the widened registers, flag rules, addc, bo, ldx,
// storeextra/loadextra. This design's own choices: a single-cycle in-order
// organisation (so reading storeextra needs no pipeline serialisation), the
// encodings, the CSR mapping, halting on ecall/ebreak, a RISC-V RV64IM base
// without the F, D and A extensions, and the reset PC.
module cov_core
  import cov_pkg::*;
#(
  parameter word_t RESET_PC = '0
) (
  input  logic        clk,
  input  logic        rst_n,
  output word_t       imem_addr,
  input  logic [31:0] imem_rdata,
  output logic        dmem_req,
  output logic        dmem_we,
  output word_t       dmem_addr,
  output word_t       dmem_wdata,
  output logic [7:0]  dmem_wstrb,
  input  word_t       dmem_rdata,
  output logic        halted,
  output logic        illegal,
  output logic        retire
);

  word_t    pc_q, pc_d;
  logic     halted_q, illegal_q;
  logic     en;
  decoded_t dec;
  xreg_t    rs1_v, rs2_v, op_a, op_b, alu_y, md_y, ld_y, wb_v;
  logic     br_taken;
  word_t    pc4, mem_addr;
  word_t    sr_rdata, csr_src, csr_new;
  logic     sr_hit, csr_we;

  assign en        = !halted_q;
  assign imem_addr = pc_q;
  assign halted    = halted_q;
  assign illegal   = illegal_q;
  assign retire    = en;

  cov_decoder u_dec (.instr(imem_rdata), .d(dec));

  cov_regfile u_rf (
    .clk, .rst_n,
    .ra1(dec.rs1), .rd1(rs1_v),
    .ra2(dec.rs2), .rd2(rs2_v),
    .we (en && dec.reg_write), .wa(dec.rd), .wd(wb_v)
  );

  always_comb begin
    pc4      = pc_q + 64'd4;
    op_a     = dec.a_is_zero ? XREG_ZERO :
               dec.a_is_pc   ? '{ovf: 1'b0, carry: 1'b0, data: pc_q} : rs1_v;
    op_b     = dec.use_imm   ? '{ovf: 1'b0, carry: 1'b0, data: dec.imm} : rs2_v;
    mem_addr = rs1_v.data + dec.imm;
  end

  cov_alu    u_alu (.op(dec.alu_op), .a(op_a),  .b(op_b),  .y(alu_y));
  cov_muldiv u_md  (.op(dec.md_op),  .a(rs1_v), .b(rs2_v), .y(md_y));
  cov_branch u_br  (.op(dec.br_op),  .a(rs1_v), .b(rs2_v), .taken(br_taken));

  // CSR read-modify-write on storeextra / loadextra
  always_comb begin
    csr_src = dec.csr_uimm ? {59'd0, dec.rs1} : rs1_v.data;
    unique case (dec.csr_op)
      CSR_RS:  csr_new = sr_rdata | csr_src;
      CSR_RC:  csr_new = sr_rdata & ~csr_src;
      default: csr_new = csr_src;
    endcase
    csr_we = dec.is_csr && ((dec.csr_op == CSR_RW) || (dec.rs1 != '0));
  end

  cov_lsu u_lsu (
    .clk, .rst_n, .en,
    .is_load(dec.is_load), .is_ldx(dec.is_ldx), .is_store(dec.is_store),
    .size(dec.mem_size), .is_unsigned(dec.mem_unsigned), .addr(mem_addr),
    .st_src(dec.rs2), .st_val(rs2_v), .ld_dst(dec.rd), .ld_val(ld_y),
    .sr_addr(dec.csr_addr), .sr_we(csr_we), .sr_wdata(csr_new),
    .sr_rdata, .sr_hit,
    .dmem_req, .dmem_we, .dmem_addr, .dmem_wdata, .dmem_wstrb, .dmem_rdata
  );

  // write-back value
  always_comb begin
    unique case (dec.wb_sel)
      WB_MD:   wb_v = md_y;
      WB_LOAD: wb_v = ld_y;
      WB_PC4:  wb_v = '{ovf: 1'b0, carry: 1'b0, data: pc4};
      WB_CSR:  wb_v = '{ovf: 1'b0, carry: 1'b0, data: sr_rdata};
      default: wb_v = alu_y;
    endcase
  end

  // next PC
  always_comb begin
    if (dec.is_jal)                    pc_d = pc_q + dec.imm;
    else if (dec.is_jalr)              pc_d = (rs1_v.data + dec.imm) & ~64'd1;
    else if (dec.is_branch && br_taken) pc_d = pc_q + dec.imm;
    else                               pc_d = pc4;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pc_q      <= RESET_PC;
      halted_q  <= 1'b0;
      illegal_q <= 1'b0;
    end else if (en) begin
      if (dec.halt || !dec.legal) begin
        halted_q  <= 1'b1;
        illegal_q <= !dec.legal;
      end else begin
        pc_q <= pc_d;
      end
    end
  end

  // A CSR instruction only reaches the decoder as legal for a known number.
  a_csr_known: assert property (@(posedge clk) disable iff (!rst_n)
                                 (en && dec.is_csr) |-> sr_hit);

endmodule
