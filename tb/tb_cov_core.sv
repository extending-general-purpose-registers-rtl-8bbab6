// tb_cov_core: end-to-end test of cov_core at its default parameters.
//
// The testbench holds a 4 KiB instruction memory and an 8 KiB data memory,
// assembles a program with small encoder functions, runs it to ebreak and
// checks the results against values it computes itself:
//  1. mul/div flags: the carry of an overflowing mul and of a division by
//     zero, turned into 0/1 words with "addc rd, x0, rs" and stored; and a
//     saved 0/1 carry word turned back into a carry bit by adding -1.
//  2. Growable-integer style overflow checks with bo (one not taken, one
//     taken).
//  3. A 128-bit subtraction with the not/add/addc sequence and carry-in 1,
//     including the final carry (1 = no borrow).
//  4. A 1024-bit multi-word addition (16 x 64-bit words) with the unrolled
//     add/addc loop; the sum and final carry are compared with the exact
//     sum, and the loop must take 15 cycles per two words.
//  5. A context switch: registers with assorted carry/overflow bits are
//     stored, storeextra is read and stored, all registers are cleared,
//     loadextra is written and every register is reloaded with ldx; the
//     whole 66-bit register file must match the state before the save.
// It counts how often each mechanism occurs (addc with and without a
// carry-in, bo taken and not taken, add overflow, stores recording flags in
// storeextra, storeextra reads, loadextra writes, ldx restoring a flag,
// mul/div flags) and fails if one never occurs.
module tb_cov_core;
  import cov_pkg::*;

  int checks = 0, failures = 0;
  int cycle = 0;
  logic clk = 1'b0, rst_n = 1'b0;

  word_t       imem_addr, dmem_addr, dmem_wdata, dmem_rdata;
  logic [31:0] imem_rdata;
  logic        dmem_req, dmem_we, halted, illegal, retire;
  logic [7:0]  dmem_wstrb;

  logic [31:0] imem [1024];
  word_t       dmem [1024];

  cov_core dut (.*);

  always #5 clk = ~clk;
  assign imem_rdata = imem[imem_addr[11:2]];
  assign dmem_rdata = dmem[dmem_addr[12:3]];

  always_ff @(posedge clk) begin
    cycle <= cycle + 1;
    if (dmem_we)
      for (int i = 0; i < 8; i++)
        if (dmem_wstrb[i]) dmem[dmem_addr[12:3]][8*i +: 8] <= dmem_wdata[8*i +: 8];
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- encoders ----------------
  function automatic logic [31:0] r_t(int f7, int rs2, int rs1, int f3, int rd, logic [6:0] opc);
    return {7'(f7), 5'(rs2), 5'(rs1), 3'(f3), 5'(rd), opc};
  endfunction
  function automatic logic [31:0] i_t(int imm, int rs1, int f3, int rd, logic [6:0] opc);
    return {12'(imm), 5'(rs1), 3'(f3), 5'(rd), opc};
  endfunction
  function automatic logic [31:0] s_t(int imm, int rs2, int rs1, int f3);
    logic [11:0] m;
    m = 12'(imm);
    return {m[11:5], 5'(rs2), 5'(rs1), 3'(f3), m[4:0], OPC_STORE};
  endfunction
  function automatic logic [31:0] b_t(int off, int rs2, int rs1, int f3);
    logic [12:0] m;
    m = 13'(off);
    return {m[12], m[10:5], 5'(rs2), 5'(rs1), 3'(f3), m[4:1], m[11], OPC_BRANCH};
  endfunction

  int pc_idx = 0;
  task automatic emit(logic [31:0] w);
    imem[pc_idx] = w;
    pc_idx++;
  endtask
  task automatic add_(int rd, int a, int b);  emit(r_t(0, b, a, 0, rd, OPC_OP));           endtask
  task automatic sub_(int rd, int a, int b);  emit(r_t(32, b, a, 0, rd, OPC_OP));          endtask
  task automatic xor_(int rd, int a, int b);  emit(r_t(0, b, a, 4, rd, OPC_OP));           endtask
  task automatic or_(int rd, int a, int b);   emit(r_t(0, b, a, 6, rd, OPC_OP));           endtask
  task automatic mul_(int rd, int a, int b);  emit(r_t(1, b, a, 0, rd, OPC_OP));           endtask
  task automatic div_(int rd, int a, int b);  emit(r_t(1, b, a, 4, rd, OPC_OP));           endtask
  task automatic addc_(int rd, int a, int b); emit(r_t(0, b, a, 0, rd, OPC_CUSTOM0));      endtask
  task automatic addi_(int rd, int a, int imm); emit(i_t(imm, a, 0, rd, OPC_OP_IMM));     endtask
  task automatic slli_(int rd, int a, int sh); emit(i_t(sh, a, 1, rd, OPC_OP_IMM));     endtask
  task automatic xori_(int rd, int a, int imm); emit(i_t(imm, a, 4, rd, OPC_OP_IMM));     endtask
  task automatic ld_(int rd, int off, int base);  emit(i_t(off, base, 3, rd, OPC_LOAD));   endtask
  task automatic ldx_(int rd, int off, int base); emit(i_t(off, base, 7, rd, OPC_LOAD));   endtask
  task automatic sd_(int rs, int off, int base);  emit(s_t(off, rs, base, 3));             endtask
  task automatic bo_(int a, int b, int off);   emit(b_t(off, b, a, 2));                    endtask
  task automatic bne_(int a, int b, int off);  emit(b_t(off, b, a, 1));                    endtask
  task automatic csrrs_(int rd, int csr, int rs); emit(i_t(csr, rs, 2, rd, OPC_SYSTEM));   endtask
  task automatic csrrw_(int rd, int csr, int rs); emit(i_t(csr, rs, 1, rd, OPC_SYSTEM));   endtask
  task automatic ebreak_(); emit(32'h0010_0073); endtask

  // data layout (byte addresses)
  localparam int TBL   = 'h000;   // 32 random words
  localparam int CONST = 'h100;   // constants
  localparam int A_ADR = 'h400, B_ADR = 'h480, R_ADR = 'h500, C_ADR = 'h580;
  localparam int RES   = 'h600;
  localparam int SAVE  = 'h700;

  function automatic word_t rnd64();
    return {$urandom(), $urandom()};
  endfunction

  // ---------------- mechanism counters ----------------
  int n_addc = 0, n_addc_cin = 0, n_bo_taken = 0, n_bo_not = 0, n_add_ovf = 0;
  int n_st_flags = 0, n_se_read = 0, n_le_write = 0, n_ldx_flag = 0, n_md_flag = 0;
  int loop_start_cycle = -1, loop_end_cycle = -1;
  int loop_pc = 0, loop_exit_pc = 0, save_pc = 0;
  xreg_t snap [32];

  always @(posedge clk) begin
    if (rst_n && dut.en) begin
      if (dut.dec.legal && imem_rdata[6:0] == OPC_CUSTOM0) begin
        n_addc++;
        if (dut.rs2_v.carry) n_addc_cin++;
      end
      if (dut.dec.is_branch && dut.dec.br_op == BR_BO) begin
        if (dut.br_taken) n_bo_taken++; else n_bo_not++;
      end
      if (dut.dec.reg_write && dut.dec.wb_sel == WB_ALU && dut.dec.alu_op == ALU_ADD && dut.wb_v.ovf)
        n_add_ovf++;
      if (dut.dec.is_store && (dut.rs2_v.carry || dut.rs2_v.ovf)) n_st_flags++;
      if (dut.dec.is_csr && dut.dec.csr_addr == CSR_STOREEXTRA) n_se_read++;
      if (dut.dec.is_csr && dut.dec.csr_addr == CSR_LOADEXTRA) n_le_write++;
      if (dut.dec.is_ldx && (dut.wb_v.carry || dut.wb_v.ovf)) n_ldx_flag++;
      if (dut.dec.wb_sel == WB_MD && (dut.wb_v.carry || dut.wb_v.ovf)) n_md_flag++;
      if (imem_addr == 64'(loop_pc) && loop_start_cycle < 0) loop_start_cycle = cycle;
      if (imem_addr == 64'(loop_exit_pc) && loop_end_cycle < 0) loop_end_cycle = cycle;
      if (imem_addr == 64'(save_pc))
        for (int i = 0; i < 32; i++) snap[i] = (i == 0) ? XREG_ZERO : dut.u_rf.regs[i];
    end
  end

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    word_t a_w [16], b_w [16], sa [2], sb [2];
    logic [64:0] acc;
    logic [64:0] sacc;
    int patch;
    xreg_t r;

    for (int i = 0; i < 1024; i++) begin imem[i] = 32'h0000_0013; dmem[i] = '0; end
    for (int i = 0; i < 32; i++) dmem[TBL/8 + i] = rnd64();
    dmem[CONST/8 + 0] = 64'h0123_4567_89AB_CDEF;     // big factor
    dmem[CONST/8 + 1] = 64'h7FFF_FFFF_FFFF_FFFF;     // max positive
    dmem[CONST/8 + 2] = 64'd1;
    for (int i = 0; i < 16; i++) begin
      a_w[i] = rnd64(); b_w[i] = rnd64();
      if (i == 3) begin a_w[i] = '1; end             // force carry runs
      dmem[A_ADR/8 + i] = a_w[i]; dmem[B_ADR/8 + i] = b_w[i];
    end
    for (int i = 0; i < 2; i++) begin
      sa[i] = rnd64(); sb[i] = rnd64();
      dmem[CONST/8 + 4 + i] = sa[i]; dmem[CONST/8 + 6 + i] = sb[i];
    end

    // ---- 1. mul/div flags ----
    ld_(5, CONST, 0);
    mul_(6, 5, 5);              // overflows: carry and overflow set
    addc_(7, 0, 6);             // x7 = carry of x6
    sd_(7, RES + 0, 0);
    div_(8, 5, 0);              // division by zero: carry set
    addc_(9, 0, 8);
    sd_(9, RES + 8, 0);
    // a carry saved as a 0/1 word comes back into a carry bit by adding -1
    ld_(21, CONST + 16, 0);     // 1
    addi_(21, 21, -1);          // 1 + (2^64-1): carry set
    addc_(22, 0, 21);
    sd_(22, RES + 64, 0);
    addi_(23, 0, -1);           // 0 + (2^64-1): carry clear
    addc_(24, 0, 23);
    sd_(24, RES + 72, 0);
    // branch on carry without a dedicated instruction: or the two registers
    // (the or keeps their flags), turn the carry into a word, test it
    addi_(25, 0, 5);            // no carry
    or_(26, 25, 21);            // x21 carries: the or does too
    addc_(26, 0, 26);
    bne_(26, 0, 8);             // taken, skips the next store
    sd_(22, RES + 80, 0);       // skipped
    or_(27, 25, 23);            // neither carries
    addc_(27, 0, 27);
    bne_(27, 0, 8);             // not taken
    sd_(22, RES + 88, 0);       // executed: marker 1
    // shift-left flags: a one shifted out sets carry, and overflow too when
    // it differs from the new sign bit
    slli_(28, 22, 63);          // x28 = MIN; only zeros lost, no carry
    slli_(28, 28, 1);           // lost bit 1, result sign 0: carry and overflow
    addc_(30, 0, 28);
    sd_(30, RES + 96, 0);
    bo_(28, 0, 8);              // taken, skips the next store
    sd_(22, RES + 104, 0);      // skipped
    // ---- 2. overflow checks with bo ----
    ld_(10, CONST + 8, 0);      // max positive
    ld_(11, CONST + 16, 0);     // 1
    add_(12, 10, 11);           // signed overflow
    add_(13, 11, 11);           // no overflow
    bo_(13, 0, 8);              // not taken
    sd_(11, RES + 16, 0);       // executed: marker 1
    bo_(12, 13, 8);             // taken, skips the next store
    sd_(11, RES + 24, 0);       // skipped
    sd_(11, RES + 32, 0);       // overflow handler: marker 1
    // ---- 3. 128-bit subtraction b - a with carry-in 1 ----
    sub_(15, 0, 0);             // 0 - 0: no borrow, carry = 1
    ld_(16, CONST + 32, 0); ld_(17, CONST + 48, 0);
    xori_(18, 16, -1); add_(18, 17, 18); addc_(18, 18, 15); sd_(18, RES + 40, 0);
    ld_(16, CONST + 40, 0); ld_(17, CONST + 56, 0);
    xori_(19, 16, -1); add_(19, 17, 19); addc_(19, 19, 18); sd_(19, RES + 48, 0);
    addc_(20, 0, 19); sd_(20, RES + 56, 0);
    // ---- 4. 1024-bit addition, unrolled by two ----
    addi_(10, 0, R_ADR); addi_(11, 0, A_ADR); addi_(12, 0, B_ADR);
    addi_(13, 0, 16); addi_(6, 0, 0);
    loop_pc = pc_idx * 4;
    ld_(14, 0, 11); ld_(16, 0, 12); addi_(13, 13, -2); addi_(11, 11, 16);
    add_(29, 14, 16); addc_(29, 29, 6); sd_(29, 0, 10);
    ld_(15, -8, 11); ld_(17, 8, 12); addi_(12, 12, 16); addi_(10, 10, 16);
    add_(6, 15, 17); addc_(6, 6, 29); sd_(6, -8, 10);
    bne_(13, 0, loop_pc - pc_idx * 4);
    loop_exit_pc = pc_idx * 4;
    addc_(7, 0, 6); sd_(7, 0, 10);
    // ---- 5. context switch ----
    for (int i = 1; i < 32; i++) if (i != 2) ld_(i, TBL + 8 * i, 0);
    for (int i = 1; i < 32; i++) if (i != 2) add_(i, i, i);   // assorted flags
    addi_(2, 0, SAVE);
    save_pc = pc_idx * 4;
    for (int i = 1; i < 32; i++) sd_(i, 8 * i, 2);
    csrrs_(1, int'(CSR_STOREEXTRA), 0);
    sd_(1, 256, 2);
    for (int i = 1; i < 32; i++) if (i != 2) xor_(i, i, i);
    ld_(1, 256, 2);
    csrrw_(0, int'(CSR_LOADEXTRA), 1);
    for (int i = 1; i < 32; i++) if (i != 2) ldx_(i, 8 * i, 2);
    ldx_(2, 16, 2);
    ebreak_();
    patch = pc_idx;

    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (halted);
    @(negedge clk);
    $display("program of %0d instructions halted after %0d cycles", patch, cycle);

    chk("halted by ebreak, not illegal", !illegal);
    chk("mul carry reified", dmem[RES/8 + 0] == 64'd1);
    chk("div by zero carry reified", dmem[RES/8 + 1] == 64'd1);
    chk("carry restored by adding -1", dmem[RES/8 + 8] == 64'd1);
    chk("no carry from 0 + -1", dmem[RES/8 + 9] == 64'd0);
    chk("branch on carry taken", dmem[RES/8 + 10] == 64'd0);
    chk("branch on carry not taken", dmem[RES/8 + 11] == 64'd1);
    chk("slli carry", dmem[RES/8 + 12] == 64'd1);
    chk("slli overflow taken by bo", dmem[RES/8 + 13] == 64'd0);
    chk("bo not taken", dmem[RES/8 + 2] == 64'd1);
    chk("bo taken skips", dmem[RES/8 + 3] == 64'd0);
    chk("overflow handler reached", dmem[RES/8 + 4] == 64'd1);
    // 128-bit subtraction reference
    sacc = {1'b0, sb[0]} + {1'b0, ~sa[0]} + 65'd1;
    chk("sub word 0", dmem[RES/8 + 5] == sacc[63:0]);
    sacc = {1'b0, sb[1]} + {1'b0, ~sa[1]} + {64'd0, sacc[64]};
    chk("sub word 1", dmem[RES/8 + 6] == sacc[63:0]);
    chk("sub final carry (no borrow)", dmem[RES/8 + 7] == {63'd0, ({sb[1], sb[0]} >= {sa[1], sa[0]})});
    // 1024-bit addition reference
    acc = '0;
    for (int i = 0; i < 16; i++) begin
      acc = {1'b0, a_w[i]} + {1'b0, b_w[i]} + {64'd0, acc[64]};
      chk($sformatf("sum word %0d", i), dmem[R_ADR/8 + i] == acc[63:0]);
    end
    chk("sum final carry", dmem[C_ADR/8] == {63'd0, acc[64]});
    chk("addc loop: 15 cycles per two words",
        (loop_end_cycle - loop_start_cycle) == 8 * 15);
    $display("1024-bit add loop: %0d cycles", loop_end_cycle - loop_start_cycle);
    // context switch restore
    for (int i = 1; i < 32; i++) begin
      r = dut.u_rf.regs[i];
      chk($sformatf("x%0d restored with flags", i), r === snap[i]);
    end

    $display("addc %0d (carry-in %0d), bo taken %0d not %0d, add overflow %0d",
             n_addc, n_addc_cin, n_bo_taken, n_bo_not, n_add_ovf);
    $display("stores with flags %0d, storeextra reads %0d, loadextra writes %0d, ldx flags %0d, mul/div flags %0d",
             n_st_flags, n_se_read, n_le_write, n_ldx_flag, n_md_flag);
    chk("mechanism: addc", n_addc > 0);
    chk("mechanism: addc with carry-in", n_addc_cin > 0);
    chk("mechanism: bo taken", n_bo_taken > 0);
    chk("mechanism: bo not taken", n_bo_not > 0);
    chk("mechanism: add overflow", n_add_ovf > 0);
    chk("mechanism: store records flags", n_st_flags > 0);
    chk("mechanism: storeextra read", n_se_read > 0);
    chk("mechanism: loadextra write", n_le_write > 0);
    chk("mechanism: ldx restores flags", n_ldx_flag > 0);
    chk("mechanism: mul/div flags", n_md_flag > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
