// tb_cov_mpn_mul: 1024 x 1024-bit multiplication on cov_core.
//
// Multiplies two 16-word (1024-bit) numbers as 16 multiply-accumulate rows.
// Each row adds u[0..15] * v[j] into the result with the addc form of the
// inner loop:
//   ld a7,0(a1); addi a1,a1,8; ld a4,0(a0); addi a0,a0,8; mul a5,a7,a3;
//   addi a2,a2,-1; mulhu a7,a7,a3; add a5,a5,a4; add a6,a6,a5;
//   addc a4,a7,a5; sd a6,-8(a0); addc a6,a4,a6; bnez a2,loop
// a6 is the running carry word: the carries of the two adds are picked up
// by the two addc instructions, no sltu is needed. The 2048-bit result is
// compared with a schoolbook product computed in the testbench with 128-bit
// arithmetic, and the inner loop must take exactly 13 cycles per word
// (256 iterations) on the single-cycle core.
// The same multiplication is then run with the plain RV64 inner loop, which
// recovers each carry with sltu and needs 15 instructions per word; it must
// give the same product and take 2 x 256 = 512 more inner-loop cycles.
module tb_cov_mpn_mul;
  import cov_pkg::*;

  int checks = 0, failures = 0;
  int cycle = 0;
  logic clk = 1'b0, rst_n = 1'b0;

  word_t       imem_addr, dmem_addr, dmem_wdata, dmem_rdata;
  logic [31:0] imem_rdata;
  logic        dmem_req, dmem_we, halted, illegal, retire;
  logic [7:0]  dmem_wstrb;

  logic [31:0] imem [256];
  word_t       dmem [128];

  cov_core dut (.*);

  always #5 clk = ~clk;
  assign imem_rdata = imem[imem_addr[9:2]];
  assign dmem_rdata = dmem[dmem_addr[9:3]];

  always_ff @(posedge clk) begin
    cycle <= cycle + 1;
    if (dmem_we)
      for (int i = 0; i < 8; i++)
        if (dmem_wstrb[i]) dmem[dmem_addr[9:3]][8*i +: 8] <= dmem_wdata[8*i +: 8];
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] r_t(int f7, int rs2, int rs1, int f3, int rd, logic [6:0] opc);
    return {7'(f7), 5'(rs2), 5'(rs1), 3'(f3), 5'(rd), opc};
  endfunction
  function automatic logic [31:0] i_t(int imm, int rs1, int f3, int rd, logic [6:0] opc);
    return {12'(imm), 5'(rs1), 3'(f3), 5'(rd), opc};
  endfunction
  function automatic logic [31:0] s_t(int imm, int rs2, int rs1);
    logic [11:0] m;
    m = 12'(imm);
    return {m[11:5], 5'(rs2), 5'(rs1), 3'd3, m[4:0], OPC_STORE};
  endfunction
  function automatic logic [31:0] bne_t(int off, int rs1);
    logic [12:0] m;
    m = 13'(off);
    return {m[12], m[10:5], 5'd0, 5'(rs1), 3'd1, m[4:1], m[11], OPC_BRANCH};
  endfunction

  int pc_idx = 0;
  task automatic emit(logic [31:0] w);
    imem[pc_idx] = w;
    pc_idx++;
  endtask

  localparam int U = 'h000, V = 'h080, R = 'h100;
  localparam int A0 = 10, A1 = 11, A2 = 12, A3 = 13, A4 = 14, A5 = 15, A6 = 16, A7 = 17;
  localparam int ROW = 8, RP = 9, VP = 18;

  int inner_pc = 0, inner_end = 0, inner_cycles = 0, addc_cin = 0;

  always @(posedge clk)
    if (rst_n && dut.en) begin
      if (imem_addr >= 64'(inner_pc) && imem_addr < 64'(inner_end)) inner_cycles++;
      if (imem_rdata[6:0] == OPC_CUSTOM0 && dut.rs2_v.carry) addc_cin++;
    end

  // Program: 16 rows of "result[j..j+16] += u * v[j]".
  task automatic build(logic use_addc);
    int outer_pc;
    pc_idx = 0;
    for (int i = 0; i < 256; i++) imem[i] = 32'h0000_0013;
    emit(i_t(R, 0, 0, RP, OPC_OP_IMM));
    emit(i_t(V, 0, 0, VP, OPC_OP_IMM));
    emit(i_t(16, 0, 0, ROW, OPC_OP_IMM));
    outer_pc = pc_idx * 4;
    emit(i_t(0, VP, 3, A3, OPC_LOAD));            // ld a3, 0(vp)
    emit(i_t(0, RP, 0, A0, OPC_OP_IMM));          // a0 = rp
    emit(i_t(U, 0, 0, A1, OPC_OP_IMM));           // a1 = u
    emit(i_t(16, 0, 0, A2, OPC_OP_IMM));          // a2 = 16
    emit(i_t(0, 0, 0, A6, OPC_OP_IMM));           // a6 = 0
    inner_pc = pc_idx * 4;
    emit(i_t(0, A1, 3, A7, OPC_LOAD));            // ld a7,0(a1)
    emit(i_t(8, A1, 0, A1, OPC_OP_IMM));          // addi a1,a1,8
    emit(i_t(0, A0, 3, A4, OPC_LOAD));            // ld a4,0(a0)
    emit(i_t(8, A0, 0, A0, OPC_OP_IMM));          // addi a0,a0,8
    emit(r_t(1, A3, A7, 0, A5, OPC_OP));          // mul a5,a7,a3
    emit(i_t(-1, A2, 0, A2, OPC_OP_IMM));         // addi a2,a2,-1
    emit(r_t(1, A3, A7, 3, A7, OPC_OP));          // mulhu a7,a7,a3
    emit(r_t(0, A4, A5, 0, A5, OPC_OP));          // add a5,a5,a4
    emit(r_t(0, A5, A6, 0, A6, OPC_OP));          // add a6,a6,a5
    if (use_addc) begin
      emit(r_t(0, A5, A7, 0, A4, OPC_CUSTOM0));   // addc a4,a7,a5
      emit(s_t(-8, A6, A0));                      // sd a6,-8(a0)
      emit(r_t(0, A6, A4, 0, A6, OPC_CUSTOM0));   // addc a6,a4,a6
    end else begin
      emit(r_t(0, A4, A5, 3, A4, OPC_OP));        // sltu a4,a5,a4
      emit(r_t(0, A7, A4, 0, A4, OPC_OP));        // add a4,a4,a7
      emit(r_t(0, A5, A6, 3, A5, OPC_OP));        // sltu a5,a6,a5
      emit(s_t(-8, A6, A0));                      // sd a6,-8(a0)
      emit(r_t(0, A5, A4, 0, A6, OPC_OP));        // add a6,a4,a5
    end
    emit(bne_t(inner_pc - pc_idx * 4, A2));       // bnez a2, loop
    inner_end = pc_idx * 4;
    emit(s_t(0, A6, A0));                         // top word of the row
    emit(i_t(8, RP, 0, RP, OPC_OP_IMM));
    emit(i_t(8, VP, 0, VP, OPC_OP_IMM));
    emit(i_t(-1, ROW, 0, ROW, OPC_OP_IMM));
    emit(bne_t(outer_pc - pc_idx * 4, ROW));
    emit(32'h0010_0073);                          // ebreak
  endtask

  initial begin
    word_t u [16], v [16], r [32];
    logic [127:0] t;
    int cyc_addc, cyc_base;

    for (int i = 0; i < 128; i++) dmem[i] = '0;
    for (int i = 0; i < 16; i++) begin
      u[i] = {$urandom(), $urandom()};
      v[i] = {$urandom(), $urandom()};
      if (i == 15) begin u[i] = '1; v[i] = '1; end   // make carries frequent
      dmem[U/8 + i] = u[i]; dmem[V/8 + i] = v[i];
    end

    // reference: schoolbook product with 128-bit partial sums
    for (int i = 0; i < 32; i++) r[i] = '0;
    for (int j = 0; j < 16; j++) begin
      logic [63:0] c;
      c = '0;
      for (int i = 0; i < 16; i++) begin
        t = {64'd0, u[i]} * {64'd0, v[j]} + {64'd0, r[i + j]} + {64'd0, c};
        r[i + j] = t[63:0];
        c = t[127:64];
      end
      r[j + 16] = c;
    end

    cyc_addc = 0; cyc_base = 0;
    for (int pass = 0; pass < 2; pass++) begin
      build(pass == 0);
      for (int i = 0; i < 32; i++) dmem[R/8 + i] = '0;
      inner_cycles = 0;
      rst_n = 1'b0;
      repeat (3) @(posedge clk);
      @(negedge clk) rst_n = 1'b1;
      wait (halted);
      @(negedge clk);
      checks++;
      if (illegal) failures++;
      for (int i = 0; i < 32; i++) begin
        checks++;
        if (dmem[R/8 + i] !== r[i]) begin
          failures++;
          $display("FAIL pass %0d product word %0d: got %h exp %h", pass, i, dmem[R/8 + i], r[i]);
        end
      end
      if (pass == 0) cyc_addc = inner_cycles; else cyc_base = inner_cycles;
    end

    $display("1024x1024 multiply inner loop: %0d cycles with addc, %0d with sltu; %0d addc with carry-in",
             cyc_addc, cyc_base, addc_cin);
    checks++;
    if (cyc_addc != 16 * 16 * 13) begin
      failures++;
      $display("FAIL addc inner loop cycles %0d, expected %0d", cyc_addc, 16 * 16 * 13);
    end
    checks++;
    if (cyc_base - cyc_addc != 2 * 256) begin
      failures++;
      $display("FAIL saving %0d cycles, expected 512", cyc_base - cyc_addc);
    end
    checks++;
    if (addc_cin == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
