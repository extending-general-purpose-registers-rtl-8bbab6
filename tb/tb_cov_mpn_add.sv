// tb_cov_mpn_add: 1024-bit multi-word addition on cov_core, two ways.
//
// Adds two 16-word (1024-bit) numbers with the two-words-per-iteration loop
// of a multi-precision add routine, once using add/addc:
//   ld a4,0(a1); ld a6,0(a2); addi a3,a3,-2; addi a1,a1,16;
//   add t4,a4,a6; addc t4,t4,t1; sd t4,0(a0);
//   ld a5,-8(a1); ld a7,8(a2); addi a2,a2,16; addi a0,a0,16;
//   add t1,a5,a7; addc t1,t1,t4; sd t1,-8(a0); bnez a3,loop
// and once with the plain RV64 idiom that rebuilds each carry with two sltu
// and two extra adds (21 instructions per iteration). Both sums and the
// final carry (made a 0/1 word with "addc rd, x0, rs" in the first variant,
// kept in t6 in the second) are compared with the exact sum; the loops must
// take 8 x 15 = 120 and 8 x 21 = 168 cycles, a saving of 48 instructions.
module tb_cov_mpn_add;
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

  localparam int A_ADR = 'h000, B_ADR = 'h080, R_ADR = 'h100;
  localparam int A0 = 10, A1 = 11, A2 = 12, A3 = 13, A4 = 14, A5 = 15, A6 = 16, A7 = 17;
  localparam int T0 = 5, T1 = 6, T2 = 7, T3 = 28, T4 = 29, T6 = 31;

  int loop_pc = 0, loop_end = 0, loop_cycles = 0, addc_cin = 0;

  always @(posedge clk)
    if (rst_n && dut.en) begin
      if (imem_addr >= 64'(loop_pc) && imem_addr < 64'(loop_end)) loop_cycles++;
      if (imem_rdata[6:0] == OPC_CUSTOM0 && dut.rs2_v.carry) addc_cin++;
    end

  task automatic add_(int rd, int a, int b);  emit(r_t(0, b, a, 0, rd, OPC_OP));      endtask
  task automatic sltu_(int rd, int a, int b); emit(r_t(0, b, a, 3, rd, OPC_OP));      endtask
  task automatic addc_(int rd, int a, int b); emit(r_t(0, b, a, 0, rd, OPC_CUSTOM0)); endtask
  task automatic addi_(int rd, int a, int k); emit(i_t(k, a, 0, rd, OPC_OP_IMM));     endtask
  task automatic ld_(int rd, int k, int a);   emit(i_t(k, a, 3, rd, OPC_LOAD));       endtask
  task automatic sd_(int rs, int k, int a);   emit(s_t(k, rs, a));                    endtask

  task automatic build(logic use_addc);
    pc_idx = 0;
    for (int i = 0; i < 256; i++) imem[i] = 32'h0000_0013;
    addi_(A0, 0, R_ADR); addi_(A1, 0, A_ADR); addi_(A2, 0, B_ADR); addi_(A3, 0, 16);
    addi_(T1, 0, 0); addi_(T6, 0, 0);
    loop_pc = pc_idx * 4;
    ld_(A4, 0, A1); ld_(A6, 0, A2); addi_(A3, A3, -2); addi_(A1, A1, 16);
    if (use_addc) begin
      add_(T4, A4, A6); addc_(T4, T4, T1); sd_(T4, 0, A0);
    end else begin
      add_(T0, A4, A6); sltu_(T2, T0, A4); add_(T4, T0, T6); sltu_(T3, T4, T0);
      sd_(T4, 0, A0); add_(T6, T2, T3);
    end
    ld_(A5, -8, A1); ld_(A7, 8, A2); addi_(A2, A2, 16); addi_(A0, A0, 16);
    if (use_addc) begin
      add_(T1, A5, A7); addc_(T1, T1, T4); sd_(T1, -8, A0);
    end else begin
      add_(T1, A5, A7); sltu_(T2, T1, A5); add_(T4, T1, T6); sltu_(T3, T4, T1);
      sd_(T4, -8, A0); add_(T6, T2, T3);
    end
    emit(bne_t(loop_pc - pc_idx * 4, A3));
    loop_end = pc_idx * 4;
    if (use_addc) begin
      addc_(T2, 0, T1); sd_(T2, 0, A0);
    end else begin
      sd_(T6, 0, A0);
    end
    emit(32'h0010_0073);                          // ebreak
  endtask

  initial begin
    word_t a [16], b [16];
    logic [64:0] acc;
    int cyc [2];

    for (int i = 0; i < 128; i++) dmem[i] = '0;
    for (int i = 0; i < 16; i++) begin
      a[i] = {$urandom(), $urandom()};
      b[i] = {$urandom(), $urandom()};
      if (i >= 5 && i <= 7) a[i] = ~b[i];            // carry ripples through
      if (i == 15) a[i] = '1;
      dmem[A_ADR/8 + i] = a[i]; dmem[B_ADR/8 + i] = b[i];
    end

    for (int pass = 0; pass < 2; pass++) begin
      build(pass == 0);
      for (int i = 0; i < 17; i++) dmem[R_ADR/8 + i] = '1;
      loop_cycles = 0;
      rst_n = 1'b0;
      repeat (3) @(posedge clk);
      @(negedge clk) rst_n = 1'b1;
      wait (halted);
      @(negedge clk);
      checks++;
      if (illegal) failures++;
      acc = '0;
      for (int i = 0; i < 16; i++) begin
        acc = {1'b0, a[i]} + {1'b0, b[i]} + {64'd0, acc[64]};
        checks++;
        if (dmem[R_ADR/8 + i] !== acc[63:0]) begin
          failures++;
          $display("FAIL pass %0d sum word %0d: got %h exp %h", pass, i, dmem[R_ADR/8 + i], acc[63:0]);
        end
      end
      checks++;
      if (dmem[R_ADR/8 + 16] !== {63'd0, acc[64]}) begin
        failures++;
        $display("FAIL pass %0d carry out", pass);
      end
      cyc[pass] = loop_cycles;
    end

    $display("1024-bit add loop: %0d cycles with addc, %0d with sltu; %0d addc with carry-in",
             cyc[0], cyc[1], addc_cin);
    checks++;
    if (cyc[0] != 8 * 15) failures++;
    checks++;
    if (cyc[1] - cyc[0] != 48) failures++;
    checks++;
    if (addc_cin == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
