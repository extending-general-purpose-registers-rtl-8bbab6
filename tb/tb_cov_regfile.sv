// tb_cov_regfile: self-checking test of cov_regfile.
//
// Writes random 66-bit values (data, carry, overflow) to random registers,
// including x0, and compares both read ports every cycle against a shadow
// array; x0 must always read as zero with both flags clear.
module tb_cov_regfile;
  import cov_pkg::*;

  int checks = 0, failures = 0;
  int x0_writes = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  regidx_t ra1, ra2, wa;
  xreg_t rd1, rd2, wd;
  logic we;
  xreg_t shadow [NREGS];

  cov_regfile dut (.clk, .rst_n, .ra1, .rd1, .ra2, .rd2, .we, .wa, .wd);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(xreg_t got, xreg_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL got %h exp %h", got, exp);
    end
  endtask

  initial begin
    we = 0; wa = '0; wd = XREG_ZERO; ra1 = '0; ra2 = '0;
    for (int i = 0; i < NREGS; i++) shadow[i] = XREG_ZERO;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      we = 1'($urandom());
      wa = 5'($urandom());
      wd = '{ovf: 1'($urandom()), carry: 1'($urandom()), data: {$urandom(), $urandom()}};
      ra1 = 5'($urandom()); ra2 = 5'($urandom());
      #1;
      check(rd1, shadow[ra1]);
      check(rd2, shadow[ra2]);
      @(posedge clk);
      if (we && wa != 0) shadow[wa] = wd;
      if (we && wa == 0) x0_writes++;
    end
    checks++;
    if (x0_writes == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
