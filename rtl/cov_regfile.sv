// cov_regfile: general-purpose register file with carry and overflow bits.
//
// Holds 31 writable registers x1..x31 of 66 bits each (64 data bits, carry,
// overflow); x0 is not stored and always reads as zero with carry and overflow
// clear, as the extension requires. Two asynchronous read ports serve rs1 and
// rs2; one write port is written on the rising clock edge when we is high and
// the index is not 0. The whole 66-bit value is written together, so data and
// flags can never get out of step.
//
// Timing: reads are combinational (write-then-read in the same cycle returns
// the old value; the single-cycle core does not need a bypass). Reset clears
// all registers, which is this design's choice.
module cov_regfile
  import cov_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  regidx_t ra1,
  output xreg_t   rd1,
  input  regidx_t ra2,
  output xreg_t   rd2,
  input  logic    we,
  input  regidx_t wa,
  input  xreg_t   wd
);

  xreg_t regs [1:NREGS-1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 1; i < NREGS; i++) regs[i] <= XREG_ZERO;
    end else if (we && wa != '0) begin
      regs[wa] <= wd;
    end
  end

  always_comb begin
    rd1 = (ra1 == '0) ? XREG_ZERO : regs[ra1];
    rd2 = (ra2 == '0) ? XREG_ZERO : regs[ra2];
  end

endmodule
