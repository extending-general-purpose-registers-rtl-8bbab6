// cov_branch: branch-condition unit, including the new bo instruction.
//
// Combinational. The RV64 compare-and-branch conditions (beq, bne, blt, bge,
// bltu, bgeu) compare only the 64 data bits; as for every existing
// instruction, the carry and overflow bits are not inputs. The new branch bo
// is taken when the overflow bit of rs1 or the overflow bit of rs2 is set,
// so one branch can check two results for overflow; working out which one
// overflowed is left to the slow path. Target calculation is in the core.
module cov_branch
  import cov_pkg::*;
(
  input  br_op_e op,
  input  xreg_t  a,
  input  xreg_t  b,
  output logic   taken
);

  always_comb begin
    unique case (op)
      BR_EQ:   taken = (a.data == b.data);
      BR_NE:   taken = (a.data != b.data);
      BR_LT:   taken = ($signed(a.data) <  $signed(b.data));
      BR_GE:   taken = ($signed(a.data) >= $signed(b.data));
      BR_LTU:  taken = (a.data <  b.data);
      BR_GEU:  taken = (a.data >= b.data);
      BR_BO:   taken = a.ovf | b.ovf;
      default: taken = 1'b0;
    endcase
  end

endmodule
