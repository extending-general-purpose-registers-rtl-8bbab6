// tb_cov_branch: self-checking test of cov_branch.
//
// Random operands with random flag bits for every branch condition. The
// compare-and-branch conditions must depend on the data bits only; bo must
// be taken exactly when either operand's overflow bit is set, whatever the
// data and carry bits are.
module tb_cov_branch;
  import cov_pkg::*;

  int checks = 0, failures = 0;
  int bo_taken = 0, bo_not = 0;
  br_op_e op;
  xreg_t a, b;
  logic taken;

  cov_branch dut (.op, .a, .b, .taken);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic ref_taken(br_op_e o, xreg_t x, xreg_t z);
    logic signed [64:0] dx, dz;
    dx = $signed({x.data[63], x.data}) ; dz = $signed({z.data[63], z.data});
    case (o)
      BR_EQ:  return x.data == z.data;
      BR_NE:  return x.data != z.data;
      BR_LT:  return (dx - dz) < 0;
      BR_GE:  return (dx - dz) >= 0;
      BR_LTU: return {1'b0, x.data} - {1'b0, z.data} > {1'b0, x.data};
      BR_GEU: return !({1'b0, x.data} - {1'b0, z.data} > {1'b0, x.data});
      BR_BO:  return (x.ovf == 1'b1) || (z.ovf == 1'b1);
      default: return 1'b0;
    endcase
  endfunction

  initial begin
    for (int k = 0; k <= int'(BR_BO); k++) begin
      for (int i = 0; i < 3000; i++) begin
        op = br_op_e'(k);
        a = '{ovf: 1'($urandom()), carry: 1'($urandom()), data: {$urandom(), $urandom()}};
        b = '{ovf: 1'($urandom()), carry: 1'($urandom()), data: {$urandom(), $urandom()}};
        if ($urandom_range(0, 3) == 0) b.data = a.data;
        if ($urandom_range(0, 3) == 0) b.data[63] = a.data[63];
        #1;
        checks++;
        if (taken !== ref_taken(op, a, b)) begin
          failures++;
          if (failures < 10) $display("FAIL %s a=%h b=%h taken=%b", op.name(), a, b, taken);
        end
        if (op == BR_BO && taken) bo_taken++;
        if (op == BR_BO && !taken) bo_not++;
      end
    end
    checks++;
    if (bo_taken == 0 || bo_not == 0) failures++;
    $display("bo taken %0d, not taken %0d", bo_taken, bo_not);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
