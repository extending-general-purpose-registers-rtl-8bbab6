// tb_cov_alu: self-checking test of cov_alu.
//
// Drives random and corner-case operands through every ALU operation and
// compares data, carry and overflow with a reference written differently
// from the RTL (carry from unsigned comparisons, overflow from sign rules,
// shift flags from arithmetic right shifts). It also checks the intended use
// of addc: "add r3,r1,r2; addc r3,r3,r4" must give the exact 65-bit unsigned
// sum r1+r2+carry(r4) and flag exactly the signed overflows of that sum.
module tb_cov_alu;
  import cov_pkg::*;

  int checks = 0, failures = 0;
  alu_op_e op;
  xreg_t   a, b, y;
  // second ALU for the add/addc chain
  xreg_t   y2, cin_reg;

  cov_alu dut  (.op(op), .a(a), .b(b), .y(y));
  cov_alu dut2 (.op(ALU_ADDC), .a(y), .b(cin_reg), .y(y2));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic xreg_t ref_model(alu_op_e o, xreg_t x, xreg_t z);
    xreg_t r;
    logic [63:0] s;
    logic [31:0] s32;
    int sh;
    r = XREG_ZERO;
    case (o)
      ALU_ADD: begin
        s = x.data + z.data;
        r.data = s; r.carry = (s < x.data);
        r.ovf = (x.data[63] == z.data[63]) && (s[63] != x.data[63]);
      end
      ALU_SUB: begin
        s = x.data - z.data;
        r.data = s; r.carry = (x.data >= z.data);
        r.ovf = (x.data[63] != z.data[63]) && (s[63] != x.data[63]);
      end
      ALU_AND: r = x & z;
      ALU_OR:  r = x | z;
      ALU_XOR: r = x ^ z;
      ALU_SLL: begin
        sh = int'(z.data[5:0]);
        r.data = x.data << sh;
        r.carry = (sh != 0) && ((x.data >> (64 - sh)) != 0);
        s = $signed(x.data) >>> (63 - sh);
        r.ovf = (s != '0) && (s != '1);
      end
      ALU_SRL:  r.data = x.data >> z.data[5:0];
      ALU_SRA:  r.data = $signed(x.data) >>> z.data[5:0];
      ALU_SLT:  r.data = ($signed(x.data) < $signed(z.data)) ? 64'd1 : 64'd0;
      ALU_SLTU: r.data = (x.data < z.data) ? 64'd1 : 64'd0;
      ALU_ADDW: begin
        s32 = x.data[31:0] + z.data[31:0];
        r.data = {{32{s32[31]}}, s32}; r.carry = (s32 < x.data[31:0]);
        r.ovf = (x.data[31] == z.data[31]) && (s32[31] != x.data[31]);
      end
      ALU_SUBW: begin
        s32 = x.data[31:0] - z.data[31:0];
        r.data = {{32{s32[31]}}, s32}; r.carry = (x.data[31:0] >= z.data[31:0]);
        r.ovf = (x.data[31] != z.data[31]) && (s32[31] != x.data[31]);
      end
      ALU_SLLW: begin
        sh = int'(z.data[4:0]);
        s32 = x.data[31:0] << sh;
        r.data = {{32{s32[31]}}, s32};
        r.carry = (sh != 0) && ((x.data[31:0] >> (32 - sh)) != 0);
        s32 = $signed(x.data[31:0]) >>> (31 - sh);
        r.ovf = (s32 != '0) && (s32 != '1);
      end
      ALU_SRLW: begin s32 = x.data[31:0] >> z.data[4:0]; r.data = {{32{s32[31]}}, s32}; end
      ALU_SRAW: begin s32 = $signed(x.data[31:0]) >>> z.data[4:0]; r.data = {{32{s32[31]}}, s32}; end
      ALU_ADDC: begin
        // {t, d} is the 65-bit signed value, {c, d} the unsigned one
        logic t, wrap;
        wrap   = z.carry && (x.data == '1);
        r.data = x.data + {63'd0, z.carry};
        r.carry = x.carry ^ wrap;
        t = (x.data[63] ^ x.ovf) ^ wrap;
        r.ovf = t ^ r.data[63];
      end
      ALU_ADDNF: r.data = x.data + z.data;
      default: r = XREG_ZERO;
    endcase
    return r;
  endfunction

  function automatic word_t rnd64();
    word_t w;
    w = {$urandom(), $urandom()};
    case ($urandom_range(0, 7))
      0: w = '0;
      1: w = '1;
      2: w = 64'h8000_0000_0000_0000;
      3: w = 64'h7fff_ffff_ffff_ffff;
      4: w = {32'h0, $urandom()};
      5: w = {{32{w[31]}}, w[31:0]};
      default: ;
    endcase
    return w;
  endfunction

  task automatic check(string what, xreg_t got, xreg_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s op=%s a=%h b=%h got=%b/%b/%h exp=%b/%b/%h", what, op.name(),
                 a, b, got.ovf, got.carry, got.data, exp.ovf, exp.carry, exp.data);
    end
  endtask

  int n_c = 0, n_v = 0;

  initial begin
    alu_op_e ops[$];
    logic [64:0] exact_u;
    logic signed [65:0] exact_s;
    ops = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_SLL, ALU_SRL, ALU_SRA,
            ALU_SLT, ALU_SLTU, ALU_ADDW, ALU_SUBW, ALU_SLLW, ALU_SRLW, ALU_SRAW,
            ALU_ADDC, ALU_ADDNF};
    cin_reg = XREG_ZERO;

    foreach (ops[k]) begin
      for (int i = 0; i < 3000; i++) begin
        op = ops[k];
        a.data = rnd64(); b.data = rnd64();
        a.carry = 1'($urandom()); a.ovf = 1'($urandom());
        b.carry = 1'($urandom()); b.ovf = 1'($urandom());
        if (op inside {ALU_SLL, ALU_SLLW} && $urandom_range(0, 1) == 1)
          a.data = a.data >> $urandom_range(0, 63);
        #1;
        check("op", y, ref_model(op, a, b));
        n_c += int'(y.carry); n_v += int'(y.ovf);
      end
    end
    // documented corner cases
    op = ALU_SUB; a = '{ovf: 0, carry: 0, data: 64'd5}; b = '{ovf: 0, carry: 0, data: 64'd7}; #1;
    check("sub underflow clears carry", y, '{ovf: 1'b0, carry: 1'b0, data: 64'hFFFF_FFFF_FFFF_FFFE});
    a.data = 64'd7; b.data = 64'd5; #1;
    check("sub no underflow sets carry", y, '{ovf: 1'b0, carry: 1'b1, data: 64'd2});
    op = ALU_SLL; a.data = 64'h4000_0000_0000_0000; b.data = 64'd1; #1;
    check("sll into sign bit", y, '{ovf: 1'b1, carry: 1'b0, data: 64'h8000_0000_0000_0000});
    op = ALU_OR; a = '{ovf: 1, carry: 1, data: 64'h12}; b = XREG_ZERO; #1;
    check("or with x0 keeps flags (mv)", y, a);

    // add followed by addc = 3-input add with carry-out and overflow
    for (int i = 0; i < 20000; i++) begin
      op = ALU_ADD;
      a = '{ovf: 1'($urandom()), carry: 1'($urandom()), data: rnd64()};
      b = '{ovf: 1'($urandom()), carry: 1'($urandom()), data: rnd64()};
      cin_reg = '{ovf: 1'($urandom()), carry: 1'($urandom()), data: rnd64()};
      #1;
      exact_u = {1'b0, a.data} + {1'b0, b.data} + {64'd0, cin_reg.carry};
      exact_s = $signed({{2{a.data[63]}}, a.data}) + $signed({{2{b.data[63]}}, b.data})
              + $signed({65'd0, cin_reg.carry});
      checks++;
      if ({y2.carry, y2.data} !== exact_u ||
          y2.ovf !== (exact_s > 66'sh0_7FFF_FFFF_FFFF_FFFF || exact_s < -66'sh0_8000_0000_0000_0000)) begin
        failures++;
        if (failures < 20) $display("FAIL add+addc a=%h b=%h cin=%b got %b/%b/%h", a.data, b.data,
                                    cin_reg.carry, y2.ovf, y2.carry, y2.data);
      end
    end
    checks++;
    if (n_c == 0 || n_v == 0) failures++;
    $display("carry set %0d times, overflow set %0d times", n_c, n_v);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
