// tb_cov_muldiv: self-checking test of cov_muldiv.
//
// Random and corner-case operands (zero, -1, most-negative, small values)
// for every multiply/divide operation. The reference computes results with
// wide signed arithmetic and the RISC-V special cases, carry of mul as
// "b != 0 and a > (2^64-1)/b", and overflow as a range test of the exact
// signed product, independently of how the RTL forms them.
module tb_cov_muldiv;
  import cov_pkg::*;

  int checks = 0, failures = 0;
  md_op_e op;
  xreg_t  a, b, y;


  cov_muldiv dut (.op(op), .a(a), .b(b), .y(y));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic signed [129:0] SMAX64 = 130'sh7FFF_FFFF_FFFF_FFFF;
  localparam logic signed [129:0] SMIN64 = -130'sh8000_0000_0000_0000;

  function automatic xreg_t ref_model(md_op_e o, word_t x, word_t z);
    xreg_t r;
    logic signed [129:0] sp;
    logic [127:0] up;
    logic signed [63:0] sx, sz, s32x, s32z;
    logic [63:0] ux32, uz32;
    logic signed [63:0] p32;
    r = XREG_ZERO;
    sx = $signed(x); sz = $signed(z);
    s32x = {{32{x[31]}}, x[31:0]}; s32z = {{32{z[31]}}, z[31:0]};
    ux32 = {32'd0, x[31:0]};       uz32 = {32'd0, z[31:0]};
    case (o)
      MD_MUL: begin
        sp = $signed({{66{x[63]}}, x}) * $signed({{66{z[63]}}, z});
        r.data = sp[63:0];
        r.carry = (z != 0) && (x > (64'hFFFF_FFFF_FFFF_FFFF / z));
        r.ovf = (sp > SMAX64) || (sp < SMIN64);
      end
      MD_MULH:   begin sp = $signed({{66{x[63]}}, x}) * $signed({{66{z[63]}}, z}); r.data = sp[127:64]; end
      MD_MULHSU: begin sp = $signed({{66{x[63]}}, x}) * $signed({66'd0, z});        r.data = sp[127:64]; end
      MD_MULHU:  begin up = {64'd0, x} * {64'd0, z}; r.data = up[127:64]; end
      MD_MULW: begin
        p32 = s32x * s32z;
        r.data = {{32{p32[31]}}, p32[31:0]};
        r.carry = (ux32 * uz32) > 64'hFFFF_FFFF;
        r.ovf = (p32 > 64'sh7FFF_FFFF) || (p32 < -64'sh8000_0000);
      end
      MD_DIV, MD_REM: begin
        if (z == 0) begin
          r.data = (o == MD_DIV) ? '1 : x; r.carry = 1; r.ovf = 1;
        end else if (x == 64'h8000_0000_0000_0000 && z == '1) begin
          r.data = (o == MD_DIV) ? x : '0; r.ovf = 1;
        end else r.data = (o == MD_DIV) ? word_t'(sx / sz) : word_t'(sx % sz);
      end
      MD_DIVU, MD_REMU: begin
        if (z == 0) begin
          r.data = (o == MD_DIVU) ? '1 : x; r.carry = 1; r.ovf = 1;
        end else r.data = (o == MD_DIVU) ? x / z : x % z;
      end
      MD_DIVW, MD_REMW: begin
        logic signed [63:0] q;
        if (z[31:0] == 0) begin
          q = (o == MD_DIVW) ? '1 : s32x; r.carry = 1; r.ovf = 1;
        end else if (x[31:0] == 32'h8000_0000 && z[31:0] == 32'hFFFF_FFFF) begin
          q = (o == MD_DIVW) ? s32x : '0; r.ovf = 1;
        end else q = (o == MD_DIVW) ? s32x / s32z : s32x % s32z;
        r.data = {{32{q[31]}}, q[31:0]};
      end
      MD_DIVUW, MD_REMUW: begin
        logic [63:0] q;
        if (z[31:0] == 0) begin
          q = (o == MD_DIVUW) ? '1 : ux32; r.carry = 1; r.ovf = 1;
        end else q = (o == MD_DIVUW) ? ux32 / uz32 : ux32 % uz32;
        r.data = {{32{q[31]}}, q[31:0]};
      end
      default: ;
    endcase
    return r;
  endfunction

  function automatic word_t rnd64();
    word_t w;
    w = {$urandom(), $urandom()};
    case ($urandom_range(0, 9))
      0: w = '0;
      1: w = '1;
      2: w = 64'h8000_0000_0000_0000;
      3: w = 64'h7fff_ffff_ffff_ffff;
      4: w = {32'h0, $urandom()};
      5: w = {{32{w[31]}}, w[31:0]};
      6: w = 64'($urandom_range(0, 20));
      7: w = {32'hFFFF_FFFF, 32'h8000_0000};
      8: w = {{33{w[31]}}, w[30:0]} >>> $urandom_range(0, 40);
      default: ;
    endcase
    return w;
  endfunction

  int n_c = 0, n_v = 0, n_dz = 0, n_dovf = 0;

  task automatic count(xreg_t r);
    n_c += int'(r.carry);
    n_v += int'(r.ovf);
    if (r.carry && op != MD_MUL && op != MD_MULW) n_dz++;
    if (r.ovf && !r.carry && op != MD_MUL && op != MD_MULW) n_dovf++;
  endtask

  initial begin
    xreg_t e;
    for (int k = 0; k <= int'(MD_REMUW); k++) begin
      for (int i = 0; i < 4000; i++) begin
        op = md_op_e'(k);
        a = '{ovf: 1'($urandom()), carry: 1'($urandom()), data: rnd64()};
        b = '{ovf: 1'($urandom()), carry: 1'($urandom()), data: rnd64()};
        #1;
        e = ref_model(op, a.data, b.data);
        checks++;
        if (y !== e) begin
          failures++;
          if (failures < 20)
            $display("FAIL op=%s a=%h b=%h got=%b/%b/%h exp=%b/%b/%h", op.name(), a.data, b.data,
                     y.ovf, y.carry, y.data, e.ovf, e.carry, e.data);
        end
        count(e);
      end
    end
    $display("carry %0d, overflow %0d, div-by-zero %0d, div-overflow %0d", n_c, n_v, n_dz, n_dovf);
    checks++;
    if (n_c == 0 || n_v == 0 || n_dz == 0 || n_dovf == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
