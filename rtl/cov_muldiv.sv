// cov_muldiv: RV64M multiply/divide unit with carry and overflow outputs.
//
// Combinational, one result per cycle. Flag rules of the extension:
//  * mul: carry if the unsigned 128-bit product does not fit in 64 bits;
//    overflow if any upper bit of the signed product differs from the sign
//    bit of the (64-bit) result.
//  * mulw: the same on 32 bits (result sign-extended).
//  * div, divu, rem, remu and their W forms: carry on division by zero;
//    overflow on division by zero and on signed division overflow (most
//    negative value divided by -1), for the remainder as well as the quotient.
//  * mulh, mulhsu, mulhu: flags cleared.
// Results follow RV64M (quotient all ones and remainder = dividend on division
// by zero; most-negative / -1 gives most-negative and remainder 0).
// Implementation: one 128-bit signed multiply of sign- or zero-extended
// operands serves all multiplies; one 64-bit unsigned divider on operand
// magnitudes serves all divides, with the signs fixed up afterwards; W forms
// feed it sign- or zero-extended 32-bit operands. Using a combinational
// divider rather than an iterative one is this design's choice.
// Operand flag bits are ignored: no existing instruction reads them.
module cov_muldiv
  import cov_pkg::*;
(
  input  md_op_e op,
  input  xreg_t  a,
  input  xreg_t  b,
  output xreg_t  y
);

  logic          a_sgn, b_sgn;               // operands treated as signed
  logic [64:0]   ma, mb;                     // 65-bit extended operands
  logic [129:0]  prod;
  logic [63:0]   pu_hi;                      // unsigned product, upper half
  logic [63:0]   w32_pu, w32_ps;             // 32x32 products

  logic          is_w, d_signed;
  logic [63:0]   da, db;                     // dividend/divisor (extended)
  logic          na, nb;                     // negative
  logic [63:0]   abs_a, abs_b, uq, ur, q, r;
  logic          dz, dovf;

  always_comb begin
    // --- multiply ---
    a_sgn = (op == MD_MUL) || (op == MD_MULH) || (op == MD_MULHSU);
    b_sgn = (op == MD_MUL) || (op == MD_MULH);
    ma    = {a_sgn & a.data[63], a.data};
    mb    = {b_sgn & b.data[63], b.data};
    prod  = 130'($signed(ma) * $signed(mb));
    pu_hi = 64'(({64'd0, a.data} * {64'd0, b.data}) >> 64);
    w32_pu = {32'd0, a.data[31:0]} * {32'd0, b.data[31:0]};
    w32_ps = 64'($signed(a.data[31:0]) * $signed(b.data[31:0]));

    // --- divide ---
    is_w     = (op == MD_DIVW) || (op == MD_DIVUW) || (op == MD_REMW) || (op == MD_REMUW);
    d_signed = (op == MD_DIV) || (op == MD_REM) || (op == MD_DIVW) || (op == MD_REMW);
    if (is_w) begin
      da = d_signed ? {{32{a.data[31]}}, a.data[31:0]} : {32'd0, a.data[31:0]};
      db = d_signed ? {{32{b.data[31]}}, b.data[31:0]} : {32'd0, b.data[31:0]};
    end else begin
      da = a.data;
      db = b.data;
    end
    na    = d_signed & da[63];
    nb    = d_signed & db[63];
    abs_a = na ? -da : da;
    abs_b = nb ? -db : db;
    dz    = (db == '0);
    uq    = dz ? '1 : abs_a / abs_b;
    ur    = dz ? abs_a : abs_a % abs_b;
    q     = dz ? '1 : ((na ^ nb) ? -uq : uq);
    r     = na ? -ur : ur;
    if (is_w)
      dovf = d_signed && (a.data[31:0] == 32'h8000_0000) && (b.data[31:0] == 32'hFFFF_FFFF);
    else
      dovf = d_signed && (a.data == 64'h8000_0000_0000_0000) && (b.data == '1);

    y = XREG_ZERO;
    unique case (op)
      MD_MUL:    y = '{ovf:   prod[127:64] != {64{prod[63]}},
                       carry: pu_hi != '0,
                       data:  prod[63:0]};
      MD_MULH:   y.data = prod[127:64];
      MD_MULHSU: y.data = prod[127:64];
      MD_MULHU:  y.data = prod[127:64];
      MD_MULW:   y = '{ovf:   w32_ps[63:32] != {32{w32_ps[31]}},
                       carry: w32_pu[63:32] != '0,
                       data:  {{32{w32_ps[31]}}, w32_ps[31:0]}};
      MD_DIV, MD_DIVU:   y = '{ovf: dz | dovf, carry: dz, data: q};
      MD_REM, MD_REMU:   y = '{ovf: dz | dovf, carry: dz, data: r};
      MD_DIVW, MD_DIVUW: y = '{ovf: dz | dovf, carry: dz, data: {{32{q[31]}}, q[31:0]}};
      MD_REMW, MD_REMUW: y = '{ovf: dz | dovf, carry: dz, data: {{32{r[31]}}, r[31:0]}};
      default:   y = XREG_ZERO;
    endcase
  end

endmodule
