// cov_alu: integer ALU that produces carry and overflow with its result.
//
// Combinational. Operands and result are 66-bit extended registers
// {ovf, carry, data}. Flag rules (from the carry/overflow extension):
//  * add/addi: carry is bit 64 of the sum of the zero-extended operands;
//    overflow is bit 64 xor bit 63 of the sum of the sign-extended operands.
//  * sub: adds the two's complement of the subtrahend, so carry is SET when
//    the subtraction does not underflow (a >= b unsigned) and clear on
//    underflow; overflow is the signed overflow of a - b.
//  * and/or/xor: operate on all 66 bits, so flags can be combined with
//    boolean operations (an immediate operand brings zero flags).
//  * sll: carry if any shifted-out bit is 1; overflow if any shifted-out bit
//    differs from the sign bit of the result.
//  * addw/subw/sllw: the same rules on 32 bits, result sign-extended.
//  * addc: adds the carry bit of b to the 65-bit unsigned value {a.carry,
//    a.data} and to the 65-bit signed value {a.data[63]^a.ovf, a.data};
//    the new carry is bit 64 of the first, the new overflow is bit 64 xor
//    bit 63 of the second. a.data is the low word of both.
//  * every other operation (srl, sra, slt, sltu, the right shifts of the W
//    group) clears both flags.
// ALU_ADDNF is an addition without flags, used for lui and auipc; treating
// those as "other instructions" that clear the flags is this design's choice.
// Shift amounts are taken from b.data[5:0] (b.data[4:0] for W shifts).
module cov_alu
  import cov_pkg::*;
(
  input  alu_op_e op,
  input  xreg_t   a,
  input  xreg_t   b,
  output xreg_t   y
);

  // 64-bit add/sub
  logic [64:0] u_add, s_add, u_sub, s_sub;
  // 32-bit add/sub
  logic [32:0] u_addw, s_addw, u_subw, s_subw;
  // addc
  logic [64:0] u_addc, s_addc;
  // shifts
  logic [5:0]   sh;
  logic [4:0]   shw;
  logic [127:0] sll_wide;
  logic [63:0]  sll_out, sll_mask;
  logic [63:0]  sllw_wide;
  logic [31:0]  sllw_out, sllw_mask, sllw_res, srlw_res, sraw_res;

  always_comb begin
    u_add  = {1'b0, a.data} + {1'b0, b.data};
    s_add  = {a.data[63], a.data} + {b.data[63], b.data};
    u_sub  = {1'b0, a.data} + {1'b0, ~b.data} + 65'd1;
    s_sub  = {a.data[63], a.data} - {b.data[63], b.data};

    u_addw = {1'b0, a.data[31:0]} + {1'b0, b.data[31:0]};
    s_addw = {a.data[31], a.data[31:0]} + {b.data[31], b.data[31:0]};
    u_subw = {1'b0, a.data[31:0]} + {1'b0, ~b.data[31:0]} + 33'd1;
    s_subw = {a.data[31], a.data[31:0]} - {b.data[31], b.data[31:0]};

    u_addc = {a.carry, a.data} + {64'd0, b.carry};
    s_addc = {a.data[63] ^ a.ovf, a.data} + {64'd0, b.carry};

    sh        = b.data[5:0];
    shw       = b.data[4:0];
    sll_wide  = {64'd0, a.data} << sh;
    sll_out   = sll_wide[127:64];
    sll_mask  = ~({64{1'b1}} << sh);
    sllw_wide = {32'd0, a.data[31:0]} << shw;
    sllw_res  = sllw_wide[31:0];
    sllw_out  = sllw_wide[63:32];
    sllw_mask = ~({32{1'b1}} << shw);
    srlw_res  = a.data[31:0] >> shw;
    sraw_res  = $signed(a.data[31:0]) >>> shw;

    y = XREG_ZERO;
    unique case (op)
      ALU_ADD:   y = '{ovf: s_add[64] ^ s_add[63], carry: u_add[64], data: u_add[63:0]};
      ALU_SUB:   y = '{ovf: s_sub[64] ^ s_sub[63], carry: u_sub[64], data: u_sub[63:0]};
      ALU_AND:   y = a & b;
      ALU_OR:    y = a | b;
      ALU_XOR:   y = a ^ b;
      ALU_SLL:   y = '{ovf:   |((sll_out ^ {64{sll_wide[63]}}) & sll_mask),
                       carry: |sll_out,
                       data:  sll_wide[63:0]};
      ALU_SRL:   y.data = a.data >> sh;
      ALU_SRA:   y.data = $signed(a.data) >>> sh;
      ALU_SLT:   y.data = {63'd0, $signed(a.data) < $signed(b.data)};
      ALU_SLTU:  y.data = {63'd0, a.data < b.data};
      ALU_ADDW:  y = '{ovf: s_addw[32] ^ s_addw[31], carry: u_addw[32],
                       data: {{32{u_addw[31]}}, u_addw[31:0]}};
      ALU_SUBW:  y = '{ovf: s_subw[32] ^ s_subw[31], carry: u_subw[32],
                       data: {{32{u_subw[31]}}, u_subw[31:0]}};
      ALU_SLLW:  y = '{ovf:   |((sllw_out ^ {32{sllw_res[31]}}) & sllw_mask),
                       carry: |sllw_out,
                       data:  {{32{sllw_res[31]}}, sllw_res}};
      ALU_SRLW:  y.data = {{32{srlw_res[31]}}, srlw_res};
      ALU_SRAW:  y.data = {{32{sraw_res[31]}}, sraw_res};
      ALU_ADDC:  y = '{ovf: s_addc[64] ^ s_addc[63], carry: u_addc[64], data: u_addc[63:0]};
      ALU_ADDNF: y.data = a.data + b.data;
      default:   y = XREG_ZERO;
    endcase
  end

endmodule
