// cov_lsu: load/store unit with the storeextra and loadextra registers.
//
// Memory is 64 bits wide and byte addressed; the unit aligns store data to
// its byte lanes with byte strobes, and extracts and sign- or zero-extends
// load data. Memory keeps only the 64 data bits, so a load (lb..ld) returns
// carry and overflow clear.
//
// The two special registers of the extension live here:
//  * storeextra (64 bits): every store writes the carry and overflow bits of
//    its data-source register rs2 into bits 2*rs2 (carry) and 2*rs2+1
//    (overflow); e.g. a store from x1 updates bits 2 and 3. Context-switch
//    code stores all registers, then reads storeextra and stores it too.
//  * loadextra (64 bits): written from a general-purpose register; the new
//    load ldx loads a doubleword and fills the carry and overflow bits of its
//    destination rd from bits 2*rd and 2*rd+1 of loadextra.
// Both registers are reached through a small register-access port that the
// core maps onto CSR instructions (reads return the value with flags clear,
// writes take the 64 data bits). Because the core is in order and single
// cycle, reading storeextra needs no pipeline drain.
// This design's choices: carry in the even bit and overflow in the odd bit;
// both registers readable and writable; naturally aligned accesses only (the
// low address bits select lanes, an access that crosses a doubleword is not
// supported); reset clears both registers.
//
// Timing: the memory request is combinational from the inputs, dmem_rdata is
// expected in the same cycle; storeextra/loadextra update on the clock edge.
module cov_lsu
  import cov_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,          // instruction executes this cycle
  // operation
  input  logic        is_load,
  input  logic        is_ldx,
  input  logic        is_store,
  input  mem_size_e   size,
  input  logic        is_unsigned,
  input  word_t       addr,
  input  regidx_t     st_src,      // rs2 index of a store
  input  xreg_t       st_val,      // rs2 value (data and flags)
  input  regidx_t     ld_dst,      // rd index of ldx
  output xreg_t       ld_val,
  // special-register access
  input  logic [11:0] sr_addr,
  input  logic        sr_we,
  input  word_t       sr_wdata,
  output word_t       sr_rdata,
  output logic        sr_hit,      // sr_addr names storeextra or loadextra
  // memory port
  output logic        dmem_req,
  output logic        dmem_we,
  output word_t       dmem_addr,
  output word_t       dmem_wdata,
  output logic [7:0]  dmem_wstrb,
  input  word_t       dmem_rdata
);

  word_t storeextra, loadextra;

  logic [2:0]  lane;
  logic [5:0]  bitoff;
  word_t       shifted;

  // ---------------- memory request ----------------
  always_comb begin
    lane       = addr[2:0];
    bitoff     = {lane, 3'b000};
    dmem_req   = en && (is_load || is_ldx || is_store);
    dmem_we    = en && is_store;
    dmem_addr  = addr;
    dmem_wdata = st_val.data << bitoff;
    unique case (size)
      SZ_B:    dmem_wstrb = 8'b0000_0001 << lane;
      SZ_H:    dmem_wstrb = 8'b0000_0011 << lane;
      SZ_W:    dmem_wstrb = 8'b0000_1111 << lane;
      default: dmem_wstrb = 8'b1111_1111;
    endcase
    if (!(en && is_store)) dmem_wstrb = '0;
  end

  // ---------------- load data ----------------
  always_comb begin
    shifted = dmem_rdata >> bitoff;
    ld_val  = XREG_ZERO;
    unique case (size)
      SZ_B:    ld_val.data = is_unsigned ? {56'd0, shifted[7:0]}  : {{56{shifted[7]}},  shifted[7:0]};
      SZ_H:    ld_val.data = is_unsigned ? {48'd0, shifted[15:0]} : {{48{shifted[15]}}, shifted[15:0]};
      SZ_W:    ld_val.data = is_unsigned ? {32'd0, shifted[31:0]} : {{32{shifted[31]}}, shifted[31:0]};
      default: ld_val.data = dmem_rdata;
    endcase
    if (is_ldx) begin
      ld_val.data  = dmem_rdata;
      ld_val.carry = loadextra[{ld_dst, 1'b0}];
      ld_val.ovf   = loadextra[{ld_dst, 1'b1}];
    end
  end

  // ---------------- special registers ----------------
  always_comb begin
    sr_hit   = (sr_addr == CSR_STOREEXTRA) || (sr_addr == CSR_LOADEXTRA);
    sr_rdata = (sr_addr == CSR_LOADEXTRA) ? loadextra :
               (sr_addr == CSR_STOREEXTRA) ? storeextra : '0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      storeextra <= '0;
      loadextra  <= '0;
    end else if (en) begin
      if (is_store) begin
        storeextra[{st_src, 1'b0}] <= st_val.carry;
        storeextra[{st_src, 1'b1}] <= st_val.ovf;
      end
      if (sr_we && sr_addr == CSR_STOREEXTRA) storeextra <= sr_wdata;
      if (sr_we && sr_addr == CSR_LOADEXTRA)  loadextra  <= sr_wdata;
    end
  end

endmodule
