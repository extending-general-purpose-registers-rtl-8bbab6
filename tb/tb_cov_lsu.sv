// tb_cov_lsu: self-checking test of cov_lsu.
//
// The testbench plays a 64-word data memory. It issues random stores of all
// sizes from random source registers carrying random carry/overflow bits,
// random loads of all sizes and signedness, writes of loadextra followed by
// ldx into random destinations, and reads of both special registers. It
// checks the byte strobes, the loaded values (against a byte-level model of
// memory), that plain loads return clear flags, that storeextra bits
// 2*rs2/2*rs2+1 follow every store, and that ldx takes its flags from
// loadextra bits 2*rd/2*rd+1.
module tb_cov_lsu;
  import cov_pkg::*;

  int checks = 0, failures = 0;
  int n_st = 0, n_ld = 0, n_ldx = 0, n_ldx_flag = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic en, is_load, is_ldx, is_store, is_unsigned, sr_we, sr_hit;
  logic dmem_req, dmem_we;
  logic [7:0] dmem_wstrb;
  mem_size_e size;
  word_t addr, sr_wdata, sr_rdata, dmem_addr, dmem_wdata, dmem_rdata;
  regidx_t st_src, ld_dst;
  xreg_t st_val, ld_val;
  logic [11:0] sr_addr;

  logic [7:0] bytes [512];      // reference memory, byte-level
  word_t      mem   [64];       // memory as seen by the unit
  word_t      exp_se, exp_le;

  cov_lsu dut (.*);

  always #5 clk = ~clk;
  assign dmem_rdata = mem[dmem_addr[8:3]];

  always_ff @(posedge clk)
    if (dmem_we)
      for (int i = 0; i < 8; i++)
        if (dmem_wstrb[i]) mem[dmem_addr[8:3]][8*i +: 8] <= dmem_wdata[8*i +: 8];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s", what);
    end
  endtask

  task automatic idle();
    en = 1; is_load = 0; is_ldx = 0; is_store = 0; is_unsigned = 0; sr_we = 0;
    sr_addr = 12'h000; size = SZ_D; addr = '0; st_src = '0; st_val = XREG_ZERO; ld_dst = '0;
    sr_wdata = '0;
  endtask

  initial begin
    int nb;
    word_t e;
    idle();
    for (int i = 0; i < 512; i++) bytes[i] = 8'($urandom());
    for (int i = 0; i < 64; i++) for (int j = 0; j < 8; j++) mem[i][8*j +: 8] = bytes[8*i + j];
    exp_se = '0; exp_le = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int it = 0; it < 6000; it++) begin
      @(negedge clk);
      idle();
      size = mem_size_e'($urandom_range(0, 3));
      nb = 1 << int'(size);
      addr = {55'd0, 9'($urandom()) & ~9'(nb - 1)};
      case ($urandom_range(0, 4))
        0, 1: begin // store
          is_store = 1;
          st_src = 5'($urandom());
          st_val = '{ovf: 1'($urandom()), carry: 1'($urandom()), data: {$urandom(), $urandom()}};
          #1;
          chk("store strobes", dmem_we && dmem_wstrb == 8'(((1 << nb) - 1) << addr[2:0]));
          for (int j = 0; j < nb; j++) bytes[int'(addr) + j] = st_val.data[8*j +: 8];
          exp_se[2*st_src]     = st_val.carry;
          exp_se[2*st_src + 1] = st_val.ovf;
          n_st++;
        end
        2: begin // load
          is_load = 1; is_unsigned = (size == SZ_D) ? 1'b0 : 1'($urandom());
          #1;
          e = '0;
          for (int j = 0; j < nb; j++) e[8*j +: 8] = bytes[int'(addr) + j];
          if (!is_unsigned && e[8*nb - 1]) for (int j = 8*nb; j < 64; j++) e[j] = 1'b1;
          chk("load value, flags clear", ld_val === '{ovf: 1'b0, carry: 1'b0, data: e});
          chk("no write on load", !dmem_we && dmem_req);
          n_ld++;
        end
        3: begin // write loadextra, then ldx
          sr_addr = CSR_LOADEXTRA; sr_we = 1; sr_wdata = {$urandom(), $urandom()};
          exp_le = sr_wdata;
          @(negedge clk);
          idle();
          is_ldx = 1; size = SZ_D; addr = {55'd0, 9'($urandom()) & ~9'd7};
          ld_dst = 5'($urandom());
          #1;
          e = '0;
          for (int j = 0; j < 8; j++) e[8*j +: 8] = bytes[int'(addr) + j];
          chk("ldx", ld_val === '{ovf: exp_le[2*ld_dst + 1], carry: exp_le[2*ld_dst], data: e});
          n_ldx++;
          if (ld_val.carry || ld_val.ovf) n_ldx_flag++;
        end
        default: begin // read both special registers
          sr_addr = CSR_STOREEXTRA; #1;
          chk("storeextra", sr_hit && sr_rdata === exp_se);
          sr_addr = CSR_LOADEXTRA; #1;
          chk("loadextra", sr_hit && sr_rdata === exp_le);
          sr_addr = 12'h123; #1;
          chk("other csr not hit", !sr_hit);
        end
      endcase
    end
    @(negedge clk); idle(); sr_addr = CSR_STOREEXTRA; #1;
    chk("storeextra final", sr_rdata === exp_se);
    checks++;
    if (n_st == 0 || n_ld == 0 || n_ldx == 0 || n_ldx_flag == 0) failures++;
    $display("stores %0d loads %0d ldx %0d (with flags %0d)", n_st, n_ld, n_ldx, n_ldx_flag);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
