// Testbench for chex_msr: reset values, write/read-back of every register
// class, rule-window forwarding and the allocator load pulse.
`include "tb_util.svh"
module tb_chex_msr;
  import chex_pkg::*;
  logic clk = 0, rst_n = 0, we = 0; logic [11:0] addr = 0; logic [63:0] wdata = 0, rdata;
  chex_cfg_t cfg; heapfn_t heapfn [8]; logic alias_alloc_load, rule_we; logic [4:0] rule_idx; rule_e rule_val;
  int checks = 0, failures = 0;
  chex_msr #(.NUM_HEAP_FN(8)) dut (.*);
  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("watchdog"); `TB_FINISH end
  task automatic wr(logic [11:0] a, logic [63:0] d);
    @(negedge clk); we = 1; addr = a; wdata = d; @(negedge clk); we = 0;
  endtask
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    `CHECK_EQ(cfg.max_alloc, 64'h4000_0000, "1 GiB default limit")
    `CHECK(cfg.mode == MODE_OFF, "protection off at reset")
    wr(MSR_MODE, 2); wr(MSR_REGION_LO, 64'h1000); wr(MSR_REGION_HI, 64'h2000);
    wr(MSR_CAP_TBL, 64'hA000_0000); wr(MSR_ALIAS_ROOT, 64'hB000_0000);
    `CHECK(cfg.mode == MODE_REGION && cfg.region_lo == 64'h1000 && cfg.region_hi == 64'h2000, "mode and region")
    `CHECK(cfg.cap_tbl_base == 64'hA000_0000 && cfg.alias_root == 64'hB000_0000, "table bases")
    wr(MSR_HEAPFN + 12'd12, 64'h4010); wr(MSR_HEAPFN + 12'd13, 64'h4090);
    wr(MSR_HEAPFN + 12'd14, 1); wr(MSR_HEAPFN + 12'd15, 64'h0006);
    `CHECK(heapfn[3].entry_pc == 64'h4010 && heapfn[3].exit_pc == 64'h4090, "fn 3 points")
    `CHECK(heapfn[3].kind == HF_ALLOC && heapfn[3].arg_reg == reg_t'(6) && heapfn[3].ret_reg == reg_t'(0), "fn 3 signature")
    `CHECK(heapfn[2].kind == HF_NONE, "other slot untouched")
    @(negedge clk); addr = MSR_HEAPFN + 12'd13; #1; `CHECK_EQ(rdata, 64'h4090, "read back exit")
    addr = MSR_REGION_HI; #1; `CHECK_EQ(rdata, 64'h2000, "read back region")
    we = 1; addr = MSR_RULE + 12'd5; wdata = 3; #1;
    `CHECK(rule_we && rule_idx == 5'd5 && rule_val == R_MEM, "rule write forwarded")
    addr = MSR_ALIAS_ALLOC; wdata = 64'hC000_0000; #1;
    `CHECK(alias_alloc_load && !rule_we, "allocator load pulse")
    @(negedge clk); we = 0;
    `CHECK_EQ(cfg.alias_alloc, 64'hC000_0000, "allocator base")
    `TB_FINISH
  end
endmodule
