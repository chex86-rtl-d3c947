// Testbench for uop_injector: capGen/capFree pairs with PID allocation,
// result-register tagging, capCheck in each protection mode and region.
`include "tb_util.svh"
module tb_uop_injector;
  import chex_pkg::*;
  logic clk = 0, rst_n = 0;
  chex_cfg_t cfg; logic accept; uop_t uop; ann_t ann;
  logic hf_hit, hf_entry; heapfn_e hf_kind; reg_t hf_arg_reg, hf_ret_reg; pid_t arg_pid;
  logic inj_valid, frc_en; capuop_t inj; reg_t frc_reg; pid_t frc_pid;
  int checks = 0, failures = 0;
  uop_injector dut (.*);
  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("watchdog"); `TB_FINISH end

  task automatic clear();
    accept = 0; uop = '0; ann = '0; hf_hit = 0; hf_entry = 0; hf_kind = HF_NONE;
    hf_arg_reg = REG_RDI; hf_ret_reg = REG_RAX; arg_pid = 0;
  endtask
  task automatic hf(heapfn_e k, logic entry, va_t pc, seq_t s);
    @(negedge clk); clear(); accept = 1; uop.pc = pc; uop.seq = s; uop.first = 1;
    hf_hit = 1; hf_kind = k; hf_entry = entry; #1;
  endtask
  task automatic deref(va_t pc, pid_t p, logic w);
    @(negedge clk); clear(); accept = 1; uop.pc = pc; uop.base = reg_t'(3);
    ann.deref = 1; ann.deref_pid = p; ann.is_write = w; #1;
  endtask

  initial begin
    clear();
    cfg = '0; cfg.mode = MODE_ALL; cfg.region_lo = 64'h1000; cfg.region_hi = 64'h2000;
    repeat (2) @(posedge clk); rst_n = 1;
    // malloc #1
    hf(HF_ALLOC, 1, 64'h9000, 16'd10);
    `CHECK(inj_valid && inj.op == CAP_GEN_BEGIN && inj.pid == 1 && inj.reg_opnd == REG_RDI && inj.seq == 10, "capGen.Begin pid 1")
    hf(HF_ALLOC, 0, 64'h9080, 16'd20);
    `CHECK(inj_valid && inj.op == CAP_GEN_END && inj.pid == 1 && inj.reg_opnd == REG_RAX, "capGen.End pid 1")
    `CHECK(frc_en && frc_reg == REG_RAX && frc_pid == 1, "rax tagged with pid 1")
    // malloc #2
    hf(HF_ALLOC, 1, 64'h9000, 16'd30);
    `CHECK(inj.op == CAP_GEN_BEGIN && inj.pid == 2, "fresh pid 2")
    hf(HF_ALLOC, 0, 64'h9080, 16'd31);
    `CHECK(inj.op == CAP_GEN_END && inj.pid == 2 && frc_pid == 2, "end pid 2")
    // free(pid 1)
    hf(HF_FREE, 1, 64'hA000, 16'd40); arg_pid = 1; #1;
    `CHECK(inj.op == CAP_FREE_BEGIN && inj.pid == 1 && !frc_en, "capFree.Begin pid 1")
    hf(HF_FREE, 0, 64'hA040, 16'd41); arg_pid = 7; #1;
    `CHECK(inj.op == CAP_FREE_END && inj.pid == 1, "capFree.End pid 1")
    // checks
    deref(64'h5000, 2, 1);
    `CHECK(inj_valid && inj.op == CAP_CHECK && inj.pid == 2 && inj.is_write && inj.reg_opnd == reg_t'(3), "capCheck in ALL mode")
    cfg.mode = MODE_REGION;
    deref(64'h5000, 2, 0);
    `CHECK(!inj_valid, "no check outside region")
    deref(64'h1800, 2, 0);
    `CHECK(inj_valid && inj.op == CAP_CHECK && !inj.is_write, "check inside region")
    hf(HF_ALLOC, 1, 64'h9000, 16'd50);
    `CHECK(inj_valid && inj.op == CAP_GEN_BEGIN && inj.pid == 3, "allocations tracked in region mode")
    cfg.mode = MODE_OFF;
    deref(64'h1800, 2, 0);
    `CHECK(!inj_valid, "off: nothing injected")
    @(negedge clk); clear(); ann.deref = 1; ann.deref_pid = 2; cfg.mode = MODE_ALL; #1;
    `CHECK(!inj_valid, "no injection without accept")
    `TB_FINISH
  end
endmodule
