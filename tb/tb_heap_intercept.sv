// Testbench for heap_intercept: registered entry/exit points of malloc and
// free, non-first micro-ops, unregistered addresses, signatures.
`include "tb_util.svh"
module tb_heap_intercept;
  import chex_pkg::*;
  logic valid, first, hit, is_entry; va_t pc; heapfn_t heapfn [8];
  heapfn_e kind; reg_t arg_reg, ret_reg;
  int checks = 0, failures = 0;
  heap_intercept #(.NUM_HEAP_FN(8)) dut (.*);
  initial begin #100000; failures++; $display("watchdog"); `TB_FINISH end
  initial begin
    for (int i = 0; i < 8; i++) heapfn[i] = '{entry_pc: 0, exit_pc: 0, kind: HF_NONE, arg_reg: REG_RDI, ret_reg: REG_RAX};
    heapfn[2] = '{entry_pc: 64'h7f0000001000, exit_pc: 64'h7f0000001080, kind: HF_ALLOC, arg_reg: REG_RDI, ret_reg: REG_RAX};
    heapfn[5] = '{entry_pc: 64'h7f0000002000, exit_pc: 64'h7f0000002040, kind: HF_FREE, arg_reg: reg_t'(6), ret_reg: REG_RAX};
    valid = 1; first = 1;
    pc = 64'h7f0000001000; #1; `CHECK(hit && is_entry && kind == HF_ALLOC && arg_reg == REG_RDI, "malloc entry")
    pc = 64'h7f0000001080; #1; `CHECK(hit && !is_entry && kind == HF_ALLOC && ret_reg == REG_RAX, "malloc exit")
    pc = 64'h7f0000002000; #1; `CHECK(hit && is_entry && kind == HF_FREE && arg_reg == reg_t'(6), "free entry, custom signature")
    pc = 64'h7f0000002040; #1; `CHECK(hit && !is_entry && kind == HF_FREE, "free exit")
    pc = 64'h7f0000002004; #1; `CHECK(!hit, "unregistered address")
    pc = 64'h0; #1; `CHECK(!hit, "empty slots never match")
    first = 0; pc = 64'h7f0000001000; #1; `CHECK(!hit, "not first micro-op")
    first = 1; valid = 0; #1; `CHECK(!hit, "invalid")
    `TB_FINISH
  end
endmodule
