// Testbench for ptr_blacklist: insert, lookup, tag mismatch, remove, conflict.
`include "tb_util.svh"
module tb_ptr_blacklist;
  import chex_pkg::*;
  logic clk = 0, rst_n = 0;
  va_t lk_pc = 0, ins_pc = 0, rem_pc = 0;
  logic lk_hit, ins_en = 0, rem_en = 0;
  int checks = 0, failures = 0;
  ptr_blacklist #(.ENTRIES(64)) dut (.*);
  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("watchdog"); `TB_FINISH end
  task automatic ins(va_t pc); @(negedge clk); ins_en = 1; ins_pc = pc; @(negedge clk); ins_en = 0; endtask
  task automatic rem(va_t pc); @(negedge clk); rem_en = 1; rem_pc = pc; @(negedge clk); rem_en = 0; endtask
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    lk_pc = 64'h401000; #1; `CHECK(!lk_hit, "empty after reset")
    ins(64'h401000);
    lk_pc = 64'h401000; #1; `CHECK(lk_hit, "inserted load is blacklisted")
    lk_pc = 64'h401001; #1; `CHECK(!lk_hit, "other load not blacklisted")
    lk_pc = 64'h401000 + (64'h1 << 12) + (64'h1 << 6); #1; `CHECK(!lk_hit, "same index, other tag")
    ins(64'h401040); ins(64'h402010);
    lk_pc = 64'h401040; #1; `CHECK(lk_hit, "second entry")
    lk_pc = 64'h402010; #1; `CHECK(lk_hit, "third entry")
    rem(64'h401040);
    lk_pc = 64'h401040; #1; `CHECK(!lk_hit, "removed")
    lk_pc = 64'h401000; #1; `CHECK(lk_hit, "others kept")
    rem(64'h999999);
    lk_pc = 64'h402010; #1; `CHECK(lk_hit, "remove of absent load changes nothing")
    `TB_FINISH
  end
endmodule
