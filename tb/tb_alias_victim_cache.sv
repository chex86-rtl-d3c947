// Testbench for alias_victim_cache: insert beyond capacity (FIFO order),
// update, remove.
`include "tb_util.svh"
module tb_alias_victim_cache;
  import chex_pkg::*;
  localparam int N = 32;
  logic clk = 0, rst_n = 0;
  va_t lk_addr = 0, upd_addr = 0, rem_addr = 0, ins_addr = 0; pid_t lk_pid, upd_pid = 0, ins_pid = 0;
  logic lk_hit, upd_en = 0, rem_en = 0, ins_en = 0;
  int checks = 0, failures = 0;
  alias_victim_cache #(.ENTRIES(N)) dut (.*);
  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("watchdog"); `TB_FINISH end
  function automatic va_t A(int i); return 64'h7ffd_0000_0000 + 64'(i) * 8; endfunction
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < N; i++) begin @(negedge clk); ins_en = 1; ins_addr = A(i); ins_pid = pid_t'(i + 1); end
    @(negedge clk); ins_en = 0;
    for (int i = 0; i < N; i++) begin lk_addr = A(i); #1; `CHECK(lk_hit && lk_pid == pid_t'(i + 1), "all 32 held") end
    lk_addr = A(N); #1; `CHECK(!lk_hit, "absent")
    // two more push out the two oldest
    @(negedge clk); ins_en = 1; ins_addr = A(100); ins_pid = 100;
    @(negedge clk); ins_addr = A(101); ins_pid = 101;
    @(negedge clk); ins_en = 0;
    lk_addr = A(0); #1; `CHECK(!lk_hit, "oldest replaced")
    lk_addr = A(1); #1; `CHECK(!lk_hit, "second oldest replaced")
    lk_addr = A(2); #1; `CHECK(lk_hit, "third kept")
    lk_addr = A(101); #1; `CHECK(lk_hit && lk_pid == 101, "newest present")
    // address bits 2:0 are ignored (word granularity)
    lk_addr = A(5) + 3; #1; `CHECK(lk_hit && lk_pid == 6, "word granularity")
    @(negedge clk); upd_en = 1; upd_addr = A(5); upd_pid = 55; @(negedge clk); upd_en = 0;
    lk_addr = A(5); #1; `CHECK(lk_hit && lk_pid == 55, "updated")
    @(negedge clk); rem_en = 1; rem_addr = A(5); @(negedge clk); rem_en = 0;
    lk_addr = A(5); #1; `CHECK(!lk_hit, "removed")
    lk_addr = A(6); #1; `CHECK(lk_hit, "neighbour kept")
    `TB_FINISH
  end
endmodule
