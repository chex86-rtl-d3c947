// Testbench for cap_cache: fill, hit, update in place, replacement once full,
// remote invalidation (valid/busy cleared, line kept), flush.
`include "tb_util.svh"
module tb_cap_cache;
  import chex_pkg::*;
  localparam int N = 64;
  logic clk = 0, rst_n = 0;
  pid_t lk_pid = 0, wr_pid = 0, inv_pid = 0; logic lk_hit, wr_en = 0, inv_en = 0, flush = 0;
  cap_t lk_cap, wr_cap = '0;
  int checks = 0, failures = 0;
  cap_cache #(.ENTRIES(N)) dut (.*);
  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("watchdog"); `TB_FINISH end
  function automatic cap_t mk(int i);
    cap_t c = '0; c.base = 64'h1000_0000 + 64'(i) * 64'h100; c.bounds = 32'(i * 8 + 8); c.valid = 1; c.r = 1; c.w = 1;
    return c;
  endfunction
  task automatic wr(pid_t p, cap_t c); @(negedge clk); wr_en = 1; wr_pid = p; wr_cap = c; @(negedge clk); wr_en = 0; endtask
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); lk_pid = 5; #1; `CHECK(!lk_hit, "empty")
    for (int i = 1; i <= N; i++) wr(pid_t'(i), mk(i));
    for (int i = 1; i <= N; i++) begin lk_pid = pid_t'(i); #1; `CHECK(lk_hit && lk_cap == mk(i), "all 64 held") end
    // update in place keeps the count
    wr(pid_t'(7), mk(700));
    lk_pid = 7; #1; `CHECK(lk_hit && lk_cap == mk(700), "updated")
    lk_pid = 8; #1; `CHECK(lk_hit, "neighbour intact")
    // 65th capability replaces exactly one line
    wr(pid_t'(100), mk(100));
    begin
      automatic int present = 0;
      for (int i = 1; i <= N; i++) begin lk_pid = pid_t'(i); #1; if (lk_hit) present++; end
      `CHECK_EQ(present, N-1, "one line replaced")
    end
    lk_pid = 100; #1; `CHECK(lk_hit && lk_cap == mk(100), "new line present")
    // remote invalidation
    @(negedge clk); inv_en = 1; inv_pid = 9; @(negedge clk); inv_en = 0;
    lk_pid = 9; #1; `CHECK(lk_hit && !lk_cap.valid && !lk_cap.busy && lk_cap.base == mk(9).base, "invalidated, line kept")
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    lk_pid = 100; #1; `CHECK(!lk_hit, "flushed")
    `TB_FINISH
  end
endmodule
