// Testbench for alias_cache: fills, hits, 2-way conflicts with LRU eviction
// reported to the victim cache, PID-0 writes, invalidation; compared with a
// reference model of a 2-way LRU cache.
`include "tb_util.svh"
module tb_alias_cache;
  import chex_pkg::*;
  logic clk = 0, rst_n = 0;
  va_t lk_addr = 0, wr_addr = 0, inv_addr = 0, ev_addr; logic lk_touch = 0, lk_hit, wr_en = 0, inv_en = 0, ev_valid;
  pid_t lk_pid, wr_pid = 0, ev_pid;
  int checks = 0, failures = 0, evictions = 0;
  alias_cache #(.ENTRIES(256), .WAYS(2)) dut (.*);
  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("watchdog"); `TB_FINISH end

  // reference: per set, list of (addr,pid), most recent first, at most 2
  typedef struct { va_t a; pid_t p; } line_t;
  line_t sets [128][$];
  function automatic int set_of(va_t a); return int'(a[9:3]); endfunction
  function automatic int find(va_t a);
    foreach (sets[set_of(a)][i]) if (sets[set_of(a)][i].a == a) return i;
    return -1;
  endfunction

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      automatic va_t a = '0;
      automatic int k;
      a = {16'd0, 26'd0, 3'($urandom_range(0, 4)), 16'd0} | {16'd0, 38'd0, 3'($urandom_range(0, 3)), 7'd0} ;
      a[9:3] = 7'($urandom_range(0, 3));
      @(negedge clk);
      lk_addr = a; lk_touch = 0; wr_en = 0; inv_en = 0; #1;
      k = find(a);
      `CHECK(lk_hit == (k >= 0), "hit/miss")
      if (k >= 0) `CHECK_EQ(lk_pid, sets[set_of(a)][k].p, "pid")
      case ($urandom_range(0, 3))
        0: begin                                         // touched lookup
          lk_touch = 1;
          if (k >= 0) begin automatic line_t l = sets[set_of(a)][k]; sets[set_of(a)].delete(k); sets[set_of(a)].push_front(l); end
        end
        1, 2: begin                                      // write
          automatic pid_t p = ($urandom_range(0, 3) == 0) ? '0 : pid_t'($urandom_range(1, 500));
          wr_en = 1; wr_addr = a; wr_pid = p; #1;
          if (k >= 0) begin
            `CHECK(!ev_valid, "update does not evict")
            sets[set_of(a)].delete(k); sets[set_of(a)].push_front('{a, p});
          end else if (p != 0) begin
            if (sets[set_of(a)].size() == 2) begin
              `CHECK(ev_valid && ev_addr == sets[set_of(a)][1].a && ev_pid == sets[set_of(a)][1].p, "LRU line evicted")
              evictions++;
              void'(sets[set_of(a)].pop_back());
            end else `CHECK(!ev_valid, "free way used")
            sets[set_of(a)].push_front('{a, p});
          end else `CHECK(!ev_valid, "PID 0 not allocated")
        end
        default: begin                                   // invalidate
          inv_en = 1; inv_addr = a;
          if (k >= 0) sets[set_of(a)].delete(k);
        end
      endcase
    end
    @(negedge clk); wr_en = 0; inv_en = 0; lk_touch = 0;
    `CHECK(evictions > 20, "evictions exercised")
    `TB_FINISH
  end
endmodule
