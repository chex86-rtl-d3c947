// Testbench for cap_unit: the life of a capability (generate, check, free),
// every exception class, a refill from the shadow capability table, remote
// invalidation, and the latency of a capCheck that hits the cache.
`include "tb_util.svh"
module tb_cap_unit;
  import chex_pkg::*;
  logic clk = 0, rst_n = 0;
  chex_cfg_t cfg;
  logic req_valid = 0, req_ready, req_write = 0, rsp_valid, inv_out_en, inv_in_en = 0, cache_hit, cache_miss;
  capop_e req_op = CAP_NONE; pid_t req_pid = 0, rsp_pid, inv_out_pid, inv_in_pid = 0;
  logic [63:0] req_value = 0; logic [3:0] req_size = 0; exc_e rsp_exc;
  int checks = 0, failures = 0, invs = 0, lat;
  localparam logic [63:0] TBL = 64'h0000_7000_0000_0000;

  shmem_if #(.DW(128)) mem (.clk, .rst_n);
  shmem_model #(.DW(128), .LAT_REQ(1), .LAT_RSP(3)) u_mem (.bus(mem));
  cap_unit #(.ENTRIES(64)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (inv_out_en) invs++;
  initial begin #500000; failures++; $display("watchdog"); `TB_FINISH end

  task automatic op(capop_e o, pid_t p, logic [63:0] v, logic [3:0] sz, logic w, output exc_e e, output int cycles);
    @(negedge clk); req_valid = 1; req_op = o; req_pid = p; req_value = v; req_size = sz; req_write = w;
    @(posedge clk); cycles = 0;
    @(negedge clk); req_valid = 0;
    while (!rsp_valid) begin @(negedge clk); cycles++; end
    e = rsp_exc;
  endtask
  task automatic expect_op(capop_e o, pid_t p, logic [63:0] v, logic [3:0] sz, logic w, exc_e ex, string name);
    exc_e e; int c;
    op(o, p, v, sz, w, e, c);
    `CHECK(e == ex, name)
    lat = c;
  endtask

  initial begin
    cfg = '0; cfg.cap_tbl_base = TBL; cfg.max_alloc = 64'h4000_0000;
    repeat (2) @(posedge clk); rst_n = 1;
    expect_op(CAP_GEN_BEGIN, 1, 100, 0, 0, EXC_NONE, "capGen.Begin");
    begin
      automatic cap_t c = u_mem.peek(TBL + 16);
      `CHECK(c.busy && !c.valid && c.bounds == 100, "table holds busy capability")
    end
    expect_op(CAP_CHECK, 1, 64'h1000, 8, 0, EXC_UAF, "check during allocation fails");
    expect_op(CAP_GEN_END, 1, 64'h5000_1000, 0, 0, EXC_NONE, "capGen.End");
    begin
      automatic cap_t c = u_mem.peek(TBL + 16);
      `CHECK(!c.busy && c.valid && c.base == 64'h5000_1000, "table holds valid capability")
    end
    expect_op(CAP_CHECK, 1, 64'h5000_1000, 8, 0, EXC_NONE, "in bounds (first byte)");
    `CHECK_EQ(lat, 2, "hit latency: answer 3 clocks after acceptance")
    expect_op(CAP_CHECK, 1, 64'h5000_105c, 8, 1, EXC_NONE, "in bounds (last word), write");
    expect_op(CAP_CHECK, 1, 64'h5000_1060, 8, 0, EXC_OOB, "overflow past the end");
    expect_op(CAP_CHECK, 1, 64'h5000_0ff8, 8, 0, EXC_OOB, "underflow below base");
    expect_op(CAP_CHECK, PID_WILD, 64'h7fff_1000, 8, 0, EXC_WILD, "PID(-1) dereference");
    expect_op(CAP_CHECK, 9, 64'h7fff_1000, 8, 0, EXC_WILD, "never generated PID");
    expect_op(CAP_FREE_BEGIN, 0, 64'h5000_1000, 0, 0, EXC_INVALID_FREE, "free of untracked pointer");
    expect_op(CAP_FREE_BEGIN, 1, 64'h5000_1000, 0, 0, EXC_NONE, "capFree.Begin");
    expect_op(CAP_FREE_END, 1, 0, 0, 0, EXC_NONE, "capFree.End");
    @(negedge clk); `CHECK_EQ(invs, 1, "free broadcast to other cores")
    expect_op(CAP_CHECK, 1, 64'h5000_1000, 8, 0, EXC_UAF, "use after free");
    expect_op(CAP_FREE_BEGIN, 1, 64'h5000_1000, 0, 0, EXC_DOUBLE_FREE, "double free");
    expect_op(CAP_GEN_BEGIN, 2, 64'h8000_0000, 0, 0, EXC_SIZE, "2 GiB request refused");
    expect_op(CAP_GEN_BEGIN, 3, 64'h4000_0000, 0, 0, EXC_NONE, "1 GiB request allowed");
    // capability only in the table: refill
    begin
      automatic cap_t c = '0; c.base = 64'h6000_0000; c.bounds = 32; c.valid = 1; c.r = 1; c.w = 0;
      u_mem.poke(TBL + 16*50, c);
    end
    expect_op(CAP_CHECK, 50, 64'h6000_0010, 8, 0, EXC_NONE, "refilled from table");
    `CHECK(lat > 2, "miss takes longer than a hit")
    expect_op(CAP_CHECK, 50, 64'h6000_0010, 8, 1, EXC_PERM, "write without permission");
    `CHECK_EQ(lat, 2, "second access hits")
    // remote free of PID 50
    @(negedge clk); inv_in_en = 1; inv_in_pid = 50; @(negedge clk); inv_in_en = 0;
    expect_op(CAP_CHECK, 50, 64'h6000_0010, 8, 0, EXC_UAF, "freed on another core");
    `TB_FINISH
  end
endmodule
