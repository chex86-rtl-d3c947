// Testbench for alias_unit with a behavioural shared-memory model holding the
// shadow alias table. Commits pointer stores, then reloads them with right and
// wrong predictions to produce every result class (OK, PNA0, P0AN, PMAN), and
// exercises each lookup source: store-buffer forward, non-alias-hosting page,
// alias-cache hit (latency two cycles after acceptance), victim-cache hit after
// an eviction, and a table walk after a remote invalidation.
`include "tb_util.svh"
module tb_alias_unit;
  import chex_pkg::*;
  logic clk = 0, rst_n = 0;
  chex_cfg_t cfg;
  logic alloc_load = 0;
  logic ld_valid = 0, ld_ready, ld_ah = 0, sb_fw_hit = 0;
  va_t ld_addr = 0, ld_pc = 0; seq_t ld_seq = 0; reg_t ld_dst = 0; pid_t ld_pred = 0, sb_fw_pid = 0;
  logic res_valid; reload_res_e res_kind; pid_t res_actual, res_pred; va_t res_pc; seq_t res_seq; reg_t res_dst;
  logic st_valid = 0, st_ready, st_ah = 0; va_t st_addr = 0; pid_t st_pid = 0;
  logic inv_out_en, inv_in_en = 0; va_t inv_out_addr, inv_in_addr = 0;
  logic ac_hit, vc_hit, walk;
  int checks = 0, failures = 0;
  int n_ac = 0, n_vc = 0, n_walk = 0, n_inv = 0;

  shmem_if #(.DW(64)) bus (.clk, .rst_n);
  shmem_model #(.DW(64), .LAT_REQ(0), .LAT_RSP(2)) u_mem (.bus(bus.slave));
  alias_unit dut (.clk, .rst_n, .cfg, .alloc_load, .ld_valid, .ld_ready, .ld_addr, .ld_pc, .ld_seq,
    .ld_dst, .ld_pred, .ld_ah, .sb_fw_hit, .sb_fw_pid, .res_valid, .res_kind, .res_actual, .res_pred,
    .res_pc, .res_seq, .res_dst, .st_valid, .st_ready, .st_addr, .st_pid, .st_ah, .inv_out_en,
    .inv_out_addr, .inv_in_en, .inv_in_addr, .ac_hit, .vc_hit, .walk, .mem(bus.master));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    n_ac += int'(ac_hit); n_vc += int'(vc_hit); n_walk += int'(walk); n_inv += int'(inv_out_en);
  end
  initial begin #500000; failures++; $display("watchdog"); `TB_FINISH end

  task automatic store(va_t a, pid_t p);
    automatic int i0 = n_inv;
    @(negedge clk); st_valid = 1; st_addr = a; st_pid = p; st_ah = 1;
    do @(posedge clk); while (!st_ready);
    @(negedge clk); st_valid = 0;
    while (n_inv == i0) @(negedge clk);
  endtask

  task automatic load(va_t a, pid_t pred, logic ah, logic fw, pid_t fwp,
                      output reload_res_e k, output pid_t act, output int cyc);
    @(negedge clk); ld_valid = 1; ld_addr = a; ld_pred = pred; ld_ah = ah; sb_fw_hit = fw; sb_fw_pid = fwp;
    ld_pc = 64'h400000 + a; ld_seq = ld_seq + 1; ld_dst = 5;
    while (!ld_ready) @(negedge clk);
    @(negedge clk); ld_valid = 0; cyc = 1;
    while (!res_valid) begin @(negedge clk); cyc++; end
    k = res_kind; act = res_actual;
    `CHECK(res_pc == 64'h400000 + a && res_seq == ld_seq && res_dst == 5 && res_pred == pred, "result tags")
  endtask

  initial begin
    automatic reload_res_e k; automatic pid_t act; automatic int cyc, w0;
    cfg = '0; cfg.alias_root = 64'h10_0000; cfg.alias_alloc = 64'h20_0000;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); alloc_load = 1; @(negedge clk); alloc_load = 0;
    store(64'h5000, 7);
    `CHECK(inv_out_addr == 64'h5000, "store invalidates other cores")
    load(64'h5000, 7, 1, 0, 0, k, act, cyc);
    `CHECK(k == RL_OK && act == 7 && n_ac == 1, "alias cache hit, correct prediction")
    `CHECK_EQ(cyc, 2, "alias cache hit latency")
    load(64'h5000, 0, 1, 0, 0, k, act, cyc);  `CHECK(k == RL_P0AN, "predicted 0, actual N")
    load(64'h5000, 9, 1, 0, 0, k, act, cyc);  `CHECK(k == RL_PMAN && act == 7, "predicted M, actual N")
    w0 = n_walk;
    load(64'h6000, 4, 1, 0, 0, k, act, cyc);
    `CHECK(k == RL_PNA0 && act == 0 && n_walk == w0 + 1, "miss walks the table, predicted N actual 0")
    load(64'h5000, 0, 0, 0, 0, k, act, cyc);  `CHECK(k == RL_OK && act == 0, "page not alias hosting")
    load(64'h5000, 3, 1, 1, 3, k, act, cyc);  `CHECK(k == RL_OK && act == 3, "store buffer forward wins")
    // two more stores in the same set evict 0x5000 into the victim cache
    store(64'h5400, 8); store(64'h5800, 9);
    load(64'h5000, 7, 1, 0, 0, k, act, cyc);
    `CHECK(k == RL_OK && act == 7 && n_vc == 1, "victim cache hit")
    load(64'h5000, 7, 1, 0, 0, k, act, cyc);
    `CHECK(k == RL_OK && n_ac == 4 && n_vc == 1, "victim line promoted back")
    // remote invalidation: the value comes back from the shadow table
    @(negedge clk); inv_in_en = 1; inv_in_addr = 64'h5000; @(negedge clk); inv_in_en = 0;
    w0 = n_walk;
    load(64'h5000, 7, 1, 0, 0, k, act, cyc);
    `CHECK(k == RL_OK && act == 7 && n_walk == w0 + 1, "walk after invalidation finds stored PID")
    load(64'h5800, 9, 1, 0, 0, k, act, cyc);  `CHECK(k == RL_OK, "other line intact")
    `TB_FINISH
  end
endmodule
