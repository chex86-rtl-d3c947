// Testbench for hw_checker: a behavioural memory holds a small shadow
// capability table (PIDs 1-4, PID 3 already freed, PID 5 never generated).
// Checks the actual PID found for values inside live and freed blocks and
// outside all blocks, the mismatch report and its counter, and that the search
// reads exactly one table entry per PID it visits.
`include "tb_util.svh"
module tb_hw_checker;
  import chex_pkg::*;
  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready, done, mismatch;
  va_t req_pc = 0, dump_pc; logic [63:0] req_value = 0, dump_value; pid_t req_pred = 0, dump_actual, dump_pred;
  logic [15:0] n_mismatch;
  localparam va_t TBL = 64'h4000_0000;
  int checks = 0, failures = 0;
  shmem_if #(.DW(128)) bus (.clk, .rst_n);
  shmem_model #(.DW(128), .LAT_REQ(1), .LAT_RSP(2)) u_mem (.bus(bus.slave));
  hw_checker dut (.clk, .rst_n, .tbl_base(TBL), .req_valid, .req_ready, .req_pc, .req_value, .req_pred,
                  .done, .mismatch, .dump_actual, .dump_pc, .dump_value, .dump_pred, .n_mismatch, .mem(bus.master));
  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("watchdog"); `TB_FINISH end

  function automatic cap_t mk(logic [63:0] b, logic [31:0] n, logic v);
    cap_t c = '0; c.base = b; c.bounds = n; c.valid = v; c.r = 1'b1; c.w = 1'b1; return c;
  endfunction

  task automatic chk(logic [63:0] v, pid_t pred, pid_t exp, int exp_reads, string name);
    automatic int r0 = u_mem.n_reads;
    @(negedge clk); req_valid = 1; req_value = v; req_pred = pred; req_pc = 64'h400000 + 64'(v[15:0]);
    while (!req_ready) @(negedge clk);
    @(negedge clk); req_valid = 0;
    while (!done) @(negedge clk);
    `CHECK_EQ(dump_actual, exp, name)
    `CHECK_EQ(mismatch, (exp != pred), {name, ": mismatch flag"})
    `CHECK(dump_value == v && dump_pred == pred && dump_pc == 64'h400000 + 64'(v[15:0]), {name, ": dump"})
    `CHECK_EQ(u_mem.n_reads - r0, exp_reads, {name, ": table reads"})
  endtask

  initial begin
    u_mem.poke(TBL + 16*1, mk(64'h8000_0000, 64, 1));
    u_mem.poke(TBL + 16*2, mk(64'h8000_1000, 256, 1));
    u_mem.poke(TBL + 16*3, mk(64'h8000_2000, 32, 0));     // freed
    u_mem.poke(TBL + 16*4, mk(64'h8000_3000, 16, 1));
    repeat (2) @(negedge clk); rst_n = 1;
    chk(64'h8000_10FF, 2, 2, 2, "inside live block, right rule");
    chk(64'h8000_2008, 0, 3, 3, "inside freed block, rule missed it");
    chk(64'h8000_0040, 0, 0, 5, "just past a block: not a pointer");
    chk(64'h7000_0000, 0, 0, 5, "below all blocks");
    chk(64'h8000_0000, 4, 1, 1, "base of block 1, wrong PID");
    @(negedge clk);
    `CHECK_EQ(n_mismatch, 16'd2, "mismatch counter")
    `TB_FINISH
  end
endmodule
