// Testbench for store_pid_buffer: in-order insert, commit and drain, squash
// of younger uncommitted stores, store-to-load PID forwarding, full flag.
`include "tb_util.svh"
module tb_store_pid_buffer;
  import chex_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  logic ins_en = 0, ins_ah = 0, full, cm_en = 0, sq_en = 0, dr_valid, dr_ready = 0, dr_ah, fw_hit;
  seq_t ins_seq = 0, cm_seq = 0, sq_seq = 0, fw_seq = 0; va_t ins_addr = 0, dr_addr, fw_addr = 0;
  pid_t ins_pid = 0, dr_pid, fw_pid;
  int checks = 0, failures = 0;
  store_pid_buffer #(.ENTRIES(N)) dut (.*);
  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("watchdog"); `TB_FINISH end
  task automatic st(seq_t s, va_t a, pid_t p);
    @(negedge clk); ins_en = 1; ins_seq = s; ins_addr = a; ins_pid = p; ins_ah = 1; @(negedge clk); ins_en = 0;
  endtask
  task automatic cm(seq_t s); @(negedge clk); cm_en = 1; cm_seq = s; @(negedge clk); cm_en = 0; endtask
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    st(10, 64'h8000, 3); st(12, 64'h8008, 0); st(14, 64'h8000, 5); st(16, 64'h9000, 7);
    // forwarding: youngest older store to the same word
    fw_addr = 64'h8004; fw_seq = 15; #1; `CHECK(fw_hit && fw_pid == 5, "youngest older store forwards")
    fw_seq = 13; #1; `CHECK(fw_hit && fw_pid == 3, "stores younger than the load ignored")
    fw_seq = 9;  #1; `CHECK(!fw_hit, "no older store")
    `CHECK(!dr_valid, "nothing leaves before commit")
    cm(10);
    #1; `CHECK(dr_valid && dr_addr == 64'h8000 && dr_pid == 3 && dr_ah, "committed store drains")
    @(negedge clk); dr_ready = 1; @(negedge clk); dr_ready = 0; #1;
    `CHECK(!dr_valid, "next store not committed yet")
    // squash younger than 12: stores 14 and 16 go
    @(negedge clk); sq_en = 1; sq_seq = 12; @(negedge clk); sq_en = 0;
    fw_addr = 64'h9000; fw_seq = 20; #1; `CHECK(!fw_hit, "squashed store gone")
    fw_addr = 64'h8000; #1; `CHECK(!fw_hit, "drained and squashed stores gone")
    fw_addr = 64'h8008; #1; `CHECK(fw_hit && fw_pid == 0, "store 12 kept")
    cm(12); #1; `CHECK(dr_valid && dr_addr == 64'h8008, "store 12 drains")
    @(negedge clk); dr_ready = 1; @(negedge clk); dr_ready = 0;
    for (int i = 0; i < N; i++) st(seq_t'(20 + i), 64'hA000 + 64'(8*i), pid_t'(i));
    #1; `CHECK(full, "full after N stores")
    for (int i = 0; i < N; i++) cm(seq_t'(20 + i));
    dr_ready = 1;
    for (int i = 0; i < N; i++) begin
      @(negedge clk); #1;
      if (i < N - 1) `CHECK(dr_valid && dr_pid == pid_t'(i + 1), "drains in order")
    end
    dr_ready = 0; #1;
    `CHECK(!dr_valid && !full, "empty again")
    `TB_FINISH
  end
endmodule
