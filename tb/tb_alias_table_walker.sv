// Testbench for alias_table_walker: read walk of an empty table, write walks
// that build the 5 levels from the page allocator, read walks that find the
// PIDs, sharing of upper levels, overwrite with PID 0, and the number of memory
// accesses per walk.
`include "tb_util.svh"
module tb_alias_table_walker;
  import chex_pkg::*;
  logic clk = 0, rst_n = 0;
  va_t root = 64'h10_0000, alloc_init = 64'h20_0000, req_addr = 0;
  logic alloc_load = 0, req_valid = 0, req_ready, req_we = 0, done, walk_step;
  pid_t req_pid = 0, rd_pid;
  int checks = 0, failures = 0, steps;
  shmem_if #(.DW(64)) mem (.clk, .rst_n);
  shmem_model #(.DW(64), .LAT_REQ(0), .LAT_RSP(1)) u_mem (.bus(mem));
  alias_table_walker #(.LEVELS(5)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (walk_step) steps++;
  initial begin #500000; failures++; $display("watchdog"); `TB_FINISH end
  task automatic walk(logic we, va_t a, pid_t p, output pid_t r);
    @(negedge clk); req_valid = 1; req_we = we; req_addr = a; req_pid = p; steps = 0;
    @(negedge clk); req_valid = 0;
    while (!done) @(negedge clk);
    r = rd_pid;
    @(negedge clk);
  endtask
  initial begin
    pid_t r;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); alloc_load = 1; @(negedge clk); alloc_load = 0;
    walk(0, 64'h7ffd_1234_5678, 0, r); `CHECK_EQ(r, pid_t'(0), "empty table -> 0")
    `CHECK_EQ(steps, 1, "absent top level ends the walk")
    walk(1, 64'h7ffd_1234_5678, 42, r);
    `CHECK_EQ(steps, 9, "first write: 4 reads... links + leaf write")
    `CHECK_EQ(u_mem.n_writes, 5, "4 links + 1 leaf")
    `CHECK_EQ(u_mem.peek(root + 64'((64'h7ffd_1234_5678 >> 39) & 9'h1ff) * 8), 64'h20_0001, "top entry links first page")
    walk(0, 64'h7ffd_1234_5678, 0, r); `CHECK_EQ(r, pid_t'(42), "read back")
    `CHECK_EQ(steps, 5, "five levels read")
    walk(0, 64'h7ffd_1234_5670, 0, r); `CHECK_EQ(r, pid_t'(0), "neighbour word empty")
    walk(1, 64'h7ffd_1234_5670, 43, r);
    `CHECK_EQ(steps, 5, "same leaf table: 4 reads + 1 write")
    walk(1, 64'h7ffd_1300_0008, 44, r);         // differs at level 3 index
    walk(0, 64'h7ffd_1300_0008, 0, r); `CHECK_EQ(r, pid_t'(44), "second branch")
    walk(0, 64'h7ffd_1234_5670, 0, r); `CHECK_EQ(r, pid_t'(43), "first branch intact")
    walk(1, 64'h7ffd_1234_5678, 0, r);         // pointer overwritten with data
    walk(0, 64'h7ffd_1234_5678, 0, r); `CHECK_EQ(r, pid_t'(0), "cleared")
    walk(1, 64'h0000_4000_0000, 0, r);         // clearing an absent word allocates nothing
    `CHECK_EQ(steps, 1, "no allocation for PID 0")
    `TB_FINISH
  end
endmodule
