// Testbench for reload_predictor: trains one load with the temporal PID
// patterns of the design description (constant, stride, repeat) and checks
// predictions against a reference stride predictor; then blacklisting and the
// replay register.
`include "tb_util.svh"
module tb_reload_predictor;
  import chex_pkg::*;
  logic clk = 0, rst_n = 0;
  va_t pr_pc = 0, up_pc = 0; pid_t pr_pid, up_pred = 0, up_actual = 0;
  logic up_en = 0, up_flush = 0, pr_take = 0;
  int checks = 0, failures = 0;
  int correct = 0, total = 0;
  reload_predictor #(.ENTRIES(512)) dut (.*);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("watchdog"); `TB_FINISH end

  // reference model of one entry
  logic r_v; pid_t r_last, r_str; logic [1:0] r_ctr;
  function automatic pid_t r_pred(); return (r_v && r_ctr >= 2) ? r_last + r_str : '0; endfunction
  task automatic r_train(pid_t a);
    if (a != 0) begin
      if (r_v) begin
        if (a - r_last == r_str) begin if (r_ctr != 3) r_ctr++; end
        else begin if (r_ctr < 2) r_str = a - r_last; if (r_ctr != 0) r_ctr--; end
        r_last = a;
      end else begin r_v = 1; r_last = a; r_str = 0; r_ctr = 1; end
    end else if (r_v) begin if (r_ctr == 0) r_v = 0; else r_ctr--; end
  endtask

  task automatic step(va_t pc, pid_t actual, string name);
    @(negedge clk);
    pr_pc = pc; #1;
    `CHECK_EQ(pr_pid, r_pred(), name)
    total++; if (pr_pid == actual) correct++;
    up_en = 1; up_pc = pc; up_pred = pr_pid; up_actual = actual;
    r_train(actual);
    @(negedge clk); up_en = 0;
  endtask

  initial begin
    r_v = 0; r_last = 0; r_str = 0; r_ctr = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // constant pattern (PID 31)
    for (int i = 0; i < 8; i++) step(64'h400100, 31, "constant");
    `CHECK(correct >= 6, "constant pattern learned")
    // stride 3: 13,16,...
    correct = 0;
    for (int i = 0; i < 12; i++) step(64'h400100, pid_t'(13 + 3*i), "stride");
    `CHECK(correct >= 6, "stride pattern learned")
    // repeat + stride: 26 27 28 26 27 28 ... (hard for a plain stride predictor)
    for (int i = 0; i < 9; i++) step(64'h400100, pid_t'(26 + (i % 3)), "repeat");
    // a second load at another index is independent
    r_v = 0; r_last = 0; r_str = 0; r_ctr = 0;
    for (int i = 0; i < 4; i++) step(64'h400777, 77, "second load");
    // blacklist: predicted PID but loaded data -> no prediction afterwards
    @(negedge clk); pr_pc = 64'h400777; #1; `CHECK_EQ(pr_pid, pid_t'(77), "confident before")
    up_en = 1; up_pc = 64'h400777; up_pred = 77; up_actual = 0;
    @(negedge clk); up_en = 0; pr_pc = 64'h400777; #1;
    `CHECK_EQ(pr_pid, pid_t'(0), "blacklisted load predicts 0")
    // reload found: leaves blacklist
    up_en = 1; up_pc = 64'h400777; up_pred = 0; up_actual = 77;
    @(negedge clk); up_en = 0; pr_pc = 64'h400777; #1;
    `CHECK_EQ(pr_pid, pid_t'(77), "removed from blacklist")
    // replay register after a flush
    up_en = 1; up_flush = 1; up_pc = 64'h400900; up_pred = 0; up_actual = 55;
    @(negedge clk); up_en = 0; up_flush = 0; pr_pc = 64'h400900; #1;
    `CHECK_EQ(pr_pid, pid_t'(55), "replayed load gets actual PID")
    pr_take = 1; @(negedge clk); pr_take = 0; #1;
    `CHECK_EQ(pr_pid, pid_t'(0), "replay register used once")
    $display("accuracy %0d/%0d", correct, total);
    `TB_FINISH
  end
endmodule
