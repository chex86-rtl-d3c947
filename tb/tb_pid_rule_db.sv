// Testbench for pid_rule_db: every published rule with random source PIDs,
// then a field update of one rule.
`include "tb_util.svh"
module tb_pid_rule_db;
  import chex_pkg::*;
  logic clk = 0, rst_n = 0;
  logic rule_we = 0; logic [4:0] rule_idx = 0; rule_e rule_val = R_ZERO;
  uop_op_e op; logic imm, wr; pid_t s1, s2, m;
  logic dst_we, mem_we; pid_t dst_pid, mem_pid;
  int checks = 0, failures = 0;

  pid_rule_db dut (.*, .pid_src1(s1), .pid_src2(s2), .pid_mem(m));
  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("watchdog"); `TB_FINISH end

  function automatic pid_t expect_dst(uop_op_e o, logic i, pid_t a, pid_t b, pid_t mm);
    case (o)
      UOP_MOV:  return i ? '0 : a;
      UOP_AND, UOP_ADD: return i ? a : (a != 0 ? a : b);
      UOP_SUB, UOP_LEA: return a;
      UOP_LD:   return mm;
      UOP_LIMM: return '1;
      default:  return '0;
    endcase
  endfunction

  initial begin
    op = UOP_OTHER; imm = 0; wr = 1; s1 = 0; s2 = 0; m = 0;
    repeat (2) @(posedge clk); rst_n = 1; @(posedge clk);
    for (int t = 0; t < 400; t++) begin
      op  = uop_op_e'($urandom_range(0, 8));
      imm = 1'($urandom);
      wr  = 1'b1;
      s1  = ($urandom_range(0,2) == 0) ? '0 : pid_t'($urandom_range(1, 1000));
      s2  = ($urandom_range(0,2) == 0) ? '0 : pid_t'($urandom_range(1, 1000));
      m   = pid_t'($urandom_range(0, 1000));
      #1;
      if (op == UOP_ST) begin
        `CHECK(!dst_we && mem_we, "store writes memory tag only")
        `CHECK_EQ(mem_pid, s1, "store PID")
      end else begin
        `CHECK(dst_we && !mem_we, "register tag written")
        `CHECK_EQ(dst_pid, expect_dst(op, imm, s1, s2, m), "dst PID")
      end
    end
    // add r,r with both sources tracked: src1 wins
    op = UOP_ADD; imm = 0; s1 = 5; s2 = 9; #1;
    `CHECK_EQ(dst_pid, pid_t'(5), "both non-zero -> src1")
    // reprogram: sub r,r -> zero
    @(negedge clk); rule_we = 1; rule_idx = {UOP_SUB, 1'b0}; rule_val = R_ZERO;
    @(negedge clk); rule_we = 0;
    op = UOP_SUB; imm = 0; s1 = 7; s2 = 0; #1;
    `CHECK_EQ(dst_pid, pid_t'(0), "reprogrammed sub")
    op = UOP_SUB; imm = 1; #1;
    `CHECK_EQ(dst_pid, pid_t'(7), "subi unchanged")
    `TB_FINISH
  end
endmodule
