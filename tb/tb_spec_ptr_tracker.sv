// Testbench for spec_ptr_tracker: a short micro-op sequence (pointer moved,
// offset, masked, spilled, reloaded, dereferenced, overwritten by an integer),
// checking annotations, then squash of transient tags and commit.
`include "tb_util.svh"
module tb_spec_ptr_tracker;
  import chex_pkg::*;
  logic clk = 0, rst_n = 0;
  logic uop_valid = 0, stall; uop_t uop; ann_t ann;
  logic frc_en = 0; reg_t frc_reg = 0; pid_t frc_pid = 0; reg_t arg_reg = 0; pid_t arg_pid;
  logic cm_en = 0, sq_en = 0, fix_en = 0, up_en = 0, up_flush = 0, rule_we = 0;
  seq_t cm_seq = 0, sq_seq = 0, fix_seq = 0; reg_t fix_reg = 0; pid_t fix_pid = 0;
  va_t up_pc = 0; pid_t up_pred = 0, up_actual = 0; logic [4:0] rule_idx = 0; rule_e rule_val = R_ZERO;
  pid_t fin_pid [NREG];
  int checks = 0, failures = 0;
  seq_t s = 0;
  spec_ptr_tracker #(.DEPTH(8), .PRED_ENTS(512)) dut (.*);
  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("watchdog"); `TB_FINISH end

  task automatic issue(uop_op_e op, logic imm, reg_t dst, reg_t s1, reg_t s2, reg_t b, va_t pc = 64'h400000);
    @(negedge clk);
    uop = '0; uop.op = op; uop.imm = imm; uop.dst = dst; uop.src1 = s1; uop.src2 = s2; uop.base = b;
    uop.wr = (op != UOP_ST); uop.pc = pc; uop.seq = s; uop.first = 1; uop_valid = 1; #1;
  endtask
  task automatic tag(reg_t r, pid_t p);   // forced tag, as at an allocator exit
    @(negedge clk); uop = '0; uop.op = UOP_OTHER; uop.wr = 0; uop.seq = s; uop_valid = 1;
    frc_en = 1; frc_reg = r; frc_pid = p; @(negedge clk); frc_en = 0; uop_valid = 0; s++;
  endtask
  task automatic done(); @(posedge clk); s++; endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    tag(REG_RAX, 4);                                   // rax <- PID 4
    arg_reg = REG_RAX; #1; `CHECK_EQ(arg_pid, pid_t'(4), "argument-register tag read")
    issue(UOP_MOV, 0, 3, REG_RAX, 0, 0); `CHECK_EQ(ann.dst_pid, pid_t'(4), "mov copies PID"); done();
    issue(UOP_ADD, 1, 5, 3, 0, 0);       `CHECK_EQ(ann.dst_pid, pid_t'(4), "addi keeps PID"); done();
    issue(UOP_ADD, 0, 6, 9, 5, 0);       `CHECK_EQ(ann.dst_pid, pid_t'(4), "add with untracked src1"); done();
    issue(UOP_OTHER, 0, 8, 5, 0, 0);     `CHECK_EQ(ann.dst_pid, pid_t'(0), "other clears"); done();
    issue(UOP_LD, 0, 10, 0, 0, 5);
    `CHECK(ann.deref && ann.deref_pid == 4 && !ann.is_write, "load through pointer is a dereference"); done();
    issue(UOP_ST, 0, 0, 3, 0, 12);       // spill rbx (PID 4) via untracked base r12
    `CHECK(ann.st_valid && ann.st_pid == 4 && !ann.deref, "spill carries PID"); done();
    issue(UOP_ST, 0, 0, 9, 0, 6);        // store data through pointer r6
    `CHECK(ann.deref && ann.is_write && ann.deref_pid == 4, "store through pointer"); done();
    issue(UOP_LIMM, 1, 11, 0, 0, 0);     `CHECK_EQ(ann.dst_pid, PID_WILD, "limm -> PID(-1)"); done();
    issue(UOP_LD, 0, 13, 0, 0, 11);      `CHECK(ann.deref && ann.deref_pid == PID_WILD, "wild dereference"); done();
    // reload with a trained predictor
    for (int i = 0; i < 3; i++) begin
      @(negedge clk); uop_valid = 0; up_en = 1; up_pc = 64'h400abc; up_actual = 4; @(negedge clk); up_en = 0;
    end
    issue(UOP_LD, 0, 14, 0, 0, 12, 64'h400abc);
    `CHECK(ann.pred_pid == 4 && ann.dst_pid == 4, "predicted reload tags the register"); done();
    // squash everything after the first six micro-ops
    @(negedge clk); uop_valid = 0; sq_en = 1; sq_seq = 16'd3; @(negedge clk); sq_en = 0;
    arg_reg = reg_t'(14); #1; `CHECK_EQ(arg_pid, pid_t'(0), "squashed reload tag gone")
    arg_reg = reg_t'(5);  #1; `CHECK_EQ(arg_pid, pid_t'(4), "older tag survives squash")
    // commit seq 0..2
    for (int i = 0; i < 3; i++) begin @(negedge clk); cm_en = 1; cm_seq = seq_t'(i); end
    @(negedge clk); cm_en = 0;
    `CHECK(fin_pid[REG_RAX] == 4 && fin_pid[3] == 4 && fin_pid[5] == 4, "finalized after commit")
    `CHECK_EQ(fin_pid[6], pid_t'(0), "uncommitted not finalized")
    `TB_FINISH
  end
endmodule
