// spec_ptr_tracker: the speculative pointer tracker of the front end. Every
// decoded micro-op (one per cycle) reads the PID tags of its sources from the
// register tag file, asks the reload predictor for a PID if it is a load, and
// applies the rule database to produce the PID of its destination, which is
// written back as a transient tag under the micro-op's sequence number. A load
// or store whose base register carries a non-zero PID is reported as a
// dereference that needs a capability check, and a store reports the PID it
// spills to memory. A second tag write port lets the microcode customization
// unit attach a fresh PID to the result register at an allocator's exit, and a
// spare read port returns the tag of a heap function's argument register.
// Everything is combinational from uop to annotation; tags are written at the
// clock edge. While squash is asserted, or the tag file is full (stall), the
// micro-op is not accepted and writes nothing. Tracking in the front end with
// rules, reload prediction, transient tags and squash follows the description;
// the one-micro-op-per-cycle width is this design's own choice.
module spec_ptr_tracker
  import chex_pkg::*;
#(
  parameter int DEPTH     = 8,
  parameter int PRED_ENTS = 512
) (
  input  logic  clk,
  input  logic  rst_n,
  // decoded micro-op
  input  logic  uop_valid,
  input  uop_t  uop,
  output logic  stall,
  output ann_t  ann,
  // forced tag from the microcode customization unit (same sequence number)
  input  logic  frc_en,
  input  reg_t  frc_reg,
  input  pid_t  frc_pid,
  // tag of an arbitrary register (heap-function argument)
  input  reg_t  arg_reg,
  output pid_t  arg_pid,
  // back end
  input  logic  cm_en,
  input  seq_t  cm_seq,
  input  logic  sq_en,
  input  seq_t  sq_seq,
  input  logic  fix_en,
  input  reg_t  fix_reg,
  input  seq_t  fix_seq,
  input  pid_t  fix_pid,
  input  logic  up_en,
  input  va_t   up_pc,
  input  pid_t  up_pred,
  input  pid_t  up_actual,
  input  logic  up_flush,
  // rule database update
  input  logic  rule_we,
  input  logic [4:0] rule_idx,
  input  rule_e rule_val,
  output pid_t  fin_pid [NREG]
);
  reg_t rd_reg [4];
  pid_t rd_pid [4];
  logic wr_en  [2];
  reg_t wr_reg [2];
  pid_t wr_pid [2];
  seq_t wr_seq [2];
  logic full, accept;
  logic dst_we, mem_we;
  pid_t dst_pid, mem_pid, pr_pid;

  assign rd_reg[0] = uop.src1;
  assign rd_reg[1] = uop.src2;
  assign rd_reg[2] = uop.base;
  assign rd_reg[3] = arg_reg;
  assign arg_pid   = rd_pid[3];

  reload_predictor #(.ENTRIES(PRED_ENTS)) u_pred (
    .clk, .rst_n,
    .pr_pc (uop.pc), .pr_pid,
    .up_en, .up_pc, .up_pred, .up_actual, .up_flush,
    .pr_take (accept && uop.op == UOP_LD)
  );

  pid_rule_db u_rules (
    .clk, .rst_n,
    .rule_we, .rule_idx, .rule_val,
    .op (uop.op), .imm (uop.imm), .wr (uop.wr),
    .pid_src1 (rd_pid[0]), .pid_src2 (rd_pid[1]),
    .pid_mem  (uop.op == UOP_LD ? pr_pid : PID_NONE),
    .dst_we, .dst_pid, .mem_we, .mem_pid
  );

  assign stall  = full;
  assign accept = uop_valid && !full && !sq_en;

  assign wr_en[0]  = accept && dst_we;
  assign wr_reg[0] = uop.dst;
  assign wr_pid[0] = dst_pid;
  assign wr_seq[0] = uop.seq;
  assign wr_en[1]  = accept && frc_en;
  assign wr_reg[1] = frc_reg;
  assign wr_pid[1] = frc_pid;
  assign wr_seq[1] = uop.seq;

  pid_tag_file #(.DEPTH(DEPTH), .NRD(4), .NWR(2)) u_tags (
    .clk, .rst_n,
    .rd_reg, .rd_pid,
    .wr_en, .wr_reg, .wr_pid, .wr_seq,
    .cm_en, .cm_seq,
    .fix_en, .fix_reg, .fix_seq, .fix_pid,
    .sq_en, .sq_seq,
    .full, .fin_pid
  );

  always_comb begin
    ann           = '0;
    ann.deref     = accept && (uop.op == UOP_LD || uop.op == UOP_ST) && rd_pid[2] != PID_NONE;
    ann.deref_pid = rd_pid[2];
    ann.is_write  = (uop.op == UOP_ST);
    ann.dst_pid   = dst_pid;
    ann.pred_pid  = (uop.op == UOP_LD) ? pr_pid : PID_NONE;
    ann.st_valid  = accept && mem_we;
    ann.st_pid    = mem_pid;
  end
endmodule
