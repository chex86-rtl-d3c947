// pid_rule_db: the pointer-tracking rule database. For every micro-op it
// decides how capabilities (PIDs) flow from the source operands to the
// destination, from the micro-op class and addressing mode. The rules live in a
// small writable table, one rule per {class, reg-imm} pair, so they can be
// changed in the field (through the rule window of the model-specific
// registers). At reset the table holds the published rule set:
//   mov r,r / and r,imm / add r,imm / sub (both) / lea : PID(dst) <- PID(src1)
//   and r,r / add r,r : PID(dst) <- the non-zero one of PID(src1), PID(src2)
//   ld  : PID(dst) <- PID(Mem[EA]) (the reload predictor's guess)
//   st  : PID(Mem[EA]) <- PID(src1)
//   limm: PID(dst) <- PID(-1)
//   all other micro-ops: PID(dst) <- 0
// When both sources of an and/add carry a PID the rule set does not say which
// wins; this design takes src1. Lookup is combinational; a rule write takes
// effect on the next cycle.
module pid_rule_db
  import chex_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  // rule table update
  input  logic    rule_we,
  input  logic [4:0] rule_idx,       // {uop_op_e, imm}
  input  rule_e   rule_val,
  // propagation
  input  uop_op_e op,
  input  logic    imm,
  input  logic    wr,
  input  pid_t    pid_src1,
  input  pid_t    pid_src2,
  input  pid_t    pid_mem,         // predicted PID of the loaded word
  output logic    dst_we,          // a destination tag is written
  output pid_t    dst_pid,
  output logic    mem_we,          // a store carries a PID to memory
  output pid_t    mem_pid
);
  rule_e table_q [32];
  rule_e rule;

  function automatic rule_e default_rule(input logic [4:0] idx);
    uop_op_e o;
    logic    i;
    o = uop_op_e'(idx[4:1]);
    i = idx[0];
    unique case (o)
      UOP_MOV:  return i ? R_ZERO : R_SRC1;
      UOP_AND:  return i ? R_SRC1 : R_NONZERO;
      UOP_ADD:  return i ? R_SRC1 : R_NONZERO;
      UOP_SUB:  return R_SRC1;
      UOP_LEA:  return R_SRC1;
      UOP_LD:   return R_MEM;
      UOP_ST:   return R_STORE;
      UOP_LIMM: return R_WILD;
      default:  return R_ZERO;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < 32; k++) table_q[k] <= default_rule(5'(k));
    end else if (rule_we) begin
      table_q[rule_idx] <= rule_val;
    end
  end

  assign rule = table_q[{op, imm}];

  always_comb begin
    dst_pid = PID_NONE;
    mem_pid = PID_NONE;
    mem_we  = 1'b0;
    dst_we  = wr;
    unique case (rule)
      R_ZERO:    dst_pid = PID_NONE;
      R_SRC1:    dst_pid = pid_src1;
      R_NONZERO: dst_pid = (pid_src1 != PID_NONE) ? pid_src1 : pid_src2;
      R_MEM:     dst_pid = pid_mem;
      R_WILD:    dst_pid = PID_WILD;
      R_STORE: begin
        dst_we  = 1'b0;
        mem_we  = 1'b1;
        mem_pid = pid_src1;
      end
      default:   dst_pid = PID_NONE;
    endcase
  end
endmodule
