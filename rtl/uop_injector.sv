// uop_injector: the microcode customization unit. For each micro-op accepted
// by the front end it may inject one capability micro-op next to it, the way a
// macro-op's translation is re-routed to custom microcode:
//  * entry of a registered allocator  -> capGen.Begin with a fresh PID, taking
//    the size from the function's argument register (rdi by default);
//  * exit of the allocator            -> capGen.End for that PID, taking the
//    base from the result register (rax), which is also tagged with the PID;
//  * entry of a registered free       -> capFree.Begin for the PID carried by
//    the argument register;
//  * exit of the free                 -> capFree.End for that PID;
//  * a load/store through a register with a non-zero PID -> capCheck, but only
//    when checks are enabled for this code: mode ALL, or mode REGION with the
//    macro-op address inside the security-critical region [region_lo,
//    region_hi). Allocations and frees are tracked in both modes; mode OFF
//    injects nothing.
// The injected micro-op is combinational with the input micro-op and carries
// its sequence number. The five micro-ops and their operands follow the
// description. This design's own choices: PIDs are handed out here, at decode,
// by a counter that starts at 1 and skips 0 and PID(-1) (the description only
// asks for unique non-zero PIDs); one outstanding allocation and one
// outstanding free are remembered; a heap-function event takes the single
// injection slot ahead of a capCheck of the same micro-op; squashed PIDs are
// not reused.
module uop_injector
  import chex_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  chex_cfg_t cfg,
  input  logic      accept,       // micro-op accepted by the pointer tracker
  input  uop_t      uop,
  input  ann_t      ann,
  input  logic      hf_hit,
  input  logic      hf_entry,
  input  heapfn_e   hf_kind,
  input  reg_t      hf_arg_reg,
  input  reg_t      hf_ret_reg,
  input  pid_t      arg_pid,      // tag of hf_arg_reg
  output logic      inj_valid,
  output capuop_t   inj,
  output logic      frc_en,       // tag hf_ret_reg with frc_pid
  output reg_t      frc_reg,
  output pid_t      frc_pid
);
  pid_t next_pid_q, pend_alloc_q, pend_free_q;
  logic check_en;

  assign check_en = (cfg.mode == MODE_ALL) ||
                    (cfg.mode == MODE_REGION && uop.pc >= cfg.region_lo && uop.pc < cfg.region_hi);

  always_comb begin
    inj_valid    = 1'b0;
    inj          = '0;
    inj.seq      = uop.seq;
    frc_en       = 1'b0;
    frc_reg      = hf_ret_reg;
    frc_pid      = pend_alloc_q;
    if (accept && cfg.mode != MODE_OFF) begin
      if (hf_hit && hf_kind == HF_ALLOC) begin
        inj_valid    = 1'b1;
        inj.op       = hf_entry ? CAP_GEN_BEGIN : CAP_GEN_END;
        inj.pid      = hf_entry ? next_pid_q : pend_alloc_q;
        inj.reg_opnd = hf_entry ? hf_arg_reg : hf_ret_reg;
        frc_en       = !hf_entry;
      end else if (hf_hit && hf_kind == HF_FREE) begin
        inj_valid    = 1'b1;
        inj.op       = hf_entry ? CAP_FREE_BEGIN : CAP_FREE_END;
        inj.pid      = hf_entry ? arg_pid : pend_free_q;
        inj.reg_opnd = hf_arg_reg;
      end else if (ann.deref && check_en) begin
        inj_valid    = 1'b1;
        inj.op       = CAP_CHECK;
        inj.pid      = ann.deref_pid;
        inj.reg_opnd = uop.base;
        inj.is_write = ann.is_write;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      next_pid_q   <= pid_t'(1);
      pend_alloc_q <= PID_NONE;
      pend_free_q  <= PID_NONE;
    end else if (accept && cfg.mode != MODE_OFF && hf_hit) begin
      if (hf_kind == HF_ALLOC && hf_entry) begin
        pend_alloc_q <= next_pid_q;
        next_pid_q   <= (next_pid_q + 1'b1 == PID_WILD) ? pid_t'(1) : next_pid_q + 1'b1;
      end
      if (hf_kind == HF_FREE && hf_entry) pend_free_q <= arg_pid;
    end
  end
endmodule
