// chex86_top: capability extension beside an x86 core (microcode variant); the
// host core is outside and talks to it through plain signals.
// Front end: decoded micro-ops (uop_*) pass the heap-function interceptor and
// the speculative pointer tracker; at most one capability micro-op is
// injected beside each (inj_*) and executed by the host on the capability
// unit (cx_*, exception returned). Back end: reload predictions are checked at
// execute (ld_*): predicted 0 / actual N flushes (flush_*), a wrong PID is
// fixed in the tracker, a false reload makes the check a zero idiom (zi_*).
// Stores enter the store PID buffer (st_*) and update the alias structures at
// commit (cm_*); a host squash (sq_*) or a flush, the older one, discards
// transient state. Memory ports: capability table (cmem_*), alias table
// (amem_*), read port of the rule checker (kmem_*, requests on chk_*).
// Invalidations go to and come from other cores (*_inv_*); configuration is
// through the MSRs (msr_*). Units and connections follow the description; the
// signal-level host interface is this design's own.
module chex86_top
  import chex_pkg::*;
#(
  parameter int NUM_HEAP_FN = 8,
  parameter int TAG_DEPTH   = 8,
  parameter int PRED_ENTS   = 512,
  parameter int CAP_ENTS    = 64,
  parameter int AC_ENTS     = 256,
  parameter int VC_ENTS     = 32,
  parameter int SB_ENTS     = 56
) (
  input logic clk,
  input logic rst_n,
  // model-specific registers
  input logic msr_we,
  input logic [11:0] msr_addr,
  input logic [63:0] msr_wdata,
  output logic [63:0] msr_rdata,
  // decoded micro-ops from the host decoder
  input logic uop_valid,
  input uop_t uop,
  output logic uop_stall,
  output ann_t uop_ann,
  output logic inj_valid,
  output capuop_t inj,
  // capability micro-op execution
  input logic cx_valid,
  output logic cx_ready,
  input capop_e cx_op,
  input pid_t cx_pid,
  input logic [63:0] cx_value,
  input logic [3:0] cx_size,
  input logic cx_write,
  output logic cx_done,
  output exc_e cx_exc,
  output pid_t cx_done_pid,
  // reload validation at execute
  input logic ld_valid,
  output logic ld_ready,
  input va_t ld_addr,
  input va_t ld_pc,
  input seq_t ld_seq,
  input reg_t ld_dst,
  input pid_t ld_pred,
  input logic ld_ah,
  output logic rl_valid,
  output reload_res_e rl_kind,
  output pid_t rl_actual,
  output logic flush_valid,
  output seq_t flush_seq,
  output logic zi_valid,
  output seq_t zi_seq,
  // stores at execute
  input logic st_valid,
  input seq_t st_seq,
  input va_t st_addr,
  input pid_t st_pid,
  input logic st_ah,
  output logic sb_full,
  // commit and squash from the host
  input logic cm_en,
  input seq_t cm_seq,
  input logic sq_en,
  input seq_t sq_seq,
  // coherence with other cores
  input logic cap_inv_in_en,
  input pid_t cap_inv_in_pid,
  output logic cap_inv_out_en,
  output pid_t cap_inv_out_pid,
  input logic alias_inv_in_en,
  input va_t alias_inv_in_addr,
  output logic alias_inv_out_en,
  output va_t alias_inv_out_addr,
  // shadow capability table port
  output logic cmem_req_valid,
  input logic cmem_req_ready,
  output logic cmem_req_we,
  output logic [63:0] cmem_req_addr,
  output logic [127:0] cmem_req_wdata,
  input logic cmem_rsp_valid,
  input logic [127:0] cmem_rsp_rdata,
  // shadow alias table port
  output logic amem_req_valid,
  input logic amem_req_ready,
  output logic amem_req_we,
  output logic [63:0] amem_req_addr,
  output logic [63:0] amem_req_wdata,
  input logic amem_rsp_valid,
  input logic [63:0] amem_rsp_rdata,
  // rule checker (profiling): result value and tracked PID of a micro-op
  input logic chk_valid,
  output logic chk_ready,
  input va_t chk_pc,
  input logic [63:0] chk_value,
  input pid_t chk_pred,
  output logic chk_done,
  output logic chk_mismatch,
  output pid_t chk_actual,
  output va_t chk_dump_pc,
  output logic [15:0] chk_count,
  // rule checker read port to the shadow capability table
  output logic kmem_req_valid,
  input logic kmem_req_ready,
  output logic [63:0] kmem_req_addr,
  input logic kmem_rsp_valid,
  input logic [127:0] kmem_rsp_rdata,
  // event pulses (statistics)
  output logic ev_cap_hit,
  output logic ev_cap_miss,
  output logic ev_ac_hit,
  output logic ev_vc_hit,
  output logic ev_walk
);
  chex_cfg_t cfg;
  heapfn_t heapfn [NUM_HEAP_FN];
  logic alloc_load, rule_we;
  logic [4:0] rule_idx;
  rule_e rule_val;

  chex_msr #(.NUM_HEAP_FN(NUM_HEAP_FN)) u_msr (
    .clk, .rst_n,
    .we (msr_we), .addr (msr_addr), .wdata (msr_wdata), .rdata (msr_rdata),
    .cfg, .heapfn, .alias_alloc_load (alloc_load),
    .rule_we, .rule_idx, .rule_val
  );

  // ---------------- front end ----------------
  logic hf_hit, hf_entry;
  heapfn_e hf_kind;
  reg_t hf_arg, hf_ret;
  logic frc_en;
  reg_t frc_reg;
  pid_t frc_pid, arg_pid;
  logic trk_stall, accept;

  heap_intercept #(.NUM_HEAP_FN(NUM_HEAP_FN)) u_hf (
    .valid (uop_valid), .pc (uop.pc), .first (uop.first), .heapfn,
    .hit (hf_hit), .is_entry (hf_entry), .kind (hf_kind),
    .arg_reg (hf_arg), .ret_reg (hf_ret)
  );

  // internal squash: host squash or a missed-reload flush, whichever is older
  logic rl_v;
  reload_res_e rl_k;
  pid_t rl_act, rl_pred;
  va_t rl_pc;
  seq_t rl_seq;
  reg_t rl_dst;
  logic isq_en;
  seq_t isq_seq, p0an_seq;

  assign p0an_seq = rl_seq - 1'b1;
  always_comb begin
    isq_en  = sq_en || (rl_v && rl_k == RL_P0AN);
    isq_seq = sq_seq;
    if (rl_v && rl_k == RL_P0AN) begin
      if (!sq_en) isq_seq = p0an_seq;
      else begin
        automatic seq_t d = sq_seq - p0an_seq;
        if (d != '0 && !d[SEQ_W-1]) isq_seq = p0an_seq;   // host squash is younger
      end
    end
  end

  spec_ptr_tracker #(.DEPTH(TAG_DEPTH), .PRED_ENTS(PRED_ENTS)) u_trk (
    .clk, .rst_n,
    .uop_valid, .uop, .stall (trk_stall), .ann (uop_ann),
    .frc_en, .frc_reg, .frc_pid,
    .arg_reg (hf_arg), .arg_pid,
    .cm_en, .cm_seq,
    .sq_en (isq_en), .sq_seq (isq_seq),
    .fix_en (rl_v && rl_k == RL_PMAN), .fix_reg (rl_dst), .fix_seq (rl_seq), .fix_pid (rl_act),
    .up_en (rl_v), .up_pc (rl_pc), .up_pred (rl_pred), .up_actual (rl_act),
    .up_flush (rl_v && rl_k == RL_P0AN),
    .rule_we, .rule_idx, .rule_val,
    .fin_pid ()
  );

  assign accept = uop_valid && !trk_stall && !isq_en;
  assign uop_stall = trk_stall || isq_en;

  uop_injector u_inj (
    .clk, .rst_n, .cfg,
    .accept, .uop, .ann (uop_ann),
    .hf_hit, .hf_entry, .hf_kind, .hf_arg_reg (hf_arg), .hf_ret_reg (hf_ret),
    .arg_pid,
    .inj_valid, .inj,
    .frc_en, .frc_reg, .frc_pid
  );

  // ---------------- capability unit ----------------
  shmem_if #(.DW(128)) cmem (.clk, .rst_n);
  assign {cmem_req_valid, cmem_req_we, cmem_req_addr, cmem_req_wdata} = {cmem.req_valid, cmem.req_we, cmem.req_addr, cmem.req_wdata};
  assign {cmem.req_ready, cmem.rsp_valid, cmem.rsp_rdata} = {cmem_req_ready, cmem_rsp_valid, cmem_rsp_rdata};

  cap_unit #(.ENTRIES(CAP_ENTS)) u_cap (
    .clk, .rst_n, .cfg,
    .req_valid (cx_valid), .req_ready (cx_ready),
    .req_op (cx_op), .req_pid (cx_pid), .req_value (cx_value),
    .req_size (cx_size), .req_write (cx_write),
    .rsp_valid (cx_done), .rsp_exc (cx_exc), .rsp_pid (cx_done_pid),
    .inv_out_en (cap_inv_out_en), .inv_out_pid (cap_inv_out_pid),
    .inv_in_en (cap_inv_in_en), .inv_in_pid (cap_inv_in_pid),
    .cache_hit (ev_cap_hit), .cache_miss (ev_cap_miss),
    .mem (cmem)
  );

  // ---------------- alias side ----------------
  logic sb_dr_valid, sb_dr_ready, sb_dr_ah, sb_fw_hit;
  va_t sb_dr_addr;
  pid_t sb_dr_pid, sb_fw_pid;

  store_pid_buffer #(.ENTRIES(SB_ENTS)) u_sb (
    .clk, .rst_n,
    .ins_en (st_valid), .ins_seq (st_seq), .ins_addr (st_addr), .ins_pid (st_pid), .ins_ah (st_ah),
    .full (sb_full),
    .cm_en, .cm_seq,
    .sq_en (isq_en), .sq_seq (isq_seq),
    .dr_valid (sb_dr_valid), .dr_ready (sb_dr_ready),
    .dr_addr (sb_dr_addr), .dr_pid (sb_dr_pid), .dr_ah (sb_dr_ah),
    .fw_addr (ld_addr), .fw_seq (ld_seq), .fw_hit (sb_fw_hit), .fw_pid (sb_fw_pid)
  );

  shmem_if #(.DW(64)) amem (.clk, .rst_n);
  assign {amem_req_valid, amem_req_we, amem_req_addr, amem_req_wdata} = {amem.req_valid, amem.req_we, amem.req_addr, amem.req_wdata};
  assign {amem.req_ready, amem.rsp_valid, amem.rsp_rdata} = {amem_req_ready, amem_rsp_valid, amem_rsp_rdata};

  alias_unit #(.AC_ENTRIES(AC_ENTS), .VC_ENTRIES(VC_ENTS)) u_alias (
    .clk, .rst_n, .cfg, .alloc_load,
    .ld_valid, .ld_ready, .ld_addr, .ld_pc, .ld_seq, .ld_dst, .ld_pred, .ld_ah,
    .sb_fw_hit, .sb_fw_pid,
    .res_valid (rl_v), .res_kind (rl_k), .res_actual (rl_act), .res_pred (rl_pred),
    .res_pc (rl_pc), .res_seq (rl_seq), .res_dst (rl_dst),
    .st_valid (sb_dr_valid), .st_ready (sb_dr_ready),
    .st_addr (sb_dr_addr), .st_pid (sb_dr_pid), .st_ah (sb_dr_ah),
    .inv_out_en (alias_inv_out_en), .inv_out_addr (alias_inv_out_addr),
    .inv_in_en (alias_inv_in_en), .inv_in_addr (alias_inv_in_addr),
    .ac_hit (ev_ac_hit), .vc_hit (ev_vc_hit), .walk (ev_walk),
    .mem (amem)
  );

  // ---------------- rule checker ----------------
  shmem_if #(.DW(128)) kmem (.clk, .rst_n);
  assign {kmem_req_valid, kmem_req_addr} = {kmem.req_valid, kmem.req_addr};
  assign {kmem.req_ready, kmem.rsp_valid, kmem.rsp_rdata} = {kmem_req_ready, kmem_rsp_valid, kmem_rsp_rdata};

  hw_checker u_chk (
    .clk, .rst_n, .tbl_base (cfg.cap_tbl_base),
    .req_valid (chk_valid), .req_ready (chk_ready),
    .req_pc (chk_pc), .req_value (chk_value), .req_pred (chk_pred),
    .done (chk_done), .mismatch (chk_mismatch), .dump_actual (chk_actual),
    .dump_pc (chk_dump_pc), .dump_value (), .dump_pred (), .n_mismatch (chk_count),
    .mem (kmem)
  );

  assign rl_valid = rl_v;
  assign rl_kind = rl_k;
  assign rl_actual = rl_act;
  assign flush_valid = rl_v && rl_k == RL_P0AN;
  assign flush_seq = rl_seq;
  assign zi_valid = rl_v && rl_k == RL_PNA0;
  assign zi_seq = rl_seq;
endmodule
