// End-to-end testbench for chex86_top at its default (full) size. A host-core
// model (chex_host.svh) configures the model-specific registers, then runs a
// small program: malloc, pointer copies and arithmetic, checked dereferences,
// an out-of-bounds access, pointer spills and reloads that train the reload
// predictor, free, use-after-free, double free, invalid free, a dereference of
// a forged (limm) pointer, region-restricted checking, a host squash and
// remote invalidations, and the rule checker on a right and a wrong PID.
// Two behavioural memories hold the shadow capability
// table and the shadow alias table. Every mechanism is counted (front-end
// stall, missed-reload flush, zero idiom, wrong-PID fix, capability cache hit
// and miss, alias cache hit, victim hit, table walk, squash, invalidations,
// each injected micro-op kind, checker report) and a mechanism that never happens counts as a
// failure. The capability-cache hit latency (two cycles after acceptance)
// is checked.
`include "tb_util.svh"
module tb_chex86_top;
  import chex_pkg::*;
  logic clk = 0, rst_n = 0;
  logic msr_we = 0; logic [11:0] msr_addr = 0; logic [63:0] msr_wdata = 0, msr_rdata;
  logic uop_valid = 0, uop_stall, inj_valid; uop_t uop = '0; ann_t uop_ann; capuop_t inj;
  logic cx_valid = 0, cx_ready, cx_write = 0, cx_done; capop_e cx_op = CAP_NONE; pid_t cx_pid = 0, cx_done_pid;
  logic [63:0] cx_value = 0; logic [3:0] cx_size = 0; exc_e cx_exc;
  logic ld_valid = 0, ld_ready, ld_ah = 0, rl_valid, flush_valid, zi_valid; va_t ld_addr = 0, ld_pc = 0;
  seq_t ld_seq = 0, flush_seq, zi_seq; reg_t ld_dst = 0; pid_t ld_pred = 0, rl_actual; reload_res_e rl_kind;
  logic st_valid = 0, st_ah = 0, sb_full; seq_t st_seq = 0; va_t st_addr = 0; pid_t st_pid = 0;
  logic cm_en = 0, sq_en = 0; seq_t cm_seq = 0, sq_seq = 0;
  logic cap_inv_in_en = 0, cap_inv_out_en, alias_inv_in_en = 0, alias_inv_out_en;
  pid_t cap_inv_in_pid = 0, cap_inv_out_pid; va_t alias_inv_in_addr = 0, alias_inv_out_addr;
  logic chk_valid = 0, chk_ready, chk_done, chk_mismatch; va_t chk_pc = 0, chk_dump_pc;
  logic [63:0] chk_value = 0; pid_t chk_pred = 0, chk_actual; logic [15:0] chk_count;
  logic kmem_req_valid, kmem_rsp_valid = 0; logic [63:0] kmem_req_addr; logic [127:0] kmem_rsp_rdata = 0;
  logic ev_cap_hit, ev_cap_miss, ev_ac_hit, ev_vc_hit, ev_walk;
  int checks = 0, failures = 0;
  int n_stall = 0, n_hsq = 0, n_inj [8], n_rl [4], n_exc [8];
  int n_chit = 0, n_cmiss = 0, n_ach = 0, n_vch = 0, n_walk = 0, n_cinv = 0, n_ainv = 0, n_flush = 0, n_zi = 0;
  int last_cap_cyc; reload_res_e last_rl; pid_t last_actual;

  shmem_if #(.DW(128)) cbus (.clk, .rst_n);
  shmem_if #(.DW(64))  abus (.clk, .rst_n);
  shmem_model #(.DW(128), .LAT_REQ(1), .LAT_RSP(3)) u_cmem (.bus(cbus.slave));
  shmem_model #(.DW(64),  .LAT_REQ(0), .LAT_RSP(2)) u_amem (.bus(abus.slave));

  chex86_top dut (.*,
    .cmem_req_valid (cbus.req_valid), .cmem_req_ready (cbus.req_ready), .cmem_req_we (cbus.req_we),
    .cmem_req_addr (cbus.req_addr), .cmem_req_wdata (cbus.req_wdata),
    .cmem_rsp_valid (cbus.rsp_valid), .cmem_rsp_rdata (cbus.rsp_rdata),
    .amem_req_valid (abus.req_valid), .amem_req_ready (abus.req_ready), .amem_req_we (abus.req_we),
    .amem_req_addr (abus.req_addr), .amem_req_wdata (abus.req_wdata),
    .amem_rsp_valid (abus.rsp_valid), .amem_rsp_rdata (abus.rsp_rdata));

  // checker read port: answers from the same capability table one cycle later
  wire kmem_req_ready = kmem_req_valid;
  always @(posedge clk) begin
    kmem_rsp_valid <= kmem_req_valid;
    if (kmem_req_valid) kmem_rsp_rdata <= u_cmem.peek(kmem_req_addr);
  end

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    n_chit += int'(ev_cap_hit); n_cmiss += int'(ev_cap_miss); n_ach += int'(ev_ac_hit);
    n_vch += int'(ev_vc_hit); n_walk += int'(ev_walk); n_cinv += int'(cap_inv_out_en);
    n_ainv += int'(alias_inv_out_en); n_flush += int'(flush_valid); n_zi += int'(zi_valid);
    if (cx_done) n_exc[cx_exc]++;
  end
  initial begin #2000000; failures++; $display("watchdog"); `TB_FINISH end

  `include "chex_host.svh"

  localparam reg_t RAX = 0, RCX = 1, RDX = 2, RBX = 3, RSP = 4, RDI = 7, R8 = 8, R9 = 9, R10 = 10,
                   R11 = 11, R12 = 12, R13 = 13, R14 = 14;
  localparam va_t MALLOC = 64'h1000, FREE = 64'h2000, RELOAD_PC = 64'h3000;
  localparam logic [63:0] SLOT = 64'h8FF0_0010;

  `include "tb_chex86_top_prog.svh"
endmodule
