// cap_unit: executes the capability micro-ops. Capabilities live in the shadow
// capability table in memory (entry of PID p at cap_tbl_base + 16*p) and are
// cached in a 64-entry capability cache. Operations (value is the register
// operand the micro-op read):
//   capGen.Begin  new capability: bounds = value (requested size), busy set,
//                 valid clear, read/write permission; a size above max_alloc
//                 raises EXC_SIZE (resource exhaustion / heap spraying).
//   capGen.End    base = value (returned address), busy clear, valid set only
//                 if the base is non-zero.
//   capCheck      value is the effective address, size the access width:
//                 PID(-1) or a PID never generated -> EXC_WILD, valid clear ->
//                 EXC_UAF, missing r/w permission -> EXC_PERM, outside
//                 [base, base+bounds) -> EXC_OOB.
//   capFree.Begin PID 0 or never generated -> EXC_INVALID_FREE, valid already
//                 clear -> EXC_DOUBLE_FREE, else busy set.
//   capFree.End   valid and busy clear; an invalidation for the PID is sent to
//                 the other cores (inv_out).
// One micro-op at a time: req_ready is high when idle. A cache hit answers a
// capCheck two cycles after acceptance (rsp_valid rises at the second clock
// edge after the accepting one); a miss first reads the table entry. Each
// change is written through to the table before rsp_valid. The operations,
// checks and exceptions follow the description; write-through, the table
// layout and executing one micro-op at a time (in program order, at commit)
// are this design's own choices.
module cap_unit
  import chex_pkg::*;
#(
  parameter int ENTRIES = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  chex_cfg_t    cfg,
  input  logic         req_valid,
  output logic         req_ready,
  input  capop_e       req_op,
  input  pid_t         req_pid,
  input  logic [63:0]  req_value,
  input  logic [3:0]   req_size,
  input  logic         req_write,
  output logic         rsp_valid,
  output exc_e         rsp_exc,
  output pid_t         rsp_pid,
  output logic         inv_out_en,
  output pid_t         inv_out_pid,
  input  logic         inv_in_en,
  input  pid_t         inv_in_pid,
  output logic         cache_hit,      // pulse: lookup hit (statistics)
  output logic         cache_miss,     // pulse: lookup miss
  shmem_if.master      mem
);
  typedef enum logic [2:0] {S_IDLE, S_LOOK, S_RD, S_RSP, S_EXEC, S_WR, S_DONE} state_e;

  state_e      st_q;
  capop_e      op_q;
  pid_t        pid_q;
  logic [63:0] val_q;
  logic [3:0]  size_q;
  logic        wr_q;
  cap_t        cap_q;
  exc_e        exc_q;

  logic        lk_hit;
  cap_t        lk_cap;
  logic        c_wr_en;
  cap_t        c_wr_cap;
  cap_t        nxt_cap;
  exc_e        nxt_exc;
  logic        nxt_write;

  cap_cache #(.ENTRIES(ENTRIES)) u_cache (
    .clk, .rst_n,
    .lk_pid (pid_q), .lk_hit, .lk_cap,
    .wr_en  (c_wr_en), .wr_pid (pid_q), .wr_cap (c_wr_cap),
    .inv_en (inv_in_en), .inv_pid (inv_in_pid),
    .flush  (1'b0)
  );

  function automatic logic never_made(input cap_t c);
    return c.base == '0 && c.bounds == '0 && !c.valid && !c.busy;
  endfunction

  // outcome of one operation on a capability
  always_comb begin
    nxt_cap   = cap_q;
    nxt_exc   = EXC_NONE;
    nxt_write = 1'b0;
    unique case (op_q)
      CAP_GEN_END: begin
        nxt_cap.base  = val_q;
        nxt_cap.busy  = 1'b0;
        nxt_cap.valid = (val_q != '0);
        nxt_write     = 1'b1;
      end
      CAP_CHECK: begin
        if (pid_q == PID_WILD || never_made(cap_q))              nxt_exc = EXC_WILD;
        else if (!cap_q.valid)                                   nxt_exc = EXC_UAF;
        else if (wr_q ? !cap_q.w : !cap_q.r)                     nxt_exc = EXC_PERM;
        else if (val_q < cap_q.base ||
                 {1'b0, val_q} + 65'(size_q) > {1'b0, cap_q.base} + 65'(cap_q.bounds))
                                                                 nxt_exc = EXC_OOB;
      end
      CAP_FREE_BEGIN: begin
        if (pid_q == PID_NONE || pid_q == PID_WILD || never_made(cap_q)) nxt_exc = EXC_INVALID_FREE;
        else if (!cap_q.valid)                                          nxt_exc = EXC_DOUBLE_FREE;
        else begin
          nxt_cap.busy = 1'b1;
          nxt_write    = 1'b1;
        end
      end
      CAP_FREE_END: begin
        nxt_cap.valid = 1'b0;
        nxt_cap.busy  = 1'b0;
        nxt_write     = 1'b1;
      end
      default: ;
    endcase
  end

  assign req_ready     = (st_q == S_IDLE);
  assign mem.req_valid = (st_q == S_RD) || (st_q == S_WR);
  assign mem.req_we    = (st_q == S_WR);
  assign mem.req_addr  = cfg.cap_tbl_base + 64'({pid_q, 4'b0000});
  assign mem.req_wdata = cap_q;
  assign rsp_valid     = (st_q == S_DONE);
  assign rsp_exc       = exc_q;
  assign rsp_pid       = pid_q;
  assign cache_hit     = (st_q == S_LOOK) && op_q != CAP_GEN_BEGIN && lk_hit;
  assign cache_miss    = (st_q == S_LOOK) && op_q != CAP_GEN_BEGIN && !lk_hit &&
                         pid_q != PID_NONE && pid_q != PID_WILD;

  // cache writes: refill after a miss, and every change of a capability
  always_comb begin
    c_wr_en  = 1'b0;
    c_wr_cap = cap_q;
    if (st_q == S_RSP && mem.rsp_valid) begin
      c_wr_en  = 1'b1;
      c_wr_cap = mem.rsp_rdata;
    end else if (st_q == S_EXEC && nxt_write && nxt_exc == EXC_NONE) begin
      c_wr_en  = 1'b1;
      c_wr_cap = nxt_cap;
    end else if (st_q == S_LOOK && op_q == CAP_GEN_BEGIN && val_q <= cfg.max_alloc) begin
      c_wr_en  = 1'b1;
      c_wr_cap = '{base: '0, bounds: val_q[31:0], rsvd: '0, busy: 1'b1,
                   valid: 1'b0, x: 1'b0, w: 1'b1, r: 1'b1};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q        <= S_IDLE;
      op_q        <= CAP_NONE;
      pid_q       <= PID_NONE;
      val_q       <= '0;
      size_q      <= '0;
      wr_q        <= 1'b0;
      cap_q       <= '0;
      exc_q       <= EXC_NONE;
      inv_out_en  <= 1'b0;
      inv_out_pid <= PID_NONE;
    end else begin
      inv_out_en <= 1'b0;
      unique case (st_q)
        S_IDLE: if (req_valid) begin
          op_q   <= req_op;
          pid_q  <= req_pid;
          val_q  <= req_value;
          size_q <= req_size;
          wr_q   <= req_write;
          exc_q  <= EXC_NONE;
          st_q   <= S_LOOK;
        end
        S_LOOK: begin
          if (op_q == CAP_GEN_BEGIN) begin
            if (val_q > cfg.max_alloc) begin
              exc_q <= EXC_SIZE;
              st_q  <= S_DONE;
            end else begin
              cap_q <= c_wr_cap;
              st_q  <= S_WR;
            end
          end else if (pid_q == PID_NONE || pid_q == PID_WILD) begin
            cap_q <= '0;
            st_q  <= S_EXEC;
          end else if (lk_hit) begin
            cap_q <= lk_cap;
            st_q  <= S_EXEC;
          end else begin
            st_q  <= S_RD;
          end
        end
        S_RD:  if (mem.req_ready) st_q <= S_RSP;
        S_RSP: if (mem.rsp_valid) begin
          cap_q <= mem.rsp_rdata;
          st_q  <= S_EXEC;
        end
        S_EXEC: begin
          exc_q <= nxt_exc;
          cap_q <= nxt_cap;
          st_q  <= (nxt_write && nxt_exc == EXC_NONE) ? S_WR : S_DONE;
        end
        S_WR: if (mem.req_ready) begin
          st_q <= S_DONE;
          if (op_q == CAP_FREE_END) begin
            inv_out_en  <= 1'b1;
            inv_out_pid <= pid_q;
          end
        end
        S_DONE: st_q <= S_IDLE;
        default: st_q <= S_IDLE;
      endcase
    end
  end
endmodule
