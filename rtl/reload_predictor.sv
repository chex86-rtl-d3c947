// reload_predictor: predicts, at the front end, whether a load reloads a
// spilled pointer and which buffer (PID) that pointer names. It is a
// PC-indexed stride predictor of ENTRIES entries (512 in the design), each
// holding the last PID reloaded by that load, the stride between successive
// PIDs and a 2-bit saturating confidence counter, as in a load-address
// predictor but predicting PIDs instead of addresses. A prediction is made
// (last PID + stride) when the entry hits and its counter is 2 or 3 and the
// load is not blacklisted; otherwise the prediction is PID 0 ("not a tracked
// pointer"). Prediction is combinational. Training arrives from execute with
// the actual PID found in the shadow alias structures:
//  * actual PID non-zero: allocate (counter 1, stride 0) or train the stride
//    (counter up when the new stride repeats, down otherwise; the stride is
//    replaced once the counter is below 2); the load leaves the blacklist.
//  * actual PID 0: the counter of a hitting entry goes down and the entry is
//    dropped at 0; a load that had predicted a PID is blacklisted.
// A load whose missed reload forced a flush (up_flush) is replayed with the
// PID found at execute, through a one-entry replay register, so that the
// restarted load carries the right capability.
// Size, 2-bit counters and stride scheme follow the description; the tag
// width, index hash, allocation and blacklist policy and the replay register are this design's own.
module reload_predictor
  import chex_pkg::*;
#(
  parameter int ENTRIES    = 512,
  parameter int TAG_W      = 16,
  parameter int BL_ENTRIES = 64
) (
  input  logic clk,
  input  logic rst_n,
  // front-end prediction
  input  va_t  pr_pc,
  output pid_t pr_pid,
  // training from execute
  input  logic up_en,
  input  va_t  up_pc,
  input  pid_t up_pred,      // what was predicted for this load
  input  pid_t up_actual,
  input  logic up_flush,     // this load caused a flush: replay it with up_actual
  input  logic pr_take       // the load at pr_pc was accepted by the front end
);
  localparam int IDX_W = $clog2(ENTRIES);

  logic             valid_q  [ENTRIES];
  logic [TAG_W-1:0] tag_q    [ENTRIES];
  pid_t             last_q   [ENTRIES];
  pid_t             stride_q [ENTRIES];
  logic [1:0]       ctr_q    [ENTRIES];

  function automatic logic [IDX_W-1:0] idx_of(input va_t pc);
    return pc[IDX_W-1:0] ^ pc[2*IDX_W-1:IDX_W];
  endfunction
  function automatic logic [TAG_W-1:0] tag_of(input va_t pc);
    return pc[2*IDX_W +: TAG_W];
  endfunction

  logic             bl_hit;
  logic [IDX_W-1:0] pi, ui;
  logic             p_hit, u_hit;

  ptr_blacklist #(.ENTRIES(BL_ENTRIES)) u_bl (
    .clk, .rst_n,
    .lk_pc  (pr_pc),
    .lk_hit (bl_hit),
    .ins_en (up_en && up_actual == PID_NONE && up_pred != PID_NONE),
    .ins_pc (up_pc),
    .rem_en (up_en && up_actual != PID_NONE),
    .rem_pc (up_pc)
  );

  assign pi     = idx_of(pr_pc);
  assign p_hit  = valid_q[pi] && tag_q[pi] == tag_of(pr_pc);
  // After a flush caused by a missed reload, the replayed load takes the PID
  // found at execute (held in a one-entry replay register) instead of the table.
  logic ovr_v_q;
  va_t  ovr_pc_q;
  pid_t ovr_pid_q;
  logic ovr_hit;

  assign ovr_hit = ovr_v_q && ovr_pc_q == pr_pc;
  assign pr_pid  = ovr_hit ? ovr_pid_q :
                   (p_hit && ctr_q[pi][1] && !bl_hit) ? last_q[pi] + stride_q[pi] : PID_NONE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ovr_v_q   <= 1'b0;
      ovr_pc_q  <= '0;
      ovr_pid_q <= PID_NONE;
    end else if (up_en && up_flush) begin
      ovr_v_q   <= 1'b1;
      ovr_pc_q  <= up_pc;
      ovr_pid_q <= up_actual;
    end else if (pr_take && ovr_hit) begin
      ovr_v_q   <= 1'b0;
    end
  end

  assign ui     = idx_of(up_pc);
  assign u_hit  = valid_q[ui] && tag_q[ui] == tag_of(up_pc);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) begin
        valid_q[i]  <= 1'b0;
        tag_q[i]    <= '0;
        last_q[i]   <= PID_NONE;
        stride_q[i] <= PID_NONE;
        ctr_q[i]    <= 2'd0;
      end
    end else if (up_en) begin
      if (up_actual != PID_NONE) begin
        if (u_hit) begin
          automatic pid_t ns = up_actual - last_q[ui];
          if (ns == stride_q[ui]) begin
            if (ctr_q[ui] != 2'd3) ctr_q[ui] <= ctr_q[ui] + 2'd1;
          end else begin
            if (ctr_q[ui] != 2'd0) ctr_q[ui] <= ctr_q[ui] - 2'd1;
            if (!ctr_q[ui][1]) stride_q[ui] <= ns;
          end
          last_q[ui] <= up_actual;
        end else begin
          valid_q[ui]  <= 1'b1;
          tag_q[ui]    <= tag_of(up_pc);
          last_q[ui]   <= up_actual;
          stride_q[ui] <= PID_NONE;
          ctr_q[ui]    <= 2'd1;
        end
      end else if (u_hit) begin
        if (ctr_q[ui] == 2'd0) valid_q[ui] <= 1'b0;
        else                   ctr_q[ui]   <= ctr_q[ui] - 2'd1;
      end
    end
  end
endmodule
