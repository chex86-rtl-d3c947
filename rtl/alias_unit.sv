// alias_unit: validates pointer-reload predictions at execute and keeps the
// in-processor alias structures up to date with committed stores.
// Load path (ld_*): once the effective address is known, the actual PID of the
// reloaded word is found, in this order, in the store PID buffer (sb_fw_*,
// youngest older store), then - only if the page's alias-hosting bit is set -
// in the 256-entry 2-way alias cache, the 32-entry victim cache (a hit moves
// the line back into the alias cache) and finally the shadow alias table
// through the walker (the result is filled into the alias cache). The actual
// PID is compared with the front end's prediction:
//   equal                -> RL_OK
//   predicted N, actual 0 -> RL_PNA0 (the injected check becomes a zero idiom)
//   predicted 0, actual N -> RL_P0AN (flush and restart at the load)
//   predicted M, actual N -> RL_PMAN (forward N to the tracker)
// Store path (st_*, committed stores from the store PID buffer): a store with a
// non-zero PID, or to an alias-hosting page, updates the victim cache if the
// word is there, else the alias cache, writes the PID through to the shadow
// alias table with a walk, and sends an invalidation to other cores (inv_out).
// Loads have priority; one request is handled at a time. An alias-cache or
// victim hit answers two cycles after acceptance (res_valid), a walk takes one
// memory access per level. Lookup order, the three misprediction classes and
// the filter bit follow the description; write-through to the table and the
// promotion of victim hits are this design's own choices.
module alias_unit
  import chex_pkg::*;
#(
  parameter int AC_ENTRIES = 256,
  parameter int VC_ENTRIES = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  chex_cfg_t   cfg,
  input  logic        alloc_load,
  // load validation
  input  logic        ld_valid,
  output logic        ld_ready,
  input  va_t         ld_addr,
  input  va_t         ld_pc,
  input  seq_t        ld_seq,
  input  reg_t        ld_dst,
  input  pid_t        ld_pred,
  input  logic        ld_ah,
  input  logic        sb_fw_hit,     // store PID buffer result for ld_addr
  input  pid_t        sb_fw_pid,
  output logic        res_valid,
  output reload_res_e res_kind,
  output pid_t        res_actual,
  output pid_t        res_pred,
  output va_t         res_pc,
  output seq_t        res_seq,
  output reg_t        res_dst,
  // committed stores
  input  logic        st_valid,
  output logic        st_ready,
  input  va_t         st_addr,
  input  pid_t        st_pid,
  input  logic        st_ah,
  output logic        inv_out_en,
  output va_t         inv_out_addr,
  input  logic        inv_in_en,
  input  va_t         inv_in_addr,
  // statistics pulses
  output logic        ac_hit,
  output logic        vc_hit,
  output logic        walk,
  shmem_if.master     mem
);
  typedef enum logic [2:0] {S_IDLE, S_LOOK, S_WALK, S_WAIT, S_STWR, S_STWAIT, S_RES} state_e;

  state_e st_q;
  va_t    addr_q, pc_q;
  seq_t   seq_q;
  reg_t   dst_q;
  pid_t   pred_q, act_q, spid_q;
  logic   fw_q, ah_q;
  pid_t   fwpid_q;

  logic   ac_lk_hit, vc_lk_hit, ac_wr_en, ev_valid, vc_upd, vc_rem, vc_ins;
  pid_t   ac_lk_pid, vc_lk_pid, ac_wr_pid, ev_pid;
  va_t    ac_wr_addr, ev_addr, lk_addr;
  logic   w_req, w_ready, w_we, w_done;
  pid_t   w_pid;
  logic   w_step;

  // lookups use the latched load or store address
  assign lk_addr = addr_q;

  alias_cache #(.ENTRIES(AC_ENTRIES), .WAYS(2)) u_ac (
    .clk, .rst_n,
    .lk_addr, .lk_touch (st_q == S_LOOK), .lk_hit (ac_lk_hit), .lk_pid (ac_lk_pid),
    .wr_en (ac_wr_en), .wr_addr (ac_wr_addr), .wr_pid (ac_wr_pid),
    .ev_valid, .ev_addr, .ev_pid,
    .inv_en (inv_in_en), .inv_addr (inv_in_addr)
  );

  alias_victim_cache #(.ENTRIES(VC_ENTRIES)) u_vc (
    .clk, .rst_n,
    .lk_addr, .lk_hit (vc_lk_hit), .lk_pid (vc_lk_pid),
    .upd_en (vc_upd), .upd_addr (addr_q), .upd_pid (spid_q),
    .rem_en (vc_rem || inv_in_en), .rem_addr (vc_rem ? addr_q : inv_in_addr),
    .ins_en (vc_ins), .ins_addr (ev_addr), .ins_pid (ev_pid)
  );

  alias_table_walker u_walk (
    .clk, .rst_n,
    .root (cfg.alias_root), .alloc_load, .alloc_init (cfg.alias_alloc),
    .req_valid (w_req), .req_ready (w_ready), .req_we (w_we),
    .req_addr (addr_q), .req_pid (spid_q),
    .done (w_done), .rd_pid (w_pid), .walk_step (w_step),
    .mem
  );

  function automatic reload_res_e classify(input pid_t pred, input pid_t act);
    if (pred == act)           return RL_OK;
    else if (act == PID_NONE)  return RL_PNA0;
    else if (pred == PID_NONE) return RL_P0AN;
    else                       return RL_PMAN;
  endfunction

  logic is_load_q;

  // alias / victim cache writes
  always_comb begin
    ac_wr_en   = 1'b0;
    ac_wr_addr = addr_q;
    ac_wr_pid  = PID_NONE;
    vc_upd     = 1'b0;
    vc_rem     = 1'b0;
    unique case (st_q)
      S_LOOK: if (is_load_q && !fw_q && ah_q && !ac_lk_hit && vc_lk_hit) begin
        ac_wr_en  = 1'b1;           // promote the victim line
        ac_wr_pid = vc_lk_pid;
        vc_rem    = 1'b1;
      end else if (!is_load_q) begin
        if (vc_lk_hit) vc_upd = 1'b1;
        else begin
          ac_wr_en  = 1'b1;
          ac_wr_pid = spid_q;
        end
      end
      S_WAIT: if (is_load_q && w_done) begin
        ac_wr_en  = 1'b1;
        ac_wr_pid = w_pid;
      end
      default: ;
    endcase
  end

  assign vc_ins = ev_valid;   // ev_valid already implies an alias-cache write

  assign ld_ready   = (st_q == S_IDLE);
  assign st_ready   = (st_q == S_IDLE) && !ld_valid;
  assign res_valid  = (st_q == S_RES);
  assign res_kind   = classify(pred_q, act_q);
  assign res_actual = act_q;
  assign res_pred   = pred_q;
  assign res_pc     = pc_q;
  assign res_seq    = seq_q;
  assign res_dst    = dst_q;
  assign w_req      = (st_q == S_WALK) || (st_q == S_STWR);
  assign w_we       = (st_q == S_STWR);
  assign ac_hit     = (st_q == S_LOOK) && is_load_q && !fw_q && ah_q && ac_lk_hit;
  assign vc_hit     = (st_q == S_LOOK) && is_load_q && !fw_q && ah_q && !ac_lk_hit && vc_lk_hit;
  assign walk       = (st_q == S_WALK) && w_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= S_IDLE;
      addr_q <= '0; pc_q <= '0; seq_q <= '0; dst_q <= '0;
      pred_q <= PID_NONE; act_q <= PID_NONE; spid_q <= PID_NONE;
      fw_q <= 1'b0; fwpid_q <= PID_NONE; ah_q <= 1'b0; is_load_q <= 1'b0;
      inv_out_en <= 1'b0; inv_out_addr <= '0;
    end else begin
      inv_out_en <= 1'b0;
      unique case (st_q)
        S_IDLE: if (ld_valid) begin
          is_load_q <= 1'b1;
          addr_q <= ld_addr; pc_q <= ld_pc; seq_q <= ld_seq; dst_q <= ld_dst;
          pred_q <= ld_pred; ah_q <= ld_ah;
          fw_q <= sb_fw_hit; fwpid_q <= sb_fw_pid;
          st_q <= S_LOOK;
        end else if (st_valid) begin
          is_load_q <= 1'b0;
          addr_q <= st_addr; spid_q <= st_pid; ah_q <= st_ah;
          st_q <= (st_pid != PID_NONE || st_ah) ? S_LOOK : S_IDLE;
        end
        S_LOOK: begin
          if (is_load_q) begin
            if (fw_q)           begin act_q <= fwpid_q;   st_q <= S_RES;  end
            else if (!ah_q)     begin act_q <= PID_NONE;  st_q <= S_RES;  end
            else if (ac_lk_hit) begin act_q <= ac_lk_pid; st_q <= S_RES;  end
            else if (vc_lk_hit) begin act_q <= vc_lk_pid; st_q <= S_RES;  end
            else                                          st_q <= S_WALK;
          end else begin
            st_q <= S_STWR;
          end
        end
        S_WALK:   if (w_ready) st_q <= S_WAIT;
        S_WAIT:   if (w_done) begin act_q <= w_pid; st_q <= S_RES; end
        S_STWR:   if (w_ready) st_q <= S_STWAIT;
        S_STWAIT: if (w_done) begin
          inv_out_en   <= 1'b1;
          inv_out_addr <= addr_q;
          st_q         <= S_IDLE;
        end
        S_RES:    st_q <= S_IDLE;
        default:  st_q <= S_IDLE;
      endcase
    end
  end
endmodule
