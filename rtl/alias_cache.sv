// alias_cache: in-processor cache of the shadow alias table, mapping the
// address of a spilled 8-byte word to the PID of the pointer stored there. It
// has ENTRIES entries (256 in the design) in WAYS ways (2), indexed by the word
// address, with one LRU bit per set. Lookup is combinational; lk_touch marks
// the hitting way most recently used. A write updates the matching line or,
// when the PID is non-zero, fills the LRU way (an invalid way first); a valid
// line pushed out is reported on ev_* in the same cycle so the victim cache can
// take it. An invalidation (a store to that word on another core) drops the
// line. Size and associativity follow the description; word granularity, LRU
// replacement and allocating only for non-zero PIDs are this design's own.
// Only address bits [47:3] are used (48-bit virtual addresses).
module alias_cache
  import chex_pkg::*;
#(
  parameter int ENTRIES = 256,
  parameter int WAYS    = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  va_t  lk_addr,
  input  logic lk_touch,
  output logic lk_hit,
  output pid_t lk_pid,
  input  logic wr_en,
  input  va_t  wr_addr,
  input  pid_t wr_pid,
  output logic ev_valid,
  output va_t  ev_addr,
  output pid_t ev_pid,
  input  logic inv_en,
  input  va_t  inv_addr
);
  localparam int SETS  = ENTRIES / WAYS;
  localparam int IDX_W = $clog2(SETS);
  localparam int TAG_W = 45 - IDX_W;

  logic             v_q   [SETS][WAYS];
  logic [TAG_W-1:0] tag_q [SETS][WAYS];
  pid_t             pid_q [SETS][WAYS];
  logic             lru_q [SETS];        // way to replace next (2 ways)

  function automatic logic [IDX_W-1:0] idx_of(input va_t a);
    return a[3 +: IDX_W];
  endfunction
  function automatic logic [TAG_W-1:0] tag_of(input va_t a);
    return a[47:3+IDX_W];
  endfunction

  logic [IDX_W-1:0] li, wi, ii;
  logic             l_way, w_hit, w_way, w_inv, w_inv_way, victim_way;

  assign li = idx_of(lk_addr);
  assign wi = idx_of(wr_addr);
  assign ii = idx_of(inv_addr);

  always_comb begin
    lk_hit = 1'b0; lk_pid = PID_NONE; l_way = 1'b0;
    w_hit  = 1'b0; w_way  = 1'b0;
    w_inv  = 1'b0; w_inv_way = 1'b0;
    for (int w = WAYS-1; w >= 0; w--) begin
      if (v_q[li][w] && tag_q[li][w] == tag_of(lk_addr)) begin
        lk_hit = 1'b1; lk_pid = pid_q[li][w]; l_way = 1'(w);
      end
      if (v_q[wi][w] && tag_q[wi][w] == tag_of(wr_addr)) begin
        w_hit = 1'b1; w_way = 1'(w);
      end
      if (!v_q[wi][w]) begin
        w_inv = 1'b1; w_inv_way = 1'(w);
      end
    end
    victim_way = w_inv ? w_inv_way : lru_q[wi];
    ev_valid   = wr_en && !w_hit && wr_pid != PID_NONE && !w_inv;
    ev_addr    = {16'd0, tag_q[wi][victim_way], wi, 3'b000};
    ev_pid     = pid_q[wi][victim_way];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        lru_q[s] <= 1'b0;
        for (int w = 0; w < WAYS; w++) begin
          v_q[s][w]   <= 1'b0;
          tag_q[s][w] <= '0;
          pid_q[s][w] <= PID_NONE;
        end
      end
    end else begin
      if (lk_touch && lk_hit) lru_q[li] <= ~l_way;
      if (inv_en)
        for (int w = 0; w < WAYS; w++)
          if (v_q[ii][w] && tag_q[ii][w] == tag_of(inv_addr)) v_q[ii][w] <= 1'b0;
      if (wr_en) begin
        if (w_hit) begin
          pid_q[wi][w_way] <= wr_pid;
          lru_q[wi]        <= ~w_way;
        end else if (wr_pid != PID_NONE) begin
          v_q[wi][victim_way]   <= 1'b1;
          tag_q[wi][victim_way] <= tag_of(wr_addr);
          pid_q[wi][victim_way] <= wr_pid;
          lru_q[wi]             <= ~victim_way;
        end
      end
    end
  end
endmodule
