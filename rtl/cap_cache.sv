// cap_cache: the in-processor capability cache, fully associative, holding
// ENTRIES (64 in the design) capabilities tagged by PID. Lookup is
// combinational. A write updates the line holding that PID, or else fills an
// invalid line, or else replaces the line under a round-robin pointer. A remote
// invalidation (a free on another core) clears the valid and busy bits of the
// cached capability but keeps the line, so later use-after-free checks still
// find it. A flush drops every line. Size, full associativity and the remote
// invalidation rule follow the description; round-robin replacement is this
// design's own choice.
module cap_cache
  import chex_pkg::*;
#(
  parameter int ENTRIES = 64
) (
  input  logic clk,
  input  logic rst_n,
  input  pid_t lk_pid,
  output logic lk_hit,
  output cap_t lk_cap,
  input  logic wr_en,
  input  pid_t wr_pid,
  input  cap_t wr_cap,
  input  logic inv_en,
  input  pid_t inv_pid,
  input  logic flush
);
  localparam int IDX_W = $clog2(ENTRIES);

  logic             v_q   [ENTRIES];
  pid_t             pid_q [ENTRIES];
  cap_t             cap_q [ENTRIES];
  logic [IDX_W-1:0] rr_q;

  logic             w_hit, w_free;
  logic [IDX_W-1:0] w_hit_idx, w_free_idx, w_idx;

  always_comb begin
    lk_hit = 1'b0;
    lk_cap = '0;
    w_hit  = 1'b0;  w_hit_idx  = '0;
    w_free = 1'b0;  w_free_idx = '0;
    for (int i = ENTRIES-1; i >= 0; i--) begin
      if (v_q[i] && pid_q[i] == lk_pid) begin
        lk_hit = 1'b1;
        lk_cap = cap_q[i];
      end
      if (v_q[i] && pid_q[i] == wr_pid) begin
        w_hit = 1'b1;  w_hit_idx = IDX_W'(i);
      end
      if (!v_q[i]) begin
        w_free = 1'b1; w_free_idx = IDX_W'(i);
      end
    end
    w_idx = w_hit ? w_hit_idx : (w_free ? w_free_idx : rr_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr_q <= '0;
      for (int i = 0; i < ENTRIES; i++) begin
        v_q[i]   <= 1'b0;
        pid_q[i] <= PID_NONE;
        cap_q[i] <= '0;
      end
    end else if (flush) begin
      for (int i = 0; i < ENTRIES; i++) v_q[i] <= 1'b0;
    end else begin
      if (inv_en)
        for (int i = 0; i < ENTRIES; i++)
          if (v_q[i] && pid_q[i] == inv_pid) begin
            cap_q[i].valid <= 1'b0;
            cap_q[i].busy  <= 1'b0;
          end
      if (wr_en) begin
        v_q[w_idx]   <= 1'b1;
        pid_q[w_idx] <= wr_pid;
        cap_q[w_idx] <= wr_cap;
        if (!w_hit && !w_free) rr_q <= rr_q + 1'b1;
      end
    end
  end
endmodule
