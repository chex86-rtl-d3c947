// store_pid_buffer: the store-buffer extension that keeps, for every
// in-flight store, the PID it writes to memory (0 for plain data), its 8-byte
// word address and the page's alias-hosting bit until the store commits. Only
// committed stores leave the buffer (oldest first, on the dr_* handshake) to
// update the alias cache, so stores on a mispredicted path never pollute it;
// squashed stores are dropped. A load looks the buffer up (fw_*) and takes the
// PID of the youngest older store to the same word, so a pointer spilled and
// reloaded before the spill commits is still seen. Stores enter in program
// order (ins_en; full must be low) and commit in order (cm_en with the
// sequence number of the oldest uncommitted store). ENTRIES defaults to the
// 56-entry store queue of the evaluated core. Holding PIDs of transient stores
// until commit follows the description; the forwarding search is this
// design's own addition. Lookup is combinational, updates take one clock.
module store_pid_buffer
  import chex_pkg::*;
#(
  parameter int ENTRIES = 56
) (
  input  logic clk,
  input  logic rst_n,
  input  logic ins_en,
  input  seq_t ins_seq,
  input  va_t  ins_addr,
  input  pid_t ins_pid,
  input  logic ins_ah,
  output logic full,
  input  logic cm_en,
  input  seq_t cm_seq,
  input  logic sq_en,
  input  seq_t sq_seq,
  output logic dr_valid,
  input  logic dr_ready,
  output va_t  dr_addr,
  output pid_t dr_pid,
  output logic dr_ah,
  input  va_t  fw_addr,
  input  seq_t fw_seq,
  output logic fw_hit,
  output pid_t fw_pid
);
  localparam int IDX_W = $clog2(ENTRIES);
  localparam int CNT_W = $clog2(ENTRIES+1);

  seq_t             seq_q [ENTRIES];
  logic [44:0]      a_q   [ENTRIES];
  pid_t             pid_q [ENTRIES];
  logic             ah_q  [ENTRIES];
  logic             cm_q  [ENTRIES];
  logic [IDX_W-1:0] head_q;
  logic [CNT_W-1:0] cnt_q;

  function automatic logic [IDX_W-1:0] slot(input logic [IDX_W-1:0] h, input int k);
    int s;
    s = int'(h) + k;
    if (s >= ENTRIES) s = s - ENTRIES;
    return IDX_W'(s);
  endfunction
  function automatic logic younger(input seq_t a, input seq_t b);
    seq_t d;
    d = a - b;
    return (d != '0) && !d[SEQ_W-1];
  endfunction

  logic pop;

  assign full     = (32'(cnt_q) == ENTRIES);
  assign dr_valid = (cnt_q != '0) && cm_q[head_q];
  assign dr_addr  = {16'd0, a_q[head_q], 3'b000};
  assign dr_pid   = pid_q[head_q];
  assign dr_ah    = ah_q[head_q];
  assign pop      = dr_valid && dr_ready;

  always_comb begin
    fw_hit = 1'b0;
    fw_pid = PID_NONE;
    for (int k = 0; k < ENTRIES; k++)       // later (younger) matches win
      if (k < int'(cnt_q) && a_q[slot(head_q, k)] == fw_addr[47:3] &&
          younger(fw_seq, seq_q[slot(head_q, k)])) begin
        fw_hit = 1'b1;
        fw_pid = pid_q[slot(head_q, k)];
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q <= '0;
      cnt_q  <= '0;
      for (int i = 0; i < ENTRIES; i++) begin
        seq_q[i] <= '0;
        a_q[i]   <= '0;
        pid_q[i] <= PID_NONE;
        ah_q[i]  <= 1'b0;
        cm_q[i]  <= 1'b0;
      end
    end else begin
      automatic logic [CNT_W-1:0] c = cnt_q;
      automatic logic [IDX_W-1:0] h = head_q;
      if (pop) begin
        cm_q[head_q] <= 1'b0;
        h = slot(head_q, 1);
        c = c - 1'b1;
      end
      if (cm_en)
        for (int k = 0; k < ENTRIES; k++)
          if (k < int'(cnt_q) && seq_q[slot(head_q, k)] == cm_seq) cm_q[slot(head_q, k)] <= 1'b1;
      if (sq_en) begin
        automatic logic [CNT_W-1:0] keep = '0;
        for (int k = 0; k < ENTRIES; k++)
          if (k < int'(c) && (cm_q[slot(h, k)] || !younger(seq_q[slot(h, k)], sq_seq)))
            keep = CNT_W'(k + 1);
        c = keep;
      end else if (ins_en && !full) begin
        automatic logic [IDX_W-1:0] t = slot(head_q, int'(cnt_q));
        seq_q[t] <= ins_seq;
        a_q[t]   <= ins_addr[47:3];
        pid_q[t] <= ins_pid;
        ah_q[t]  <= ins_ah;
        cm_q[t]  <= 1'b0;
        c = c + 1'b1;
      end
      head_q <= h;
      cnt_q  <= c;
    end
  end
endmodule
