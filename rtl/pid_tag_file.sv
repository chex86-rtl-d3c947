// pid_tag_file: the register tags of the speculative pointer tracker. Each
// architectural (or microcode temporary) register holds a finalized PID, set by
// the last committed micro-op that wrote it, and an age-ordered list of up to
// DEPTH transient PIDs written by in-flight micro-ops, each with its sequence
// number. Reads return the youngest transient PID, or the finalized one when
// there is none. On commit of sequence number s every register whose oldest
// transient entry carries s moves that PID into its finalized field. On a
// squash every transient entry younger than the offending sequence number is
// dropped. A fix port overwrites the PID of one in-flight entry (used when a
// reload prediction named the wrong buffer). The split into finalized and
// transient PIDs, squash by sequence number and use of the youngest transient
// PID follow the description; DEPTH, the port counts and the fix port are this
// design's own. Sequence numbers are compared modulo 2^SEQ_W.
// Within a cycle: squash, then commit, then fix, then writes in port order.
// Reads are combinational and see the state before this cycle's updates.
// full is raised while some register has fewer than NWR free entries; the front
// end must then stop issuing writes.
module pid_tag_file
  import chex_pkg::*;
#(
  parameter int DEPTH = 8,
  parameter int NRD   = 4,
  parameter int NWR   = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  reg_t rd_reg [NRD],
  output pid_t rd_pid [NRD],
  input  logic wr_en  [NWR],
  input  reg_t wr_reg [NWR],
  input  pid_t wr_pid [NWR],
  input  seq_t wr_seq [NWR],
  input  logic cm_en,
  input  seq_t cm_seq,
  input  logic fix_en,
  input  reg_t fix_reg,
  input  seq_t fix_seq,
  input  pid_t fix_pid,
  input  logic sq_en,
  input  seq_t sq_seq,
  output logic full,
  output pid_t fin_pid [NREG]      // finalized PIDs, for observation
);
  localparam int CNT_W = $clog2(DEPTH+1);

  pid_t             tp_q  [NREG][DEPTH];
  seq_t             ts_q  [NREG][DEPTH];
  logic [CNT_W-1:0] cnt_q [NREG];
  pid_t             fin_q [NREG];

  function automatic logic younger(input seq_t a, input seq_t b);  // a after b
    seq_t d;
    d = a - b;
    return (d != '0) && !d[SEQ_W-1];
  endfunction

  always_comb begin
    for (int p = 0; p < NRD; p++) begin
      rd_pid[p] = fin_q[rd_reg[p]];
      for (int e = 0; e < DEPTH; e++)
        if (CNT_W'(e) == cnt_q[rd_reg[p]] - 1'b1 && cnt_q[rd_reg[p]] != '0)
          rd_pid[p] = tp_q[rd_reg[p]][e];
    end
    full = 1'b0;
    for (int r = 0; r < NREG; r++)
      if (32'(cnt_q[r]) > DEPTH - NWR) full = 1'b1;
    fin_pid = fin_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NREG; r++) begin
        cnt_q[r] <= '0;
        fin_q[r] <= PID_NONE;
        for (int e = 0; e < DEPTH; e++) begin
          tp_q[r][e] <= PID_NONE;
          ts_q[r][e] <= '0;
        end
      end
    end else begin
      logic [CNT_W-1:0] c, keep;
      pid_t             f;
      pid_t             tp [DEPTH];
      seq_t             ts [DEPTH];
      for (int r = 0; r < NREG; r++) begin
        c  = cnt_q[r];
        f  = fin_q[r];
        tp = tp_q[r];
        ts = ts_q[r];
        // squash: entries are age ordered, so the survivors are a prefix
        if (sq_en) begin
          keep = '0;
          for (int e = 0; e < DEPTH; e++)
            if (CNT_W'(e) < c && !younger(ts[e], sq_seq)) keep = CNT_W'(e + 1);
          c = keep;
        end
        // commit: the oldest entry becomes the finalized PID
        // (a micro-op may own up to NWR entries of one register)
        for (int p = 0; p < NWR; p++)
          if (cm_en && c != '0 && ts[0] == cm_seq) begin
            f = tp[0];
            for (int e = 0; e < DEPTH-1; e++) begin
              tp[e] = tp[e+1];
              ts[e] = ts[e+1];
            end
            c = c - 1'b1;
          end
        // fix a mispredicted in-flight PID
        if (fix_en && reg_t'(r) == fix_reg)
          for (int e = 0; e < DEPTH; e++)
            if (CNT_W'(e) < c && ts[e] == fix_seq) tp[e] = fix_pid;
        // new transient PIDs, in program order
        for (int p = 0; p < NWR; p++)
          if (wr_en[p] && reg_t'(r) == wr_reg[p] && 32'(c) < DEPTH) begin
            for (int e = 0; e < DEPTH; e++)
              if (CNT_W'(e) == c) begin
                tp[e] = wr_pid[p];
                ts[e] = wr_seq[p];
              end
            c = c + 1'b1;
          end
        cnt_q[r] <= c;
        fin_q[r] <= f;
        tp_q[r]  <= tp;
        ts_q[r]  <= ts;
      end
    end
  end
endmodule
