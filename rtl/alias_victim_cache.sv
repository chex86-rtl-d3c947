// alias_victim_cache: fully associative victim cache of ENTRIES (32 in the
// design) spilled-pointer aliases, filled with lines pushed out of the alias
// cache and replaced first-in first-out. Lookup is combinational. upd_en
// changes the PID of a present line, rem_en drops a present line (used when a
// line moves back into the alias cache, and for remote invalidations), ins_en
// adds a line. Size and full associativity follow the description; FIFO
// replacement is this design's own choice. Addresses are 8-byte word
// addresses, bits [47:3].
module alias_victim_cache
  import chex_pkg::*;
#(
  parameter int ENTRIES = 32
) (
  input  logic clk,
  input  logic rst_n,
  input  va_t  lk_addr,
  output logic lk_hit,
  output pid_t lk_pid,
  input  logic upd_en,
  input  va_t  upd_addr,
  input  pid_t upd_pid,
  input  logic rem_en,
  input  va_t  rem_addr,
  input  logic ins_en,
  input  va_t  ins_addr,
  input  pid_t ins_pid
);
  localparam int IDX_W = $clog2(ENTRIES);

  logic        v_q   [ENTRIES];
  logic [44:0] a_q   [ENTRIES];
  pid_t        pid_q [ENTRIES];
  logic [IDX_W-1:0] fifo_q;

  always_comb begin
    lk_hit = 1'b0;
    lk_pid = PID_NONE;
    for (int i = 0; i < ENTRIES; i++)
      if (v_q[i] && a_q[i] == lk_addr[47:3]) begin
        lk_hit = 1'b1;
        lk_pid = pid_q[i];
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fifo_q <= '0;
      for (int i = 0; i < ENTRIES; i++) begin
        v_q[i]   <= 1'b0;
        a_q[i]   <= '0;
        pid_q[i] <= PID_NONE;
      end
    end else begin
      for (int i = 0; i < ENTRIES; i++) begin
        if (upd_en && v_q[i] && a_q[i] == upd_addr[47:3]) pid_q[i] <= upd_pid;
        if (rem_en && v_q[i] && a_q[i] == rem_addr[47:3]) v_q[i] <= 1'b0;
      end
      if (ins_en) begin
        v_q[fifo_q]   <= 1'b1;
        a_q[fifo_q]   <= ins_addr[47:3];
        pid_q[fifo_q] <= ins_pid;
        fifo_q        <= (32'(fifo_q) == ENTRIES-1) ? '0 : fifo_q + 1'b1;
      end
    end
  end
endmodule
