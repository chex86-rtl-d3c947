// ptr_blacklist: a small direct-mapped, tagged table of load addresses that
// were predicted to reload a pointer but loaded plain data. The reload
// predictor gives no prediction for a load found here, which keeps data loads
// that share a predictor entry from disturbing pointer-reload predictions. A
// load is inserted when its prediction proves wrong in that direction and
// removed if it later does reload a tracked pointer. Lookup is combinational;
// insert and remove take effect on the next clock (remove wins if both hit the
// same entry). Only the existence of such a blacklist is given by the design
// description: its size, indexing, tag width and insert/remove policy are this
// design's own choices.
module ptr_blacklist
  import chex_pkg::*;
#(
  parameter int ENTRIES = 64,
  parameter int TAG_W   = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  va_t  lk_pc,
  output logic lk_hit,
  input  logic ins_en,
  input  va_t  ins_pc,
  input  logic rem_en,
  input  va_t  rem_pc
);
  localparam int IDX_W = $clog2(ENTRIES);

  logic             valid_q [ENTRIES];
  logic [TAG_W-1:0] tag_q   [ENTRIES];

  function automatic logic [IDX_W-1:0] idx_of(input va_t pc);
    return pc[IDX_W-1:0] ^ pc[2*IDX_W-1:IDX_W];
  endfunction
  function automatic logic [TAG_W-1:0] tag_of(input va_t pc);
    return pc[IDX_W +: TAG_W];
  endfunction

  assign lk_hit = valid_q[idx_of(lk_pc)] && tag_q[idx_of(lk_pc)] == tag_of(lk_pc);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) begin
        valid_q[i] <= 1'b0;
        tag_q[i]   <= '0;
      end
    end else begin
      if (ins_en) begin
        valid_q[idx_of(ins_pc)] <= 1'b1;
        tag_q[idx_of(ins_pc)]   <= tag_of(ins_pc);
      end
      if (rem_en && valid_q[idx_of(rem_pc)] && tag_q[idx_of(rem_pc)] == tag_of(rem_pc))
        valid_q[idx_of(rem_pc)] <= 1'b0;
    end
  end
endmodule
