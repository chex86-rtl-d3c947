// hw_checker: the rule-validation co-processor used while profiling new code.
// For a micro-op result (req_value) and the PID the pointer tracker gave it
// (req_pred), it searches the shadow capability table exhaustively for a block
// - live or already freed - whose range [base, base+bounds) contains the value.
// The PID of the first such block is the actual PID (0 when none contains it,
// i.e. the value is not a pointer into a tracked block). When the actual PID
// differs from the predicted one, the offending micro-op is reported
// (mismatch with dump_pc, dump_value, dump_pred, dump_actual) so that the rule
// table can be corrected; n_mismatch counts such reports.
// The search reads entries PID 1, 2, ... through its own request/response port
// (one outstanding read) and stops at the first match, at the first entry that
// was never generated (PIDs are handed out in order), or at PID(-1). A search
// therefore takes one table read per PID generated so far; done pulses one
// cycle after the last response. One request at a time (req_ready when idle).
// What it computes follows the description of the checker; the sequential scan,
// its stopping rule and the report registers are this design's own choices.
module hw_checker
  import chex_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  va_t         tbl_base,      // shadow capability table base
  input  logic        req_valid,
  output logic        req_ready,
  input  va_t         req_pc,
  input  logic [63:0] req_value,     // result value of the micro-op
  input  pid_t        req_pred,      // PID given by the pointer tracker
  output logic        done,
  output logic        mismatch,      // with done: prediction was wrong
  output pid_t        dump_actual,   // actual PID found
  output va_t         dump_pc,
  output logic [63:0] dump_value,
  output pid_t        dump_pred,
  output logic [15:0] n_mismatch,
  shmem_if.master     mem
);
  typedef enum logic [1:0] {S_IDLE, S_RD, S_WAIT, S_DONE} state_e;

  state_e      st_q;
  pid_t        pid_q, act_q;
  va_t         pc_q;
  logic [63:0] val_q;
  pid_t        pred_q;
  cap_t        c;

  function automatic logic never_made(input cap_t e);
    return e.base == '0 && e.bounds == '0 && !e.valid && !e.busy;
  endfunction

  assign c             = cap_t'(mem.rsp_rdata);
  assign req_ready     = (st_q == S_IDLE);
  assign mem.req_valid = (st_q == S_RD);
  assign mem.req_we    = 1'b0;
  assign mem.req_addr  = tbl_base + 64'({pid_q, 4'b0000});
  assign mem.req_wdata = '0;
  assign done          = (st_q == S_DONE);
  assign mismatch      = done && (act_q != pred_q);
  assign dump_actual   = act_q;
  assign dump_pc       = pc_q;
  assign dump_value    = val_q;
  assign dump_pred     = pred_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= S_IDLE;
      pid_q <= PID_NONE; act_q <= PID_NONE; pc_q <= '0; val_q <= '0; pred_q <= PID_NONE;
      n_mismatch <= '0;
    end else begin
      unique case (st_q)
        S_IDLE: if (req_valid) begin
          pc_q <= req_pc; val_q <= req_value; pred_q <= req_pred;
          pid_q <= pid_t'(1); act_q <= PID_NONE;
          st_q <= S_RD;
        end
        S_RD:   if (mem.req_ready) st_q <= S_WAIT;
        S_WAIT: if (mem.rsp_valid) begin
          if (never_made(c)) st_q <= S_DONE;
          else if (val_q >= c.base && val_q - c.base < 64'(c.bounds)) begin
            act_q <= pid_q;
            st_q  <= S_DONE;
          end else if (pid_q + 1'b1 == PID_WILD) st_q <= S_DONE;
          else begin
            pid_q <= pid_q + 1'b1;
            st_q  <= S_RD;
          end
        end
        S_DONE: begin
          if (act_q != pred_q) n_mismatch <= n_mismatch + 1'b1;
          st_q <= S_IDLE;
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end
endmodule
