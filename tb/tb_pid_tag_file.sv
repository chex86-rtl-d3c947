// Testbench for pid_tag_file: compares against a reference model of
// finalized + transient tags under random writes, commits, fixes and squashes.
`include "tb_util.svh"
module tb_pid_tag_file;
  import chex_pkg::*;
  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 0;
  reg_t rd_reg [4]; pid_t rd_pid [4];
  logic wr_en [2]; reg_t wr_reg [2]; pid_t wr_pid [2]; seq_t wr_seq [2];
  logic cm_en = 0, fix_en = 0, sq_en = 0; seq_t cm_seq = 0, fix_seq = 0, sq_seq = 0;
  reg_t fix_reg = 0; pid_t fix_pid = 0;
  logic full; pid_t fin_pid [NREG];
  int checks = 0, failures = 0;

  pid_tag_file #(.DEPTH(DEPTH), .NRD(4), .NWR(2)) dut (.*);
  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("watchdog"); `TB_FINISH end

  // reference: in-flight list in program order (reg, pid, seq), finalized array
  typedef struct { reg_t r; pid_t p; seq_t s; } ent_t;
  ent_t q[$];
  pid_t fin [NREG];
  seq_t next_seq;

  function automatic pid_t ref_read(reg_t r);
    pid_t v = fin[r];
    foreach (q[i]) if (q[i].r == r) v = q[i].p;
    return v;
  endfunction
  function automatic int count(reg_t r);
    int c = 0;
    foreach (q[i]) if (q[i].r == r) c++;
    return c;
  endfunction

  initial begin
    for (int i = 0; i < NREG; i++) fin[i] = '0;
    for (int p = 0; p < 2; p++) begin wr_en[p] = 0; wr_reg[p] = 0; wr_pid[p] = 0; wr_seq[p] = 0; end
    for (int p = 0; p < 4; p++) rd_reg[p] = 0;
    next_seq = 16'hFFF0;          // exercise wrap-around
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      // check reads
      for (int p = 0; p < 4; p++) rd_reg[p] = reg_t'($urandom_range(0, 7));
      #1;
      for (int p = 0; p < 4; p++) begin if (rd_pid[p] !== ref_read(rd_reg[p]) && failures < 2) $display("r=%0d q=%0d cnt=%0d %p", rd_reg[p], q.size(), dut.cnt_q[rd_reg[p]], q); `CHECK_EQ(rd_pid[p], ref_read(rd_reg[p]), "read") end
      for (int r = 0; r < 8; r++) `CHECK_EQ(fin_pid[r], fin[r], "finalized")
      // choose one action
      cm_en = 0; fix_en = 0; sq_en = 0;
      for (int p = 0; p < 2; p++) wr_en[p] = 0;
      case ($urandom_range(0, 9))
        0, 1, 2, 3: if (!full) begin           // one micro-op, maybe with a forced tag
          wr_en[0] = 1; wr_reg[0] = reg_t'($urandom_range(0,7));
          wr_pid[0] = pid_t'($urandom_range(0, 50)); wr_seq[0] = next_seq;
          if ($urandom_range(0,3) == 0) begin
            wr_en[1] = 1; wr_reg[1] = reg_t'($urandom_range(0,7));
            wr_pid[1] = pid_t'($urandom_range(0, 50)); wr_seq[1] = next_seq;
          end
          if (count(wr_reg[0]) + 1 + (wr_en[1] && wr_reg[1] == wr_reg[0] ? 1 : 0) > DEPTH ||
              (wr_en[1] && count(wr_reg[1]) + 1 > DEPTH)) begin
            wr_en[0] = 0; wr_en[1] = 0;
          end else begin
            q.push_back('{wr_reg[0], wr_pid[0], next_seq});
            if (wr_en[1]) q.push_back('{wr_reg[1], wr_pid[1], next_seq});
            next_seq++;
          end
        end
        4, 5, 6: if (q.size() > 0) begin      // commit the oldest micro-op
          automatic seq_t s = q[0].s;
          cm_en = 1; cm_seq = s;
          while (q.size() > 0 && q[0].s == s) begin fin[q[0].r] = q[0].p; void'(q.pop_front()); end
        end
        7: if (q.size() > 0) begin            // fix one in-flight PID
          automatic int k = $urandom_range(0, q.size()-1);
          fix_en = 1; fix_reg = q[k].r; fix_seq = q[k].s; fix_pid = pid_t'($urandom_range(100, 200));
          foreach (q[i]) if (q[i].r == fix_reg && q[i].s == fix_seq) q[i].p = fix_pid;
        end
        8: if (q.size() > 0) begin            // squash younger than a random in-flight op
          automatic int k = $urandom_range(0, q.size()-1);
          sq_en = 1; sq_seq = q[k].s;
          while (q.size() > 0 && q[q.size()-1].s != sq_seq) void'(q.pop_back());
          next_seq = sq_seq + 1'b1;
        end
        default: ;
      endcase
    end
    @(negedge clk); cm_en = 0; fix_en = 0; sq_en = 0; wr_en[0] = 0; wr_en[1] = 0;
    `TB_FINISH
  end
endmodule
