// alias_table_walker: hardware walker of the shadow alias table, a 5-level
// radix tree laid out like a page table. Each level is a 4 KiB table of 512
// 8-byte entries indexed by 9 bits of the 48-bit virtual address
// (bits 47:39, 38:30, 29:21, 20:12, 11:3). An entry of levels 1 to 4 holds the
// address of the next table in bits 47:12 and a present bit in bit 0; an entry
// of the last level holds the PID of the pointer spilled at that 8-byte word
// (0: none). A read walk returns that PID, or 0 as soon as a level is absent.
// A write walk stores a PID in the last level; when a level is absent and the
// PID is non-zero it links in a new table taken from a bump allocator of
// zeroed pages (loaded from alloc_init on alloc_load), otherwise it ends. One
// walk at a time: req_ready is high when idle, done pulses at the end.
// A 5-level table with a hardware walker whose leaves hold PIDs follows the
// description; the entry format, 9-bit levels and the page allocator are this
// design's own.
module alias_table_walker
  import chex_pkg::*;
#(
  parameter int LEVELS = 5
) (
  input  logic    clk,
  input  logic    rst_n,
  input  va_t     root,          // address of the top-level table
  input  logic    alloc_load,
  input  va_t     alloc_init,
  input  logic    req_valid,
  output logic    req_ready,
  input  logic    req_we,
  input  va_t     req_addr,
  input  pid_t    req_pid,
  output logic    done,
  output pid_t    rd_pid,
  output logic    walk_step,     // pulse per table access (statistics)
  shmem_if.master mem
);
  typedef enum logic [2:0] {S_IDLE, S_RD, S_RSP, S_LINK, S_LEAF_WR, S_DONE} state_e;

  state_e      st_q;
  logic [2:0]  lvl_q;
  va_t         tbl_q, va_q, alloc_q;
  logic        we_q;
  pid_t        pid_q, res_q;
  logic [8:0]  idx;

  assign idx = va_q[47 - 9*lvl_q -: 9];

  assign req_ready     = (st_q == S_IDLE);
  assign done          = (st_q == S_DONE);
  assign rd_pid        = res_q;
  assign mem.req_valid = (st_q == S_RD) || (st_q == S_LINK) || (st_q == S_LEAF_WR);
  assign mem.req_we    = (st_q == S_LINK) || (st_q == S_LEAF_WR);
  assign mem.req_addr  = tbl_q + {52'd0, idx, 3'b000};
  assign mem.req_wdata = (st_q == S_LINK) ? {alloc_q[63:12], 12'h001} : 64'(pid_q);
  assign walk_step     = mem.req_valid && mem.req_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q    <= S_IDLE;
      lvl_q   <= '0;
      tbl_q   <= '0;
      va_q    <= '0;
      alloc_q <= '0;
      we_q    <= 1'b0;
      pid_q   <= PID_NONE;
      res_q   <= PID_NONE;
    end else begin
      if (alloc_load) alloc_q <= alloc_init;
      unique case (st_q)
        S_IDLE: if (req_valid) begin
          lvl_q <= '0;
          tbl_q <= root;
          va_q  <= req_addr;
          we_q  <= req_we;
          pid_q <= req_pid;
          res_q <= PID_NONE;
          st_q  <= (32'(LEVELS) == 1 && req_we) ? S_LEAF_WR : S_RD;
        end
        S_RD: if (mem.req_ready) st_q <= S_RSP;
        S_RSP: if (mem.rsp_valid) begin
          if (32'(lvl_q) == LEVELS-1) begin        // leaf read
            res_q <= mem.rsp_rdata[PID_W-1:0];
            st_q  <= S_DONE;
          end else if (mem.rsp_rdata[0]) begin     // next level present
            tbl_q <= {mem.rsp_rdata[63:12], 12'h000};
            lvl_q <= lvl_q + 1'b1;
            st_q  <= (we_q && 32'(lvl_q) == LEVELS-2) ? S_LEAF_WR : S_RD;
          end else if (we_q && pid_q != PID_NONE) begin
            st_q  <= S_LINK;
          end else begin
            st_q  <= S_DONE;                       // absent: PID 0 / nothing to clear
          end
        end
        S_LINK: if (mem.req_ready) begin
          tbl_q   <= {alloc_q[63:12], 12'h000};
          alloc_q <= alloc_q + 64'h1000;
          lvl_q   <= lvl_q + 1'b1;
          st_q    <= (32'(lvl_q) == LEVELS-2) ? S_LEAF_WR : S_RD;
        end
        S_LEAF_WR: if (mem.req_ready) st_q <= S_DONE;
        S_DONE: st_q <= S_IDLE;
        default: st_q <= S_IDLE;
      endcase
    end
  end
endmodule
