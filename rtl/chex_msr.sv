// chex_msr: the model-specific registers through which the OS (or another
// trusted entity, with wrmsr) configures the capability extension for the
// running process: the entry and exit points of up to NUM_HEAP_FN registered
// heap-management functions with their signatures, the protection mode and the
// security-critical code region, the bases of the shadow capability table and
// shadow alias table, and the largest allowed allocation (1 GiB at reset, the
// value used in the evaluation). Writes to the rule window are forwarded to the
// rule database. Registers are written one per cycle and read combinationally.
// The register map, the number of function slots and the reset values other
// than the 1 GiB limit are this design's own choices; the description only says
// that such registers exist, have a model-specific count and are saved and
// restored on a context switch (which is done by reading and writing them).
module chex_msr
  import chex_pkg::*;
#(
  parameter int NUM_HEAP_FN = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        we,
  input  logic [11:0] addr,
  input  logic [63:0] wdata,
  output logic [63:0] rdata,
  output chex_cfg_t   cfg,
  output heapfn_t     heapfn [NUM_HEAP_FN],
  output logic        alias_alloc_load,   // pulse: walker reloads its page allocator
  output logic        rule_we,
  output logic [4:0]  rule_idx,
  output rule_e       rule_val
);
  localparam int FN_W = $clog2(NUM_HEAP_FN);

  logic             is_fn, is_rule;
  logic [FN_W-1:0]  fn_idx;
  logic [1:0]       fn_field;

  assign is_fn    = (addr >= MSR_HEAPFN) && (addr < MSR_HEAPFN + 12'(4*NUM_HEAP_FN));
  assign is_rule  = (addr >= MSR_RULE) && (addr < MSR_RULE + 12'd32);
  assign fn_idx   = FN_W'((addr - MSR_HEAPFN) >> 2);
  assign fn_field = addr[1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg.mode         <= MODE_OFF;
      cfg.region_lo    <= '0;
      cfg.region_hi    <= '0;
      cfg.cap_tbl_base <= '0;
      cfg.alias_root   <= '0;
      cfg.alias_alloc  <= '0;
      cfg.max_alloc    <= 64'h4000_0000;   // 1 GiB
      for (int i = 0; i < NUM_HEAP_FN; i++) begin
        heapfn[i].entry_pc <= '0;
        heapfn[i].exit_pc  <= '0;
        heapfn[i].kind     <= HF_NONE;
        heapfn[i].arg_reg  <= REG_RDI;
        heapfn[i].ret_reg  <= REG_RAX;
      end
    end else if (we) begin
      unique case (addr)
        MSR_MODE:        cfg.mode         <= prot_mode_e'(wdata[1:0]);
        MSR_REGION_LO:   cfg.region_lo    <= wdata;
        MSR_REGION_HI:   cfg.region_hi    <= wdata;
        MSR_CAP_TBL:     cfg.cap_tbl_base <= wdata;
        MSR_ALIAS_ROOT:  cfg.alias_root   <= wdata;
        MSR_ALIAS_ALLOC: cfg.alias_alloc  <= wdata;
        MSR_MAX_ALLOC:   cfg.max_alloc    <= wdata;
        default: if (is_fn) begin
          unique case (fn_field)
            2'd0: heapfn[fn_idx].entry_pc <= wdata;
            2'd1: heapfn[fn_idx].exit_pc  <= wdata;
            2'd2: heapfn[fn_idx].kind     <= heapfn_e'(wdata[1:0]);
            2'd3: begin
              heapfn[fn_idx].arg_reg <= wdata[REG_W-1:0];
              heapfn[fn_idx].ret_reg <= wdata[8+REG_W-1:8];
            end
          endcase
        end
      endcase
    end
  end

  assign alias_alloc_load = we && (addr == MSR_ALIAS_ALLOC);
  assign rule_we  = we && is_rule;
  assign rule_idx = addr[4:0];
  assign rule_val = rule_e'(wdata[2:0]);

  always_comb begin
    rdata = '0;
    unique case (addr)
      MSR_MODE:        rdata = 64'(cfg.mode);
      MSR_REGION_LO:   rdata = cfg.region_lo;
      MSR_REGION_HI:   rdata = cfg.region_hi;
      MSR_CAP_TBL:     rdata = cfg.cap_tbl_base;
      MSR_ALIAS_ROOT:  rdata = cfg.alias_root;
      MSR_ALIAS_ALLOC: rdata = cfg.alias_alloc;
      MSR_MAX_ALLOC:   rdata = cfg.max_alloc;
      default: if (is_fn) begin
        unique case (fn_field)
          2'd0: rdata = heapfn[fn_idx].entry_pc;
          2'd1: rdata = heapfn[fn_idx].exit_pc;
          2'd2: rdata = 64'(heapfn[fn_idx].kind);
          2'd3: rdata = {48'd0, 3'd0, heapfn[fn_idx].ret_reg, 3'd0, heapfn[fn_idx].arg_reg};
        endcase
      end
    endcase
  end
endmodule
