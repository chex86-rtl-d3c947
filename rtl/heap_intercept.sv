// heap_intercept: compares the address of every macro-op entering the
// front end (its first micro-op) with the entry and exit points of the
// registered heap-management functions. A match reports which function kind
// (allocation or free), whether it is the entry or the exit, and the
// function's signature registers. Purely combinational; if several slots match
// the lowest-numbered one wins (the description does not say; slots are
// expected to hold distinct addresses). Interception on the address of the
// first macro-op of the entry and of the returning macro-op at the exit follows
// the description; the priority rule is this design's own.
module heap_intercept
  import chex_pkg::*;
#(
  parameter int NUM_HEAP_FN = 8
) (
  input  logic    valid,
  input  va_t     pc,
  input  logic    first,
  input  heapfn_t heapfn [NUM_HEAP_FN],
  output logic    hit,
  output logic    is_entry,
  output heapfn_e kind,
  output reg_t    arg_reg,
  output reg_t    ret_reg
);
  always_comb begin
    hit      = 1'b0;
    is_entry = 1'b0;
    kind     = HF_NONE;
    arg_reg  = REG_RDI;
    ret_reg  = REG_RAX;
    for (int i = NUM_HEAP_FN-1; i >= 0; i--) begin
      if (valid && first && heapfn[i].kind != HF_NONE &&
          (pc == heapfn[i].entry_pc || pc == heapfn[i].exit_pc)) begin
        hit      = 1'b1;
        is_entry = (pc == heapfn[i].entry_pc);
        kind     = heapfn[i].kind;
        arg_reg  = heapfn[i].arg_reg;
        ret_reg  = heapfn[i].ret_reg;
      end
    end
  end
endmodule
