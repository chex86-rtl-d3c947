// shmem_if: request/response bundle used by the units that reach the shadow
// tables in memory (capability table refills and write-through, alias table
// walks). A request is held with req_valid until req_ready; a read returns one
// rsp_valid beat with rsp_rdata, in order. Writes complete at the handshake.
// The handshake is this design's own choice; the description only says that the
// shadow tables live in a privileged shadow address space.
interface shmem_if #(parameter int DW = 64) (input logic clk, input logic rst_n);
  logic          req_valid;
  logic          req_ready;
  logic          req_we;
  logic [63:0]   req_addr;
  logic [DW-1:0] req_wdata;
  logic          rsp_valid;
  logic [DW-1:0] rsp_rdata;

  modport master (input  clk, rst_n,
                  output req_valid, req_we, req_addr, req_wdata,
                  input  req_ready, rsp_valid, rsp_rdata);
  modport slave  (input  clk, rst_n,
                  input  req_valid, req_we, req_addr, req_wdata,
                  output req_ready, rsp_valid, rsp_rdata);

  // A request, once raised, stays stable until accepted
  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
      req_valid && !req_ready |=> req_valid && $stable(req_addr) && $stable(req_we));
endinterface
