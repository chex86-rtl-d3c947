// shmem_model: behavioural model of the memory holding the shadow tables, for
// testbenches only. Sparse storage (unwritten words read as zero), a request is
// accepted after LAT_REQ idle cycles and a read answers LAT_RSP cycles after
// acceptance. Counts reads and writes.
module shmem_model #(
  parameter int DW      = 64,
  parameter int LAT_REQ = 1,
  parameter int LAT_RSP = 2
) (
  shmem_if.slave bus
);
  logic [DW-1:0] mem [logic [63:0]];
  int            wait_cnt;
  int            rsp_cnt;
  logic [DW-1:0] rsp_data;
  int            n_reads, n_writes;

  assign bus.req_ready = bus.req_valid && wait_cnt >= LAT_REQ && rsp_cnt == 0;

  function automatic logic [DW-1:0] peek(input logic [63:0] a);
    return mem.exists(a) ? mem[a] : '0;
  endfunction
  task automatic poke(input logic [63:0] a, input logic [DW-1:0] d);
    mem[a] = d;
  endtask

  initial begin
    wait_cnt = 0; rsp_cnt = 0; rsp_data = '0; n_reads = 0; n_writes = 0;
    bus.rsp_valid = 1'b0; bus.rsp_rdata = '0;
  end

  always @(posedge bus.clk) begin
    bus.rsp_valid <= 1'b0;
    if (rsp_cnt > 0) begin
      rsp_cnt <= rsp_cnt - 1;
      if (rsp_cnt == 1) begin
        bus.rsp_valid <= 1'b1;
        bus.rsp_rdata <= rsp_data;
      end
    end
    if (bus.req_valid && !bus.req_ready) wait_cnt <= wait_cnt + 1;
    else wait_cnt <= 0;
    if (bus.req_ready) begin
      if (bus.req_we) begin
        mem[bus.req_addr] = bus.req_wdata;
        n_writes++;
      end else begin
        rsp_data <= peek(bus.req_addr);
        rsp_cnt  <= LAT_RSP;
        n_reads++;
      end
    end
  end
endmodule
