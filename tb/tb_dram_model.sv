// tb_dram_model: behavioural main memory with full/empty bits, for testbenches.
//
// Stands in for the memory controller and DRAM. Every 64-byte line has a
// data word and an F/E bit. A line never written reads as a fixed pattern
// derived from its address (word k = address[31:0] + k) with F/E clear.
// Requests are accepted one at a time (mem_req_ready low while a read is
// outstanding); writes complete at acceptance, reads answer LAT cycles
// later with a one-cycle mem_rsp_valid pulse. While rst_n is low nothing is
// accepted and a pending read is dropped, like a memory controller held in
// reset. Outputs change on the rising clock edge, like the design's. Not synthesizable; counts reads and writes for the testbench.
module tb_dram_model
  import casphar_pkg::*;
#(
  parameter int LAT = 12
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  mem_req_valid,
  output logic  mem_req_ready,
  input  logic  mem_req_we,
  input  addr_t mem_req_addr,
  input  line_t mem_req_wdata,
  input  logic  mem_req_fe,
  output logic  mem_rsp_valid,
  output line_t mem_rsp_rdata,
  output logic  mem_rsp_fe
);
  line_t data [longint unsigned];
  bit    fe   [longint unsigned];
  int    reads = 0, writes = 0, fe_writes = 0;

  function automatic line_t pattern(input addr_t a);
    line_t l;
    for (int k = 0; k < LINE_W/32; k++) l[k*32 +: 32] = a[31:0] + 32'(k);
    return l;
  endfunction

  function automatic line_t peek(input addr_t a);
    longint unsigned k = a >> OFF_W;
    return data.exists(k) ? data[k] : pattern({a[ADDR_W-1:OFF_W], {OFF_W{1'b0}}});
  endfunction

  function automatic bit peek_fe(input addr_t a);
    longint unsigned k = a >> OFF_W;
    return fe.exists(k) ? fe[k] : 1'b0;
  endfunction

  logic            busy = 1'b0;
  int              cnt = 0;
  addr_t           rd_addr = '0;

  assign mem_req_ready = rst_n && !busy && !mem_rsp_valid;

  initial begin
    mem_rsp_valid = 1'b0;
    mem_rsp_rdata = '0;
    mem_rsp_fe    = 1'b0;
  end

  always @(posedge clk) begin
    mem_rsp_valid <= 1'b0;
    if (!rst_n) begin
      busy <= 1'b0;
    end else if (mem_req_valid && mem_req_ready) begin
      if (mem_req_we) begin
        data[mem_req_addr >> OFF_W] = mem_req_wdata;
        fe[mem_req_addr >> OFF_W]   = mem_req_fe;
        writes++;
        if (mem_req_fe) fe_writes++;
      end else begin
        reads++;
        busy    <= 1'b1;
        cnt     <= LAT - 1;
        rd_addr <= mem_req_addr;
      end
    end
    if (busy && rst_n) begin
      if (cnt <= 1) begin
        busy          <= 1'b0;
        mem_rsp_valid <= 1'b1;
        mem_rsp_rdata <= peek(rd_addr);
        mem_rsp_fe    <= peek_fe(rd_addr);
      end else begin
        cnt <= cnt - 1;
      end
    end
  end
endmodule
