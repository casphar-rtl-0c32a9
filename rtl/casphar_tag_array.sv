// casphar_tag_array: LLC tag store, one whole set per access.
//
// Each entry holds all ways of one set: tag, valid, dirty, the CASPHAr
// metadata (Sh, Syn_C, Syn_A, consumed) and the LRU age, packed by the
// controller into ENTRY_W bits. Reading a set lets the controller compare
// all tags, see all synchronization bits and choose a victim in one cycle.
//
// Timing: synchronous single-port-style memory with one read and one write
// port. rd_en at a clock edge presents the set at rd_data after that edge;
// rd_data holds its value until the next rd_en. A write becomes visible to
// reads issued in later cycles. No reset: the controller clears every set
// after reset. Storing the extra metadata bits next to the tags follows the
// described tag-store extension; the array organisation is this design's.
module casphar_tag_array #(
  parameter int unsigned SETS    = 4096,
  parameter int unsigned ENTRY_W = 16 * 56
) (
  input  logic                    clk,
  input  logic                    rd_en,
  input  logic [$clog2(SETS)-1:0] rd_idx,
  output logic [ENTRY_W-1:0]      rd_data,
  input  logic                    wr_en,
  input  logic [$clog2(SETS)-1:0] wr_idx,
  input  logic [ENTRY_W-1:0]      wr_data
);
  logic [ENTRY_W-1:0] mem [SETS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_idx] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_idx];
  end
endmodule
