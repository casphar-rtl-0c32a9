// casphar_data_array: LLC data store, one 64-byte line per access.
//
// Lines are addressed by {set, way}. Writes take a per-byte enable so that
// partial-line stores and clflush data can be merged into a resident line.
//
// Timing: rd_en at a clock edge presents the line at rd_data after that
// edge; rd_data holds until the next rd_en, so the controller can stream a
// victim to memory over several cycles. A write is visible to reads issued
// in later cycles. Default size 65536 lines = 4 MB, as in the evaluated LLC.
// No reset: valid bits in the tag store guard every read.
module casphar_data_array #(
  parameter int unsigned LINES      = 65536,
  parameter int unsigned LINE_BYTES = 64
) (
  input  logic                       clk,
  input  logic                       rd_en,
  input  logic [$clog2(LINES)-1:0]   rd_addr,
  output logic [LINE_BYTES*8-1:0]    rd_data,
  input  logic                       wr_en,
  input  logic [$clog2(LINES)-1:0]   wr_addr,
  input  logic [LINE_BYTES*8-1:0]    wr_data,
  input  logic [LINE_BYTES-1:0]      wr_be
);
  logic [LINE_BYTES*8-1:0] mem [LINES];

  always_ff @(posedge clk) begin
    if (wr_en) begin
      for (int b = 0; b < LINE_BYTES; b++)
        if (wr_be[b]) mem[wr_addr][b*8 +: 8] <= wr_data[b*8 +: 8];
    end
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
