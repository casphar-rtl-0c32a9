// casphar_region_match: shared-region classifier behind the Sh bit.
//
// Software places all data exchanged between CPU and accelerator in two
// physically contiguous regions: one the CPU produces and the accelerator
// consumes (C2A), one in the opposite direction (A2C). This block compares a
// line address with both [start, end) windows held in the configuration
// registers and reports which region, if any, the line belongs to. A line in
// either region is shared (Sh = 1). Purely combinational.
//
// The two regions and their start/end registers follow the described LLC;
// the half-open [start, end) convention and comparing line-aligned addresses
// are choices of this design. An empty window (end <= start) matches nothing.
module casphar_region_match
  import casphar_pkg::*;
(
  input  addr_t    addr,     // byte address; the offset within the line is ignored
  input  regions_t regions,
  output logic     in_c2a,   // CPU produces, accelerator consumes
  output logic     in_a2c,   // accelerator produces, CPU consumes
  output logic     shared    // Sh bit
);
  addr_t line_addr;
  assign line_addr = {addr[ADDR_W-1:OFF_W], {OFF_W{1'b0}}};

  always_comb begin
    in_c2a = (line_addr >= regions.c2a_start) && (line_addr < regions.c2a_end);
    in_a2c = (line_addr >= regions.a2c_start) && (line_addr < regions.a2c_end);
    shared = in_c2a || in_a2c;
  end
endmodule
