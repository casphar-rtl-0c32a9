// casphar_cfg_regs: memory-mapped configuration registers of the LLC.
//
// Software (user program or OS) writes the start and end addresses of the
// two shared regions: C2A, produced by the CPU and consumed by the
// accelerator, and A2C, the opposite direction. Every write to a region
// register raises reconfig_req, which asks the controller to re-initialise
// the metadata of every resident line (recompute Sh, clear Syn bits) and to
// clear the eviction range; the request stays raised until reconfig_ack.
// A control register selects whether the eviction range registers are used
// (CASPHAr with eviction registers, the default) or every consumer miss is
// fetched to consult memory F/E bits (the basic variant), and the
// replacement policy mode.
//
// Register map, 64-bit words at cfg_addr (see casphar_pkg):
//   0 C2A start  1 C2A end  2 A2C start  3 A2C end   (read/write)
//   4 control: [0] eviction range enable, [2:1] policy_e
//   5 eviction Min  6 eviction Max  7 status: [0] busy, [1] range valid (read only)
// Writes take effect at the clock edge; reads are combinational.
// Reset: both regions empty (no tracking), eviction range on, POL_CONSUMED.
// The register set follows the described design; the map, reset values and
// the policy field are this design's choices.
module casphar_cfg_regs
  import casphar_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_we,
  input  logic [2:0]  cfg_addr,
  input  logic [63:0] cfg_wdata,
  output logic [63:0] cfg_rdata,
  output regions_t    regions,
  output logic        evict_en,
  output policy_e     policy,
  output logic        reconfig_req,
  input  logic        reconfig_ack,
  input  addr_t       ev_min,
  input  addr_t       ev_max,
  input  logic        ev_valid,
  input  logic        busy
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      regions      <= '0;
      evict_en     <= 1'b1;
      policy       <= POL_CONSUMED;
      reconfig_req <= 1'b0;
    end else begin
      if (reconfig_ack) reconfig_req <= 1'b0;
      if (cfg_we) begin
        unique case (cfg_addr)
          CFG_C2A_START: regions.c2a_start <= cfg_wdata;
          CFG_C2A_END:   regions.c2a_end   <= cfg_wdata;
          CFG_A2C_START: regions.a2c_start <= cfg_wdata;
          CFG_A2C_END:   regions.a2c_end   <= cfg_wdata;
          CFG_CTRL: begin
            evict_en <= cfg_wdata[0];
            policy   <= (cfg_wdata[2:1] == 2'd3) ? POL_EXT : policy_e'(cfg_wdata[2:1]);
          end
          default: ;
        endcase
        if (cfg_addr <= CFG_A2C_END) reconfig_req <= 1'b1;
      end
    end
  end

  always_comb begin
    unique case (cfg_addr)
      CFG_C2A_START: cfg_rdata = regions.c2a_start;
      CFG_C2A_END:   cfg_rdata = regions.c2a_end;
      CFG_A2C_START: cfg_rdata = regions.a2c_start;
      CFG_A2C_END:   cfg_rdata = regions.a2c_end;
      CFG_CTRL:      cfg_rdata = {61'd0, policy, evict_en};
      CFG_EV_MIN:    cfg_rdata = ev_min;
      CFG_EV_MAX:    cfg_rdata = ev_max;
      default:       cfg_rdata = {62'd0, ev_valid, busy};
    endcase
  end
endmodule
