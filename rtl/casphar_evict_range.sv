// casphar_evict_range: Min/Max eviction range registers.
//
// Each time a shared line that was produced but not yet consumed is evicted,
// its address widens the recorded range [Min, Max]. When a consumer then
// misses in the LLC, an address outside the range cannot have been produced
// yet, so the controller parks the consumer without fetching the line from
// memory; an address inside the range (produced-and-evicted, or a false
// positive of range tracking) is fetched and its full/empty bit decides.
//
// Interface: upd_valid/upd_addr record one eviction per cycle; chk_addr is
// compared combinationally (chk_in_range). clear empties the range; the
// controller pulses it whenever the region registers are reconfigured.
// ev_min/ev_max/valid are readable through the configuration registers.
//
// Two 64-bit registers follow the described 128 bits of eviction registers.
// The explicit valid flag for "no eviction recorded yet" and clearing on
// reconfiguration are this design's choices.
module casphar_evict_range
  import casphar_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  logic  upd_valid,
  input  addr_t upd_addr,
  input  addr_t chk_addr,
  output logic  chk_in_range,
  output addr_t ev_min,
  output addr_t ev_max,
  output logic  valid
);
  addr_t upd_line, chk_line;
  assign upd_line = {upd_addr[ADDR_W-1:OFF_W], {OFF_W{1'b0}}};
  assign chk_line = {chk_addr[ADDR_W-1:OFF_W], {OFF_W{1'b0}}};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ev_min <= '0;
      ev_max <= '0;
      valid  <= 1'b0;
    end else if (clear) begin
      ev_min <= '0;
      ev_max <= '0;
      valid  <= 1'b0;
    end else if (upd_valid) begin
      if (!valid) begin
        ev_min <= upd_line;
        ev_max <= upd_line;
        valid  <= 1'b1;
      end else begin
        if (upd_line < ev_min) ev_min <= upd_line;
        if (upd_line > ev_max) ev_max <= upd_line;
      end
    end
  end

  assign chk_in_range = valid && (chk_line >= ev_min) && (chk_line <= ev_max);
endmodule
