// casphar_req_arb: picks the next request for the LLC controller.
//
// The host CPU (through its L2) and the accelerator reach the LLC through
// separate request ports; parked consumer reads that have been woken come
// from the wait table. When the controller is idle (en), a woken replay is
// granted first, so that a released consumer proceeds as soon as its line
// is ready; otherwise the two ports are granted round-robin, and the port
// granted last has the lower priority next time. Combinational grant; the
// round-robin pointer moves at the clock edge of a port grant.
// The arbitration order is this design's choice.
module casphar_req_arb
  import casphar_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic replay_valid,
  input  logic cpu_valid,
  input  logic acc_valid,
  output logic gnt_replay,
  output logic gnt_cpu,
  output logic gnt_acc
);
  logic last_acc;   // 1: accelerator was granted last

  always_comb begin
    gnt_replay = 1'b0;
    gnt_cpu    = 1'b0;
    gnt_acc    = 1'b0;
    if (en) begin
      if (replay_valid)
        gnt_replay = 1'b1;
      else if (cpu_valid && (!acc_valid || last_acc))
        gnt_cpu = 1'b1;
      else if (acc_valid)
        gnt_acc = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       last_acc <= 1'b1;
    else if (gnt_cpu) last_acc <= 1'b0;
    else if (gnt_acc) last_acc <= 1'b1;
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   $onehot0({gnt_replay, gnt_cpu, gnt_acc}));
endmodule
