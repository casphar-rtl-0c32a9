// casphar_wait_table: consumer reads waiting on a synchronization miss.
//
// When a consumer reads a shared line that has not been produced yet, the
// LLC treats it as a miss and holds the request here instead of answering.
// When the producer later marks the line ready, the controller presents that
// line address on wake; every waiting entry for the same line becomes
// replayable, and the controller replays it as an ordinary lookup, which now
// hits, in the way a fill completes an outstanding miss. Because waiting
// reads sit here, the consumer may keep issuing independent requests.
//
// Interface (all actions take effect at the clock edge):
//   park_*   : allocate the lowest free entry; full says that a request
//              from park_src cannot be parked now (checked by the caller).
//              One agent may hold at most DEPTH-1 entries, so that reads
//              waiting for one agent's data never shut out the other agent,
//              whose parked reads release the port that agent produces on.
//   replay_* : the lowest entry that is woken; it stays allocated until
//   done_*   : frees it (the replay answered the consumer) or
//   rearm_*  : makes it wait again (the replay missed once more)
//   wake_*   : wake all waiting entries for one line; wake_hit is
//              combinational and says whether any entry matched
// The table mechanism and its depth are this design's choice; the document
// states only that the waiting consumer is notified once the line is ready.
module casphar_wait_table
  import casphar_pkg::*;
#(
  parameter int unsigned DEPTH = WAIT_DEPTH_DEFAULT
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     park_valid,
  input  addr_t                    park_addr,
  input  src_e                     park_src,
  input  id_t                      park_id,
  output logic                     full,
  output logic [$clog2(DEPTH+1)-1:0] count,
  input  logic                     wake_valid,
  input  addr_t                    wake_addr,
  output logic                     wake_hit,
  output logic                     replay_valid,
  output logic [$clog2(DEPTH)-1:0] replay_idx,
  output addr_t                    replay_addr,
  output src_e                     replay_src,
  output id_t                      replay_id,
  input  logic                     done_valid,
  input  logic [$clog2(DEPTH)-1:0] done_idx,
  input  logic                     rearm_valid,
  input  logic [$clog2(DEPTH)-1:0] rearm_idx
);
  localparam int unsigned IDX_W = $clog2(DEPTH);

  typedef struct packed {
    logic  valid;
    logic  waiting;
    addr_t addr;       // line-aligned
    src_e  src;
    id_t   id;
  } entry_t;

  entry_t tbl [DEPTH];
  logic [DEPTH-1:0] match;
  logic [IDX_W-1:0] free_idx;
  logic             have_free;
  logic [$clog2(DEPTH+1)-1:0] src_count;

  function automatic addr_t line_of(input addr_t a);
    return {a[ADDR_W-1:OFF_W], {OFF_W{1'b0}}};
  endfunction

  always_comb begin
    have_free = 1'b0;
    free_idx  = '0;
    replay_valid = 1'b0;
    replay_idx   = '0;
    count = '0;
    src_count = '0;
    for (int i = DEPTH-1; i >= 0; i--) begin
      if (!tbl[i].valid) begin
        have_free = 1'b1;
        free_idx  = IDX_W'(i);
      end
      if (tbl[i].valid && !tbl[i].waiting) begin
        replay_valid = 1'b1;
        replay_idx   = IDX_W'(i);
      end
    end
    for (int i = 0; i < DEPTH; i++) begin
      count += tbl[i].valid ? 1 : 0;
      src_count += (tbl[i].valid && tbl[i].src == park_src) ? 1 : 0;
      match[i] = tbl[i].valid && tbl[i].waiting && (tbl[i].addr == line_of(wake_addr));
    end
    full     = !have_free || (src_count >= ($clog2(DEPTH+1))'(DEPTH-1));
    wake_hit = wake_valid && (match != '0);
    replay_addr = tbl[replay_idx].addr;
    replay_src  = tbl[replay_idx].src;
    replay_id   = tbl[replay_idx].id;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) tbl[i] <= '0;
    end else begin
      for (int i = 0; i < DEPTH; i++) begin
        if (wake_valid && match[i]) tbl[i].waiting <= 1'b0;
        if (done_valid && done_idx == IDX_W'(i)) tbl[i].valid <= 1'b0;
        if (rearm_valid && rearm_idx == IDX_W'(i)) tbl[i].waiting <= 1'b1;
      end
      if (park_valid && !full)
        tbl[free_idx] <= '{valid: 1'b1, waiting: 1'b1, addr: line_of(park_addr),
                           src: park_src, id: park_id};
    end
  end

  // The table needs room for both agents.
  initial assert (DEPTH >= 2);
  // A producer cannot wake an entry in the cycle the entry is parked or
  // re-armed: the controller performs one of these actions per request.
  assert property (@(posedge clk) disable iff (!rst_n)
                   !(park_valid && (wake_valid || rearm_valid || done_valid)));
  assert property (@(posedge clk) disable iff (!rst_n) !(park_valid && full));
endmodule
