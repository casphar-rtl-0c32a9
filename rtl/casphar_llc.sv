// casphar_llc: last-level cache with in-cache producer/consumer staging.
//
// A set-associative LLC shared by the host CPU and an accelerator. Besides
// tag, valid and dirty, every line carries:
//   Sh    - the line lies in one of the two shared regions (cfg registers);
//   Syn_C - C2A region: the CPU has produced it, the accelerator may read it;
//   Syn_A - A2C region: the accelerator has produced it, the CPU may read it;
//   Cons  - a ready line has been read by its consumer (its life is over).
// Producing and consuming use existing traffic only:
//   * CPU clflush of a C2A line writes the line into the LLC (it is kept,
//     not invalidated) and sets Syn_C; a CPU clflush of a line whose Syn_A is
//     set consumes it instead (Syn_A cleared, Cons set) - resetting Syn_A
//     takes priority over setting Syn_C. clflush outside the shared regions
//     behaves conventionally: the line is written back and invalidated.
//   * An accelerator write to an A2C line sets Syn_A. An accelerator read of
//     a ready C2A line consumes it (Syn_C cleared, Cons set); accelerators
//     read and write each shared location once.
//   * A consumer read of a line that is not ready is a synchronization miss:
//     the request is parked in the wait table and replayed when the producer
//     marks the line, so the consumer sees an ordinary, longer miss.
// Eviction writes the line's produced-but-unconsumed state to memory as a
// full/empty bit, and widens the Min/Max eviction range for such lines. A
// consumer miss outside that range is parked without any memory access; one
// inside it (or any consumer miss when the range registers are disabled) is
// fetched and the returned F/E bit re-initialises Syn. A consumed line is
// marked dirty so that its eviction clears the F/E bit in memory; otherwise
// a line fetched back with F/E set would keep it, and release the consumer of
// the next staging round early. Victims are chosen by
// casphar_repl (consumed lines first). Writing a region register triggers a
// walk over all sets that recomputes Sh and clears Syn and Cons.
//
// Interfaces: one request port per agent (valid/ready, ready is pulsed when
// the request is answered or parked, so the agent holds it until then), a
// response pulse per agent (no back-pressure), the configuration register
// port, and one line-wide memory port whose writes and read responses carry
// the F/E bit. Events are one-cycle pulses for performance counters.
//
// Timing: one request at a time (a parked read frees the controller). A hit
// answers two cycles after the request is granted (grant, tag lookup,
// response with data). A miss adds an optional write-back, a fill, and a
// repeated lookup. After reset the tag store is cleared, one set per cycle;
// a region reconfiguration takes two cycles per set.
//
// From the described design: the metadata bits and their set/reset rules,
// clflush-based produce/consume, parking and waking on synchronization
// misses, F/E write-back of evicted lines, the Min/Max eviction registers
// and their use on consumer misses, metadata re-initialisation on region
// writes, and the 4 MB / 16-way / 64 B geometry. This design's own choices:
// the blocking controller, the request/response encoding, write-allocate
// fills for partial writes and flushes that miss, replaying a woken read as a
// fresh lookup, clearing F/E through the dirty bit, and the wait-table depth.
module casphar_llc
  import casphar_pkg::*;
#(
  parameter int unsigned SETS       = LLC_SETS_DEFAULT,
  parameter int unsigned WAYS       = LLC_WAYS_DEFAULT,
  parameter int unsigned WAIT_DEPTH = WAIT_DEPTH_DEFAULT
) (
  input  logic        clk,
  input  logic        rst_n,
  // host CPU port (from its L2)
  input  logic        cpu_req_valid,
  input  req_t        cpu_req,
  output logic        cpu_req_ready,
  output logic        cpu_rsp_valid,
  output rsp_t        cpu_rsp,
  // accelerator port
  input  logic        acc_req_valid,
  input  req_t        acc_req,
  output logic        acc_req_ready,
  output logic        acc_rsp_valid,
  output rsp_t        acc_rsp,
  // memory-mapped configuration registers
  input  logic        cfg_we,
  input  logic [2:0]  cfg_addr,
  input  logic [63:0] cfg_wdata,
  output logic [63:0] cfg_rdata,
  // memory controller port, line granularity, with full/empty bit
  output logic        mem_req_valid,
  input  logic        mem_req_ready,
  output logic        mem_req_we,
  output addr_t       mem_req_addr,
  output line_t       mem_req_wdata,
  output logic        mem_req_fe,
  input  logic        mem_rsp_valid,
  input  line_t       mem_rsp_rdata,
  input  logic        mem_rsp_fe,
  // event pulses
  output events_t     events
);
  localparam int unsigned SET_W = $clog2(SETS);
  localparam int unsigned WAY_W = $clog2(WAYS);
  localparam int unsigned AGE_W = $clog2(WAYS);
  localparam int unsigned TAG_W = ADDR_W - OFF_W - SET_W;
  localparam int unsigned WT_W  = $clog2(WAIT_DEPTH);

  typedef struct packed {
    logic [TAG_W-1:0] tag;
    logic             v;
    logic             d;
    logic             sh;
    logic             sync;   // Syn_C
    logic             syna;   // Syn_A
    logic             cons;
    logic [AGE_W-1:0] age;
  } way_t;
  typedef way_t [WAYS-1:0] set_t;

  localparam int unsigned ENTRY_W = $bits(set_t);

  typedef enum logic [3:0] {
    S_INIT, S_IDLE, S_LOOKUP, S_RESP, S_EVICT_WR, S_FILL_REQ, S_FILL_WAIT,
    S_RETRY, S_FLUSH_RD, S_FLUSH_WR, S_WALK_RD, S_WALK_WR
  } state_e;

  // ---------------------------------------------------------------- state
  state_e           state, state_n;
  req_t             cur;
  src_e             cur_src;
  logic             cur_replay;
  logic [WT_W-1:0]  cur_widx;
  set_t             set_q;
  logic [WAY_W-1:0] vic_q;
  logic             vic_fe_q;
  addr_t            vic_addr_q;
  logic [SET_W-1:0] walk_idx;

  // ---------------------------------------------------------- sub-blocks
  regions_t regions;
  logic     evict_en, reconfig_req, reconfig_ack;
  policy_e  policy;
  addr_t    ev_min, ev_max;
  logic     ev_valid, ev_in_range, ev_clear, ev_upd;
  addr_t    ev_upd_addr;

  logic             tag_rd_en, tag_wr_en;
  logic [SET_W-1:0] tag_rd_idx, tag_wr_idx;
  logic [ENTRY_W-1:0] tag_rd_raw, tag_wr_raw;
  set_t             tset, tset_wr;

  logic                   dat_rd_en, dat_wr_en;
  logic [SET_W+WAY_W-1:0] dat_rd_addr, dat_wr_addr;
  line_t                  dat_rd, dat_wr;
  bmask_t                 dat_be;

  logic gnt_replay, gnt_cpu, gnt_acc, arb_en;

  logic                  wt_park, wt_full, wt_wake, wt_wake_hit, wt_replay_valid;
  logic                  wt_done, wt_rearm;
  logic [WT_W-1:0]       wt_replay_idx;
  addr_t                 wt_replay_addr;
  src_e                  wt_replay_src;
  id_t                   wt_replay_id;

  logic cur_c2a, cur_a2c, cur_sh;

  casphar_cfg_regs u_cfg (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata,
    .regions, .evict_en, .policy, .reconfig_req, .reconfig_ack,
    .ev_min, .ev_max, .ev_valid,
    .busy(state inside {S_INIT, S_WALK_RD, S_WALK_WR})
  );

  casphar_region_match u_cur_region (
    .addr(cur.addr), .regions, .in_c2a(cur_c2a), .in_a2c(cur_a2c), .shared(cur_sh)
  );

  casphar_evict_range u_evr (
    .clk, .rst_n, .clear(ev_clear), .upd_valid(ev_upd), .upd_addr(ev_upd_addr),
    .chk_addr(cur.addr), .chk_in_range(ev_in_range),
    .ev_min, .ev_max, .valid(ev_valid)
  );

  casphar_tag_array #(.SETS(SETS), .ENTRY_W(ENTRY_W)) u_tags (
    .clk, .rd_en(tag_rd_en), .rd_idx(tag_rd_idx), .rd_data(tag_rd_raw),
    .wr_en(tag_wr_en), .wr_idx(tag_wr_idx), .wr_data(tag_wr_raw)
  );
  assign tset       = set_t'(tag_rd_raw);
  assign tag_wr_raw = ENTRY_W'(tset_wr);

  casphar_data_array #(.LINES(SETS*WAYS), .LINE_BYTES(LINE_BYTES)) u_data (
    .clk, .rd_en(dat_rd_en), .rd_addr(dat_rd_addr), .rd_data(dat_rd),
    .wr_en(dat_wr_en), .wr_addr(dat_wr_addr), .wr_data(dat_wr), .wr_be(dat_be)
  );

  casphar_req_arb u_arb (
    .clk, .rst_n, .en(arb_en), .replay_valid(wt_replay_valid),
    .cpu_valid(cpu_req_valid), .acc_valid(acc_req_valid),
    .gnt_replay, .gnt_cpu, .gnt_acc
  );

  casphar_wait_table #(.DEPTH(WAIT_DEPTH)) u_wait (
    .clk, .rst_n,
    .park_valid(wt_park), .park_addr(cur.addr), .park_src(cur_src), .park_id(cur.id),
    .full(wt_full), .count(),
    .wake_valid(wt_wake), .wake_addr(cur.addr), .wake_hit(wt_wake_hit),
    .replay_valid(wt_replay_valid), .replay_idx(wt_replay_idx),
    .replay_addr(wt_replay_addr), .replay_src(wt_replay_src), .replay_id(wt_replay_id),
    .done_valid(wt_done), .done_idx(cur_widx),
    .rearm_valid(wt_rearm), .rearm_idx(cur_widx)
  );

  // ---------------------------------------------- lookup-stage decisions
  logic [SET_W-1:0] cur_set;
  logic [TAG_W-1:0] cur_tag;
  assign cur_set = cur.addr[OFF_W +: SET_W];
  assign cur_tag = cur.addr[ADDR_W-1 -: TAG_W];

  logic [WAYS-1:0]       hit_vec, v_vec, cons_vec, ready_vec;
  logic [WAYS*AGE_W-1:0] ages, ages_next;
  logic                  hit;
  logic [WAY_W-1:0]      hit_way, victim;
  vreason_e              vreason;

  always_comb begin
    hit = 1'b0;
    hit_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      hit_vec[w]   = tset[w].v && (tset[w].tag == cur_tag);
      v_vec[w]     = tset[w].v;
      cons_vec[w]  = tset[w].cons;
      ready_vec[w] = tset[w].sh && (tset[w].sync || tset[w].syna);
      ages[w*AGE_W +: AGE_W] = tset[w].age;
      if (hit_vec[w] && !hit) begin
        hit = 1'b1;
        hit_way = WAY_W'(w);
      end
    end
  end

  casphar_repl #(.WAYS(WAYS)) u_repl (
    .policy, .valid(v_vec), .consumed(cons_vec), .ready(ready_vec), .ages,
    .victim, .reason(vreason), .touch_way(hit_way), .ages_next
  );

  // Region classification of every way during the reconfiguration walk.
  logic [WAYS-1:0] walk_sh;
  for (genvar w = 0; w < WAYS; w++) begin : g_walk
    logic unused_c2a, unused_a2c;
    casphar_region_match u_rm (
      .addr({tset[w].tag, walk_idx, {OFF_W{1'b0}}}), .regions,
      .in_c2a(unused_c2a), .in_a2c(unused_a2c), .shared(walk_sh[w])
    );
  end

  // Consumer reads are synchronized; producers and untracked data are not.
  logic consumer_read, hit_ready, hit_syna;
  assign consumer_read = (cur.op == OP_READ) &&
                         ((cur_src == SRC_ACC && cur_c2a) || (cur_src == SRC_CPU && cur_a2c));
  assign hit_ready = (cur_src == SRC_ACC) ? tset[hit_way].sync : tset[hit_way].syna;
  assign hit_syna  = tset[hit_way].syna;

  // -------------------------------------------------------- control FSM
  logic park_new;   // a new request was parked (answer the port with ready)

  always_comb begin
    state_n     = state;
    arb_en      = 1'b0;
    tag_rd_en   = 1'b0;
    tag_rd_idx  = cur_set;
    tag_wr_en   = 1'b0;
    tag_wr_idx  = cur_set;
    tset_wr     = tset;
    dat_rd_en   = 1'b0;
    dat_rd_addr = {cur_set, hit_way};
    dat_wr_en   = 1'b0;
    dat_wr_addr = {cur_set, hit_way};
    dat_wr      = cur.wdata;
    dat_be      = cur.wmask;
    mem_req_valid = 1'b0;
    mem_req_we    = 1'b0;
    mem_req_addr  = {cur.addr[ADDR_W-1:OFF_W], {OFF_W{1'b0}}};
    mem_req_wdata = dat_rd;
    mem_req_fe    = 1'b0;
    wt_park     = 1'b0;
    wt_wake     = 1'b0;
    wt_done     = 1'b0;
    wt_rearm    = 1'b0;
    park_new    = 1'b0;
    ev_upd      = 1'b0;
    ev_upd_addr = {tset[victim].tag, cur_set, {OFF_W{1'b0}}};
    ev_clear    = 1'b0;
    reconfig_ack = 1'b0;
    events      = '0;

    unique case (state)
      S_INIT: begin
        tag_wr_en  = 1'b1;
        tag_wr_idx = walk_idx;
        for (int w = 0; w < WAYS; w++) begin
          tset_wr[w]     = '0;
          tset_wr[w].age = AGE_W'(w);
        end
        if (walk_idx == SET_W'(SETS-1)) state_n = S_IDLE;
      end

      S_IDLE: begin
        if (reconfig_req) begin
          reconfig_ack = 1'b1;
          ev_clear     = 1'b1;
          state_n      = S_WALK_RD;
        end else begin
          arb_en = 1'b1;
          if (gnt_replay || gnt_cpu || gnt_acc) begin
            tag_rd_en  = 1'b1;
            tag_rd_idx = gnt_replay ? wt_replay_addr[OFF_W +: SET_W] :
                         gnt_cpu    ? cpu_req.addr[OFF_W +: SET_W] :
                                      acc_req.addr[OFF_W +: SET_W];
            state_n    = S_LOOKUP;
            events.replay = gnt_replay;
          end
        end
      end

      S_RETRY: begin
        tag_rd_en = 1'b1;
        state_n   = S_LOOKUP;
      end

      S_LOOKUP: begin
        if (hit && consumer_read && !hit_ready) begin
          // synchronization miss: line resident but not produced yet
          events.sync_miss = 1'b1;
          if (cur_replay) begin
            wt_rearm = 1'b1;
          end else if (!wt_full) begin
            wt_park  = 1'b1;
            park_new = 1'b1;
          end else begin
            events.wait_full = 1'b1;
          end
          state_n = S_IDLE;
        end else if (hit && cur.op == OP_READ) begin
          events.hit  = 1'b1;
          dat_rd_en   = 1'b1;
          tag_wr_en   = 1'b1;
          for (int w = 0; w < WAYS; w++) tset_wr[w].age = ages_next[w*AGE_W +: AGE_W];
          if (consumer_read) begin
            tset_wr[hit_way].cons = 1'b1;
            if (cur_src == SRC_ACC) begin
              tset_wr[hit_way].sync = 1'b0;   // accelerator reads once: consumed
              tset_wr[hit_way].d    = 1'b1;   // eviction clears F/E in memory
              events.consume = 1'b1;
            end
          end
          state_n = S_RESP;
        end else if (hit && cur.op == OP_FLUSH && !cur_sh) begin
          // conventional clflush: merge, write back, invalidate
          events.hit = 1'b1;
          dat_wr_en  = 1'b1;
          tag_wr_en  = 1'b1;
          tset_wr[hit_way].v = 1'b0;
          state_n    = S_FLUSH_RD;
        end else if (hit) begin
          // write or clflush of a shared line: kept in the LLC
          events.hit = 1'b1;
          dat_wr_en  = 1'b1;
          tag_wr_en  = 1'b1;
          for (int w = 0; w < WAYS; w++) tset_wr[w].age = ages_next[w*AGE_W +: AGE_W];
          tset_wr[hit_way].d = 1'b1;
          if (cur_src == SRC_CPU && cur.op == OP_FLUSH) begin
            if (hit_syna) begin
              tset_wr[hit_way].syna = 1'b0;   // CPU consumed accelerator data
              tset_wr[hit_way].cons = 1'b1;
              events.consume = 1'b1;
            end else if (cur_c2a) begin
              tset_wr[hit_way].sync = 1'b1;   // CPU produced
              tset_wr[hit_way].cons = 1'b0;
              events.produce = 1'b1;
              wt_wake = 1'b1;
            end
          end
          if (cur_src == SRC_ACC && cur_a2c) begin
            tset_wr[hit_way].syna = 1'b1;     // accelerator produced
            tset_wr[hit_way].cons = 1'b0;
            events.produce = 1'b1;
            wt_wake = 1'b1;
          end
          events.wake = wt_wake_hit;
          state_n = S_RESP;
        end else if (consumer_read && evict_en && !ev_in_range) begin
          // never produced-and-evicted: wait for the producer, no fetch
          events.range_skip = 1'b1;
          events.sync_miss  = 1'b1;
          if (cur_replay) begin
            wt_rearm = 1'b1;
          end else if (!wt_full) begin
            wt_park  = 1'b1;
            park_new = 1'b1;
          end else begin
            events.wait_full = 1'b1;
          end
          state_n = S_IDLE;
        end else begin
          // miss: allocate the victim, write it back if needed, fetch
          events.miss            = 1'b1;
          events.victim_consumed = tset[victim].v && (vreason == VR_CONSUMED);
          events.victim_notready = tset[victim].v && (vreason == VR_NOTREADY);
          if (tset[victim].v && tset[victim].sh && (tset[victim].sync || tset[victim].syna)) begin
            ev_upd = 1'b1;
            events.evict_ready = 1'b1;
          end
          dat_rd_en   = 1'b1;
          dat_rd_addr = {cur_set, victim};
          if (tset[victim].v && (tset[victim].d ||
              (tset[victim].sh && (tset[victim].sync || tset[victim].syna))))
            state_n = S_EVICT_WR;
          else
            state_n = S_FILL_REQ;
        end
      end

      S_EVICT_WR: begin
        mem_req_valid = 1'b1;
        mem_req_we    = 1'b1;
        mem_req_addr  = vic_addr_q;
        mem_req_fe    = vic_fe_q;
        if (mem_req_ready) begin
          events.evict_wb = 1'b1;
          state_n = S_FILL_REQ;
        end
      end

      S_FILL_REQ: begin
        mem_req_valid = 1'b1;
        if (mem_req_ready) state_n = S_FILL_WAIT;
      end

      S_FILL_WAIT: begin
        if (mem_rsp_valid) begin
          dat_wr_en   = 1'b1;
          dat_wr_addr = {cur_set, vic_q};
          dat_wr      = mem_rsp_rdata;
          dat_be      = '1;
          tag_wr_en   = 1'b1;
          tset_wr     = set_q;
          tset_wr[vic_q].tag  = cur_tag;
          tset_wr[vic_q].v    = 1'b1;
          tset_wr[vic_q].d    = 1'b0;
          tset_wr[vic_q].sh   = cur_sh;
          tset_wr[vic_q].sync = cur_c2a && mem_rsp_fe;
          tset_wr[vic_q].syna = cur_a2c && mem_rsp_fe;
          tset_wr[vic_q].cons = 1'b0;
          events.fe_release = consumer_read && mem_rsp_fe;
          events.fe_stall   = consumer_read && !mem_rsp_fe;
          state_n = S_RETRY;
        end
      end

      S_RESP: begin
        wt_done = cur_replay;
        state_n = S_IDLE;
      end

      S_FLUSH_RD: begin
        dat_rd_en   = 1'b1;
        dat_rd_addr = {cur_set, vic_q};
        state_n     = S_FLUSH_WR;
      end

      S_FLUSH_WR: begin
        mem_req_valid = 1'b1;
        mem_req_we    = 1'b1;
        if (mem_req_ready) begin
          events.flush_wb = 1'b1;
          state_n = S_RESP;
        end
      end

      S_WALK_RD: begin
        tag_rd_en  = 1'b1;
        tag_rd_idx = walk_idx;
        state_n    = S_WALK_WR;
      end

      S_WALK_WR: begin
        tag_wr_en  = 1'b1;
        tag_wr_idx = walk_idx;
        for (int w = 0; w < WAYS; w++) begin
          tset_wr[w].sh   = tset[w].v && walk_sh[w];
          tset_wr[w].sync = 1'b0;
          tset_wr[w].syna = 1'b0;
          tset_wr[w].cons = 1'b0;
        end
        if (walk_idx == SET_W'(SETS-1)) begin
          events.reconfig = 1'b1;
          state_n = S_IDLE;
        end else begin
          state_n = S_WALK_RD;
        end
      end

      default: state_n = S_IDLE;
    endcase
  end

  // ------------------------------------------------------------ registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_INIT;
      cur        <= '0;
      cur_src    <= SRC_CPU;
      cur_replay <= 1'b0;
      cur_widx   <= '0;
      set_q      <= '0;
      vic_q      <= '0;
      vic_fe_q   <= 1'b0;
      vic_addr_q <= '0;
      walk_idx   <= '0;
    end else begin
      state <= state_n;
      unique case (state)
        S_INIT:    walk_idx <= (state_n == S_IDLE) ? '0 : walk_idx + SET_W'(1);
        S_WALK_WR: walk_idx <= (state_n == S_IDLE) ? '0 : walk_idx + SET_W'(1);
        S_IDLE: begin
          if (gnt_replay) begin
            cur        <= '{op: OP_READ, addr: wt_replay_addr, wdata: '0, wmask: '0,
                            id: wt_replay_id};
            cur_src    <= wt_replay_src;
            cur_replay <= 1'b1;
            cur_widx   <= wt_replay_idx;
          end else if (gnt_cpu) begin
            cur        <= cpu_req;
            cur_src    <= SRC_CPU;
            cur_replay <= 1'b0;
          end else if (gnt_acc) begin
            cur        <= acc_req;
            cur_src    <= SRC_ACC;
            cur_replay <= 1'b0;
          end
        end
        S_LOOKUP: begin
          set_q      <= tset;
          vic_q      <= hit ? hit_way : victim;
          vic_fe_q   <= tset[victim].sh && (tset[victim].sync || tset[victim].syna);
          vic_addr_q <= {tset[victim].tag, cur_set, {OFF_W{1'b0}}};
        end
        default: ;
      endcase
    end
  end

  // ------------------------------------------------------------- outputs
  logic answer;   // the current port request is finished
  assign answer = (state == S_RESP && !cur_replay) || park_new;
  assign cpu_req_ready = answer && cur_src == SRC_CPU;
  assign acc_req_ready = answer && cur_src == SRC_ACC;

  rsp_t rsp;
  assign rsp.op    = cur.op;
  assign rsp.id    = cur.id;
  assign rsp.rdata = (cur.op == OP_READ) ? dat_rd : '0;
  assign cpu_rsp_valid = state == S_RESP && cur_src == SRC_CPU;
  assign acc_rsp_valid = state == S_RESP && cur_src == SRC_ACC;
  assign cpu_rsp = rsp;
  assign acc_rsp = rsp;

  // ----------------------------------------------------------- assertions
  // Agents hold a request stable until it is answered.
  assert property (@(posedge clk) disable iff (!rst_n)
                   cpu_req_valid && !cpu_req_ready |=> cpu_req_valid && $stable(cpu_req));
  assert property (@(posedge clk) disable iff (!rst_n)
                   acc_req_valid && !acc_req_ready |=> acc_req_valid && $stable(acc_req));
  // Memory requests are held until accepted.
  assert property (@(posedge clk) disable iff (!rst_n)
                   mem_req_valid && !mem_req_ready |=> mem_req_valid && $stable(mem_req_addr));
  // A fill response only arrives while one is expected.
  assert property (@(posedge clk) disable iff (!rst_n)
                   mem_rsp_valid |-> state == S_FILL_WAIT);
endmodule
