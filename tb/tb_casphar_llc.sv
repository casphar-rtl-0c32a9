// tb_casphar_llc: end-to-end test of the CASPHAr LLC on a small geometry.
//
// An 8-set, 4-way LLC (32 lines) with a 4-entry wait table is driven by a
// CPU model and an accelerator model and backed by tb_dram_model. The
// shared regions hold 48 lines each way, more than the cache, so staging
// forces evictions. Phases:
//   0 plain caching of unshared lines: data checked against a reference
//     memory, hit latency measured, conventional clflush;
//   A eviction range on, consumed-first policy: fast CPU producer, slow
//     accelerator, late CPU consumer, so produced lines are evicted, written
//     back with F/E set and fetched back on consumer misses;
//   B extended policy: slow producer, accelerator with more outstanding
//     reads than the wait table holds (synchronization misses, range skips,
//     refused reads), unshared background traffic;
//   C eviction range off, plain LRU: every consumer miss is fetched and the
//     F/E bit decides; the producer goes out of order;
//   D extended policy under pressure: ready lines pile up next to unshared
//     lines, so not-ready lines are chosen as victims before ready ones.
// In every phase the accelerator reads each C2A line, checks it carries the
// CPU's data and that the CPU had produced it, and writes a result to the
// matching A2C line; the CPU reads each A2C line (checked the same way) and
// flushes it to consume it. Every event kind of the LLC is counted and must
// have happened at least once.
module tb_casphar_llc;
  import casphar_pkg::*;

  localparam int SETS = 8, WAYS = 4, WAIT_DEPTH = 4, N = 48;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  cpu_req_valid = 0, cpu_req_ready, cpu_rsp_valid;
  req_t  cpu_req = '0;
  rsp_t  cpu_rsp;
  logic  acc_req_valid = 0, acc_req_ready, acc_rsp_valid;
  req_t  acc_req = '0;
  rsp_t  acc_rsp;
  logic  cfg_we = 0;
  logic [2:0]  cfg_addr = '0;
  logic [63:0] cfg_wdata = '0, cfg_rdata;
  logic  mem_req_valid, mem_req_ready, mem_req_we, mem_req_fe, mem_rsp_valid, mem_rsp_fe;
  addr_t mem_req_addr;
  line_t mem_req_wdata, mem_rsp_rdata;
  events_t events;

  casphar_llc #(.SETS(SETS), .WAYS(WAYS), .WAIT_DEPTH(WAIT_DEPTH)) dut (.*);
  tb_dram_model #(.LAT(12)) mem (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  // ------------------------------------------------------ event counting
  int ev_cnt [string];
  initial begin
    automatic string names[$] = '{"hit","miss","sync_miss","range_skip","fe_release","fe_stall",
      "produce","consume","wake","replay","evict_wb","evict_ready","victim_consumed",
      "victim_notready","wait_full","flush_wb","reconfig"};
    foreach (names[i]) ev_cnt[names[i]] = 0;
    forever begin
      @(negedge clk);
      if (events.hit) ev_cnt["hit"]++;
      if (events.miss) ev_cnt["miss"]++;
      if (events.sync_miss) ev_cnt["sync_miss"]++;
      if (events.range_skip) ev_cnt["range_skip"]++;
      if (events.fe_release) ev_cnt["fe_release"]++;
      if (events.fe_stall) ev_cnt["fe_stall"]++;
      if (events.produce) ev_cnt["produce"]++;
      if (events.consume) ev_cnt["consume"]++;
      if (events.wake) ev_cnt["wake"]++;
      if (events.replay) ev_cnt["replay"]++;
      if (events.evict_wb) ev_cnt["evict_wb"]++;
      if (events.evict_ready) ev_cnt["evict_ready"]++;
      if (events.victim_consumed) ev_cnt["victim_consumed"]++;
      if (events.victim_notready) ev_cnt["victim_notready"]++;
      if (events.wait_full) ev_cnt["wait_full"]++;
      if (events.flush_wb) ev_cnt["flush_wb"]++;
      if (events.reconfig) ev_cnt["reconfig"]++;
    end
  end

  // -------------------------------------------------------- reference data
  line_t gold [longint unsigned];          // latest data per line
  bit    produced [longint unsigned];      // line has been produced (current phase)

  function automatic line_t rnd_line();
    line_t l;
    for (int k = 0; k < LINE_W/32; k++) l[k*32 +: 32] = $urandom;
    return l;
  endfunction

  function automatic line_t gold_of(input addr_t a);
    longint unsigned k = a >> OFF_W;
    return gold.exists(k) ? gold[k] : mem.pattern({a[ADDR_W-1:OFF_W], {OFF_W{1'b0}}});
  endfunction

  function automatic line_t merge(input line_t old, input line_t nw, input bmask_t m);
    line_t r = old;
    for (int b = 0; b < LINE_BYTES; b++) if (m[b]) r[b*8 +: 8] = nw[b*8 +: 8];
    return r;
  endfunction

  // ------------------------------------------------------------ CPU port
  // Two CPU threads (producer, consumer/background) share the port through
  // a request queue; each waits for the response carrying its id.
  req_t  cpu_q[$];
  bit    cpu_done [16];
  line_t cpu_data [16];
  int    cpu_issue_cycle, cpu_ready_cycle;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    forever begin
      @(negedge clk);
      if (cpu_q.size() > 0) begin
        cpu_req = cpu_q.pop_front();
        cpu_req_valid = 1;
        cpu_issue_cycle = int'(cycle);
        while (!cpu_req_ready) @(negedge clk);
        cpu_ready_cycle = int'(cycle);
        @(negedge clk);
        cpu_req_valid = 0;
      end
    end
  end

  always @(negedge clk) begin
    if (cpu_rsp_valid) begin
      cpu_done[cpu_rsp.id] = 1;
      cpu_data[cpu_rsp.id] = cpu_rsp.rdata;
    end
  end

  task automatic cpu_op(input op_e op, input addr_t a, input line_t d, input bmask_t m,
                        input id_t id, output line_t rd);
    cpu_done[id] = 0;
    cpu_q.push_back('{op: op, addr: a, wdata: d, wmask: m, id: id});
    while (!cpu_done[id]) @(negedge clk);
    rd = cpu_data[id];
  endtask

  // -------------------------------------------------------- config port
  task automatic cfg_write(input logic [2:0] a, input logic [63:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic wait_idle();
    cfg_addr = CFG_STATUS;
    @(negedge clk);
    while (cfg_rdata[0]) @(negedge clk);
  endtask

  // ------------------------------------------------------ accelerator
  // Issues reads of C2A lines in order with up to acc_max_out outstanding
  // and a gap of acc_gap cycles; each response is checked and turned into a
  // write of the A2C line with the same index.
  int    acc_max_out, acc_gap;
  int    acc_out;
  int    acc_id_line [16];
  req_t  acc_wq[$];
  int    acc_results;
  addr_t c2a_base, a2c_base;
  line_t res_of [int];

  function automatic line_t acc_fn(input line_t x);
    return {x[LINE_W-9:0], x[LINE_W-1 -: 8]} ^ {LINE_W/32{32'hACCE_5500}};
  endfunction

  always @(negedge clk) begin
    if (acc_rsp_valid && acc_rsp.op == OP_READ) begin
      int i;
      addr_t a;
      i = acc_id_line[acc_rsp.id];
      a = c2a_base + addr_t'(i) * 64;
      check(produced.exists(a >> 6) && produced[a >> 6], $sformatf("acc got unproduced C2A line %0d", i));
      check(acc_rsp.rdata == gold_of(a), $sformatf("acc data C2A line %0d", i));
      res_of[i] = acc_fn(acc_rsp.rdata);
      acc_wq.push_back('{op: OP_WRITE, addr: a2c_base + addr_t'(i) * 64, wdata: res_of[i],
                         wmask: '1, id: id_t'(i)});
      acc_out--;
    end
  end

  task automatic acc_run();
    int next = 0, writes = 0;
    int gap_cnt = 0;
    acc_out = 0;
    while (writes < N) begin
      req_t r;
      bit have = 0;
      @(negedge clk);
      if (gap_cnt > 0) gap_cnt--;
      if (acc_wq.size() > 0) begin
        r = acc_wq.pop_front(); have = 1; writes++;
        gold[r.addr >> 6] = r.wdata;
      end else if (next < N && acc_out < acc_max_out && gap_cnt == 0) begin
        r = '{op: OP_READ, addr: c2a_base + addr_t'(next) * 64, wdata: '0, wmask: '0,
              id: id_t'(next % 16)};
        acc_id_line[next % 16] = next;
        next++; acc_out++; have = 1; gap_cnt = acc_gap;
      end
      if (have) begin
        acc_req = r; acc_req_valid = 1;
        while (!acc_req_ready) @(negedge clk);
        if (r.op == OP_WRITE) produced[r.addr >> 6] = 1;
        @(negedge clk);
        acc_req_valid = 0;
      end
    end
  endtask

  // ------------------------------------------------------------ CPU roles
  int prod_gap_min, prod_gap_max, cons_delay;
  bit prod_shuffle;

  task automatic cpu_producer();
    int order[N];
    line_t dummy;
    for (int i = 0; i < N; i++) order[i] = i;
    if (prod_shuffle)
      for (int i = 0; i + 4 <= N; i += 4) begin
        int t = order[i]; order[i] = order[i+3]; order[i+3] = t;
      end
    for (int k = 0; k < N; k++) begin
      addr_t a;
      line_t d;
      a = c2a_base + addr_t'(order[k]) * 64;
      d = rnd_line();
      repeat ($urandom_range(prod_gap_min, prod_gap_max)) @(negedge clk);
      gold[a >> 6] = d;
      cpu_op(OP_FLUSH, a, d, '1, id_t'(k % 4), dummy);
      produced[a >> 6] = 1;
    end
  endtask

  bit cons_done;
  task automatic cpu_consumer();
    line_t d, dummy;
    cons_done = 0;
    repeat (cons_delay) @(negedge clk);
    for (int i = 0; i < N; i++) begin
      addr_t a;
      a = a2c_base + addr_t'(i) * 64;
      cpu_op(OP_READ, a, '0, '0, id_t'(8 + i % 4), d);
      check(produced.exists(a >> 6) && produced[a >> 6], $sformatf("cpu got unproduced A2C line %0d", i));
      check(res_of.exists(i) && d == res_of[i], $sformatf("cpu data A2C line %0d", i));
      cpu_op(OP_FLUSH, a, d, '0, id_t'(8 + i % 4), dummy);   // consume
    end
    cons_done = 1;
  endtask

  // unshared background traffic on the CPU port
  bit bg_run;
  task automatic cpu_background();
    line_t d;
    int n = 0;
    while (bg_run) begin
      addr_t a;
      a = 64'h9_0000 + addr_t'($urandom_range(0, 63)) * 64;
      if ($urandom_range(0, 1) == 0) begin
        line_t w = rnd_line();
        bmask_t m = {$urandom, $urandom};
        gold[a >> 6] = merge(gold_of(a), w, m);
        cpu_op(OP_WRITE, a, w, m, id_t'(12 + n % 4), d);
      end else begin
        cpu_op(OP_READ, a, '0, '0, id_t'(12 + n % 4), d);
        check(d == gold_of(a), $sformatf("background read %h", a));
      end
      n++;
      repeat ($urandom_range(5, 40)) @(negedge clk);
    end
  endtask

  task automatic run_phase(input string name, input addr_t c2a, input addr_t a2c,
                           input bit ev_en, input policy_e pol, input bit bg);
    int r0 = ev_cnt["reconfig"];
    c2a_base = c2a; a2c_base = a2c;
    res_of.delete();
    cfg_write(CFG_CTRL, {61'd0, pol, ev_en});
    cfg_write(CFG_C2A_START, c2a);
    cfg_write(CFG_C2A_END, c2a + N * 64);
    cfg_write(CFG_A2C_START, a2c);
    cfg_write(CFG_A2C_END, a2c + N * 64);
    repeat (2) @(negedge clk);
    wait_idle();
    check(ev_cnt["reconfig"] > r0, {name, ": reconfiguration walk ran"});
    cfg_addr = CFG_CTRL; #1;
    check(cfg_rdata[2:0] == {pol, ev_en}, {name, ": control register"});
    bg_run = bg;
    cons_done = 0;
    fork
      cpu_producer();
      acc_run();
      cpu_consumer();
      if (bg) cpu_background();
    join_none
    wait (res_of.size() == N);
    wait (cons_done);
    repeat (200) @(negedge clk);
    bg_run = 0;
    repeat (300) @(negedge clk);
    $display("%s done at cycle %0d", name, cycle);
  endtask

  // -------------------------------------------------------------- watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- main
  initial begin
    line_t d;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait_idle();

    // phase 0: unshared caching, 4x the capacity
    for (int t = 0; t < 400; t++) begin
      addr_t a;
      int sel;
      a = 64'h5_0000 + addr_t'($urandom_range(0, 127)) * 64;
      sel = $urandom_range(0, 9);
      if (sel < 4) begin
        automatic line_t w = rnd_line();
        automatic bmask_t m = {$urandom, $urandom};
        gold[a >> 6] = merge(gold_of(a), w, m);
        cpu_op(OP_WRITE, a, w, m, 0, d);
      end else if (sel < 5) begin
        automatic line_t w = rnd_line();
        automatic bmask_t m = {$urandom, $urandom};
        gold[a >> 6] = merge(gold_of(a), w, m);
        cpu_op(OP_FLUSH, a, w, m, 0, d);
        check(mem.peek(a) == gold_of(a), "conventional clflush wrote the line back");
      end else begin
        cpu_op(OP_READ, a, '0, '0, 1, d);
        check(d == gold_of(a), $sformatf("phase0 read %h", a));
      end
    end
    // hit latency: the second read of a line answers 2 cycles after grant
    cpu_op(OP_READ, 64'h7_0000, '0, '0, 2, d);
    cpu_op(OP_READ, 64'h7_0000, '0, '0, 2, d);
    check(cpu_ready_cycle - cpu_issue_cycle == 2,
          $sformatf("hit latency %0d cycles", cpu_ready_cycle - cpu_issue_cycle));
    check(d == gold_of(64'h7_0000), "latency read data");

    // phase A: fast producer, slow consumers, eviction range on
    prod_gap_min = 0; prod_gap_max = 3; acc_max_out = 2; acc_gap = 60;
    cons_delay = 3000; prod_shuffle = 0;
    run_phase("phase A", 64'h10_0000, 64'h20_0000, 1'b1, POL_CONSUMED, 1'b0);

    // phase B: slow producer, eager accelerator, extended policy
    prod_gap_min = 20; prod_gap_max = 80; acc_max_out = 6; acc_gap = 0;
    cons_delay = 0; prod_shuffle = 0;
    run_phase("phase B", 64'h30_0000, 64'h40_0000, 1'b1, POL_EXT, 1'b1);

    // phase C: eviction range off, out-of-order producer, plain LRU
    prod_gap_min = 0; prod_gap_max = 30; acc_max_out = 3; acc_gap = 10;
    cons_delay = 1500; prod_shuffle = 1;
    run_phase("phase C", 64'h50_0000, 64'h60_0000, 1'b0, POL_LRU, 1'b1);

    // phase D: extended policy under cache pressure: ready lines pile up
    // next to unshared lines, so not-ready lines are evicted first
    prod_gap_min = 0; prod_gap_max = 2; acc_max_out = 1; acc_gap = 80;
    cons_delay = 4000; prod_shuffle = 0;
    run_phase("phase D", 64'h70_0000, 64'h80_0000, 1'b1, POL_EXT, 1'b1);

    // every mechanism must have happened
    foreach (ev_cnt[k]) begin
      $display("  %-16s %0d", k, ev_cnt[k]);
      check(ev_cnt[k] > 0, {"event never happened: ", k});
    end
    check(mem.fe_writes > 0, "F/E bits written to memory");
    $display("memory reads %0d writes %0d (with F/E set %0d)", mem.reads, mem.writes, mem.fe_writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
